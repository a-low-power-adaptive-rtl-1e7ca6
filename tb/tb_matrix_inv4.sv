// tb_matrix_inv4: self-checking test of the 4x4 Hermitian inversion unit.
//
// Builds positive-definite Hermitian matrices M = H^H H + s2*I from random
// 4x4 channels (and a few fixed ones: identity, diagonal, strongly coupled),
// quantises them, applies them to the unit and compares every element of the
// result with a double-precision Gauss-Jordan inverse of the same quantised
// matrix. The unit is combinational; the result is sampled 1 ns later.
module tb_matrix_inv4;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  cmat4_t m, r;
  int     checks = 0, failures = 0;
  real    worst = 0.0;

  matrix_inv4 dut (.m(m), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input rmat_t hr, hi, input real s2);
    rmat_t qr, qi, pr, pi, mr, mi, ir, ii;
    real   e;
    mherm(hr, hi, 4, qr, qi);
    mmul(qr, qi, hr, hi, 4, pr, pi);
    for (int i = 0; i < 4; i++) pr[i][i] += s2;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        mr[i][j] = 0.0;
        mi[i][j] = 0.0;
      end
    for (int i = 0; i < 4; i++)
      for (int j = i; j < 4; j++) begin
        m[i][j].re = r2fx(pr[i][j]);
        m[i][j].im = (i == j) ? '0 : r2fx(pi[i][j]);
        m[j][i]    = cconj(m[i][j]);
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        mr[i][j] = fx2r(m[i][j].re);
        mi[i][j] = fx2r(m[i][j].im);
      end
    minv(mr, mi, 4, ir, ii);
    #1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        e = err(r[i][j].re, ir[i][j]);
        if (err(r[i][j].im, ii[i][j]) > e) e = err(r[i][j].im, ii[i][j]);
        if (e > worst) worst = e;
        checks++;
        if (e > 2.0e-3) begin
          failures++;
          if (failures < 10)
            $display("mismatch [%0d][%0d]: got %f,%f want %f,%f", i, j,
                     fx2r(r[i][j].re), fx2r(r[i][j].im), ir[i][j], ii[i][j]);
        end
      end
  endtask

  initial begin
    rmat_t hr, hi;
    // identity channel
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        hr[i][j] = (i == j) ? 1.0 : 0.0;
        hi[i][j] = 0.0;
      end
    run_case(hr, hi, 0.0);
    // diagonal channel with different gains
    for (int i = 0; i < 4; i++) hr[i][i] = 0.5 + 0.4 * i;
    run_case(hr, hi, 0.1);
    // strongly coupled channel
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        hr[i][j] = (i == j) ? 0.9 : 0.6;
        hi[i][j] = (i > j) ? 0.2 : -0.1;
      end
    run_case(hr, hi, 0.05);
    // random channels
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          hr[i][j] = fx2r(rnd_fx(0.7));
          hi[i][j] = fx2r(rnd_fx(0.7));
        end
      run_case(hr, hi, 0.1 + 0.4 * (n % 4));
    end
    $display("worst relative error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
