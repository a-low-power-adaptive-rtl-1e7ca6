// tb_matrix_arith_unit: self-checking test of the reconfigurable 4x4 matrix
// arithmetic unit.
//
// For random operands and every combination of the Sel fields (conjugate
// transposes, second product on/off, sign, Z mode) the output is compared
// with the same expression evaluated in double precision from the quantised
// operands. Because the unit rounds once per element, the result must lie
// within one LSB of the exact value. The unit is combinational.
module tb_matrix_arith_unit;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  mau_sel_t sel;
  cmat4_t   x1, y1, x2, y2, z, out;
  fx_t      sigma2;
  int       checks = 0, failures = 0;

  matrix_arith_unit dut (.sel, .x1, .y1, .x2, .y2, .z, .sigma2, .out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic to_r(input cmat4_t a, output rmat_t ar, ai);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        ar[i][j] = (i < 4 && j < 4) ? fx2r(a[i][j].re) : 0.0;
        ai[i][j] = (i < 4 && j < 4) ? fx2r(a[i][j].im) : 0.0;
      end
  endtask

  function automatic cmat4_t rnd_mat(real lim);
    cmat4_t a;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a[i][j].re = rnd_fx(lim);
        a[i][j].im = rnd_fx(lim);
      end
    return a;
  endfunction

  initial begin
    rmat_t ar, ai, br, bi, cr, ci, dr, di, p1r, p1i, p2r, p2i, tr, ti;
    real   wr, wi, s;
    int    counts [4];
    for (int n = 0; n < 4; n++) counts[n] = 0;
    for (int n = 0; n < 512; n++) begin
      x1 = rnd_mat(1.0); y1 = rnd_mat(1.0); x2 = rnd_mat(1.0); y2 = rnd_mat(1.0);
      z  = rnd_mat(2.0);
      sigma2 = rnd_fx(1.0);
      if (sigma2 < 0) sigma2 = -sigma2;
      sel = mau_sel_t'(n[7:0]);
      sel.zmode = zmode_e'(n[8:7] == 2'd3 ? 2'd0 : n[8:7]);
      counts[sel.zmode]++;
      // reference
      to_r(x1, ar, ai); if (sel.x1h) begin mherm(ar, ai, 4, tr, ti); ar = tr; ai = ti; end
      to_r(y1, br, bi); if (sel.y1h) begin mherm(br, bi, 4, tr, ti); br = tr; bi = ti; end
      mmul(ar, ai, br, bi, 4, p1r, p1i);
      to_r(x2, cr, ci); if (sel.x2h) begin mherm(cr, ci, 4, tr, ti); cr = tr; ci = ti; end
      to_r(y2, dr, di); if (sel.y2h) begin mherm(dr, di, 4, tr, ti); dr = tr; di = ti; end
      mmul(cr, ci, dr, di, 4, p2r, p2i);
      to_r(z, tr, ti);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          wr = p1r[i][j] + (sel.p2_en ? p2r[i][j] : 0.0);
          wi = p1i[i][j] + (sel.p2_en ? p2i[i][j] : 0.0);
          s  = sel.neg_p ? -1.0 : 1.0;
          wr = s * wr;
          wi = s * wi;
          if (sel.zmode == Z_ADD) begin
            wr += tr[i][j];
            wi += ti[i][j];
          end else if (sel.zmode == Z_SIGMA && i == j) begin
            wr += fx2r(sigma2);
          end
          checks++;
          if ((fx2r(out[i][j].re) - wr) > 1.0 / 65536.0 || (wr - fx2r(out[i][j].re)) > 1.0 / 65536.0 ||
              (fx2r(out[i][j].im) - wi) > 1.0 / 65536.0 || (wi - fx2r(out[i][j].im)) > 1.0 / 65536.0) begin
            failures++;
            if (failures < 10)
              $display("case %0d sel=%b [%0d][%0d]: got %f,%f want %f,%f", n, sel, i, j,
                       fx2r(out[i][j].re), fx2r(out[i][j].im), wr, wi);
          end
        end
    end
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (counts[n] == 0) begin
        failures++;
        $display("Z mode %0d never exercised", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
