// tb_ref_pkg: floating-point reference models for the detector testbenches.
//
// Complex matrices are held as separate real and imaginary arrays of reals
// (rmat_t, indexed [row][col], up to 8x8). The package converts between the
// 24-bit fixed-point data format (16 fractional bits) and reals, and gives
// the matrix product, the conjugate transpose, Gauss-Jordan inversion with
// partial pivoting, and the MMSE weights G = (H^H H + s2 I)^-1 H^H, all in
// double precision and independent of the RTL's arithmetic.
package tb_ref_pkg;
  import mimo_pkg::*;

  typedef real rmat_t [8][8];

  function automatic real fx2r(fx_t v);
    return real'(v) / 65536.0;
  endfunction

  function automatic fx_t r2fx(real v);
    real s;
    s = v * 65536.0;
    s = (s >= 0.0) ? s + 0.5 : s - 0.5;
    return fx_t'($rtoi(s));
  endfunction

  // Random fixed-point value, uniform in [-lim, lim].
  function automatic fx_t rnd_fx(real lim);
    int unsigned span;
    span = $rtoi(lim * 65536.0);
    return fx_t'(int'($urandom_range(2 * span, 0)) - int'(span));
  endfunction

  task automatic mmul(input rmat_t ar, ai, br, bi, input int n, output rmat_t cr, ci);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        cr[i][j] = 0.0;
        ci[i][j] = 0.0;
      end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        for (int k = 0; k < n; k++) begin
          cr[i][j] += ar[i][k] * br[k][j] - ai[i][k] * bi[k][j];
          ci[i][j] += ar[i][k] * bi[k][j] + ai[i][k] * br[k][j];
        end
  endtask

  task automatic mherm(input rmat_t ar, ai, input int n, output rmat_t cr, ci);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        cr[i][j] = 0.0;
        ci[i][j] = 0.0;
      end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        cr[i][j] = ar[j][i];
        ci[i][j] = -ai[j][i];
      end
  endtask

  // Gauss-Jordan inversion of an n x n complex matrix.
  task automatic minv(input rmat_t ar, ai, input int n, output rmat_t br, bi);
    real mr [8][16];
    real mi [8][16];
    real pr, pi, d, tr, ti, fr, fi;
    int  p;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < 2 * n; j++) begin
        mr[i][j] = (j < n) ? ar[i][j] : ((j - n == i) ? 1.0 : 0.0);
        mi[i][j] = (j < n) ? ai[i][j] : 0.0;
      end
    for (int c = 0; c < n; c++) begin
      p = c;
      for (int r = c + 1; r < n; r++)
        if (mr[r][c] * mr[r][c] + mi[r][c] * mi[r][c] >
            mr[p][c] * mr[p][c] + mi[p][c] * mi[p][c]) p = r;
      for (int j = 0; j < 2 * n; j++) begin
        tr = mr[c][j]; ti = mi[c][j];
        mr[c][j] = mr[p][j]; mi[c][j] = mi[p][j];
        mr[p][j] = tr; mi[p][j] = ti;
      end
      d  = mr[c][c] * mr[c][c] + mi[c][c] * mi[c][c];
      pr = mr[c][c] / d;
      pi = -mi[c][c] / d;
      for (int j = 0; j < 2 * n; j++) begin
        tr = mr[c][j] * pr - mi[c][j] * pi;
        ti = mr[c][j] * pi + mi[c][j] * pr;
        mr[c][j] = tr; mi[c][j] = ti;
      end
      for (int r = 0; r < n; r++)
        if (r != c) begin
          fr = mr[r][c]; fi = mi[r][c];
          for (int j = 0; j < 2 * n; j++) begin
            mr[r][j] -= fr * mr[c][j] - fi * mi[c][j];
            mi[r][j] -= fr * mi[c][j] + fi * mr[c][j];
          end
        end
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        br[i][j] = (i < n && j < n) ? mr[i][j + n] : 0.0;
        bi[i][j] = (i < n && j < n) ? mi[i][j + n] : 0.0;
      end
  endtask

  // MMSE weights of an n x n channel.
  task automatic mmse(input rmat_t hr, hi, input real s2, input int n, output rmat_t gr, gi);
    rmat_t qr, qi, pr, pi, rr, ri;
    mherm(hr, hi, n, qr, qi);
    mmul(qr, qi, hr, hi, n, pr, pi);
    for (int i = 0; i < n; i++) pr[i][i] += s2;
    minv(pr, pi, n, rr, ri);
    mmul(rr, ri, qr, qi, n, gr, gi);
  endtask

  // Error of a fixed-point value against a reference, relative to 1+|ref|.
  function automatic real err(fx_t v, real ref_v);
    real d;
    d = fx2r(v) - ref_v;
    if (d < 0.0) d = -d;
    return d / (1.0 + ((ref_v < 0.0) ? -ref_v : ref_v));
  endfunction

endpackage
