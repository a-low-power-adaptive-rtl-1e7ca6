// matrix_inv4: inversion of a 4x4 Hermitian positive-definite complex matrix.
//
// The matrix is split into 2x2 blocks  M = [a b; c d]  with c = b^H and
// inverted with the same Strassen block formulas the detector applies to the
// 8x8 matrix:
//     x  = c * a^-1                 (c*a^-1 = (a^-1*b)^H, so a^-1*b is not formed)
//     e  = d - x * b                (Schur complement)
//     c' = -e^-1 * x,   b' = c'^H,   d' = e^-1
//     a' = a^-1 - x^H * c'          (= a^-1 + a^-1 b e^-1 c a^-1)
// A 2x2 Hermitian block is inverted directly: adj(a) / det(a), where det(a)
// is real. The reciprocal of the determinant is formed by one fixed-point
// division with 32 fractional bits, wider than the data word, so that small
// and large determinants keep their precision. Hermitian symmetry is imposed
// on the 2x2 blocks (only the upper off-diagonal element and the real parts
// of the diagonal are used). A non-positive determinant saturates the
// reciprocal to its largest value.
//
// The unit is combinational; the 9-step controller registers its output, so
// an inversion takes one step. Using Strassen inside the 4x4 unit follows the
// document's statement that the inversion unit computes Strassen's
// inversion; the 2x2 direct inverse and the reciprocal precision are this
// design's choices.
module matrix_inv4
  import mimo_pkg::*;
(
  input  cmat4_t m,
  output cmat4_t r
);

  localparam int unsigned RF  = 32;          // reciprocal fractional bits
  localparam int unsigned RW  = 48;          // reciprocal width (unsigned)
  localparam int unsigned NW  = 2 * FRAC + RF + 2;

  typedef logic [RW-1:0] recip_t;

  function automatic cmat2_t sub2(cmat4_t x, int bi, int bj);
    cmat2_t o;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        o[i][j] = x[bi * 2 + i][bj * 2 + j];
    return o;
  endfunction

  function automatic cmat2_t herm2(cmat2_t x);
    cmat2_t o;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        o[i][j] = cconj(x[j][i]);
    return o;
  endfunction

  // y = sgn * (p * q) + (addz ? z : 0), one rounding per element
  function automatic cmat2_t mac2(cmat2_t p, cmat2_t q, cmat2_t z, logic neg, logic addz);
    cmat2_t o;
    cacc_t  acc, t;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        acc = '0;
        for (int k = 0; k < 2; k++) begin
          t = cmul_full(p[i][k], q[k][j]);
          acc.re = acc.re + t.re;
          acc.im = acc.im + t.im;
        end
        if (neg) begin
          acc.re = -acc.re;
          acc.im = -acc.im;
        end
        if (addz) begin
          t = cwiden(z[i][j]);
          acc.re = acc.re + t.re;
          acc.im = acc.im + t.im;
        end
        o[i][j] = cround(acc);
      end
    return o;
  endfunction

  // Scale a data word by the reciprocal (RF fractional bits).
  function automatic fx_t scale(fx_t v, recip_t rcp);
    logic signed [W+RW:0] p;
    p = (W + RW + 1)'(v) * $signed({1'b0, rcp});
    p = (p + ((W + RW + 1)'(1) <<< (RF - 1))) >>> RF;
    if (p > (W + RW + 1)'(2 ** (W - 1) - 1)) return fx_t'(2 ** (W - 1) - 1);
    if (p < -(W + RW + 1)'(2 ** (W - 1)))    return fx_t'(-(2 ** (W - 1)));
    return fx_t'(p);
  endfunction

  function automatic cmat2_t inv2(cmat2_t a);
    acc_t          det;
    logic [NW-1:0] num, q;
    recip_t        rcp;
    cmat2_t        o;
    det = acc_t'(a[0][0].re) * acc_t'(a[1][1].re)
        - acc_t'(a[0][1].re) * acc_t'(a[0][1].re)
        - acc_t'(a[0][1].im) * acc_t'(a[0][1].im);
    num = NW'(1) << (2 * FRAC + RF);
    if (det <= 0) begin
      rcp = '1;
    end else begin
      q   = num / NW'(det);
      rcp = (q > NW'({RW{1'b1}})) ? '1 : RW'(q);
    end
    o[0][0] = cplx_t'{re: scale(a[1][1].re, rcp), im: '0};
    o[1][1] = cplx_t'{re: scale(a[0][0].re, rcp), im: '0};
    o[0][1] = cplx_t'{re: scale(-a[0][1].re, rcp), im: scale(-a[0][1].im, rcp)};
    o[1][0] = cconj(o[0][1]);
    return o;
  endfunction

  cmat2_t a, b, c, d, ainv, x, e, einv, cp, f;

  always_comb begin
    a    = sub2(m, 0, 0);
    b    = sub2(m, 0, 1);
    d    = sub2(m, 1, 1);
    c    = herm2(b);
    ainv = inv2(a);
    x    = mac2(c, ainv, '0, 1'b0, 1'b0);
    e    = mac2(x, b, d, 1'b1, 1'b1);
    einv = inv2(e);
    cp   = mac2(einv, x, '0, 1'b1, 1'b0);
    f    = mac2(herm2(x), cp, ainv, 1'b1, 1'b1);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r[i][j]         = f[i][j];
        r[i][j + 2]     = cconj(cp[j][i]);
        r[i + 2][j]     = cp[i][j];
        r[i + 2][j + 2] = einv[i][j];
      end
  end

endmodule
