// mimo_pkg: shared types, constants and fixed-point helpers of the adaptive
// 8x8 MMSE MIMO detector.
//
// Numbers are two's-complement fixed point with a 24-bit word (the word
// length of the 9-step detector) and 16 fractional bits (this design's own
// choice: it leaves 7 integer bits, enough for the Gram matrix H^H H of an
// 8x8 channel with unit-scale entries). Products are kept at full precision
// in 56-bit accumulators and rounded (round-half-up, saturating) once per
// matrix element, so a 4x4 matrix product costs one rounding per output.
//
// Matrices are packed arrays indexed [row][col]; an 8x8 matrix is handled as
// four 4x4 blocks, block b = 2*row_block + col_block (0 = top-left "A",
// 1 = top-right "B", 2 = bottom-left "C", 3 = bottom-right "D").
package mimo_pkg;

  parameter int unsigned W     = 24;         // data word length
  parameter int unsigned FRAC  = 16;         // fractional bits
  parameter int unsigned ACC_W = 2 * W + 8;  // accumulator width
  parameter int unsigned NUM_SC = 108;       // data subcarriers (40 MHz, 128-point FFT)
  parameter int unsigned SC_W   = 7;         // subcarrier index width

  typedef logic signed [W-1:0]     fx_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cplx_t;

  typedef struct packed {
    acc_t re;
    acc_t im;
  } cacc_t;

  typedef cplx_t [1:0][1:0] cmat2_t;
  typedef cplx_t [3:0][3:0] cmat4_t;
  typedef cacc_t [3:0][3:0] cacc4_t;
  typedef cplx_t [7:0][7:0] cmat8_t;
  typedef cplx_t [7:0]      cvec8_t;
  typedef cmat4_t [3:0]     cblk8_t;   // 8x8 matrix as four 4x4 blocks

  // How the matrix arithmetic unit adds its third operand.
  typedef enum logic [1:0] {
    Z_NONE  = 2'd0,   // out = +/-(products)
    Z_ADD   = 2'd1,   // out = Z +/- (products)
    Z_SIGMA = 2'd2    // out = sigma2*I +/- (products)
  } zmode_e;

  // "Sel" of the matrix arithmetic unit: data-path selection for one step.
  typedef struct packed {
    logic   x1h;     // use X1^H instead of X1
    logic   y1h;     // use Y1^H instead of Y1
    logic   p2_en;   // add the second product X2*Y2
    logic   x2h;     // use X2^H
    logic   y2h;     // use Y2^H
    logic   neg_p;   // subtract the products instead of adding them
    zmode_e zmode;
  } mau_sel_t;

  // ---------------------------------------------------------------------
  // Scalar helpers
  // ---------------------------------------------------------------------
  function automatic cplx_t cconj(cplx_t a);
    cplx_t r;
    r.re = a.re;
    r.im = -a.im;
    return r;
  endfunction

  function automatic cacc_t cmul_full(cplx_t a, cplx_t b);
    cacc_t r;
    r.re = acc_t'(a.re) * acc_t'(b.re) - acc_t'(a.im) * acc_t'(b.im);
    r.im = acc_t'(a.re) * acc_t'(b.im) + acc_t'(a.im) * acc_t'(b.re);
    return r;
  endfunction

  function automatic cacc_t cwiden(cplx_t a);
    cacc_t r;
    r.re = acc_t'(a.re) <<< FRAC;
    r.im = acc_t'(a.im) <<< FRAC;
    return r;
  endfunction

  // Round an accumulator holding 2*FRAC fractional bits to a data word.
  function automatic fx_t round_sat(acc_t x);
    acc_t t;
    t = (x + (acc_t'(1) <<< (FRAC - 1))) >>> FRAC;
    if (t > acc_t'(2 ** (W - 1) - 1)) return fx_t'(2 ** (W - 1) - 1);
    if (t < -acc_t'(2 ** (W - 1)))    return fx_t'(-(2 ** (W - 1)));
    return fx_t'(t);
  endfunction

  function automatic cplx_t cround(cacc_t a);
    cplx_t r;
    r.re = round_sat(a.re);
    r.im = round_sat(a.im);
    return r;
  endfunction

  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    return cround(cmul_full(a, b));
  endfunction

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    return cround(cacc_t'{re: (acc_t'(a.re) + acc_t'(b.re)) <<< FRAC,
                          im: (acc_t'(a.im) + acc_t'(b.im)) <<< FRAC});
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    return cround(cacc_t'{re: (acc_t'(a.re) - acc_t'(b.re)) <<< FRAC,
                          im: (acc_t'(a.im) - acc_t'(b.im)) <<< FRAC});
  endfunction

  function automatic cplx_t cneg(cplx_t a);
    return csub(cplx_t'(0), a);
  endfunction

  // ---------------------------------------------------------------------
  // Matrix helpers
  // ---------------------------------------------------------------------
  function automatic cmat4_t herm4(cmat4_t m);
    cmat4_t r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        r[i][j] = cconj(m[j][i]);
    return r;
  endfunction

  // Full-precision 4x4 product X*Y.
  function automatic cacc4_t matmul4_full(cmat4_t x, cmat4_t y);
    cacc4_t r;
    cacc_t  p;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j] = '0;
        for (int k = 0; k < 4; k++) begin
          p = cmul_full(x[i][k], y[k][j]);
          r[i][j].re = r[i][j].re + p.re;
          r[i][j].im = r[i][j].im + p.im;
        end
      end
    return r;
  endfunction

  function automatic cmat4_t blk_of(cmat8_t m, int b);
    cmat4_t r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        r[i][j] = m[(b / 2) * 4 + i][(b % 2) * 4 + j];
    return r;
  endfunction

  function automatic cmat8_t mat_of_blks(cblk8_t b);
    cmat8_t r;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        r[i][j] = b[(i / 4) * 2 + (j / 4)][i % 4][j % 4];
    return r;
  endfunction

endpackage
