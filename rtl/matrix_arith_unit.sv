// matrix_arith_unit: the reconfigurable 4x4 complex matrix adder, subtractor
// and multiplier of the 9-step MMSE detector.
//
// One evaluation computes
//     out = Zterm +/- ( op(X1)*op(Y1) + op(X2)*op(Y2) )
// where op() is either the matrix itself or its conjugate transpose, the
// second product can be switched off, and Zterm is nothing, the matrix Z or
// sigma2*I. The "Sel" input (a mau_sel_t) chooses the data path, so the same
// two 4x4 multiplier arrays serve every step of the detector: the Gram blocks
// of H^H H + sigma2*I, the Schur complement D - C*A^-1*B, the blocks of the
// inverse and the weight blocks R*H^H.
//
// All 32 complex products per output element pair are accumulated at full
// precision and rounded once. The unit is purely combinational; the caller
// registers the result, so one evaluation takes one clock cycle.
//
// The document names the adder, subtractor and multiplier units and the Sel
// signal; the exact operation set and the single-rounding accumulation are
// this design's own choices.
module matrix_arith_unit
  import mimo_pkg::*;
(
  input  mau_sel_t sel,
  input  cmat4_t   x1,
  input  cmat4_t   y1,
  input  cmat4_t   x2,
  input  cmat4_t   y2,
  input  cmat4_t   z,
  input  fx_t      sigma2,   // noise variance, same format as the data
  output cmat4_t   out
);

  cmat4_t a1, b1, a2, b2;
  cacc4_t p1, p2;

  always_comb begin
    a1 = sel.x1h ? herm4(x1) : x1;
    b1 = sel.y1h ? herm4(y1) : y1;
    a2 = sel.x2h ? herm4(x2) : x2;
    b2 = sel.y2h ? herm4(y2) : y2;
    p1 = matmul4_full(a1, b1);
    p2 = sel.p2_en ? matmul4_full(a2, b2) : '0;
  end

  always_comb begin
    cacc_t s, zt;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        s.re = p1[i][j].re + p2[i][j].re;
        s.im = p1[i][j].im + p2[i][j].im;
        if (sel.neg_p) begin
          s.re = -s.re;
          s.im = -s.im;
        end
        unique case (sel.zmode)
          Z_ADD:   zt = cwiden(z[i][j]);
          Z_SIGMA: zt = (i == j) ? cwiden(cplx_t'{re: sigma2, im: '0}) : '0;
          default: zt = '0;
        endcase
        out[i][j] = cround(cacc_t'{re: zt.re + s.re, im: zt.im + s.im});
      end
  end

endmodule
