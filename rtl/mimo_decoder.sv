// mimo_decoder: linear MIMO detection s_hat = G_k * y_k (Eq. 3 of the MMSE
// detector) for one subcarrier per clock cycle.
//
// A received vector y_k (8 complex values, one per receive antenna) enters
// with its subcarrier index. The index addresses the active bank of the
// weight memory (read address wmem_raddr, data one cycle later), the vector
// is delayed to meet the weights, and an array of 64 complex multipliers
// forms the 8x8 matrix-vector product with one rounding per output. The
// result is registered: s_valid follows y_valid by two cycles, and a new
// vector may enter every cycle.
//
// The product itself follows the document; the fully parallel one-vector-
// per-cycle organisation is this design's choice.
module mimo_decoder
  import mimo_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            y_valid,
  input  logic [SC_W-1:0] y_k,
  input  cvec8_t          y,
  output logic [SC_W-1:0] wmem_raddr,
  input  cmat8_t          wmem_rdata,
  output logic            s_valid,
  output logic [SC_W-1:0] s_k,
  output cvec8_t          s
);

  logic            v1;
  logic [SC_W-1:0] k1;
  cvec8_t          y1, prod;

  assign wmem_raddr = y_k;

  always_comb begin
    cacc_t acc, p;
    for (int i = 0; i < 8; i++) begin
      acc = '0;
      for (int j = 0; j < 8; j++) begin
        p = cmul_full(wmem_rdata[i][j], y1[j]);
        acc.re = acc.re + p.re;
        acc.im = acc.im + p.im;
      end
      prod[i] = cround(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1      <= 1'b0;
      s_valid <= 1'b0;
      k1      <= '0;
      s_k     <= '0;
      y1      <= '0;
      s       <= '0;
    end else begin
      v1      <= y_valid;
      k1      <= y_k;
      y1      <= y;
      s_valid <= v1;
      s_k     <= k1;
      if (v1) s <= prod;
    end
  end

endmodule
