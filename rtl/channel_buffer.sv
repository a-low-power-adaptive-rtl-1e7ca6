// channel_buffer: store of the estimated 8x8 channel matrices H_k of one
// packet, one entry per data subcarrier.
//
// The channel estimator writes H_k in the receiver clock domain (clk_w).
// The MMSE weight unit reads it in the DVFS clock domain (clk_a, read port
// A) while it computes over one or more packet times at a lowered clock,
// and the Doppler estimator reads the same entries as the reference channel
// in the receiver domain (read port B). Both reads are synchronous: data
// appears one cycle of the port's clock after the address. A read on port B
// at the address being written returns the old contents, so the Doppler
// estimator can compare a new estimate with the stored reference in the same
// pass that overwrites it.
//
// The document gives the channel matrix as the input of the weight unit but
// no storage for it; a buffer is needed because the weight computation is
// spread over several packets, and its organisation (one full matrix per
// word, two read ports) is this design's own choice. The scheduler never
// writes while port A is in use, so the two clock domains never touch the
// same entry at the same time.
module channel_buffer
  import mimo_pkg::*;
#(
  parameter int unsigned DEPTH = mimo_pkg::NUM_SC
)(
  input  logic            clk_w,
  input  logic            we,
  input  logic [SC_W-1:0] waddr,
  input  cmat8_t          wdata,
  input  logic [SC_W-1:0] raddr_b,
  output cmat8_t          rdata_b,
  input  logic            clk_a,
  input  logic [SC_W-1:0] raddr_a,
  output cmat8_t          rdata_a
);

  cmat8_t mem [DEPTH];

  always_ff @(posedge clk_w) begin
    if (we && waddr < SC_W'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk_w) begin
    rdata_b <= (raddr_b < SC_W'(DEPTH)) ? mem[raddr_b] : '0;
  end

  always_ff @(posedge clk_a) begin
    rdata_a <= (raddr_a < SC_W'(DEPTH)) ? mem[raddr_a] : '0;
  end

endmodule
