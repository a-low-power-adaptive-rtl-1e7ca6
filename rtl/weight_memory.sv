// weight_memory: the memory unit that holds the MMSE weight matrices G_k.
//
// Two banks of DEPTH entries, one 8x8 complex matrix per entry. The weight
// unit writes a complete new set into one bank (wbank) in the DVFS clock
// domain while the MIMO decoder keeps reading the other bank (rbank) in the
// receiver clock domain; the scheduler swaps the banks at a packet boundary
// once a new set is complete. Reads are synchronous, one cycle of clk_r.
//
// The document stores G_k in a memory unit that the decoding process reads;
// the double bank is this design's choice, needed because the adaptive
// detector computes new weights while older ones are still in use.
module weight_memory
  import mimo_pkg::*;
#(
  parameter int unsigned DEPTH = mimo_pkg::NUM_SC
)(
  input  logic            clk_w,
  input  logic            we,
  input  logic            wbank,
  input  logic [SC_W-1:0] waddr,
  input  cmat8_t          wdata,
  input  logic            clk_r,
  input  logic            rbank,
  input  logic [SC_W-1:0] raddr,
  output cmat8_t          rdata
);

  cmat8_t mem [2][DEPTH];

  always_ff @(posedge clk_w) begin
    if (we && waddr < SC_W'(DEPTH)) mem[wbank][waddr] <= wdata;
  end

  always_ff @(posedge clk_r) begin
    rdata <= (raddr < SC_W'(DEPTH)) ? mem[rbank][raddr] : '0;
  end

endmodule
