// pulse_sync: carries a one-cycle pulse from one clock domain to another.
//
// The source pulse toggles a flag; the flag passes two flip-flops in the
// destination domain and an edge detector turns each toggle back into a
// one-cycle pulse. Pulses must be spaced by at least three destination
// cycles. Latency is two to three destination cycles. A standard toggle
// synchronizer, used where the receiver clock and the DVFS clock meet.
module pulse_sync (
  input  logic clk_src,
  input  logic rst_src_n,
  input  logic pulse_src,
  input  logic clk_dst,
  input  logic rst_dst_n,
  output logic pulse_dst
);

  logic tgl_src;
  logic [2:0] sync_dst;

  always_ff @(posedge clk_src or negedge rst_src_n) begin
    if (!rst_src_n)     tgl_src <= 1'b0;
    else if (pulse_src) tgl_src <= ~tgl_src;
  end

  always_ff @(posedge clk_dst or negedge rst_dst_n) begin
    if (!rst_dst_n) sync_dst <= '0;
    else            sync_dst <= {sync_dst[1:0], tgl_src};
  end

  assign pulse_dst = sync_dst[2] ^ sync_dst[1];

endmodule
