// pll_model: behavioural model of the PLL that clocks the DVFS domain
// (testbench only; not synthesizable). Time is counted in delay units taken
// as nanoseconds.
//
// freq_mhz selects the output frequency (period 1000/freq_mhz units). A
// freq_chg pulse, sampled on clk_ref, drops lock; after LOCK_TIME units the
// output switches to the new frequency and lock rises again.
module pll_model #(
  parameter int LOCK_TIME = 2000
)(
  input  logic       clk_ref,
  input  logic [7:0] freq_mhz,
  input  logic       freq_chg,
  output logic       clk_out,
  output logic       lock
);

  int period = 25;

  initial begin
    clk_out = 1'b0;
    lock    = 1'b1;
  end

  always begin
    #(period / 2) clk_out = 1'b1;
    #(period - period / 2) clk_out = 1'b0;
  end

  always @(posedge clk_ref) begin
    if (freq_chg) begin
      lock = 1'b0;
      #(LOCK_TIME);
      period = 1000 / int'(freq_mhz);
      lock = 1'b1;
    end
  end

endmodule
