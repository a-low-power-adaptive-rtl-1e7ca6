// dcdc_model: behavioural model of the DC/DC converter that supplies the
// DVFS domain (testbench only; not synthesizable). Time is counted in delay
// units taken as nanoseconds.
//
// A vdd_chg pulse, sampled on clk_ref, drops vdd_good; the output then
// settles to vdd_mv in NS_PER_MV units per millivolt of change, after which
// vdd_good rises. vout_mv is the modelled output voltage.
module dcdc_model #(
  parameter int NS_PER_MV = 2
)(
  input  logic        clk_ref,
  input  logic [10:0] vdd_mv,
  input  logic        vdd_chg,
  output logic        vdd_good,
  output int          vout_mv
);

  initial begin
    vdd_good = 1'b1;
    vout_mv  = 1000;
  end

  always @(posedge clk_ref) begin
    if (vdd_chg) begin
      int dv;
      vdd_good = 1'b0;
      dv = int'(vdd_mv) - vout_mv;
      if (dv < 0) dv = -dv;
      #(NS_PER_MV * dv + 10);
      vout_mv  = int'(vdd_mv);
      vdd_good = 1'b1;
    end
  end

endmodule
