// tb_dvfs_ctrl: self-checking test of the DVFS control circuit.
//
// Part 1, Doppler classification: NMSE measurements are synthesised for
// Doppler shifts of 2, 6, 10, 14, 18 and 25 Hz at intervals of 1 to 8
// packets (xi = (2*pi*fD*t*T)^2/2, T = 80 us). The class and the skipped-
// packet count must match the table for both detection methods. A
// measurement without a reference must leave the class unchanged.
// Part 2, operating points: requests for windows of 0, 2, 4, 8 packets (with
// either method) are made with behavioural PLL and DC/DC models attached. After
// each request the clock and supply must reach the table's values, the
// supply must change before the clock when speeding up and after it when
// slowing down, and settled must return.
module tb_dvfs_ctrl;
  import mimo_pkg::*;

  localparam real T_PKT = 80.0e-6;
  localparam real PI    = 3.14159265358979;

  logic        clk = 1'b0, rst_n = 1'b0, method_b = 1'b0;
  logic        meas_valid = 1'b0, meas_ref_ok = 1'b0, op_req = 1'b0;
  logic [63:0] num = '0, den = '0;
  logic [7:0]  t_pkts = 8'd1;
  logic [2:0]  doppler_class;
  logic [3:0]  skip_est, op_skip = '0;
  logic [7:0]  freq_mhz;
  logic [10:0] vdd_mv;
  logic        freq_chg, vdd_chg, pll_lock, vdd_good, settled, clk_pll;
  int          vout_mv;
  int          checks = 0, failures = 0;
  int          t_fchg, t_vchg, cyc = 0;

  dvfs_ctrl #(.PKT_US(80.0)) dut (.clk, .rst_n, .method_b, .meas_valid, .meas_ref_ok,
    .num, .den, .t_pkts, .doppler_class, .skip_est, .op_req, .op_skip, .freq_mhz,
    .vdd_mv, .freq_chg, .vdd_chg, .pll_lock, .vdd_good, .settled);

  pll_model  u_pll  (.clk_ref(clk), .freq_mhz, .freq_chg, .clk_out(clk_pll), .lock(pll_lock));
  dcdc_model u_dcdc (.clk_ref(clk), .vdd_mv, .vdd_chg, .vdd_good, .vout_mv);

  always begin
    #12 clk = 1'b1;
    #13 clk = 1'b0;
  end

  always @(posedge clk) begin
    cyc++;
    if (freq_chg) t_fchg = cyc;
    if (vdd_chg)  t_vchg = cyc;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic measure(input real fd, input int t, input logic ref_ok);
    real xi, x;
    x  = 2.0 * PI * fd * real'(t) * T_PKT;
    xi = x * x / 2.0;
    @(negedge clk);
    den = 64'd1 << 40;
    num = 64'(longint'(xi * 1099511627776.0));
    t_pkts = 8'(t);
    meas_ref_ok = ref_ok;
    meas_valid = 1'b1;
    @(negedge clk);
    meas_valid = 1'b0;
  endtask

  task automatic request(input int skip, input logic mb, input int f_want, input int v_want);
    int  v_before;
    logic speed_up, slow_down;
    v_before = int'(vdd_mv);
    t_fchg = -1; t_vchg = -1;
    @(negedge clk);
    method_b = mb;
    op_skip = 4'(skip);
    op_req = 1'b1;
    @(negedge clk);
    op_req = 1'b0;
    while (!settled) @(negedge clk);
    speed_up  = v_want > v_before;
    slow_down = v_want < v_before;
    chk(int'(freq_mhz) == f_want && int'(vdd_mv) == v_want && vout_mv == v_want,
        $sformatf("skip %0d method_b %0d: %0d MHz %0d mV, want %0d MHz %0d mV",
                  skip, mb, freq_mhz, vdd_mv, f_want, v_want));
    chk(pll_lock && vdd_good, "PLL locked and supply good after settling");
    if (speed_up)  chk(t_vchg >= 0 && t_fchg > t_vchg, "supply raised before clock");
    if (slow_down) chk(t_fchg >= 0 && t_vchg > t_fchg, "clock lowered before supply");
  endtask

  initial begin
    real fds [6] = '{2.0, 6.0, 10.0, 14.0, 18.0, 25.0};
    int  skip_a [6] = '{4, 4, 4, 2, 2, 0};
    int  skip_b [6] = '{8, 8, 4, 2, 2, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(doppler_class == 3'd5, "class after reset is the highest");
    chk(skip_est == 4'd0, "no skipping before a measurement");
    for (int c = 0; c < 6; c++)
      for (int t = 1; t <= 8; t++) begin
        measure(fds[c], t, 1'b1);
        method_b = 1'b0;
        #1;
        chk(int'(doppler_class) == c && int'(skip_est) == skip_a[c],
            $sformatf("%0.0f Hz t=%0d: class %0d skip %0d", fds[c], t, doppler_class, skip_est));
        method_b = 1'b1;
        #1;
        chk(int'(skip_est) == skip_b[c], $sformatf("%0.0f Hz method B: skip %0d", fds[c], skip_est));
      end
    measure(2.0, 4, 1'b0);
    chk(doppler_class == 3'd5, "measurement without reference ignored");
    // operating points (Table of clock and supply per window)
    request(8, 1'b0, 2, 430);
    request(2, 1'b0, 8, 520);
    request(4, 1'b0, 4, 470);
    request(0, 1'b0, 40, 1000);
    request(8, 1'b1, 2, 430);
    request(4, 1'b0, 4, 470);
    request(0, 1'b1, 40, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
