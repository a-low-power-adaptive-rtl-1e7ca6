// adaptive_mimo_detector: 8x8 MMSE MIMO detector whose weight computation
// adapts its speed, clock and supply to the Doppler shift of the channel.
//
// Two clock domains. The receiver domain (clk_sys) takes the per-subcarrier
// channel estimates and received vectors from the FFT side, estimates the
// Doppler shift (nmse_unit, dvfs_ctrl), schedules weight updates
// (adaptive_sched) and decodes every data vector (mimo_decoder). The DVFS
// domain (clk_det, from the PLL, with the supply from the DC/DC converter)
// holds only the 9-step MMSE weight unit (mmse_9step). The channel buffer
// and the double-banked weight memory sit between the domains; start and
// done cross through toggle synchronizers. The bank written by the weight
// unit (the one the decoder is not reading), sigma2 and method_b are static
// while the weight unit runs.
//
// Operation per update window: a captured packet's channel matrices are
// stored; the DVFS controller sets the clock and supply for the window; the
// weight unit computes G_k = (H^H H + sigma2 I)^-1 H^H for all subcarriers
// into the idle bank; at the next packet start the banks swap and the
// decoder applies the new weights, s_hat = G_k y_k, until the next swap.
//
// Interface timing: cest_* and y_* carry one subcarrier per clk_sys cycle in
// order 0..NSC-1; s_* follows y_* by two cycles. pkt_start is a one-cycle
// pulse at each packet start, before its channel estimates. The PLL and DC/DC
// converter are outside: freq_mhz/freq_chg and vdd_mv/vdd_chg command them,
// pll_lock and vdd_good report back, and clk_det is the PLL's output.
// rst_n must be released synchronously to both clocks.
module adaptive_mimo_detector
  import mimo_pkg::*;
#(
  parameter int unsigned NSC    = mimo_pkg::NUM_SC,
  parameter real         PKT_US = 80.0
)(
  input  logic            clk_sys,
  input  logic            clk_det,
  input  logic            rst_n,
  input  fx_t             sigma2,
  input  logic            method_b,
  input  logic            pkt_start,
  input  logic            cest_valid,
  input  logic [SC_W-1:0] cest_k,
  input  cmat8_t          cest_h,
  input  logic            y_valid,
  input  logic [SC_W-1:0] y_k,
  input  cvec8_t          y,
  output logic            s_valid,
  output logic [SC_W-1:0] s_k,
  output cvec8_t          s_hat,
  output logic [7:0]      freq_mhz,
  output logic [10:0]     vdd_mv,
  output logic            freq_chg,
  output logic            vdd_chg,
  input  logic            pll_lock,
  input  logic            vdd_good,
  output logic [2:0]      doppler_class,
  output logic [3:0]      skip_cur,
  output logic            det_busy,
  output logic            weights_ok,
  output logic            swap_evt,
  output logic            overrun_evt
);

  // receiver-domain signals
  logic [SC_W-1:0] ref_raddr, wm_raddr;
  cmat8_t          ref_rdata, wm_rdata;
  logic [63:0]     num, den;
  logic            meas_valid, capture_we, op_req, det_start, det_done_sys;
  logic [3:0]      skip_est;
  logic            settled, rbank, ref_ok;
  logic [7:0]      t_meas;

  // DVFS-domain signals
  logic            start_det, done_det, g_we, det_unit_busy;
  logic [SC_W-1:0] h_raddr, g_waddr;
  cmat8_t          h_rdata, g_wdata;

  channel_buffer #(.DEPTH(NSC)) u_chbuf (
    .clk_w(clk_sys), .we(capture_we), .waddr(cest_k), .wdata(cest_h),
    .raddr_b(ref_raddr), .rdata_b(ref_rdata),
    .clk_a(clk_det), .raddr_a(h_raddr), .rdata_a(h_rdata));

  nmse_unit #(.NSC(NSC)) u_nmse (
    .clk(clk_sys), .rst_n, .cest_valid, .cest_k, .cest_h,
    .ref_raddr, .ref_rdata, .num, .den, .meas_valid);

  dvfs_ctrl #(.PKT_US(PKT_US)) u_dvfs (
    .clk(clk_sys), .rst_n, .method_b, .meas_valid, .meas_ref_ok(ref_ok),
    .num, .den, .t_pkts(t_meas), .doppler_class, .skip_est,
    .op_req, .op_skip(skip_cur), .freq_mhz, .vdd_mv, .freq_chg, .vdd_chg,
    .pll_lock, .vdd_good, .settled);

  adaptive_sched #(.NSC(NSC)) u_sched (
    .clk(clk_sys), .rst_n, .pkt_start, .cest_valid, .cest_k, .skip_est,
    .dvfs_settled(settled), .det_done(det_done_sys), .capture_we, .op_req,
    .op_skip(skip_cur), .det_start, .computing(det_busy), .rbank, .weights_ok,
    .t_meas, .ref_ok, .swap_evt, .overrun_evt);

  pulse_sync u_sync_start (
    .clk_src(clk_sys), .rst_src_n(rst_n), .pulse_src(det_start),
    .clk_dst(clk_det), .rst_dst_n(rst_n), .pulse_dst(start_det));

  pulse_sync u_sync_done (
    .clk_src(clk_det), .rst_src_n(rst_n), .pulse_src(done_det),
    .clk_dst(clk_sys), .rst_dst_n(rst_n), .pulse_dst(det_done_sys));

  mmse_9step #(.NSC(NSC)) u_mmse (
    .clk(clk_det), .rst_n, .start(start_det), .sigma2, .h_raddr, .h_rdata,
    .g_we, .g_waddr, .g_wdata, .busy(det_unit_busy), .done(done_det));

  weight_memory #(.DEPTH(NSC)) u_wmem (
    .clk_w(clk_det), .we(g_we), .wbank(~rbank), .waddr(g_waddr), .wdata(g_wdata),
    .clk_r(clk_sys), .rbank, .raddr(wm_raddr), .rdata(wm_rdata));

  mimo_decoder u_dec (
    .clk(clk_sys), .rst_n, .y_valid, .y_k, .y, .wmem_raddr(wm_raddr),
    .wmem_rdata(wm_rdata), .s_valid, .s_k, .s(s_hat));

  // The weight unit is only started from idle.
  a_start_idle: assert property (@(posedge clk_det) disable iff (!rst_n)
                                 !(start_det && det_unit_busy))
    else $error("weight unit started while busy");

endmodule
