// tb_adaptive_mimo_detector: end-to-end test of the adaptive MIMO detector
// at its default size (108 subcarriers, 8x8 antennas, 80 us packets).
//
// The receiver clock runs at 40 MHz; behavioural PLL and DC/DC converter
// models close the DVFS loop and clock the weight unit. Each packet starts
// with pkt_start, carries the channel estimates of all 108 subcarriers and
// then a burst of received vectors. The channel drifts linearly from packet
// to packet, H_k(p) = H0_k + o(p) * D_k, with a per-packet step chosen so
// that the normalised channel error grows like that of a fading channel with
// a given Doppler shift; the shift is changed from phase to phase:
//   1  25 Hz, method A   -> no skipping, 40 MHz
//   2   2 Hz, method A   -> skip 4, 4 MHz / 0.47 V
//   3  14 Hz, method A   -> skip 2, 8 MHz / 0.52 V
//   4   2 Hz, method B   -> skip 8, 2 MHz / 0.43 V
//   5   2 Hz, method A, with 40 us packets -> the 4-packet window is too
//       short for the 4 MHz computation and overruns occur
// Checked: every decoded vector equals G y with G the double-precision MMSE
// weights of the channel that was captured for the bank in use (relative
// error below 1%); each weight computation takes 9*108+3 weight-unit clock
// cycles; the clock and supply commanded for each window follow the table.
// Every mechanism (capture, skipped packet, bank swap, clock raise and
// lowering, each operating point, 8-packet method B window, overrun) is counted and
// must occur at least once.
module tb_adaptive_mimo_detector;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSC = 108;
  localparam real PI = 3.14159265358979;

  logic            clk_sys = 1'b0, clk_det, rst_n = 1'b0;
  fx_t             sigma2;
  logic            method_b = 1'b0, pkt_start = 1'b0, cest_valid = 1'b0, y_valid = 1'b0;
  logic [SC_W-1:0] cest_k = '0, y_k = '0, s_k;
  cmat8_t          cest_h;
  cvec8_t          y, s_hat;
  logic            s_valid;
  logic [7:0]      freq_mhz;
  logic [10:0]     vdd_mv;
  logic            freq_chg, vdd_chg, pll_lock, vdd_good;
  logic [2:0]      doppler_class;
  logic [3:0]      skip_cur;
  logic            det_busy, weights_ok, swap_evt, overrun_evt;
  int              vout_mv;
  int              checks = 0, failures = 0;

  adaptive_mimo_detector dut (.clk_sys, .clk_det, .rst_n, .sigma2, .method_b, .pkt_start,
    .cest_valid, .cest_k, .cest_h, .y_valid, .y_k, .y, .s_valid, .s_k, .s_hat,
    .freq_mhz, .vdd_mv, .freq_chg, .vdd_chg, .pll_lock, .vdd_good, .doppler_class,
    .skip_cur, .det_busy, .weights_ok, .swap_evt, .overrun_evt);

  pll_model  u_pll  (.clk_ref(clk_sys), .freq_mhz, .freq_chg, .clk_out(clk_det), .lock(pll_lock));
  dcdc_model u_dcdc (.clk_ref(clk_sys), .vdd_mv, .vdd_chg, .vdd_good, .vout_mv);

  always begin
    #12 clk_sys = 1'b1;
    #13 clk_sys = 1'b0;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------------
  // Channel model
  // ---------------------------------------------------------------------
  cmat8_t h0 [NSC];
  cmat8_t dh [NSC];
  cmat8_t hcur [NSC];
  cmat8_t hcap [NSC];      // channel of the last captured packet
  real    gr [NSC][8][8];  // reference weights of the bank in use
  real    gi [NSC][8][8];
  real    offs = 0.0;
  cvec8_t ysent [NSC];  // last vector sent on each subcarrier

  task automatic make_channel();
    for (int k = 0; k < NSC; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          hcur[k][i][j].re = r2fx(fx2r(h0[k][i][j].re) + offs * fx2r(dh[k][i][j].re));
          hcur[k][i][j].im = r2fx(fx2r(h0[k][i][j].im) + offs * fx2r(dh[k][i][j].im));
        end
  endtask

  task automatic install_weights();
    rmat_t hr, hi, wr, wi;
    for (int k = 0; k < NSC; k++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          hr[i][j] = fx2r(hcap[k][i][j].re);
          hi[i][j] = fx2r(hcap[k][i][j].im);
        end
      mmse(hr, hi, fx2r(sigma2), 8, wr, wi);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          gr[k][i][j] = wr[i][j];
          gi[k][i][j] = wi[i][j];
        end
    end
  endtask

  // ---------------------------------------------------------------------
  // Event counters and monitors
  // ---------------------------------------------------------------------
  int n_pkt = 0, n_cap = 0, n_skip_pkt = 0, n_swap = 0, n_over = 0;
  int n_fup = 0, n_fdown = 0, n_dec = 0, n_mb_win = 0, n_comp = 0;
  int n_op [4];            // windows run at 40, 8, 4, 2 MHz
  int cls_seen [6];
  int f_prev = 40;
  logic cap_this_pkt = 1'b0;

  always @(posedge clk_sys) begin
    if (rst_n) begin
      if (dut.op_req) begin
        n_cap++;
        cap_this_pkt = 1'b1;
      end
      if (dut.capture_we) hcap[dut.cest_k] = dut.cest_h;
      if (swap_evt) begin
        n_swap++;
        install_weights();
      end
      if (overrun_evt) n_over++;
      if (freq_chg) begin
        if (int'(freq_mhz) > f_prev) n_fup++;
        if (int'(freq_mhz) < f_prev) n_fdown++;
        f_prev = int'(freq_mhz);
      end
    end
  end

  // weight unit latency in its own clock, and the operating point it ran at
  int det_cyc = 0;
  logic det_run = 1'b0;
  always @(posedge clk_det) begin
    if (rst_n) begin
      if (dut.u_mmse.start) begin
        det_run = 1'b1;
        det_cyc = 0;
        chk(pll_lock && vdd_good, "weight unit started before the PLL and supply settled");
        case (int'(freq_mhz))
          40: n_op[0]++;
          8:  n_op[1]++;
          4:  n_op[2]++;
          2:  n_op[3]++;
          default: chk(1'b0, "unexpected clock");
        endcase
        // operating point against the table for the window
        if (method_b && skip_cur == 4'd8) n_mb_win++;
        case (int'(skip_cur))
          0: chk(freq_mhz == 8'd40 && vdd_mv == 11'd1000, "window 0 at 40 MHz / 1.0 V");
          2: chk(freq_mhz == 8'd8  && vdd_mv == 11'd520,  "window 2 at 8 MHz / 0.52 V");
          4: chk(freq_mhz == 8'd4  && vdd_mv == 11'd470,  "window 4 at 4 MHz / 0.47 V");
          8: chk(freq_mhz == 8'd2  && vdd_mv == 11'd430,  "window 8 at 2 MHz / 0.43 V");
          default: chk(1'b0, "unexpected skip count");
        endcase
      end
      if (dut.u_mmse.done && det_run) begin
        det_run = 1'b0;
        n_comp++;
        chk(det_cyc == 9 * NSC + 3, $sformatf("weight computation took %0d cycles", det_cyc));
      end
      if (det_run) det_cyc++;
    end
  end

  // decoder check
  always @(negedge clk_sys) begin
    if (rst_n && s_valid && weights_ok) begin
      real wr, wi, yr, yi, e, mag;
      n_dec++;
      for (int i = 0; i < 8; i++) begin
        wr = 0.0; wi = 0.0;
        for (int j = 0; j < 8; j++) begin
          yr = fx2r(ysent[s_k][j].re); yi = fx2r(ysent[s_k][j].im);
          wr += gr[s_k][i][j] * yr - gi[s_k][i][j] * yi;
          wi += gr[s_k][i][j] * yi + gi[s_k][i][j] * yr;
        end
        e = (fx2r(s_hat[i].re) - wr) * (fx2r(s_hat[i].re) - wr)
          + (fx2r(s_hat[i].im) - wi) * (fx2r(s_hat[i].im) - wi);
        mag = wr * wr + wi * wi;
        checks++;
        if (e > 1.0e-4 * (1.0 + mag)) begin
          failures++;
          if (failures < 20)
            $display("packet %0d k %0d row %0d: got %f,%f want %f,%f", n_pkt, s_k, i,
                     fx2r(s_hat[i].re), fx2r(s_hat[i].im), wr, wi);
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Packet generator
  // ---------------------------------------------------------------------
  task automatic packet(input real fd, input int pkt_cycles);
    real step;
    // per-packet drift giving xi(t) = (2*pi*fd*t*T)^2/2 with T = 80 us,
    // for drift matrices of the same power as the channel
    step = 2.0 * PI * fd * 80.0e-6 / $sqrt(2.0);
    offs += step;
    make_channel();
    @(negedge clk_sys);
    pkt_start = 1'b1;
    @(negedge clk_sys);
    pkt_start = 1'b0;
    cap_this_pkt = 1'b0;
    @(negedge clk_sys);
    for (int k = 0; k < NSC; k++) begin
      cest_valid = 1'b1;
      cest_k = SC_W'(k);
      cest_h = hcur[k];
      @(negedge clk_sys);
    end
    cest_valid = 1'b0;
    repeat (4) @(negedge clk_sys);
    cls_seen[doppler_class]++;
    if (!cap_this_pkt) n_skip_pkt++;
    // a burst of received vectors on random subcarriers
    for (int n = 0; n < 24; n++) begin
      y_valid = 1'b1;
      y_k = SC_W'($urandom_range(NSC - 1, 0));
      for (int j = 0; j < 8; j++) begin
        y[j].re = rnd_fx(1.0);
        y[j].im = rnd_fx(1.0);
      end
      ysent[y_k] = y;
      @(negedge clk_sys);
      y_valid = 1'b0;
      repeat (3) @(negedge clk_sys);
    end
    repeat (pkt_cycles - NSC - 3 - 4 - 24 * 4 - 2) @(negedge clk_sys);
    n_pkt++;
  endtask

  initial begin
    for (int n = 0; n < 4; n++) n_op[n] = 0;
    for (int n = 0; n < 6; n++) cls_seen[n] = 0;
    sigma2 = r2fx(0.2);
    for (int k = 0; k < NSC; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          h0[k][i][j].re = rnd_fx(0.6);
          h0[k][i][j].im = rnd_fx(0.6);
          dh[k][i][j].re = rnd_fx(0.6);
          dh[k][i][j].im = rnd_fx(0.6);
        end
    cest_h = '0;
    y = '0;
    repeat (5) @(negedge clk_sys);
    rst_n = 1'b1;
    repeat (5)  packet(25.0, 3200);                    // phase 1
    repeat (14) packet(2.0, 3200);                     // phase 2
    repeat (10) packet(14.0, 3200);                    // phase 3
    method_b = 1'b1;
    repeat (20) packet(2.0, 3200);                     // phase 4
    while (det_busy) @(negedge clk_sys);
    method_b = 1'b0;
    repeat (16) packet(2.0, 1600);                     // phase 5
    repeat (4)  packet(25.0, 3200);
    $display("packets %0d captures %0d skipped %0d swaps %0d overruns %0d", n_pkt, n_cap,
             n_skip_pkt, n_swap, n_over);
    $display("computations %0d at 40/8/4/2 MHz: %0d %0d %0d %0d, method B windows %0d",
             n_comp, n_op[0], n_op[1], n_op[2], n_op[3], n_mb_win);
    $display("clock raises %0d lowerings %0d, decoded vectors %0d", n_fup, n_fdown, n_dec);
    $display("Doppler classes seen: %0d %0d %0d %0d %0d %0d", cls_seen[0], cls_seen[1],
             cls_seen[2], cls_seen[3], cls_seen[4], cls_seen[5]);
    chk(n_cap > 0,       "capture happened");
    chk(n_skip_pkt > 0,  "skipped packet happened");
    chk(n_swap > 0,      "bank swap happened");
    chk(n_over > 0,      "overrun happened");
    chk(n_fup > 0,       "clock raise happened");
    chk(n_fdown > 0,     "clock lowering happened");
    chk(n_mb_win > 0,    "method B window happened");
    chk(n_op[0] > 0 && n_op[1] > 0 && n_op[2] > 0 && n_op[3] > 0, "every operating point used");
    chk(n_dec > 0,       "vectors decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
