// tb_adaptive_sched: self-checking test of the packet-level scheduler.
//
// Packets of PKT cycles each carry NSC channel estimates. A testbench model
// of the weight unit answers det_start with det_done after a programmable
// time, and a model of the DVFS controller holds settled low for a while
// after each op_req. Three phases: no skipping (update every packet),
// skipping 4 packets, and skipping 2 packets with a weight computation that
// is too slow for the window, which must produce overruns. Checked:
// captures are max(skip,1) packets apart unless an overrun intervened; an
// overrun is flagged only while the weight unit is busy; det_start comes
// only after the last estimate of a captured packet and with the DVFS
// settled; the banks swap at the first packet start after each det_done;
// t_meas counts the packets since the last capture.
module tb_adaptive_sched;
  import mimo_pkg::*;

  localparam int unsigned NSC = 8;
  localparam int          PKT = 300;

  logic            clk = 1'b0, rst_n = 1'b0, pkt_start = 1'b0, cest_valid = 1'b0;
  logic [SC_W-1:0] cest_k = '0;
  logic [3:0]      skip_est = '0, op_skip;
  logic            dvfs_settled, det_done = 1'b0;
  logic            capture_we, op_req, det_start, computing, rbank, weights_ok;
  logic [7:0]      t_meas;
  logic            ref_ok, swap_evt, overrun_evt;
  int              checks = 0, failures = 0;

  adaptive_sched #(.NSC(NSC)) dut (.clk, .rst_n, .pkt_start, .cest_valid, .cest_k,
    .skip_est, .dvfs_settled, .det_done, .capture_we, .op_req, .op_skip, .det_start,
    .computing, .rbank, .weights_ok, .t_meas, .ref_ok, .swap_evt, .overrun_evt);

  always #5 clk = ~clk;

  // weight-unit and DVFS models
  int  det_time = 100, det_cnt = 0, settle_cnt = 0;
  logic det_busy = 1'b0;
  assign dvfs_settled = (settle_cnt == 0) && !op_req;
  always @(posedge clk) begin
    det_done <= 1'b0;
    if (op_req) settle_cnt <= 20;
    else if (settle_cnt > 0) settle_cnt <= settle_cnt - 1;
    if (det_start) begin
      det_busy <= 1'b1;
      det_cnt  <= det_time;
    end else if (det_busy) begin
      if (det_cnt == 1) begin
        det_busy <= 1'b0;
        det_done <= 1'b1;
      end
      det_cnt <= det_cnt - 1;
    end
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // monitors
  int  pkt_no = 0, last_cap_pkt = -1, last_cap_skip = 0, n_cap = 0, n_over = 0, n_swap = 0;
  int  over_since_cap = 0, caps_in_pkt = 0;
  logic cap_complete = 1'b0, done_seen = 1'b0, rbank_prev = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (pkt_start) pkt_no <= pkt_no + 1;
      if (op_req) begin
        n_cap++;
        if (last_cap_pkt >= 0 && over_since_cap == 0)
          chk(pkt_no - last_cap_pkt == ((last_cap_skip == 0) ? 1 : last_cap_skip),
              $sformatf("capture at packet %0d, previous at %0d with skip %0d",
                        pkt_no, last_cap_pkt, last_cap_skip));
        chk(t_meas == 8'((last_cap_pkt < 0) ? 1 : pkt_no - last_cap_pkt),
            $sformatf("t_meas %0d at packet %0d", t_meas, pkt_no));
        last_cap_pkt  = pkt_no;
        last_cap_skip = int'(op_skip);
        over_since_cap = 0;
      end
      if (overrun_evt) begin
        n_over++;
        over_since_cap++;
        chk(det_busy, "overrun flagged while the weight unit is idle");
      end
      if (capture_we && cest_k == SC_W'(NSC - 1)) cap_complete = 1'b1;
      if (det_start) begin
        chk(cap_complete, "det_start before the capture was complete");
        chk(dvfs_settled, "det_start while DVFS not settled");
        cap_complete = 1'b0;
      end
      if (det_done) done_seen = 1'b1;
      if (swap_evt) begin
        n_swap++;
        chk(rbank != rbank_prev && weights_ok, "bank swap toggles the read bank");
        rbank_prev = rbank;
      end
    end
  end
  // a swap must follow the first packet start after det_done
  always @(posedge clk) begin
    if (rst_n && pkt_start) begin
      #1;
      chk(swap_evt == done_seen, $sformatf("swap at packet %0d: %0d, done seen %0d",
                                           pkt_no, swap_evt, done_seen));
      done_seen = 1'b0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic packet();
    @(negedge clk);
    pkt_start = 1'b1;
    @(negedge clk);
    pkt_start = 1'b0;
    repeat (4) @(negedge clk);
    for (int k = 0; k < NSC; k++) begin
      cest_valid = 1'b1;
      cest_k = SC_W'(k);
      @(negedge clk);
    end
    cest_valid = 1'b0;
    repeat (PKT - NSC - 6) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    skip_est = 4'd0; det_time = 100;
    repeat (5) packet();
    skip_est = 4'd4;
    repeat (14) packet();
    skip_est = 4'd2; det_time = 900;
    repeat (12) packet();
    skip_est = 4'd0; det_time = 100;
    repeat (4) packet();
    chk(n_cap > 10, $sformatf("%0d captures", n_cap));
    chk(n_over > 0, $sformatf("%0d overruns", n_over));
    chk(n_swap > 5, $sformatf("%0d swaps", n_swap));
    $display("captures %0d overruns %0d swaps %0d", n_cap, n_over, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
