// adaptive_sched: packet-level control of the adaptive MIMO detection.
//
// Instead of recomputing the MMSE weights for every packet, the detector
// captures the channel of one packet and then skips the following packets,
// updating the weights once every P = max(skip, 1) packets. The scheduler
// works at packet boundaries (pkt_start, receiver clock domain):
//   * Bank swap: if a weight computation finished during the last packet,
//     the weight memory banks swap, so the new weights apply from this
//     packet on.
//   * Capture: if the weight unit is idle and P packets have passed since the
//     last capture (or no channel has been captured yet), this packet's
//     channel estimates are written into the channel buffer (capture), the
//     skip value for the new window is taken from the DVFS controller
//     (skip_est) and an operating-point request (op_req, op_skip) is sent.
//     If P packets have passed but the weight unit is still busy, the
//     capture slips to the next packet and an overrun is counted.
//   * Start: when the last subcarrier of a captured packet has been written
//     and the DVFS controller has settled, det_start pulses once.
//   * Completion: det_done (already in this clock domain) arms the swap.
// t_meas is the number of packets between the reference channel and the
// current packet, used by the Doppler estimator; ref_ok says whether a
// reference exists.
//
// The periodic update and the skip counts follow the document; the capture
// rule, the swap at the next packet boundary and the overrun handling are
// this design's own.
module adaptive_sched
  import mimo_pkg::*;
#(
  parameter int unsigned NSC = mimo_pkg::NUM_SC
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pkt_start,
  input  logic            cest_valid,
  input  logic [SC_W-1:0] cest_k,
  input  logic [3:0]      skip_est,
  input  logic            dvfs_settled,
  input  logic            det_done,
  output logic            capture_we,   // write enable for the channel buffer
  output logic            op_req,
  output logic [3:0]      op_skip,
  output logic            det_start,
  output logic            computing,
  output logic            rbank,        // weight bank read by the decoder
  output logic            weights_ok,   // a weight set has been installed
  output logic [7:0]      t_meas,
  output logic            ref_ok,
  output logic            swap_evt,
  output logic            overrun_evt
);

  logic       capture_pkt, cap_done, swap_pending, have_ref;
  logic [7:0] since_cap;
  logic [3:0] per;

  logic [7:0] t;    // packets since the last capture, counting this one

  assign per        = (op_skip == 4'd0) ? 4'd1 : op_skip;
  assign t          = (since_cap == 8'hff) ? 8'hff : since_cap + 8'd1;
  assign capture_we = capture_pkt && cest_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      capture_pkt  <= 1'b0;
      cap_done     <= 1'b0;
      swap_pending <= 1'b0;
      have_ref     <= 1'b0;
      since_cap    <= '0;
      op_skip      <= '0;
      op_req       <= 1'b0;
      det_start    <= 1'b0;
      computing    <= 1'b0;
      rbank        <= 1'b0;
      weights_ok   <= 1'b0;
      t_meas       <= '0;
      ref_ok       <= 1'b0;
      swap_evt     <= 1'b0;
      overrun_evt  <= 1'b0;
    end else begin
      op_req      <= 1'b0;
      det_start   <= 1'b0;
      swap_evt    <= 1'b0;
      overrun_evt <= 1'b0;

      if (pkt_start) begin
        t_meas <= t;
        ref_ok <= have_ref;
        if (swap_pending) begin
          rbank        <= ~rbank;
          weights_ok   <= 1'b1;
          swap_pending <= 1'b0;
          swap_evt     <= 1'b1;
        end
        if (!have_ref || t >= 8'(per)) begin
          if (!computing && !cap_done) begin
            capture_pkt <= 1'b1;
            have_ref    <= 1'b1;
            op_skip     <= skip_est;
            op_req      <= 1'b1;
            since_cap   <= '0;
          end else begin
            capture_pkt <= 1'b0;
            since_cap   <= t;
            overrun_evt <= 1'b1;
          end
        end else begin
          capture_pkt <= 1'b0;
          since_cap   <= t;
        end
      end else if (capture_we && cest_k == SC_W'(NSC - 1)) begin
        capture_pkt <= 1'b0;
        cap_done    <= 1'b1;
      end

      if (cap_done && dvfs_settled && !op_req && !computing) begin
        cap_done  <= 1'b0;
        det_start <= 1'b1;
        computing <= 1'b1;
      end

      if (det_done) begin
        computing    <= 1'b0;
        swap_pending <= 1'b1;
      end
    end
  end

endmodule
