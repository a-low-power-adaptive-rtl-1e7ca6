// dvfs_ctrl: DVFS control circuit of the adaptive MIMO detector.
//
// Doppler estimation. From each NMSE measurement xi = num/den taken t packets
// after the reference channel, the controller classifies the Doppler shift
// f_D into one of the columns of the skipped-packet table (2, 6, 10, 14 and
// 18 Hz) or "above 20 Hz". For a Jakes-type fading channel
// xi ~= (2*pi*f_D*t*T_pkt)^2 / 2 at small arguments, so the class boundaries
// (4, 8, 12, 16 and 20 Hz) become thresholds THR_b = (2*pi*f_b*T_pkt)^2/2
// in units of 2^-32; f_D > f_b is decided without a divider as
//     num * 2^32  >  THR_b * t^2 * den.
// Until a first measurement exists the class is "above 20 Hz".
//
// Skipped packets. The class selects the largest number of packets that may
// be skipped without loss (method A: 4 4 4 2 2 0, method B: 8 8 4 2 2 0 for
// 2/6/10/14/18/>20 Hz), output as skip_est.
//
// Operating point. On op_req the controller moves the weight unit's clock and
// supply to the point for the computation window of the new update period,
// which is op_skip packets long (the computation is spread over the skipped
// packets, with either method):
//     skip 0/1 : 40 MHz, 1.00 V     skip 2 : 8 MHz, 0.52 V
//     skip 4   :  4 MHz, 0.47 V     skip 8 : 2 MHz, 0.43 V
// (other counts use the next smaller table entry). The supply is raised
// before the clock and lowered after it: a raise sets vdd_mv, pulses vdd_chg
// and waits for the DC/DC converter's vdd_good to fall and rise again, then
// sets freq_mhz, pulses freq_chg and waits likewise for pll_lock; a lowering
// does the same in the other order. settled is high when no change is in
// progress. All in the receiver clock domain.
//
// The tables are the document's. The NMSE-based classifier, its thresholds
// and the handshake with the PLL and DC/DC converter are this design's own
// choices.
module dvfs_ctrl
  import mimo_pkg::*;
#(
  parameter real PKT_US = 80.0     // packet interval in microseconds
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        method_b,
  // Doppler measurement
  input  logic        meas_valid,
  input  logic        meas_ref_ok,  // a reference channel existed for it
  input  logic [63:0] num,
  input  logic [63:0] den,
  input  logic [7:0]  t_pkts,       // packets between reference and measurement
  output logic [2:0]  doppler_class,
  output logic [3:0]  skip_est,
  // operating-point request for the next computation window
  input  logic        op_req,
  input  logic [3:0]  op_skip,
  output logic [7:0]  freq_mhz,
  output logic [10:0] vdd_mv,
  output logic        freq_chg,
  output logic        vdd_chg,
  input  logic        pll_lock,
  input  logic        vdd_good,
  output logic        settled
);

  localparam real PI = 3.14159265358979;

  function automatic logic [31:0] thr(real f_hz);
    real x;
    x = 2.0 * PI * f_hz * PKT_US * 1.0e-6;
    return 32'($rtoi(x * x / 2.0 * 4294967296.0 + 0.5));
  endfunction

  localparam logic [31:0] THR [5] = '{thr(4.0), thr(8.0), thr(12.0), thr(16.0), thr(20.0)};

  localparam logic [3:0] SKIP_A [6] = '{4'd4, 4'd4, 4'd4, 4'd2, 4'd2, 4'd0};
  localparam logic [3:0] SKIP_B [6] = '{4'd8, 4'd8, 4'd4, 4'd2, 4'd2, 4'd0};

  // ---------------------------------------------------------------------
  // Doppler classification
  // ---------------------------------------------------------------------
  logic [2:0] cls_new;

  always_comb begin
    logic [127:0] lhs, rhs;
    cls_new = 3'd0;
    lhs = {32'd0, num, 32'd0};
    for (int b = 0; b < 5; b++) begin
      rhs = 128'(THR[b]) * 128'(t_pkts) * 128'(t_pkts) * 128'(den);
      if (lhs > rhs) cls_new = 3'(b + 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          doppler_class <= 3'd5;
    else if (meas_valid && meas_ref_ok)  doppler_class <= cls_new;
  end

  assign skip_est = method_b ? SKIP_B[doppler_class] : SKIP_A[doppler_class];

  // ---------------------------------------------------------------------
  // Operating point and sequencing
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    D_IDLE, D_V1_LOW, D_V1_HIGH, D_F_LOW, D_F_HIGH, D_V2_LOW, D_V2_HIGH
  } dstate_e;

  dstate_e     st;
  logic [7:0]  f_tgt;
  logic [10:0] v_tgt;
  logic [3:0]  win;

  logic [7:0]  f_new;
  logic [10:0] v_new;

  assign win = op_skip;

  always_comb begin
    if (win >= 4'd8)      begin f_new = 8'd2;  v_new = 11'd430;  end
    else if (win >= 4'd4) begin f_new = 8'd4;  v_new = 11'd470;  end
    else if (win >= 4'd2) begin f_new = 8'd8;  v_new = 11'd520;  end
    else                  begin f_new = 8'd40; v_new = 11'd1000; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      freq_mhz <= 8'd40;
      vdd_mv   <= 11'd1000;
      f_tgt    <= 8'd40;
      v_tgt    <= 11'd1000;
      freq_chg <= 1'b0;
      vdd_chg  <= 1'b0;
    end else begin
      freq_chg <= 1'b0;
      vdd_chg  <= 1'b0;
      unique case (st)
        D_IDLE: if (op_req) begin
          f_tgt <= f_new;
          v_tgt <= v_new;
          if (v_new > vdd_mv) begin            // speed up: supply first
            vdd_mv  <= v_new;
            vdd_chg <= 1'b1;
            st      <= D_V1_LOW;
          end else if (f_new != freq_mhz) begin // slow down: clock first
            freq_mhz <= f_new;
            freq_chg <= 1'b1;
            st       <= D_F_LOW;
          end else if (v_new != vdd_mv) begin
            vdd_mv  <= v_new;
            vdd_chg <= 1'b1;
            st      <= D_V2_LOW;
          end
        end
        D_V1_LOW:  if (!vdd_good) st <= D_V1_HIGH;
        D_V1_HIGH: if (vdd_good) begin
          if (f_tgt != freq_mhz) begin
            freq_mhz <= f_tgt;
            freq_chg <= 1'b1;
            st       <= D_F_LOW;
          end else begin
            st <= D_IDLE;
          end
        end
        D_F_LOW:  if (!pll_lock) st <= D_F_HIGH;
        D_F_HIGH: if (pll_lock) begin
          if (v_tgt != vdd_mv) begin
            vdd_mv  <= v_tgt;
            vdd_chg <= 1'b1;
            st      <= D_V2_LOW;
          end else begin
            st <= D_IDLE;
          end
        end
        D_V2_LOW:  if (!vdd_good) st <= D_V2_HIGH;
        D_V2_HIGH: if (vdd_good) st <= D_IDLE;
        default:   st <= D_IDLE;
      endcase
    end
  end

  assign settled = (st == D_IDLE) && !op_req;

endmodule
