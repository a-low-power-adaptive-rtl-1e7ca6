// mmse_9step: 9-step MMSE weight computation of the 8x8 MIMO detector.
//
// For every subcarrier k the unit computes
//     P_k = H_k^H H_k + sigma2*I,   R_k = P_k^-1,   G_k = R_k H_k^H
// with the 8x8 matrices split into 4x4 blocks, H = [H11 H12; H21 H22], and
// P_k inverted by Strassen's block formulas. One set of arithmetic is reused
// over nine steps, one step per clock cycle, so a new subcarrier starts every
// nine cycles:
//     step 0  A  = H11^H H11 + H21^H H21 + s2 I   B = H11^H H12 + H21^H H22
//     step 1  D  = H12^H H12 + H22^H H22 + s2 I   A^-1 (inversion unit)
//     step 2  X  = B^H A^-1                       (= C A^-1, C = B^H)
//     step 3  E  = D - X B
//     step 4  E^-1 (inversion unit)
//     step 5  C' = -E^-1 X                        (B' = C'^H, D' = E^-1)
//     step 6  F  = A^-1 - X^H C'                  G21 = C' H11^H + E^-1 H12^H
//     step 7  G11 = F H11^H + C'^H H12^H          G22 = C' H21^H + E^-1 H22^H
//     step 8  G12 = F H21^H + C'^H H22^H          -> G_k written out
// Two matrix arithmetic units (MAU0, MAU1) and one 4x4 inversion unit do the
// work; the "Sel" word of each unit is set per step.
//
// Interface: a start pulse processes subcarriers 0..NSC-1. The unit reads
// H_k from a synchronous-read buffer (address h_raddr, data h_rdata one cycle
// later) and writes G_k with g_we/g_waddr/g_wdata in the last step of each
// subcarrier. Timing: two cycles to fetch the first matrix, then 9 cycles
// per subcarrier (H_{k+1} is prefetched during step 7), and done pulses one
// cycle after the last write: start-to-done is 9*NSC + 3 cycles (975 cycles,
// 9.75 us at 100 MHz, for 108 subcarriers). sigma2 must be held stable while
// busy.
//
// The step count, the block formulas and the 24-bit word follow the
// document; the assignment of operations to steps and the two-unit
// resource set are this design's own, chosen so that the nine steps hold
// every matrix product.
module mmse_9step
  import mimo_pkg::*;
#(
  parameter int unsigned NSC = mimo_pkg::NUM_SC
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  fx_t                   sigma2,
  output logic [SC_W-1:0]       h_raddr,
  input  cmat8_t                h_rdata,
  output logic                  g_we,
  output logic [SC_W-1:0]       g_waddr,
  output cmat8_t                g_wdata,
  output logic                  busy,
  output logic                  done
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_LOAD, S_RUN} state_e;

  state_e          state;
  logic [3:0]      step;
  logic [SC_W-1:0] k;

  cblk8_t hb;                                    // H_k as four 4x4 blocks
  cmat4_t a_r, b_r, d_r, ainv_r, x_r, e_r, einv_r, cp_r, f_r, g11_r, g21_r, g22_r;

  mau_sel_t sel0, sel1;
  cmat4_t   x10, y10, x20, y20, z0, o0;
  cmat4_t   x11, y11, x21, y21, z1, o1;
  cmat4_t   inv_in, inv_out;

  matrix_arith_unit u_mau0 (.sel(sel0), .x1(x10), .y1(y10), .x2(x20), .y2(y20),
                            .z(z0), .sigma2(sigma2), .out(o0));
  matrix_arith_unit u_mau1 (.sel(sel1), .x1(x11), .y1(y11), .x2(x21), .y2(y21),
                            .z(z1), .sigma2(sigma2), .out(o1));
  matrix_inv4       u_inv  (.m(inv_in), .r(inv_out));

  localparam mau_sel_t SEL_IDLE = '{x1h: 1'b0, y1h: 1'b0, p2_en: 1'b0, x2h: 1'b0,
                                    y2h: 1'b0, neg_p: 1'b0, zmode: Z_NONE};

  // Data-path selection per step.
  always_comb begin
    sel0 = SEL_IDLE;  sel1 = SEL_IDLE;
    x10 = '0; y10 = '0; x20 = '0; y20 = '0; z0 = '0;
    x11 = '0; y11 = '0; x21 = '0; y21 = '0; z1 = '0;
    inv_in = (step == 4'd4) ? e_r : a_r;
    unique case (step)
      4'd0: begin
        sel0 = '{x1h: 1'b1, y1h: 1'b0, p2_en: 1'b1, x2h: 1'b1, y2h: 1'b0, neg_p: 1'b0, zmode: Z_SIGMA};
        x10 = hb[0]; y10 = hb[0]; x20 = hb[2]; y20 = hb[2];
        sel1 = '{x1h: 1'b1, y1h: 1'b0, p2_en: 1'b1, x2h: 1'b1, y2h: 1'b0, neg_p: 1'b0, zmode: Z_NONE};
        x11 = hb[0]; y11 = hb[1]; x21 = hb[2]; y21 = hb[3];
      end
      4'd1: begin
        sel0 = '{x1h: 1'b1, y1h: 1'b0, p2_en: 1'b1, x2h: 1'b1, y2h: 1'b0, neg_p: 1'b0, zmode: Z_SIGMA};
        x10 = hb[1]; y10 = hb[1]; x20 = hb[3]; y20 = hb[3];
      end
      4'd2: begin
        sel0 = '{x1h: 1'b1, y1h: 1'b0, p2_en: 1'b0, x2h: 1'b0, y2h: 1'b0, neg_p: 1'b0, zmode: Z_NONE};
        x10 = b_r; y10 = ainv_r;
      end
      4'd3: begin
        sel0 = '{x1h: 1'b0, y1h: 1'b0, p2_en: 1'b0, x2h: 1'b0, y2h: 1'b0, neg_p: 1'b1, zmode: Z_ADD};
        x10 = x_r; y10 = b_r; z0 = d_r;
      end
      4'd5: begin
        sel0 = '{x1h: 1'b0, y1h: 1'b0, p2_en: 1'b0, x2h: 1'b0, y2h: 1'b0, neg_p: 1'b1, zmode: Z_NONE};
        x10 = einv_r; y10 = x_r;
      end
      4'd6: begin
        sel0 = '{x1h: 1'b1, y1h: 1'b0, p2_en: 1'b0, x2h: 1'b0, y2h: 1'b0, neg_p: 1'b1, zmode: Z_ADD};
        x10 = x_r; y10 = cp_r; z0 = ainv_r;
        sel1 = '{x1h: 1'b0, y1h: 1'b1, p2_en: 1'b1, x2h: 1'b0, y2h: 1'b1, neg_p: 1'b0, zmode: Z_NONE};
        x11 = cp_r; y11 = hb[0]; x21 = einv_r; y21 = hb[1];
      end
      4'd7: begin
        sel0 = '{x1h: 1'b0, y1h: 1'b1, p2_en: 1'b1, x2h: 1'b1, y2h: 1'b1, neg_p: 1'b0, zmode: Z_NONE};
        x10 = f_r; y10 = hb[0]; x20 = cp_r; y20 = hb[1];
        sel1 = '{x1h: 1'b0, y1h: 1'b1, p2_en: 1'b1, x2h: 1'b0, y2h: 1'b1, neg_p: 1'b0, zmode: Z_NONE};
        x11 = cp_r; y11 = hb[2]; x21 = einv_r; y21 = hb[3];
      end
      4'd8: begin
        sel0 = '{x1h: 1'b0, y1h: 1'b1, p2_en: 1'b1, x2h: 1'b1, y2h: 1'b1, neg_p: 1'b0, zmode: Z_NONE};
        x10 = f_r; y10 = hb[2]; x20 = cp_r; y20 = hb[3];
      end
      default: ;
    endcase
  end

  // Buffer addressing and weight output.
  always_comb begin
    h_raddr = (state == S_RUN && k != SC_W'(NSC - 1)) ? SC_W'(k + 1'b1) : '0;
    g_we    = (state == S_RUN) && (step == 4'd8);
    g_waddr = k;
    g_wdata = mat_of_blks('{g22_r, g21_r, o0, g11_r});
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) state <= S_FETCH;
        S_FETCH: state <= S_LOAD;
        S_LOAD: begin
          state <= S_RUN;
          step  <= '0;
          k     <= '0;
        end
        S_RUN: begin
          if (step == 4'd8) begin
            step <= '0;
            if (k == SC_W'(NSC - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              k <= k + 1'b1;
            end
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Matrix registers (no reset: every register is written before it is read).
  always_ff @(posedge clk) begin
    if (state == S_LOAD || (state == S_RUN && step == 4'd8)) begin
      for (int b = 0; b < 4; b++) hb[b] <= blk_of(h_rdata, b);
    end
    if (state == S_RUN) begin
      unique case (step)
        4'd0: begin a_r <= o0; b_r <= o1; end
        4'd1: begin d_r <= o0; ainv_r <= inv_out; end
        4'd2: x_r <= o0;
        4'd3: e_r <= o0;
        4'd4: einv_r <= inv_out;
        4'd5: cp_r <= o0;
        4'd6: begin f_r <= o0; g21_r <= o1; end
        4'd7: begin g11_r <= o0; g22_r <= o1; end
        default: ;
      endcase
    end
  end

endmodule
