// nmse_unit: channel-variation metric used to estimate the Doppler shift.
//
// For each packet it accumulates, over all subcarriers k and all 64 matrix
// elements, the two sums of the normalised mean square error
//     num = sum |Href_ijk - H_ijk(t)|^2,     den = sum |Href_ijk|^2
// (xi(t) = num/den) between the channel estimated from the current packet
// and the reference channel stored when the weights were last updated. The
// division is left to the DVFS controller, which compares num against
// thresholds scaled by den.
//
// Interface: channel estimates arrive one subcarrier per cycle (cest_valid,
// cest_k, cest_h, subcarriers in order 0..NSC-1). The unit addresses the
// reference store with ref_raddr = cest_k and receives ref_rdata one cycle
// later. Subcarrier 0 clears the sums; meas_valid pulses two cycles after
// subcarrier NSC-1 with the final num and den. One subcarrier per cycle,
// 128 squarers in parallel.
//
// The metric is the NMSE the document uses to show channel variation; using
// it as the Doppler estimator's input, and the datapath, are this design's
// own choices (the document states only that the Doppler frequency is
// estimated from the FFT outputs).
module nmse_unit
  import mimo_pkg::*;
#(
  parameter int unsigned NSC = mimo_pkg::NUM_SC
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cest_valid,
  input  logic [SC_W-1:0] cest_k,
  input  cmat8_t          cest_h,
  output logic [SC_W-1:0] ref_raddr,
  input  cmat8_t          ref_rdata,
  output logic [63:0]     num,
  output logic [63:0]     den,
  output logic            meas_valid
);

  logic            v1;
  logic [SC_W-1:0] k1;
  cmat8_t          h1;
  logic [63:0]     sc_num, sc_den;

  assign ref_raddr = cest_k;

  always_comb begin
    logic signed [63:0] dre, dim, rre, rim;
    sc_num = '0;
    sc_den = '0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        rre = 64'(ref_rdata[i][j].re);
        rim = 64'(ref_rdata[i][j].im);
        dre = rre - 64'(h1[i][j].re);
        dim = rim - 64'(h1[i][j].im);
        sc_num = sc_num + 64'(dre * dre) + 64'(dim * dim);
        sc_den = sc_den + 64'(rre * rre) + 64'(rim * rim);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1         <= 1'b0;
      k1         <= '0;
      h1         <= '0;
      num        <= '0;
      den        <= '0;
      meas_valid <= 1'b0;
    end else begin
      v1         <= cest_valid;
      k1         <= cest_k;
      h1         <= cest_h;
      meas_valid <= v1 && (k1 == SC_W'(NSC - 1));
      if (v1) begin
        if (k1 == '0) begin
          num <= sc_num;
          den <= sc_den;
        end else begin
          num <= num + sc_num;
          den <= den + sc_den;
        end
      end
    end
  end

endmodule
