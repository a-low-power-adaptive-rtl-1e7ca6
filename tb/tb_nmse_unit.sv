// tb_nmse_unit: self-checking test of the NMSE (channel variation) unit.
//
// A synchronous-read array holds the reference channel. For several packets
// the current channel is the reference plus a perturbation of growing size;
// the unit's numerator and denominator must equal sums computed exactly in
// 64-bit integers by the testbench, and meas_valid must pulse exactly once,
// two cycles after the last subcarrier. Gaps in the input stream are
// allowed.
module tb_nmse_unit;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NSC = 12;

  logic            clk = 1'b0, rst_n = 1'b0, cest_valid = 1'b0, meas_valid;
  logic [SC_W-1:0] cest_k = '0, ref_raddr;
  cmat8_t          cest_h, ref_rdata;
  logic [63:0]     num, den;
  cmat8_t          refm [NSC];
  int              checks = 0, failures = 0, nmeas = 0, cyc = 0, t_last = 0;

  nmse_unit #(.NSC(NSC)) dut (.clk, .rst_n, .cest_valid, .cest_k, .cest_h,
                              .ref_raddr, .ref_rdata, .num, .den, .meas_valid);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    ref_rdata <= refm[ref_raddr];
    cyc <= cyc + 1;
  end
  always @(negedge clk) if (rst_n && meas_valid) nmeas++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned enum_, eden;
    longint          d;
    for (int k = 0; k < NSC; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          refm[k][i][j].re = rnd_fx(1.0);
          refm[k][i][j].im = rnd_fx(1.0);
        end
    cest_h = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 5; p++) begin
      enum_ = 0; eden = 0;
      nmeas = 0;
      for (int k = 0; k < NSC; k++) begin
        while ($urandom_range(2, 0) == 0) begin
          @(negedge clk);
          cest_valid = 1'b0;
        end
        @(negedge clk);
        cest_valid = 1'b1;
        cest_k = SC_W'(k);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            cest_h[i][j].re = refm[k][i][j].re + rnd_fx(0.01 * p * p);
            cest_h[i][j].im = refm[k][i][j].im + rnd_fx(0.01 * p * p);
            d = longint'(refm[k][i][j].re) - longint'(cest_h[i][j].re);
            enum_ += longint'(d * d);
            d = longint'(refm[k][i][j].im) - longint'(cest_h[i][j].im);
            enum_ += longint'(d * d);
            eden += longint'(longint'(refm[k][i][j].re) * longint'(refm[k][i][j].re));
            eden += longint'(longint'(refm[k][i][j].im) * longint'(refm[k][i][j].im));
          end
      end
      t_last = cyc;
      @(negedge clk);
      cest_valid = 1'b0;
      @(negedge clk);
      checks++;
      if (!meas_valid || cyc - t_last != 2) begin
        failures++;
        $display("packet %0d: meas_valid not two cycles after the last subcarrier", p);
      end
      checks += 2;
      if (num != enum_) begin
        failures++;
        $display("packet %0d: num %0d want %0d", p, num, enum_);
      end
      if (den != eden) begin
        failures++;
        $display("packet %0d: den %0d want %0d", p, den, eden);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (nmeas != 1) begin
        failures++;
        $display("packet %0d: %0d measurements", p, nmeas);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
