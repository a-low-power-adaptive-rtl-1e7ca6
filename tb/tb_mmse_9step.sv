// tb_mmse_9step: self-checking test of the 9-step MMSE weight unit.
//
// A synchronous-read array in the testbench plays the channel buffer. For
// random 8x8 channels on NSC subcarriers the unit's weights G_k are compared
// element by element with (H^H H + s2 I)^-1 H^H computed in double
// precision, the write order and addresses are checked, and the start-to-
// done time must be exactly 9*NSC + 3 cycles: nine steps per subcarrier.
// Three runs with different noise variances are made back to back.
module tb_mmse_9step;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NSC = 6;

  logic            clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fx_t             sigma2;
  logic [SC_W-1:0] h_raddr, g_waddr;
  cmat8_t          h_rdata, g_wdata;
  logic            g_we, busy, done;
  int              checks = 0, failures = 0;

  cmat8_t hmem [NSC];
  cmat8_t gmem [NSC];
  int     nwrites;
  int     cnt, lat;

  // Latency counter: cycles from the edge that samples start to done.
  always_ff @(posedge clk) begin
    cnt <= start ? 1 : cnt + 1;
    if (done) lat <= cnt;
  end

  mmse_9step #(.NSC(NSC)) dut (.clk, .rst_n, .start, .sigma2, .h_raddr, .h_rdata,
                               .g_we, .g_waddr, .g_wdata, .busy, .done);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    h_rdata <= (h_raddr < SC_W'(NSC)) ? hmem[h_raddr] : '0;
    if (g_we) begin
      if (g_waddr != SC_W'(nwrites)) begin
        failures++;
        $display("write %0d went to address %0d", nwrites, g_waddr);
      end
      checks++;
      gmem[g_waddr] <= g_wdata;
      nwrites <= nwrites + 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmat_t hr, hi, gr, gi;
    real   e, worst;
    worst = 0.0;
    h_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      sigma2 = r2fx(0.1 + 0.3 * run);
      for (int k = 0; k < NSC; k++)
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            hmem[k][i][j].re = rnd_fx(0.6);
            hmem[k][i][j].im = rnd_fx(0.6);
          end
      nwrites = 0;
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      do @(negedge clk); while (!done);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (lat != 9 * NSC + 3) begin
        failures++;
        $display("start-to-done %0d cycles, expected %0d", lat, 9 * NSC + 3);
      end
      checks++;
      if (nwrites != NSC) begin
        failures++;
        $display("%0d weight writes, expected %0d", nwrites, NSC);
      end
      for (int k = 0; k < NSC; k++) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            hr[i][j] = fx2r(hmem[k][i][j].re);
            hi[i][j] = fx2r(hmem[k][i][j].im);
          end
        mmse(hr, hi, fx2r(sigma2), 8, gr, gi);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            e = err(gmem[k][i][j].re, gr[i][j]);
            if (err(gmem[k][i][j].im, gi[i][j]) > e) e = err(gmem[k][i][j].im, gi[i][j]);
            if (e > worst) worst = e;
            checks++;
            if (e > 5.0e-3) begin
              failures++;
              if (failures < 10)
                $display("run %0d k %0d G[%0d][%0d]: got %f,%f want %f,%f", run, k, i, j,
                         fx2r(gmem[k][i][j].re), fx2r(gmem[k][i][j].im), gr[i][j], gi[i][j]);
            end
          end
      end
    end
    $display("worst relative error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
