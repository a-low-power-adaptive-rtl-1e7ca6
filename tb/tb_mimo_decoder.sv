// tb_mimo_decoder: self-checking test of the MIMO decoder s_hat = G_k y_k.
//
// A synchronous-read array plays the weight memory. Random vectors are
// streamed, one per cycle with random gaps; each output must equal the
// matrix-vector product computed in double precision to within one LSB
// (one rounding per element), carry the right subcarrier index and appear
// exactly two cycles after its input.
module tb_mimo_decoder;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NSC = mimo_pkg::NUM_SC;
  localparam int          NVEC = 400;

  logic            clk = 1'b0, rst_n = 1'b0, y_valid = 1'b0, s_valid;
  logic [SC_W-1:0] y_k = '0, s_k, wmem_raddr;
  cvec8_t          y, s;
  cmat8_t          wmem_rdata;
  cmat8_t          gmem [NSC];
  int              checks = 0, failures = 0;

  cvec8_t          sent_y [NVEC];
  int              sent_k [NVEC];
  int              sent_t [NVEC];
  int              nsent = 0, nrecv = 0, cyc = 0;

  mimo_decoder dut (.clk, .rst_n, .y_valid, .y_k, .y, .wmem_raddr, .wmem_rdata,
                    .s_valid, .s_k, .s);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    wmem_rdata <= gmem[wmem_raddr];
    cyc <= cyc + 1;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(negedge clk) begin
    if (rst_n && s_valid) begin
      real wr, wi, gr, gi, yr, yi;
      int  n;
      n = nrecv;
      nrecv++;
      checks++;
      if (s_k != SC_W'(sent_k[n]) || cyc - sent_t[n] != 2) begin
        failures++;
        $display("output %0d: index %0d after %0d cycles", n, s_k, cyc - sent_t[n]);
      end
      for (int i = 0; i < 8; i++) begin
        wr = 0.0; wi = 0.0;
        for (int j = 0; j < 8; j++) begin
          gr = fx2r(gmem[sent_k[n]][i][j].re); gi = fx2r(gmem[sent_k[n]][i][j].im);
          yr = fx2r(sent_y[n][j].re);          yi = fx2r(sent_y[n][j].im);
          wr += gr * yr - gi * yi;
          wi += gr * yi + gi * yr;
        end
        checks++;
        if ((fx2r(s[i].re) - wr) > 1.0 / 65536.0 || (wr - fx2r(s[i].re)) > 1.0 / 65536.0 ||
            (fx2r(s[i].im) - wi) > 1.0 / 65536.0 || (wi - fx2r(s[i].im)) > 1.0 / 65536.0) begin
          failures++;
          if (failures < 10) $display("output %0d row %0d: got %f,%f want %f,%f", n, i,
                                      fx2r(s[i].re), fx2r(s[i].im), wr, wi);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < NSC; k++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          gmem[k][i][j].re = rnd_fx(1.5);
          gmem[k][i][j].im = rnd_fx(1.5);
        end
    y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (nsent < NVEC) begin
      @(negedge clk);
      if ($urandom_range(3, 0) != 0) begin
        y_valid = 1'b1;
        y_k = SC_W'($urandom_range(NSC - 1, 0));
        for (int j = 0; j < 8; j++) begin
          y[j].re = rnd_fx(1.5);
          y[j].im = rnd_fx(1.5);
        end
        sent_y[nsent] = y;
        sent_k[nsent] = int'(y_k);
        sent_t[nsent] = cyc;
        nsent++;
      end else begin
        y_valid = 1'b0;
      end
    end
    @(negedge clk);
    y_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (nrecv != NVEC) begin
      failures++;
      $display("%0d outputs for %0d inputs", nrecv, NVEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
