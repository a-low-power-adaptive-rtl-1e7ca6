// tb_channel_buffer: self-checking test of the two-clock channel buffer.
//
// Fills every entry with random matrices from the write clock, reads them
// back through port A on an unrelated, slower clock and through port B on
// the write clock, checks the one-cycle read latency and checks that a
// port-B read of the entry being written returns the previous contents.
module tb_channel_buffer;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned DEPTH = mimo_pkg::NUM_SC;

  logic            clk_w = 1'b0, clk_a = 1'b0, we = 1'b0;
  logic [SC_W-1:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  cmat8_t          wdata, rdata_a, rdata_b;
  cmat8_t          model [DEPTH];
  int              checks = 0, failures = 0;

  channel_buffer #(.DEPTH(DEPTH)) dut (.clk_w, .we, .waddr, .wdata, .raddr_b, .rdata_b,
                                       .clk_a, .raddr_a, .rdata_a);

  always #5  clk_w = ~clk_w;
  always #37 clk_a = ~clk_a;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cmat8_t rnd8();
    cmat8_t m;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        m[i][j].re = rnd_fx(100.0);
        m[i][j].im = rnd_fx(100.0);
      end
    return m;
  endfunction

  task automatic chk(input cmat8_t got, want, input string what, input int a);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s mismatch at entry %0d", what, a);
    end
  endtask

  initial begin
    cmat8_t nd;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk_w);
      we = 1'b1; waddr = SC_W'(a); wdata = rnd8(); model[a] = wdata;
    end
    @(negedge clk_w);
    we = 1'b0;
    // port B, one-cycle latency
    for (int a = 0; a < DEPTH; a++) begin
      raddr_b = SC_W'(a);
      @(posedge clk_w);
      @(negedge clk_w);
      chk(rdata_b, model[a], "port B", a);
    end
    // port A on the other clock
    for (int a = DEPTH - 1; a >= 0; a -= 3) begin
      @(negedge clk_a);
      raddr_a = SC_W'(a);
      @(posedge clk_a);
      @(negedge clk_a);
      chk(rdata_a, model[a], "port A", a);
    end
    // read-before-write on port B
    for (int a = 0; a < 10; a++) begin
      @(negedge clk_w);
      nd = rnd8();
      we = 1'b1; waddr = SC_W'(a * 7); wdata = nd; raddr_b = SC_W'(a * 7);
      @(posedge clk_w);
      @(negedge clk_w);
      we = 1'b0;
      chk(rdata_b, model[a * 7], "read-before-write", a * 7);
      model[a * 7] = nd;
      @(posedge clk_w);
      @(negedge clk_w);
      chk(rdata_b, nd, "after write", a * 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
