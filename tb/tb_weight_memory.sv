// tb_weight_memory: self-checking test of the double-banked weight memory.
//
// Writes different random matrices into both banks from the write clock,
// reads them back on an unrelated read clock, checks the one-cycle read
// latency and that writing one bank leaves the other untouched.
module tb_weight_memory;
  import mimo_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned DEPTH = mimo_pkg::NUM_SC;

  logic            clk_w = 1'b0, clk_r = 1'b0, we = 1'b0, wbank = 1'b0, rbank = 1'b0;
  logic [SC_W-1:0] waddr = '0, raddr = '0;
  cmat8_t          wdata, rdata;
  cmat8_t          model [2][DEPTH];
  int              checks = 0, failures = 0;

  weight_memory #(.DEPTH(DEPTH)) dut (.clk_w, .we, .wbank, .waddr, .wdata,
                                      .clk_r, .rbank, .raddr, .rdata);

  always #13 clk_w = ~clk_w;
  always #5  clk_r = ~clk_r;

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

  task automatic read_all();
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk_r);
        rbank = b[0]; raddr = SC_W'(a);
        @(posedge clk_r);
        @(negedge clk_r);
        checks++;
        if (rdata !== model[b][a]) begin
          failures++;
          if (failures < 10) $display("bank %0d entry %0d mismatch", b, a);
        end
      end
  endtask

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk_w);
        we = 1'b1; wbank = b[0]; waddr = SC_W'(a); wdata = rnd8(); model[b][a] = wdata;
      end
    @(negedge clk_w);
    we = 1'b0;
    read_all();
    // rewrite bank 0 only
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk_w);
      we = 1'b1; wbank = 1'b0; waddr = SC_W'(a); wdata = rnd8(); model[0][a] = wdata;
    end
    @(negedge clk_w);
    we = 1'b0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
