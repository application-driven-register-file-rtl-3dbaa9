// tb_mpn_regs -- self-checking test of the MPN registers.
//
// Checks the reset value (MPN k = 8 + k: every page in its own base-file
// frame), that one write replaces all four MPNs and is visible in the
// next cycle, and that the value holds while wr_en is low.
module tb_mpn_regs;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            rst_n, wr_en;
  logic [3:0][3:0] wr_mpn, mpn_q;
  logic [15:0]     expected;

  mpn_regs dut (.clk, .rst_n, .wr_en, .wr_mpn, .mpn_q);

  task automatic check(input logic [15:0] exp, input string what);
    checks++;
    if (mpn_q !== exp) begin
      failures++;
      $display("FAIL %s: mpn_q=%h expected %h", what, mpn_q, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_mpn = 16'h1234;
    @(posedge clk); @(posedge clk); #1;
    check(16'hBA98, "reset");
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(16'hBA98, "hold after reset");
    expected = 16'hBA98;
    for (int i = 0; i < 500; i++) begin
      wr_en  = ($urandom_range(0, 2) == 0);
      wr_mpn = 16'($urandom);
      @(posedge clk);
      if (wr_en) expected = wr_mpn;
      #1;
      check(expected, "write/hold");
    end
    // the write takes exactly one cycle: before the edge the old value
    wr_en = 1'b1; wr_mpn = ~expected;
    #1;
    check(expected, "not before the edge");
    @(posedge clk); #1;
    check(~expected, "after one edge");
    wr_en = 1'b0;
    rst_n = 1'b0;
    @(posedge clk); #1;
    check(16'hBA98, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
