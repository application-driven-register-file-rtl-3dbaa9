// tb_mb_info_table -- self-checking test of the minimal-block table.
//
// Checks that reset and clear leave no valid entry, that a write fills
// exactly the addressed entry from the next cycle on, that any_valid
// follows the valid bits, and random write sequences against a copy of the
// table kept in the testbench.
module tb_mb_info_table;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 rst_n, clear, wr_en;
  logic [2:0]           wr_idx;
  mb_entry_t            wr_entry;
  mb_entry_t [7:0]      entries;
  logic                 any_valid;
  mb_entry_t            model [8];

  mb_info_table dut (.clk, .rst_n, .clear, .wr_en, .wr_idx, .wr_entry, .entries, .any_valid);

  function automatic mb_entry_t rand_entry();
    mb_entry_t e;
    e.valid     = $urandom_range(0, 3) != 0;
    e.start_pc  = $urandom;
    e.end_pc    = $urandom;
    e.mp_pc     = $urandom;
    e.live_rfps = 4'($urandom);
    return e;
  endfunction

  task automatic compare(input string what);
    bit av = 1'b0;
    for (int i = 0; i < 8; i++) begin
      checks++;
      av |= model[i].valid;
      if (entries[i].valid !== model[i].valid ||
          (model[i].valid && entries[i] !== model[i])) begin
        failures++;
        $display("FAIL %s: entry %0d %h expected %h", what, i, entries[i], model[i]);
      end
    end
    checks++;
    if (any_valid !== av) begin
      failures++;
      $display("FAIL %s: any_valid %0b expected %0b", what, any_valid, av);
    end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; wr_en = 1'b0; wr_idx = '0; wr_entry = '0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    compare("reset");
    for (int t = 0; t < 2000; t++) begin
      wr_en    = $urandom_range(0, 1) == 1;
      wr_idx   = 3'($urandom);
      wr_entry = rand_entry();
      clear    = $urandom_range(0, 60) == 0;
      #1;
      compare("before edge");
      @(posedge clk);
      if (clear) for (int i = 0; i < 8; i++) model[i].valid = 1'b0;
      else if (wr_en) model[wr_idx] = wr_entry;
      #1;
      compare("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
