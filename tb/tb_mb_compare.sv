// tb_mb_compare -- self-checking test of the PC comparator.
//
// A table of eight minimal blocks (some invalid, some overlapping) is
// checked with random and edge PCs (each block's start, end, one before and
// one after) in the three modes: range check, start-address check and
// minimal-point check, with enable low and high. The expected hit and the
// lowest matching index are computed in the testbench.
module tb_mb_compare;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            enable, range_chk, mp_only, hit;
  logic [31:0]     pc;
  logic [2:0]      hit_idx;
  mb_entry_t [7:0] entries;

  mb_compare dut (.enable, .range_chk, .mp_only, .pc, .entries, .hit, .hit_idx);

  task automatic check_pc(input logic [31:0] p);
    bit exp_hit = 1'b0;
    int exp_idx = 0;
    bit m;
    pc = p;
    #1;
    for (int i = 7; i >= 0; i--) begin
      if (mp_only)        m = (p == entries[i].mp_pc);
      else if (range_chk) m = (p >= entries[i].start_pc) && (p <= entries[i].end_pc);
      else                m = (p == entries[i].start_pc);
      if (m && entries[i].valid && enable) begin exp_hit = 1'b1; exp_idx = i; end
    end
    checks++;
    if (hit !== exp_hit || (exp_hit && int'(hit_idx) != exp_idx)) begin
      failures++;
      $display("FAIL pc=%h en=%0b range=%0b mp=%0b hit=%0b/%0b idx=%0d/%0d", p, enable,
               range_chk, mp_only, hit, exp_hit, hit_idx, exp_idx);
    end
  endtask

  initial begin
    for (int round = 0; round < 50; round++) begin
      for (int i = 0; i < 8; i++) begin
        logic [31:0] s, len;
        s   = 32'h1000 + 32'($urandom_range(0, 63)) * 16;
        len = 32'($urandom_range(0, 40));
        entries[i].valid     = $urandom_range(0, 4) != 0;
        entries[i].start_pc  = s;
        entries[i].end_pc    = s + len;
        entries[i].mp_pc     = s + 32'($urandom_range(0, int'(len)));
        entries[i].live_rfps = 4'($urandom);
      end
      for (int mode = 0; mode < 6; mode++) begin
        enable    = (mode != 5);
        mp_only   = (mode == 2) || (mode == 4);
        range_chk = (mode == 0) || (mode == 4) || (mode == 5);
        for (int i = 0; i < 8; i++) begin
          check_pc(entries[i].start_pc);
          check_pc(entries[i].start_pc - 1);
          check_pc(entries[i].end_pc);
          check_pc(entries[i].end_pc + 1);
          check_pc(entries[i].mp_pc);
        end
        for (int k = 0; k < 40; k++) check_pc(32'h1000 + 32'($urandom_range(0, 1100)));
      end
    end
    // directed: inside the block is a hit for the range check only
    entries = '0;
    entries[3] = '{valid: 1'b1, start_pc: 32'h200, end_pc: 32'h240, mp_pc: 32'h220, live_rfps: 4'h3};
    enable = 1'b1; mp_only = 1'b0; range_chk = 1'b1;
    pc = 32'h230; #1;
    checks++;
    if (!(hit && hit_idx == 3'd3)) begin failures++; $display("FAIL directed range"); end
    range_chk = 1'b0; #1;
    checks++;
    if (hit) begin failures++; $display("FAIL directed value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
