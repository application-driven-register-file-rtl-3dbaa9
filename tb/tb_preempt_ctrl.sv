// tb_preempt_ctrl -- self-checking test of the preemption controller.
//
// A small program runs in a loop: PCs 0x100, 0x104, ... 0x1FC, then back to
// 0x100, issuing on about three cycles out of four (pc_valid). One minimal
// block, entry 5, spans 0x180..0x19C with its minimal point at 0x190. The
// comparator is modelled in the testbench from cmp_enable / range_chk.
// Preemption interrupts arrive at random PCs; for each one the testbench
// works out on its own when the switch must happen:
//   MB mode : at once (delay 0) if the first PC is inside 0x180..0x19C,
//             else at the next PC 0x180, after the instructions between;
//   MP mode : at the next PC 0x190.
// It checks the cycle switch_req rises, switch_mb, full_save and the delay
// in instructions (defer_count); also the fall-back with an empty table, an
// acknowledge in the request cycle, and that interrupts during a pending
// request are ignored.
module tb_preempt_ctrl;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, preempt_irq, pc_valid, any_valid;
  logic        cmp_enable, range_chk, hit;
  logic [2:0]  hit_idx, switch_mb;
  logic        switch_req, full_save, switch_ack;
  logic [15:0] defer_count;
  pctl_state_t state;
  logic        mp_only;
  logic [31:0] pc;

  localparam logic [31:0] MB_S = 32'h180, MB_E = 32'h19C, MB_MP = 32'h190;

  preempt_ctrl dut (
    .clk, .rst_n, .preempt_irq, .pc_valid, .any_valid,
    .cmp_enable, .range_chk, .hit, .hit_idx,
    .switch_req, .switch_mb, .full_save, .defer_count, .switch_ack, .state
  );

  // comparator model: one valid entry, index 5
  always_comb begin
    hit_idx = 3'd5;
    if (!cmp_enable || !any_valid) hit = 1'b0;
    else if (mp_only)              hit = (pc == MB_MP);
    else if (range_chk)            hit = (pc >= MB_S) && (pc <= MB_E);
    else                           hit = (pc == MB_S);
  end

  function automatic logic [31:0] next_pc(input logic [31:0] p);
    return (p == 32'h1FC) ? 32'h100 : p + 4;
  endfunction

  int n_immediate = 0, n_deferred = 0, n_full = 0;

  // One preemption: raise irq for one cycle, run until the switch, check it.
  task automatic one_preemption(input bit mp, input bit table_valid, input bit ack_early);
    int  instr = 0;
    bit  first = 1'b1;
    bit  exp_now;
    int  exp_delay = -1;
    int  cycles = 0;
    mp_only   = mp;
    any_valid = table_valid;
    preempt_irq = 1'b1;
    @(posedge clk); #1;
    preempt_irq = 1'b0;
    forever begin
      pc_valid = ($urandom_range(0, 3) != 0);
      // an interrupt while one is pending must change nothing
      preempt_irq = ($urandom_range(0, 5) == 0);
      #1;
      exp_now = 1'b0;
      if (pc_valid) begin
        if (!table_valid)              exp_now = 1'b1;
        else if (mp)                   exp_now = (pc == MB_MP);
        else if (first)                exp_now = (pc >= MB_S) && (pc <= MB_E);
        else                           exp_now = (pc == MB_S);
        first = 1'b0;
      end
      checks++;
      if (switch_req !== exp_now) begin
        failures++;
        $display("FAIL switch_req=%0b expected %0b pc=%h mp=%0b", switch_req, exp_now, pc, mp);
      end
      if (exp_now || switch_req) break;
      @(posedge clk); #1;
      if (pc_valid) begin instr++; pc = next_pc(pc); end
      cycles++;
      if (cycles > 1000) begin failures++; $display("FAIL no switch"); break; end
    end
    exp_delay = instr;
    checks++;
    if (int'(defer_count) != exp_delay || full_save !== !table_valid ||
        (table_valid && switch_mb !== 3'd5)) begin
      failures++;
      $display("FAIL delay %0d/%0d full %0b mb %0d", defer_count, exp_delay, full_save, switch_mb);
    end
    if (!table_valid) n_full++;
    else if (exp_delay == 0) n_immediate++;
    else n_deferred++;
    // hold or acknowledge
    switch_ack = ack_early;
    @(posedge clk); #1;
    preempt_irq = 1'b0;
    if (!ack_early) begin
      pc_valid = 1'b1;
      #1;
      checks++;
      if (!switch_req) begin failures++; $display("FAIL request dropped before ack"); end
      switch_ack = 1'b1;
      @(posedge clk); #1;
    end
    switch_ack = 1'b0;
    pc_valid = 1'b0;
    checks++;
    if (switch_req || state != PC_IDLE) begin
      failures++; $display("FAIL not idle after ack");
    end
    // the task resumes: advance a random distance
    repeat ($urandom_range(0, 70)) pc = next_pc(pc);
  endtask

  initial begin
    rst_n = 1'b0; preempt_irq = 1'b0; pc_valid = 1'b0; any_valid = 1'b0;
    switch_ack = 1'b0; mp_only = 1'b0; pc = 32'h100;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // idle: comparator kept off
    repeat (5) begin
      pc_valid = 1'b1; #1;
      checks++;
      if (cmp_enable || switch_req) begin failures++; $display("FAIL active while idle"); end
      @(posedge clk); #1;
    end
    for (int k = 0; k < 300; k++)
      one_preemption($urandom_range(0, 3) == 0, $urandom_range(0, 9) != 0,
                     $urandom_range(0, 1) == 1);
    // directed: inside the MB -> immediate, delay 0
    pc = 32'h188;
    one_preemption(1'b0, 1'b1, 1'b0);
    checks++;
    if (n_immediate == 0 || n_deferred == 0 || n_full == 0) begin
      failures++;
      $display("FAIL coverage: immediate %0d deferred %0d full %0d", n_immediate, n_deferred, n_full);
    end
    $display("immediate=%0d deferred=%0d full_save=%0d", n_immediate, n_deferred, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
