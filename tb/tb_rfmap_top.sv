// tb_rfmap_top -- end-to-end test of the mapped register file with
// preemption deferral, at the top's default parameters (128 registers,
// 8-register pages, 4 mappable pages, pool of 8 pages, 8 read / 4 write
// ports, 8 minimal-block entries).
//
// The testbench plays the processor core and the operating system. Four
// tasks run round-robin; each loops over 64 instructions at its own base
// address and has one minimal block (MB) at base+0x80..base+0x9C with its
// minimal point (MP) at base+0x90:
//   task 0: live pages RFP0-1 -> pool pages 0,1; RFP2-3 at their base place
//   task 1: live pages RFP0-2 -> pool pages 2,3,4
//   task 2: live pages RFP0-2 -> pool pages 5,6,7
//   task 3: no MB information, no pool pages (all at base place)
// Every executed instruction writes one live register and one scratch
// register and reads back two others, checked against a shadow copy.
// Preemption interrupts come at random times. The OS, on switch_req,
// checks the MB named, its live-page mask and the deferral delay computed
// by the testbench, saves task 3's registers to memory only when full_save
// says so, rewrites the MPNs and reloads the MB table. When a task resumes,
// all its live registers must read back unchanged although no pool
// register was saved or restored. Some rounds run in MP-only mode.
//
// Mechanisms counted (each must occur): switch inside an MB (no deferral),
// deferred switch, MP-only switch, full-save fall-back, pool accesses,
// accesses to a mappable page left at its base place.
module tb_rfmap_top;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 rst_n;
  logic [7:0][6:0]      rd_addr;
  logic [7:0][31:0]     rd_data;
  logic [3:0]           wr_en;
  logic [3:0][6:0]      wr_addr;
  logic [3:0][31:0]     wr_data;
  logic                 mpn_wr_en;
  logic [3:0][3:0]      mpn_wr_data, mpn_q;
  logic                 mbt_clear, mbt_wr_en;
  logic [2:0]           mbt_wr_idx;
  mb_entry_t            mbt_wr_entry;
  logic                 mp_only;
  logic [31:0]          pc;
  logic                 pc_valid, preempt_irq;
  logic                 switch_req, full_save, switch_ack;
  logic [2:0]           switch_mb;
  logic [3:0]           switch_live_rfps;
  logic [15:0]          defer_count;
  pctl_state_t          preempt_state;

  rfmap_top dut (
    .clk, .rst_n, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .mpn_wr_en, .mpn_wr_data, .mpn_q,
    .mbt_clear, .mbt_wr_en, .mbt_wr_idx, .mbt_wr_entry, .mp_only,
    .pc, .pc_valid, .preempt_irq,
    .switch_req, .switch_mb, .switch_live_rfps, .full_save, .defer_count,
    .switch_ack, .preempt_state
  );

  // ---- task descriptions ---------------------------------------------------
  localparam int NT = 4;
  int          n_live_pages [NT] = '{2, 3, 3, 2};
  logic [3:0][3:0] t_mpn [NT] = '{ {4'hF, 4'hF, 4'd1, 4'd0},
                                  {4'hF, 4'd4, 4'd3, 4'd2},
                                  {4'hF, 4'd7, 4'd6, 4'd5},
                                  {4'hF, 4'hF, 4'hF, 4'hF} };
  bit          has_mb [NT] = '{1'b1, 1'b1, 1'b1, 1'b0};

  function automatic logic [31:0] tbase(input int t);
    return 32'h1000 * 32'(t + 1);
  endfunction
  function automatic logic [31:0] next_pc(input int t, input logic [31:0] p);
    return (p == tbase(t) + 32'hFC) ? tbase(t) : p + 4;
  endfunction

  logic [31:0] tpc [NT];
  logic [31:0] live_val [NT][32];   // shadow of each task's live registers
  bit          live_ok  [NT][32];
  logic [31:0] scr_val [128];       // shadow of scratch registers, this run only
  bit          scr_ok  [128];
  logic [31:0] saved_mem [32];      // memory image of task 3's live registers

  int n_immediate = 0, n_deferred = 0, n_mp = 0, n_full = 0;
  int n_pool = 0, n_base_page = 0, n_switch = 0;

  int  cur;
  bit  irq_pending;
  int  instr_since;
  bit  first_seen;
  bit  first_in_mb;

  function automatic int pick_scratch(input int t);
    // task 0 also uses RFP2 (r16..r23), mapped to its base place
    if (t == 0 && $urandom_range(0, 2) == 0) return $urandom_range(16, 23);
    return $urandom_range(32, 127);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t task %0d: %s", $time, cur, msg);
  endtask

  // Read back every live register of task t through the 8 read ports.
  task automatic verify_live(input int t);
    for (int a = 0; a < n_live_pages[t] * 8; a += 8) begin
      for (int r = 0; r < 8; r++) rd_addr[r] = 7'(a + r);
      #1;
      for (int r = 0; r < 8; r++) if (live_ok[t][a + r]) begin
        checks++;
        if (rd_data[r] !== live_val[t][a + r])
          fail($sformatf("live r%0d = %h, expected %h after resume", a + r, rd_data[r],
                         live_val[t][a + r]));
      end
    end
  endtask

  // One OS context switch from cur to the next task.
  task automatic os_switch();
    int nxt = (cur + 1) % NT;
    mb_entry_t e;
    n_switch++;
    // the request must describe the task being preempted
    checks++;
    if (full_save !== !has_mb[cur]) fail("full_save wrong");
    if (has_mb[cur]) begin
      checks++;
      if (switch_mb !== 3'(cur)) fail($sformatf("switch_mb %0d", switch_mb));
      checks++;
      if (switch_live_rfps !== 4'((1 << n_live_pages[cur]) - 1))
        fail($sformatf("live mask %b", switch_live_rfps));
    end
    checks++;
    if (int'(defer_count) != instr_since)
      fail($sformatf("defer_count %0d expected %0d", defer_count, instr_since));
    if (full_save) n_full++;
    else if (mp_only) n_mp++;
    else if (instr_since == 0) n_immediate++;
    else n_deferred++;
    if (!full_save && !mp_only && (instr_since == 0) != first_in_mb)
      fail("immediate switch does not match PC inside MB");
    checks++;
    if (mpn_q !== t_mpn[cur]) fail("mpn_q does not hold the task's mapping");
    // full save: the task's live registers go to memory
    if (full_save) begin
      for (int a = 0; a < 32; a += 8) begin
        for (int r = 0; r < 8; r++) rd_addr[r] = 7'(a + r);
        #1;
        for (int r = 0; r < 8; r++) saved_mem[a + r] = rd_data[r];
      end
    end
    // the core holds the instruction (pc_valid) until the acknowledge;
    // one write of the MPNs is the whole register-file switch
    switch_ack  = 1'b1;
    mpn_wr_en   = 1'b1;
    mpn_wr_data = t_mpn[nxt];
    mbt_clear   = 1'b1;
    @(posedge clk); #1;
    switch_ack = 1'b0; mpn_wr_en = 1'b0; mbt_clear = 1'b0; pc_valid = 1'b0;
    checks++;
    if (switch_req || preempt_state != PC_IDLE) fail("request still pending after ack");
    if (has_mb[nxt]) begin
      e.valid     = 1'b1;
      e.start_pc  = tbase(nxt) + 32'h80;
      e.end_pc    = tbase(nxt) + 32'h9C;
      e.mp_pc     = tbase(nxt) + 32'h90;
      e.live_rfps = 4'((1 << n_live_pages[nxt]) - 1);
      mbt_wr_en = 1'b1; mbt_wr_idx = 3'(nxt); mbt_wr_entry = e;
      @(posedge clk); #1;
      mbt_wr_en = 1'b0;
    end
    // restore the memory image of a full-save task
    if (!has_mb[nxt] && live_ok[nxt][0]) begin
      for (int a = 0; a < 32; a += 4) begin
        for (int w = 0; w < 4; w++) begin
          wr_en[w] = 1'b1; wr_addr[w] = 7'(a + w); wr_data[w] = saved_mem[a + w];
        end
        @(posedge clk); #1;
        wr_en = '0;
      end
    end
    cur = nxt;
    mp_only = (n_switch % 5 == 4);
    for (int i = 0; i < 128; i++) scr_ok[i] = 1'b0;
    verify_live(cur);
    irq_pending = 1'b0;
  endtask

  initial begin
    int la, lb, sa, sb;
    logic [31:0] d0, d1;
    rst_n = 1'b0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    mpn_wr_en = 1'b0; mpn_wr_data = '0; mbt_clear = 1'b0; mbt_wr_en = 1'b0;
    mbt_wr_idx = '0; mbt_wr_entry = '0; mp_only = 1'b0; pc = '0; pc_valid = 1'b0;
    preempt_irq = 1'b0; switch_ack = 1'b0;
    for (int t = 0; t < NT; t++) begin
      tpc[t] = tbase(t) + 32'(4 * $urandom_range(0, 63));
      for (int r = 0; r < 32; r++) live_ok[t][r] = 1'b0;
    end
    for (int i = 0; i < 128; i++) scr_ok[i] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (mpn_q !== 16'hBA98) fail("MPN reset value");
    // start task 0
    cur = 0;
    mpn_wr_en = 1'b1; mpn_wr_data = t_mpn[0];
    mbt_wr_en = 1'b1; mbt_wr_idx = 3'd0;
    mbt_wr_entry = '{valid: 1'b1, start_pc: tbase(0) + 32'h80, end_pc: tbase(0) + 32'h9C,
                     mp_pc: tbase(0) + 32'h90, live_rfps: 4'b0011};
    @(posedge clk); #1;
    mpn_wr_en = 1'b0; mbt_wr_en = 1'b0;
    irq_pending = 1'b0;

    while (n_switch < 240) begin
      // the core presents the next instruction
      pc       = tpc[cur];
      pc_valid = ($urandom_range(0, 4) != 0);
      la = $urandom_range(0, n_live_pages[cur] * 8 - 1);
      lb = $urandom_range(0, n_live_pages[cur] * 8 - 1);
      sa = pick_scratch(cur);
      sb = pick_scratch(cur);
      d0 = $urandom; d1 = $urandom;
      rd_addr = '0;
      rd_addr[0] = 7'(lb); rd_addr[1] = 7'(sb);
      #1;
      if (irq_pending && pc_valid && !first_seen) begin
        first_seen  = 1'b1;
        first_in_mb = has_mb[cur] && (pc >= tbase(cur) + 32'h80) && (pc <= tbase(cur) + 32'h9C);
      end
      if (switch_req) begin
        // the instruction at pc is not executed; the OS takes over
        checks++;
        if (!irq_pending) fail("switch without interrupt");
        if (!pc_valid) fail("switch without an instruction");
        os_switch();
        continue;
      end
      if (pc_valid) begin
        // operand reads, checked against the shadow copies
        if (live_ok[cur][lb]) begin
          checks++;
          if (rd_data[0] !== live_val[cur][lb])
            fail($sformatf("read r%0d = %h expected %h", lb, rd_data[0], live_val[cur][lb]));
        end
        if (scr_ok[sb]) begin
          checks++;
          if (rd_data[1] !== scr_val[sb])
            fail($sformatf("read scratch r%0d = %h expected %h", sb, rd_data[1], scr_val[sb]));
        end
        wr_en = 4'b0011;
        wr_addr[0] = 7'(la); wr_data[0] = d0;
        wr_addr[1] = 7'(sa); wr_data[1] = d1;
        if (t_mpn[cur][la / 8] < 4'd8) n_pool++;
        if (sa < 32 && t_mpn[cur][sa / 8] >= 4'd8) n_base_page++;
      end
      // interrupt source: one-cycle pulse now and then
      preempt_irq = !irq_pending && ($urandom_range(0, 40) == 0);
      @(posedge clk); #1;
      if (preempt_irq) begin
        irq_pending = 1'b1; instr_since = 0; first_seen = 1'b0; first_in_mb = 1'b0;
      end else if (irq_pending && pc_valid) begin
        instr_since++;
      end
      preempt_irq = 1'b0;
      if (pc_valid) begin
        live_val[cur][la] = d0; live_ok[cur][la] = 1'b1;
        scr_val[sa] = d1; scr_ok[sa] = 1'b1;
        tpc[cur] = next_pc(cur, tpc[cur]);
      end
      wr_en = '0;
    end

    $display("switches=%0d immediate=%0d deferred=%0d mp_only=%0d full_save=%0d pool_writes=%0d base_page_writes=%0d",
             n_switch, n_immediate, n_deferred, n_mp, n_full, n_pool, n_base_page);
    checks++;
    if (n_immediate == 0 || n_deferred == 0 || n_mp == 0 || n_full == 0 ||
        n_pool == 0 || n_base_page == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
