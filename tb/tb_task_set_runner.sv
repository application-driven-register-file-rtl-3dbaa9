// tb_task_set_runner -- runs the task-set workloads on one configuration
// of rfmap_top (register-file size RF_ENTRIES, pool of POOL_PAGES pages).
//
// Task sets of two to four tasks use the worst-case live-page count of each
// task at its minimal points (MP) or minimal blocks (MB):
//   kernels      A2 = {EJ, LU}, A3 = A2 + TRI, A4 = A3 + MMUL
//   applications B2 = {2D-DCT, ADPCM}, B3 = B2 + SHA, B4 = B3 + SUSAN
//   pages (MP/MB)        EJ  LU  TRI MMUL DCT ADPCM SHA SUSAN
//   128 regs aggressive  1/2 3/5 4/5 3/3  3/6 2/2   2/3 3/4
//   128 regs scalar      1/3 3/3 2/3 2/2  2/2 2/2   2/2 3/3
//    64 regs aggressive  1/1 3/4 3/3 2/3  2/3 2/2   2/3 3/3
//    64 regs scalar      1/2 3/3 2/3 2/2  2/2 2/2   2/2 3/3
// Page frames are the POOL_PAGES pool pages plus the four mappable pages of
// the base file (MPN values POOL_PAGES .. POOL_PAGES+3). If every task needs
// at most four pages and all pages fit in these frames, the OS model gives
// every task its own frames, and every switch is a single MPN write.
// Otherwise the four base-file frames become a shared area: tasks are given
// pool pages in priority order (the order listed) while the pool has room,
// and the others run at the pages' normal places, get no minimal-block
// entry and are switched with a conventional save to memory (full_save).
// The number of pages that must go to memory is then at least
// (sum of pages) - 4 - POOL_PAGES.
// Each set runs 32 round-robin preemptions. At each resume every live
// register of the task must read back unchanged. The runner checks
// full_save against the allocation, the MB named, the live-page mask, and
// the deferral delay it computes itself. Per set it prints how many tasks
// fit and how many pages had to go to memory. done rises when all
// 24 runs (2 optimisation levels x 2 modes x 6 sets) are over.
module tb_task_set_runner
  import rfmap_pkg::*;
#(
  parameter int unsigned RF_ENTRIES = 128,
  parameter int unsigned POOL_PAGES = 8
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned AW = $clog2(RF_ENTRIES);
  localparam int RFI = (RF_ENTRIES == 64) ? 0 : 1;
  localparam int PCT = 100 * POOL_PAGES * 8 / RF_ENTRIES;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n;
  logic [7:0][AW-1:0]   rd_addr;
  logic [7:0][31:0]     rd_data;
  logic [3:0]           wr_en;
  logic [3:0][AW-1:0]   wr_addr;
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

  rfmap_top #(.RF_ENTRIES(RF_ENTRIES), .POOL_PAGES(POOL_PAGES)) dut (
    .clk, .rst_n, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .mpn_wr_en, .mpn_wr_data, .mpn_q,
    .mbt_clear, .mbt_wr_en, .mbt_wr_idx, .mbt_wr_entry, .mp_only,
    .pc, .pc_valid, .preempt_irq,
    .switch_req, .switch_mb, .switch_live_rfps, .full_save, .defer_count,
    .switch_ack, .preempt_state
  );

  // live pages per benchmark: [rf][opt][mode][bench], rf 0 = 64 and
  // 1 = 128 registers; bench order EJ LU TRI MMUL DCT ADPCM SHA SUSAN
  int pages [2][2][2][8] = '{
    '{ '{ '{1, 3, 3, 2, 2, 2, 2, 3}, '{1, 4, 3, 3, 3, 2, 3, 3} },
       '{ '{1, 3, 2, 2, 2, 2, 2, 3}, '{2, 3, 3, 2, 2, 2, 2, 3} } },
    '{ '{ '{1, 3, 4, 3, 3, 2, 2, 3}, '{2, 5, 5, 3, 6, 2, 3, 4} },
       '{ '{1, 3, 2, 2, 2, 2, 2, 3}, '{3, 3, 3, 2, 2, 2, 2, 3} } } };
  string bname [8] = '{"EJ", "LU", "TRI", "MMUL", "2D-DCT", "ADPCM", "SHA", "SUSAN"};

  localparam int MAXT = 4;
  int          nt;
  int          bench  [MAXT];
  int          npg    [MAXT];
  bit          pooled [MAXT];
  logic [3:0][3:0] t_mpn [MAXT];
  logic [31:0] tpc [MAXT];
  logic [31:0] live_val [MAXT][48];
  bit          live_ok  [MAXT][48];
  logic [31:0] mem_img  [MAXT][48];
  int          cur, n_switch, n_fast, n_full;
  bit          irq_pending, first_seen, first_in_mb;
  int          instr_since;

  function automatic logic [31:0] tbase(input int t);
    return 32'h1000 * 32'(t + 1);
  endfunction
  function automatic logic [31:0] next_pc(input int t, input logic [31:0] p);
    return (p == tbase(t) + 32'hFC) ? tbase(t) : p + 4;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL t=%0t task %0d: %s", $time, cur, msg);
  endtask

  task automatic load_table(input int t);
    mb_entry_t e;
    if (!pooled[t]) return;
    e.valid = 1'b1;
    e.start_pc = tbase(t) + 32'h80; e.end_pc = tbase(t) + 32'h9C; e.mp_pc = tbase(t) + 32'h90;
    e.live_rfps = 4'((1 << npg[t]) - 1);
    mbt_wr_en = 1'b1; mbt_wr_idx = 3'(t); mbt_wr_entry = e;
    @(posedge clk); #1;
    mbt_wr_en = 1'b0;
  endtask

  task automatic verify_live(input int t);
    for (int a = 0; a < npg[t] * 8; a += 8) begin
      for (int r = 0; r < 8; r++) rd_addr[r] = AW'(a + r);
      #1;
      for (int r = 0; r < 8; r++) if (live_ok[t][a + r]) begin
        checks++;
        if (rd_data[r] !== live_val[t][a + r])
          fail($sformatf("r%0d = %h expected %h after resume", a + r, rd_data[r], live_val[t][a + r]));
      end
    end
  endtask

  task automatic os_switch();
    int nxt = (cur + 1) % nt;
    n_switch++;
    checks++;
    if (full_save !== !pooled[cur]) fail("full_save does not match the allocation");
    if (pooled[cur]) begin
      n_fast++;
      checks++;
      if (switch_mb !== 3'(cur) || switch_live_rfps !== 4'((1 << npg[cur]) - 1))
        fail("switch_mb / live mask");
      checks++;
      if (int'(defer_count) != instr_since) fail("deferral delay");
      if (!mp_only && (instr_since == 0) != first_in_mb) fail("immediate switch vs PC in MB");
    end else begin
      n_full++;
      // conventional save of every live register
      for (int a = 0; a < npg[cur] * 8; a += 8) begin
        for (int r = 0; r < 8; r++) rd_addr[r] = AW'(a + r);
        #1;
        for (int r = 0; r < 8; r++) mem_img[cur][a + r] = rd_data[r];
      end
    end
    switch_ack = 1'b1; mpn_wr_en = 1'b1; mpn_wr_data = t_mpn[nxt]; mbt_clear = 1'b1;
    @(posedge clk); #1;
    switch_ack = 1'b0; mpn_wr_en = 1'b0; mbt_clear = 1'b0; pc_valid = 1'b0;
    load_table(nxt);
    if (!pooled[nxt]) begin
      for (int a = 0; a < npg[nxt] * 8; a += 4) begin
        for (int w = 0; w < 4; w++) begin
          wr_en[w] = 1'b1; wr_addr[w] = AW'(a + w); wr_data[w] = mem_img[nxt][a + w];
        end
        @(posedge clk); #1;
        wr_en = '0;
      end
    end
    cur = nxt;
    verify_live(cur);
    irq_pending = 1'b0;
  endtask

  task automatic run_set(input int opt, input int mode, input int grp, input int size);
    int used = 0;
    int in_pool = 0;
    int spilled = 0;
    int la, lb;
    logic [31:0] d0;
    int total = 0;
    bit all_fit;
    mp_only = (mode == 0);
    nt = size;
    for (int t = 0; t < nt; t++) begin
      npg[t] = pages[RFI][opt][mode][grp * 4 + t];
      total += npg[t];
    end
    all_fit = (total <= int'(POOL_PAGES) + 4);
    for (int t = 0; t < nt; t++) all_fit &= (npg[t] <= 4);
    for (int t = 0; t < nt; t++) begin
      bench[t] = grp * 4 + t;
      pooled[t] = (npg[t] <= 4) &&
                  (used + npg[t] <= int'(POOL_PAGES) + (all_fit ? 4 : 0));
      // default: every page at its normal place, base frame k for RFP k
      for (int k = 0; k < 4; k++) t_mpn[t][k] = 4'(POOL_PAGES + k);
      if (pooled[t]) begin
        for (int p = 0; p < npg[t]; p++) t_mpn[t][p] = 4'(used + p);
        used += npg[t];
        in_pool++;
      end else spilled += npg[t];
      tpc[t] = tbase(t) + 32'(4 * $urandom_range(0, 63));
      for (int r = 0; r < 48; r++) begin live_ok[t][r] = 1'b0; mem_img[t][r] = '0; end
    end
    n_switch = 0; n_fast = 0; n_full = 0;
    cur = 0;
    mbt_clear = 1'b1; mpn_wr_en = 1'b1; mpn_wr_data = t_mpn[0];
    @(posedge clk); #1;
    mbt_clear = 1'b0; mpn_wr_en = 1'b0;
    load_table(0);
    irq_pending = 1'b0;
    while (n_switch < 32) begin
      pc = tpc[cur];
      pc_valid = ($urandom_range(0, 4) != 0);
      la = $urandom_range(0, npg[cur] * 8 - 1);
      lb = $urandom_range(0, npg[cur] * 8 - 1);
      d0 = $urandom;
      rd_addr = '0; rd_addr[0] = AW'(lb);
      #1;
      if (irq_pending && pc_valid && !first_seen) begin
        first_seen  = 1'b1;
        first_in_mb = (pc >= tbase(cur) + 32'h80) && (pc <= tbase(cur) + 32'h9C);
      end
      if (switch_req) begin
        os_switch();
        continue;
      end
      if (pc_valid) begin
        if (live_ok[cur][lb]) begin
          checks++;
          if (rd_data[0] !== live_val[cur][lb]) fail("operand read");
        end
        wr_en[0] = 1'b1; wr_addr[0] = AW'(la); wr_data[0] = d0;
      end
      preempt_irq = !irq_pending && ($urandom_range(0, 20) == 0);
      @(posedge clk); #1;
      if (preempt_irq) begin
        irq_pending = 1'b1; instr_since = 0; first_seen = 1'b0; first_in_mb = 1'b0;
      end else if (irq_pending && pc_valid) instr_since++;
      preempt_irq = 1'b0;
      if (pc_valid) begin
        live_val[cur][la] = d0; live_ok[cur][la] = 1'b1;
        tpc[cur] = next_pc(cur, tpc[cur]);
      end
      wr_en = '0;
    end
    checks++;
    if ((in_pool > 0 && n_fast == 0) || (in_pool < nt && n_full == 0))
      fail("a switch kind of this set never happened");
    $display("%0d regs, pool %0d pages (%0d%%), %s %s %s%0d: pages %0d/%0d/%0d/%0d, %0d of %0d tasks in the pool, %0d pages to memory, %0d register-free switches, %0d full saves",
             RF_ENTRIES, POOL_PAGES, PCT, opt ? "scalar    " : "aggressive", mode ? "MB" : "MP",
             grp ? "B" : "A", size, npg[0], npg[1], nt > 2 ? npg[2] : 0, nt > 3 ? npg[3] : 0,
             in_pool, nt, spilled, n_fast, n_full);
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    mpn_wr_en = 1'b0; mpn_wr_data = '0; mbt_clear = 1'b0; mbt_wr_en = 1'b0;
    mbt_wr_idx = '0; mbt_wr_entry = '0; mp_only = 1'b0; pc = '0; pc_valid = 1'b0;
    preempt_irq = 1'b0; switch_ack = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int opt = 0; opt < 2; opt++)
      for (int mode = 0; mode < 2; mode++)
        for (int grp = 0; grp < 2; grp++)
          for (int size = 2; size <= 4; size++)
            run_set(opt, mode, grp, size);
    done = 1'b1;
  end
endmodule
