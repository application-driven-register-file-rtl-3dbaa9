// tb_mapped_regfile -- self-checking test of the mapped register file.
//
// Default configuration: 128 registers, pool of 8 pages, 8 read and 4 write
// ports.
//  1. Task-switch scenario: task A owns pool pages 0-3, task B pool pages
//     4-7. Each fills r0..r31 and r32..r127 share the base file. After
//     switching MPNs back and forth, each task reads back its own r0..r31
//     with no copy made, and sees the shared upper registers.
//  2. A page left at its normal place (MPN 15) reaches the base file, and
//     MPNs 8..11 redirect a page to one of the base file's four mappable
//     page frames.
// The model (model_map) gives the base index for MPN 8..11 as
// (MPN - 8) * 8 + offset.
//  3. Random traffic on all ports with random MPN changes, compared with a
//     model that keeps the base file and the pool as two arrays and maps
//     addresses by arithmetic (page = addr / 8). Same-cycle writes to one
//     register: the highest port wins.
module tb_mapped_regfile;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0][3:0]  mpn;
  logic [7:0][6:0]  rd_addr;
  logic [7:0][31:0] rd_data;
  logic [3:0]       wr_en;
  logic [3:0][6:0]  wr_addr;
  logic [3:0][31:0] wr_data;

  mapped_regfile dut (.clk, .mpn, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  logic [31:0] m_base [128];
  logic [31:0] m_pool [64];
  bit          v_base [128];
  bit          v_pool [64];

  // model mapping: returns 1 and pool index for a pool access
  function automatic bit model_map(input int a, input logic [3:0][3:0] m, output int idx);
    int page = a / 8;
    idx = a;
    if (page < 4 && int'(m[page]) < 8) begin
      idx = int'(m[page]) * 8 + a % 8;
      return 1'b1;
    end
    if (page < 4 && int'(m[page]) < 12) idx = (int'(m[page]) - 8) * 8 + a % 8;
    return 1'b0;
  endfunction

  task automatic write_reg(input int port, input int a, input logic [31:0] d);
    wr_en[port] = 1'b1; wr_addr[port] = 7'(a); wr_data[port] = d;
  endtask

  task automatic clock_writes();
    int idx;
    bit p;
    @(posedge clk);
    for (int w = 0; w < 4; w++) if (wr_en[w]) begin
      p = model_map(int'(wr_addr[w]), mpn, idx);
      if (p) begin m_pool[idx] = wr_data[w]; v_pool[idx] = 1'b1; end
      else   begin m_base[idx] = wr_data[w]; v_base[idx] = 1'b1; end
    end
    #1;
    wr_en = '0;
  endtask

  task automatic check_read(input int port, input logic [31:0] exp, input string what);
    checks++;
    if (rd_data[port] !== exp) begin
      failures++;
      $display("FAIL %s: port %0d addr %0d data %h expected %h mpn %h",
               what, port, rd_addr[port], rd_data[port], exp, mpn);
    end
  endtask

  task automatic check_model_reads();
    int idx;
    bit p;
    #1;
    for (int r = 0; r < 8; r++) begin
      p = model_map(int'(rd_addr[r]), mpn, idx);
      if (p ? v_pool[idx] : v_base[idx])
        check_read(r, p ? m_pool[idx] : m_base[idx], "random");
    end
  endtask

  localparam logic [3:0][3:0] MPN_A = {4'd3, 4'd2, 4'd1, 4'd0};
  localparam logic [3:0][3:0] MPN_B = {4'd7, 4'd6, 4'd5, 4'd4};

  initial begin
    wr_en = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    for (int i = 0; i < 128; i++) v_base[i] = 1'b0;
    for (int i = 0; i < 64; i++)  v_pool[i] = 1'b0;
    @(posedge clk); #1;

    // --- 1. task switch by remapping --------------------------------------
    mpn = MPN_A;
    for (int a = 0; a < 128; a += 4) begin
      for (int w = 0; w < 4; w++) write_reg(w, a + w, 32'hA000_0000 + 32'(a + w));
      clock_writes();
    end
    mpn = MPN_B;   // context switch: one MPN update
    for (int a = 0; a < 32; a += 4) begin
      for (int w = 0; w < 4; w++) write_reg(w, a + w, 32'hB000_0000 + 32'(a + w));
      clock_writes();
    end
    for (int sw = 0; sw < 4; sw++) begin
      mpn = sw[0] ? MPN_B : MPN_A;
      for (int a = 0; a < 128; a += 8) begin
        for (int r = 0; r < 8; r++) rd_addr[r] = 7'(a + r);
        #1;
        for (int r = 0; r < 8; r++)
          check_read(r, (a + r < 32) ? ((sw[0] ? 32'hB000_0000 : 32'hA000_0000) + 32'(a + r))
                                     : 32'hA000_0000 + 32'(a + r), "task switch");
      end
    end

    // --- 2. page left at its base location ---------------------------------
    mpn = {4'hF, 4'hF, 4'hF, 4'hF};
    write_reg(0, 9, 32'hBA5E_0009);     // RFP 1 at its base location
    clock_writes();
    mpn = MPN_A;
    rd_addr[0] = 7'd9;
    #1;
    check_read(0, 32'hA000_0009, "pool page unaffected by base write");
    mpn = {4'hF, 4'hF, 4'hF, 4'hF};
    #1;
    check_read(0, 32'hBA5E_0009, "base location");
    // RFP 3 redirected to base frame 1 (MPN 9) sees the same register
    mpn = {4'd9, 4'hF, 4'hF, 4'hF};
    rd_addr[0] = 7'd25;
    #1;
    check_read(0, 32'hBA5E_0009, "base frame 1 through RFP 3");

    // --- 3. random traffic against the model -------------------------------
    for (int t = 0; t < 4000; t++) begin
      if ($urandom_range(0, 9) == 0)
        for (int p = 0; p < 4; p++) mpn[p] = 4'($urandom_range(0, 15));
      for (int w = 0; w < 4; w++) begin
        wr_en[w]   = $urandom_range(0, 1) == 1;
        // mostly low registers so that ports collide and pages get mapped
        wr_addr[w] = ($urandom_range(0, 3) == 0) ? 7'($urandom_range(0, 127))
                                                 : 7'($urandom_range(0, 35));
        wr_data[w] = $urandom;
      end
      if (t % 7 == 0) begin   // force a collision, port 3 must win
        wr_en[1] = 1'b1; wr_en[3] = 1'b1; wr_addr[3] = wr_addr[1];
      end
      for (int r = 0; r < 8; r++)
        rd_addr[r] = ($urandom_range(0, 1) == 1) ? 7'($urandom_range(0, 127))
                                                 : 7'($urandom_range(0, 35));
      // reads see the state before this cycle's writes
      check_model_reads();
      clock_writes();
      check_model_reads();
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
