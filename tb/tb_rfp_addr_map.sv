// tb_rfp_addr_map -- self-checking test of the per-port address mapper.
//
// Two instances: the default 128-entry register file and a 64-entry one
// (both sizes are evaluated for this design). For random MPN vectors every
// register address is applied and the outputs are compared with a model
// built from arithmetic on the address: the mapped region is the first
// 4 x 8 = 32 registers, page = addr / 8, offset = addr % 8; an MPN below
// the pool size (8) sends the access to pool register MPN * 8 + offset, an
// MPN of 8..11 to base register (MPN - 8) * 8 + offset, and a larger MPN
// leaves the address unchanged.
module tb_rfp_addr_map;
  import rfmap_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [6:0] addr128;
  logic [5:0] addr64;
  logic [3:0][3:0] mpn;
  logic       pool128, pool64;
  logic [5:0] paddr128, paddr64;
  logic [6:0] baddr128;
  logic [5:0] baddr64;

  rfp_addr_map dut128 (
    .addr(addr128), .mpn(mpn),
    .to_pool(pool128), .pool_addr(paddr128), .base_addr(baddr128)
  );

  rfp_addr_map #(.RF_ENTRIES(64)) dut64 (
    .addr(addr64), .mpn(mpn),
    .to_pool(pool64), .pool_addr(paddr64), .base_addr(baddr64)
  );

  task automatic check_one(input int a, input int entries);
    int  page, off, v;
    bit  exp_pool;
    int  exp_paddr, exp_baddr;
    page = a / 8;
    off  = a % 8;
    exp_pool  = 1'b0;
    exp_paddr = 0;
    exp_baddr = a;
    if (page < 4) begin
      v = int'(mpn[page]);
      if (v < 8) begin
        exp_pool  = 1'b1;
        exp_paddr = v * 8 + off;
      end else if (v < 12) begin
        exp_baddr = (v - 8) * 8 + off;
      end
    end
    checks++;
    if (entries == 128) begin
      if (pool128 !== exp_pool || (exp_pool && int'(paddr128) != exp_paddr) ||
          (!exp_pool && int'(baddr128) != exp_baddr)) begin
        failures++;
        $display("FAIL 128: addr=%0d mpn=%h pool=%0b/%0b paddr=%0d/%0d", a, mpn,
                 pool128, exp_pool, paddr128, exp_paddr);
      end
    end else begin
      if (pool64 !== exp_pool || (exp_pool && int'(paddr64) != exp_paddr) ||
          (!exp_pool && int'(baddr64) != exp_baddr)) begin
        failures++;
        $display("FAIL 64: addr=%0d mpn=%h pool=%0b/%0b paddr=%0d/%0d", a, mpn,
                 pool64, exp_pool, paddr64, exp_paddr);
      end
    end
  endtask

  initial begin
    // directed case from the address-field example: 0001xxx is RFP 1
    mpn = {4'hF, 4'hF, 4'd5, 4'hF};
    addr128 = 7'b0001010;
    addr64  = '0;
    #1;
    checks++;
    if (!(pool128 && paddr128 == 6'd42)) begin
      failures++;
      $display("FAIL directed: pool=%0b paddr=%0d", pool128, paddr128);
    end
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < 4; p++) mpn[p] = 4'($urandom_range(0, 15));
      for (int a = 0; a < 128; a++) begin
        addr128 = 7'(a);
        addr64  = 6'(a % 64);
        #1;
        check_one(a, 128);
        if (a < 64) check_one(a, 64);
      end
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
