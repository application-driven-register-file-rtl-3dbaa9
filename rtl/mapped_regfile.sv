// mapped_regfile -- multi-ported register file with a pool of spare pages.
//
// Two storage arrays: the base register file (RF_ENTRIES registers) and the
// pool of spare register pages (POOL_PAGES x PAGE_SIZE registers). Every read
// and write port has its own rfp_addr_map, all fed by the same MPN vector, so
// an access to one of the first MAPPED_RFPS pages lands in the page frame
// that the running task's MPN names (a pool page or one of the base file's
// own mappable pages), and every other access lands in the base file.
// A task switch therefore changes which pool pages are visible without
// copying a register; the pages of the preempted task stay in the pool.
//
// Timing: reads are combinational (address in, data out in the same cycle);
// writes take effect at the rising clock edge, so a read in the cycle of a
// write returns the old value. A change of mpn applies to reads at once and
// to the writes of the same edge.
//
// The base file plus a small separate pool, reached by replacing the page
// number, follows the original scheme. Own choices: NUM_RD = 8 and NUM_WR = 4 (two operands and one result for
// each of the four issue slots); when several write ports write the same
// physical register in one cycle, the highest-numbered port wins. The
// registers have no reset; software writes a register before reading it.
module mapped_regfile
  import rfmap_pkg::*;
#(
  parameter int unsigned RF_ENTRIES  = rfmap_pkg::RFM_RF_ENTRIES,
  parameter int unsigned PAGE_SIZE   = rfmap_pkg::RFM_PAGE_SIZE,
  parameter int unsigned MAPPED_RFPS = rfmap_pkg::RFM_MAPPED_RFPS,
  parameter int unsigned MPN_W       = rfmap_pkg::RFM_MPN_W,
  parameter int unsigned POOL_PAGES  = rfmap_pkg::RFM_POOL_PAGES,
  parameter int unsigned DATA_W      = rfmap_pkg::RFM_DATA_W,
  parameter int unsigned NUM_RD      = rfmap_pkg::RFM_NUM_RD,
  parameter int unsigned NUM_WR      = rfmap_pkg::RFM_NUM_WR,
  localparam int unsigned ADDR_W     = $clog2(RF_ENTRIES),
  localparam int unsigned POOL_REGS  = POOL_PAGES * PAGE_SIZE,
  localparam int unsigned POOL_AW    = $clog2(POOL_REGS)
) (
  input  logic                              clk,
  input  logic [MAPPED_RFPS-1:0][MPN_W-1:0] mpn,
  input  logic [NUM_RD-1:0][ADDR_W-1:0]     rd_addr,
  output logic [NUM_RD-1:0][DATA_W-1:0]     rd_data,
  input  logic [NUM_WR-1:0]                 wr_en,
  input  logic [NUM_WR-1:0][ADDR_W-1:0]     wr_addr,
  input  logic [NUM_WR-1:0][DATA_W-1:0]     wr_data
);

  logic [DATA_W-1:0] base_mem [RF_ENTRIES];
  logic [DATA_W-1:0] pool_mem [POOL_REGS];

  logic [NUM_RD-1:0]              rd_pool;
  logic [NUM_RD-1:0][POOL_AW-1:0] rd_paddr;
  logic [NUM_RD-1:0][ADDR_W-1:0]  rd_baddr;
  logic [NUM_WR-1:0]              wr_pool;
  logic [NUM_WR-1:0][POOL_AW-1:0] wr_paddr;
  logic [NUM_WR-1:0][ADDR_W-1:0]  wr_baddr;

  for (genvar r = 0; r < NUM_RD; r++) begin : g_rd
    rfp_addr_map #(
      .RF_ENTRIES(RF_ENTRIES), .PAGE_SIZE(PAGE_SIZE), .MAPPED_RFPS(MAPPED_RFPS),
      .MPN_W(MPN_W), .POOL_PAGES(POOL_PAGES)
    ) u_map (
      .addr(rd_addr[r]), .mpn(mpn),
      .to_pool(rd_pool[r]), .pool_addr(rd_paddr[r]), .base_addr(rd_baddr[r])
    );
    assign rd_data[r] = rd_pool[r] ? pool_mem[rd_paddr[r]] : base_mem[rd_baddr[r]];
  end

  for (genvar w = 0; w < NUM_WR; w++) begin : g_wr
    rfp_addr_map #(
      .RF_ENTRIES(RF_ENTRIES), .PAGE_SIZE(PAGE_SIZE), .MAPPED_RFPS(MAPPED_RFPS),
      .MPN_W(MPN_W), .POOL_PAGES(POOL_PAGES)
    ) u_map (
      .addr(wr_addr[w]), .mpn(mpn),
      .to_pool(wr_pool[w]), .pool_addr(wr_paddr[w]), .base_addr(wr_baddr[w])
    );
  end

  // Ports are applied in order, so the highest-numbered port wins a conflict.
  always_ff @(posedge clk) begin
    for (int w = 0; w < NUM_WR; w++) begin
      if (wr_en[w]) begin
        if (wr_pool[w]) pool_mem[wr_paddr[w]] <= wr_data[w];
        else            base_mem[wr_baddr[w]] <= wr_data[w];
      end
    end
  end

endmodule
