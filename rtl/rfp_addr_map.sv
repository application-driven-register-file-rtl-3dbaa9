// rfp_addr_map -- address mapping for one register-file port.
//
// An ISA-visible register address is read as three fields (for the default
// 128-entry file with 8-register pages and four mappable pages):
//   addr[6:5]  region bits   -- all zero means "inside the mapped region"
//   addr[4:3]  RFP number    -- which of the four mappable pages
//   addr[2:0]  RFP offset    -- register within the page
// Inside the mapped region the RFP number selects one of the four MPNs (the
// 4:1 multiplexer of the original scheme), and the MPN replaces the page
// number of the address:
//   MPN <  POOL_PAGES                   pool register {MPN, offset}
//   MPN =  POOL_PAGES + j, j < 4        base register {j, offset}, i.e. one
//                                       of the four mappable pages of the
//                                       base file, which thereby serve as
//                                       four more page frames
//   any larger MPN                      the page's own normal location
// Everything outside the mapped region goes to the base register file at
// the unchanged address (to_pool low, base_addr = addr).
//
// The original scheme says a mappable page can sit in the pool or at its
// normal place in the base file, and counts the base file's mappable pages
// as capacity next to the pool; the encoding of the base-file frames above
// is this design's own.
//
// Purely combinational; the zero-detect of the region bits and the MPN
// multiplexer sit in front of the register-file decoders.
module rfp_addr_map
  import rfmap_pkg::*;
#(
  parameter int unsigned RF_ENTRIES  = rfmap_pkg::RFM_RF_ENTRIES,
  parameter int unsigned PAGE_SIZE   = rfmap_pkg::RFM_PAGE_SIZE,
  parameter int unsigned MAPPED_RFPS = rfmap_pkg::RFM_MAPPED_RFPS,
  parameter int unsigned MPN_W       = rfmap_pkg::RFM_MPN_W,
  parameter int unsigned POOL_PAGES  = rfmap_pkg::RFM_POOL_PAGES,
  localparam int unsigned ADDR_W  = $clog2(RF_ENTRIES),
  localparam int unsigned OFF_W   = $clog2(PAGE_SIZE),
  localparam int unsigned SEL_W   = $clog2(MAPPED_RFPS),
  localparam int unsigned POOL_AW = $clog2(POOL_PAGES * PAGE_SIZE),
  localparam int unsigned PPN_W   = POOL_AW - OFF_W  // pool page number bits
) (
  input  logic [ADDR_W-1:0]                   addr,      // ISA-visible address
  input  logic [MAPPED_RFPS-1:0][MPN_W-1:0]   mpn,       // current mapping
  output logic                                to_pool,   // access the pool
  output logic [POOL_AW-1:0]                  pool_addr, // pool register index
  output logic [ADDR_W-1:0]                   base_addr  // base register index
);

  logic             in_region;
  logic [SEL_W-1:0] rfp_num;
  logic [SEL_W-1:0] base_page;
  logic [MPN_W-1:0] mpn_sel;
  logic [OFF_W-1:0] offset;
  int unsigned      frame;

  always_comb begin
    offset    = addr[OFF_W-1:0];
    rfp_num   = addr[OFF_W+SEL_W-1:OFF_W];
    // NOR of the region bits
    in_region = (addr[ADDR_W-1:OFF_W+SEL_W] == '0);
    // 4:1 multiplexer selecting the page's MPN
    mpn_sel   = mpn[rfp_num];
    to_pool   = in_region && (32'(mpn_sel) < POOL_PAGES);
    // page number replaced by the MPN, offset kept; the MPN bits above
    // the pool page number only take part in the range test above
    pool_addr = {mpn_sel[PPN_W-1:0], offset};
    // base-file frame of the mapped region, or the page's own place
    frame     = 32'(mpn_sel) - POOL_PAGES;
    base_page = (frame < MAPPED_RFPS) ? SEL_W'(frame) : rfp_num;
    base_addr = in_region ? ADDR_W'({base_page, offset}) : addr;
  end

endmodule
