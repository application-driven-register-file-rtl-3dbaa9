// rfmap_top -- register file with page mapping and preemption deferral.
//
// The hardware side of a context switch that saves no registers. The
// compiler packs the registers that are live at chosen low-pressure points
// of each hot-spot (minimal points, MPs, and their basic blocks, MBs) into
// the lowest register pages. At a switch the OS only rewrites the four MPN
// registers, which moves the preempted task's live pages out of the visible
// address space (they stay in the pool) and brings in the pool pages of the
// next task.
//
//   mpn_regs       -- the four MPNs (16 bits), one OS write per switch
//   mapped_regfile -- base register file + pool of spare pages, one address
//                     mapper per port
//   mb_info_table  -- OS-loaded description of the minimal blocks
//   mb_compare     -- range / value comparators on the PC
//   preempt_ctrl   -- defers a preemption interrupt to an MB or MP
//
// When preempt_ctrl requests the switch it also hands out, from the table
// entry of the MB that was hit, the mask of mappable pages that hold live
// registers there (switch_live_rfps), so the OS knows which pages to keep.
//
// The split into mapping hardware and deferral hardware, and the OS doing
// the remapping, follow the original scheme; the live-page mask output and
// the handshake are own choices.
//
// Ports are those of the processor core (register ports, PC), of the OS
// (MPN write, table write, switch handshake) and of the interrupt source.
// Register accesses see a new mapping from the cycle after mpn_wr_en. The
// MB table entry layout and PC width come from rfmap_pkg. All resets are
// synchronous and active low.
module rfmap_top
  import rfmap_pkg::*;
#(
  parameter int unsigned RF_ENTRIES = rfmap_pkg::RFM_RF_ENTRIES,
  parameter int unsigned PAGE_SIZE  = rfmap_pkg::RFM_PAGE_SIZE,
  parameter int unsigned POOL_PAGES = rfmap_pkg::RFM_POOL_PAGES,
  parameter int unsigned DATA_W     = rfmap_pkg::RFM_DATA_W,
  parameter int unsigned NUM_RD     = rfmap_pkg::RFM_NUM_RD,
  parameter int unsigned NUM_WR     = rfmap_pkg::RFM_NUM_WR,
  parameter int unsigned NUM_MB     = rfmap_pkg::RFM_NUM_MB,
  parameter int unsigned CNT_W      = 16,
  localparam int unsigned ADDR_W    = $clog2(RF_ENTRIES),
  localparam int unsigned IDX_W     = (NUM_MB > 1) ? $clog2(NUM_MB) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // register ports of the core
  input  logic [NUM_RD-1:0][ADDR_W-1:0]     rd_addr,
  output logic [NUM_RD-1:0][DATA_W-1:0]     rd_data,
  input  logic [NUM_WR-1:0]                 wr_en,
  input  logic [NUM_WR-1:0][ADDR_W-1:0]     wr_addr,
  input  logic [NUM_WR-1:0][DATA_W-1:0]     wr_data,
  // MPN registers (OS)
  input  logic                              mpn_wr_en,
  input  logic [RFM_MAPPED_RFPS-1:0][RFM_MPN_W-1:0] mpn_wr_data,
  output logic [RFM_MAPPED_RFPS-1:0][RFM_MPN_W-1:0] mpn_q,
  // minimal-block table (OS)
  input  logic                              mbt_clear,
  input  logic                              mbt_wr_en,
  input  logic [IDX_W-1:0]                  mbt_wr_idx,
  input  mb_entry_t                         mbt_wr_entry,
  input  logic                              mp_only,   // preempt at MPs only
  // program counter of the core
  input  logic [RFM_PC_W-1:0]                   pc,
  input  logic                              pc_valid,
  // preemption interrupt and switch handshake
  input  logic                              preempt_irq,
  output logic                              switch_req,
  output logic [IDX_W-1:0]                  switch_mb,
  output logic [RFM_MAPPED_RFPS-1:0]            switch_live_rfps,
  output logic                              full_save,
  output logic [CNT_W-1:0]                  defer_count,
  input  logic                              switch_ack,
  output pctl_state_t                       preempt_state  // for observation
);

  mb_entry_t [NUM_MB-1:0] entries;
  logic                   any_valid;
  logic                   cmp_enable, range_chk, hit;
  logic [IDX_W-1:0]       hit_idx;

  mpn_regs #(.POOL_PAGES(POOL_PAGES)) u_mpn (
    .clk, .rst_n,
    .wr_en(mpn_wr_en), .wr_mpn(mpn_wr_data), .mpn_q(mpn_q)
  );

  mapped_regfile #(
    .RF_ENTRIES(RF_ENTRIES), .PAGE_SIZE(PAGE_SIZE), .MAPPED_RFPS(RFM_MAPPED_RFPS),
    .MPN_W(RFM_MPN_W), .POOL_PAGES(POOL_PAGES), .DATA_W(DATA_W),
    .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)
  ) u_rf (
    .clk, .mpn(mpn_q),
    .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

  mb_info_table #(.NUM_MB(NUM_MB)) u_mbt (
    .clk, .rst_n, .clear(mbt_clear),
    .wr_en(mbt_wr_en), .wr_idx(mbt_wr_idx), .wr_entry(mbt_wr_entry),
    .entries, .any_valid
  );

  mb_compare #(.NUM_MB(NUM_MB)) u_cmp (
    .enable(cmp_enable), .range_chk, .mp_only, .pc, .entries,
    .hit, .hit_idx
  );

  preempt_ctrl #(.NUM_MB(NUM_MB), .CNT_W(CNT_W)) u_ctl (
    .clk, .rst_n, .preempt_irq, .pc_valid, .any_valid,
    .cmp_enable, .range_chk, .hit, .hit_idx,
    .switch_req, .switch_mb, .full_save, .defer_count, .switch_ack,
    .state(preempt_state)
  );

  // live pages of the MB named by the request (none for a full save)
  assign switch_live_rfps = full_save ? '0 : entries[switch_mb].live_rfps;

endmodule
