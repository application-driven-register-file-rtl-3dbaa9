// mb_info_table -- the minimal-block table of the preemption deferral unit.
//
// Holds NUM_MB entries that describe the minimal blocks (MBs) of the running
// task's hot-spots: start and end address of the block, the address of the
// minimal point (MP) inside it, and which mappable register pages hold live
// registers there. The OS writes one entry per cycle (wr_en, wr_idx,
// wr_entry) when it loads a task or before the task enters a hot-spot;
// clear drops every entry. All entries are read in parallel by the
// comparator. A write is visible from the next cycle.
//
// The original scheme names this storage ("Min Block Info") and what it must
// describe (the start and end addresses of each MB); the entry layout, the
// write port, the clear input and the table size (eight entries, more than
// the five hot-spots of the largest benchmark) are own choices. Reset
// (synchronous, active low) clears every valid bit.
module mb_info_table
  import rfmap_pkg::*;
#(
  parameter int unsigned NUM_MB = rfmap_pkg::RFM_NUM_MB,
  localparam int unsigned IDX_W = (NUM_MB > 1) ? $clog2(NUM_MB) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,     // invalidate every entry
  input  logic                   wr_en,
  input  logic [IDX_W-1:0]       wr_idx,
  input  mb_entry_t              wr_entry,
  output mb_entry_t [NUM_MB-1:0] entries,
  output logic                   any_valid  // at least one entry is valid
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < NUM_MB; i++) entries[i].valid <= 1'b0;
    end else if (wr_en && (32'(wr_idx) < NUM_MB)) begin
      entries[wr_idx] <= wr_entry;
    end
  end

  always_comb begin
    any_valid = 1'b0;
    for (int i = 0; i < NUM_MB; i++) any_valid |= entries[i].valid;
  end

endmodule
