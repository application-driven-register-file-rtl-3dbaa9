// mb_compare -- the PC comparator (CMP) of the preemption deferral unit.
//
// For every valid minimal-block entry there is one range comparator and one
// value comparator, as in the original scheme:
//   range_chk = 1 : hit if start_pc <= pc <= end_pc (PC already inside an MB;
//                   used once, for the first check after the interrupt)
//   range_chk = 0 : hit if pc == start_pc (PC has reached the start of an MB)
//   mp_only   = 1 : hit only if pc == mp_pc (preemption allowed at the
//                   minimal point only; a value comparison in every case)
// The comparator works only while enable is high (the controller's Enable);
// otherwise hit is low. When several entries match, the lowest index is
// reported. Purely combinational. The PC width is the package's RFM_PC_W,
// the width of the table entries.
module mb_compare
  import rfmap_pkg::*;
#(
  parameter int unsigned NUM_MB = rfmap_pkg::RFM_NUM_MB,
  localparam int unsigned IDX_W = (NUM_MB > 1) ? $clog2(NUM_MB) : 1
) (
  input  logic                   enable,
  input  logic                   range_chk,
  input  logic                   mp_only,
  input  logic [RFM_PC_W-1:0]        pc,
  input  mb_entry_t [NUM_MB-1:0] entries,
  output logic                   hit,
  output logic [IDX_W-1:0]       hit_idx
);

  logic [NUM_MB-1:0] match;

  always_comb begin
    for (int i = 0; i < NUM_MB; i++) begin
      if (mp_only)
        match[i] = (pc == entries[i].mp_pc);
      else if (range_chk)
        match[i] = (pc >= entries[i].start_pc) && (pc <= entries[i].end_pc);
      else
        match[i] = (pc == entries[i].start_pc);
      match[i] = match[i] && entries[i].valid && enable;
    end

    hit     = |match;
    hit_idx = '0;
    for (int i = NUM_MB - 1; i >= 0; i--)
      if (match[i]) hit_idx = IDX_W'(i);
  end

endmodule
