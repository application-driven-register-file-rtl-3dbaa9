// rfmap_pkg -- constants and types shared by the mapped register file and
// the preemption deferral unit.
//
// The register address space is cut into Register File Pages (RFPs) of
// PAGE_SIZE registers. The first MAPPED_RFPS pages form the "mapped region":
// each of them can be redirected, through a Mapped Page Number (MPN), to one
// page of a separate pool of spare register pages. Switching tasks then only
// means rewriting the MPNs (MAPPED_RFPS x MPN_W = 16 bits), not saving the
// registers to memory.
//
// From the original scheme: 128-entry base register file, 8-register pages,
// four mappable pages, 4-bit MPNs, a pool of 8 spare pages (50 % of the base
// file), 32-bit registers. Own choices: port counts of the register file
// (two reads and one write per issue slot of a 4-issue cluster), 32-bit PC,
// eight minimal-block table entries, and the MPN encoding: a value below
// POOL_PAGES selects a pool page, POOL_PAGES..POOL_PAGES+3 select one of the
// four mappable pages of the base file as a frame, larger values leave the
// page at its normal place.
package rfmap_pkg;

  // Register file geometry
  parameter int unsigned RFM_RF_ENTRIES  = 128;  // ISA-visible registers
  parameter int unsigned RFM_PAGE_SIZE   = 8;    // registers per RFP
  parameter int unsigned RFM_MAPPED_RFPS = 4;    // first RFPs that can be mapped
  parameter int unsigned RFM_MPN_W       = 4;    // width of one MPN register
  parameter int unsigned RFM_POOL_PAGES  = 8;    // spare register pages in the pool
  parameter int unsigned RFM_DATA_W      = 32;   // register width

  // Ports of the register file (one VLIW cluster, 4 issue slots)
  parameter int unsigned RFM_NUM_RD = 8;
  parameter int unsigned RFM_NUM_WR = 4;

  // Preemption deferral unit
  parameter int unsigned RFM_PC_W   = 32;
  parameter int unsigned RFM_NUM_MB = 8;   // minimal-block table entries


  // One entry of the minimal-block table, written by the OS.
  typedef struct packed {
    logic                   valid;
    logic [RFM_PC_W-1:0]        start_pc;   // first instruction of the MB
    logic [RFM_PC_W-1:0]        end_pc;     // last instruction of the MB
    logic [RFM_PC_W-1:0]        mp_pc;      // minimal point inside the MB
    logic [RFM_MAPPED_RFPS-1:0] live_rfps;  // mapped RFPs that hold live registers
  } mb_entry_t;

  // States of the preemption controller
  typedef enum logic [1:0] {
    PC_IDLE  = 2'd0,   // no preemption pending
    PC_RANGE = 2'd1,   // request taken, first (range) check not yet made
    PC_DEFER = 2'd2,   // outside an MB: waiting for an MB start / MP
    PC_FIRE  = 2'd3    // context switch requested, waiting for acknowledge
  } pctl_state_t;

endpackage
