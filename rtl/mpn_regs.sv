// mpn_regs -- the Mapped Page Number registers.
//
// MAPPED_RFPS registers of MPN_W bits (four of four bits, 16 bits in all, by
// default). Together they define the register-file mapping of the running
// task. The OS replaces all of them with one write, which is the whole
// register-file part of a context switch: wr_en for one cycle with the new
// mapping on wr_mpn, and the new mapping is in force from the next cycle on.
// mpn_q is read back by the OS so that it can keep the preempted task's
// mapping in its task control block.
//
// The four 4-bit registers and the single-write update follow the original
// scheme. Own choice: after reset (rst_n low, synchronous to clk) MPN k holds
// POOL_PAGES + k, which names base-file page k, the page's normal place, so
// the processor sees an ordinary register file (see rfp_addr_map for the
// encoding). If that value does not fit in MPN_W bits, the MPNs reset to
// all ones.
module mpn_regs
  import rfmap_pkg::*;
#(
  parameter int unsigned MAPPED_RFPS = rfmap_pkg::RFM_MAPPED_RFPS,
  parameter int unsigned MPN_W       = rfmap_pkg::RFM_MPN_W,
  parameter int unsigned POOL_PAGES  = rfmap_pkg::RFM_POOL_PAGES
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_en,   // OS write of all MPNs
  input  logic [MAPPED_RFPS-1:0][MPN_W-1:0] wr_mpn,
  output logic [MAPPED_RFPS-1:0][MPN_W-1:0] mpn_q    // current mapping
);

  logic [MAPPED_RFPS-1:0][MPN_W-1:0] reset_mpn;

  always_comb begin
    for (int k = 0; k < MAPPED_RFPS; k++)
      reset_mpn[k] = (POOL_PAGES + MAPPED_RFPS <= (1 << MPN_W)) ? MPN_W'(POOL_PAGES + k) : '1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      mpn_q <= reset_mpn;
    else if (wr_en)  mpn_q <= wr_mpn;
  end

endmodule
