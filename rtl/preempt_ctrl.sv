// preempt_ctrl -- the interrupt controller of the preemption deferral unit.
//
// A preemption interrupt is not taken at once. The controller first asks
// the comparator whether the PC already lies inside a minimal block (MB),
// where only few registers are live; if so the switch is requested right
// away. Otherwise the task keeps running and every instruction's PC is
// compared with the MB start addresses (or, in mp_only mode, with the
// minimal-point addresses) until one is reached. The switch request names
// the MB, so that the OS maps away only that MB's live register pages.
//
//   IDLE  --preempt_irq-->  RANGE
//   RANGE (first valid PC): no valid MB entry -> request, full_save = 1
//                           range hit         -> request (delay 0)
//                           otherwise         -> DEFER
//   DEFER (each valid PC):  start / MP hit    -> request
//   request: switch_req high from the hit cycle until switch_ack
//
// Interface and timing: pc / pc_valid carry the instruction about to
// execute; switch_req rises combinationally in the cycle its PC hits, and
// means "take the context switch before this instruction". switch_mb and
// defer_count (instructions executed between the interrupt and the switch)
// are valid while switch_req is high. switch_ack, one cycle, ends the
// request; a preempt_irq that arrives while a request is pending is ignored.
//
// From the original scheme: the immediate switch inside an MB, the deferral
// to an MB start, value-only comparison for MP-only preemption, the MB
// identification given to the OS. Own choices: the request/acknowledge
// handshake, the delay counter, and the fall-back to an ordinary (full save)
// context switch when the task has no valid MB entry, which the source does
// not cover. Reset is synchronous, active low.
module preempt_ctrl
  import rfmap_pkg::*;
#(
  parameter int unsigned NUM_MB = rfmap_pkg::RFM_NUM_MB,
  parameter int unsigned CNT_W  = 16,
  localparam int unsigned IDX_W = (NUM_MB > 1) ? $clog2(NUM_MB) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             preempt_irq,  // timer / external preemption request
  input  logic             pc_valid,     // an instruction issues this cycle
  input  logic             any_valid,    // MB table holds at least one entry
  // comparator
  output logic             cmp_enable,
  output logic             range_chk,
  input  logic             hit,
  input  logic [IDX_W-1:0] hit_idx,
  // to the OS context-switch handler
  output logic             switch_req,
  output logic [IDX_W-1:0] switch_mb,
  output logic             full_save,    // no MB known: save everything
  output logic [CNT_W-1:0] defer_count,
  input  logic             switch_ack,
  output pctl_state_t      state
);

  pctl_state_t      state_d;
  logic [CNT_W-1:0] cnt_q, cnt_d;
  logic [IDX_W-1:0] mb_q, mb_d;
  logic             full_q, full_d;
  logic             fire_now;

  always_comb begin
    state_d    = state;
    cnt_d      = cnt_q;
    mb_d       = mb_q;
    full_d     = full_q;
    fire_now   = 1'b0;
    cmp_enable = 1'b0;
    range_chk  = 1'b0;
    unique case (state)
      PC_IDLE: begin
        if (preempt_irq) begin
          state_d = PC_RANGE;
          cnt_d   = '0;
          full_d  = 1'b0;
        end
      end
      PC_RANGE, PC_DEFER: begin
        cmp_enable = pc_valid;
        range_chk  = (state == PC_RANGE);
        if (pc_valid) begin
          if (!any_valid) begin
            fire_now = 1'b1;
            full_d   = 1'b1;
            mb_d     = '0;
          end else if (hit) begin
            fire_now = 1'b1;
            mb_d     = hit_idx;
          end else begin
            state_d = PC_DEFER;
            if (cnt_q != '1) cnt_d = cnt_q + 1'b1;
          end
          if (fire_now) state_d = switch_ack ? PC_IDLE : PC_FIRE;
        end
      end
      PC_FIRE: begin
        if (switch_ack) state_d = PC_IDLE;
      end
      default: state_d = PC_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= PC_IDLE;
      cnt_q  <= '0;
      mb_q   <= '0;
      full_q <= 1'b0;
    end else begin
      state  <= state_d;
      cnt_q  <= cnt_d;
      mb_q   <= mb_d;
      full_q <= full_d;
    end
  end

  always_comb begin
    switch_req  = fire_now || (state == PC_FIRE);
    switch_mb   = fire_now ? mb_d : mb_q;
    full_save   = fire_now ? full_d : full_q;
    defer_count = cnt_q;
  end

  // The OS acknowledges only a pending request.
  a_ack_only_when_req: assert property (@(posedge clk) disable iff (!rst_n)
    switch_ack |-> switch_req);

endmodule
