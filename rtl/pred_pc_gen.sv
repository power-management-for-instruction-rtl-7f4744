// pred_pc_gen -- predictive PC that drives the instruction address bus.
//
// Every clock it places one predicted instruction address on the bus, a fixed
// wakeup latency ahead of the fetch that will use it. Between branches it
// counts up by one word. It knows where the next branch is from BBSize: when
// the branch unit verifies a branch whose prediction was right and whose BBSize
// is not null, it supplies calc_addr = successor + 4*BBSize. One clock later
// this generator looks that single address up in the BTB (one lookup per basic
// block instead of one per instruction), pushes {BTBIndex, prediction} to the
// BBFIFO bottom, and keeps the result. When the bus address reaches the
// predicted branch address and the BTB predicts taken, the next bus address is
// the BTB target; otherwise execution is predicted sequential (no BBSize, no BTB
// entry, or a not-taken prediction).
//
// redirect loads redirect_pc into the bus address for the next clock (wrong
// prediction or cache restart) and forgets the kept lookup result; a lookup
// requested in the same clock is still made. hold keeps the bus idle and the
// address frozen (cache refill in progress).
//
// From the document: one bus address per clock, next branch = target/fall
// through + BBSize, a single lookup per block, sequential prediction when any
// piece is missing. This design's own choices: the lookup is made in the clock
// after verification and its result is usable in that same clock, the lookup
// result stays until replaced, and RESET_PC is where the bus starts.
module pred_pc_gen
  import pfsdic_pkg::*;
#(
  parameter int unsigned IDX_W    = 8,
  parameter addr_t       RESET_PC = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             redirect,
  input  addr_t            redirect_pc,
  input  logic             hold,
  // next-branch address from the branch unit
  input  logic             calc_valid,
  input  addr_t            calc_addr,
  // BTB lookup port
  output addr_t            lk_addr,
  input  logic             lk_hit,
  input  logic [IDX_W-1:0] lk_index,
  input  addr_t            lk_target,
  input  logic             lk_taken,
  // BBFIFO bottom push
  output logic             push_valid,
  output logic [IDX_W-1:0] push_index,
  output logic             push_pred,
  // instruction address bus
  output logic             bus_valid,
  output addr_t            bus_addr,
  // events
  output logic             ev_lookup,
  output logic             ev_pred_taken
);

  addr_t pc_q;
  logic  lk_pend_q;
  addr_t lk_addr_q;
  logic  nb_valid_q, nb_hit_q, nb_taken_q;
  addr_t nb_addr_q, nb_target_q;

  logic  eff_valid, eff_hit, eff_taken, at_branch;
  addr_t eff_addr, eff_target, pc_next;

  always_comb begin
    lk_addr    = lk_addr_q;
    eff_valid  = lk_pend_q || nb_valid_q;
    eff_addr   = lk_pend_q ? lk_addr_q : nb_addr_q;
    eff_hit    = lk_pend_q ? lk_hit    : nb_hit_q;
    eff_taken  = lk_pend_q ? lk_taken  : nb_taken_q;
    eff_target = lk_pend_q ? lk_target : nb_target_q;
    at_branch  = eff_valid && eff_hit && (pc_q == eff_addr) && !hold;
    pc_next    = (at_branch && eff_taken) ? eff_target : pc_q + 32'd4;

    bus_valid     = !hold;
    bus_addr      = pc_q;
    push_valid    = lk_pend_q && lk_hit;
    push_index    = lk_index;
    push_pred     = lk_taken;
    ev_lookup     = lk_pend_q;
    ev_pred_taken = at_branch && eff_taken;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= RESET_PC;
      lk_pend_q   <= 1'b0;
      lk_addr_q   <= '0;
      nb_valid_q  <= 1'b0;
      nb_hit_q    <= 1'b0;
      nb_taken_q  <= 1'b0;
      nb_addr_q   <= '0;
      nb_target_q <= '0;
    end else begin
      lk_pend_q <= calc_valid;
      if (calc_valid) lk_addr_q <= calc_addr;

      if (lk_pend_q) begin
        nb_valid_q  <= 1'b1;
        nb_addr_q   <= lk_addr_q;
        nb_hit_q    <= lk_hit;
        nb_taken_q  <= lk_taken;
        nb_target_q <= lk_target;
      end else if (redirect) begin
        nb_valid_q  <= 1'b0;
      end

      if (redirect)   pc_q <= redirect_pc;
      else if (!hold) pc_q <= pc_next;
    end
  end

endmodule
