// pfsdic_cpu_side -- processor-side additions of the drowsy I-cache scheme.
//
// Holds the predictive PC that drives the instruction address bus, the
// Predictive Tracing Address (PTA) FIFO, the "?=" comparator, the BTB with its
// BBSize field, the BBCounter and the BBFIFO.
//
// Verification: each clock the address on top of the PTA FIFO is the address
// whose instruction the I-cache hands to IF now. The instruction in ID has just
// computed the true address of its successor (id_next_pc). If both are valid
// and they differ, the prediction made a wakeup latency ago was wrong:
// dic_reset is raised for one clock. It kills the IF instruction, clears both
// FIFOs and loads id_next_pc into the predictive PC for the next clock.
// A cache restart (restart/restart_pc from the I-cache side, after a miss) does
// the same without killing anything in ID; hold keeps the bus idle meanwhile.
//
// Branch unit: a branch in ID (id_valid & id_is_branch) updates the BTB (every
// branch is entered), closes the basic block measured by the BBCounter and
// BBFIFO, and, if it was predicted correctly and its BBSize is known, hands
// the next-branch address id_next_pc + 4*BBSize to the predictive PC.
//
// Timing: dic_reset is combinational from the ID inputs and the PTA top; all
// state changes at the rising clock edge.
// From the document: the blocks, the comparator, the DIC reset, the BBSize
// arithmetic and the rule "predict sequential" when information is missing.
// This design's own choices: the ID-side port list, the cache restart path,
// and using BBSize only after a correctly predicted branch (BBSize describes
// the predicted direction).
// Lint note: the BBFIFO's top/bottom observation outputs are left open here
// (verilator PINCONNECTEMPTY); they exist so the FIFO can be checked alone.
module pfsdic_cpu_side
  import pfsdic_pkg::*;
#(
  parameter int unsigned LAT         = 2,
  parameter int unsigned BTB_ENTRIES = 256,
  parameter int unsigned BBSIZE_W    = 9,
  parameter addr_t       RESET_PC    = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  // ID stage of the pipeline
  input  logic  id_valid,
  input  addr_t id_pc,
  input  addr_t id_next_pc,
  input  logic  id_is_branch,
  input  logic  id_taken,
  input  addr_t id_target,
  // instruction address bus
  output logic  bus_valid,
  output addr_t bus_addr,
  // verification
  output logic  dic_reset,
  output logic  pta_top_valid,
  output addr_t pta_top_addr,
  // I-cache side restart
  input  logic  restart,
  input  addr_t restart_pc,
  input  logic  hold,
  // events
  output logic  ev_lookup,
  output logic  ev_pred_taken,
  output logic  ev_bb_update,
  output logic  ev_bb_freeze,
  output logic  ev_bbsize_write
);

  localparam int unsigned IDX_W = $clog2(BTB_ENTRIES);

  logic                lk_hit, lk_taken;
  logic [IDX_W-1:0]    lk_index;
  addr_t               lk_addr, lk_target;

  logic                rs_valid, rs_hit, rs_old_pred, rs_new_pred, rs_bbs_valid;
  logic [IDX_W-1:0]    rs_index;
  logic [BBSIZE_W-1:0] rs_bbsize;

  logic                bw_valid;
  logic [IDX_W-1:0]    bw_index;
  logic [BBSIZE_W-1:0] bw_bbsize;

  logic                push_valid, push_pred;
  logic [IDX_W-1:0]    push_index;
  logic [BBSIZE_W-1:0] bb_count;
  bb_flag_e            vf_flag;

  logic                calc_valid;
  addr_t               calc_addr;
  logic                redirect;
  addr_t               redirect_pc;

  // "?=" comparator
  assign dic_reset   = pta_top_valid && id_valid && (pta_top_addr != id_next_pc);
  assign redirect    = dic_reset || restart;
  assign redirect_pc = dic_reset ? id_next_pc : restart_pc;

  // branch unit
  assign rs_valid   = id_valid && id_is_branch;
  assign calc_valid = rs_valid && rs_hit && rs_bbs_valid && (id_taken == rs_old_pred);
  assign calc_addr  = id_next_pc + {{(ADDR_W-BBSIZE_W-2){1'b0}}, rs_bbsize, 2'b00};

  assign ev_bb_update    = rs_valid && (vf_flag == BB_UPDATE);
  assign ev_bb_freeze    = rs_valid && (vf_flag == BB_FREEZE);
  assign ev_bbsize_write = bw_valid;

  btb_bbsize #(.BTB_ENTRIES(BTB_ENTRIES), .BBSIZE_W(BBSIZE_W)) u_btb (
    .clk, .rst_n,
    .lk_addr, .lk_hit, .lk_index, .lk_target, .lk_taken,
    .rs_valid, .rs_pc(id_pc), .rs_taken(id_taken), .rs_target(id_target),
    .rs_index, .rs_hit, .rs_old_pred, .rs_new_pred, .rs_bbs_valid, .rs_bbsize,
    .bw_valid, .bw_index, .bw_bbsize
  );

  bb_counter #(.BBSIZE_W(BBSIZE_W)) u_bbc (
    .clk, .rst_n, .dec_valid(id_valid), .dec_is_branch(id_is_branch), .count(bb_count)
  );

  bb_fifo #(.IDX_W(IDX_W), .BBSIZE_W(BBSIZE_W)) u_bbf (
    .clk, .rst_n,
    .push_valid, .push_index, .push_pred, .clr_bottom(redirect),
    .vf_valid(rs_valid), .vf_index(rs_index), .vf_old_pred(rs_old_pred),
    .vf_new_pred(rs_new_pred), .vf_bbs_valid(rs_bbs_valid), .bb_count,
    .bw_valid, .bw_index, .bw_bbsize, .vf_flag,
    .top_valid(), .top_index(), .top_flag(), .bot_valid(), .bot_index(), .bot_pred()
  );

  pred_pc_gen #(.IDX_W(IDX_W), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .redirect, .redirect_pc, .hold,
    .calc_valid, .calc_addr,
    .lk_addr, .lk_hit, .lk_index, .lk_target, .lk_taken,
    .push_valid, .push_index, .push_pred,
    .bus_valid, .bus_addr, .ev_lookup, .ev_pred_taken
  );

  pta_fifo #(.LAT(LAT)) u_pta (
    .clk, .rst_n, .flush(redirect), .push_valid(bus_valid), .push_addr(bus_addr),
    .top_valid(pta_top_valid), .top_addr(pta_top_addr)
  );

endmodule
