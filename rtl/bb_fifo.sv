// bb_fifo -- the two-element BBFIFO that gathers basic-block sizes.
//
// Element layout is {BTBIndex, Prediction}.
//  * bottom: written when the predictive PC generator looks up the next branch
//    (push_*). Its Prediction field is the BTB prediction before verification.
//  * top:    the last verified branch. After verification its Prediction field
//    holds the Update/Freeze flag: Update when the predictor changed its
//    prediction or the entry's BBSize is null, Freeze otherwise.
// When a branch is verified in ID (vf_valid):
//  1. if the top element is valid and flagged Update, BBSize[top.index] is
//     written with the BBCounter value, which at that moment is the number of
//     instructions decoded between the two branches (bw_* port, same clock);
//  2. the verified branch becomes the top element with its new flag (pop);
//  3. the bottom element is cleared.
// The prediction before verification is taken from the bottom element when it
// belongs to the verified BTB index, otherwise from the BTB itself (vf_old_pred).
// clr_bottom (a wrong prediction) clears only the bottom: the top element was
// verified on the correct path.
// From the document: the two elements, their fields, the Update/Freeze table
// and the verify/pop/clear/update order. This design's own choices: a push in
// the same clock as a verification is dropped (the looked-up branch is the one
// being verified), and reset empties both elements.
module bb_fifo
  import pfsdic_pkg::*;
#(
  parameter int unsigned IDX_W    = 8,
  parameter int unsigned BBSIZE_W = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  // bottom push from the BTB lookup of the next branch
  input  logic                push_valid,
  input  logic [IDX_W-1:0]    push_index,
  input  logic                push_pred,
  input  logic                clr_bottom,
  // verification of a branch in ID
  input  logic                vf_valid,
  input  logic [IDX_W-1:0]    vf_index,
  input  logic                vf_old_pred,
  input  logic                vf_new_pred,
  input  logic                vf_bbs_valid,
  input  logic [BBSIZE_W-1:0] bb_count,
  // BBSize write
  output logic                bw_valid,
  output logic [IDX_W-1:0]    bw_index,
  output logic [BBSIZE_W-1:0] bw_bbsize,
  // observation
  output bb_flag_e            vf_flag,
  output logic                top_valid,
  output logic [IDX_W-1:0]    top_index,
  output bb_flag_e            top_flag,
  output logic                bot_valid,
  output logic [IDX_W-1:0]    bot_index,
  output logic                bot_pred
);

  logic pred_before;

  always_comb begin
    pred_before = (bot_valid && bot_index == vf_index) ? bot_pred : vf_old_pred;
    vf_flag     = ((pred_before != vf_new_pred) || !vf_bbs_valid) ? BB_UPDATE : BB_FREEZE;
    bw_valid    = vf_valid && top_valid && (top_flag == BB_UPDATE);
    bw_index    = top_index;
    bw_bbsize   = bb_count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_valid <= 1'b0;
      top_index <= '0;
      top_flag  <= BB_FREEZE;
      bot_valid <= 1'b0;
      bot_index <= '0;
      bot_pred  <= 1'b0;
    end else if (vf_valid) begin
      top_valid <= 1'b1;
      top_index <= vf_index;
      top_flag  <= vf_flag;
      bot_valid <= 1'b0;
    end else if (clr_bottom) begin
      bot_valid <= 1'b0;
    end else if (push_valid) begin
      bot_valid <= 1'b1;
      bot_index <= push_index;
      bot_pred  <= push_pred;
    end
  end

endmodule
