// line_power_ctrl -- supply control of one cache line (one way of one set).
//
// The line is selected by a command when its set matches and, for the
// "others" function operation, its way differs from the recorded way number;
// the "all" operation selects every way of the set. A selected ON command
// switches the line to the active supply, an OFF command to the drowsy supply.
// ON wins over OFF in the same clock, all_off (a flush of the preactivation
// FIFO) wins over both. After switching on, the line needs WAKEUP clocks before
// it can be read: `ready` rises WAKEUP clocks after the clock of the ON command.
// `active` is the drowsy bit inverted: it drives the active/drowsy voltage
// multiplexer, which is analog and not part of this model. Lines start drowsy.
// From the document: the per-line selection by index, way number and function
// operation, the power-mode gate and the two supply voltages. This design's own
// choices: the priorities, the wakeup counter and the reset state.
module line_power_ctrl
  import pfsdic_pkg::*;
#(
  parameter int unsigned SET_W  = 9,
  parameter int unsigned WAY_W  = 1,
  parameter int unsigned MY_SET = 0,
  parameter int unsigned MY_WAY = 0,
  parameter int unsigned WAKEUP = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             all_off,
  input  logic             on_en,
  input  logic [SET_W-1:0] on_set,
  input  logic             off_en,
  input  fun_op_e          off_fop,
  input  logic [SET_W-1:0] off_set,
  input  logic [WAY_W-1:0] off_way,
  output logic             active,
  output logic             ready
);

  localparam int unsigned CNT_W = (WAKEUP > 1) ? $clog2(WAKEUP) : 1;
  localparam logic [CNT_W-1:0] WAKE_LEFT = CNT_W'(WAKEUP - 1);

  logic             on_sel, off_sel;
  logic [CNT_W-1:0] wcnt;

  always_comb begin
    on_sel  = on_en && (on_set == SET_W'(MY_SET));
    unique case (off_fop)
      FOP_ALL:    off_sel = off_en && (off_set == SET_W'(MY_SET));
      FOP_OTHERS: off_sel = off_en && (off_set == SET_W'(MY_SET)) && (off_way != WAY_W'(MY_WAY));
      default:    off_sel = 1'b0;
    endcase
    ready = active && (wcnt == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      wcnt   <= '0;
    end else if (all_off) begin
      active <= 1'b0;
    end else if (on_sel) begin
      if (!active) begin
        active <= 1'b1;
        wcnt   <= WAKE_LEFT;
      end else if (wcnt != '0) begin
        wcnt   <= wcnt - 1'b1;
      end
    end else if (off_sel) begin
      active <= 1'b0;
    end else if (active && wcnt != '0) begin
      wcnt   <= wcnt - 1'b1;
    end
  end

endmodule
