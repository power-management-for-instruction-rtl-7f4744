// refill_ctrl -- fills a missing line from memory and restarts the fetch flow.
//
// On a miss of the content transmitter (and no wrong prediction in the same
// clock) it raises restart for one clock with restart_pc = the missing
// address: the CPU side and the preactivation FIFO are flushed and the
// predictive PC is reloaded. It then holds the address bus idle (hold) while it
// invalidates the victim way, requests the line (mem_req level, mem_addr =
// line base address) and writes the WORDS words that arrive with mem_rvalid,
// in address order, one per clock. The tag is written valid with the last
// word; hold drops in the next clock and the missing address goes out on the
// bus again. A read of a line that was not awake (drowsy_err) restarts the flow
// the same way without a refill. Victim: way 0 when direct mapped, otherwise a
// round-robin counter.
// The document shows only that memory fills the I-cache; this whole protocol
// is this design's own.
module refill_ctrl
  import pfsdic_pkg::*;
#(
  parameter int unsigned SETS  = 512,
  parameter int unsigned WAYS  = 1,
  parameter int unsigned WORDS = 16,
  localparam int unsigned OFF_W = $clog2(WORDS * 4),
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             miss,
  input  logic             replay,
  input  addr_t            top_addr,
  input  logic             block,
  output logic             restart,
  output addr_t            restart_pc,
  output logic             hold,
  // memory
  output logic             mem_req,
  output addr_t            mem_addr,
  input  logic             mem_rvalid,
  input  word_t            mem_rdata,
  // array write ports
  output logic             wr_en,
  output logic [SET_W-1:0] wr_set,
  output logic [WAY_W-1:0] wr_way,
  output logic [WRD_W-1:0] wr_word,
  output word_t            wr_data,
  output logic             tw_en,
  output logic [SET_W-1:0] tw_set,
  output logic [WAY_W-1:0] tw_way,
  output logic [TAG_W-1:0] tw_tag,
  output logic             tw_valid
);

  typedef enum logic {S_IDLE, S_FILL} state_e;
  state_e           state;
  logic [ADDR_W-OFF_W-1:0] line_q;   // line address
  logic [WAY_W-1:0] way_q, rr_q;
  logic [WRD_W-1:0] cnt_q;
  logic             start;

  always_comb begin
    start      = (state == S_IDLE) && miss && !block;
    restart    = (state == S_IDLE) && (miss || replay) && !block;
    restart_pc = top_addr;
    hold       = (state == S_FILL);
    mem_req    = (state == S_FILL);
    mem_addr   = {line_q, {OFF_W{1'b0}}};
    wr_en      = (state == S_FILL) && mem_rvalid;
    wr_set     = line_q[SET_W-1:0];
    wr_way     = way_q;
    wr_word    = cnt_q;
    wr_data    = mem_rdata;
    if (start) begin
      tw_en    = 1'b1;
      tw_set   = top_addr[OFF_W +: SET_W];
      tw_way   = (WAYS > 1) ? rr_q : '0;
      tw_tag   = top_addr[ADDR_W-1 -: TAG_W];
      tw_valid = 1'b0;
    end else begin
      tw_en    = wr_en && (cnt_q == WRD_W'(WORDS - 1));
      tw_set   = line_q[SET_W-1:0];
      tw_way   = way_q;
      tw_tag   = line_q[ADDR_W-OFF_W-1 -: TAG_W];
      tw_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      line_q <= '0;
      way_q  <= '0;
      rr_q   <= '0;
      cnt_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_FILL;
          line_q <= top_addr[ADDR_W-1:OFF_W];
          way_q  <= (WAYS > 1) ? rr_q : '0;
          cnt_q  <= '0;
        end
        S_FILL: if (mem_rvalid) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == WRD_W'(WORDS - 1)) begin
            state <= S_IDLE;
            if (WAYS > 1) rr_q <= (rr_q == WAY_W'(WAYS - 1)) ? '0 : rr_q + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
