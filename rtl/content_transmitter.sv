// content_transmitter -- sends the content addressed by the top PCL element.
//
// Head of a line (or no recorded way): the tags of every way of the set are
// compared with the address tag; the hitting way's word is sent and its number
// is recorded in the Way# register. Medium or trail word: the recorded Way# and
// the index address the word directly, without a tag compare, so only one line
// of the set has to stay awake.
// Outcomes when xmit_en is high and the top element is valid:
//   data_valid  the word is on the data bus (data, data_addr);
//   miss        head tag compare found no valid matching way;
//   drowsy_err  a line that had to be read was not ready (word-line gated).
// A head hits as soon as a ready way matches: a line sits in one way only, so
// a way still waking up cannot hold it too. Only without such a hit does a
// way that is not ready make the result unknown (drowsy_err, replay).
// hit_way is the way used this clock (compare result or Way#); the power
// manager's "off others" function spares that way.
// Timing: outputs are combinational; Way# is written at the clock edge.
// From the document: the two behaviours by word location and the Valid/Way#
// register. The miss and drowsy_err outputs and the fallback to a tag compare
// when Way# is not valid are this design's own.
module content_transmitter
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
  input  pcl_entry_t       top,
  input  logic             xmit_en,
  // array read port
  output logic [SET_W-1:0] rd_set,
  output logic [WRD_W-1:0] rd_word,
  input  logic [WAYS-1:0]  rd_ok,
  input  logic [WAYS-1:0]  rd_tvalid,
  input  logic [TAG_W-1:0] rd_tag  [WAYS],
  input  word_t            rd_data [WAYS],
  // data bus
  output logic             data_valid,
  output word_t            data,
  output addr_t            data_addr,
  // status
  output logic [WAY_W-1:0] hit_way,
  output logic             miss,
  output logic             drowsy_err,
  output logic             ev_tag_compare,
  output logic             ev_way_reuse
);

  logic             wayreg_valid;
  logic [WAY_W-1:0] wayreg;
  logic             act, head_mode, any_hit, all_ok;
  logic [TAG_W-1:0] tag;

  always_comb begin
    rd_set    = top.addr[OFF_W +: SET_W];
    rd_word   = top.addr[2 +: WRD_W];
    tag       = top.addr[ADDR_W-1 -: TAG_W];
    act       = xmit_en && top.valid;
    head_mode = is_head(top.wl) || !wayreg_valid;
    any_hit   = 1'b0;
    hit_way   = wayreg;
    all_ok    = &rd_ok;
    if (head_mode) begin
      hit_way = '0;
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (rd_tvalid[w] && rd_tag[w] == tag) begin
          any_hit = 1'b1;
          hit_way = WAY_W'(w);
        end
      end
    end
    data_addr      = top.addr;
    data           = rd_data[hit_way];
    data_valid     = 1'b0;
    miss           = 1'b0;
    drowsy_err     = 1'b0;
    ev_tag_compare = act && head_mode;
    ev_way_reuse   = act && !head_mode;
    if (act) begin
      if (head_mode) begin
        if (any_hit)      data_valid = 1'b1;
        else if (!all_ok) drowsy_err = 1'b1;
        else              miss       = 1'b1;
      end else begin
        if (rd_ok[hit_way]) data_valid = 1'b1;
        else                drowsy_err = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wayreg_valid <= 1'b0;
      wayreg       <= '0;
    end else if (act && head_mode) begin
      wayreg_valid <= data_valid;
      wayreg       <= hit_way;
    end
  end

endmodule
