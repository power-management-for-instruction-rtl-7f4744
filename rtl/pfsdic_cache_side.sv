// pfsdic_cache_side -- I-cache side of the program-flow-sensitive drowsy cache.
//
// Every clock the CPU side puts one predicted instruction address on the bus.
// The address enters the bottom of the Preactivating Cache-Line (PCL) FIFO,
// where the lines sensor marks it as the head of a line or a medium word (and
// turns the previous element into a trail when the line changes). A head at the
// bottom wakes every way of its set. LAT = WAKEUP + 1 clocks later the element
// is at the top: the content transmitter reads the word (tag compare at a head,
// recorded Way# otherwise) and drives the data bus, and the power manager puts
// the other ways of the set (head) or the whole set (trail) back to drowsy.
// So at most the ways of the sets between bottom and top are awake.
// A wrong prediction (dic_reset from the CPU side) or a restart by the refill
// controller flushes the FIFO and puts every line to drowsy. A miss starts a
// line refill from memory (mem_* ports) and holds the bus idle until it ends.
//
// Parameters: CACHE_BYTES, WAYS and WORDS give the organisation (32 KB, direct
// mapped, 16 words per line in the basic configuration), WAKEUP the wakeup time
// in clocks (1). The circuit delay is one clock.
// Timing: data_valid/data/data_addr, miss and restart are combinational from
// the FIFO top and the line state; everything else is registered.
// The organisation of the blocks follows the document; refill and restart are
// this design's own.
// Lint note: the lines sensor's same_line output is left open here (verilator
// PINCONNECTEMPTY); it is an observation output for checking that block.
module pfsdic_cache_side
  import pfsdic_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 1,
  parameter int unsigned WORDS       = 16,
  parameter int unsigned WAKEUP      = 1,
  localparam int unsigned LAT   = WAKEUP + 1,
  localparam int unsigned SETS  = CACHE_BYTES / (WAYS * WORDS * 4),
  localparam int unsigned OFF_W = $clog2(WORDS * 4),
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W = $clog2(WORDS),
  localparam int unsigned NLINE = SETS * WAYS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // instruction address bus and DIC reset from the CPU side
  input  logic                       bus_valid,
  input  addr_t                      bus_addr,
  input  logic                       dic_reset,
  // data bus
  output logic                       data_valid,
  output word_t                      data,
  output addr_t                      data_addr,
  // restart towards the CPU side
  output logic                       restart,
  output addr_t                      restart_pc,
  output logic                       hold,
  // memory
  output logic                       mem_req,
  output addr_t                      mem_addr,
  input  logic                       mem_rvalid,
  input  word_t                      mem_rdata,
  // status
  output logic [NLINE-1:0]           line_active,
  output logic [$clog2(NLINE+1)-1:0] active_count,
  output logic                       ev_idle,
  output logic                       ev_on,
  output logic                       ev_off_others,
  output logic                       ev_off_all,
  output logic                       ev_off_suppressed,
  output logic                       ev_tag_compare,
  output logic                       ev_way_reuse,
  output logic                       ev_miss,
  output logic                       ev_drowsy_err
);

  logic       flush;
  pcl_entry_t elem [0:LAT];
  pcl_entry_t e1, top;
  word_loc_e  bottom_wl, e1_wl_next;

  logic       xmit_en, on_en, off_en;
  logic [NLINE-1:0] line_ready;
  logic [WAY_W-1:0] hit_way;
  logic       miss, drowsy_err;

  logic [SET_W-1:0] rd_set;
  logic [WRD_W-1:0] rd_word;
  logic [WAYS-1:0]  rd_ok, rd_tvalid;
  logic [TAG_W-1:0] rd_tag  [WAYS];
  word_t            rd_data [WAYS];

  logic             wr_en, tw_en, tw_valid;
  logic [SET_W-1:0] wr_set, tw_set;
  logic [WAY_W-1:0] wr_way, tw_way;
  logic [WRD_W-1:0] wr_word;
  word_t            wr_data;
  logic [TAG_W-1:0] tw_tag;

  assign flush = dic_reset || restart;

  lines_sensor #(.OFF_W(OFF_W)) u_sensor (
    .new_valid(bus_valid), .new_addr(bus_addr), .prev(e1),
    .new_wl(bottom_wl), .prev_wl_next(e1_wl_next), .same_line()
  );

  pcl_fifo #(.LAT(LAT)) u_pcl (
    .clk, .rst_n, .flush, .bus_valid, .bus_addr, .bottom_wl, .e1_wl_next, .elem, .e1, .top
  );

  stage_master #(.LAT(LAT), .OFF_W(OFF_W), .SET_W(SET_W)) u_stage (
    .elem, .dic_reset, .flush, .xmit_en, .on_en, .off_en, .idle(ev_idle),
    .ev_off_suppressed
  );

  power_manager #(.SETS(SETS), .WAYS(WAYS), .OFF_W(OFF_W), .WAKEUP(WAKEUP)) u_pm (
    .clk, .rst_n, .bottom(elem[0]), .top, .top_way(hit_way),
    .on_en, .off_en, .all_off(flush),
    .line_active, .line_ready, .active_count, .ev_on, .ev_off_others, .ev_off_all
  );

  content_transmitter #(.SETS(SETS), .WAYS(WAYS), .WORDS(WORDS)) u_xmit (
    .clk, .rst_n, .top, .xmit_en,
    .rd_set, .rd_word, .rd_ok, .rd_tvalid, .rd_tag, .rd_data,
    .data_valid, .data, .data_addr, .hit_way, .miss, .drowsy_err,
    .ev_tag_compare, .ev_way_reuse
  );

  icache_array #(.SETS(SETS), .WAYS(WAYS), .WORDS(WORDS), .TAG_W(TAG_W)) u_array (
    .clk, .rst_n,
    .rd_set, .rd_word, .rd_ready(line_ready[int'(rd_set)*WAYS +: WAYS]),
    .rd_ok, .rd_tvalid, .rd_tag, .rd_data,
    .wr_en, .wr_set, .wr_way, .wr_word, .wr_data,
    .tw_en, .tw_set, .tw_way, .tw_tag, .tw_valid
  );

  refill_ctrl #(.SETS(SETS), .WAYS(WAYS), .WORDS(WORDS)) u_refill (
    .clk, .rst_n, .miss, .replay(drowsy_err), .top_addr(top.addr), .block(dic_reset),
    .restart, .restart_pc, .hold,
    .mem_req, .mem_addr, .mem_rvalid, .mem_rdata,
    .wr_en, .wr_set, .wr_way, .wr_word, .wr_data,
    .tw_en, .tw_set, .tw_way, .tw_tag, .tw_valid
  );

  assign ev_miss       = miss && !dic_reset;
  assign ev_drowsy_err = drowsy_err && !dic_reset;

endmodule
