// icache_array -- tag and content storage of the instruction cache.
//
// SETS x WAYS lines of WORDS 32-bit words, each with a tag and a valid bit.
// The read port returns, for one set and word offset, the tag, valid bit and
// word of every way at once (combinational). Word-line gating: a way whose line
// is not ready (drowsy, or still waking up) returns rd_ok = 0, a cleared valid
// bit and a zero word, because its cells must not be accessed at the drowsy
// supply. The write port takes one word per clock from the refill path; the
// tag port writes a tag and its valid bit. Writes ignore the supply state: the
// refill is assumed to power the line it writes.
// From the document: the cache organisation parameters (32 KB, 16 words per
// line, direct mapped in the basic configuration) and the gating of drowsy
// lines. The port structure is this design's own.
module icache_array
  import pfsdic_pkg::*;
#(
  parameter int unsigned SETS  = 512,
  parameter int unsigned WAYS  = 1,
  parameter int unsigned WORDS = 16,
  parameter int unsigned TAG_W = 17,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned WRD_W = $clog2(WORDS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // read
  input  logic [SET_W-1:0]       rd_set,
  input  logic [WRD_W-1:0]       rd_word,
  input  logic [WAYS-1:0]        rd_ready,
  output logic [WAYS-1:0]        rd_ok,
  output logic [WAYS-1:0]        rd_tvalid,
  output logic [TAG_W-1:0]       rd_tag  [WAYS],
  output word_t                  rd_data [WAYS],
  // content write
  input  logic                   wr_en,
  input  logic [SET_W-1:0]       wr_set,
  input  logic [WAY_W-1:0]       wr_way,
  input  logic [WRD_W-1:0]       wr_word,
  input  word_t                  wr_data,
  // tag write
  input  logic                   tw_en,
  input  logic [SET_W-1:0]       tw_set,
  input  logic [WAY_W-1:0]       tw_way,
  input  logic [TAG_W-1:0]       tw_tag,
  input  logic                   tw_valid
);

  word_t            data_mem [SETS*WAYS*WORDS];
  logic [TAG_W-1:0] tag_mem  [SETS*WAYS];
  logic             val_mem  [SETS*WAYS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      rd_ok[w]     = rd_ready[w];
      rd_tvalid[w] = rd_ready[w] && val_mem[int'(rd_set)*WAYS + w];
      rd_tag[w]    = tag_mem[int'(rd_set)*WAYS + w];
      rd_data[w]   = rd_ready[w] ? data_mem[(int'(rd_set)*WAYS + w)*WORDS + int'(rd_word)] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) data_mem[(int'(wr_set)*WAYS + int'(wr_way))*WORDS + int'(wr_word)] <= wr_data;
    if (tw_en) tag_mem[int'(tw_set)*WAYS + int'(tw_way)] <= tw_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS*WAYS; i++) val_mem[i] <= 1'b0;
    end else if (tw_en) begin
      val_mem[int'(tw_set)*WAYS + int'(tw_way)] <= tw_valid;
    end
  end

endmodule
