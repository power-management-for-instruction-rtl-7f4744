// pfsdic_pkg -- shared types and helpers of the program-flow-sensitive drowsy
// instruction cache.
//
// The design runs beside a 32-bit MIPS-I style pipeline, so instruction
// addresses and instruction words are 32 bits wide (ADDR_W, DATA_W).
// Word locations follow the encoding of the preactivating cache-line FIFO:
// 0 = head (first word used in a line), 1 = trail (last word used before the
// flow leaves the line), 2 = medium. Code 3 (head and trail at once, a line
// visited for a single word) is this design's own addition: the three-valued
// field cannot describe such a visit.
// Function operations follow the per-line voltage switch: FOP_ALL selects every
// way of a set, FOP_OTHERS every way except the recorded hit way.
package pfsdic_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [1:0] {
    WL_HEAD   = 2'd0,
    WL_TRAIL  = 2'd1,
    WL_MEDIUM = 2'd2,
    WL_SINGLE = 2'd3
  } word_loc_e;

  typedef enum logic {
    FOP_OTHERS = 1'b0,
    FOP_ALL    = 1'b1
  } fun_op_e;

  // One element of the preactivating cache-line FIFO.
  typedef struct packed {
    logic      valid;
    addr_t     addr;
    word_loc_e wl;
  } pcl_entry_t;

  // BBFIFO flag after verification.
  typedef enum logic {
    BB_FREEZE = 1'b0,
    BB_UPDATE = 1'b1
  } bb_flag_e;

  function automatic logic is_head(word_loc_e wl);
    return (wl == WL_HEAD) || (wl == WL_SINGLE);
  endfunction

  function automatic logic is_trail(word_loc_e wl);
    return (wl == WL_TRAIL) || (wl == WL_SINGLE);
  endfunction

endpackage
