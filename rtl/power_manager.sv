// power_manager -- Power Manager of Line: turns cache lines on and off from the
// word locations in the preactivating cache-line FIFO.
//
// Two stages work every clock:
//  * ON stage, bottom element: a head (first word of a line) switches on every
//    way of its set, since any of them may hold the line (function "all", ON).
//  * OFF stage, top element: a head switches off every way of its set except
//    the way that hit (function "others", OFF); a trail, the last word used
//    before the flow leaves the line, switches off every way of the set
//    (function "all", OFF). A single-word visit is a head and a trail at once
//    and is handled as a trail. Medium words do nothing.
// The stage master gates the stages with on_en / off_en; all_off puts every
// line to drowsy (flush after a wrong prediction or a cache restart).
// It holds one line_power_ctrl per line (SETS x WAYS) and reports which lines
// are active, which are readable, and how many are active.
// Timing: commands are combinational from the FIFO elements and act at the
// next clock edge.
// From the document: the truth table of the function operation and which FIFO
// end each stage reads. This design's own choices: all_off, and handling a
// single-word visit as a trail.
module power_manager
  import pfsdic_pkg::*;
#(
  parameter int unsigned SETS   = 512,
  parameter int unsigned WAYS   = 1,
  parameter int unsigned OFF_W  = 6,
  parameter int unsigned WAKEUP = 1,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned NLINE = SETS * WAYS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  pcl_entry_t              bottom,
  input  pcl_entry_t              top,
  input  logic [WAY_W-1:0]        top_way,
  input  logic                    on_en,
  input  logic                    off_en,
  input  logic                    all_off,
  output logic [NLINE-1:0]        line_active,   // index = set*WAYS + way
  output logic [NLINE-1:0]        line_ready,
  output logic [$clog2(NLINE+1)-1:0] active_count,
  output logic                    ev_on,
  output logic                    ev_off_others,
  output logic                    ev_off_all
);

  logic             on_cmd, off_cmd;
  fun_op_e          off_fop;
  logic [SET_W-1:0] on_set, off_set;

  always_comb begin
    on_set  = bottom.addr[OFF_W +: SET_W];
    off_set = top.addr[OFF_W +: SET_W];
    on_cmd  = on_en && bottom.valid && is_head(bottom.wl) && !all_off;
    off_cmd = off_en && top.valid && (is_head(top.wl) || is_trail(top.wl)) && !all_off;
    off_fop = is_trail(top.wl) ? FOP_ALL : FOP_OTHERS;
    ev_on         = on_cmd;
    ev_off_others = off_cmd && (off_fop == FOP_OTHERS);
    ev_off_all    = off_cmd && (off_fop == FOP_ALL);
  end

  for (genvar s = 0; s < SETS; s++) begin : g_set
    for (genvar w = 0; w < WAYS; w++) begin : g_way
      line_power_ctrl #(
        .SET_W(SET_W), .WAY_W(WAY_W), .MY_SET(s), .MY_WAY(w), .WAKEUP(WAKEUP)
      ) u_line (
        .clk, .rst_n, .all_off,
        .on_en(on_cmd), .on_set,
        .off_en(off_cmd), .off_fop, .off_set, .off_way(top_way),
        .active(line_active[s*WAYS+w]), .ready(line_ready[s*WAYS+w])
      );
    end
  end

  always_comb begin
    active_count = '0;
    for (int i = 0; i < NLINE; i++) active_count += line_active[i];
  end

endmodule
