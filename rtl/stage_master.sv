// stage_master -- says which I-cache-side stages work this clock and keeps
// them from fighting over the same set of lines.
//
// Within its one clock of circuit delay the I-cache side runs three stages:
// the lines sensor marks the bottom element, the content transmitter serves
// the top element (recording Way#), and the power manager switches lines (ON
// for the bottom element, OFF for the top element, OFF using the Way# just
// found). The stage master enables them:
//   xmit_en  top element valid and no wrong prediction this clock;
//   on_en    always, unless the FIFO is being flushed;
//   off_en   top element valid, unless a younger element in the FIFO (bottom
//            included) still needs a line the OFF stage would switch off and
//            whose ON stage it would undo: for a trail (all ways of the set off)
//            any younger element of the same set; for a head (other ways off)
//            a younger element of the same set but another line, which may
//            live in another way.
//   idle     no valid top element: the pipeline gets no instruction.
// Purely combinational.
// From the document: the stage master's two jobs (work/idle indication and
// avoiding shared-resource conflicts) and the single clock of circuit delay.
// The exact conflict rule (same set as a younger element) is this design's
// own, because the timing figure of the stages is not available.
module stage_master
  import pfsdic_pkg::*;
#(
  parameter int unsigned LAT   = 2,
  parameter int unsigned OFF_W = 6,
  parameter int unsigned SET_W = 9
) (
  input  pcl_entry_t elem [0:LAT],
  input  logic       dic_reset,
  input  logic       flush,
  output logic       xmit_en,
  output logic       on_en,
  output logic       off_en,
  output logic       idle,
  output logic       ev_off_suppressed
);

  logic conflict, same_set, same_line;

  always_comb begin
    conflict = 1'b0;
    for (int i = 0; i < LAT; i++) begin
      same_set  = elem[i].addr[OFF_W +: SET_W] == elem[LAT].addr[OFF_W +: SET_W];
      same_line = elem[i].addr[ADDR_W-1:OFF_W] == elem[LAT].addr[ADDR_W-1:OFF_W];
      if (elem[i].valid && same_set && (is_trail(elem[LAT].wl) || !same_line))
        conflict = 1'b1;
    end
    idle              = !elem[LAT].valid;
    xmit_en           = elem[LAT].valid && !dic_reset;
    on_en             = !flush;
    off_en            = elem[LAT].valid && !flush && !conflict;
    ev_off_suppressed = elem[LAT].valid && !flush && conflict &&
                        (is_head(elem[LAT].wl) || is_trail(elem[LAT].wl));
  end

endmodule
