// lines_sensor -- marks the word location of the two bottom PCL FIFO elements.
//
// It compares the line address (tag and index, word offset ignored) of the
// address on the bus this clock (the new bottom element) with the element
// pushed one clock earlier (prev). Same line: the new element is a medium word
// and prev keeps its mark. Different line (or no earlier element): the new
// element is the head of its line and prev becomes the last word of its line,
// a trail (or, if prev was itself a head, a single-word visit that is both).
// When no address is on the bus, prev keeps its mark.
// Purely combinational.
// From the document: the comparison of tag and index of the two bottom
// elements and the head/medium/trail codes. This design's own choice: a head
// stays a head when the next address is in the same line (the document's text
// sets both to medium, which would lose the head mark the OFF stage needs), and
// the extra single-word code.
// Lint note: only the line-address bits of the new address are compared; the
// lint run reports the word-offset bits as unused.
module lines_sensor
  import pfsdic_pkg::*;
#(
  parameter int unsigned OFF_W = 6
) (
  input  logic       new_valid,
  input  addr_t      new_addr,
  input  pcl_entry_t prev,
  output word_loc_e  new_wl,
  output word_loc_e  prev_wl_next,
  output logic       same_line
);

  always_comb begin
    same_line = new_valid && prev.valid &&
                (new_addr[ADDR_W-1:OFF_W] == prev.addr[ADDR_W-1:OFF_W]);
    new_wl       = same_line ? WL_MEDIUM : WL_HEAD;
    prev_wl_next = prev.wl;
    if (new_valid && prev.valid && !same_line) begin
      unique case (prev.wl)
        WL_HEAD:   prev_wl_next = WL_SINGLE;
        WL_MEDIUM: prev_wl_next = WL_TRAIL;
        default:   prev_wl_next = prev.wl;
      endcase
    end
  end

endmodule
