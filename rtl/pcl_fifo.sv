// pcl_fifo -- Preactivating Cache-Line FIFO on the I-cache side.
//
// Elements are {valid, Address, Word location}. Element 0, the bottom, is the
// address on the instruction address bus this clock, marked by the lines
// sensor; elements 1..LAT are registers and element LAT is the top, whose
// content is transmitted this clock. An address therefore reaches the top LAT
// clocks (wakeup time + one clock of circuit delay) after it was on the bus,
// and the FIFO holds LAT + 1 elements. While element 1 moves up to element 2 it
// takes the word location the lines sensor computed for it (it may turn into a
// trail when the next address is in another line). flush empties every element
// including the bottom (wrong prediction or cache restart); the bottom element
// stays visible during that clock but is not stored.
// From the document: depth wakeup latency + 1, one element popped each clock,
// bottom = bus, top = content now, clear on wrong prediction. LAT must be at
// least 2 (at least one clock of wakeup time).
module pcl_fifo
  import pfsdic_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       bus_valid,
  input  addr_t      bus_addr,
  input  word_loc_e  bottom_wl,     // from the lines sensor
  input  word_loc_e  e1_wl_next,    // from the lines sensor
  output pcl_entry_t elem [0:LAT],  // 0 = bottom, LAT = top
  output pcl_entry_t e1,            // element 1 (input of the lines sensor)
  output pcl_entry_t top            // element LAT
);

  pcl_entry_t q [1:LAT];

  always_comb begin
    elem[0].valid = bus_valid;
    elem[0].addr  = bus_addr;
    elem[0].wl    = bottom_wl;
    for (int i = 1; i <= LAT; i++) elem[i] = q[i];
    e1  = q[1];
    top = q[LAT];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= LAT; i++) q[i] <= '{valid: 1'b0, addr: '0, wl: WL_HEAD};
    end else if (flush) begin
      for (int i = 1; i <= LAT; i++) q[i].valid <= 1'b0;
    end else begin
      q[1] <= '{valid: bus_valid, addr: bus_addr, wl: bottom_wl};
      q[2] <= '{valid: q[1].valid, addr: q[1].addr, wl: e1_wl_next};
      for (int i = 3; i <= LAT; i++) q[i] <= q[i-1];
    end
  end

  initial assert (LAT >= 2) else $error("pcl_fifo: LAT must be at least 2");

endmodule
