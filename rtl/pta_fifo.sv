// pta_fifo -- Predictive Tracing Address FIFO on the CPU side.
//
// A shift register that takes the predicted address placed on the instruction
// address bus every clock. The bottom element is the address on the bus this
// clock; the top element is the one pushed LAT clocks ago, which is exactly the
// address whose content the I-cache delivers now. Depth is LAT + 1 where LAT is
// the wakeup latency (wakeup time + one clock of circuit delay). flush clears
// every element, including the one on the bus this clock (wrong prediction).
// Bus clocks without a valid address push an empty element.
// From the document: push every clock, clear on wrong prediction, depth
// "wakeup time + 1" counted in clocks of wakeup latency, top = content now.
// The asynchronous active-low reset is this design's choice.
module pta_fifo
  import pfsdic_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  push_valid,
  input  addr_t push_addr,
  output logic  top_valid,
  output addr_t top_addr
);

  logic  v_q [1:LAT];
  addr_t a_q [1:LAT];

  assign top_valid = v_q[LAT];
  assign top_addr  = a_q[LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= LAT; i++) begin
        v_q[i] <= 1'b0;
        a_q[i] <= '0;
      end
    end else if (flush) begin
      for (int i = 1; i <= LAT; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[1] <= push_valid;
      a_q[1] <= push_addr;
      for (int i = 2; i <= LAT; i++) begin
        v_q[i] <= v_q[i-1];
        a_q[i] <= a_q[i-1];
      end
    end
  end

endmodule
