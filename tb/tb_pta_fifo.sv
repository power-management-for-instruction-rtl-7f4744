// tb_pta_fifo -- checks that the top of the PTA FIFO is the address pushed
// exactly LAT clocks earlier (LAT = 3 here), and that flush empties it.
`timescale 1ns/1ps
module tb_pta_fifo;
  import pfsdic_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, push_valid = 0;
  addr_t push_addr = '0;
  logic top_valid;
  addr_t top_addr;
  int checks = 0, failures = 0;
  logic  mv [LAT+1];
  addr_t ma [LAT+1];

  pta_fifo #(.LAT(LAT)) dut (.clk, .rst_n, .flush, .push_valid, .push_addr, .top_valid, .top_addr);

  initial begin
    for (int i = 0; i <= LAT; i++) begin mv[i] = 0; ma[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      push_valid = ($urandom_range(0, 5) != 0);
      push_addr  = $urandom();
      flush      = ($urandom_range(0, 20) == 0);
      #1;
      checks++;
      if (top_valid != mv[LAT] || (top_valid && top_addr != ma[LAT])) begin
        failures++; $display("FAIL clock %0d: top %0b/%h expected %0b/%h", c, top_valid, top_addr, mv[LAT], ma[LAT]);
      end
      @(posedge clk);
      if (flush) for (int i = 1; i <= LAT; i++) mv[i] = 0;
      else begin
        for (int i = LAT; i >= 2; i--) begin mv[i] = mv[i-1]; ma[i] = ma[i-1]; end
        mv[1] = push_valid; ma[1] = push_addr;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
