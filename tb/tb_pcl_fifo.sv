// tb_pcl_fifo -- checks the PCL FIFO (LAT = 3): bottom element = bus, top =
// bus address of LAT clocks ago, element 2 takes the sensor's updated word
// location of element 1, flush empties every element.
`timescale 1ns/1ps
module tb_pcl_fifo;
  import pfsdic_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, bus_valid = 0;
  addr_t bus_addr = '0;
  word_loc_e bottom_wl = WL_HEAD, e1_wl_next = WL_HEAD;
  pcl_entry_t elem [0:LAT];
  pcl_entry_t e1, top;
  pcl_entry_t m [1:LAT];
  int checks = 0, failures = 0;

  pcl_fifo #(.LAT(LAT)) dut (.clk, .rst_n, .flush, .bus_valid, .bus_addr, .bottom_wl,
                             .e1_wl_next, .elem, .e1, .top);

  initial begin
    for (int i = 1; i <= LAT; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      bus_valid  = ($urandom_range(0, 5) != 0);
      bus_addr   = $urandom();
      bottom_wl  = word_loc_e'($urandom_range(0, 3));
      e1_wl_next = word_loc_e'($urandom_range(0, 3));
      flush      = ($urandom_range(0, 25) == 0);
      #1;
      checks++;
      if (elem[0].valid != bus_valid || elem[0].addr != bus_addr || elem[0].wl != bottom_wl) begin
        failures++; $display("FAIL clock %0d: bottom element is not the bus", c);
      end
      for (int i = 1; i <= LAT; i++) begin
        checks++;
        if (elem[i].valid != m[i].valid || (m[i].valid && (elem[i].addr != m[i].addr || elem[i].wl != m[i].wl))) begin
          failures++; $display("FAIL clock %0d: element %0d", c, i);
        end
      end
      checks++;
      if (top != elem[LAT] || e1 != elem[1]) begin failures++; $display("FAIL clock %0d: top/e1 ports", c); end
      @(posedge clk);
      if (flush) for (int i = 1; i <= LAT; i++) m[i].valid = 0;
      else begin
        for (int i = LAT; i >= 3; i--) m[i] = m[i-1];
        m[2] = '{valid: m[1].valid, addr: m[1].addr, wl: e1_wl_next};
        m[1] = '{valid: bus_valid, addr: bus_addr, wl: bottom_wl};
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
