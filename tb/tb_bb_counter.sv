// tb_bb_counter -- checks the BBCounter against a reference count: random
// decoded instructions and branches, including saturation (BBSIZE_W = 4).
`timescale 1ns/1ps
module tb_bb_counter;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dec_valid = 0, dec_is_branch = 0;
  logic [W-1:0] count;
  int checks = 0, failures = 0, model = 0, sat_seen = 0;

  bb_counter #(.BBSIZE_W(W)) dut (.clk, .rst_n, .dec_valid, .dec_is_branch, .count);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model) begin
        failures++; $display("FAIL step %0d: count %0d expected %0d", i, count, model);
      end
      if (model == 15) sat_seen++;
      dec_valid     = ($urandom_range(0, 3) != 0);
      dec_is_branch = ($urandom_range(0, 30) == 0);
      @(posedge clk);
      if (dec_valid) model = dec_is_branch ? 0 : (model == 15 ? 15 : model + 1);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
