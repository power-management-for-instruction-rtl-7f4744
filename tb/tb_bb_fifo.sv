// tb_bb_fifo -- checks the BBFIFO against a reference model: bottom pushes,
// verification (Update/Freeze table, BBSize write of the previous top with the
// counter value, pop, bottom clear) and clearing the bottom alone.
`timescale 1ns/1ps
module tb_bb_fifo;
  import pfsdic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push_valid = 0, push_pred = 0, clr_bottom = 0;
  logic [7:0] push_index = 0, vf_index = 0;
  logic vf_valid = 0, vf_old_pred = 0, vf_new_pred = 0, vf_bbs_valid = 0;
  logic [8:0] bb_count = 0;
  logic bw_valid;
  logic [7:0] bw_index;
  logic [8:0] bw_bbsize;
  bb_flag_e vf_flag, top_flag;
  logic top_valid, bot_valid, bot_pred;
  logic [7:0] top_index, bot_index;
  int checks = 0, failures = 0, n_upd = 0, n_frz = 0, n_bw = 0;
  bit tv = 0, bv = 0, bp = 0, tf = 0;
  int ti = 0, bi = 0;

  bb_fifo #(.IDX_W(8), .BBSIZE_W(9)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 4000; c++) begin
      bit pb, eflag;
      @(negedge clk);
      push_valid   = $urandom_range(0, 1);
      push_index   = 8'($urandom_range(0, 7));
      push_pred    = $urandom_range(0, 1);
      clr_bottom   = ($urandom_range(0, 9) == 0);
      vf_valid     = ($urandom_range(0, 2) == 0);
      vf_index     = 8'($urandom_range(0, 7));
      vf_old_pred  = $urandom_range(0, 1);
      vf_new_pred  = $urandom_range(0, 1);
      vf_bbs_valid = $urandom_range(0, 1);
      bb_count     = 9'($urandom());
      #1;
      pb    = (bv && bi == int'(vf_index)) ? bp : vf_old_pred;
      eflag = (pb != vf_new_pred) || !vf_bbs_valid;
      checks++;
      if (vf_flag != bb_flag_e'(eflag)) begin failures++; $display("FAIL clock %0d flag", c); end
      checks++;
      if (bw_valid != (vf_valid && tv && tf) || (bw_valid && (int'(bw_index) != ti || bw_bbsize != bb_count))) begin
        failures++; $display("FAIL clock %0d BBSize write", c);
      end
      if (bw_valid) n_bw++;
      if (vf_valid) begin if (eflag) n_upd++; else n_frz++; end
      @(posedge clk);
      if (vf_valid) begin tv = 1; ti = vf_index; tf = eflag; bv = 0; end
      else if (clr_bottom) bv = 0;
      else if (push_valid) begin bv = 1; bi = push_index; bp = push_pred; end
      #1;
      checks++;
      if (top_valid != tv || bot_valid != bv || (tv && (int'(top_index) != ti || top_flag != bb_flag_e'(tf))) ||
          (bv && (int'(bot_index) != bi || bot_pred != bp))) begin
        failures++; $display("FAIL clock %0d state", c);
      end
    end
    checks++;
    if (n_upd == 0 || n_frz == 0 || n_bw == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
