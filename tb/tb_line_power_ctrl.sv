// tb_line_power_ctrl -- checks one line (set 5, way 1 of a 4-way cache, wakeup
// time 2): selection by set / way / function operation, ON-over-OFF priority,
// all_off, and that `ready` rises exactly WAKEUP clocks after an ON.
`timescale 1ns/1ps
module tb_line_power_ctrl;
  import pfsdic_pkg::*;
  localparam int WAKEUP = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic all_off = 0, on_en = 0, off_en = 0;
  logic [3:0] on_set = 0, off_set = 0;
  logic [1:0] off_way = 0;
  fun_op_e off_fop = FOP_ALL;
  logic active, ready;
  int checks = 0, failures = 0;
  int m_act = 0, m_cnt = 0, n_wake = 0;

  line_power_ctrl #(.SET_W(4), .WAY_W(2), .MY_SET(5), .MY_WAY(1), .WAKEUP(WAKEUP)) dut (
    .clk, .rst_n, .all_off, .on_en, .on_set, .off_en, .off_fop, .off_set, .off_way, .active, .ready);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 4000; c++) begin
      logic onsel, offsel;
      @(negedge clk);
      checks++;
      if (active != m_act[0] || ready != (m_act != 0 && m_cnt == 0)) begin
        failures++; $display("FAIL clock %0d: active %0b ready %0b expected %0d/%0d", c, active, ready, m_act, m_cnt);
      end
      on_en   = ($urandom_range(0, 3) == 0);
      on_set  = ($urandom_range(0, 1) == 0) ? 4'd5 : 4'($urandom());
      off_en  = ($urandom_range(0, 3) == 0);
      off_set = ($urandom_range(0, 1) == 0) ? 4'd5 : 4'($urandom());
      off_way = 2'($urandom());
      off_fop = fun_op_e'($urandom_range(0, 1));
      all_off = ($urandom_range(0, 40) == 0);
      onsel  = on_en && on_set == 5;
      offsel = off_en && off_set == 5 && (off_fop == FOP_ALL || off_way != 1);
      @(posedge clk);
      if (all_off) m_act = 0;
      else if (onsel) begin
        if (m_act == 0) begin m_act = 1; m_cnt = WAKEUP - 1; n_wake++; end
        else if (m_cnt > 0) m_cnt--;
      end else if (offsel) m_act = 0;
      else if (m_act != 0 && m_cnt > 0) m_cnt--;
    end
    checks++;
    if (n_wake < 10) begin failures++; $display("FAIL too few wake-ups"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
