// tb_pfsdic_cpu_side -- checks the CPU-side additions (predicted-PC
// generator, BTB with BBSize, BBFIFO, BBCounter, PTA FIFO) against an ideal
// cache: the instruction for an address put on the bus reaches IF LAT clocks
// later (the PTA top), and ID follows IF by one clock. A small fixed program
// with an inner loop (taken 7 times out of 8), a jump, a never-taken branch
// and a backward jump runs for a few thousand clocks. Checked: every
// instruction reaching ID is the architecturally correct one, a DIC reset
// brings the next instruction LAT + 1 clocks later, BBSize values are
// learnt so that after warm-up only the loop exit and the branch after it
// cause DIC resets.
`timescale 1ns/1ps
module tb_pfsdic_cpu_side;
  import pfsdic_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  id_valid = 0, id_is_branch = 0, id_taken = 0;
  addr_t id_pc = '0, id_next_pc = '0, id_target = '0;
  logic  bus_valid, dic_reset, pta_top_valid;
  addr_t bus_addr, pta_top_addr;
  logic  restart = 0, hold = 0;
  addr_t restart_pc = '0;
  logic  ev_lookup, ev_pred_taken, ev_bb_update, ev_bb_freeze, ev_bbsize_write;
  int checks = 0, failures = 0;
  int n_kill = 0, n_kill_late = 0, n_ptk = 0, n_bw = 0, n_frz = 0, n_id = 0, n_exit = 0, n_exit_late = 0;

  pfsdic_cpu_side #(.LAT(LAT), .BTB_ENTRIES(256)) dut (.*);

  // program: branch at 0x40 back to 0x00 (7 of 8), jump at 0x80 to 0x100,
  // never-taken branch at 0x13c, jump at 0x180 to 0x00
  int loop_cnt = 0;
  task automatic arch(input addr_t pc, output bit br, output bit tk, output addr_t tg);
    br = 1; tk = 0; tg = '0;
    case (pc)
      32'h40:  begin tg = 32'h00;  tk = (loop_cnt != 7); end
      32'h80:  begin tg = 32'h100; tk = 1; end
      32'h13c: begin tg = 32'h00;  tk = 0; end
      32'h180: begin tg = 32'h00;  tk = 1; end
      default: br = 0;
    endcase
  endtask

  addr_t exp_pc = '0;
  int since_kill = -1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 6000; c++) begin
      bit fetch, br, tk;
      addr_t tg, fa;
      @(negedge clk);
      #1;
      fetch = pta_top_valid && !dic_reset;
      fa    = pta_top_addr;
      if (dic_reset) begin
        n_kill++;
        if (c >= 3000) n_kill_late++;
        since_kill = 0;
      end else if (since_kill >= 0) begin
        since_kill++;
        if (pta_top_valid) begin
          checks++;
          if (since_kill != LAT + 1) begin failures++; $display("FAIL clock %0d first fetch %0d after reset", c, since_kill); end
          since_kill = -1;
        end
      end
      n_ptk += ev_pred_taken; n_bw += ev_bbsize_write; n_frz += ev_bb_freeze;
      // IF -> ID
      if (fetch) begin
        n_id++;
        checks++;
        if (fa != exp_pc) begin failures++; $display("FAIL clock %0d ID %h expected %h", c, fa, exp_pc); end
        arch(fa, br, tk, tg);
        exp_pc = (br && tk) ? tg : fa + 4;
        if (fa == 32'h40) begin
          if (loop_cnt == 7) begin n_exit++; if (c >= 3000) n_exit_late++; end
          loop_cnt = (loop_cnt + 1) % 8;
        end
      end
      @(posedge clk);
      id_valid     <= fetch;
      id_pc        <= fa;
      id_is_branch <= br;
      id_taken     <= tk;
      id_target    <= tg;
      id_next_pc   <= exp_pc;
    end
    // After warm-up a 2-bit counter only gets the loop exit wrong. That
    // branch was mispredicted, so no next-branch address is computed from it
    // and the jump at 0x80 is missed as well: two DIC resets per outer pass.
    checks++;
    if (n_kill_late > 2 * n_exit_late + 2) begin
      failures++; $display("FAIL %0d late DIC resets for %0d loop exits", n_kill_late, n_exit_late);
    end
    checks++;
    if (n_id < 3000 || n_ptk == 0 || n_bw == 0 || n_frz == 0) begin
      failures++; $display("FAIL coverage id %0d taken %0d bbsize %0d freeze %0d", n_id, n_ptk, n_bw, n_frz);
    end
    $display("cpu_side: %0d instructions, %0d DIC resets (%0d in 2nd half, %0d loop exits)", n_id, n_kill, n_kill_late, n_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
