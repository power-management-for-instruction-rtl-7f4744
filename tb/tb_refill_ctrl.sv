// tb_refill_ctrl -- checks the refill controller (8 sets, 2 ways, 4 words):
// restart on a miss or a replay, blocking, invalidation of the victim way,
// the line fill word by word from a memory model with random gaps, the tag
// write on the last word and round-robin victim selection.
`timescale 1ns/1ps
module tb_refill_ctrl;
  import pfsdic_pkg::*;
  localparam int S = 8, W = 2, WD = 4, TW = 32 - 4 - 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic miss = 0, replay = 0, block = 0, mem_rvalid = 0;
  addr_t top_addr = '0, restart_pc, mem_addr;
  word_t mem_rdata = '0, wr_data;
  logic restart, hold, mem_req, wr_en, tw_en, tw_valid;
  logic [2:0] wr_set, tw_set;
  logic [0:0] wr_way, tw_way;
  logic [1:0] wr_word;
  logic [TW-1:0] tw_tag;
  int checks = 0, failures = 0, n_fill = 0;
  bit m_fill = 0;
  int m_cnt = 0, m_way = 0, m_rr = 0;
  addr_t m_line = '0;

  refill_ctrl #(.SETS(S), .WAYS(W), .WORDS(WD)) dut (.*);

  function automatic word_t mword(addr_t a);
    return a * 32'h0101_0101 + 32'h1234_5678;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 6000; c++) begin
      bit st, rs;
      @(negedge clk);
      miss       = ($urandom_range(0, 5) == 0);
      replay     = ($urandom_range(0, 7) == 0);
      block      = ($urandom_range(0, 3) == 0);
      top_addr   = $urandom() & 32'hffff_fffc;
      mem_rvalid = mem_req && ($urandom_range(0, 2) != 0);
      mem_rdata  = mem_rvalid ? mword(mem_addr + 32'(4 * m_cnt)) : $urandom();
      #1;
      st = !m_fill && miss && !block;
      rs = !m_fill && (miss || replay) && !block;
      checks++;
      if (restart != rs || (rs && restart_pc != top_addr) || hold != m_fill || mem_req != m_fill ||
          (m_fill && mem_addr != {m_line[31:4], 4'b0})) begin
        failures++; $display("FAIL clock %0d control", c);
      end
      checks++;
      if (wr_en != (m_fill && mem_rvalid) ||
          (wr_en && (int'(wr_set) != int'(m_line[6:4]) || int'(wr_way) != m_way ||
                     int'(wr_word) != m_cnt || wr_data != mword({m_line[31:4], 4'b0} + 32'(4 * m_cnt))))) begin
        failures++; $display("FAIL clock %0d word write", c);
      end
      checks++;
      if (st) begin
        if (!tw_en || tw_valid || int'(tw_set) != int'(top_addr[6:4]) || int'(tw_way) != m_rr) begin
          failures++; $display("FAIL clock %0d invalidate", c);
        end
      end else if (m_fill && mem_rvalid && m_cnt == WD - 1) begin
        if (!tw_en || !tw_valid || int'(tw_set) != int'(m_line[6:4]) || int'(tw_way) != m_way ||
            tw_tag != m_line[31 -: TW]) begin
          failures++; $display("FAIL clock %0d tag write", c);
        end
      end else if (tw_en) begin
        failures++; $display("FAIL clock %0d stray tag write", c);
      end
      @(posedge clk);
      if (st) begin m_fill = 1; m_line = top_addr; m_way = m_rr; m_cnt = 0; end
      else if (m_fill && mem_rvalid) begin
        if (m_cnt == WD - 1) begin m_fill = 0; m_rr = (m_rr + 1) % W; n_fill++; end
        m_cnt = (m_cnt + 1) % WD;
      end
    end
    checks++;
    if (n_fill < 10) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
