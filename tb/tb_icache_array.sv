// tb_icache_array -- checks the cache storage (8 sets, 2 ways, 4 words):
// word and tag writes, reads of every way, and word-line gating of lines
// that are not ready.
`timescale 1ns/1ps
module tb_icache_array;
  import pfsdic_pkg::*;
  localparam int S = 8, W = 2, WD = 4, TW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_set = 0, wr_set = 0, tw_set = 0;
  logic [1:0] rd_word = 0, wr_word = 0;
  logic [W-1:0] rd_ready = '1, rd_ok, rd_tvalid;
  logic [TW-1:0] rd_tag [W];
  word_t rd_data [W];
  logic wr_en = 0, tw_en = 0, tw_valid = 0;
  logic [0:0] wr_way = 0, tw_way = 0;
  word_t wr_data = 0;
  logic [TW-1:0] tw_tag = 0;
  int checks = 0, failures = 0;
  word_t md [S*W*WD];
  logic [TW-1:0] mt [S*W];
  bit mv [S*W];

  icache_array #(.SETS(S), .WAYS(W), .WORDS(WD), .TAG_W(TW)) dut (.*);

  initial begin
    for (int i = 0; i < S*W; i++) mv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // fill everything once
    for (int i = 0; i < S*W*WD; i++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 3'(i / (W*WD)); wr_way = 1'((i / WD) % W); wr_word = 2'(i % WD);
      wr_data = $urandom(); md[i] = wr_data;
      @(posedge clk);
    end
    @(negedge clk);
    wr_en = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_set = 3'($urandom()); wr_way = 1'($urandom());
      wr_word = 2'($urandom()); wr_data = $urandom();
      tw_en = ($urandom_range(0, 2) == 0); tw_set = 3'($urandom()); tw_way = 1'($urandom());
      tw_tag = TW'($urandom()); tw_valid = $urandom_range(0, 3) != 0;
      rd_set = 3'($urandom()); rd_word = 2'($urandom()); rd_ready = W'($urandom());
      #1;
      for (int w = 0; w < W; w++) begin
        int li;
        li = int'(rd_set) * W + w;
        checks++;
        if (rd_ok[w] != rd_ready[w] ||
            rd_data[w] != (rd_ready[w] ? md[li*WD + int'(rd_word)] : 32'h0) ||
            rd_tvalid[w] != (rd_ready[w] && mv[li]) || (mv[li] && rd_tag[w] != mt[li])) begin
          failures++; $display("FAIL clock %0d set %0d way %0d ok %b/%b data %h/%h tv %b/%b", c, rd_set, w, rd_ok[w], rd_ready[w], rd_data[w], md[li*WD + int'(rd_word)], rd_tvalid[w], mv[li]);
        end
      end
      @(posedge clk);
      if (wr_en) md[(int'(wr_set)*W + int'(wr_way))*WD + int'(wr_word)] = wr_data;
      if (tw_en) begin mt[int'(tw_set)*W + int'(tw_way)] = tw_tag; mv[int'(tw_set)*W + int'(tw_way)] = tw_valid; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
