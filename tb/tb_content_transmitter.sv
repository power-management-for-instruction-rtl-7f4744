// tb_content_transmitter -- checks the content transmitter in a 2-way,
// 8-set, 4-word configuration against a reference model: tag comparison
// on head words, reuse of the recorded way on medium and trail words,
// misses, and the error flag when a needed line is not ready.
`timescale 1ns/1ps
module tb_content_transmitter;
  import pfsdic_pkg::*;
  localparam int S = 8, W = 2, WD = 4, TW = 32 - 4 - 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pcl_entry_t top = '0;
  logic xmit_en = 0;
  logic [2:0] rd_set;
  logic [1:0] rd_word;
  logic [W-1:0] rd_ok = '1, rd_tvalid;
  logic [TW-1:0] rd_tag [W];
  word_t rd_data [W], data;
  logic data_valid, miss, drowsy_err, ev_tag_compare, ev_way_reuse;
  addr_t data_addr;
  logic [0:0] hit_way;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_err = 0, n_reuse = 0;
  logic [TW-1:0] tags [S][W];
  bit tval [S][W];
  bit m_wv = 0;
  int m_w = 0;

  function automatic word_t dval(int s, int w, int wd);
    return word_t'((s * 131 + w * 17 + wd) * 32'h9e37_79b9);
  endfunction

  always_comb begin
    for (int w = 0; w < W; w++) begin
      rd_tvalid[w] = rd_ok[w] && tval[rd_set][w];
      rd_tag[w]    = tags[rd_set][w];
      rd_data[w]   = rd_ok[w] ? dval(int'(rd_set), w, int'(rd_word)) : '0;
    end
  end

  content_transmitter #(.SETS(S), .WAYS(W), .WORDS(WD)) dut (.*);

  initial begin
    for (int s = 0; s < S; s++) begin
      tags[s][0] = TW'(s); tags[s][1] = TW'(s + 8); tval[s][0] = 1; tval[s][1] = 1;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 5000; c++) begin
      bit act, hm, allok, eok;
      int hw, s;
      @(negedge clk);
      if (c % 50 == 0) begin
        s = $urandom_range(0, S - 1);
        tval[s][$urandom_range(0, 1)] = $urandom_range(0, 1);
      end
      xmit_en   = ($urandom_range(0, 7) != 0);
      top.valid = ($urandom_range(0, 7) != 0);
      top.wl    = word_loc_e'($urandom_range(0, 3));
      s         = $urandom_range(0, S - 1);
      top.addr  = {TW'(s + 8 * $urandom_range(0, 2)), 3'(s), 2'($urandom()), 2'b00};
      rd_ok     = ($urandom_range(0, 5) == 0) ? W'($urandom()) : '1;
      #1;
      act   = xmit_en && top.valid;
      hm    = (top.wl == WL_HEAD || top.wl == WL_SINGLE) || !m_wv;
      allok = &rd_ok;
      hw    = -1;
      for (int w = W - 1; w >= 0; w--)
        if (tval[s][w] && rd_ok[w] && tags[s][w] == top.addr[31 -: TW]) hw = w;
      checks++;
      if (!act) begin
        if (data_valid || miss || drowsy_err) begin failures++; $display("FAIL clock %0d idle", c); end
      end else if (hm) begin
        if (drowsy_err != (!allok && hw < 0) || miss != (allok && hw < 0) || data_valid != (hw >= 0) ||
            (data_valid && (int'(hit_way) != hw || data != dval(s, hw, int'(top.addr[3:2]))))) begin
          failures++; $display("FAIL clock %0d head: v %b m %b e %b way %0d/%0d", c, data_valid, miss, drowsy_err, hit_way, hw);
        end
      end else begin
        eok = rd_ok[m_w];
        if (miss || drowsy_err != !eok || data_valid != eok ||
            (eok && (int'(hit_way) != m_w || data != dval(s, m_w, int'(top.addr[3:2]))))) begin
          failures++; $display("FAIL clock %0d reuse", c);
        end
      end
      checks++;
      if (ev_tag_compare != (act && hm) || ev_way_reuse != (act && !hm) || (act && data_addr != top.addr)) begin
        failures++; $display("FAIL clock %0d events", c);
      end
      if (act && data_valid && hm) n_hit++;
      if (act && miss) n_miss++;
      if (act && drowsy_err) n_err++;
      if (act && !hm) n_reuse++;
      @(posedge clk);
      if (act && hm) begin m_wv = hw >= 0; m_w = (hw < 0) ? 0 : hw; end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_err == 0 || n_reuse == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
