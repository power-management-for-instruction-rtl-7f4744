// tb_power_manager -- checks the power manager with 8 sets, 2 ways and a
// 2-clock wake-up against a per-line reference model: ON of every way of
// the bottom element's set for head words, OFF of the other ways (head at
// the top) or of all ways (trail at the top), turning everything off, the
// ready delay and the active-line count.
`timescale 1ns/1ps
module tb_power_manager;
  import pfsdic_pkg::*;
  localparam int S = 8, W = 2, N = S * W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  pcl_entry_t bottom = '0, top = '0;
  logic [0:0] top_way = 0;
  logic on_en = 0, off_en = 0, all_off = 0;
  logic [N-1:0] line_active, line_ready;
  logic [$clog2(N+1)-1:0] active_count;
  logic ev_on, ev_off_others, ev_off_all;
  int checks = 0, failures = 0, n_on = 0, n_oo = 0, n_oa = 0;
  bit m_act [N];
  int m_cnt [N];

  power_manager #(.SETS(S), .WAYS(W), .OFF_W(4), .WAKEUP(2)) dut (.*);

  initial begin
    for (int i = 0; i < N; i++) begin m_act[i] = 0; m_cnt[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 5000; c++) begin
      bit oc, fc, hd, tr;
      int cnt;
      @(negedge clk);
      bottom.valid = ($urandom_range(0, 5) != 0);
      bottom.wl    = word_loc_e'($urandom_range(0, 3));
      bottom.addr  = $urandom();
      top.valid    = ($urandom_range(0, 5) != 0);
      top.wl       = word_loc_e'($urandom_range(0, 3));
      top.addr     = $urandom();
      top_way      = 1'($urandom());
      on_en        = ($urandom_range(0, 3) != 0);
      off_en       = ($urandom_range(0, 3) != 0);
      all_off      = ($urandom_range(0, 99) == 0);
      #1;
      hd  = (bottom.wl == WL_HEAD || bottom.wl == WL_SINGLE);
      tr  = (top.wl == WL_TRAIL || top.wl == WL_SINGLE);
      oc  = on_en && bottom.valid && hd && !all_off;
      fc  = off_en && top.valid && (top.wl != WL_MEDIUM) && !all_off;
      cnt = 0;
      for (int i = 0; i < N; i++) begin
        cnt += m_act[i];
        checks++;
        if (line_active[i] != m_act[i] || line_ready[i] != (m_act[i] && m_cnt[i] == 0)) begin
          failures++; $display("FAIL clock %0d line %0d active %b/%b", c, i, line_active[i], m_act[i]);
        end
      end
      checks++;
      if (int'(active_count) != cnt || ev_on != oc || ev_off_others != (fc && !tr) || ev_off_all != (fc && tr)) begin
        failures++; $display("FAIL clock %0d count/events", c);
      end
      n_on += oc; n_oo += (fc && !tr); n_oa += (fc && tr);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        bit son, soff;
        son  = oc && (int'(bottom.addr[6:4]) == i / W);
        soff = fc && (int'(top.addr[6:4]) == i / W) && (tr || int'(top_way) != i % W);
        if (all_off) m_act[i] = 0;
        else if (son) begin
          if (!m_act[i]) begin m_act[i] = 1; m_cnt[i] = 1; end
          else if (m_cnt[i] != 0) m_cnt[i]--;
        end else if (soff) m_act[i] = 0;
        else if (m_act[i] && m_cnt[i] != 0) m_cnt[i]--;
      end
    end
    checks++;
    if (n_on == 0 || n_oo == 0 || n_oa == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
