// tb_pfsdic_cache_side -- checks the I-cache side (PCL FIFO, lines sensor,
// stage master, power manager, content transmitter, array, refill) in a
// 2 KB, 2-way, 8-word, 1-clock-wakeup configuration. The testbench plays the
// CPU side: it puts a mostly sequential address stream with random jumps on
// the instruction address bus, obeys restart and hold, raises random DIC
// resets (jumping elsewhere) and answers line refills from a memory model
// with a 3-clock first-word latency. Checked every clock: data on the data
// bus is the memory word of its address and belongs to the address put on
// the bus LAT clocks earlier, no drowsy line is ever read, the active-line
// count stays within (LAT + 1) * WAYS. At the end every mechanism must have
// occurred and most clocks must have delivered an instruction.
`timescale 1ns/1ps
module tb_pfsdic_cache_side;
  import pfsdic_pkg::*;
  localparam int LAT = 2, WAYS = 2, NLINE = 2048 / 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bus_valid = 0, dic_reset = 0;
  addr_t bus_addr = '0, data_addr, restart_pc, mem_addr;
  logic data_valid, restart, hold, mem_req, mem_rvalid = 0;
  word_t data, mem_rdata = '0;
  logic [NLINE-1:0] line_active;
  logic [$clog2(NLINE+1)-1:0] active_count;
  logic ev_idle, ev_on, ev_off_others, ev_off_all, ev_off_suppressed;
  logic ev_tag_compare, ev_way_reuse, ev_miss, ev_drowsy_err;
  int checks = 0, failures = 0, n_data = 0;
  int n_idle = 0, n_on = 0, n_oo = 0, n_oa = 0, n_sup = 0, n_tc = 0, n_wr = 0, n_miss = 0;

  pfsdic_cache_side #(.CACHE_BYTES(2048), .WAYS(WAYS), .WORDS(8), .WAKEUP(1)) dut (.*);

  function automatic word_t mword(addr_t a);
    return a ^ 32'hdead_0000 ^ (a << 11);
  endfunction

  addr_t pc = '0;
  addr_t hist_a [8];
  bit    hist_v [8];
  int    mcnt = 0, mwait = 0;

  initial begin
    for (int i = 0; i < 8; i++) begin hist_a[i] = '0; hist_v[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 20000; c++) begin
      bit dr, bv, mv;
      addr_t ba;
      word_t md;
      @(negedge clk);
      // CPU side model
      dr = ($urandom_range(0, 59) == 0);
      bv = !hold;
      ba = pc;
      // memory model: first word 3 clocks after the request, then random gaps
      mv = 0; md = $urandom();
      if (mem_req) begin
        if (mwait < 3) mwait++;
        else if ($urandom_range(0, 3) != 0) begin mv = 1; md = mword(mem_addr + 32'(4 * mcnt)); end
      end
      bus_valid  = bv;
      bus_addr   = ba;
      dic_reset  = dr;
      mem_rvalid = mv;
      mem_rdata  = md;
      #1;
      checks++;
      if (data_valid && (data != mword(data_addr) || !hist_v[(c - LAT) & 7] || hist_a[(c - LAT) & 7] != data_addr)) begin
        failures++; $display("FAIL clock %0d data %h for %h", c, data, data_addr);
      end
      checks++;
      if (ev_drowsy_err) begin failures++; $display("FAIL clock %0d drowsy line read", c); end
      checks++;
      if (int'(active_count) > (LAT + 1) * WAYS) begin failures++; $display("FAIL clock %0d %0d lines active", c, active_count); end
      n_data += data_valid; n_idle += ev_idle; n_on += ev_on; n_oo += ev_off_others; n_oa += ev_off_all;
      n_sup += ev_off_suppressed; n_tc += ev_tag_compare; n_wr += ev_way_reuse; n_miss += ev_miss;
      hist_v[c & 7] = bv && !dr && !restart;
      hist_a[c & 7] = ba;
      if (dr || restart) for (int k = 1; k < LAT; k++) hist_v[(c - k) & 7] = 0;
      @(posedge clk);
      if (mv) begin
        mcnt = (mcnt + 1) % 8;
        if (mcnt == 0) mwait = 0;
      end
      if (dr) pc = {$urandom_range(0, 1023), 2'b00};
      else if (restart) pc = restart_pc;
      else if (bv) pc = ($urandom_range(0, 15) == 0) ? {$urandom_range(0, 1023), 2'b00} : pc + 4;
    end
    checks++;
    if (n_idle == 0 || n_on == 0 || n_oo == 0 || n_oa == 0 || n_sup == 0 || n_tc == 0 || n_wr == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage idle %0d on %0d off-others %0d off-all %0d suppressed %0d compare %0d reuse %0d miss %0d",
               n_idle, n_on, n_oo, n_oa, n_sup, n_tc, n_wr, n_miss);
    end
    checks++;
    if (n_data < 20000 / 5) begin failures++; $display("FAIL only %0d instructions delivered", n_data); end
    $display("cache_side: %0d instructions, %0d misses", n_data, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
