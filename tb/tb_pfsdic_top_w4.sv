// tb_pfsdic_top_w4 -- end-to-end test of the drowsy instruction cache, with 2-way
// sets, 4-word lines, a 16 KB cache and a wakeup time of 4 clocks.
//
// A behavioural five-stage pipeline front end (IF, ID) and a behavioural
// memory surround the design. The test builds a pseudo-random program of
// basic blocks ending in branches of five kinds (counted loops, alternating,
// jumps, biased-random, never taken), keeps an architectural reference model
// of it, and checks that:
//   * every instruction that reaches ID is the next one of the reference
//     program flow, with the right instruction word (the design may only
//     deliver wrong-path instructions in clocks where it kills them);
//   * no drowsy or still-waking line is ever read;
//   * the next instruction after a wrong prediction arrives exactly LAT + 1
//     clocks after the kill, and LAT clocks after a refill ends;
//   * the number of active lines stays within the sets in flight.
// It also counts every mechanism (wrong prediction, BBSize update / freeze /
// write, single BTB lookup per block, predicted-taken jump by BBSize, ON,
// OFF-others, OFF-all, suppressed OFF, tag compare, Way# reuse, miss, idle
// clock) and fails if one never happens. It prints the runtime and the average
// number of active lines per clock.
`timescale 1ns/1ps
module tb_pfsdic_top_w4;
  import pfsdic_pkg::*;

  localparam int unsigned CACHE_BYTES = 16384;
  localparam int unsigned WAYS        = 2;
  localparam int unsigned WORDS       = 4;
  localparam int unsigned WAKEUP      = 4;
  localparam int unsigned LAT         = WAKEUP + 1;
  localparam int unsigned NLINE       = CACHE_BYTES / (WORDS * 4);
  localparam int unsigned PROG_WORDS  = 6144;
  localparam int unsigned N_INSTR     = 30000;
  localparam int unsigned MEM_LAT     = 4;
  localparam int unsigned MAX_CYCLES  = N_INSTR * 40 + 10000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       if_valid, if_kill;
  word_t                      if_instr;
  addr_t                      if_addr;
  logic                       id_valid, id_is_branch, id_taken;
  addr_t                      id_pc, id_next_pc, id_target;
  logic                       mem_req, mem_rvalid;
  addr_t                      mem_addr;
  word_t                      mem_rdata;
  logic                       bus_valid;
  addr_t                      bus_addr;
  logic [NLINE-1:0]           line_active;
  logic [$clog2(NLINE+1)-1:0] active_count;
  logic ev_idle, ev_on, ev_off_others, ev_off_all, ev_off_suppressed, ev_tag_compare;
  logic ev_way_reuse, ev_miss, ev_drowsy_err, ev_lookup, ev_pred_taken;
  logic ev_bb_update, ev_bb_freeze, ev_bbsize_write;

  pfsdic_top #(
    .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .WORDS(WORDS), .WAKEUP(WAKEUP)
  ) u_dut (
    .clk, .rst_n,
    .if_valid, .if_instr, .if_addr, .if_kill,
    .id_valid, .id_pc, .id_next_pc, .id_is_branch, .id_taken, .id_target,
    .mem_req, .mem_addr, .mem_rvalid, .mem_rdata,
    .bus_valid, .bus_addr, .line_active, .active_count,
    .ev_idle, .ev_on, .ev_off_others, .ev_off_all, .ev_off_suppressed,
    .ev_tag_compare, .ev_way_reuse, .ev_miss, .ev_drowsy_err,
    .ev_lookup, .ev_pred_taken, .ev_bb_update, .ev_bb_freeze, .ev_bbsize_write
  );

  int checks = 0;
  int failures = 0;

  // ---------------------------------------------------------------- program
  // Word encoding (test only): bit 31 = branch; bits 30:28 kind; bits 27:24
  // loop count; bits 15:0 target word index. Other words hold their own index.
  word_t prog [PROG_WORDS];
  int    loop_cnt [PROG_WORDS];
  bit    alt_state [PROG_WORDS];

  function automatic word_t mem_word(addr_t a);
    int unsigned wi = a[31:2];
    if (wi < PROG_WORDS) return prog[wi];
    return {1'b0, a[31:1]};
  endfunction

  initial begin
    int i, blk, br, kind, tgt;
    void'($urandom(23));
    i = 0;
    while (i < PROG_WORDS - 1) begin
      blk = ($urandom_range(0, 7) == 0) ? $urandom_range(12, 30) : $urandom_range(1, 9);
      br  = i + blk - 1;
      if (br >= PROG_WORDS - 1) br = PROG_WORDS - 2;
      for (int k = i; k < br; k++) prog[k] = {1'b0, 31'(k)};
      kind = $urandom_range(0, 9);
      if (kind < 4) begin        // counted loop backwards
        tgt = br - $urandom_range(1, 40);
        if (tgt < 0) tgt = 0;
        prog[br] = {1'b1, 3'd0, 4'($urandom_range(1, 6)), 8'h00, 16'(tgt)};
      end else begin
        tgt = $urandom_range(0, PROG_WORDS - 1);
        unique case (kind)
          4, 5:    prog[br] = {1'b1, 3'd1, 4'd0, 8'h00, 16'(tgt)};   // alternating
          6:       prog[br] = {1'b1, 3'd2, 4'd0, 8'h00, 16'(tgt)};   // jump
          7, 8:    prog[br] = {1'b1, 3'd3, 4'd0, 8'h00, 16'(tgt)};   // biased random
          default: prog[br] = {1'b1, 3'd4, 4'd0, 8'h00, 16'(tgt)};   // never taken
        endcase
      end
      i = br + 1;
    end
    prog[PROG_WORDS-1] = {1'b1, 3'd2, 4'd0, 8'h00, 16'd0};           // wrap to 0
    for (int k = 0; k < PROG_WORDS; k++) begin
      loop_cnt[k]  = 0;
      alt_state[k] = 1'b0;
    end
  end

  // architectural step: true successor of the instruction at pc
  task automatic arch_step(input addr_t pc, output addr_t nxt, output logic isb,
                           output logic tk, output addr_t tg);
    word_t w = mem_word(pc);
    int unsigned wi = pc[31:2];
    isb = w[31];
    tk  = 1'b0;
    tg  = {14'd0, w[15:0], 2'b00};
    if (isb) begin
      unique case (w[30:28])
        3'd0: begin
          if (loop_cnt[wi] < int'(w[27:24])) begin loop_cnt[wi]++; tk = 1'b1; end
          else loop_cnt[wi] = 0;
        end
        3'd1: begin alt_state[wi] = ~alt_state[wi]; tk = alt_state[wi]; end
        3'd2: tk = 1'b1;
        3'd3: tk = ($urandom_range(0, 99) < 85);
        default: tk = 1'b0;
      endcase
    end
    nxt = tk ? tg : pc + 32'd4;
  endtask

  // ------------------------------------------------------- pipeline model
  addr_t arch_pc = '0;
  int    retired = 0;
  int    cyc = 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
    end else if (if_valid && !if_kill) begin
      addr_t nx, tg;
      logic  isb, tk;
      checks++;
      if (if_addr != arch_pc || if_instr != mem_word(if_addr)) begin
        failures++;
        $display("FAIL cycle %0d: ID gets %h/%h, program flow expects %h/%h",
                 cyc, if_addr, if_instr, arch_pc, mem_word(arch_pc));
      end
      arch_step(if_addr, nx, isb, tk, tg);
      id_valid     <= 1'b1;
      id_pc        <= if_addr;
      id_next_pc   <= nx;
      id_is_branch <= isb;
      id_taken     <= tk;
      id_target    <= tg;
      arch_pc      <= nx;
      retired++;
    end else begin
      id_valid <= 1'b0;
    end
  end

  // ---------------------------------------------------------- memory model
  int    mem_wait = -1;
  int    mem_idx  = 0;
  addr_t mem_base;
  always_ff @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (mem_req) begin
      if (mem_wait < 0) begin
        mem_wait <= MEM_LAT;
        mem_idx  <= 0;
        mem_base <= mem_addr;
      end else if (mem_wait > 0) begin
        mem_wait <= mem_wait - 1;
      end else if (mem_idx < int'(WORDS)) begin
        mem_rvalid <= 1'b1;
        mem_rdata  <= mem_word(mem_base + addr_t'(mem_idx * 4));
        mem_idx    <= mem_idx + 1;
      end
    end else begin
      mem_wait <= -1;
    end
  end

  // ---------------------------------------------------------- bookkeeping
  int n_kill, n_pred_taken, n_bb_update, n_bb_freeze, n_bbs_write, n_lookup;
  int n_on, n_off_others, n_off_all, n_off_supp, n_tagcmp, n_wayreuse, n_miss;
  int n_idle, n_drowsy;
  int kill_at = -1, hold_end_at = -1, first_miss_at = -1;
  int max_active = 0;
  longint active_sum = 0;
  int n_lat_checked = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      active_sum <= active_sum + active_count;
      if (int'(active_count) > max_active) max_active <= active_count;
      if (int'(active_count) > int'((LAT + 1) * WAYS)) begin
        failures++; checks++;
        $display("FAIL cycle %0d: %0d lines active", cyc, active_count);
      end
      if ($countones(line_active) != int'(active_count)) begin
        failures++; checks++;
        $display("FAIL cycle %0d: active line map and count disagree", cyc);
      end
      if (if_kill)           n_kill++;
      if (ev_pred_taken)     n_pred_taken++;
      if (ev_bb_update)      n_bb_update++;
      if (ev_bb_freeze)      n_bb_freeze++;
      if (ev_bbsize_write)   n_bbs_write++;
      if (ev_lookup)         n_lookup++;
      if (ev_on)             n_on++;
      if (ev_off_others)     n_off_others++;
      if (ev_off_all)        n_off_all++;
      if (ev_off_suppressed) n_off_supp++;
      if (ev_tag_compare)    n_tagcmp++;
      if (ev_way_reuse)      n_wayreuse++;
      if (ev_miss)           n_miss++;
      if (ev_idle)           n_idle++;
      if (ev_drowsy_err) begin
        n_drowsy++; failures++;
        $display("FAIL cycle %0d: read of a line that is not awake", cyc);
      end
      if (ev_miss && first_miss_at < 0) begin
        first_miss_at <= cyc;
        checks++;
        if (cyc != int'(LAT)) begin
          failures++;
          $display("FAIL first fetch reached the cache top at clock %0d, expected %0d", cyc, LAT);
        end
      end
      // latency after a wrong prediction / after a refill
      if (if_kill) begin
        kill_at <= cyc; hold_end_at <= -1;
      end else if (ev_miss) begin
        kill_at <= -1; hold_end_at <= -1;
      end else if (if_valid) begin
        if (kill_at >= 0) begin
          checks++; n_lat_checked++;
          if (cyc - kill_at != int'(LAT + 1)) begin
            failures++;
            $display("FAIL cycle %0d: %0d clocks from kill to next fetch, expected %0d",
                     cyc, cyc - kill_at, LAT + 1);
          end
        end
        if (hold_end_at >= 0) begin
          checks++; n_lat_checked++;
          if (cyc - hold_end_at != int'(LAT)) begin
            failures++;
            $display("FAIL cycle %0d: %0d clocks from refill end to fetch, expected %0d",
                     cyc, cyc - hold_end_at, LAT);
          end
        end
        kill_at <= -1; hold_end_at <= -1;
      end
      if (u_dut.u_cache.hold == 1'b0 && hold_q == 1'b1) hold_end_at <= cyc;
    end
  end
  logic hold_q = 1'b0;
  always_ff @(posedge clk) hold_q <= u_dut.u_cache.hold;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (retired < int'(N_INSTR) && cyc < int'(MAX_CYCLES)) @(posedge clk);
    if (retired < int'(N_INSTR)) begin
      failures++;
      $display("FAIL only %0d instructions retired in %0d clocks", retired, cyc);
    end
    need("wrong prediction (DIC reset)", n_kill);
    need("BBSize-predicted taken branch", n_pred_taken);
    need("BBFIFO Update flag", n_bb_update);
    need("BBFIFO Freeze flag", n_bb_freeze);
    need("BBSize write", n_bbs_write);
    need("one-per-block BTB lookup", n_lookup);
    need("ON all ways of a set", n_on);
    need("OFF other ways (head at top)", n_off_others);
    need("OFF all ways (trail at top)", n_off_all);
    need("OFF held back for a younger element", n_off_supp);
    need("head tag compare", n_tagcmp);
    need("Way# reuse without tag compare", n_wayreuse);
    need("cache miss and refill", n_miss);
    need("idle pipeline clock", n_idle);
    need("latency measured after kill or refill", n_lat_checked);
    $display("config: %0d bytes, %0d way(s), %0d words/line, wakeup %0d, LAT %0d",
             CACHE_BYTES, WAYS, WORDS, WAKEUP, LAT);
    $display("retired %0d instructions in %0d clocks; kills %0d, misses %0d, idle clocks %0d",
             retired, cyc, n_kill, n_miss, n_idle);
    $display("predicted-taken %0d, lookups %0d, BB update %0d, freeze %0d, BBSize writes %0d",
             n_pred_taken, n_lookup, n_bb_update, n_bb_freeze, n_bbs_write);
    $display("ON %0d, OFF-others %0d, OFF-all %0d, OFF held %0d, tag compares %0d, Way# reuse %0d",
             n_on, n_off_others, n_off_all, n_off_supp, n_tagcmp, n_wayreuse);
    $display("active lines: max %0d, average %0.3f of %0d",
             max_active, real'(active_sum) / real'(cyc), NLINE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (MAX_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
