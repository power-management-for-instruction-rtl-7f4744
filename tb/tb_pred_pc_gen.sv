// tb_pred_pc_gen -- checks the predicted-PC generator against a reference
// model. The testbench holds a small BTB model (branches at fixed addresses
// with random targets and directions), asks for next-branch lookups at random
// distances ahead of the PC and mixes in redirects and hold clocks. Checked
// each clock: the bus address, bus valid, the BBFIFO push and the taken jump
// at the branch address.
`timescale 1ns/1ps
module tb_pred_pc_gen;
  import pfsdic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic redirect = 0, hold = 0, calc_valid = 0;
  addr_t redirect_pc = '0, calc_addr = '0, lk_addr, lk_target, bus_addr;
  logic lk_hit, lk_taken, push_valid, push_pred, bus_valid, ev_lookup, ev_pred_taken;
  logic [7:0] lk_index, push_index;
  int checks = 0, failures = 0, n_jump = 0, n_push = 0;

  // BTB model: a branch in every 8th word of the first 1 KB
  addr_t b_tgt [32];
  bit    b_tkn [32];
  always_comb begin
    lk_hit    = (lk_addr[4:2] == 3'd7) && (lk_addr < 32'h400);
    lk_index  = lk_addr[9:2];
    lk_target = b_tgt[lk_addr[9:5]];
    lk_taken  = b_tkn[lk_addr[9:5]];
  end

  pred_pc_gen #(.IDX_W(8)) dut (.*);

  // reference model state
  addr_t m_pc = '0, m_paddr = '0, m_naddr = '0, m_ntgt = '0;
  bit m_pend = 0, m_nv = 0, m_nhit = 0, m_ntkn = 0;

  initial begin
    for (int i = 0; i < 32; i++) begin
      b_tgt[i] = {$urandom_range(0, 255), 2'b00};
      b_tkn[i] = $urandom_range(0, 1);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 5000; c++) begin
      bit ev, eh, et, atb;
      addr_t ea, etg, npc;
      @(negedge clk);
      redirect    = ($urandom_range(0, 29) == 0);
      redirect_pc = {$urandom_range(0, 255), 2'b00};
      hold        = ($urandom_range(0, 9) == 0);
      calc_valid  = ($urandom_range(0, 5) == 0);
      calc_addr   = ((m_pc | 32'h1c) + 32'(32 * $urandom_range(0, 2))) & 32'h3ff;
      if (c % 97 == 0) for (int i = 0; i < 32; i++) b_tkn[i] = $urandom_range(0, 1);
      #1;
      ev  = m_pend || m_nv;
      ea  = m_pend ? m_paddr : m_naddr;
      eh  = m_pend ? ((m_paddr[4:2] == 3'd7) && (m_paddr < 32'h400)) : m_nhit;
      et  = m_pend ? b_tkn[m_paddr[9:5]] : m_ntkn;
      etg = m_pend ? b_tgt[m_paddr[9:5]] : m_ntgt;
      atb = ev && eh && (m_pc == ea) && !hold;
      npc = (atb && et) ? etg : m_pc + 4;
      checks++;
      if (bus_valid != !hold || bus_addr != m_pc || ev_lookup != m_pend ||
          push_valid != (m_pend && eh) || (push_valid && (push_index != m_paddr[9:2] || push_pred != et)) ||
          ev_pred_taken != (atb && et)) begin
        failures++;
        $display("FAIL clock %0d bus %h/%h push %b", c, bus_addr, m_pc, push_valid);
      end
      if (atb && et) n_jump++;
      if (push_valid) n_push++;
      @(posedge clk);
      if (m_pend) begin m_nv = 1; m_naddr = m_paddr; m_nhit = eh; m_ntkn = et; m_ntgt = etg; end
      else if (redirect) m_nv = 0;
      m_pend = calc_valid;
      if (calc_valid) m_paddr = calc_addr;
      if (redirect) m_pc = redirect_pc;
      else if (!hold) m_pc = npc;
    end
    checks++;
    if (n_jump == 0 || n_push == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
