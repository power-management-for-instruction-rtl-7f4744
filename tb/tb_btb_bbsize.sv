// tb_btb_bbsize -- checks the BTB (16 entries) against a reference model:
// random resolves (insert on miss, 2-bit counter update, target update),
// BBSize writes, replacement clearing BBSize, and lookups of random and
// known branch addresses.
`timescale 1ns/1ps
module tb_btb_bbsize;
  import pfsdic_pkg::*;
  localparam int N = 16, BW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  addr_t lk_addr = '0, rs_pc = '0, rs_target = '0, lk_target;
  logic lk_hit, lk_taken, rs_valid = 0, rs_taken = 0, rs_hit;
  logic rs_old_pred, rs_new_pred, rs_bbs_valid, bw_valid = 0;
  logic [3:0] lk_index, rs_index, bw_index = 0;
  logic [BW-1:0] rs_bbsize, bw_bbsize = 0;
  int checks = 0, failures = 0;

  typedef struct { bit v; addr_t pc; addr_t tgt; int ctr; bit bv; int bs; } ent_t;
  ent_t m [N];
  addr_t pool [8];

  btb_bbsize #(.BTB_ENTRIES(N), .BBSIZE_W(BW)) dut (.*);

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) m[i] = '{0, 0, 0, 0, 0, 0};
    for (int i = 0; i < 8; i++) pool[i] = {$urandom()} & 32'h0000_0ffc;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 4000; c++) begin
      int li, ri;
      bit hit;
      @(negedge clk);
      lk_addr   = ($urandom_range(0, 3) != 0) ? pool[$urandom_range(0, 7)] : ($urandom() & 32'hffff_fffc);
      rs_valid  = ($urandom_range(0, 1) == 0);
      rs_pc     = pool[$urandom_range(0, 7)];
      rs_taken  = $urandom_range(0, 1);
      rs_target = $urandom() & 32'hffff_fffc;
      bw_valid  = ($urandom_range(0, 2) == 0);
      bw_index  = 4'($urandom());
      bw_bbsize = BW'($urandom());
      #1;
      li  = lk_addr[5:2];
      hit = m[li].v && m[li].pc[31:6] == lk_addr[31:6];
      chk(lk_hit == hit && lk_index == 4'(li), $sformatf("lookup %h hit", lk_addr));
      if (hit) chk(lk_target == m[li].tgt && lk_taken == (m[li].ctr >= 2),
                   $sformatf("lookup %h fields", lk_addr));
      ri  = rs_pc[5:2];
      hit = m[ri].v && m[ri].pc[31:6] == rs_pc[31:6];
      chk(rs_hit == hit && rs_index == 4'(ri), "resolve hit");
      if (hit) chk(rs_old_pred == (m[ri].ctr >= 2) && rs_bbs_valid == m[ri].bv && (!m[ri].bv || int'(rs_bbsize) == m[ri].bs),
               "resolve old state");
      @(posedge clk);
      if (rs_valid) begin
        if (hit) begin
          m[ri].ctr = rs_taken ? (m[ri].ctr == 3 ? 3 : m[ri].ctr + 1) : (m[ri].ctr == 0 ? 0 : m[ri].ctr - 1);
          if (rs_taken) m[ri].tgt = rs_target;
        end else begin
          m[ri] = '{1, rs_pc, rs_target, rs_taken ? 2 : 1, 0, 0};
        end
      end
      if (bw_valid && !(rs_valid && !hit && int'(bw_index) == ri)) begin
        m[bw_index].bv = 1; m[bw_index].bs = int'(bw_bbsize);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
