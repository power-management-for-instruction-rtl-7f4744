// tb_lines_sensor -- checks the word-location marks for random address pairs,
// half of them in the same 64-byte line.
`timescale 1ns/1ps
module tb_lines_sensor;
  import pfsdic_pkg::*;
  logic new_valid;
  addr_t new_addr;
  pcl_entry_t prev;
  word_loc_e new_wl, prev_wl_next;
  logic same_line;
  int checks = 0, failures = 0;

  lines_sensor #(.OFF_W(6)) dut (.new_valid, .new_addr, .prev, .new_wl, .prev_wl_next, .same_line);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic same;
      word_loc_e e_new, e_prev;
      new_valid  = ($urandom_range(0, 7) != 0);
      prev.valid = ($urandom_range(0, 7) != 0);
      prev.addr  = $urandom();
      prev.wl    = word_loc_e'($urandom_range(0, 3));
      new_addr   = ($urandom_range(0, 1) == 0) ? {prev.addr[31:6], 6'($urandom())} : $urandom();
      #1;
      same   = new_valid && prev.valid && (new_addr / 64 == prev.addr / 64);
      e_new  = same ? WL_MEDIUM : WL_HEAD;
      e_prev = prev.wl;
      if (new_valid && prev.valid && !same) begin
        if (prev.wl == WL_HEAD) e_prev = WL_SINGLE;
        if (prev.wl == WL_MEDIUM) e_prev = WL_TRAIL;
      end
      checks++;
      if (new_wl != e_new || prev_wl_next != e_prev || same_line != same) begin
        failures++;
        $display("FAIL %h vs %h (%s): got %s/%s expected %s/%s", new_addr, prev.addr,
                 prev.wl.name(), new_wl.name(), prev_wl_next.name(), e_new.name(), e_prev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
