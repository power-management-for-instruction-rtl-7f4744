// tb_stage_master -- checks the stage enables and the OFF conflict rule for
// random FIFO contents (LAT = 2, 16-word lines, 512 sets).
`timescale 1ns/1ps
module tb_stage_master;
  import pfsdic_pkg::*;
  localparam int LAT = 2;
  pcl_entry_t elem [0:LAT];
  logic dic_reset, flush, xmit_en, on_en, off_en, idle, ev_off_suppressed;
  int checks = 0, failures = 0, n_conf = 0;

  stage_master #(.LAT(LAT), .OFF_W(6), .SET_W(9)) dut (
    .elem, .dic_reset, .flush, .xmit_en, .on_en, .off_en, .idle, .ev_off_suppressed);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic conf, e_off;
      int sel;
      addr_t base = $urandom();
      for (int k = 0; k <= LAT; k++) begin
        elem[k].valid = ($urandom_range(0, 4) != 0);
        sel = $urandom_range(0, 2);
        case (sel)
          0: elem[k].addr = {base[31:6], 6'($urandom())};               // same line
          1: elem[k].addr = {18'($urandom()), base[14:6], 6'($urandom())}; // same set
          default: elem[k].addr = $urandom();
        endcase
        elem[k].wl = word_loc_e'($urandom_range(0, 3));
      end
      dic_reset = ($urandom_range(0, 9) == 0);
      flush     = dic_reset || ($urandom_range(0, 9) == 0);
      #1;
      conf = 0;
      for (int k = 0; k < LAT; k++)
        if (elem[k].valid && elem[k].addr[14:6] == elem[LAT].addr[14:6] &&
            (is_trail(elem[LAT].wl) || elem[k].addr[31:6] != elem[LAT].addr[31:6])) conf = 1;
      if (conf && elem[LAT].valid && !flush) n_conf++;
      e_off = elem[LAT].valid && !flush && !conf;
      checks++;
      if (xmit_en != (elem[LAT].valid && !dic_reset) || on_en != !flush || off_en != e_off ||
          idle != !elem[LAT].valid) begin
        failures++; $display("FAIL case %0d: xmit %0b on %0b off %0b idle %0b", i, xmit_en, on_en, off_en, idle);
      end
    end
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no conflict case generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
