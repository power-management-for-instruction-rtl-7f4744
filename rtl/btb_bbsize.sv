// btb_bbsize -- branch target buffer with a basic-block-size (BBSize) field.
//
// Each entry holds: valid, branch tag, target address, 2-bit saturating
// predictor and one BBSize field (valid bit + count). BBSize is the number of
// instructions that follow the entry's predicted successor (its target when
// predicted taken, its fall-through otherwise) up to the next branch, so the
// next branch address is successor + 4*BBSize. A cleared BBSize valid bit is
// the "null" BBSize.
//
// Ports
//   lk_*   : lookup port of the predictive PC generator (combinational read).
//   rs_*   : resolve port of the branch unit at the end of ID. On rs_valid the
//            entry of rs_pc is updated (hit) or entered (miss, every branch is
//            entered). rs_old_pred / rs_new_pred / rs_bbs_valid / rs_index
//            describe that entry before and after the update in the same cycle.
//   bw_*   : BBSize write port driven by the BBFIFO.
// Timing: reads are combinational, writes take effect at the next clock edge.
//
// From the document: the fields, the 2-bit predictor, entering all branches
// (basic configuration) and one BBSize field per entry. This design's own
// choices: direct-mapped organisation with BTB_ENTRIES entries, new entries
// start weakly taken / weakly not-taken according to the outcome, the predictor
// state itself is the prediction (MSB), and BBSize is cleared when an entry is
// replaced.
// Lint notes: the index/tag helper functions each use only part of the
// address, the lookup port does not need the BBSize field and the resolve port
// does not need the stored target, so verilator reports those bits as unused.
module btb_bbsize
  import pfsdic_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 256,
  parameter int unsigned BBSIZE_W    = 9
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // lookup port
  input  addr_t                          lk_addr,
  output logic                           lk_hit,
  output logic [$clog2(BTB_ENTRIES)-1:0] lk_index,
  output addr_t                          lk_target,
  output logic                           lk_taken,
  // resolve port
  input  logic                           rs_valid,
  input  addr_t                          rs_pc,
  input  logic                           rs_taken,
  input  addr_t                          rs_target,
  output logic [$clog2(BTB_ENTRIES)-1:0] rs_index,
  output logic                           rs_hit,
  output logic                           rs_old_pred,
  output logic                           rs_new_pred,
  output logic                           rs_bbs_valid,
  output logic [BBSIZE_W-1:0]            rs_bbsize,
  // BBSize write port
  input  logic                           bw_valid,
  input  logic [$clog2(BTB_ENTRIES)-1:0] bw_index,
  input  logic [BBSIZE_W-1:0]            bw_bbsize
);

  localparam int unsigned IDX_W = $clog2(BTB_ENTRIES);
  localparam int unsigned TAG_W = ADDR_W - 2 - IDX_W;

  typedef struct packed {
    logic                valid;
    logic [TAG_W-1:0]    tag;
    addr_t               target;
    logic [1:0]          ctr;
    logic                bbs_valid;
    logic [BBSIZE_W-1:0] bbsize;
  } btb_entry_t;

  btb_entry_t mem [BTB_ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(addr_t a);
    return a[IDX_W+1:2];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(addr_t a);
    return a[ADDR_W-1:IDX_W+2];
  endfunction

  // lookup
  btb_entry_t lk_e;
  always_comb begin
    lk_index     = idx_of(lk_addr);
    lk_e         = mem[lk_index];
    lk_hit       = lk_e.valid && (lk_e.tag == tag_of(lk_addr));
    lk_target    = lk_e.target;
    lk_taken     = lk_e.ctr[1];
  end

  // resolve
  btb_entry_t rs_e;
  logic [1:0] rs_ctr_next;
  always_comb begin
    rs_index = idx_of(rs_pc);
    rs_e     = mem[rs_index];
    rs_hit   = rs_e.valid && (rs_e.tag == tag_of(rs_pc));
    if (rs_hit) begin
      if (rs_taken) rs_ctr_next = (rs_e.ctr == 2'b11) ? 2'b11 : rs_e.ctr + 2'b01;
      else          rs_ctr_next = (rs_e.ctr == 2'b00) ? 2'b00 : rs_e.ctr - 2'b01;
      rs_old_pred  = rs_e.ctr[1];
      rs_bbs_valid = rs_e.bbs_valid;
    end else begin
      rs_ctr_next  = rs_taken ? 2'b10 : 2'b01;
      rs_old_pred  = 1'b0;            // a missing branch was predicted not taken
      rs_bbs_valid = 1'b0;
    end
    rs_bbsize   = rs_e.bbsize;
    rs_new_pred = rs_ctr_next[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BTB_ENTRIES; i++) mem[i] <= '0;
    end else begin
      if (rs_valid) begin
        mem[rs_index].valid  <= 1'b1;
        mem[rs_index].tag    <= tag_of(rs_pc);
        mem[rs_index].ctr    <= rs_ctr_next;
        if (rs_taken || !rs_hit) mem[rs_index].target <= rs_target;
        if (!rs_hit) mem[rs_index].bbs_valid <= 1'b0;
      end
      // A BBSize write to the entry being replaced in the same clock loses.
      if (bw_valid && !(rs_valid && !rs_hit && rs_index == bw_index)) begin
        mem[bw_index].bbs_valid <= 1'b1;
        mem[bw_index].bbsize    <= bw_bbsize;
      end
    end
  end

endmodule
