// pfsdic_top -- program-flow-sensitive drowsy instruction cache, CPU-side
// additions and I-cache side joined together.
//
// The CPU side drives one predicted instruction address per clock onto the
// instruction address bus, a wakeup latency (LAT = WAKEUP + 1 clocks) before
// the pipeline's IF stage needs the instruction. The I-cache side wakes the
// line of a new address as it arrives and delivers the instruction LAT clocks
// later on the data bus (if_*). The pipeline's ID stage reports the true
// successor of every instruction (id_*); a mismatch with the address that was
// predicted for the instruction now in IF raises if_kill (the DIC reset): the
// IF instruction is killed, both FIFOs are flushed, every line goes drowsy and
// the flow restarts at the true address LAT + 1 clocks before the next
// instruction arrives. Misses refill the line over the mem_* port.
//
// The host pipeline (MIPS five-stage, branches resolved in ID) and memory are
// outside this module; their signals are ports.
//   if_valid/if_instr/if_addr : instruction for IF this clock (ignore it when
//                               if_kill is high)
//   id_*                      : instruction in ID (valid, its address, true
//                               next address, branch flag, outcome, target)
//   mem_*                     : line refill, mem_rvalid words in order
//   line_active/active_count  : which lines are at the active supply, and how
//                               many (line index = set * WAYS + way)
//   ev_*                      : one-clock event flags for statistics
// Parameters default to the basic configuration: 32 KB, direct mapped, 16
// words per line, 1 clock wakeup time (+1 clock circuit delay). BTB_ENTRIES
// and BBSIZE_W are this design's choices (BBSize of 9 bits covers the largest
// basic block of 352 instructions in the benchmark statistics).
// Notes on tool reports: mem_addr always points at the start of a line, so its
// low offset bits are constant zero. Verilator reports rst_n as used both
// synchronously and asynchronously (SYNCASYNCNET) because the instruction
// word storage has no reset while the control state has an asynchronous one;
// the storage is only read after a refill has written it and marked the line
// valid, so leaving it unreset is intended.
module pfsdic_top
  import pfsdic_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 1,
  parameter int unsigned WORDS       = 16,
  parameter int unsigned WAKEUP      = 1,
  parameter int unsigned BTB_ENTRIES = 256,
  parameter int unsigned BBSIZE_W    = 9,
  parameter addr_t       RESET_PC    = '0,
  localparam int unsigned LAT   = WAKEUP + 1,
  localparam int unsigned NLINE = CACHE_BYTES / (WORDS * 4)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // IF
  output logic                       if_valid,
  output word_t                      if_instr,
  output addr_t                      if_addr,
  output logic                       if_kill,
  // ID
  input  logic                       id_valid,
  input  addr_t                      id_pc,
  input  addr_t                      id_next_pc,
  input  logic                       id_is_branch,
  input  logic                       id_taken,
  input  addr_t                      id_target,
  // memory
  output logic                       mem_req,
  output addr_t                      mem_addr,
  input  logic                       mem_rvalid,
  input  word_t                      mem_rdata,
  // status
  output logic                       bus_valid,
  output addr_t                      bus_addr,
  output logic [NLINE-1:0]           line_active,
  output logic [$clog2(NLINE+1)-1:0] active_count,
  output logic                       ev_idle,
  output logic                       ev_on,
  output logic                       ev_off_others,
  output logic                       ev_off_all,
  output logic                       ev_off_suppressed,
  output logic                       ev_tag_compare,
  output logic                       ev_way_reuse,
  output logic                       ev_miss,
  output logic                       ev_drowsy_err,
  output logic                       ev_lookup,
  output logic                       ev_pred_taken,
  output logic                       ev_bb_update,
  output logic                       ev_bb_freeze,
  output logic                       ev_bbsize_write
);

  logic       dic_reset, restart, hold;
  addr_t      restart_pc;
  logic       pta_top_valid;
  addr_t      pta_top_addr;

  pfsdic_cpu_side #(
    .LAT(LAT), .BTB_ENTRIES(BTB_ENTRIES), .BBSIZE_W(BBSIZE_W), .RESET_PC(RESET_PC)
  ) u_cpu (
    .clk, .rst_n,
    .id_valid, .id_pc, .id_next_pc, .id_is_branch, .id_taken, .id_target,
    .bus_valid, .bus_addr, .dic_reset, .pta_top_valid, .pta_top_addr,
    .restart, .restart_pc, .hold,
    .ev_lookup, .ev_pred_taken, .ev_bb_update, .ev_bb_freeze, .ev_bbsize_write
  );

  pfsdic_cache_side #(
    .CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .WORDS(WORDS), .WAKEUP(WAKEUP)
  ) u_cache (
    .clk, .rst_n, .bus_valid, .bus_addr, .dic_reset,
    .data_valid(if_valid), .data(if_instr), .data_addr(if_addr),
    .restart, .restart_pc, .hold,
    .mem_req, .mem_addr, .mem_rvalid, .mem_rdata,
    .line_active, .active_count,
    .ev_idle, .ev_on, .ev_off_others, .ev_off_all, .ev_off_suppressed,
    .ev_tag_compare, .ev_way_reuse, .ev_miss, .ev_drowsy_err
  );

  assign if_kill = dic_reset;

  // The content on the data bus always belongs to the address on top of the
  // Predictive Tracing Address FIFO.
  a_data_tracks_pta: assert property (@(posedge clk) disable iff (!rst_n)
    if_valid |-> (pta_top_valid && pta_top_addr == if_addr));

endmodule
