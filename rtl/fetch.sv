// fetch: the fetch unit, stages ICA, ICH and IB of the pipeline.
//
// pc_select holds the fetch address and forms the next one from the exception
// redirect, the branch target buffer and the gshare predictor. fetch_latch
// registers the instruction cache entry read for that address and, one cycle
// later, takes the line from the instruction cache or the stream buffer, or
// reports a miss to the stream unit. instr_buffer holds up to two lines and
// hands two instructions per cycle to the decoder.
//
// Interface: the cache, BTB, predictor and stream lookups are combinational
// ports to the units outside; the decoder sees two finst_t slots and returns a
// consume count. redirect (from write back) flushes the whole unit.
//
// Two instructions per cycle from the cache or stream buffer with BTB and gshare
// prediction follow the PUMA description; the split into three submodules and
// the replay-on-miss scheme are this design's choices.
module fetch
  import puma_pkg::*;
#(
  parameter int unsigned IC_LINES = 8192,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic         redirect,
  input  logic [31:0]  redirect_pc,
  // instruction cache
  output logic [31:0]  ic_addr,
  input  logic [127:0] ic_line,
  input  logic [31-$clog2(IC_LINES)-4:0] ic_tag,
  input  logic         ic_valid,
  // branch target buffer
  output logic [31:0]  btb_pc,
  input  logic         btb_hit,
  input  logic [1:0]   btb_slot,
  input  logic [31:0]  btb_target,
  input  logic         btb_uncond,
  // branch predictor
  output logic [31:0]  bp_pc,
  input  logic         bp_taken,
  input  logic [BPIDX_W-1:0] bp_idx,
  // stream buffer
  output logic         sb_lookup,
  output logic [31:0]  sb_addr,
  input  logic         sb_hit,
  input  logic [127:0] sb_line,
  // decoder
  output finst_t       inst [2],
  input  logic [1:0]   consume
);
  localparam int unsigned TW = 32 - $clog2(IC_LINES) - 4;

  logic        pc_valid, pred, miss, hold, ib_ready, ib_push, ib_pred;
  logic [31:0] pc, pred_target, ib_pc, ib_target;
  logic [1:0]  last_slot;
  logic [127:0] ib_line;
  logic [3:0]  ib_mask;
  logic [BPIDX_W-1:0] ib_bp_idx;
  logic [31:0] replay_pc;

  assign ic_addr = pc;
  assign btb_pc  = pc;

  pc_select #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .run, .redirect, .redirect_pc,
    .replay(miss), .replay_pc, .hold,
    .btb_hit, .btb_slot, .btb_target, .btb_uncond, .bp_taken, .bp_pc,
    .pc_valid, .pc, .last_slot, .pred_taken(pred), .pred_target);

  fetch_latch #(.ITAG_W(TW)) u_latch (
    .clk, .rst_n, .redirect,
    .in_valid(pc_valid), .in_pc(pc), .in_last(last_slot), .in_pred(pred),
    .in_target(pred_target), .in_bp_idx(bp_idx),
    .ic_line, .ic_tag, .ic_valid,
    .sb_lookup, .sb_addr, .sb_hit, .sb_line,
    .ib_push, .ib_pc, .ib_line, .ib_mask, .ib_pred, .ib_target, .ib_bp_idx,
    .ib_ready, .miss, .hold);

  assign replay_pc = sb_addr;

  instr_buffer u_ib (
    .clk, .rst_n, .flush(redirect),
    .push(ib_push), .push_pc(ib_pc), .push_line(ib_line), .push_mask(ib_mask),
    .push_pred(ib_pred), .push_target(ib_target), .push_bp_idx(ib_bp_idx),
    .ready(ib_ready), .inst, .consume);
endmodule
