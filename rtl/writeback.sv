// writeback: the write back unit (stage W2), which commits instructions in
// order.
//
// It looks at the two oldest reorder buffer entries. The oldest commits when it
// has completed; the second also commits when it has completed, the first
// raised no exception, and not both are branches (the predictors have one
// update port). Committed values go to the register file through its two write
// ports. If both instructions write the same register only the younger one
// does (the document's dependency check). A committed branch trains the
// pattern history table. A committed exception, which here is a mispredicted
// branch, flushes all speculative state and redirects fetch to the resolved
// address. It also shifts the outcome into the branch history and writes the
// branch target buffer when the branch was taken. An exception on a non-branch
// (a stale BTB hit) removes that BTB entry.
// Purely combinational; the register file writes on the following falling edge.
module writeback
  import puma_pkg::*;
(
  input  rob_ent_t    h [2],
  output logic [1:0]  commit,
  output logic        rf_we0,
  output ridx_t       rf_wa0,
  output logic [31:0] rf_wd0,
  output logic        rf_we1,
  output ridx_t       rf_wa1,
  output logic [31:0] rf_wd1,
  output logic        flush,
  output logic [31:0] redirect_pc,
  output logic        pht_we,
  output logic [BPIDX_W-1:0] pht_idx,
  output logic        pht_taken,
  output logic        bhr_we,
  output logic        bhr_taken,
  output logic        btb_we,
  output logic [31:0] btb_pc,
  output logic [31:0] btb_target,
  output logic        btb_uncond,
  output logic        btb_valid
);
  logic c0, c1;
  rob_ent_t b;       // the committed branch / exception, if any

  always_comb begin
    c0 = h[0].valid && h[0].done;
    c1 = c0 && !h[0].exc && h[1].valid && h[1].done && !(h[0].is_br && h[1].is_br);
    commit = c1 ? 2'd2 : c0 ? 2'd1 : 2'd0;

    rf_we1 = c1 && h[1].dst_v;
    rf_wa1 = h[1].dst; rf_wd1 = h[1].value;
    rf_we0 = c0 && h[0].dst_v && !(rf_we1 && h[1].dst == h[0].dst);
    rf_wa0 = h[0].dst; rf_wd0 = h[0].value;

    b = (c0 && (h[0].is_br || h[0].exc)) ? h[0] : h[1];
    flush = (c0 && h[0].exc) || (c1 && h[1].exc);
    redirect_pc = b.target;

    pht_we    = ((c0 && h[0].is_br) || (c1 && h[1].is_br)) && b.cond;
    pht_idx   = b.bp_idx;
    pht_taken = b.taken;
    bhr_we    = flush && b.is_br && b.cond;
    bhr_taken = b.taken;
    btb_we     = flush && (!b.is_br || b.taken);
    btb_pc     = b.pc;
    btb_target = b.target;
    btb_uncond = !b.cond;
    btb_valid  = b.is_br;
  end
endmodule
