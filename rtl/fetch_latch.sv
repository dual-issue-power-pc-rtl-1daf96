// fetch_latch: the ICA/ICH pipeline register and the hit logic of stage ICH.
//
// It registers the fetch group of pc_select together with the instruction
// cache entry read for it (line, tag, valid bit) and the prediction. In the
// next cycle it decides whether the line is in the instruction cache or, if
// not, in the stream buffer, and passes the selected line to the instruction
// buffer with a mask of the valid slots and the prediction for the last slot.
// A group found in neither raises a miss (the stream unit starts fetching) and
// is replayed by pc_select. When the instruction buffer is full the latch holds
// its group. A redirect empties it.
//
// The ICA/ICH stage boundary follows the PUMA pipeline; replaying a missed group
// from pc_select is this design's choice.
module fetch_latch
  import puma_pkg::*;
#(
  parameter int unsigned ITAG_W = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         redirect,
  // from stage ICA
  input  logic         in_valid,
  input  logic [31:0]  in_pc,
  input  logic [1:0]   in_last,
  input  logic         in_pred,
  input  logic [31:0]  in_target,
  input  logic [BPIDX_W-1:0] in_bp_idx,
  input  logic [127:0] ic_line,
  input  logic [ITAG_W-1:0] ic_tag,
  input  logic         ic_valid,
  // stream buffer lookup
  output logic         sb_lookup,
  output logic [31:0]  sb_addr,
  input  logic         sb_hit,
  input  logic [127:0] sb_line,
  // to instruction buffer
  output logic         ib_push,
  output logic [31:0]  ib_pc,
  output logic [127:0] ib_line,
  output logic [3:0]   ib_mask,
  output logic         ib_pred,
  output logic [31:0]  ib_target,
  output logic [BPIDX_W-1:0] ib_bp_idx,
  input  logic         ib_ready,
  // to pc_select
  output logic         miss,
  output logic         hold
);
  typedef struct packed {
    logic               valid;
    logic [31:0]        pc;
    logic [1:0]         last;
    logic               pred;
    logic [31:0]        target;
    logic [BPIDX_W-1:0] bp_idx;
    logic [127:0]       line;
    logic [ITAG_W-1:0]   tag;
    logic               tvalid;
  } latch_t;

  latch_t l;
  wire ic_hit = l.tvalid && (l.tag == l.pc[31:32-ITAG_W]);

  assign sb_lookup = l.valid && !ic_hit;
  assign sb_addr   = l.pc;
  wire   have      = ic_hit || sb_hit;
  assign miss      = l.valid && !have && !redirect;
  assign hold      = l.valid && have && !ib_ready;
  assign ib_push   = l.valid && have && ib_ready && !redirect;
  assign ib_pc     = l.pc;
  assign ib_line   = ic_hit ? l.line : sb_line;
  assign ib_pred   = l.pred;
  assign ib_target = l.target;
  assign ib_bp_idx = l.bp_idx;
  always_comb
    for (int s = 0; s < 4; s++)
      ib_mask[s] = (2'(s) >= l.pc[3:2]) && (2'(s) <= l.last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l <= '0;
    else if (redirect || miss) l <= '0;
    else if (!hold)
      l <= '{valid: in_valid, pc: in_pc, last: in_last, pred: in_pred,
             target: in_target, bp_idx: in_bp_idx, line: ic_line, tag: ic_tag,
             tvalid: ic_valid};
  end
endmodule
