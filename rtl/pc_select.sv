// pc_select: fetch-address register and next-PC selection (stage ICA).
//
// The current fetch address indexes the instruction cache, the branch target
// buffer and the branch predictor in the same cycle. The next address is, by
// priority: the redirect address of an exception from the core; the address
// of a group that missed in the next stage (replayed); the current address when
// the next stage stalls; the predicted target when the BTB hits and the branch
// is unconditional or predicted taken; otherwise the next sequential line.
// The unit also describes the fetch group: the word slots from the fetch
// address to the end of the line, or to the predicted-taken branch.
//
// Follows the document's description of pc_select (exception, branch predictor
// and BTB decide the next PC); the group encoding is this design's own.
module pc_select
  import puma_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,            // start-up initialisation finished
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  input  logic        replay,
  input  logic [31:0] replay_pc,
  input  logic        hold,
  // predictors
  input  logic        btb_hit,
  input  logic [1:0]  btb_slot,
  input  logic [31:0] btb_target,
  input  logic        btb_uncond,
  input  logic        bp_taken,
  output logic [31:0] bp_pc,          // address of the predicted branch
  // current group
  output logic        pc_valid,
  output logic [31:0] pc,
  output logic [1:0]  last_slot,
  output logic        pred_taken,
  output logic [31:0] pred_target
);
  assign bp_pc       = {pc[31:4], btb_slot, 2'b00};
  assign pred_taken  = btb_hit && (btb_uncond || bp_taken);
  assign pred_target = btb_target;
  assign last_slot   = pred_taken ? btb_slot : 2'd3;
  assign pc_valid    = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              pc <= RESET_PC;
    else if (!run)           pc <= RESET_PC;
    else if (redirect)       pc <= redirect_pc;
    else if (replay)         pc <= replay_pc;
    else if (hold)           pc <= pc;
    else if (pred_taken)     pc <= pred_target;
    else                     pc <= {pc[31:4] + 28'd1, 4'h0};
  end
endmodule
