// bp: gshare branch predictor.
//
// A pattern history table of PHT_ENTRIES two-bit saturating counters is
// indexed by the exclusive-or of the branch address (word address bits) and
// an HIST_W-bit global branch history register. The lookup returns the
// prediction (counter MSB) and the index used, which travels with the branch
// so that the table can be trained with the same index when the branch
// commits. Following the document, the counter is updated for every committed
// conditional branch, while the history register shifts in the real outcome
// only when the core flags an exception (a mispredicted branch).
//
// Size: 1024 two-bit counters and a 10-bit history, as the document gives.
// Counters reset to weakly not-taken (01), history to zero.
// Timing: asynchronous lookup, updates on the rising edge.
module bp #(
  parameter int unsigned PHT_ENTRIES = 1024,
  parameter int unsigned HIST_W      = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] pc,
  output logic        taken,
  output logic [HIST_W-1:0] idx,
  input  logic        upd_en,
  input  logic [HIST_W-1:0] upd_idx,
  input  logic        upd_taken,
  input  logic        hist_en,
  input  logic        hist_taken
);
  logic [1:0]        pht [PHT_ENTRIES];
  logic [HIST_W-1:0] bhr;

  assign idx   = pc[HIST_W+1:2] ^ bhr;
  assign taken = pht[idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PHT_ENTRIES); i++) pht[i] <= 2'b01;
      bhr <= '0;
    end else begin
      if (upd_en) begin
        if (upd_taken && pht[upd_idx] != 2'b11) pht[upd_idx] <= pht[upd_idx] + 2'd1;
        else if (!upd_taken && pht[upd_idx] != 2'b00) pht[upd_idx] <= pht[upd_idx] - 2'd1;
      end
      if (hist_en) bhr <= {bhr[HIST_W-2:0], hist_taken};
    end
  end
endmodule
