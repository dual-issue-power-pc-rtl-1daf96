// btb: branch target buffer with ENTRIES entries, direct mapped.
//
// Looked up in the fetch stage with the fetch address. An entry is indexed by
// the cache-line address bits above the 16-byte line offset and tagged with
// the remaining upper bits, so one entry describes the taken branch of one
// fetch line: its word slot within the line, its target, and whether it is
// unconditional. A hit requires a valid entry, a matching tag and a branch slot
// at or after the fetch slot. The write back unit writes an entry when a
// committed branch was mispredicted and taken, and removes an entry that sent
// fetch off at an instruction that is not a branch.
//
// The document gives the entry count (64) and the tag compare against the fetch
// PC; the slot field and the unconditional bit are this design's choices.
// Timing: asynchronous lookup, write on the rising edge, entries invalid after
// reset.
module btb #(
  parameter int unsigned ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] pc,
  output logic        hit,
  output logic [1:0]  slot,
  output logic [31:0] target,
  output logic        uncond,
  input  logic        wr_en,
  input  logic [31:0] wr_pc,
  input  logic [31:0] wr_target,
  input  logic        wr_uncond,
  input  logic        wr_valid       // 0: remove the entry of wr_pc's line
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = 32 - IW - 4;

  typedef struct packed {
    logic          valid;
    logic [TW-1:0] tag;
    logic [1:0]    slot;
    logic [31:0]   target;
    logic          uncond;
  } btb_ent_t;

  btb_ent_t ent [ENTRIES];
  wire [IW-1:0] ridx = pc[IW+3:4];
  wire [IW-1:0] widx = wr_pc[IW+3:4];
  btb_ent_t e;

  always_comb begin
    e      = ent[ridx];
    hit    = e.valid && (e.tag == pc[31:IW+4]) && (e.slot >= pc[3:2]);
    slot   = e.slot;
    target = e.target;
    uncond = e.uncond;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ent[i] <= '0;
    end else if (wr_en) begin
      ent[widx] <= '{valid: wr_valid, tag: wr_pc[31:IW+4], slot: wr_pc[3:2],
                     target: wr_target, uncond: wr_uncond};
    end
  end
endmodule
