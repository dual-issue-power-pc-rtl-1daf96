// icache: level-1 instruction cache, direct mapped, LINES lines of 128 bits
// (four PowerPC instructions per line).
//
// Each line holds the 128-bit line from the second level, its address tag and a
// valid bit. The fetch unit indexes the array with the program counter and
// compares the tag itself, so the read port returns the raw entry. The single
// write port is driven by the stream unit: it writes a line whenever the stream
// buffer hits, and clears the valid bits one line per cycle during start-up.
//
// Timing: asynchronous read (the fetch latch registers the entry), write on the
// rising clock edge. The size (8192 lines, 128 KB) follows the document's text;
// the array stands in for the compiled SRAM macro of the original.
module icache #(
  parameter int unsigned LINES = 8192
) (
  input  logic        clk,
  input  logic [31:0] rd_addr,
  output logic [127:0] rd_line,
  output logic [31-$clog2(LINES)-4:0] rd_tag,
  output logic        rd_valid,
  input  logic        wr_en,
  input  logic [31:0] wr_addr,
  input  logic [127:0] wr_line,
  input  logic        wr_valid
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = 32 - IW - 4;

  logic [127:0]  data  [LINES];
  logic [TW-1:0] tags  [LINES];
  logic          valid [LINES];

  wire [IW-1:0] ridx = rd_addr[IW+3:4];
  wire [IW-1:0] widx = wr_addr[IW+3:4];

  assign rd_line  = data[ridx];
  assign rd_tag   = tags[ridx];
  assign rd_valid = valid[ridx];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      data[widx]  <= wr_line;
      tags[widx]  <= wr_addr[31:IW+4];
      valid[widx] <= wr_valid;
    end
  end
endmodule
