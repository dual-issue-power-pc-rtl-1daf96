// dcache: level-1 data cache, direct mapped, LINES lines of 128 bits.
//
// The load/store unit reads one 32-bit word: the index selects the line, bits
// [3:2] of the address select the word (word 0 in bits 127:96, big-endian, as
// PowerPC numbers bytes) and the tag compare gives the hit. The core writes a
// single word under a 4-bit byte enable (bit 3 = byte at offset 0). The DMAQ
// writes a whole line on a fill from the second level, and clears valid bits
// one line per cycle at start-up. Fill has priority over an invalidate; a core
// write to the same line in the same cycle as a fill is not expected (the
// load/store unit holds stores while a miss is outstanding).
//
// Timing: asynchronous read, writes on the rising edge. The size follows the
// document's text (8192 lines of 128 bits).
module dcache #(
  parameter int unsigned LINES = 8192
) (
  input  logic         clk,
  // core read port
  input  logic [31:0]  rd_addr,
  output logic [31:0]  rd_data,
  output logic         rd_hit,
  // core write port (word, byte enables)
  input  logic         wr_en,
  input  logic [31:0]  wr_addr,
  input  logic [31:0]  wr_data,
  input  logic [3:0]   wr_be,
  // line fill from L2
  input  logic         fill_en,
  input  logic [31:0]  fill_addr,
  input  logic [127:0] fill_line,
  // start-up invalidation
  input  logic         inv_en,
  input  logic [$clog2(LINES)-1:0] inv_idx
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = 32 - IW - 4;

  logic [127:0]  data  [LINES];
  logic [TW-1:0] tags  [LINES];
  logic          valid [LINES];

  wire [IW-1:0] ridx = rd_addr[IW+3:4];
  wire [IW-1:0] widx = wr_addr[IW+3:4];
  wire [IW-1:0] fidx = fill_addr[IW+3:4];
  wire [127:0]  rline = data[ridx];

  assign rd_hit  = valid[ridx] && (tags[ridx] == rd_addr[31:IW+4]);
  assign rd_data = rline[127 - 32*rd_addr[3:2] -: 32];

  always_ff @(posedge clk) begin
    if (fill_en) begin
      data[fidx]  <= fill_line;
      tags[fidx]  <= fill_addr[31:IW+4];
      valid[fidx] <= 1'b1;
    end else if (inv_en) begin
      valid[inv_idx] <= 1'b0;
    end
    if (wr_en) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b])
          data[widx][127 - 32*wr_addr[3:2] - 8*(3-b) -: 8] <= wr_data[8*b +: 8];
    end
  end
endmodule
