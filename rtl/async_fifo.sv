// async_fifo: first-in first-out buffer between two unrelated clocks.
//
// The storage array is written in the write clock domain and read, without a
// register, in the read clock domain. Each side keeps a binary pointer with
// one extra wrap bit and publishes it in Gray code. The other side samples the
// Gray pointer through two flip-flops, so at most one bit is changing when
// it is sampled. Full is computed on the write side from the synchronised
// read pointer, and empty on the read side from the synchronised write pointer.
// Both flags are therefore pessimistic by the two synchroniser cycles, which
// costs latency but never loses or duplicates an entry.
//
// Interface: wr_en pushes wr_data when not full; rd_en pops the entry shown on
// rd_data when not empty. DEPTH must be a power of two. One asynchronous reset
// clears both sides; it must be held long enough to reach both clocks.
//
// This is a standard dual-clock FIFO. The original instruction memory access
// queue spans clock domains but its crossing circuit is not described; this
// one is this design's choice.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic         rst_n,
  // write side
  input  logic         wclk,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  // read side
  input  logic         rclk,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [PW:0] wbin, rbin, wgray, rgray;
  logic [PW:0] rgray_w1, rgray_w2;      // read pointer seen by the write side
  logic [PW:0] wgray_r1, wgray_r2;      // write pointer seen by the read side

  function automatic logic [PW:0] gray(input logic [PW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wgray = gray(wbin);
  assign rgray = gray(rbin);
  // full: pointers equal except the two top bits (Gray form of "one lap ahead")
  assign full  = wgray == {~rgray_w2[PW:PW-1], rgray_w2[PW-2:0]};
  assign empty = rgray == wgray_r2;
  assign rd_data = mem[rbin[PW-1:0]];

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr_en && !full) wbin <= wbin + 1'b1;
    end
  end

  always_ff @(posedge wclk)
    if (wr_en && !full) mem[wbin[PW-1:0]] <= wr_data;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_en && !empty) rbin <= rbin + 1'b1;
    end
  end
endmodule
