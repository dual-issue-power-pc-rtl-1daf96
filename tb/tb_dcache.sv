// tb_dcache: fills lines, reads every word back, checks hit and miss
// (empty line and tag mismatch), byte-enable word writes against a reference
// byte model, a fill replacing a line, and start-up invalidation.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_dcache;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] rd_addr, rd_data, wr_addr, wr_data, fill_addr;
  logic rd_hit, wr_en = 0, fill_en = 0, inv_en = 0;
  logic [3:0] wr_be;
  logic [127:0] fill_line;
  logic [12:0] inv_idx;
  dcache dut (.*);

  logic [127:0] ref_line;
  initial begin #200000; failures++; `TB_END end
  initial begin
    // invalidate a few lines (the array starts random)
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); inv_en = 1; inv_idx = 13'(i);
    end
    @(negedge clk); inv_en = 0;
    rd_addr = 32'h0000_0030; #1; `CHK(!rd_hit)
    // fill line at 0x1230 and read all words
    ref_line = {32'h11223344, 32'h55667788, 32'h99aabbcc, 32'hddeeff00};
    @(negedge clk); fill_en = 1; fill_addr = 32'h0004_1230; fill_line = ref_line;
    @(negedge clk); fill_en = 0;
    for (int w = 0; w < 4; w++) begin
      rd_addr = 32'h0004_1230 + 32'(4 * w); #1;
      `CHK(rd_hit && rd_data == ref_line[127 - 32*w -: 32])
    end
    rd_addr = 32'h0008_1230; #1; `CHK(!rd_hit)          // same index, other tag
    // byte writes
    for (int t = 0; t < 12; t++) begin
      logic [1:0] w; logic [3:0] be; logic [31:0] d;
      w = 2'($urandom); be = 4'($urandom); d = $urandom;
      @(negedge clk); wr_en = 1; wr_addr = 32'h0004_1230 + 32'(4 * w); wr_be = be; wr_data = d;
      for (int b = 0; b < 4; b++) if (be[b]) ref_line[127 - 32*w - 8*(3-b) -: 8] = d[8*b +: 8];
      @(negedge clk); wr_en = 0;
      for (int k = 0; k < 4; k++) begin
        rd_addr = 32'h0004_1230 + 32'(4 * k); #1;
        `CHK(rd_hit && rd_data == ref_line[127 - 32*k -: 32])
      end
    end
    // a fill of another tag replaces the line
    @(negedge clk); fill_en = 1; fill_addr = 32'h0008_1230; fill_line = ~ref_line;
    @(negedge clk); fill_en = 0;
    rd_addr = 32'h0008_1234; #1; `CHK(rd_hit && rd_data == ~ref_line[95:64])
    rd_addr = 32'h0004_1234; #1; `CHK(!rd_hit)
    @(negedge clk); inv_en = 1; inv_idx = 13'h123;
    @(negedge clk); inv_en = 0;
    rd_addr = 32'h0008_1234; #1; `CHK(!rd_hit)
    `TB_END
  end
endmodule
