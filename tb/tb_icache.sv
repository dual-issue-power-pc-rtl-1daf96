// tb_icache: writes lines to random indices of the instruction cache and reads
// them back (data, tag, valid), checks that another tag at the same index
// replaces the line, and that writing valid=0 invalidates it. Reference values
// are kept in a testbench array.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_icache;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] rd_addr, wr_addr;
  logic [127:0] rd_line, wr_line;
  logic [14:0] rd_tag;
  logic rd_valid, wr_en = 0, wr_valid;
  icache dut (.*);

  logic [31:0]  ra [16];
  logic [127:0] rl [16];
  initial begin #100000; failures++; `TB_END end
  initial begin
    for (int i = 0; i < 16; i++) begin
      ra[i] = {$urandom} & 32'hFFFF_FFF0; ra[i][16:4] = 13'(i * 517);
      rl[i] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); wr_en = 1; wr_addr = ra[i]; wr_line = rl[i]; wr_valid = 1;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 16; i++) begin
      rd_addr = ra[i] | 32'h8; #1;
      `CHK(rd_valid && rd_line == rl[i] && rd_tag == ra[i][31:17])
    end
    // same index, other tag, then invalidate
    @(negedge clk); wr_en = 1; wr_addr = ra[3] ^ 32'h8000_0000; wr_line = ~rl[3]; wr_valid = 1;
    @(negedge clk); wr_en = 0; rd_addr = ra[3]; #1;
    `CHK(rd_tag != ra[3][31:17] && rd_line == ~rl[3])
    @(negedge clk); wr_en = 1; wr_addr = ra[5]; wr_valid = 0;
    @(negedge clk); wr_en = 0; rd_addr = ra[5]; #1;
    `CHK(!rd_valid)
    rd_addr = ra[6]; #1;
    `CHK(rd_valid && rd_line == rl[6])
    `TB_END
  end
endmodule
