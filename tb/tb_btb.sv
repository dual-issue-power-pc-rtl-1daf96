// tb_btb: checks that the branch target buffer misses after reset, hits only
// for the written line, with a branch slot at or after the fetch slot, returns
// target, slot and the unconditional bit, is replaced by a write to another
// tag at the same index, and can be cleared with wr_valid = 0.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_btb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] pc, target, wr_pc, wr_target;
  logic hit, uncond, wr_en = 0, wr_uncond, wr_valid;
  logic [1:0] slot;
  btb dut (.*);
  initial begin #100000; failures++; `TB_END end
  initial begin
    pc = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 64; i++) begin pc = 32'(i) << 4; #1; `CHK(!hit) end
    @(negedge clk); wr_en = 1; wr_pc = 32'h0000_5128; wr_target = 32'h0000_0400; wr_uncond = 0; wr_valid = 1;
    @(negedge clk); wr_en = 1; wr_pc = 32'h0000_7304; wr_target = 32'h0000_0800; wr_uncond = 1;
    @(negedge clk); wr_en = 0;
    pc = 32'h0000_5120; #1; `CHK(hit && slot == 2 && target == 32'h400 && !uncond)
    pc = 32'h0000_5128; #1; `CHK(hit && slot == 2)
    pc = 32'h0000_512C; #1; `CHK(!hit)                   // branch before fetch slot
    pc = 32'h0000_6120; #1; `CHK(!hit)                   // same index, other tag
    pc = 32'h0000_7300; #1; `CHK(hit && slot == 1 && target == 32'h800 && uncond)
    @(negedge clk); wr_en = 1; wr_pc = 32'h0000_6124; wr_target = 32'h0000_0100; wr_uncond = 0;
    @(negedge clk); wr_en = 0;
    pc = 32'h0000_5120; #1; `CHK(!hit)
    pc = 32'h0000_6120; #1; `CHK(hit && target == 32'h100 && slot == 1)
    @(negedge clk); wr_en = 1; wr_pc = 32'h0000_6124; wr_valid = 0;
    @(negedge clk); wr_en = 0;
    pc = 32'h0000_6120; #1; `CHK(!hit)
    `TB_END
  end
endmodule
