// tb_bp: checks the gshare index (PC word bits xor history), the reset state
// (weakly not-taken), two-bit saturating counting in both directions, and
// that the history register shifts only on hist_en and changes the index.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_bp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] pc;
  logic taken, upd_en = 0, upd_taken, hist_en = 0, hist_taken;
  logic [9:0] idx, upd_idx, hist;
  bp dut (.*);
  initial begin #100000; failures++; `TB_END end
  initial begin
    pc = 32'h0000_1234; hist = 0;
    #12 rst_n = 1;
    #1 `CHK(idx == pc[11:2] && !taken)
    // train taken: 01 -> 10 -> 11 -> 11
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); upd_en = 1; upd_idx = pc[11:2]; upd_taken = 1;
    end
    @(negedge clk); upd_en = 0; #1 `CHK(taken)
    // one not-taken: 11 -> 10, still taken; second: 01, not taken
    @(negedge clk); upd_en = 1; upd_taken = 0;
    @(negedge clk); upd_en = 0; #1 `CHK(taken)
    @(negedge clk); upd_en = 1; upd_taken = 0;
    @(negedge clk); upd_en = 0; #1 `CHK(!taken)
    for (int i = 0; i < 4; i++) begin @(negedge clk); upd_en = 1; upd_taken = 0; end
    @(negedge clk); upd_en = 0; upd_taken = 1;            // saturates at 00
    @(negedge clk); upd_en = 1;
    @(negedge clk); upd_en = 0; #1 `CHK(!taken)
    // history
    for (int i = 0; i < 12; i++) begin
      logic t; t = 1'($urandom);
      @(negedge clk); hist_en = 1; hist_taken = t; hist = {hist[8:0], t};
      @(negedge clk); hist_en = 0; #1 `CHK(idx == (pc[11:2] ^ hist))
    end
    @(negedge clk); hist_taken = 1; #1 `CHK(idx == (pc[11:2] ^ hist))   // no shift without enable
    `TB_END
  end
endmodule
