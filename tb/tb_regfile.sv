// tb_regfile: writes random values through both ports and reads them back on
// all four ports. Checks the falling-edge write (a value is not visible before
// the falling edge and is visible after it), port 1 priority on equal
// addresses, and the reset value.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_regfile;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] ra [4];
  logic [31:0] rd [4];
  logic we0 = 0, we1 = 0;
  logic [5:0] wa0, wa1;
  logic [31:0] wd0, wd1;
  logic [31:0] ref_r [48];
  regfile dut (.*);
  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #100000; failures++; `TB_END end
  initial begin
    for (int i = 0; i < 48; i++) ref_r[i] = 0;
    #10;
    for (int p = 0; p < 4; p++) ra[p] = 6'(p * 11);
    #1 for (int p = 0; p < 4; p++) `CHK(rd[p] == 0)
    for (int t = 0; t < 40; t++) begin
      @(posedge clk); #1;
      we0 = 1; we1 = 1; wa0 = 6'($urandom_range(0, 47)); wa1 = 6'($urandom_range(0, 47));
      if (t % 5 == 0) wa1 = wa0;
      wd0 = $urandom; wd1 = $urandom;
      ra[0] = wa0; #1;
      `CHK(rd[0] == ref_r[wa0])                          // not yet written
      @(negedge clk); #1;
      ref_r[wa0] = wd0; ref_r[wa1] = wd1;
      for (int p = 0; p < 4; p++) begin
        ra[p] = (p == 0) ? wa0 : (p == 1) ? wa1 : 6'($urandom_range(0, 47)); #1;
        `CHK(rd[p] == ref_r[ra[p]])
      end
    end
    `TB_END
  end
endmodule
