// tb_fetch: the fetch unit with behavioural caches and predictors. Each
// instruction word equals its own address, so the delivered stream can be
// checked against the expected program order. The BTB model holds one taken
// branch (slot 2 of line 0x40, target 0x100); lines from 0x1000 up miss the
// instruction cache and come from the stream model four lookups later. Checks:
// program order through the predicted branch and the misses, the prediction
// attached to the branch slot, a redirect restarting fetch at its address,
// and at least one cycle with two instructions delivered.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_fetch;
  import puma_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic run = 0, redirect = 0;
  logic [31:0] redirect_pc, ic_addr, btb_pc, bp_pc, sb_addr;
  logic [127:0] ic_line, sb_line;
  logic [14:0] ic_tag;
  logic ic_valid, btb_hit, btb_uncond, bp_taken, sb_lookup, sb_hit;
  logic [1:0] btb_slot, consume;
  logic [31:0] btb_target;
  logic [9:0] bp_idx;
  finst_t inst [2];
  fetch dut (.*);

  function automatic logic [127:0] mk_line(input logic [31:0] a);
    logic [31:0] b; b = {a[31:4], 4'h0};
    return {b, b + 32'd4, b + 32'd8, b + 32'd12};
  endfunction
  int wait_cnt [logic [27:0]];
  always_comb begin
    ic_line = mk_line(ic_addr); ic_tag = ic_addr[31:17];
    ic_valid = ic_addr < 32'h1000 || (wait_cnt.exists(ic_addr[31:4]) && wait_cnt[ic_addr[31:4]] >= 4);
    btb_hit = (btb_pc[31:4] == 28'h4) && (btb_pc[3:2] <= 2'd2);
    btb_slot = 2'd2; btb_target = 32'h100; btb_uncond = 1'b1;
    bp_taken = 1'b0; bp_idx = bp_pc[11:2];
    sb_line = mk_line(sb_addr);
    sb_hit = sb_lookup && wait_cnt.exists(sb_addr[31:4]) && wait_cnt[sb_addr[31:4]] >= 4;
  end
  int n_lookups = 0;
  always @(posedge clk) if (sb_lookup) begin
    n_lookups++;
    if (!wait_cnt.exists(sb_addr[31:4])) wait_cnt[sb_addr[31:4]] = 0;
    wait_cnt[sb_addr[31:4]]++;
  end

  logic [31:0] exp_pc;
  int n_got = 0, n_dual = 0, n_pred = 0;
  always_comb begin
    consume = 0;
    if (inst[0].valid) consume = (inst[1].valid && $urandom_range(0, 3) != 0) ? 2'd2 : 2'd1;
  end
  always @(posedge clk) if (rst_n && !redirect) begin
    if (consume == 2) n_dual++;
    for (int k = 0; k < 2; k++) if (32'(k) < 32'(consume)) begin
      `CHK(inst[k].pc == exp_pc && inst[k].instr == exp_pc)
      if (inst[k].pc == 32'h48) begin `CHK(inst[k].pred_taken && inst[k].pred_target == 32'h100) n_pred++; end
      else `CHK(!inst[k].pred_taken)
      exp_pc = (exp_pc == 32'h48) ? 32'h100 : exp_pc + 4;
      n_got++;
    end
  end

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #100000; failures++; `TB_END end
  initial begin
    exp_pc = 0;
    @(negedge clk); run = 1;
    wait (exp_pc >= 32'h1080);
    @(negedge clk); redirect = 1; redirect_pc = 32'h204;
    @(negedge clk); redirect = 0; exp_pc = 32'h204;
    wait (exp_pc >= 32'h240);
    @(negedge clk);
    `CHK(n_pred == 1)
    `CHK(n_dual > 20)
    `CHK(n_lookups > 8)
    `CHK(n_got > 1000)
    `TB_END
  end
endmodule
