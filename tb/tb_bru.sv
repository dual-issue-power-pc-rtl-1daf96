// tb_bru: resolves relative, absolute and link branches, conditional branches
// on every condition register field-0 bit with branch-if-true, branch-if-false
// and branch-always BO values, and branch-to-link-register. Each resolved
// next address, taken flag, link value and misprediction flag is compared with
// a value worked out in the testbench, for correct and wrong predictions.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_bru;
  import puma_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, in_valid = 0, pop, grant = 1;
  rs_ent_t in_ent;
  cdb_t res;
  bru dut (.*);

  task automatic try(op_e op, logic [4:0] bo, logic [4:0] bi, logic [31:0] cr, logic [31:0] lr,
                     logic aa, logic [31:0] off, logic pred, logic [31:0] ptgt);
    logic taken; logic [31:0] pc, tgt, nxt;
    pc = 32'h0000_4000 + 32'($urandom_range(0, 255) * 4);
    in_ent = '0; in_ent.u.op = op; in_ent.u.bo = bo; in_ent.u.bi = bi; in_ent.u.aa = aa;
    in_ent.u.imm = off; in_ent.u.pc = pc; in_ent.a.value = cr; in_ent.b.value = lr;
    in_ent.u.pred_taken = pred; in_ent.u.pred_target = ptgt;
    taken = (op == OP_B) || bo[4] || (cr[31 - bi] == bo[3]);
    tgt = (op == OP_BCLR) ? {lr[31:2], 2'b00} : aa ? off : pc + off;
    nxt = taken ? tgt : pc + 4;
    in_valid = 1;
    @(negedge clk); in_valid = 0; #1;
    `CHK(res.valid && res.is_br && res.taken == taken && res.target == nxt && res.value == pc + 4)
    `CHK(res.exc == ((taken != pred) || (taken && tgt != ptgt)))
    `CHK(res.cond == (op != OP_B && !bo[4]))
  endtask

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #100000; failures++; `TB_END end
  initial begin
    @(negedge clk);
    try(OP_B, 0, 0, 0, 0, 0, 32'h100, 0, 0);
    try(OP_B, 0, 0, 0, 0, 1, 32'h800, 1, 32'h800);
    try(OP_B, 0, 0, 0, 0, 0, -32'sd64, 1, 32'h0);
    for (int bi = 0; bi < 4; bi++)
      for (int v = 0; v < 2; v++) begin
        logic [31:0] cr; cr = v ? (32'h8000_0000 >> bi) : ~(32'h8000_0000 >> bi);
        try(OP_BC, 5'd12, 5'(bi), cr, 0, 0, 32'h40, 1'($urandom), 32'h0);
        try(OP_BC, 5'd4, 5'(bi), cr, 0, 0, -32'sd16, 0, 0);
        try(OP_BC, 5'd20, 5'(bi), cr, 0, 0, 32'h20, 0, 0);
      end
    try(OP_BCLR, 5'd20, 0, 0, 32'h0000_1237, 0, 0, 1, 32'h1234);
    try(OP_BCLR, 5'd20, 0, 0, 32'h0000_1234, 0, 0, 1, 32'h1238);
    try(OP_BCLR, 5'd12, 5'd2, 32'h2000_0000, 32'h0000_2000, 0, 0, 0, 0);
    `TB_END
  end
endmodule
