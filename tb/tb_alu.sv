// tb_alu: random operands through every ALU operation, results compared with a
// reference computed in the testbench; checks the one-cycle latency to the
// result register, that the register holds its result (and blocks new work)
// until granted, and the compare encoding of condition register field 0.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_alu;
  import puma_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, in_valid = 0, pop, grant = 0;
  rs_ent_t in_ent;
  cdb_t res;
  alu dut (.*);

  function automatic logic [31:0] ref_op(op_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_ADD: return a + b;  OP_SUBF: return b - a;  OP_AND: return a & b;
      OP_OR: return a | b;   OP_XOR: return a ^ b;
      OP_SLW: return (b[5]) ? 0 : a << b[4:0];
      OP_SRW: return (b[5]) ? 0 : a >> b[4:0];
      OP_CMP: return ($signed(a) < $signed(b)) ? 32'h8000_0000 : ($signed(a) > $signed(b)) ? 32'h4000_0000 : 32'h2000_0000;
      OP_CMPL: return (a < b) ? 32'h8000_0000 : (a > b) ? 32'h4000_0000 : 32'h2000_0000;
      default: return 0;
    endcase
  endfunction
  op_e ops [9] = '{OP_ADD, OP_SUBF, OP_AND, OP_OR, OP_XOR, OP_SLW, OP_SRW, OP_CMP, OP_CMPL};

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #100000; failures++; `TB_END end
  initial begin
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      logic [31:0] a, b, ex; op_e op; logic imm;
      op = ops[t % 9]; imm = t[4];
      a = $urandom; b = (t % 7 == 0) ? a : $urandom;
      if (op == OP_SLW || op == OP_SRW) b = 32'($urandom_range(0, 40));
      in_ent = '0; in_ent.u.op = op; in_ent.tag = tag_t'(t); in_ent.a.value = a;
      in_ent.u.use_imm = imm; if (imm) in_ent.u.imm = b; else in_ent.b.value = b;
      ex = ref_op(op, a, b);
      in_valid = 1; #1;
      `CHK(pop)
      @(negedge clk); in_valid = 0; #1;
      `CHK(res.valid && res.value == ex && res.tag == tag_t'(t) && !res.is_br)
      // no grant: result holds, next uop is refused
      in_valid = 1; #1; `CHK(!pop)
      @(negedge clk); in_valid = 0; #1;
      `CHK(res.valid && res.value == ex)
      grant = 1;
      @(negedge clk); grant = 0; #1;
      `CHK(!res.valid)
    end
    `TB_END
  end
endmodule
