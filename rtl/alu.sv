// alu: single-cycle integer unit with a result register.
//
// It accepts the ready uop at the head of its reservation station whenever its
// result register is empty or is being emptied onto a completion bus this
// cycle. It computes the result in that cycle (stage X) and holds it in the
// result register until the completion-bus arbiter grants a bus (stage W1).
// Operations: add, subtract-from (rB - rA), and, or, xor, shifts, and signed
// and unsigned compares, which produce condition register field 0 (LT GT EQ
// SO in bits 31:28; SO is not modelled and reads zero).
//
// Single-cycle execution and the result register follow the PUMA description;
// the operation list matches this design's instruction subset.
module alu
  import puma_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    in_valid,
  input  rs_ent_t in_ent,
  output logic    pop,
  output cdb_t    res,
  input  logic    grant
);
  logic [31:0] a, b, r;
  assign a = in_ent.a.value;
  assign b = in_ent.u.use_imm ? in_ent.u.imm : in_ent.b.value;

  always_comb begin
    case (in_ent.u.op)
      OP_ADD:  r = a + b;
      OP_SUBF: r = b - a;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_SLW:  r = b[5] ? 32'h0 : a << b[4:0];
      OP_SRW:  r = b[5] ? 32'h0 : a >> b[4:0];
      OP_CMP:  r = {($signed(a) < $signed(b)), ($signed(a) > $signed(b)), a == b, 29'h0};
      OP_CMPL: r = {(a < b), (a > b), a == b, 29'h0};
      default: r = a | b;
    endcase
  end

  assign pop = in_valid && (!res.valid || grant) && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res <= '0;
    else if (flush) res <= '0;
    else if (pop) res <= '{valid: 1'b1, tag: in_ent.tag, value: r, is_br: 1'b0,
                          cond: 1'b0, taken: 1'b0, target: '0, exc: 1'b0};
    else if (grant) res.valid <= 1'b0;
  end
endmodule
