// bru: branch resolution unit with a result register.
//
// Resolves b/bl (relative or absolute), bc (condition register bit BI tested
// against BO; BO[4] set means always) and bclr (target from the link
// register) in one cycle. The resolved next address is compared with the
// fetch-stage prediction carried by the uop; any difference (direction or
// target) marks the result as an exception, which the write back unit turns
// into a pipeline flush and redirect when the branch commits. With LK set the
// result value is the return address, written to the link register.
// The count-register-decrementing forms of BO are not decoded; BO[2] is
// ignored (treated as "do not decrement"). Handshake as in alu.
//
// Resolving branches in the execution core and signalling a misprediction as an
// exception follow the PUMA description; the supported BO forms are this
// design's own restriction.
module bru
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
  uop_t u;
  logic taken, cond, crbit;
  logic [31:0] tgt, next_pc, seq;
  assign u = in_ent.u;

  always_comb begin
    seq   = u.pc + 32'd4;
    crbit = in_ent.a.value[31 - u.bi];
    cond  = (u.op != OP_B) && !u.bo[4];
    taken = (u.op == OP_B) || u.bo[4] || (crbit == u.bo[3]);
    case (u.op)
      OP_BCLR: tgt = {in_ent.b.value[31:2], 2'b00};
      default: tgt = u.aa ? u.imm : u.pc + u.imm;
    endcase
    next_pc = taken ? tgt : seq;
  end

  wire mispred = (taken != u.pred_taken) || (taken && tgt != u.pred_target);

  assign pop = in_valid && (!res.valid || grant) && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res <= '0;
    else if (flush) res <= '0;
    else if (pop) res <= '{valid: 1'b1, tag: in_ent.tag, value: seq, is_br: 1'b1,
                          cond: cond, taken: taken, target: next_pc, exc: mispred};
    else if (grant) res.valid <= 1'b0;
  end
endmodule
