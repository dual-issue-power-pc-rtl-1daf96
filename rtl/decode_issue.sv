// decode_issue: the decode/issue unit (stages D1 and D2).
//
// Two simple decoders work on the two oldest instructions of the instruction
// buffer; decoder 1 on the older one at the current uop index, decoder 2 on the
// younger one from its first uop. A selection FSM picks up to two uops per
// cycle, in program order, by the document's three rules:
//   - both instructions single-uop: both go in one cycle;
//   - a single-uop instruction next to a multi-uop one: the single uop goes
//     alone, then the other instruction's uops two per cycle;
//   - both multi-uop: the older one's uops two per cycle, then the other's.
// The FSM state is the uop index of the older instruction. The selected pair
// is registered (D2 output register d_i1/d_i2) for the dispatch unit.
// Dispatch reports how many of the pair it took. If it took only the first,
// the second moves into the first slot and is offered alone next cycle.
// decode1_hold/decode2_hold tell which slot is still waiting. A redirect
// empties the unit.
module decode_issue
  import puma_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  finst_t     inst [2],
  output logic [1:0] consume,
  output uop_t       d_i1,
  output uop_t       d_i2,
  input  logic [1:0] take,
  output logic       decode1_hold,
  output logic       decode2_hold,
  // activity, for performance counting
  output logic       ev_dual,
  output logic       ev_multi
);
  uop_t i11, i12, i21, i22;
  logic d1_simple, d1_multi, d1_done, d2_simple, d2_multi, d2_done;
  logic [5:0] uidx, n1_idx, n2_idx;

  decoder u_d1 (.inst(inst[0]), .uindex(uidx), .u1(i11), .u2(i12),
                .simple(d1_simple), .multicycle(d1_multi), .done(d1_done),
                .next_uindex(n1_idx));
  decoder u_d2 (.inst(inst[1]), .uindex(6'd0), .u1(i21), .u2(i22),
                .simple(d2_simple), .multicycle(d2_multi), .done(d2_done),
                .next_uindex(n2_idx));

  // the output register can load when it is empty or fully taken
  wire out_free = (!d_i1.valid && !d_i2.valid) ||
                  (take == 2'd2) || (take == 2'd1 && !d_i2.valid);

  uop_t sel1, sel2;
  logic [5:0] nidx;
  always_comb begin
    sel1 = '0; sel2 = '0; consume = 2'd0; nidx = uidx;
    ev_dual = 1'b0; ev_multi = 1'b0;
    if (inst[0].valid && out_free) begin
      if (uidx == 0 && d1_simple) begin
        sel1 = i11;
        consume = 2'd1;
        if (inst[1].valid && d2_simple) begin     // rule 1
          sel2 = i21; consume = 2'd2; ev_dual = 1'b1;
        end
      end else begin                              // rules 2/3: two uops of one instruction
        sel1 = i11; sel2 = i12;
        ev_multi = 1'b1;
        if (d1_done) begin consume = 2'd1; nidx = '0; end
        else nidx = n1_idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_i1 <= '0; d_i2 <= '0; uidx <= '0;
    end else if (flush) begin
      d_i1 <= '0; d_i2 <= '0; uidx <= '0;
    end else if (out_free) begin
      d_i1 <= sel1; d_i2 <= sel2; uidx <= nidx;
    end else if (take == 2'd1) begin
      d_i1 <= d_i2; d_i2 <= '0;
    end
  end

  assign decode1_hold = d_i1.valid && take == 2'd0;
  assign decode2_hold = d_i2.valid && take != 2'd2;
endmodule
