// dispatch: the schedule stage (S). Routes up to two uops per cycle, with
// their operands, to the reservation stations of the four functional units.
//
// For each source register it reads the register file and asks the reorder
// buffer whether an in-flight instruction will produce that register. If so
// the operand is the ROB's value (when already computed) or its tag; otherwise
// it is the register file's value. A source of the second uop written by the
// first uop of the same pair takes the first uop's new tag.
// Issue rules from the document:
//   - two uops go when the ROB has at least two free entries, one when it has
//     one, none when it is full;
//   - two ALU uops go one to each ALU; two branch or two load/store uops go
//     one per cycle;
//   - a uop whose reservation station is full waits, and so does the uop
//     after it.
// The hold of the second uop is kept in decode_issue's output register, so
// this unit is combinational. Outputs: take (uops accepted), the ROB
// allocation and one push per reservation station (0: ALU1, 1: ALU2, 2: BRU,
// 3: LSU).
module dispatch
  import puma_pkg::*;
(
  input  uop_t        d_i1,
  input  uop_t        d_i2,
  output logic [1:0]  take,
  // reorder buffer
  input  logic [3:0]  rob_free,
  input  tag_t        rob_tag [2],
  output logic [1:0]  rob_alloc,
  output ridx_t       lk_idx [4],
  input  logic        lk_mapped [4],
  input  opnd_t       lk_opnd [4],
  // register file
  output ridx_t       rf_idx [4],
  input  logic [31:0] rf_data [4],
  // reservation stations
  input  logic        rs_full [4],
  output logic        rs_push [4],
  output rs_ent_t     rs_ent [4],
  // activity
  output logic        ev_rob_stall,
  output logic        ev_rs_stall,
  output logic        ev_fu_conflict
);
  uop_t u [2];
  assign u[0] = d_i1;
  assign u[1] = d_i2;

  always_comb begin
    lk_idx[0] = u[0].s1; lk_idx[1] = u[0].s2; lk_idx[2] = u[1].s1; lk_idx[3] = u[1].s2;
    rf_idx = lk_idx;
  end

  function automatic opnd_t src(input logic v, input int p);
    opnd_t o;
    if (!v) o = '{ready: 1'b1, tag: '0, value: '0};
    else if (lk_mapped[p]) o = lk_opnd[p];
    else o = '{ready: 1'b1, tag: '0, value: rf_data[p]};
    return o;
  endfunction

  logic [1:0] rs_sel [2];
  logic       go [2];
  rs_ent_t    ent [2];

  always_comb begin
    logic ok0, ok1;
    ev_rob_stall = 1'b0; ev_rs_stall = 1'b0; ev_fu_conflict = 1'b0;
    for (int k = 0; k < 4; k++) begin rs_push[k] = 1'b0; rs_ent[k] = '0; end
    // slot 0
    rs_sel[0] = 2'd0;
    case (u[0].fu)
      FU_ALU:  rs_sel[0] = rs_full[0] ? 2'd1 : 2'd0;
      FU_BRU:  rs_sel[0] = 2'd2;
      default: rs_sel[0] = 2'd3;
    endcase
    ok0 = u[0].valid && rob_free >= 4'd1 && !rs_full[rs_sel[0]];
    if (u[0].valid && rob_free == 4'd0) ev_rob_stall = 1'b1;
    if (u[0].valid && rob_free != 4'd0 && rs_full[rs_sel[0]]) ev_rs_stall = 1'b1;
    // slot 1
    rs_sel[1] = 2'd0;
    case (u[1].fu)
      FU_ALU:  rs_sel[1] = (u[0].fu == FU_ALU && rs_sel[0] == 2'd0) ? 2'd1 :
                           (u[0].fu == FU_ALU) ? 2'd0 : (rs_full[0] ? 2'd1 : 2'd0);
      FU_BRU:  rs_sel[1] = 2'd2;
      default: rs_sel[1] = 2'd3;
    endcase
    ok1 = ok0 && u[1].valid && rob_free >= 4'd2 && !rs_full[rs_sel[1]] &&
          rs_sel[1] != rs_sel[0];
    if (ok0 && u[1].valid) begin
      if (rob_free < 4'd2) ev_rob_stall = 1'b1;
      else if (rs_sel[1] == rs_sel[0]) ev_fu_conflict = 1'b1;
      else if (rs_full[rs_sel[1]]) ev_rs_stall = 1'b1;
    end
    go[0] = ok0; go[1] = ok1;
    take      = ok1 ? 2'd2 : ok0 ? 2'd1 : 2'd0;
    rob_alloc = take;

    // operands
    ent[0].u = u[0]; ent[0].tag = rob_tag[0];
    ent[0].a = src(u[0].s1_v, 0); ent[0].b = src(u[0].s2_v, 1);
    ent[1].u = u[1]; ent[1].tag = rob_tag[1];
    ent[1].a = src(u[1].s1_v, 2); ent[1].b = src(u[1].s2_v, 3);
    if (u[0].dst_v && u[1].s1_v && u[1].s1 == u[0].dst)
      ent[1].a = '{ready: 1'b0, tag: rob_tag[0], value: '0};
    if (u[0].dst_v && u[1].s2_v && u[1].s2 == u[0].dst)
      ent[1].b = '{ready: 1'b0, tag: rob_tag[0], value: '0};

    for (int s = 0; s < 2; s++)
      if (go[s]) begin rs_push[rs_sel[s]] = 1'b1; rs_ent[rs_sel[s]] = ent[s]; end
  end
endmodule
