// tb_dispatch: applies uop pairs to the dispatch unit with chosen ROB and
// reservation station states and checks the issue count, the station each uop
// is routed to, and the operand sources (register file value, ROB value, ROB
// tag, and the in-pair dependency) against values worked out by hand.
// A random phase then checks 5000 random situations against the rules.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_dispatch;
  import puma_pkg::*;
  int checks = 0, failures = 0;
  uop_t d_i1, d_i2;
  logic [1:0] take, rob_alloc;
  logic [3:0] rob_free;
  tag_t rob_tag [2];
  ridx_t lk_idx [4], rf_idx [4];
  logic lk_mapped [4], rs_full [4], rs_push [4];
  opnd_t lk_opnd [4];
  logic [31:0] rf_data [4];
  rs_ent_t rs_ent [4];
  logic e1, e2, e3;
  dispatch dut (.d_i1, .d_i2, .take, .rob_free, .rob_tag, .rob_alloc, .lk_idx, .lk_mapped,
                .lk_opnd, .rf_idx, .rf_data, .rs_full, .rs_push, .rs_ent,
                .ev_rob_stall(e1), .ev_rs_stall(e2), .ev_fu_conflict(e3));

  function automatic uop_t mk(fu_e fu, int dst, int s1, int s2);
    uop_t u; u = '0; u.valid = 1; u.fu = fu; u.op = (fu == FU_LSU) ? OP_LW : OP_ADD;
    u.dst_v = dst >= 0; u.dst = ridx_t'(dst); u.s1_v = s1 >= 0; u.s1 = ridx_t'(s1);
    u.s2_v = s2 >= 0; u.s2 = ridx_t'(s2); return u;
  endfunction
  // register file returns 1000 + index; ROB maps r5 (ready, 55) and r6 (tag 9, waiting)
  // (in the random phase: r is mapped when r % 3 == 0, ready when also even)
  bit rnd_map = 0;
  function automatic opnd_t rob_view(ridx_t r);
    return (r % 2 == 0) ? '{ready: 1'b1, tag: tag_t'(r), value: 32'(500 + r)}
                        : '{ready: 1'b0, tag: tag_t'(r), value: 32'd0};
  endfunction
  always_comb for (int p = 0; p < 4; p++) begin
    rf_data[p] = 1000 + 32'(rf_idx[p]);
    if (rnd_map) begin
      lk_mapped[p] = (lk_idx[p] % 3 == 0);
      lk_opnd[p] = rob_view(lk_idx[p]);
    end else begin
      lk_mapped[p] = lk_idx[p] == 5 || lk_idx[p] == 6;
      lk_opnd[p] = (lk_idx[p] == 5) ? '{ready: 1'b1, tag: 4'd3, value: 32'd55} : '{ready: 1'b0, tag: 4'd9, value: 32'd0};
    end
  end
  function automatic int pushed_to(int k);   // which station got a uop with rob tag k
    for (int i = 0; i < 4; i++) if (rs_push[i] && rs_ent[i].tag == rob_tag[k]) return i;
    return -1;
  endfunction

  // random phase: random uop pairs, free counts and full stations; each result
  // is checked against the rules: the right unit class, a station that has
  // room, one station per uop, as many uops as the rules allow, and operands
  // from the register file, the ROB, or the first uop of the pair
  function automatic bit in_class(fu_e fu, int st);
    return (fu == FU_ALU) ? (st == 0 || st == 1) : (fu == FU_BRU) ? (st == 2) : (st == 3);
  endfunction
  function automatic opnd_t exp_opnd(uop_t u, uop_t first, int slot, bit v, ridx_t r);
    if (!v) return '{ready: 1'b1, tag: '0, value: '0};
    if (slot == 1 && first.dst_v && first.dst == r) return '{ready: 1'b0, tag: rob_tag[0], value: '0};
    if (r % 3 == 0) return rob_view(r);
    return '{ready: 1'b1, tag: '0, value: 1000 + 32'(r)};
  endfunction
  task automatic random_phase();
    uop_t us [2];
    int st [2], n;
    bit can1;
    rnd_map = 1;
    for (int it = 0; it < 5000; it++) begin
      for (int i = 0; i < 2; i++) begin
        us[i] = mk(fu_e'($urandom % 3), int'($urandom % 9), int'($urandom % 9), int'($urandom % 9));
        us[i].dst_v = $urandom % 2; us[i].s1_v = $urandom % 2; us[i].s2_v = $urandom % 2;
        us[i].valid = ($urandom % 6 != 0);
      end
      if (!us[0].valid) us[1].valid = 0;
      d_i1 = us[0]; d_i2 = us[1];
      rob_free = 4'($urandom % 4);
      for (int k = 0; k < 4; k++) rs_full[k] = ($urandom % 4 == 0);
      rob_tag[0] = tag_t'($urandom % 12); rob_tag[1] = tag_t'((rob_tag[0] + 1) % 12);
      #1;
      `CHK(rob_alloc == take)
      n = 0;
      for (int k = 0; k < 4; k++) if (rs_push[k]) n++;
      `CHK(n == int'(take))
      for (int i = 0; i < 2; i++) st[i] = pushed_to(i);
      // slot 0
      `CHK((take >= 1) == (us[0].valid && rob_free >= 1 &&
            (us[0].fu == FU_ALU ? !(rs_full[0] && rs_full[1]) : !rs_full[us[0].fu == FU_BRU ? 2 : 3])))
      for (int i = 0; i < int'(take); i++) begin
        `CHK(st[i] >= 0 && in_class(us[i].fu, st[i]) && !rs_full[st[i]])
        if (st[i] >= 0) begin
          `CHK(rs_ent[st[i]].u == us[i])
          `CHK(rs_ent[st[i]].a == exp_opnd(us[i], us[0], i, us[i].s1_v, us[i].s1))
          `CHK(rs_ent[st[i]].b == exp_opnd(us[i], us[0], i, us[i].s2_v, us[i].s2))
        end
      end
      if (take == 2) `CHK(st[0] != st[1] && rob_free >= 2)
      // the second uop is left behind only when nothing allows it
      if (take == 1 && us[1].valid && rob_free >= 2 && st[0] >= 0) begin
        can1 = 0;
        for (int k = 0; k < 4; k++) if (k != st[0] && in_class(us[1].fu, k) && !rs_full[k]) can1 = 1;
        `CHK(!can1)
      end
    end
    rnd_map = 0;
  endtask

  // watchdog: the test advances time only by unit delays
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_END end

  initial begin
    rob_tag[0] = 4'd7; rob_tag[1] = 4'd8;
    for (int i = 0; i < 4; i++) rs_full[i] = 0;
    // two ALU uops, room everywhere: both go, one per ALU, operands
    d_i1 = mk(FU_ALU, 3, 1, 5); d_i2 = mk(FU_ALU, 4, 3, 6); rob_free = 4'd12; #1;
    `CHK(take == 2 && rob_alloc == 2 && pushed_to(0) == 0 && pushed_to(1) == 1)
    `CHK(rs_ent[0].a.ready && rs_ent[0].a.value == 1001 && rs_ent[0].b.ready && rs_ent[0].b.value == 55)
    `CHK(!rs_ent[1].a.ready && rs_ent[1].a.tag == 7 && !rs_ent[1].b.ready && rs_ent[1].b.tag == 9)
    // one ROB entry free: only the first
    rob_free = 4'd1; #1; `CHK(take == 1 && pushed_to(0) == 0 && pushed_to(1) == -1 && e1)
    rob_free = 4'd0; #1; `CHK(take == 0 && !rs_push[0] && !rs_push[1])
    rob_free = 4'd2; #1; `CHK(take == 2)
    // two loads: one per cycle
    d_i1 = mk(FU_LSU, 3, 1, -1); d_i2 = mk(FU_LSU, 4, 2, -1); #1;
    `CHK(take == 1 && pushed_to(0) == 3 && e3)
    // branch + load: both
    d_i1 = mk(FU_BRU, -1, 32, -1); #1; `CHK(take == 2 && pushed_to(0) == 2 && pushed_to(1) == 3)
    `CHK(rs_ent[2].a.value == 1032 && rs_ent[3].b.ready)
    // ALU1 full: ALU uop goes to ALU2; second ALU uop then waits
    rs_full[0] = 1; d_i1 = mk(FU_ALU, 3, 1, 2); d_i2 = mk(FU_ALU, 4, 1, 2); #1;
    `CHK(take == 1 && pushed_to(0) == 1)
    // load station full: load waits and so does the ALU uop behind it
    rs_full[0] = 0; rs_full[3] = 1; d_i1 = mk(FU_LSU, 3, 1, -1); #1;
    `CHK(take == 0 && e2)
    // invalid second slot
    rs_full[3] = 0; d_i2.valid = 0; #1; `CHK(take == 1)
    random_phase();
    `TB_END
  end
endmodule
