// tb_writeback: drives pairs of oldest reorder buffer entries into the write
// back unit and checks the commit count, register writes (with the same-
// register rule), flush and redirect on a misprediction, and the predictor
// update signals, against values worked out by hand.
// A random phase compares 4000 head pairs with a one-at-a-time retirement
// model.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_writeback;
  import puma_pkg::*;
  int checks = 0, failures = 0;
  rob_ent_t h [2];
  logic [1:0] commit;
  logic rf_we0, rf_we1, flush, pht_we, pht_taken, bhr_we, bhr_taken, btb_we, btb_uncond, btb_valid;
  ridx_t rf_wa0, rf_wa1;
  logic [31:0] rf_wd0, rf_wd1, redirect_pc, btb_pc, btb_target;
  logic [9:0] pht_idx;
  writeback dut (.*);

  function automatic rob_ent_t e(int dst, int v, logic dn);
    rob_ent_t x; x = '0; x.valid = 1; x.done = dn; x.dst_v = dst >= 0; x.dst = ridx_t'(dst);
    x.value = 32'(v); x.pc = 32'h100; x.target = 32'h104; return x;
  endfunction
  // random phase: the expected outcome is found by retiring the two entries
  // one after the other, the way a one-wide machine would, and by applying
  // the two register-file writes in port order to a small register model
  task automatic random_phase();
    logic [31:0] regs_ref [4], regs_dut [4];
    int n, bi;
    bit stop, fl;
    for (int it = 0; it < 4000; it++) begin
      for (int i = 0; i < 2; i++) begin
        h[i] = '0;
        h[i].valid = ($urandom % 8 != 0); h[i].done = ($urandom % 4 != 0);
        h[i].dst_v = $urandom % 2; h[i].dst = ridx_t'($urandom % 4); h[i].value = $urandom;
        h[i].is_br = ($urandom % 3 == 0); h[i].cond = h[i].is_br && ($urandom % 2);
        h[i].taken = $urandom % 2; h[i].exc = ($urandom % 4 == 0);
        h[i].pc = $urandom; h[i].target = $urandom; h[i].bp_idx = 10'($urandom);
      end
      for (int r = 0; r < 4; r++) begin regs_ref[r] = 32'(r); regs_dut[r] = 32'(r); end
      n = 0; bi = -1; stop = 0; fl = 0;
      for (int i = 0; i < 2 && !stop; i++) begin
        if (!h[i].valid || !h[i].done) stop = 1;
        else if (i == 1 && (h[0].exc || (h[0].is_br && h[1].is_br))) stop = 1;
        else begin
          n++;
          if (h[i].dst_v) regs_ref[h[i].dst[1:0]] = h[i].value;
          if (bi < 0 && (h[i].is_br || h[i].exc)) bi = i;
          if (h[i].exc) fl = 1;
        end
      end
      #1;
      if (rf_we0) regs_dut[rf_wa0[1:0]] = rf_wd0;
      if (rf_we1) regs_dut[rf_wa1[1:0]] = rf_wd1;
      `CHK(commit == 2'(n))
      `CHK(regs_dut == regs_ref)
      `CHK(!(rf_we0 && rf_we1 && rf_wa0 == rf_wa1))   // never two writes to one register
      `CHK(flush == fl)
      if (fl) `CHK(redirect_pc == h[bi].target)
      `CHK(pht_we == (bi >= 0 && h[bi].is_br && h[bi].cond))
      if (pht_we) `CHK(pht_idx == h[bi].bp_idx && pht_taken == h[bi].taken)
      `CHK(bhr_we == (fl && h[bi].is_br && h[bi].cond))
      `CHK(btb_we == (fl && (!h[bi].is_br || h[bi].taken)))
      if (btb_we) `CHK(btb_pc == h[bi].pc && btb_target == h[bi].target && btb_valid == h[bi].is_br)
    end
  endtask

  // watchdog: the test advances time only by unit delays
  initial begin #1000000; failures++; $display("watchdog expired"); `TB_END end

  initial begin
    h[0] = e(1, 11, 1); h[1] = e(2, 22, 1); #1;
    `CHK(commit == 2 && rf_we0 && rf_wa0 == 1 && rf_wd0 == 11 && rf_we1 && rf_wa1 == 2 && rf_wd1 == 22 && !flush)
    h[1] = e(1, 33, 1); #1;
    `CHK(commit == 2 && !rf_we0 && rf_we1 && rf_wd1 == 33)
    h[1].done = 0; #1;  `CHK(commit == 1 && rf_we0 && !rf_we1)
    h[0].done = 0; h[1].done = 1; #1; `CHK(commit == 0 && !rf_we0 && !rf_we1)
    h[1].valid = 0; h[0].done = 1; #1; `CHK(commit == 1)
    // mispredicted taken conditional branch first: commits alone, flushes, trains
    h[0] = e(-1, 0, 1); h[0].is_br = 1; h[0].cond = 1; h[0].taken = 1; h[0].exc = 1;
    h[0].target = 32'h400; h[0].bp_idx = 10'h2A; h[1] = e(3, 3, 1); #1;
    `CHK(commit == 1 && flush && redirect_pc == 32'h400 && !rf_we1)
    `CHK(pht_we && pht_idx == 10'h2A && pht_taken && bhr_we && bhr_taken)
    `CHK(btb_we && btb_pc == 32'h100 && btb_target == 32'h400 && !btb_uncond && btb_valid)
    // correctly predicted branch: trains the table only
    h[0].exc = 0; #1; `CHK(commit == 2 && !flush && pht_we && !bhr_we && !btb_we)
    // two branches: one per cycle
    h[1] = h[0]; #1; `CHK(commit == 1)
    // second slot mispredicted not-taken: both commit, flush to fall-through, no BTB write
    h[0] = e(4, 4, 1); h[1].exc = 1; h[1].taken = 0; h[1].target = 32'h104; #1;
    `CHK(commit == 2 && flush && redirect_pc == 32'h104 && !btb_we && bhr_we && !bhr_taken && rf_we0)
    // stale BTB hit on a non-branch: flush and remove the entry
    h[0] = e(5, 5, 1); h[0].exc = 1; h[0].target = 32'h104; #1;
    `CHK(commit == 1 && flush && btb_we && !btb_valid && !pht_we && rf_we0)
    random_phase();
    `TB_END
  end
endmodule
