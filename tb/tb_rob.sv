// tb_rob: reorder buffer. Allocates pairs until full (12 entries), checks tags
// and the free count, register renaming in the RAT (newest producer wins,
// also within one pair), lookups before and after completion and with a
// same-cycle completion-bus bypass, in-order retirement of two per cycle with
// the release of mappings, FIFO wrap-around, and flush.
// A random phase then compares the ROB with a queue model for 4000 cycles.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_rob;
  import puma_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0;
  logic [1:0] alloc = 0, commit = 0;
  uop_t alloc_u [2];
  tag_t alloc_tag [2], head_tag;
  logic [3:0] free_cnt;
  ridx_t lk_idx [4];
  logic lk_mapped [4];
  opnd_t lk_opnd [4];
  cdb_t cdb [2];
  rob_ent_t head_ent [2];
  rob dut (.*);

  function automatic uop_t mk(int dst);
    uop_t u; u = '0; u.valid = 1; u.dst_v = dst >= 0; u.dst = ridx_t'(dst); u.pc = 32'(dst * 4); return u;
  endfunction
  task automatic done(int bus, int t, int v);
    cdb[bus] = '0; cdb[bus].valid = 1; cdb[bus].tag = tag_t'(t); cdb[bus].value = 32'(v);
  endtask

  // random phase: a queue model of the in-flight entries. Each cycle random
  // allocations (within the free count), completions of waiting entries on
  // the two buses, commits of finished heads, lookups of r0..r7 and rare
  // flushes; free count, head entries and lookups (newest producer, bus
  // bypass) are compared with the model before the clock edge.
  typedef struct { tag_t tag; logic dst_v; ridx_t dst; logic done; logic [31:0] value; } ment_t;
  ment_t m [$];
  task automatic random_phase();
    int na, nc, nd;
    ment_t e;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      flush = ($urandom % 200 == 0);
      na = flush ? 0 : int'($urandom % 3);
      if (na > 12 - m.size()) na = 12 - m.size();
      alloc = 2'(na);
      for (int i = 0; i < 2; i++) begin
        alloc_u[i] = '0; alloc_u[i].valid = 1; alloc_u[i].dst_v = ($urandom % 4 != 0);
        alloc_u[i].dst = ridx_t'($urandom % 8);
      end
      // completions: up to two distinct waiting entries
      cdb[0] = '0; cdb[1] = '0; nd = 0;
      foreach (m[i]) if (!m[i].done && nd < 2 && $urandom % 3 == 0) begin
        cdb[nd].valid = 1; cdb[nd].tag = m[i].tag; cdb[nd].value = $urandom; nd++;
      end
      // commits: finished heads only
      nc = 0;
      if (m.size() > 0 && m[0].done) nc = 1 + int'(m.size() > 1 && m[1].done);
      nc = flush ? 0 : int'($urandom % 32'(nc + 1));
      commit = 2'(nc);
      for (int p = 0; p < 4; p++) lk_idx[p] = ridx_t'($urandom % 8);
      #1;
      `CHK(free_cnt == 4'(12 - m.size()))
      for (int i = 0; i < 2; i++) begin
        `CHK(head_ent[i].valid == (i < m.size()))
        if (i < m.size()) `CHK(head_ent[i].done == m[i].done && head_ent[i].dst_v == m[i].dst_v
                               && (!m[i].dst_v || head_ent[i].dst == m[i].dst)
                               && (!m[i].done || head_ent[i].value == m[i].value))
      end
      for (int p = 0; p < 4; p++) begin
        int k;
        k = -1;
        foreach (m[i]) if (m[i].dst_v && m[i].dst == lk_idx[p]) k = i;
        `CHK(lk_mapped[p] == (k >= 0))
        if (k >= 0) begin
          logic rdy; logic [31:0] v;
          rdy = m[k].done; v = m[k].value;
          for (int b = 0; b < 2; b++)
            if (!rdy && cdb[b].valid && cdb[b].tag == m[k].tag) begin rdy = 1; v = cdb[b].value; end
          `CHK(lk_opnd[p].ready == rdy && lk_opnd[p].tag == m[k].tag && (!rdy || lk_opnd[p].value == v))
        end
      end
      for (int i = 0; i < na; i++) begin
        bit clash;
        clash = 0;
        foreach (m[j]) if (m[j].tag == alloc_tag[i]) clash = 1;
        `CHK(!clash && alloc_tag[i] < 12 && (i == 0 || alloc_tag[1] != alloc_tag[0]))
      end
      // model update at the clock edge
      if (flush) m.delete();
      else begin
        foreach (m[i]) for (int b = 0; b < 2; b++)
          if (cdb[b].valid && cdb[b].tag == m[i].tag) begin m[i].done = 1; m[i].value = cdb[b].value; end
        for (int i = 0; i < nc; i++) void'(m.pop_front());
        for (int i = 0; i < na; i++) begin
          e.tag = alloc_tag[i]; e.dst_v = alloc_u[i].dst_v; e.dst = alloc_u[i].dst;
          e.done = 0; e.value = '0; m.push_back(e);
        end
      end
      @(negedge clk);
    end
    flush = 0; alloc = 0; commit = 0; cdb[0] = '0; cdb[1] = '0;
  endtask

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #1000000; failures++; `TB_END end
  initial begin
    cdb[0] = '0; cdb[1] = '0;
    for (int p = 0; p < 4; p++) lk_idx[p] = '0;
    @(negedge clk); #1;
    `CHK(free_cnt == 12 && !head_ent[0].valid)
    // allocate 6 pairs: r1..r12 with r3 written twice (tags 2 and 3)
    for (int k = 0; k < 6; k++) begin
      alloc = 2; alloc_u[0] = mk(k == 1 ? 3 : 2 * k + 1); alloc_u[1] = mk(2 * k + 2);
      #1 `CHK(alloc_tag[0] == tag_t'(2 * k) && alloc_tag[1] == tag_t'(2 * k + 1))
      @(negedge clk);
    end
    alloc = 0; #1;
    `CHK(free_cnt == 0)
    lk_idx[0] = 3; lk_idx[1] = 2; lk_idx[2] = 30; lk_idx[3] = 12; #1;
    `CHK(lk_mapped[0] && lk_opnd[0].tag == 2 && !lk_opnd[0].ready)   // r3: newest producer, tag 2
    `CHK(lk_mapped[1] && lk_opnd[1].tag == 1 && !lk_mapped[2] && lk_opnd[3].tag == 11)
    done(0, 2, 333); #1;
    `CHK(lk_opnd[0].ready && lk_opnd[0].value == 333)            // bypass
    @(negedge clk); cdb[0] = '0; #1;
    `CHK(lk_opnd[0].ready && lk_opnd[0].value == 333)
    // complete tags 0 and 1, retire two
    done(0, 0, 10); done(1, 1, 11);
    @(negedge clk); cdb[0] = '0; cdb[1] = '0; #1;
    `CHK(head_ent[0].valid && head_ent[0].done && head_ent[0].value == 10 && head_ent[1].value == 11)
    `CHK(head_ent[0].dst == 1 && head_ent[1].dst == 2 && head_tag == 0)
    commit = 2;
    @(negedge clk); commit = 0; #1;
    `CHK(free_cnt == 2 && head_tag == 2 && !lk_mapped[1] && lk_mapped[0])
    // wrap: allocate r20,r21 at tags 0,1
    alloc = 2; alloc_u[0] = mk(20); alloc_u[1] = mk(20); #1;
    `CHK(alloc_tag[0] == 0 && alloc_tag[1] == 1)
    @(negedge clk); alloc = 0; lk_idx[2] = 20; #1;
    `CHK(lk_mapped[2] && lk_opnd[2].tag == 1)
    // retire tag 2 (r3): the mapping to tag 2 is released
    commit = 1;
    @(negedge clk); commit = 0; #1;
    `CHK(!lk_mapped[0] && head_tag == 3)
    flush = 1;
    @(negedge clk); flush = 0; #1;
    `CHK(free_cnt == 12 && !lk_mapped[2] && !head_ent[0].valid)
    random_phase();
    `TB_END
  end
endmodule
