// rob: reorder buffer.
//
// A FIFO of ROB_N entries keeps the in-flight instructions in program order;
// two can be allocated (at dispatch) and two retired (at commit) per cycle.
// Each entry is also the physical register of its instruction: the completion
// buses write its value and status (done, branch outcome, misprediction).
// The register alias table (RAT) maps each architectural register to the tag
// of its newest in-flight producer, with a valid bit (V) per register; the
// ready bit (R) is the producing entry's done flag. A lookup returns the
// mapping, the ready bit and the value ("lookahead value"), and also catches a
// result on a completion bus in the same cycle. The write back unit reads the
// two oldest entries ("writeback value / status") and says how many retire. A
// retiring entry clears its RAT mapping unless a younger instruction took it.
// A flush (exception at commit) empties the buffer and clears the RAT.
//
// The 12 entries, the dual push/pop and the RAT organisation follow the
// document. Tags are entry numbers 0..ROB_N-1 (4 bits). An entry allocated for
// a non-branch uop that the fetch stage predicted as a taken branch (a stale
// branch target buffer entry) is marked as an exception from the start, so that
// fetching restarts after it when it commits.
module rob
  import puma_pkg::*;
#(
  parameter int unsigned N = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  // allocation
  input  logic [1:0] alloc,
  input  uop_t       alloc_u [2],
  output tag_t       alloc_tag [2],
  output logic [3:0] free_cnt,
  // operand lookup
  input  ridx_t      lk_idx [4],
  output logic       lk_mapped [4],
  output opnd_t      lk_opnd [4],
  // completion buses
  input  cdb_t       cdb [2],
  // commit
  output rob_ent_t   head_ent [2],
  output tag_t       head_tag,
  input  logic [1:0] commit
);
  rob_ent_t ent [N];
  tag_t     head, tail;
  logic [3:0] count;
  localparam int NR = 1 << RIDX_W;
  logic     rat_v [NR];
  tag_t     rat_t [NR];

  function automatic tag_t inc(input tag_t t, input int d);
    int v;
    v = (int'(t) + d) % int'(N);
    return tag_t'(v);
  endfunction

  assign alloc_tag[0] = tail;
  assign alloc_tag[1] = inc(tail, 1);
  assign free_cnt     = 4'(N) - count;
  assign head_tag     = head;
  always_comb begin
    head_ent[0] = ent[head];
    head_ent[1] = ent[inc(head, 1)];
    head_ent[0].valid = ent[head].valid && count >= 4'd1;
    head_ent[1].valid = ent[inc(head, 1)].valid && count >= 4'd2;
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      tag_t t;
      t = rat_t[lk_idx[p]];
      lk_mapped[p] = rat_v[lk_idx[p]];
      lk_opnd[p]   = '{ready: ent[t].done, tag: t, value: ent[t].value};
      for (int c = 0; c < 2; c++)
        if (cdb[c].valid && cdb[c].tag == t) begin
          lk_opnd[p].ready = 1'b1; lk_opnd[p].value = cdb[c].value;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < int'(N); i++) ent[i] <= '0;
      for (int r = 0; r < NR; r++) begin rat_v[r] <= 1'b0; rat_t[r] <= '0; end
    end else if (flush) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < int'(N); i++) ent[i].valid <= 1'b0;
      for (int r = 0; r < NR; r++) rat_v[r] <= 1'b0;
    end else begin
      // commit: release entries and their mappings
      for (int k = 0; k < 2; k++)
        if (32'(k) < 32'(commit)) begin
          tag_t t;
          t = inc(head, k);
          ent[t].valid <= 1'b0;
          if (ent[t].dst_v && rat_v[ent[t].dst] && rat_t[ent[t].dst] == t)
            rat_v[ent[t].dst] <= 1'b0;
        end
      // completion
      for (int c = 0; c < 2; c++)
        if (cdb[c].valid) begin
          ent[cdb[c].tag].done   <= 1'b1;
          ent[cdb[c].tag].value  <= cdb[c].value;
          ent[cdb[c].tag].is_br  <= cdb[c].is_br;
          ent[cdb[c].tag].cond   <= cdb[c].cond;
          ent[cdb[c].tag].taken  <= cdb[c].taken;
          if (cdb[c].is_br) ent[cdb[c].tag].target <= cdb[c].target;
          ent[cdb[c].tag].exc    <= ent[cdb[c].tag].exc | cdb[c].exc;
        end
      // allocation (later statements win: a new mapping beats a release)
      for (int k = 0; k < 2; k++)
        if (32'(k) < 32'(alloc)) begin
          tag_t t;
          t = inc(tail, k);
          ent[t] <= '{valid: 1'b1, done: 1'b0, dst_v: alloc_u[k].dst_v,
                      dst: alloc_u[k].dst, value: '0, is_br: 1'b0, cond: 1'b0,
                      taken: 1'b0, target: alloc_u[k].pc + 32'd4,
                      // a non-branch the fetch stage predicted taken: refetch after it
                      exc: alloc_u[k].pred_taken && alloc_u[k].fu != FU_BRU,
                      pc: alloc_u[k].pc,
                      bp_idx: alloc_u[k].bp_idx};
          if (alloc_u[k].dst_v) begin
            rat_v[alloc_u[k].dst] <= 1'b1;
            rat_t[alloc_u[k].dst] <= t;
          end
        end
      head  <= inc(head, int'(commit));
      tail  <= inc(tail, int'(alloc));
      count <= count + 4'(alloc) - 4'(commit);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    32'(alloc) <= 32'(free_cnt));
  a_commit_done: assert property (@(posedge clk) disable iff (!rst_n)
    commit != 0 |-> head_ent[0].valid && head_ent[0].done);
endmodule
