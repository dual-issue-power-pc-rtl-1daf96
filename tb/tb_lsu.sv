// tb_lsu: the load/store unit with a real data cache and a behavioural DMAQ
// (12-cycle line reads, immediate writes to a testbench memory). Checks a load
// miss (line request, completion after the fill, word value), a load that hits
// while a miss is outstanding and completes first, a store held until it is
// the oldest ROB entry, store write-through and cache update, byte load and
// store, and that a flush drops an outstanding miss's result.
// A random phase then runs 800 loads and stores against a memory model.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_lsu;
  import puma_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, in_valid = 0, pop, grant = 1;
  rs_ent_t in_ent;
  tag_t rob_head = '0;
  logic [31:0] dc_addr, dc_rdata, dc_wdata, mq_addr, mq_wdata, fill_addr;
  logic dc_hit, dc_we, mq_valid, mq_we, mq_ready = 1, fill_valid = 0;
  logic [3:0] dc_be, mq_be;
  logic [127:0] fill_line;
  cdb_t res;
  logic ev_miss, ev_hum;
  logic inv_en = 0; logic [5:0] inv_idx;
  lsu dut (.clk, .rst_n, .flush, .in_valid, .in_ent, .pop, .rob_head, .dc_addr, .dc_rdata,
           .dc_hit, .dc_we, .dc_wdata, .dc_be, .mq_valid, .mq_we, .mq_addr, .mq_wdata, .mq_be,
           .mq_ready, .fill_valid, .fill_addr, .fill_line, .res, .grant, .ev_miss,
           .ev_hit_under_miss(ev_hum));
  dcache #(.LINES(64)) u_dc (.clk, .rd_addr(dc_addr), .rd_data(dc_rdata), .rd_hit(dc_hit),
           .wr_en(dc_we), .wr_addr(dc_addr), .wr_data(dc_wdata), .wr_be(dc_be),
           .fill_en(fill_valid), .fill_addr, .fill_line, .inv_en, .inv_idx);

  logic [31:0] mem [1024];
  logic [31:0] rd_q [$]; longint rd_t [$]; longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    fill_valid <= 0;
    if (rd_t.size() > 0 && rd_t[0] <= cyc) begin
      logic [31:0] a; a = rd_q.pop_front(); void'(rd_t.pop_front());
      fill_valid <= 1; fill_addr <= a;
      fill_line <= {mem[a[11:2]], mem[a[11:2] + 1], mem[a[11:2] + 2], mem[a[11:2] + 3]};
    end
    if (mq_valid && mq_ready) begin
      if (mq_we) begin for (int b = 0; b < 4; b++) if (mq_be[b]) mem[mq_addr[11:2]][8*b +: 8] <= mq_wdata[8*b +: 8]; end
      else begin rd_q.push_back(mq_addr); rd_t.push_back(cyc + 12); end
    end
  end
  // completions seen: tag and value
  int comp_tag [$]; logic [31:0] comp_val [$]; longint comp_cyc [$];
  always @(posedge clk) if (res.valid && grant) begin
    comp_tag.push_back(int'(res.tag)); comp_val.push_back(res.value); comp_cyc.push_back(cyc);
  end

  task automatic issue(op_e op, int tag, logic [31:0] base, logic [31:0] d, logic [31:0] data);
    in_ent = '0; in_ent.u.op = op; in_ent.u.fu = FU_LSU; in_ent.tag = tag_t'(tag);
    in_ent.a.value = base; in_ent.u.imm = d; in_ent.b.value = data; in_ent.a.ready = 1; in_ent.b.ready = 1;
    in_valid = 1; #1;
    while (!pop) begin @(negedge clk); #1; end
    @(negedge clk); in_valid = 0;
  endtask

  // random phase: 800 random word/byte loads and stores over 4 KB (the 1 KB
  // cache conflicts often), with the completion bus granted at random. Each
  // load's expected value is taken from a program-order memory model when it
  // is issued; each completion must carry the value of its tag. Every load
  // must complete, and memory must equal the model at the end.
  bit rnd_grant = 0;
  always @(negedge clk) if (rnd_grant) grant = ($urandom % 3 != 0);
  task automatic random_phase();
    logic [31:0] refm [1024];
    logic [32:0] eq [16][$];             // per tag, in issue order: {is_load, value}
    int n0, nload, nl;
    repeat (30) @(negedge clk);
    for (int i = 0; i < 1024; i++) refm[i] = mem[i];
    n0 = comp_tag.size(); nload = 0;
    rnd_grant = 1;
    for (int i = 0; i < 800; i++) begin
      logic [31:0] a, d;
      int tag;
      tag = i % 16;
      a = $urandom % 4096; d = $urandom;
      case ($urandom % 4)
        0: begin a[1:0] = 0; eq[tag].push_back({1'b1, refm[a[11:2]]}); nload++; issue(OP_LW, tag, a, 0, 0); end
        1: begin eq[tag].push_back({1'b1, 24'h0, refm[a[11:2]][31 - 8*a[1:0] -: 8]}); nload++;
                 issue(OP_LB, tag, a, 0, 0); end
        2: begin a[1:0] = 0; refm[a[11:2]] = d; eq[tag].push_back({1'b0, d}); rob_head = tag_t'(tag);
                 issue(OP_SW, tag, a, 0, d); end
        default: begin refm[a[11:2]][31 - 8*a[1:0] -: 8] = d[7:0]; eq[tag].push_back({1'b0, d});
                       rob_head = tag_t'(tag); issue(OP_SB, tag, a, 0, d); end
      endcase
    end
    repeat (40) @(negedge clk);
    rnd_grant = 0; grant = 1;
    nl = 0;
    for (int k = n0; k < comp_tag.size(); k++) begin
      logic [32:0] e;
      `CHK(eq[comp_tag[k]].size() > 0)
      if (eq[comp_tag[k]].size() > 0) begin
        e = eq[comp_tag[k]].pop_front();
        if (e[32]) begin
          nl++;
          `CHK(comp_val[k] == e[31:0])
          if (comp_val[k] != e[31:0])
            $display("  tag %0d got %h expected %h", comp_tag[k], comp_val[k], e[31:0]);
        end
      end
    end
    `CHK(nl == nload)
    for (int i = 0; i < 1024; i++) `CHK(mem[i] == refm[i])
  endtask

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #2000000; failures++; `TB_END end
  initial begin
    longint t0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'(i * 4 + 32'h1000_0000);
    for (int i = 0; i < 64; i++) begin @(negedge clk); inv_en = 1; inv_idx = 6'(i); end
    @(negedge clk); inv_en = 0;
    // load miss at 0x208
    t0 = cyc; issue(OP_LW, 1, 32'h200, 32'h8, 0);
    repeat (20) @(negedge clk);
    `CHK(comp_tag.size() == 1 && comp_tag[0] == 1 && comp_val[0] == 32'h1000_0208)
    `CHK(comp_cyc.size() == 1 && comp_cyc[0] - t0 >= 12)
    // miss at 0x104, then hit at 0x20c while it is outstanding
    issue(OP_LW, 2, 32'h100, 32'h4, 0);
    issue(OP_LW, 3, 32'h20c, 32'h0, 0);
    `CHK(ev_hum || comp_tag.size() >= 2)
    repeat (20) @(negedge clk);
    `CHK(comp_tag.size() == 3 && comp_tag[1] == 3 && comp_val[1] == 32'h1000_020c && comp_tag[2] == 2 && comp_val[2] == 32'h1000_0104)
    // store waits for ROB head
    in_ent = '0; in_ent.u.op = OP_SW; in_ent.tag = 4'd5; in_ent.a.value = 32'h200; in_ent.u.imm = 4;
    in_ent.b.value = 32'hDEAD_BEEF; in_ent.a.ready = 1; in_ent.b.ready = 1; in_valid = 1;
    repeat (3) begin #1 `CHK(!pop) @(negedge clk); end
    rob_head = 4'd5; #1 `CHK(pop && mq_valid && mq_we && dc_we)
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    `CHK(mem[32'h204 >> 2] == 32'hDEAD_BEEF)
    issue(OP_LW, 6, 32'h204, 0, 0);
    @(negedge clk);
    `CHK(comp_val[comp_val.size() - 1] == 32'hDEAD_BEEF)
    // byte store and byte load
    rob_head = 4'd7; issue(OP_SB, 7, 32'h205, 32'h1, 32'h0000_00A5);
    issue(OP_LW, 8, 32'h204, 0, 0); issue(OP_LB, 9, 32'h206, 0, 0); issue(OP_LB, 10, 32'h200, 32'h0, 0);
    @(negedge clk);
    `CHK(comp_val[comp_val.size() - 3] == 32'hDEAD_A5EF && comp_val[comp_val.size() - 2] == 32'hA5)
    `CHK(comp_val[comp_val.size() - 1] == 32'h10)
    `CHK(mem[32'h204 >> 2] == 32'hDEAD_A5EF)
    // flush drops an outstanding miss
    issue(OP_LW, 11, 32'h300, 0, 0);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    repeat (20) @(negedge clk);
    `CHK(comp_tag[comp_tag.size() - 1] == 10)
    // and the unit works afterwards
    issue(OP_LW, 12, 32'h304, 0, 0);
    repeat (3) @(negedge clk);
    `CHK(comp_tag[comp_tag.size() - 1] == 12 && comp_val[comp_val.size() - 1] == 32'h1000_0304)
    random_phase();
    `TB_END
  end
endmodule
