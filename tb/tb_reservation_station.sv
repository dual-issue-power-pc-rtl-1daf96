// tb_reservation_station: pushes entries whose operands wait for tags,
// broadcasts results on the two completion buses, and checks operand capture
// (also on the push cycle), strict in-order issue (a ready younger entry waits
// behind a waiting head), the full flag at four entries, and flush. A random
// phase then compares the station with a queue model for 3000 cycles.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_reservation_station;
  import puma_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, push = 0, full, head_valid, pop = 0;
  rs_ent_t push_ent, head_ent;
  cdb_t cdb [2];
  reservation_station dut (.*);

  function automatic rs_ent_t ent(int t, int wa, int wb);
    rs_ent_t e; e = '0; e.tag = tag_t'(t); e.u.valid = 1;
    e.a = (wa < 0) ? '{ready: 1'b1, tag: '0, value: 32'(100 + t)} : '{ready: 1'b0, tag: tag_t'(wa), value: '0};
    e.b = (wb < 0) ? '{ready: 1'b1, tag: '0, value: 32'(200 + t)} : '{ready: 1'b0, tag: tag_t'(wb), value: '0};
    return e;
  endfunction
  task automatic bcast(int bus, int t, int v);
    cdb[bus] = '0; cdb[bus].valid = 1; cdb[bus].tag = tag_t'(t); cdb[bus].value = 32'(v);
  endtask

  // random phase: a queue model applies the same pushes, broadcasts and pops,
  // and the head, its readiness and the full flag are compared every cycle
  rs_ent_t m [$];
  function automatic opnd_t msnoop(opnd_t o);
    for (int i = 0; i < 2; i++)
      if (!o.ready && cdb[i].valid && cdb[i].tag == o.tag) begin o.ready = 1; o.value = cdb[i].value; end
    return o;
  endfunction
  task automatic random_phase();
    rs_ent_t e;
    bit hv;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      push = ($urandom % 3 != 0);
      e = '0; e.u.valid = 1; e.tag = tag_t'($urandom);
      e.a = ($urandom % 2) ? '{ready: 1'b1, tag: '0, value: $urandom}
                           : '{ready: 1'b0, tag: tag_t'($urandom), value: '0};
      e.b = ($urandom % 2) ? '{ready: 1'b1, tag: '0, value: $urandom}
                           : '{ready: 1'b0, tag: tag_t'($urandom), value: '0};
      push_ent = e;
      for (int i = 0; i < 2; i++) begin
        cdb[i] = '0;
        if ($urandom % 2) begin cdb[i].valid = 1; cdb[i].tag = tag_t'($urandom); cdb[i].value = $urandom; end
      end
      hv = m.size() > 0 && m[0].a.ready && m[0].b.ready;
      pop = hv && ($urandom % 4 != 0);
      #1;
      `CHK(full == (m.size() == 4))
      `CHK(head_valid == hv)
      if (hv) `CHK(head_ent.tag == m[0].tag && head_ent.a.value == m[0].a.value
                   && head_ent.b.value == m[0].b.value)
      // model update at the clock edge
      foreach (m[i]) begin m[i].a = msnoop(m[i].a); m[i].b = msnoop(m[i].b); end
      if (push && m.size() < 4) begin e.a = msnoop(e.a); e.b = msnoop(e.b); m.push_back(e); end
      if (pop) void'(m.pop_front());
      @(negedge clk);
    end
    push = 0; pop = 0; cdb[0] = '0; cdb[1] = '0;
  endtask

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #1000000; failures++; `TB_END end
  initial begin
    cdb[0] = '0; cdb[1] = '0;
    @(negedge clk); @(negedge clk);
    // entry 1 waits for tag 9 (a), entry 2 ready, entry 3 waits for 10 (b), entry 4 waits for 11 on push cycle
    push = 1; push_ent = ent(1, 9, -1);
    @(negedge clk); push_ent = ent(2, -1, -1);
    @(negedge clk); push_ent = ent(3, -1, 10);
    @(negedge clk); push_ent = ent(4, 11, 11); bcast(0, 11, 77);
    @(negedge clk); push = 0; cdb[0] = '0; #1;
    `CHK(full && !head_valid)                    // head waits, younger ready entry waits too
    bcast(1, 9, 99);
    @(negedge clk); cdb[1] = '0; #1;
    `CHK(head_valid && head_ent.tag == 1 && head_ent.a.value == 99 && head_ent.b.value == 201)
    pop = 1;
    @(negedge clk); #1;
    `CHK(!full && head_valid && head_ent.tag == 2)
    @(negedge clk); pop = 0; #1;
    `CHK(!head_valid && head_ent.tag == 3)
    bcast(0, 10, 1010); bcast(1, 12, 5);
    @(negedge clk); cdb[0] = '0; cdb[1] = '0; #1;
    `CHK(head_valid && head_ent.b.value == 1010)
    pop = 1;
    @(negedge clk); pop = 0; #1;
    `CHK(head_valid && head_ent.tag == 4 && head_ent.a.value == 77 && head_ent.b.value == 77)
    flush = 1;
    @(negedge clk); flush = 0; #1;
    `CHK(!head_valid && !full)
    random_phase();
    `TB_END
  end
endmodule
