// tb_decode_issue: feeds instruction pairs to the decode/issue unit and
// records the uop stream it issues. Checks the document's selection rules by
// cycle: two single-uop instructions issue together; a single-uop instruction
// next to a multi-uop one issues alone; multi-uop instructions issue two uops
// per cycle in order (lmw expands into 32-rt loads with rising offsets). Also
// checks that a partial take by dispatch re-offers the second uop alone and
// that nothing is lost or duplicated.
// A random phase then runs a 400-instruction program with random fetch
// supply and random dispatch takes against the expected uop sequence.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_decode_issue;
  import puma_pkg::*;
  import ppc_asm_pkg::*;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, d1h, d2h, ev_dual, ev_multi;
  finst_t inst [2];
  logic [1:0] consume, take;
  uop_t d_i1, d_i2;
  decode_issue dut (.clk, .rst_n, .flush, .inst, .consume, .d_i1, .d_i2, .take,
                    .decode1_hold(d1h), .decode2_hold(d2h), .ev_dual, .ev_multi);

  // program: pairs as fetched
  logic [31:0] prog [$];
  int ip = 0;
  int unsigned pair_bad = 0;     // offered pairs from two instructions, not both simple
  int unsigned pair_two = 0;     // offered pairs of two single-uop instructions
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      inst[k] = '0;
      if (ip + k < prog.size() && k < avail) begin
        inst[k].valid = 1; inst[k].instr = prog[ip + k]; inst[k].pc = 32'((ip + k) * 4);
      end
    end
  end
  logic partial = 0, stall = 0;
  int avail = 2;                 // instructions the fetch side offers
  always_comb take = stall ? 2'd0 :
                     (d_i1.valid && d_i2.valid) ? (partial ? 2'd1 : 2'd2) : (d_i1.valid ? 2'd1 : 2'd0);

  uop_t got [$];
  int pairs [$];       // uops issued per cycle (offered pairs)
  always @(posedge clk) if (rst_n) begin
    ip <= ip + int'(consume);
    if (take >= 1) got.push_back(d_i1);
    if (take == 2) got.push_back(d_i2);
    if (d_i1.valid) pairs.push_back(d_i2.valid ? 2 : 1);
    if (d_i1.valid && d_i2.valid && d_i1.pc != d_i2.pc &&
        (num_uops(prog[d_i1.pc / 4]) != 1 || num_uops(prog[d_i2.pc / 4]) != 1)) pair_bad++;
    if (d_i1.valid && d_i2.valid && d_i1.pc != d_i2.pc) pair_two++;
  end

  // random phase: a random program, random fetch supply and random takes by
  // dispatch; the uops taken must be exactly each instruction's uop sequence
  // in program order, and only two single-uop instructions may share a pair
  task automatic random_phase();
    uop_t exp_u [$];
    finst_t f;
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    prog.delete(); got.delete(); pair_bad = 0;
    for (int i = 0; i < 400; i++) begin
      int r;
      r = 20 + int'($urandom % 12);
      case ($urandom % 8)
        0: prog.push_back(lmw(r, 4 * int'($urandom % 64), 1));
        1: prog.push_back(stmw(r, 4 * int'($urandom % 64), 1));
        2: prog.push_back(lwzu(r, 8, 3));
        3: prog.push_back(stwu(r, 8, 3));
        default: prog.push_back(addi(r, 0, int'($urandom % 1000)));
      endcase
    end
    for (int i = 0; i < prog.size(); i++) begin
      f = '0; f.valid = 1; f.instr = prog[i]; f.pc = 32'(i * 4);
      for (int k = 0; k < int'(num_uops(prog[i])); k++) exp_u.push_back(decode_uop(f, k));
    end
    ip = 0;
    for (int cyc = 0; cyc < 5000 && got.size() < exp_u.size(); cyc++) begin
      avail = int'($urandom % 3); partial = $urandom % 2; stall = ($urandom % 4 == 0);
      @(negedge clk);
    end
    avail = 2; partial = 0; stall = 0;
    `CHK(got.size() == exp_u.size())
    for (int i = 0; i < exp_u.size() && i < got.size(); i++) `CHK(got[i] == exp_u[i])
    `CHK(pair_bad == 0)
    `CHK(pair_two > 50)              // single-uop neighbours are paired
  endtask

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #1000000; failures++; `TB_END end
  initial begin
    // 0,1: two singles; 2: single + 3: lmw r28 (4 uops); 4: lwzu (2) + 5: single
    prog = '{addi(1, 0, 1), addi(2, 0, 2), addi(3, 0, 3), lmw(28, 16, 5),
             lwzu(6, 8, 7), add(8, 1, 2), addi(9, 0, 9), addi(10, 0, 10)};
    repeat (12) @(negedge clk);
    `CHK(got.size() == 12)
    if (got.size() == 12) begin
      `CHK(got[0].op == OP_ADD && got[0].dst == 1 && got[1].dst == 2 && got[2].dst == 3)
      for (int k = 0; k < 4; k++)
        `CHK(got[3 + k].op == OP_LW && got[3 + k].dst == 6'(28 + k) && got[3 + k].imm == 32'(16 + 4 * k) && got[3 + k].pc == 12)
      `CHK(got[7].op == OP_LW && got[7].dst == 6 && got[8].op == OP_ADD && got[8].dst == 7 && got[8].s1 == 7)
      `CHK(got[9].op == OP_ADD && got[9].dst == 8 && got[10].dst == 9 && got[11].dst == 10)
    end
    // issue pattern per cycle: {1,2} {3} {lmw 28,29} {30,31} {lwzu,upd} {add,addi9}
    `CHK(pairs.size() >= 6)
    if (pairs.size() >= 6) `CHK(pairs[0] == 2 && pairs[1] == 1 && pairs[2] == 2 && pairs[3] == 2 && pairs[4] == 2 && pairs[5] == 2)
    // partial takes: everything still arrives once, in order
    got.delete(); pairs.delete();
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0; ip = 0; partial = 1;
    prog = '{addi(1, 0, 1), addi(2, 0, 2), stmw(29, 0, 1), addi(3, 0, 3)};
    repeat (14) @(negedge clk);
    `CHK(got.size() == 6)
    if (got.size() == 6)
      `CHK(got[0].dst == 1 && got[1].dst == 2 && got[2].s2 == 29 && got[3].s2 == 30 && got[4].s2 == 31 && got[4].imm == 8 && got[5].dst == 3)
    random_phase();
    `TB_END
  end
endmodule
