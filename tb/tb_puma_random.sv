// tb_puma_random: random-program test of the whole fixed point unit.
//
// Each round generates a random program from the decoded instruction subset,
// runs it on the core, and compares the outcome with an instruction-level
// reference model. It checks GPRs, CR, LR and the data region. Programs mix:
// - ALU operations, including immediates, shifts and compares;
// - word and byte loads and stores into a 2 KB region;
// - load/store with update;
// - lmw/stmw;
// - forward conditional branches on random CR0 bits;
// - short counted loops;
// - calls and returns through LR.
// Half of each program lies at address 0 and half at 0x2400. That forces
// instruction-cache conflicts and stream-buffer misses.
//
// The caches are made small (64 lines each) so that start-up is short and
// misses are frequent. Between rounds the core is held in reset for 60 cycles,
// so replies still in flight from the memory model drain unseen.
//
// Comparing the core instruction by instruction with a reference simulator on
// random programs mirrors the way the original core was verified. The
// generator, its mix and the reference model are this testbench's own.
`include "tb_check.svh"
module tb_puma_random;
  import ppc_asm_pkg::*;

  localparam int unsigned MEMW   = 16384;
  localparam int unsigned ROUNDS = 40;
  localparam int unsigned NINS   = 160;         // random instructions per half
  localparam logic [31:0] MARK   = 32'h3FF0;
  localparam logic [31:0] FAR    = 32'h2400;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic         mmu_req_valid, mmu_req_we, mmu_req_ready, mmu_resp_valid, running;
  logic [31:0]  mmu_req_addr, mmu_req_wdata;
  logic [3:0]   mmu_req_be;
  logic [127:0] mmu_resp_data;
  logic [1:0]   retired;
  logic [15:0]  events;

  puma_fxu #(.IC_LINES(64), .DC_LINES(64)) dut (.*);
  mmu_model #(.MEM_WORDS(MEMW)) u_mem (
    .clk, .req_valid(mmu_req_valid), .req_we(mmu_req_we), .req_addr(mmu_req_addr),
    .req_wdata(mmu_req_wdata), .req_be(mmu_req_be), .req_ready(mmu_req_ready),
    .resp_valid(mmu_resp_valid), .resp_data(mmu_resp_data));

  int checks = 0, failures = 0;

  // ---------------- generator ----------------
  // r1 holds the data base 0x1000 and is never written afterwards; r2 is the
  // base of update-form accesses and is set right before each one; r3 counts
  // loop iterations. Random destinations are r4..r31, or only r4..r9 in odd
  // rounds, which makes dependency chains and renaming of one register common.
  int unsigned pc_w;
  int rhi = 31;                  // highest random register: odd rounds use r0..r9
  task automatic emit(input logic [31:0] ins);
    u_mem.mem[pc_w] = ins; pc_w++;
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % 32'(hi - lo + 1));
  endfunction

  // one random instruction that neither branches nor writes r1..r3; with
  // one_word set it is a single instruction (no update-form pair)
  task automatic emit_plain(input bit one_word = 0);
    int k, rt, ra, rb;
    k = rnd(0, one_word ? 18 : 19); rt = rnd(4, rhi); ra = rnd(0, rhi); rb = rnd(0, rhi);
    case (k)
      0, 1:  emit(addi(rt, ra, rnd(-2000, 2000)));
      2:     emit(addis(rt, ra, rnd(-4, 4)));
      3:     emit(ori(rt, ra, rnd(0, 65535)));
      4:     emit(xori(rt, ra, rnd(0, 65535)));
      5:     emit(add(rt, ra, rb));
      6:     emit(subf(rt, ra, rb));
      7:     emit(and_(rt, ra, rb));
      8:     emit(or_(rt, ra, rb));
      9:     emit(xor_(rt, ra, rb));
      10:    emit(slw(rt, ra, rb));
      11:    emit(srw(rt, ra, rb));
      12:    emit(cmpw(ra, rb));
      13:    emit(($urandom % 2) ? cmpwi(ra, rnd(-50, 50)) : cmplwi(ra, rnd(0, 100)));
      14, 15: emit(lwz(rt, 4 * rnd(0, 511), 1));
      16:    emit(lbz(rt, rnd(0, 2047), 1));
      17:    emit(stw(ra, 4 * rnd(0, 511), 1));
      18:    emit(stb(ra, rnd(0, 2047), 1));
      default: begin                          // update form through r2
        emit(addi(2, 0, 32'h1000 + 4 * rnd(0, 255)));
        case (rnd(0, 3))
          0: emit(lwzu(rt, 4 * rnd(0, 255), 2));
          1: emit(lbz(rt, rnd(0, 1023), 2));
          2: emit(stwu(ra, 4 * rnd(0, 255), 2));
          default: emit(stw(ra, 4 * rnd(0, 255), 2));
        endcase
      end
    endcase
  endtask

  task automatic emit_block(input int n);
    int left;
    left = n;
    while (left > 0) begin
      int k;
      k = rnd(0, 29);
      if (k < 20) begin emit_plain(); left--; end
      else if (k < 23) begin                  // forward branch over 1..3 instructions
        int s, bo;
        s = rnd(1, 3); bo = ($urandom % 2) ? 12 : 4;
        emit(bc(bo, rnd(0, 2), 4 * (s + 1)));
        for (int i = 0; i < s; i++) emit_plain();
        left -= s + 1;
      end else if (k < 25) begin              // counted loop
        int it, bs, top;
        it = rnd(1, 4); bs = rnd(1, 4);
        emit(addi(3, 0, it));
        top = int'(pc_w);
        for (int i = 0; i < bs; i++) emit_plain();
        emit(addi(3, 3, -1)); emit(cmpwi(3, 0));
        emit(bc(4, 2, 4 * (top - int'(pc_w))));
        left -= bs + 4;
      end else if (k < 27) begin              // load/store multiple
        int r;
        r = rnd(24, 31);
        emit(($urandom % 2) ? lmw(r, 4 * rnd(0, 480), 1) : stmw(r, 4 * rnd(0, 480), 1));
        left--;
      end else begin                          // call and return
        emit(bl(8)); emit(b(12)); emit_plain(1); emit(blr());
        left -= 4;
      end
    end
  endtask

  int unsigned end_pc;
  task automatic build();
    for (int i = 0; i < int'(MEMW); i++) u_mem.mem[i] = '0;
    for (int i = 32'h1000 >> 2; i < (32'h1800 >> 2); i++) u_mem.mem[i] = $urandom;
    pc_w = 0;
    emit(addi(1, 0, 32'h1000));
    for (int r = 4; r < 32; r += 3) emit(addi(r, 0, rnd(-100, 100)));
    emit_block(NINS);
    emit(b(int'(FAR) - int'(pc_w * 4)));
    pc_w = FAR >> 2;
    emit_block(NINS);
    emit(stw(1, MARK, 0));
    end_pc = pc_w * 4;
    emit(b(0));
  endtask

  // ---------------- reference model ----------------
  logic [31:0] rmem [MEMW];
  logic [31:0] g [32];
  logic [31:0] cr, lr;
  int unsigned ref_steps;

  function automatic logic [31:0] rd(input logic [31:0] a); return rmem[(a >> 2) % MEMW]; endfunction
  function automatic logic [31:0] sx(input logic [15:0] v); return {{16{v[15]}}, v}; endfunction
  function automatic logic [31:0] cmpres(input logic lt, input logic gt);
    return {lt, gt, !lt && !gt, 29'h0};
  endfunction

  task automatic run_ref();
    logic [31:0] pc, ins, ea, ra0;
    for (int i = 0; i < int'(MEMW); i++) rmem[i] = u_mem.mem[i];
    for (int i = 0; i < 32; i++) g[i] = 0;
    cr = 0; lr = 0; pc = 0; ref_steps = 0;
    while (pc != end_pc && ref_steps < 100000) begin
      logic [5:0] opc; logic [4:0] rt, ra, rb; logic [9:0] xo; logic [31:0] npc;
      ins = rd(pc); opc = ins[31:26]; rt = ins[25:21]; ra = ins[20:16]; rb = ins[15:11];
      xo = ins[10:1]; npc = pc + 4; ra0 = (ra == 0) ? 32'h0 : g[ra];
      ref_steps++;
      case (opc)
        14: g[rt] = ra0 + sx(ins[15:0]);
        15: g[rt] = ra0 + {ins[15:0], 16'h0};
        24: g[ra] = g[rt] | {16'h0, ins[15:0]};
        26: g[ra] = g[rt] ^ {16'h0, ins[15:0]};
        11: cr = cmpres($signed(g[ra]) < $signed(sx(ins[15:0])), $signed(g[ra]) > $signed(sx(ins[15:0])));
        10: cr = cmpres(g[ra] < {16'h0, ins[15:0]}, g[ra] > {16'h0, ins[15:0]});
        31: case (xo)
              266: g[rt] = g[ra] + g[rb];
              40:  g[rt] = g[rb] - g[ra];
              28:  g[ra] = g[rt] & g[rb];
              444: g[ra] = g[rt] | g[rb];
              316: g[ra] = g[rt] ^ g[rb];
              24:  g[ra] = g[rb][5] ? 0 : g[rt] << g[rb][4:0];
              536: g[ra] = g[rb][5] ? 0 : g[rt] >> g[rb][4:0];
              0:   cr = cmpres($signed(g[ra]) < $signed(g[rb]), $signed(g[ra]) > $signed(g[rb]));
              default: ;
            endcase
        32, 33: begin ea = ((opc == 33) ? g[ra] : ra0) + sx(ins[15:0]); g[rt] = rd(ea);
                      if (opc == 33) g[ra] = ea; end
        34: begin ea = ra0 + sx(ins[15:0]); g[rt] = {24'h0, rd(ea)[31 - 8*ea[1:0] -: 8]}; end
        36, 37: begin ea = ((opc == 37) ? g[ra] : ra0) + sx(ins[15:0]);
                      rmem[(ea >> 2) % MEMW] = g[rt]; if (opc == 37) g[ra] = ea; end
        38: begin ea = ra0 + sx(ins[15:0]); rmem[(ea >> 2) % MEMW][31 - 8*ea[1:0] -: 8] = g[rt][7:0]; end
        46: begin ea = ra0 + sx(ins[15:0]);
                  for (int r = rt; r < 32; r++) begin g[r] = rd(ea); ea += 4; end end
        47: begin ea = ra0 + sx(ins[15:0]);
                  for (int r = rt; r < 32; r++) begin rmem[(ea >> 2) % MEMW] = g[r]; ea += 4; end end
        18: begin if (ins[0]) lr = pc + 4;
                  npc = (ins[1] ? 32'h0 : pc) + {{6{ins[25]}}, ins[25:2], 2'b00}; end
        16: begin if (ins[0]) lr = pc + 4;
                  if (rt[4] || cr[31 - ra] == rt[3])
                    npc = (ins[1] ? 32'h0 : pc) + {{16{ins[15]}}, ins[15:2], 2'b00}; end
        19: begin logic [31:0] t; t = lr; if (ins[0]) lr = pc + 4;
                  if (rt[4] || cr[31 - ra] == rt[3]) npc = {t[31:2], 2'b00}; end
        default: ;
      endcase
      pc = npc;
    end
  endtask

  // ---------------- run ----------------
  int unsigned n_retired = 0, ev_flush = 0, ev_sbmiss = 0;
  always @(posedge clk) if (rst_n && running) begin
    n_retired += retired;
    if (events[13]) ev_flush++;
    if (events[2]) ev_sbmiss++;
  end

  initial begin #20_000_000; failures++; $display("watchdog expired"); `TB_END end

  initial begin
    void'($urandom(32'h5eed));
    for (int rnd_i = 0; rnd_i < int'(ROUNDS); rnd_i++) begin
      int fail0, cyc;
      fail0 = failures;
      rst_n = 0;
      repeat (60) @(posedge clk);
      rhi = (rnd_i % 2) ? 9 : 31;
      build();
      run_ref();
      `CHK(ref_steps < 100000)                // generated program terminates
      rst_n = 1;
      wait (running);
      cyc = 0;
      while (!(mmu_req_valid && mmu_req_ready && mmu_req_we && mmu_req_addr == MARK)
             && cyc < 200000) begin
        @(posedge clk); cyc++;
      end
      `CHK(cyc < 200000)                      // core reached the end marker
      repeat (30) @(posedge clk);
      for (int r = 0; r < 32; r++) begin
        `CHK(dut.u_rf.r[r] == g[r])
        if (dut.u_rf.r[r] != g[r]) $display("  r%0d = %h, expected %h", r, dut.u_rf.r[r], g[r]);
      end
      `CHK(dut.u_rf.r[32] == cr)
      `CHK(dut.u_rf.r[33] == lr)
      for (int a = 32'h1000 >> 2; a < (32'h1800 >> 2); a++) begin
        `CHK(u_mem.mem[a] == rmem[a])
        if (u_mem.mem[a] != rmem[a])
          $display("  mem[%h] = %h, expected %h", a * 4, u_mem.mem[a], rmem[a]);
      end
      $display("round %0d: %0d instructions, %0d cycles, %0d failures", rnd_i, ref_steps, cyc,
               failures - fail0);
    end
    // the programs must have exercised recovery and the stream buffer
    `CHK(ev_flush > 0)
    `CHK(ev_sbmiss > 0)
    $display("%0d uops committed, %0d flushes, %0d stream refills", n_retired, ev_flush, ev_sbmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
