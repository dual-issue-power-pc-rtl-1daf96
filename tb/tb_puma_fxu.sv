// tb_puma_fxu: end-to-end test of the fixed point unit at its default size.
//
// A test program (loop with load-with-update, stores, compare and conditional
// branch; load/store multiple; call and return; a jump to a far code region;
// load misses followed by independent and dependent instructions) is placed in
// the memory of a behavioural MMU. The same program runs on an instruction-
// level reference model in this testbench. The program ends with a store to a
// marker address and a branch-to-self. When the marker store reaches memory,
// the registers and data memory of the design are compared with the reference.
// Each pipeline mechanism (stream buffer hit and refill, dual decode, multi-uop
// expansion, ROB-full and station-full stalls, unit conflicts, data cache
// miss and hit-under-miss, completion-bus contention, dual commit,
// misprediction flush, predicted-taken fetch) must have happened at least once.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
module tb_puma_fxu;
  import ppc_asm_pkg::*;

  localparam int unsigned MEMW = 65536;
  localparam logic [31:0] MARK = 32'h3FF0;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;           // a falling edge resets every flop at once
  always #5 clk = ~clk;

  logic         mmu_req_valid, mmu_req_we, mmu_req_ready, mmu_resp_valid, running;
  logic [31:0]  mmu_req_addr, mmu_req_wdata;
  logic [3:0]   mmu_req_be;
  logic [127:0] mmu_resp_data;
  logic [1:0]   retired;
  logic [15:0]  events;

  puma_fxu dut (.*);
  mmu_model #(.MEM_WORDS(MEMW)) u_mem (
    .clk, .req_valid(mmu_req_valid), .req_we(mmu_req_we), .req_addr(mmu_req_addr),
    .req_wdata(mmu_req_wdata), .req_be(mmu_req_be), .req_ready(mmu_req_ready),
    .resp_valid(mmu_resp_valid), .resp_data(mmu_resp_data));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- program ----------------
  int unsigned pc_w;       // assembly pointer, in words
  task automatic emit(input logic [31:0] ins);
    u_mem.mem[pc_w] = ins; pc_w++;
  endtask

  int unsigned end_pc;
  task automatic build();
    int unsigned loop_pc, f_pc, bl_pc, b_pc;
    for (int i = 0; i < int'(MEMW); i++) u_mem.mem[i] = '0;
    for (int i = 0; i < 64; i++) u_mem.mem[(32'h1000 >> 2) + i] = 32'(i * 3 + 1);
    u_mem.mem[32'h3000 >> 2] = 32'd1000;
    u_mem.mem[32'h3400 >> 2] = 32'd77;
    pc_w = 0;
    emit(addi(1, 0, 32'h1000)); emit(addi(2, 0, 6)); emit(addi(3, 0, 0));
    emit(addi(4, 0, 1));        emit(addi(7, 0, 32'h1000));
    loop_pc = pc_w * 4;
    emit(lwzu(5, 4, 1)); emit(add(3, 3, 5)); emit(stw(3, 32'h200, 1));
    emit(subf(2, 4, 2)); emit(cmpwi(2, 0));
    emit(bc(4, 2, int'(loop_pc) - int'(pc_w * 4)));
    emit(lmw(20, 0, 7)); emit(stmw(20, 32'h400, 7));
    emit(addi(8, 0, 5)); emit(addi(9, 0, 7)); emit(add(10, 8, 9)); emit(xor_(11, 8, 9));
    emit(slw(14, 4, 9)); emit(srw(15, 10, 4)); emit(or_(16, 8, 9)); emit(and_(17, 10, 9));
    bl_pc = pc_w; emit(0);                      // bl F, patched below
    emit(addi(12, 3, 3));
    b_pc = pc_w; emit(0);                       // b FAR
    f_pc = pc_w * 4;
    emit(add(13, 3, 3)); emit(cmplwi(13, 50)); emit(blr());
    u_mem.mem[bl_pc] = bl(int'(f_pc) - int'(bl_pc * 4));
    u_mem.mem[b_pc]  = b(32'h2000 - int'(b_pc * 4));
    pc_w = 32'h2000 >> 2;
    emit(lwz(16, 32'h3000, 0));                 // miss
    emit(lwz(19, 32'h1004, 0));                 // hit under miss
    for (int i = 0; i < 14; i++) emit(addi(21 + (i % 6), 0, 100 + i));   // fill the ROB
    emit(lwz(18, 32'h3400, 0));                 // miss
    for (int i = 0; i < 10; i++) emit(add(18, 18, 18 - (i % 2)));       // dependent chain
    emit(lbz(6, 32'h1007, 0)); emit(stb(6, 32'h1801, 0)); emit(lwzu(9, 8, 7));
    emit(stwu(18, 32'h10, 7)); emit(cmpw(16, 3));
    emit(bc(12, 0, 8));                         // blt +8 (taken if r16 < r3)
    emit(addi(28, 0, 1));
    emit(addi(29, 0, 2));
    emit(stw(3, MARK, 0));
    end_pc = pc_w * 4;
    emit(b(0));
  endtask

  // ---------------- reference model ----------------
  logic [31:0] rmem [MEMW];
  logic [31:0] g [32];
  logic [31:0] cr, lr;

  function automatic logic [31:0] rd(input logic [31:0] a); return rmem[(a >> 2) % MEMW]; endfunction
  function automatic logic [31:0] sx(input logic [15:0] v); return {{16{v[15]}}, v}; endfunction
  function automatic logic [31:0] cmpres(input logic lt, input logic gt);
    return {lt, gt, !lt && !gt, 29'h0};
  endfunction

  task automatic run_ref();
    logic [31:0] pc, ins, ea, ra0;
    int steps;
    for (int i = 0; i < int'(MEMW); i++) rmem[i] = u_mem.mem[i];
    for (int i = 0; i < 32; i++) g[i] = 0;
    cr = 0; lr = 0; pc = 0; steps = 0;
    while (pc != end_pc && steps < 100000) begin
      logic [5:0] opc; logic [4:0] rt, ra, rb; logic [9:0] xo; logic [31:0] npc;
      ins = rd(pc); opc = ins[31:26]; rt = ins[25:21]; ra = ins[20:16]; rb = ins[15:11];
      xo = ins[10:1]; npc = pc + 4; ra0 = (ra == 0) ? 32'h0 : g[ra];
      steps++;
      case (opc)
        14: g[rt] = ra0 + sx(ins[15:0]);
        15: g[rt] = ra0 + {ins[15:0], 16'h0};
        24: g[ra] = g[rt] | {16'h0, ins[15:0]};
        26: g[ra] = g[rt] ^ {16'h0, ins[15:0]};
        28: g[ra] = g[rt] & {16'h0, ins[15:0]};
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
              32:  cr = cmpres(g[ra] < g[rb], g[ra] > g[rb]);
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

  // ---------------- mechanism counters ----------------
  int unsigned ev_cnt [16];
  string ev_name [16] = '{"icache miss", "stream hit", "stream refill", "dual decode",
    "multi-uop", "ROB stall", "RS stall", "unit conflict", "dual dispatch", "dcache miss",
    "hit under miss", "bus contention", "dual commit", "mispredict flush",
    "predicted taken", "decode hold"};
  always @(posedge clk) if (rst_n) for (int i = 0; i < 16; i++) if (events[i]) ev_cnt[i]++;

  longint start_cyc, done_cyc;
  int unsigned n_retired = 0;
  always @(posedge clk) if (rst_n && running) n_retired += retired;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) ev_cnt[i] = 0;
    build();
    run_ref();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (running);
    start_cyc = cyc;
    @(posedge clk iff (mmu_req_valid && mmu_req_we && mmu_req_addr == MARK));
    done_cyc = cyc;
    repeat (20) @(posedge clk);
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_rf.r[r] !== g[r]) begin
        failures++; $display("r%0d = %h, expected %h", r, dut.u_rf.r[r], g[r]);
      end
    end
    checks++;
    if (dut.u_rf.r[32] !== cr) begin failures++; $display("CR = %h, expected %h", dut.u_rf.r[32], cr); end
    checks++;
    if (dut.u_rf.r[33] !== lr) begin failures++; $display("LR = %h, expected %h", dut.u_rf.r[33], lr); end
    for (int a = 32'h1000 >> 2; a < (32'h4000 >> 2); a++) begin
      checks++;
      if (u_mem.mem[a] !== rmem[a]) begin
        failures++; $display("mem[%h] = %h, expected %h", a * 4, u_mem.mem[a], rmem[a]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      $display("%-18s %0d", ev_name[i], ev_cnt[i]);
      if (ev_cnt[i] == 0) begin failures++; $display("mechanism never seen: %s", ev_name[i]); end
    end
    $display("r3=%0d r16=%0d r18=%0d r31=%0d lr=%h cr=%h", g[3], g[16], g[18], g[31], lr, cr);
    $display("program ran %0d cycles after start-up, %0d uops committed", done_cyc - start_cyc, n_retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
