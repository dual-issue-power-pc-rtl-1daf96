// puma_fxu: dual-issue, out-of-order PowerPC fixed point unit (top level).
//
// Nine pipeline stages: ICA (instruction cache, BTB and branch predictor
// access, next PC), ICH (cache or stream buffer hit, line select), IB
// (instruction buffer), D1 (translation into unit operations), D2 (selection of
// two uops), S (schedule: register file and reorder buffer read, routing to the
// reservation stations), X (execute), W1 (completion bus: results to the
// reservation stations and the reorder buffer) and W2 (in-order commit to the
// register file). Two instructions move through each stage per cycle.
//
// Memory side: split level-1 caches (instruction and data, direct mapped,
// 128-bit lines), an eight-line stream buffer in front of the instruction
// cache, and the IMAQ/DMAQ queues that share one port to the memory
// management unit (32-bit address, 32-bit write data, 128-bit read data).
// The MMU and the second level are outside; their port is brought out here.
// After reset the stream unit and the DMAQ clear the cache valid bits, one line
// per cycle; fetch starts at RESET_PC when both are done.
//
// The stages, unit counts, cache and buffer sizes and the memory-side queues
// follow the PUMA description. The instruction memory access queue has its
// three clock inputs; here all of them are the core clock, since the DMAQ and
// the MMU port run on it. That, write-through data caching, the MMU handshake
// and the event outputs are this design's choices.
module puma_fxu
  import puma_pkg::*;
#(
  parameter int unsigned IC_LINES = 8192,
  parameter int unsigned DC_LINES = 8192,
  parameter int unsigned SB_ENTRIES = 8,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned RS_DEPTH = 4,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic         clk,
  input  logic         rst_n,
  // memory management unit / second level
  output logic         mmu_req_valid,
  output logic         mmu_req_we,
  output logic [31:0]  mmu_req_addr,
  output logic [31:0]  mmu_req_wdata,
  output logic [3:0]   mmu_req_be,
  input  logic         mmu_req_ready,
  input  logic         mmu_resp_valid,
  input  logic [127:0] mmu_resp_data,
  // status
  output logic         running,
  output logic [1:0]   retired,        // instructions (uops) committed this cycle
  output logic [15:0]  events          // one bit per mechanism, see below
);
  localparam int unsigned ITW = 32 - $clog2(IC_LINES) - 4;

  // ---------------- front end ----------------
  logic [31:0]  ic_addr, ic_wr_addr, btb_pc, bp_pc, sb_addr;
  logic [127:0] ic_line, ic_wr_line, sb_line;
  logic [ITW-1:0] ic_tag;
  logic         ic_valid, ic_wr_en, ic_wr_valid, sb_lookup, sb_hit;
  logic         btb_hit, btb_uncond, bp_taken, ic_init_done, dc_init_done;
  logic [1:0]   btb_slot;
  logic [31:0]  btb_target;
  logic [BPIDX_W-1:0] bp_idx;
  finst_t       inst [2];
  logic [1:0]   consume;
  logic         flush;
  logic [31:0]  redirect_pc;

  // write back -> predictors
  logic        pht_we, pht_taken, bhr_we, bhr_taken, btb_we, btb_uncond_w, btb_valid_w;
  logic [BPIDX_W-1:0] pht_idx;
  logic [31:0] btb_wpc, btb_wtarget;

  assign running = ic_init_done && dc_init_done;

  icache #(.LINES(IC_LINES)) u_icache (
    .clk, .rd_addr(ic_addr), .rd_line(ic_line), .rd_tag(ic_tag), .rd_valid(ic_valid),
    .wr_en(ic_wr_en), .wr_addr(ic_wr_addr), .wr_line(ic_wr_line), .wr_valid(ic_wr_valid));

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .pc(btb_pc), .hit(btb_hit), .slot(btb_slot), .target(btb_target),
    .uncond(btb_uncond), .wr_en(btb_we), .wr_pc(btb_wpc), .wr_target(btb_wtarget),
    .wr_uncond(btb_uncond_w), .wr_valid(btb_valid_w));

  bp u_bp (
    .clk, .rst_n, .pc(bp_pc), .taken(bp_taken), .idx(bp_idx),
    .upd_en(pht_we), .upd_idx(pht_idx), .upd_taken(pht_taken),
    .hist_en(bhr_we), .hist_taken(bhr_taken));

  fetch #(.IC_LINES(IC_LINES), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n, .run(running), .redirect(flush), .redirect_pc,
    .ic_addr, .ic_line, .ic_tag, .ic_valid,
    .btb_pc, .btb_hit, .btb_slot, .btb_target, .btb_uncond,
    .bp_pc, .bp_taken, .bp_idx,
    .sb_lookup, .sb_addr, .sb_hit, .sb_line, .inst, .consume);

  // stream <-> IMAQ <-> DMAQ
  logic        s_req_valid, s_req_ready, s_resp_valid;
  logic [31:0] s_req_addr, s_resp_addr;
  logic [127:0] s_resp_line;
  logic        i_req_valid, i_req_ready, i_resp_valid;
  logic [31:0] i_req_addr;
  logic [127:0] i_resp_line;

  stream #(.ENTRIES(SB_ENTRIES), .IC_LINES(IC_LINES)) u_stream (
    .clk, .rst_n, .lookup_en(sb_lookup), .lookup_addr(sb_addr),
    .lookup_hit(sb_hit), .lookup_line(sb_line),
    .ic_wr_en, .ic_wr_addr, .ic_wr_line, .ic_wr_valid, .init_done(ic_init_done),
    .req_valid(s_req_valid), .req_addr(s_req_addr), .req_ready(s_req_ready),
    .resp_valid(s_resp_valid), .resp_addr(s_resp_addr), .resp_line(s_resp_line));

  imaq u_imaq (
    .clk, .mmu_clk(clk), .resp_clk(clk), .rst_n, .s_req_valid, .s_req_addr, .s_req_ready,
    .s_resp_valid, .s_resp_addr, .s_resp_line,
    .d_req_valid(i_req_valid), .d_req_addr(i_req_addr), .d_req_ready(i_req_ready),
    .d_resp_valid(i_resp_valid), .d_resp_line(i_resp_line));

  logic        mq_valid, mq_we, mq_ready, fill_valid;
  logic [31:0] mq_addr, mq_wdata, fill_addr;
  logic [3:0]  mq_be;
  logic [127:0] fill_line;
  logic        inv_en;
  logic [$clog2(DC_LINES)-1:0] inv_idx;

  dmaq #(.DC_LINES(DC_LINES)) u_dmaq (
    .clk, .rst_n,
    .d_req_valid(mq_valid), .d_req_we(mq_we), .d_req_addr(mq_addr),
    .d_req_wdata(mq_wdata), .d_req_be(mq_be), .d_req_ready(mq_ready),
    .fill_valid, .fill_addr, .fill_line, .inv_en, .inv_idx, .init_done(dc_init_done),
    .i_req_valid, .i_req_addr, .i_req_ready, .i_resp_valid, .i_resp_line,
    .mmu_req_valid, .mmu_req_we, .mmu_req_addr, .mmu_req_wdata, .mmu_req_be,
    .mmu_req_ready, .mmu_resp_valid, .mmu_resp_data);

  // ---------------- decode and schedule ----------------
  uop_t       d_i1, d_i2;
  logic [1:0] take;
  logic       dec1_hold, dec2_hold, ev_dual, ev_multi;

  decode_issue u_dec (
    .clk, .rst_n, .flush, .inst, .consume, .d_i1, .d_i2, .take,
    .decode1_hold(dec1_hold), .decode2_hold(dec2_hold), .ev_dual, .ev_multi);

  logic [3:0] rob_free;
  tag_t       rob_tag [2];
  logic [1:0] rob_alloc;
  ridx_t      lk_idx [4], rf_idx [4];
  logic       lk_mapped [4];
  opnd_t      lk_opnd [4];
  logic [31:0] rf_data [4];
  logic       rs_full [4], rs_push [4];
  rs_ent_t    rs_ent [4];
  logic       ev_rob_stall, ev_rs_stall, ev_fu_conflict;

  dispatch u_disp (
    .d_i1, .d_i2, .take, .rob_free, .rob_tag, .rob_alloc,
    .lk_idx, .lk_mapped, .lk_opnd, .rf_idx, .rf_data,
    .rs_full, .rs_push, .rs_ent, .ev_rob_stall, .ev_rs_stall, .ev_fu_conflict);

  cdb_t       cdb [2];
  rob_ent_t   head_ent [2];
  tag_t       rob_head;
  logic [1:0] commit;
  uop_t       alloc_u [2];
  assign alloc_u[0] = d_i1;
  assign alloc_u[1] = d_i2;

  rob #(.N(ROB_N)) u_rob (
    .clk, .rst_n, .flush, .alloc(rob_alloc), .alloc_u, .alloc_tag(rob_tag),
    .free_cnt(rob_free), .lk_idx, .lk_mapped, .lk_opnd, .cdb,
    .head_ent, .head_tag(rob_head), .commit);

  logic        rf_we0, rf_we1;
  ridx_t       rf_wa0, rf_wa1;
  logic [31:0] rf_wd0, rf_wd1;

  regfile u_rf (
    .clk, .rst_n, .ra(rf_idx), .rd(rf_data),
    .we0(rf_we0), .wa0(rf_wa0), .wd0(rf_wd0), .we1(rf_we1), .wa1(rf_wa1), .wd1(rf_wd1));

  // ---------------- execute ----------------
  logic [31:0] dc_addr, dc_rdata, dc_wdata;
  logic        dc_hit, dc_we;
  logic [3:0]  dc_be;
  logic        ev_miss, ev_hum, ev_cont;

  exec_core #(.RS_DEPTH(RS_DEPTH)) u_core (
    .clk, .rst_n, .flush, .rs_push, .rs_ent, .rs_full, .cdb, .rob_head,
    .dc_addr, .dc_rdata, .dc_hit, .dc_we, .dc_wdata, .dc_be,
    .mq_valid, .mq_we, .mq_addr, .mq_wdata, .mq_be, .mq_ready,
    .fill_valid, .fill_addr, .fill_line,
    .ev_miss, .ev_hit_under_miss(ev_hum), .ev_contention(ev_cont));

  dcache #(.LINES(DC_LINES)) u_dcache (
    .clk, .rd_addr(dc_addr), .rd_data(dc_rdata), .rd_hit(dc_hit),
    .wr_en(dc_we), .wr_addr(dc_addr), .wr_data(dc_wdata), .wr_be(dc_be),
    .fill_en(fill_valid), .fill_addr, .fill_line, .inv_en, .inv_idx);

  // ---------------- write back ----------------
  writeback u_wb (
    .h(head_ent), .commit, .rf_we0, .rf_wa0, .rf_wd0, .rf_we1, .rf_wa1, .rf_wd1,
    .flush, .redirect_pc, .pht_we, .pht_idx, .pht_taken, .bhr_we, .bhr_taken,
    .btb_we, .btb_pc(btb_wpc), .btb_target(btb_wtarget), .btb_uncond(btb_uncond_w),
    .btb_valid(btb_valid_w));

  assign retired = commit;

  // events: 0 icache miss to stream, 1 stream hit, 2 stream miss (refill),
  // 3 dual decode of two single-uop instructions, 4 multi-uop expansion,
  // 5 ROB-full stall, 6 reservation-station-full stall, 7 same-unit conflict,
  // 8 two uops dispatched, 9 dcache miss, 10 hit under miss,
  // 11 completion bus contention, 12 two commits, 13 mispredict flush,
  // 14 predicted-taken fetch, 15 decode hold
  assign events = {dec1_hold | dec2_hold, u_fetch.pred && running, flush,
                   commit == 2'd2, ev_cont, ev_hum, ev_miss, take == 2'd2,
                   ev_fu_conflict, ev_rs_stall, ev_rob_stall, ev_multi, ev_dual,
                   u_stream.stream_miss, sb_hit, sb_lookup};
endmodule
