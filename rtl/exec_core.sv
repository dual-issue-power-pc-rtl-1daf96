// exec_core: the execution core. Four functional units (ALU1, ALU2, branch
// resolution unit, load/store unit), each behind its own four-entry in-order
// reservation station and each with a result register, and the arbiter for
// the two completion buses. Results on the buses wake up waiting operands in
// all stations and complete entries in the reorder buffer.
// Ports: one push per station (0: ALU1, 1: ALU2, 2: BRU, 3: LSU) with full
// flags back to dispatch, the two completion buses, the data cache and DMAQ
// ports of the load/store unit, and the flush from write back.
//
// The unit mix, the four-entry in-order stations, the result registers and the
// two completion buses follow the PUMA description; the fixed bus priority
// (LSU, BRU, ALU1, ALU2) is this design's choice.
module exec_core
  import puma_pkg::*;
#(
  parameter int unsigned RS_DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         rs_push [4],
  input  rs_ent_t      rs_ent [4],
  output logic         rs_full [4],
  output cdb_t         cdb [2],
  input  tag_t         rob_head,
  output logic [31:0]  dc_addr,
  input  logic [31:0]  dc_rdata,
  input  logic         dc_hit,
  output logic         dc_we,
  output logic [31:0]  dc_wdata,
  output logic [3:0]   dc_be,
  output logic         mq_valid,
  output logic         mq_we,
  output logic [31:0]  mq_addr,
  output logic [31:0]  mq_wdata,
  output logic [3:0]   mq_be,
  input  logic         mq_ready,
  input  logic         fill_valid,
  input  logic [31:0]  fill_addr,
  input  logic [127:0] fill_line,
  output logic         ev_miss,
  output logic         ev_hit_under_miss,
  output logic         ev_contention
);
  logic    hv [4], pop [4], grant [4];
  rs_ent_t he [4];
  cdb_t    res [4];

  for (genvar i = 0; i < 4; i++) begin : g_rs
    reservation_station #(.DEPTH(RS_DEPTH)) u_rs (
      .clk, .rst_n, .flush, .push(rs_push[i]), .push_ent(rs_ent[i]), .full(rs_full[i]),
      .cdb, .head_valid(hv[i]), .head_ent(he[i]), .pop(pop[i]));
  end

  alu u_alu1 (.clk, .rst_n, .flush, .in_valid(hv[0]), .in_ent(he[0]), .pop(pop[0]),
              .res(res[0]), .grant(grant[0]));
  alu u_alu2 (.clk, .rst_n, .flush, .in_valid(hv[1]), .in_ent(he[1]), .pop(pop[1]),
              .res(res[1]), .grant(grant[1]));
  bru u_bru  (.clk, .rst_n, .flush, .in_valid(hv[2]), .in_ent(he[2]), .pop(pop[2]),
              .res(res[2]), .grant(grant[2]));
  lsu u_lsu  (.clk, .rst_n, .flush, .in_valid(hv[3]), .in_ent(he[3]), .pop(pop[3]),
              .rob_head, .dc_addr, .dc_rdata, .dc_hit, .dc_we, .dc_wdata, .dc_be,
              .mq_valid, .mq_we, .mq_addr, .mq_wdata, .mq_be, .mq_ready,
              .fill_valid, .fill_addr, .fill_line, .res(res[3]), .grant(grant[3]),
              .ev_miss, .ev_hit_under_miss);

  cdb_arb u_arb (.req(res), .grant, .bus(cdb), .ev_contention);
endmodule
