// lsu: load/store unit with a miss status holding register (MSHR).
//
// The unit takes the ready uop at the head of its reservation station, adds
// base and displacement, and looks the address up in the data cache.
//   - A load that hits finishes in that cycle. Its word or byte goes to the
//     result register.
//   - A load that misses moves into the MSHR and asks the DMAQ for the line.
//     The unit keeps accepting loads that hit while the miss is outstanding.
//     When the line arrives (the DMAQ writes it into the cache at the same
//     time) the MSHR's load completes through the result register, ahead of
//     new uops.
//   - A store waits until it is the oldest instruction in the reorder buffer
//     (it can then no longer be cancelled) and until no miss is outstanding.
//     It then writes the cache if the line is present and always sends the
//     word to the DMAQ (write-through, no allocate on a store miss).
// The result register holds a completion until the arbiter grants a bus. A
// flush empties the result register; an outstanding miss is then only
// allowed to fill the cache, and its result is dropped.
// The MSHR and the DMAQ interface follow the document. Write-through, the
// store ordering rule and the single MSHR are this design's own choices.
module lsu
  import puma_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         in_valid,
  input  rs_ent_t      in_ent,
  output logic         pop,
  input  tag_t         rob_head,
  // data cache
  output logic [31:0]  dc_addr,
  input  logic [31:0]  dc_rdata,
  input  logic         dc_hit,
  output logic         dc_we,
  output logic [31:0]  dc_wdata,
  output logic [3:0]   dc_be,
  // DMAQ
  output logic         mq_valid,
  output logic         mq_we,
  output logic [31:0]  mq_addr,
  output logic [31:0]  mq_wdata,
  output logic [3:0]   mq_be,
  input  logic         mq_ready,
  input  logic         fill_valid,
  input  logic [31:0]  fill_addr,
  input  logic [127:0] fill_line,
  // completion
  output cdb_t         res,
  input  logic         grant,
  // activity
  output logic         ev_miss,
  output logic         ev_hit_under_miss
);
  typedef struct packed {
    logic        valid;
    logic        killed;
    logic        data_ok;
    tag_t        tag;
    logic [31:0] addr;
    logic        byte_op;
    logic [31:0] word;
  } mshr_t;

  mshr_t m;
  uop_t  u;
  logic [31:0] ea;
  logic is_st, is_byte, res_free, mshr_done, can;
  assign u       = in_ent.u;
  assign ea      = in_ent.a.value + u.imm;
  assign is_st   = (u.op == OP_SW) || (u.op == OP_SB);
  assign is_byte = (u.op == OP_LB) || (u.op == OP_SB);
  assign res_free  = !res.valid || grant;
  assign mshr_done = m.valid && m.data_ok && !m.killed;
  wire   fill_hit  = m.valid && !m.data_ok && fill_valid && fill_addr[31:4] == m.addr[31:4];

  function automatic logic [31:0] pick(input logic [31:0] w, input logic [31:0] a, input logic b);
    return b ? {24'h0, w[31 - 8*a[1:0] -: 8]} : w;
  endfunction

  assign dc_addr  = ea;
  assign dc_wdata = is_byte ? {4{in_ent.b.value[7:0]}} : in_ent.b.value;
  assign dc_be    = is_byte ? (4'b1000 >> ea[1:0]) : 4'b1111;

  always_comb begin
    can = 1'b0; mq_valid = 1'b0; mq_we = 1'b0;
    mq_addr = ea; mq_wdata = dc_wdata; mq_be = dc_be;
    ev_miss = 1'b0; ev_hit_under_miss = 1'b0;
    if (in_valid && res_free && !mshr_done && !flush) begin
      if (is_st) begin
        if (in_ent.tag == rob_head && !m.valid) begin
          mq_valid = 1'b1; mq_we = 1'b1;
          can = mq_ready;
        end
      end else if (dc_hit) begin
        can = 1'b1;
        ev_hit_under_miss = m.valid;
      end else if (!m.valid) begin
        mq_valid = 1'b1; mq_addr = {ea[31:4], 4'h0};
        can = mq_ready;
        ev_miss = mq_ready;
      end
    end
  end
  assign pop   = can;
  assign dc_we = can && is_st && dc_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0; m <= '0;
    end else begin
      // MSHR
      if (fill_hit) begin
        m.data_ok <= 1'b1;
        m.word    <= fill_line[127 - 32*m.addr[3:2] -: 32];
        if (m.killed) m.valid <= 1'b0;
      end
      if (flush && m.valid) begin
        m.killed <= 1'b1;
        if (m.data_ok || fill_hit) m.valid <= 1'b0;
      end
      // result register
      if (flush) res <= '0;
      else if (mshr_done && res_free) begin
        res <= '{valid: 1'b1, tag: m.tag, value: pick(m.word, m.addr, m.byte_op),
                 is_br: 1'b0, cond: 1'b0, taken: 1'b0, target: '0, exc: 1'b0};
        m.valid <= 1'b0;
      end else if (can) begin
        if (is_st || dc_hit)
          res <= '{valid: 1'b1, tag: in_ent.tag, value: pick(dc_rdata, ea, is_byte),
                   is_br: 1'b0, cond: 1'b0, taken: 1'b0, target: '0, exc: 1'b0};
        else begin
          if (grant) res.valid <= 1'b0;
          m <= '{valid: 1'b1, killed: 1'b0, data_ok: 1'b0, tag: in_ent.tag,
                 addr: ea, byte_op: is_byte, word: '0};
        end
      end else if (grant) res.valid <= 1'b0;
    end
  end
endmodule
