// instr_buffer: two-entry instruction buffer (stage IB).
//
// Each entry holds a whole cache line (four instructions) with a mask of the
// slots still to be decoded, the line's address and the prediction made for its
// last valid slot. The two oldest valid instructions, which may come from
// different entries, are presented to the decoder every cycle; the decoder
// says how many it consumed (0, 1 or 2). An entry is freed when its last slot
// is consumed. A new line is accepted while an entry is free. A redirect
// empties the buffer. Two entries of a line each, eight instructions in all,
// follow the document.
module instr_buffer
  import puma_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         push,
  input  logic [31:0]  push_pc,
  input  logic [127:0] push_line,
  input  logic [3:0]   push_mask,
  input  logic         push_pred,
  input  logic [31:0]  push_target,
  input  logic [BPIDX_W-1:0] push_bp_idx,
  output logic         ready,
  output finst_t       inst [2],
  input  logic [1:0]   consume
);
  typedef struct packed {
    logic [3:0]         mask;
    logic [27:0]        line_addr;
    logic [127:0]       line;
    logic               pred;
    logic [31:0]        target;
    logic [BPIDX_W-1:0] bp_idx;
  } ibe_t;

  ibe_t        e [2];
  logic        head;
  logic [1:0]  cnt;
  logic [2:0]  pos [2];               // flattened slot (entry*4+slot) of outputs
  logic        found [2];

  function automatic finst_t slot_inst(input ibe_t x, input logic [1:0] s);
    finst_t f;
    logic last;
    last = (s == 2'd3) || !x.mask[s+2'd1];
    f.valid       = x.mask[s];
    f.instr       = x.line[127 - 32*s -: 32];
    f.pc          = {x.line_addr, s, 2'b00};
    f.pred_taken  = x.pred && last;
    f.pred_target = x.target;
    f.bp_idx      = x.bp_idx;
    return f;
  endfunction

  assign ready = cnt < 2'd2;

  always_comb begin
    int n;
    n = 0;
    pos[0] = '0; pos[1] = '0; found[0] = 1'b0; found[1] = 1'b0;
    for (int j = 0; j < 8; j++) begin
      logic       ei;
      logic [1:0] s;
      ei = head ^ 1'(j / 4);
      s  = 2'(j % 4);
      if (j / 4 < int'(cnt) && e[ei].mask[s] && n < 2) begin
        pos[n] = 3'(j); found[n] = 1'b1; n = n + 1;
      end
    end
    for (int k = 0; k < 2; k++) begin
      inst[k] = slot_inst(e[head ^ pos[k][2]], pos[k][1:0]);
      inst[k].valid = found[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= 1'b0; cnt <= '0;
      e[0] <= '0; e[1] <= '0;
    end else if (flush) begin
      head <= 1'b0; cnt <= '0;
      e[0].mask <= '0; e[1].mask <= '0;
    end else begin
      ibe_t nx [2];
      logic [1:0] c;
      logic       h;
      nx = e; c = cnt; h = head;
      for (int k = 0; k < 2; k++)
        if (32'(k) < 32'(consume) && found[k])
          nx[head ^ pos[k][2]].mask[pos[k][1:0]] = 1'b0;
      // retire emptied entries from the head (at most two)
      for (int k = 0; k < 2; k++)
        if (c != 0 && nx[h].mask == 4'b0) begin h = ~h; c = c - 2'd1; end
      if (push && cnt < 2'd2) begin
        nx[h ^ c[0]] = '{mask: push_mask, line_addr: push_pc[31:4], line: push_line,
                         pred: push_pred, target: push_target, bp_idx: push_bp_idx};
        c = c + 2'd1;
      end
      e <= nx; cnt <= c; head <= h;
    end
  end
endmodule
