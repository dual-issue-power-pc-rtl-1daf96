// reservation_station: DEPTH-entry reservation station of one functional unit.
//
// Dispatch pushes one entry per cycle: the uop, its ROB tag and two operands,
// each a value or the tag it waits for. Every cycle the entries compare their
// waiting tags with the two completion buses and capture matching values.
// As the document requires, uops leave in the order they were pushed: only the
// oldest entry is offered to the functional unit, and only once both its
// operands are ready (head_valid). The unit pops it when it accepts it. full
// tells dispatch to stall. A flush empties the station.
// Four entries per station follow the document's block diagram.
module reservation_station
  import puma_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  logic    push,
  input  rs_ent_t push_ent,
  output logic    full,
  input  cdb_t    cdb [2],
  output logic    head_valid,
  output rs_ent_t head_ent,
  input  logic    pop
);
  localparam int unsigned PW = $clog2(DEPTH);
  rs_ent_t     q [DEPTH];
  logic [PW:0] rd, wr;

  assign full       = (wr - rd) == (PW+1)'(DEPTH);
  assign head_ent   = q[rd[PW-1:0]];
  assign head_valid = (wr != rd) && head_ent.a.ready && head_ent.b.ready;

  function automatic opnd_t snoop(input opnd_t o, input cdb_t c [2]);
    opnd_t r;
    r = o;
    for (int i = 0; i < 2; i++)
      if (!r.ready && c[i].valid && c[i].tag == r.tag) begin
        r.ready = 1'b1; r.value = c[i].value;
      end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else if (flush) begin
      rd <= '0; wr <= '0;
    end else begin
      for (int i = 0; i < int'(DEPTH); i++) begin
        q[i].a <= snoop(q[i].a, cdb);
        q[i].b <= snoop(q[i].b, cdb);
      end
      if (push && !full) begin
        q[wr[PW-1:0]]   <= push_ent;
        q[wr[PW-1:0]].a <= snoop(push_ent.a, cdb);
        q[wr[PW-1:0]].b <= snoop(push_ent.b, cdb);
        wr <= wr + 1'b1;
      end
      if (pop && head_valid) rd <= rd + 1'b1;
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
