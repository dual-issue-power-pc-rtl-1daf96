// decoder: one simple decoder of the decode/issue unit (stage D1).
//
// The primary decoder (idecode) handles the first two uops of an instruction;
// the secondary decoder (udecode) handles the later ones from the uop index.
// A multiplexer picks idecode's output when the index is zero and udecode's
// otherwise, and another picks the next index. Both uop outputs are valid only
// when the instruction has that many uops left. simple and multicycle come from
// idecode; done says this pair holds the instruction's last uops.
//
// The idecode/udecode split with the index feedback follows the PUMA decoder
// structure; how many uops each part yields per cycle is this design's choice.
module decoder
  import puma_pkg::*;
(
  input  finst_t     inst,
  input  logic [5:0] uindex,
  output uop_t       u1,
  output uop_t       u2,
  output logic       simple,
  output logic       multicycle,
  output logic       done,
  output logic [5:0] next_uindex
);
  uop_t i_u1, i_u2, s_u1, s_u2;
  logic [5:0] i_next, s_next;
  logic s_done;

  idecode u_i (.inst, .u1(i_u1), .u2(i_u2), .simple, .multicycle, .uindex(i_next));
  udecode u_u (.inst, .uindex, .u1(s_u1), .u2(s_u2), .next_uindex(s_next), .done(s_done));

  always_comb begin
    if (uindex == 0) begin
      u1 = i_u1; u2 = i_u2; next_uindex = i_next; done = !multicycle;
    end else begin
      u1 = s_u1; u2 = s_u2; next_uindex = s_next; done = s_done;
    end
  end
endmodule
