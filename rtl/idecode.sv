// idecode: primary decoder. Translates a PowerPC instruction into its first
// two unit operations and classifies it as single-uop (simple), dual-uop or
// multi-uop (multicycle), and gives the index of the next uop (2) for the
// secondary decoder. Purely combinational. The two-uops-per-cycle output and
// the class flags follow the document's dual-issue decoder; the instruction
// subset is listed in puma_pkg.
module idecode
  import puma_pkg::*;
(
  input  finst_t     inst,
  output uop_t       u1,
  output uop_t       u2,
  output logic       simple,
  output logic       multicycle,
  output logic [5:0] uindex
);
  int unsigned n;
  always_comb begin
    n          = num_uops(inst.instr);
    u1         = decode_uop(inst, 0);
    u2         = decode_uop(inst, 1);
    u2.valid   = inst.valid && n >= 2;
    simple     = n == 1;
    multicycle = n > 2;
    uindex     = 6'd2;
  end
endmodule
