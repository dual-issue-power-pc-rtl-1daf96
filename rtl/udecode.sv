// udecode: secondary decoder. From the PowerPC instruction and the uop index
// it produces the next two unit operations of a multi-uop instruction and the
// index that follows them; done says that the instruction has no uops left
// after these. Purely combinational.
//
// A secondary decoder driven by a uop index follows the PUMA decoder structure;
// the uop sequences are this design's own.
module udecode
  import puma_pkg::*;
(
  input  finst_t     inst,
  input  logic [5:0] uindex,
  output uop_t       u1,
  output uop_t       u2,
  output logic [5:0] next_uindex,
  output logic       done
);
  int unsigned n;
  always_comb begin
    n           = num_uops(inst.instr);
    u1          = decode_uop(inst, 32'(uindex));
    u2          = decode_uop(inst, 32'(uindex) + 1);
    u1.valid    = inst.valid && 32'(uindex) < n;
    u2.valid    = inst.valid && 32'(uindex) + 1 < n;
    next_uindex = uindex + 6'd2;
    done        = 32'(uindex) + 2 >= n;
  end
endmodule
