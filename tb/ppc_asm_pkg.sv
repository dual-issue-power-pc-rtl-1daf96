// ppc_asm_pkg: PowerPC instruction encoders for the testbenches, covering the
// subset the fixed point unit decodes. Register numbers are 0..31; branch
// offsets are byte offsets relative to the branch.
//
// Encodings are the standard PowerPC instruction formats.
package ppc_asm_pkg;
  function automatic logic [31:0] d_form(int opc, int rt, int ra, int imm);
    return {6'(opc), 5'(rt), 5'(ra), 16'(imm)};
  endfunction
  function automatic logic [31:0] x_form(int rt, int ra, int rb, int xo);
    return {6'd31, 5'(rt), 5'(ra), 5'(rb), 10'(xo), 1'b0};
  endfunction
  function automatic logic [31:0] addi (int rt, int ra, int imm); return d_form(14, rt, ra, imm); endfunction
  function automatic logic [31:0] addis(int rt, int ra, int imm); return d_form(15, rt, ra, imm); endfunction
  function automatic logic [31:0] ori  (int ra, int rs, int imm); return d_form(24, rs, ra, imm); endfunction
  function automatic logic [31:0] xori (int ra, int rs, int imm); return d_form(26, rs, ra, imm); endfunction
  function automatic logic [31:0] cmpwi(int ra, int imm);         return d_form(11, 0, ra, imm); endfunction
  function automatic logic [31:0] cmplwi(int ra, int imm);        return d_form(10, 0, ra, imm); endfunction
  function automatic logic [31:0] add  (int rt, int ra, int rb);  return x_form(rt, ra, rb, 266); endfunction
  function automatic logic [31:0] subf (int rt, int ra, int rb);  return x_form(rt, ra, rb, 40); endfunction
  function automatic logic [31:0] and_ (int ra, int rs, int rb);  return x_form(rs, ra, rb, 28); endfunction
  function automatic logic [31:0] or_  (int ra, int rs, int rb);  return x_form(rs, ra, rb, 444); endfunction
  function automatic logic [31:0] xor_ (int ra, int rs, int rb);  return x_form(rs, ra, rb, 316); endfunction
  function automatic logic [31:0] slw  (int ra, int rs, int rb);  return x_form(rs, ra, rb, 24); endfunction
  function automatic logic [31:0] srw  (int ra, int rs, int rb);  return x_form(rs, ra, rb, 536); endfunction
  function automatic logic [31:0] cmpw (int ra, int rb);          return x_form(0, ra, rb, 0); endfunction
  function automatic logic [31:0] lwz  (int rt, int d, int ra);   return d_form(32, rt, ra, d); endfunction
  function automatic logic [31:0] lwzu (int rt, int d, int ra);   return d_form(33, rt, ra, d); endfunction
  function automatic logic [31:0] lbz  (int rt, int d, int ra);   return d_form(34, rt, ra, d); endfunction
  function automatic logic [31:0] stw  (int rs, int d, int ra);   return d_form(36, rs, ra, d); endfunction
  function automatic logic [31:0] stwu (int rs, int d, int ra);   return d_form(37, rs, ra, d); endfunction
  function automatic logic [31:0] stb  (int rs, int d, int ra);   return d_form(38, rs, ra, d); endfunction
  function automatic logic [31:0] lmw  (int rt, int d, int ra);   return d_form(46, rt, ra, d); endfunction
  function automatic logic [31:0] stmw (int rs, int d, int ra);   return d_form(47, rs, ra, d); endfunction
  function automatic logic [31:0] b    (int off);                 return {6'd18, 24'(off >> 2), 2'b00}; endfunction
  function automatic logic [31:0] bl   (int off);                 return {6'd18, 24'(off >> 2), 2'b01}; endfunction
  function automatic logic [31:0] bc   (int bo, int bi, int off); return {6'd16, 5'(bo), 5'(bi), 14'(off >> 2), 2'b00}; endfunction
  function automatic logic [31:0] blr  ();                        return {6'd19, 5'd20, 5'd0, 5'd0, 10'd16, 1'b0}; endfunction
  localparam logic [31:0] NOP = 32'h6000_0000;   // ori 0,0,0
endpackage
