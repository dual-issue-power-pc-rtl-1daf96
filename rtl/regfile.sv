// regfile: architectural register file, 32 general purpose and 16
// miscellaneous registers (condition, link, count, XER and scratch registers).
//
// Four asynchronous read ports serve the source operands of two instructions
// per cycle. Two write ports let the write back unit commit two instructions
// per cycle. As in the document, the registers are written in the second half
// of the write back cycle, on the falling clock edge, so a value committed in
// one cycle is readable in the next. Port 1 holds the younger instruction and
// wins if both ports name the same register. All registers reset to zero.
module regfile #(
  parameter int unsigned NREG = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  ra [4],
  output logic [31:0] rd [4],
  input  logic        we0,
  input  logic [5:0]  wa0,
  input  logic [31:0] wd0,
  input  logic        we1,
  input  logic [5:0]  wa1,
  input  logic [31:0] wd1
);
  logic [31:0] r [NREG];

  always_comb
    for (int p = 0; p < 4; p++) rd[p] = (32'(ra[p]) < NREG) ? r[ra[p]] : 32'h0;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) r[i] <= '0;
    end else begin
      if (we0 && !(we1 && wa1 == wa0)) r[wa0] <= wd0;
      if (we1) r[wa1] <= wd1;
    end
  end
endmodule
