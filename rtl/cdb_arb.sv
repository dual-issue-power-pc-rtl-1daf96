// cdb_arb: arbiter for the two completion (common data) buses.
//
// Each of the four functional units keeps its finished result in a result
// register and requests a bus. Up to two requests are granted per cycle by
// fixed priority: load/store unit, branch unit, ALU1, ALU2. A unit not granted
// keeps its result and stalls; the result registers thus separate execution
// (X) from write back (W1) as the document describes. The priority order is
// this design's own.
module cdb_arb
  import puma_pkg::*;
(
  input  cdb_t req [4],          // 0: ALU1, 1: ALU2, 2: BRU, 3: LSU
  output logic grant [4],
  output cdb_t bus [2],
  output logic ev_contention
);
  localparam int ORDER [4] = '{3, 2, 0, 1};
  always_comb begin
    int n;
    n = 0;
    bus[0] = '0; bus[1] = '0;
    for (int i = 0; i < 4; i++) grant[i] = 1'b0;
    for (int k = 0; k < 4; k++) begin
      if (req[ORDER[k]].valid && n < 2) begin
        grant[ORDER[k]] = 1'b1;
        bus[n] = req[ORDER[k]];
        n = n + 1;
      end
    end
    ev_contention = (n == 2) && ((req[0].valid && !grant[0]) || (req[1].valid && !grant[1]) ||
                                 (req[2].valid && !grant[2]) || (req[3].valid && !grant[3]));
  end
endmodule
