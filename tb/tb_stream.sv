// tb_stream: stream buffer. Checks the start-up sweep (every icache line
// written invalid, init_done after IC_LINES cycles), that a stream miss
// sends eight requests in order starting at the missing line, that responses
// arriving in any order fill the right entries, that a hit forwards the line
// and writes it to the icache, that a miss on a pending line re-requests
// nothing, and that a miss elsewhere flushes and re-targets the buffer.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_stream;
  localparam int ICL = 64;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic lookup_en = 0, lookup_hit, ic_wr_en, ic_wr_valid, init_done;
  logic [31:0] lookup_addr, ic_wr_addr, req_addr, resp_addr;
  logic [127:0] lookup_line, ic_wr_line, resp_line;
  logic req_valid, req_ready = 1, resp_valid = 0;
  stream #(.IC_LINES(ICL)) dut (.*);

  logic [31:0] reqs [$];
  int n_init = 0;
  bit  seen [ICL];
  always @(posedge clk) begin
    if (req_valid && req_ready) reqs.push_back(req_addr);
    if (rst_n && ic_wr_en && !init_done && !ic_wr_valid) begin seen[(ic_wr_addr >> 4) % ICL] = 1; n_init++; end
  end
  function automatic logic [127:0] pat(input logic [31:0] a); return {4{a ^ 32'h5a5a_0000}}; endfunction

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #200000; failures++; `TB_END end
  initial begin
    int c;
    c = 0;
    @(posedge clk);
    while (!init_done) begin @(posedge clk); c++; end
    `CHK(c >= ICL && c <= ICL + 2)
    `CHK(n_init == ICL)
    for (int i = 0; i < ICL; i++) `CHK(seen[i])
    // stream miss at 0x1234
    @(negedge clk); lookup_en = 1; lookup_addr = 32'h0000_1234; #1;
    `CHK(!lookup_hit)
    @(negedge clk); lookup_en = 0;
    repeat (12) @(negedge clk);
    `CHK(reqs.size() == 8)
    for (int i = 0; i < reqs.size(); i++) `CHK(reqs[i] == 32'h0000_1230 + 32'(16 * i))
    // answer lines in reverse order, except line 0x1230
    for (int i = 7; i >= 1; i--) begin
      @(negedge clk); resp_valid = 1; resp_addr = 32'h1230 + 32'(16 * i); resp_line = pat(resp_addr);
    end
    @(negedge clk); resp_valid = 0;
    // pending line: no hit, and no new requests
    lookup_en = 1; lookup_addr = 32'h0000_1238; #1; `CHK(!lookup_hit)
    @(negedge clk); lookup_en = 0; repeat (3) @(negedge clk); `CHK(reqs.size() == 8)
    @(negedge clk); resp_valid = 1; resp_addr = 32'h1230; resp_line = pat(32'h1230);
    @(negedge clk); resp_valid = 0;
    for (int i = 0; i < 8; i++) begin
      lookup_en = 1; lookup_addr = 32'h1230 + 32'(16 * i) + 32'(4 * (i % 4)); #1;
      `CHK(lookup_hit && lookup_line == pat(32'h1230 + 32'(16 * i)))
      `CHK(ic_wr_en && ic_wr_valid && ic_wr_addr == lookup_addr && ic_wr_line == lookup_line)
      @(negedge clk);
    end
    // a miss outside the buffer flushes it
    lookup_addr = 32'h0000_8000; #1; `CHK(!lookup_hit)
    @(negedge clk); lookup_en = 0;
    lookup_en = 1; lookup_addr = 32'h1230; #1; `CHK(!lookup_hit)
    lookup_en = 0;
    repeat (12) @(negedge clk);
    `CHK(reqs.size() == 16 && reqs[8] == 32'h8000 && reqs[15] == 32'h8070)
    `TB_END
  end
endmodule
