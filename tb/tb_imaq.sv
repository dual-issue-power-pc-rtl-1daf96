// tb_imaq: runs the instruction memory access queue with three unrelated
// clocks: a 10-unit stream clock, a 14-unit request clock and a 6-unit
// response clock. Random stream requests are offered. The DMAQ side accepts
// them at random, after stalling at first, and returns lines at random.
//
// Checks:
// - requests reach the request side unchanged and in order;
// - each response is handed back on the stream clock with its request's
//   address and the right line;
// - at most eight requests are held, so ready drops when the queue is full;
// - no request is lost or duplicated across the crossings.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_imaq;
  logic clk = 0, mmu_clk = 0, resp_clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  always #7 mmu_clk = ~mmu_clk;
  always #3 resp_clk = ~resp_clk;
  int checks = 0, failures = 0;
  logic s_req_valid = 0, s_req_ready, s_resp_valid, d_req_valid, d_req_ready = 0, d_resp_valid = 0;
  logic [31:0] s_req_addr, s_resp_addr, d_req_addr;
  logic [127:0] s_resp_line, d_resp_line;
  imaq dut (.*);

  logic [31:0] sent [$], fwd [$], pending [$], returned [$];
  int n_resp = 0, max_held = 0, held = 0;
  bit stall = 1, drain = 0;
  initial begin #1 rst_n = 0; #20 rst_n = 1; end
  initial begin #400000; failures++; $display("watchdog expired"); `TB_END end

  // stream side
  always @(posedge clk) if (rst_n) begin
    if (s_req_valid && s_req_ready) begin sent.push_back(s_req_addr); held++; end
    if (s_resp_valid) begin
      logic [31:0] e;
      e = returned.pop_front();
      `CHK(s_resp_addr == e && s_resp_line == {4{e}})
      n_resp++; held--;
    end
    if (held > max_held) max_held = held;
  end

  // request side
  always @(posedge mmu_clk) if (rst_n && d_req_valid && d_req_ready) begin
    `CHK(d_req_addr == sent[fwd.size()])
    fwd.push_back(d_req_addr); pending.push_back(d_req_addr);
  end
  always @(negedge mmu_clk) d_req_ready = !stall && (drain || $urandom_range(0, 2) != 0);

  // response side: lines return in request order
  always @(posedge resp_clk) if (rst_n && d_resp_valid) returned.push_back(pending.pop_front());
  always @(negedge resp_clk) begin
    d_resp_valid = !stall && pending.size() > 0 && (drain || $urandom_range(0, 2) == 0);
    d_resp_line  = (pending.size() > 0) ? {4{pending[0]}} : '0;
  end

  initial begin
    @(negedge clk); @(negedge clk); @(negedge clk);
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      s_req_valid = (t < 500) && ($urandom_range(0, 3) != 0);
      s_req_addr  = {$urandom} & 32'hFFFF_FFF0;
      if (t == 30) `CHK(!s_req_ready)                  // full while the DMAQ stalls
      if (t == 40) stall = 0;
    end
    @(negedge clk); s_req_valid = 0; drain = 1;
    repeat (200) @(negedge clk);
    `CHK(max_held == 8)
    $display("responses %0d requests %0d", n_resp, sent.size());
    `CHK(n_resp == sent.size() && fwd.size() == sent.size() && n_resp > 100)
    `TB_END
  end
endmodule
