// mmu_model: behavioural model of the memory management unit and second-level
// memory, for simulation only. It accepts one request per cycle; a write
// updates memory at once, a read captures the 128-bit line at acceptance and
// returns it LATENCY cycles later, in request order. Memory is MEM_WORDS
// 32-bit words, big-endian, addressed modulo its size.
//
// The MMU and second-level memory are outside the core; this model and its
// latency are a simulation stand-in of this design's own.
module mmu_model #(
  parameter int unsigned MEM_WORDS = 65536,
  parameter int unsigned LATENCY   = 12
) (
  input  logic         clk,
  input  logic         req_valid,
  input  logic         req_we,
  input  logic [31:0]  req_addr,
  input  logic [31:0]  req_wdata,
  input  logic [3:0]   req_be,
  output logic         req_ready,
  output logic         resp_valid,
  output logic [127:0] resp_data
);
  logic [31:0] mem [MEM_WORDS];
  logic [127:0] q_data [$];
  longint       q_time [$];
  longint       now = 0;
  int           n_reads = 0, n_writes = 0;

  function automatic int unsigned widx(input logic [31:0] a);
    return (a >> 2) % MEM_WORDS;
  endfunction

  initial begin
    resp_valid = 1'b0; resp_data = '0;

  end

  assign req_ready = 1'b1;

  always @(posedge clk) begin
    now <= now + 1;
    resp_valid <= 1'b0;
    if (q_time.size() > 0 && q_time[0] <= now) begin
      resp_valid <= 1'b1;
      resp_data  <= q_data.pop_front();
      void'(q_time.pop_front());
    end
    if (req_valid) begin
      if (req_we) begin
        for (int bb = 0; bb < 4; bb++)
          if (req_be[bb]) mem[widx(req_addr)][8*bb +: 8] = req_wdata[8*bb +: 8];
        n_writes++;
      end else begin
        logic [31:0] la;
        la = {req_addr[31:4], 4'h0};
        q_data.push_back({mem[widx(la)], mem[widx(la + 4)], mem[widx(la + 8)], mem[widx(la + 12)]});
        q_time.push_back(now + longint'(LATENCY));
        n_reads++;
      end
    end
  end
endmodule
