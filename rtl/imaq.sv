// imaq: instruction memory access queue between the stream unit and the DMAQ.
//
// The queue spans three clock domains:
// - clk: the stream unit side;
// - mmu_clk: requests to the DMAQ;
// - resp_clk: lines returning from the higher level of memory.
// Two dual-clock FIFOs carry the traffic. One holds line addresses from clk
// to mmu_clk; the other holds returned lines from resp_clk to clk.
//
// On the stream side, a counter bounds the outstanding requests to DEPTH.
// Sent requests wait in issue order in a local address queue. Responses come
// back in request order, so the head of that queue names the line in the
// oldest response. The stream unit gets the line with its address.
//
// Interface:
// - Stream side: valid/ready request. The response is a one-cycle pulse with
//   address and line.
// - DMAQ request side, on mmu_clk: valid/ready.
// - DMAQ response side, on resp_clk: one pulse per line, in request order.
// Timing: every crossing adds two cycles of the receiving clock, so a request
// reaches d_req three to four mmu_clk edges after it is accepted.
//
// The three clock domains and the buffer depth follow the original queue. Its
// depth of 8 is "a buffer similar to the stream unit". The crossing circuit
// (Gray-pointer FIFOs) and the response FIFO of twice the depth are this
// design's choices. The second is slack for the pessimistic full flag of the
// write side. In the top level all three clocks are the core clock.
module imaq #(
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         mmu_clk,
  input  logic         resp_clk,
  input  logic         rst_n,
  // from stream unit (clk)
  input  logic         s_req_valid,
  input  logic [31:0]  s_req_addr,
  output logic         s_req_ready,
  output logic         s_resp_valid,
  output logic [31:0]  s_resp_addr,
  output logic [127:0] s_resp_line,
  // to DMAQ (mmu_clk)
  output logic         d_req_valid,
  output logic [31:0]  d_req_addr,
  input  logic         d_req_ready,
  // from DMAQ (resp_clk)
  input  logic         d_resp_valid,
  input  logic [127:0] d_resp_line
);
  localparam int unsigned PW = $clog2(DEPTH);

  // ---------------- stream side (clk) ----------------
  logic [27:0] aq [DEPTH];              // line addresses of outstanding requests
  logic [PW-1:0] head, tail;
  logic [PW:0]   cnt;
  logic          rq_full, rq_empty, rs_full, rs_empty;
  logic [27:0]   rq_rdata;

  assign s_req_ready  = (cnt != (PW+1)'(DEPTH)) && !rq_full;
  assign s_resp_valid = !rs_empty;
  assign s_resp_addr  = {aq[head], 4'h0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; cnt <= '0;
      for (int i = 0; i < int'(DEPTH); i++) aq[i] <= '0;
    end else begin
      if (s_req_valid && s_req_ready) begin
        aq[tail] <= s_req_addr[31:4];
        tail <= tail + 1'b1;
      end
      if (s_resp_valid) head <= head + 1'b1;
      cnt <= cnt + (PW+1)'(s_req_valid && s_req_ready) - (PW+1)'(s_resp_valid);
    end
  end

  // requests: clk -> mmu_clk
  async_fifo #(.W(28), .DEPTH(DEPTH)) u_req (
    .rst_n,
    .wclk(clk), .wr_en(s_req_valid && s_req_ready), .wr_data(s_req_addr[31:4]), .full(rq_full),
    .rclk(mmu_clk), .rd_en(d_req_ready), .rd_data(rq_rdata), .empty(rq_empty));

  assign d_req_valid = !rq_empty;
  assign d_req_addr  = {rq_rdata, 4'h0};

  // responses: resp_clk -> clk
  async_fifo #(.W(128), .DEPTH(2 * DEPTH)) u_resp (
    .rst_n,
    .wclk(resp_clk), .wr_en(d_resp_valid), .wr_data(d_resp_line), .full(rs_full),
    .rclk(clk), .rd_en(1'b1), .rd_data(s_resp_line), .empty(rs_empty));

  a_resp_room: assert property (@(posedge resp_clk) disable iff (!rst_n) d_resp_valid |-> !rs_full);
endmodule
