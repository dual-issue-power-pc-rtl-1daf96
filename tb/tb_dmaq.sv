// tb_dmaq: the data memory access queue with a behavioural MMU (12-cycle
// read latency). Checks the start-up sweep of the data cache valid bits,
// data-over-instruction priority when both request in the same cycle, that
// stores go out as writes with their data and byte enables, and that each
// returned line is routed to its requester (fill with the right address, or
// the IMAQ) in order.
// A random phase then mixes data reads, stores and instruction reads for
// 3000 cycles against a memory model.
//
// The behaviour checked is the one described in the block's own header; the
// stimulus and the expected values are this testbench's own.
`include "tb_check.svh"
module tb_dmaq;
  localparam int DCL = 32;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic d_req_valid = 0, d_req_we = 0, d_req_ready, fill_valid, inv_en, init_done;
  logic [31:0] d_req_addr, d_req_wdata, fill_addr, i_req_addr, mmu_req_addr, mmu_req_wdata;
  logic [3:0] d_req_be, mmu_req_be;
  logic [127:0] fill_line, i_resp_line, mmu_resp_data;
  logic [4:0] inv_idx;
  logic i_req_valid = 0, i_req_ready, i_resp_valid, mmu_req_valid, mmu_req_we, mmu_req_ready, mmu_resp_valid;
  dmaq #(.DC_LINES(DCL)) dut (.*);
  mmu_model #(.MEM_WORDS(4096)) u_mem (
    .clk, .req_valid(mmu_req_valid), .req_we(mmu_req_we), .req_addr(mmu_req_addr),
    .req_wdata(mmu_req_wdata), .req_be(mmu_req_be), .req_ready(mmu_req_ready),
    .resp_valid(mmu_resp_valid), .resp_data(mmu_resp_data));

  function automatic logic [127:0] line_at(input logic [31:0] a);
    return {a, a + 32'd4, a + 32'd8, a + 32'd12};
  endfunction
  int n_inv = 0, n_fill = 0, n_iresp = 0;
  logic [31:0] exp_fill [$];
  logic [31:0] exp_i [$];
  always @(posedge clk) if (rst_n) begin
    if (inv_en) n_inv++;
    if (fill_valid) begin
      logic [31:0] a; a = exp_fill.pop_front();
      `CHK(fill_addr == a && fill_line == line_at(a)) n_fill++;
    end
    if (i_resp_valid) begin
      logic [31:0] a; a = exp_i.pop_front();
      `CHK(i_resp_line == line_at(a)) n_iresp++;
    end
  end

  // random phase: both requesters hold random requests until accepted; reads
  // come from 0..0x2FFF, stores go to 0x3000..0x3FFF and are mirrored in a
  // byte model. Every accepted read must come back to its requester in order,
  // an instruction request must never be accepted while a data request waits,
  // and memory must match the model at the end.
  bit rnd_on = 0;
  int unsigned prio_bad = 0, n_acc_d = 0, n_acc_i = 0;
  logic [31:0] smem [1024];
  always @(posedge clk) if (rst_n && rnd_on) begin
    if (d_req_valid && i_req_ready) prio_bad++;
    if (d_req_valid && d_req_ready) begin
      if (d_req_we) begin
        for (int b = 0; b < 4; b++)
          if (d_req_be[b]) smem[(d_req_addr - 32'h3000) >> 2][8*b +: 8] = d_req_wdata[8*b +: 8];
      end else begin exp_fill.push_back({d_req_addr[31:4], 4'h0}); n_acc_d++; end
    end
    if (i_req_valid && i_req_ready) begin exp_i.push_back({i_req_addr[31:4], 4'h0}); n_acc_i++; end
  end
  task automatic random_phase();
    for (int i = 0; i < 1024; i++) smem[i] = u_mem.mem[(32'h3000 >> 2) + i];
    n_fill = 0; n_iresp = 0; rnd_on = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (!d_req_valid || d_req_ready) begin      // previous one taken (or none)
        d_req_valid = ($urandom % 3 == 0) && cyc < 2900;
        d_req_we = ($urandom % 3 == 0);
        d_req_addr = d_req_we ? 32'h3000 + ($urandom % 4096) : ($urandom % 32'h3000);
        d_req_wdata = $urandom; d_req_be = 4'($urandom);
      end
      if (!i_req_valid || i_req_ready) begin
        i_req_valid = ($urandom % 2 == 0) && cyc < 2900;
        i_req_addr = $urandom % 32'h3000;
      end
    end
    @(negedge clk); d_req_valid = 0; i_req_valid = 0;
    repeat (40) @(negedge clk);
    rnd_on = 0;
    `CHK(prio_bad == 0)
    `CHK(n_fill == int'(n_acc_d) && n_iresp == int'(n_acc_i) && n_acc_d > 100 && n_acc_i > 100)
    for (int i = 0; i < 1024; i++) `CHK(u_mem.mem[(32'h3000 >> 2) + i] == smem[i])
  endtask

  initial begin #1 rst_n = 0; #5 rst_n = 1; end
  initial begin #1000000; failures++; `TB_END end
  initial begin
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = 32'(i * 4);
    u_mem.resp_valid = 0;
    @(posedge clk);
    wait (init_done);
    `CHK(n_inv == DCL)
    // both request in one cycle: data goes first
    @(negedge clk);
    d_req_valid = 1; d_req_we = 0; d_req_addr = 32'h0000_0104;
    i_req_valid = 1; i_req_addr = 32'h0000_0800; #1;
    `CHK(d_req_ready && !i_req_ready && mmu_req_valid && mmu_req_addr == 32'h104 && !mmu_req_we)
    exp_fill.push_back(32'h100);
    @(negedge clk); d_req_valid = 0; #1;
    `CHK(i_req_ready && mmu_req_addr == 32'h800)
    exp_i.push_back(32'h800);
    // a store in the next cycle
    @(negedge clk); i_req_valid = 0;
    d_req_valid = 1; d_req_we = 1; d_req_addr = 32'h0000_0208; d_req_wdata = 32'hCAFE_BABE; d_req_be = 4'b0011; #1;
    `CHK(mmu_req_valid && mmu_req_we && mmu_req_wdata == 32'hCAFE_BABE && mmu_req_be == 4'b0011)
    @(negedge clk); d_req_valid = 0; d_req_we = 0;
    `CHK(u_mem.mem[32'h208 >> 2] == 32'h0000_BABE)
    u_mem.mem[32'h208 >> 2] = 32'h208;
    // four more mixed reads
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      if (k % 2 == 0) begin d_req_valid = 1; d_req_addr = 32'h300 + 32'(k * 16); exp_fill.push_back(d_req_addr); end
      else begin d_req_valid = 0; i_req_valid = 1; i_req_addr = 32'h900 + 32'(k * 16); exp_i.push_back(i_req_addr); end
    end
    @(negedge clk); d_req_valid = 0; i_req_valid = 0;
    repeat (30) @(negedge clk);
    `CHK(n_fill == 3 && n_iresp == 3)
    random_phase();
    `TB_END
  end
endmodule
