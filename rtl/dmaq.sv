// dmaq: data memory access queue, the FXU's portal to the memory management
// unit and the off-chip second level.
//
// Requests: the load/store unit (line reads on a data cache miss, and 32-bit
// stores, since the data cache writes through) and the IMAQ (instruction line
// reads). A data request always wins over an instruction request. Each cycle
// at most one request goes to the MMU over the 32-bit address bus; store data
// goes on the 32-bit write bus. Line reads are remembered, with their source
// and address, in a DEPTH-entry buffer; the MMU returns 128-bit lines in
// request order, and the DMAQ routes each one either to the data cache (fill at
// the remembered address, also seen by the load/store unit) or to the IMAQ.
// At start-up it clears every data cache valid bit, one line per cycle.
//
// Interface: valid/ready requests, mmu_resp_valid pulses. Priority and the
// start-up initialisation follow the document; the buffer depth (8, "similar
// to the stream unit") and the handshakes are this design's own.
module dmaq #(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned DC_LINES = 8192
) (
  input  logic         clk,
  input  logic         rst_n,
  // load/store unit
  input  logic         d_req_valid,
  input  logic         d_req_we,
  input  logic [31:0]  d_req_addr,
  input  logic [31:0]  d_req_wdata,
  input  logic [3:0]   d_req_be,
  output logic         d_req_ready,
  // data fill (to dcache and load/store unit)
  output logic         fill_valid,
  output logic [31:0]  fill_addr,
  output logic [127:0] fill_line,
  // dcache start-up invalidation
  output logic         inv_en,
  output logic [$clog2(DC_LINES)-1:0] inv_idx,
  output logic         init_done,
  // IMAQ
  input  logic         i_req_valid,
  input  logic [31:0]  i_req_addr,
  output logic         i_req_ready,
  output logic         i_resp_valid,
  output logic [127:0] i_resp_line,
  // MMU
  output logic         mmu_req_valid,
  output logic         mmu_req_we,
  output logic [31:0]  mmu_req_addr,
  output logic [31:0]  mmu_req_wdata,
  output logic [3:0]   mmu_req_be,
  input  logic         mmu_req_ready,
  input  logic         mmu_resp_valid,
  input  logic [127:0] mmu_resp_data
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned IW = $clog2(DC_LINES);

  typedef struct packed {
    logic        is_data;
    logic [27:0] line;
  } pend_t;

  pend_t       q [DEPTH];
  logic [PW:0] head, tail;
  logic [IW:0] init_cnt;

  wire q_full = (tail - head) == (PW+1)'(DEPTH);
  assign init_done = init_cnt[IW];
  assign inv_en    = !init_done;
  assign inv_idx   = init_cnt[IW-1:0];

  // arbitration: data first; reads need a free buffer slot
  wire d_can = d_req_valid && (d_req_we || !q_full);
  wire i_can = i_req_valid && !q_full;
  assign d_req_ready   = init_done && mmu_req_ready && (d_req_we || !q_full);
  assign i_req_ready   = init_done && mmu_req_ready && !q_full && !d_req_valid;
  assign mmu_req_valid = init_done && (d_can || i_can);
  assign mmu_req_we    = d_req_valid && d_req_we;
  assign mmu_req_addr  = d_req_valid ? d_req_addr : i_req_addr;
  assign mmu_req_wdata = d_req_wdata;
  assign mmu_req_be    = d_req_valid ? d_req_be : 4'hf;

  wire   pend_data = q[head[PW-1:0]].is_data;
  assign fill_valid   = mmu_resp_valid && pend_data;
  assign fill_addr    = {q[head[PW-1:0]].line, 4'h0};
  assign fill_line    = mmu_resp_data;
  assign i_resp_valid = mmu_resp_valid && !pend_data;
  assign i_resp_line  = mmu_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; init_cnt <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      if (!init_done) init_cnt <= init_cnt + 1'b1;
      if (mmu_req_valid && mmu_req_ready && !mmu_req_we) begin
        q[tail[PW-1:0]] <= '{is_data: d_req_valid, line: mmu_req_addr[31:4]};
        tail <= tail + 1'b1;
      end
      if (mmu_resp_valid) head <= head + 1'b1;
    end
  end

  // the MMU never answers more reads than were sent
  a_resp_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    mmu_resp_valid |-> head != tail);
endmodule
