// stream: instruction stream (prefetch) buffer.
//
// Eight entries, each holding one 128-bit line and its line address. On an
// instruction cache miss the fetch unit presents the missing address. If a
// filled entry holds that line (a stream hit) the line is forwarded to the
// fetch unit in the same cycle and written into the instruction cache. If no
// entry holds or awaits the line (a stream miss) the whole buffer is flushed
// and re-targeted at the missing line and the seven lines after it. Requests go
// out through the IMAQ in that order, the missing line first (critical word
// first at line granularity). Responses are matched to the entry by address.
//
// At start-up the unit clears the valid bit of every instruction cache line,
// one per cycle, and raises init_done when finished.
//
// Interface: lookup_* is combinational; req_* is a valid/ready handshake to the
// IMAQ; resp_* is a one-cycle pulse. The eight entries of 16 bytes follow the
// document; the request order and the address match are this design's own.
module stream #(
  parameter int unsigned ENTRIES  = 8,
  parameter int unsigned IC_LINES = 8192
) (
  input  logic         clk,
  input  logic         rst_n,
  // fetch side
  input  logic         lookup_en,     // fetch missed the icache at lookup_addr
  input  logic [31:0]  lookup_addr,
  output logic         lookup_hit,
  output logic [127:0] lookup_line,
  // icache write port
  output logic         ic_wr_en,
  output logic [31:0]  ic_wr_addr,
  output logic [127:0] ic_wr_line,
  output logic         ic_wr_valid,
  output logic         init_done,
  // IMAQ request / response
  output logic         req_valid,
  output logic [31:0]  req_addr,
  input  logic         req_ready,
  input  logic         resp_valid,
  input  logic [31:0]  resp_addr,
  input  logic [127:0] resp_line
);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned IW = $clog2(IC_LINES);

  logic [27:0]  ent_line [ENTRIES];   // line address (addr[31:4])
  logic         ent_full [ENTRIES];   // data present
  logic         ent_used [ENTRIES];   // entry targeted at ent_line
  logic [127:0] ent_data [ENTRIES];
  logic [27:0]  base;
  logic [EW:0]  req_cnt;              // next request to send, ENTRIES = done
  logic [IW:0]  init_cnt;

  wire [27:0] lk = lookup_addr[31:4];
  logic hit_any, known;
  logic [EW-1:0] hit_i;

  always_comb begin
    hit_any = 1'b0; known = 1'b0; hit_i = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (ent_used[i] && ent_line[i] == lk) begin
        known = 1'b1;
        if (ent_full[i]) begin hit_any = 1'b1; hit_i = EW'(i); end
      end
    end
  end

  assign init_done   = init_cnt[IW];
  assign lookup_hit  = lookup_en && hit_any && init_done;
  assign lookup_line = ent_data[hit_i];
  wire   stream_miss = lookup_en && !known && init_done;

  // icache writes: initialisation sweep, then stream hits
  always_comb begin
    if (!init_done) begin
      ic_wr_en = 1'b1; ic_wr_addr = 32'(init_cnt[IW-1:0]) << 4;
      ic_wr_line = '0; ic_wr_valid = 1'b0;
    end else begin
      ic_wr_en = lookup_hit; ic_wr_addr = lookup_addr;
      ic_wr_line = lookup_line; ic_wr_valid = 1'b1;
    end
  end

  assign req_valid = init_done && (req_cnt < (EW+1)'(ENTRIES)) && !stream_miss;
  assign req_addr  = {base + 28'(req_cnt), 4'h0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        ent_used[i] <= 1'b0; ent_full[i] <= 1'b0; ent_line[i] <= '0; ent_data[i] <= '0;
      end
      base <= '0; req_cnt <= (EW+1)'(ENTRIES); init_cnt <= '0;
    end else begin
      if (!init_done) init_cnt <= init_cnt + 1'b1;
      if (stream_miss) begin
        // flush and re-target the buffer at the missing line and its successors
        for (int i = 0; i < int'(ENTRIES); i++) begin
          ent_used[i] <= 1'b1; ent_full[i] <= 1'b0; ent_line[i] <= lk + 28'(i);
        end
        base <= lk; req_cnt <= '0;
      end else begin
        if (req_valid && req_ready) req_cnt <= req_cnt + 1'b1;
        if (resp_valid)
          for (int i = 0; i < int'(ENTRIES); i++)
            if (ent_used[i] && !ent_full[i] && ent_line[i] == resp_addr[31:4]) begin
              ent_full[i] <= 1'b1; ent_data[i] <= resp_line;
            end
      end
    end
  end
endmodule
