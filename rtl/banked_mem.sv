// banked_mem: multi-cycle main memory behind the caches.
//
// 64 KiB organised as BANKS word-interleaved banks (bank = word address mod
// BANKS, i.e. Addr[2:1] for four banks), so the words of one cache line sit
// in different banks and can be requested in consecutive cycles.
// A request (rd or wr, one at a time) is accepted when its bank is idle;
// otherwise stall is raised and the requester holds it. An accepted access
// occupies its bank for BUSY cycles. Read data leaves the memory LATENCY
// cycles after the request was accepted, marked by rvalid; writes take
// effect at the accepting edge. An odd address raises err and is ignored.
// Bank count, latency and occupancy are this design's choices: the
// specification only says the memory is banked and cannot answer in one
// cycle. The load port writes a program image word by word.
module banked_mem #(
  parameter int unsigned BANKS   = 4,
  parameter int unsigned LATENCY = 2,
  parameter int unsigned BUSY    = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] addr,
  input  logic [15:0] data_in,
  input  logic        rd,
  input  logic        wr,
  output logic [15:0] data_out,
  output logic        rvalid,
  output logic        stall,
  output logic        err,
  output logic [BANKS-1:0] busy,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [15:0] load_data
);
  localparam int unsigned BW    = $clog2(BANKS);
  localparam int unsigned DEPTH = 32768 / BANKS;   // words per bank
  localparam int unsigned CW    = $clog2(BUSY + 1);

  logic [15:0] bank_q [BANKS];   // word read from each bank this cycle
  logic [CW-1:0] cnt [BANKS];
  logic [BW-1:0] bank, load_bank;
  logic [14-BW:0] row, load_row;
  logic          req, accept;
  logic [15:0]   pipe_d [LATENCY];
  logic          pipe_v [LATENCY];

  assign bank      = addr[BW:1];
  assign row       = addr[15:BW+1];
  assign load_bank = load_addr[BW:1];
  assign load_row  = load_addr[15:BW+1];
  assign req       = rd || wr;
  assign err       = req && addr[0];
  assign stall     = req && !addr[0] && busy[bank];
  assign accept    = req && !addr[0] && !busy[bank];

  // Each bank is its own single-port array with its own occupancy counter.
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [15:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (load_we && load_bank == BW'(b))     mem[load_row] <= load_data;
      else if (accept && wr && bank == BW'(b)) mem[row] <= data_in;
    end
    assign bank_q[b] = mem[row];

    assign busy[b] = (cnt[b] != '0);
    always_ff @(posedge clk) begin
      if (rst)                         cnt[b] <= '0;
      else if (accept && bank == BW'(b)) cnt[b] <= CW'(BUSY - 1);
      else if (cnt[b] != '0)           cnt[b] <= cnt[b] - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LATENCY; i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= accept && rd;
      for (int i = 1; i < LATENCY; i++) pipe_v[i] <= pipe_v[i-1];
    end
    pipe_d[0] <= bank_q[bank];
    for (int i = 1; i < LATENCY; i++) pipe_d[i] <= pipe_d[i-1];
  end

  assign data_out = pipe_d[LATENCY-1];
  assign rvalid   = pipe_v[LATENCY-1];

  a_one_op: assert property (@(posedge clk) disable iff (rst) !(rd && wr));
endmodule
