// stallmem: stalling memory with the cache interface (phase 2.2 memory).
//
// A pseudo-random 32-bit pattern register, rotated by one bit every cycle,
// decides whether the memory is ready: ready = rand_pat[0]. A request (Rd
// or Wr, with Addr and DataIn held by the requester) completes in the first
// cycle it finds the memory ready: Done is raised that cycle and, for a
// read, DataOut carries the word (flow-through). While a request waits,
// Stall is raised. An odd Addr raises err instead and nothing is accessed.
// CacheHit is always 0. SEED sets the pattern (it must not be zero).
// Storage is a memory2c. Rotating the pattern, the one-cycle completion and
// err on odd addresses are this design's choices.
module stallmem #(
  parameter logic [31:0] SEED = 32'h5a3c_96e1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] Addr,
  input  logic [15:0] DataIn,
  input  logic        Rd,
  input  logic        Wr,
  input  logic        createdump,
  output logic [15:0] DataOut,
  output logic        Done,
  output logic        Stall,
  output logic        CacheHit,
  output logic        err,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [15:0] load_data
);
  logic [31:0] rand_pat;
  logic        ready, req, go;
  logic [15:0] dumps_unused;

  always_ff @(posedge clk) begin
    if (rst) rand_pat <= SEED;
    else     rand_pat <= {rand_pat[30:0], rand_pat[31]};
  end

  assign ready    = rand_pat[0];
  assign req      = Rd || Wr;
  assign err      = req && Addr[0];
  assign go       = req && ready && !Addr[0];
  assign Done     = go;
  assign Stall    = req && !ready && !Addr[0];
  assign CacheHit = 1'b0;

  memory2c #(.ADDR_W(16)) u_mem (
    .clk, .rst, .data_in(DataIn), .data_out(DataOut), .addr(Addr),
    .enable(go), .wr(Wr), .createdump, .load_we, .load_addr, .load_data,
    .dumps(dumps_unused)
  );

  // Interface rule: a single request at a time.
  a_one_op: assert property (@(posedge clk) disable iff (rst) !(Rd && Wr));
endmodule
