// wisc_sp22: top level of the WISC-SP22 processor - the five-stage pipeline
// (proc) with separate instruction and data memories (Harvard).
//
// MEM_KIND selects the memory model of each project phase for both sides:
//   MEM_PERFECT - memory2c, single cycle, unaligned accesses allowed
//   MEM_ALIGNED - memory2c_align, single cycle, err on odd addresses
//   MEM_STALL   - stallmem, random ready pattern
//   MEM_CACHE   - mem_system: two-way set-associative cache over banked
//                 multi-cycle memory (the final design, the default)
// EXCEPTIONS enables the optional SIIC/RTI exception support of the
// pipeline (off by default: both instructions are then NOPs).
// The single-cycle memories complete every request in its cycle (Done =
// enable). The same program image is written into both memories through
// the load port (load_we, byte address load_addr, 16-bit word load_data)
// while rst is held. halt rises when HALT (or a misaligned access) retires;
// createdump pulses once then. For observation the top reports every data
// write that completes (st_*), the pipeline counters (perf) and the cache
// accesses and hits of each side.
module wisc_sp22
  import wisc_pkg::*;
#(
  parameter mem_kind_e   MEM_KIND = MEM_CACHE,
  parameter bit          EXCEPTIONS = 1'b0,
  parameter logic [31:0] I_SEED   = 32'h5a3c_96e1,
  parameter logic [31:0] D_SEED   = 32'h9e37_79b9
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [15:0] load_data,
  output logic        halt,
  output logic        createdump,
  output logic [15:0] pc,
  output logic        st_valid,
  output logic [15:0] st_addr,
  output logic [15:0] st_data,
  output perf_t       perf,
  output logic [31:0] i_access,
  output logic [31:0] i_hit,
  output logic [31:0] d_access,
  output logic [31:0] d_hit
);
  word_t i_addr, i_data, d_addr, d_wdata, d_rdata;
  logic  i_rd, i_done, i_err, i_cachehit;
  logic  d_rd, d_wr, d_done, d_err, d_cachehit;

  proc #(.EXCEPTIONS(EXCEPTIONS)) u_proc (
    .clk, .rst,
    .i_addr, .i_rd, .i_data, .i_done, .i_err,
    .d_addr, .d_wdata, .d_rd, .d_wr, .d_rdata, .d_done, .d_err,
    .halt, .createdump, .pc, .perf
  );

  if (MEM_KIND == MEM_PERFECT) begin : g_perfect
    logic [15:0] idumps, ddumps;
    memory2c u_imem (.clk, .rst, .data_in(16'h0000), .data_out(i_data), .addr(i_addr),
                     .enable(i_rd), .wr(1'b0), .createdump(1'b0),
                     .load_we, .load_addr, .load_data, .dumps(idumps));
    memory2c u_dmem (.clk, .rst, .data_in(d_wdata), .data_out(d_rdata), .addr(d_addr),
                     .enable(d_rd || d_wr), .wr(d_wr), .createdump,
                     .load_we, .load_addr, .load_data, .dumps(ddumps));
    assign i_done = i_rd;           assign i_err = 1'b0; assign i_cachehit = 1'b0;
    assign d_done = d_rd || d_wr;   assign d_err = 1'b0; assign d_cachehit = 1'b0;
  end else if (MEM_KIND == MEM_ALIGNED) begin : g_aligned
    logic [15:0] idumps, ddumps;
    memory2c_align u_imem (.clk, .rst, .data_in(16'h0000), .data_out(i_data), .addr(i_addr),
                           .enable(i_rd), .wr(1'b0), .createdump(1'b0), .err(i_err),
                           .load_we, .load_addr, .load_data, .dumps(idumps));
    memory2c_align u_dmem (.clk, .rst, .data_in(d_wdata), .data_out(d_rdata), .addr(d_addr),
                           .enable(d_rd || d_wr), .wr(d_wr), .createdump, .err(d_err),
                           .load_we, .load_addr, .load_data, .dumps(ddumps));
    assign i_done = i_rd && !i_err;         assign i_cachehit = 1'b0;
    assign d_done = (d_rd || d_wr) && !d_err; assign d_cachehit = 1'b0;
  end else if (MEM_KIND == MEM_STALL) begin : g_stall
    logic i_stall, d_stall;
    stallmem #(.SEED(I_SEED)) u_imem (
      .clk, .rst, .Addr(i_addr), .DataIn(16'h0000), .Rd(i_rd), .Wr(1'b0), .createdump(1'b0),
      .DataOut(i_data), .Done(i_done), .Stall(i_stall), .CacheHit(i_cachehit), .err(i_err),
      .load_we, .load_addr, .load_data);
    stallmem #(.SEED(D_SEED)) u_dmem (
      .clk, .rst, .Addr(d_addr), .DataIn(d_wdata), .Rd(d_rd), .Wr(d_wr), .createdump,
      .DataOut(d_rdata), .Done(d_done), .Stall(d_stall), .CacheHit(d_cachehit), .err(d_err),
      .load_we, .load_addr, .load_data);
  end else begin : g_cache
    logic i_stall, d_stall;
    mem_system u_imem (
      .clk, .rst, .Addr(i_addr), .DataIn(16'h0000), .Rd(i_rd), .Wr(1'b0), .createdump(1'b0),
      .DataOut(i_data), .Done(i_done), .Stall(i_stall), .CacheHit(i_cachehit), .err(i_err),
      .load_we, .load_addr, .load_data);
    mem_system u_dmem (
      .clk, .rst, .Addr(d_addr), .DataIn(d_wdata), .Rd(d_rd), .Wr(d_wr), .createdump,
      .DataOut(d_rdata), .Done(d_done), .Stall(d_stall), .CacheHit(d_cachehit), .err(d_err),
      .load_we, .load_addr, .load_data);
  end

  assign st_valid = d_wr && d_done;
  assign st_addr  = d_addr;
  assign st_data  = d_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      i_access <= '0; i_hit <= '0; d_access <= '0; d_hit <= '0;
    end else if (!halt) begin
      if (i_done)               i_access <= i_access + 1;
      if (i_done && i_cachehit) i_hit    <= i_hit + 1;
      if (d_done)               d_access <= d_access + 1;
      if (d_done && d_cachehit) d_hit    <= d_hit + 1;
    end
  end
endmodule
