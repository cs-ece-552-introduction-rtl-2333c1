// mem_req_driver: testbench requester for memories with the cache-style
// interface (Addr, DataIn, Rd, Wr -> DataOut, Done, Stall, CacheHit, err).
//
// Issues random reads and writes over a small address window, holds each
// request until Done (or err), checks read data against a reference array,
// and counts completions, hits and wait cycles. It stops after N requests
// and raises finished.
module mem_req_driver #(
  parameter int unsigned N      = 2000,
  parameter logic [15:0] BASE   = 16'h4000,
  parameter int unsigned SPAN   = 4096,    // bytes
  parameter bit          ODD    = 1'b0     // also issue odd addresses
) (
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] Addr,
  output logic [15:0] DataIn,
  output logic        Rd,
  output logic        Wr,
  input  logic [15:0] DataOut,
  input  logic        Done,
  input  logic        Stall,
  input  logic        CacheHit,
  input  logic        err,
  output logic        finished,
  output int          checks,
  output int          failures,
  output int          hits,
  output int          stalls,
  output int          errs
);
  logic [15:0] ref_mem [logic [15:0]];
  int          issued;
  int          wait_cnt;

  function automatic logic [15:0] rw(logic [15:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : (a ^ 16'ha5c3);
  endfunction

  task automatic new_req();
    Addr   = 16'(BASE + 2 * $urandom_range(0, SPAN / 2 - 1));
    if (ODD && $urandom_range(0, 15) == 0) Addr[0] = 1'b1;
    Wr     = ($urandom_range(0, 2) == 0);
    Rd     = !Wr;
    DataIn = 16'($urandom);
  endtask

  // Requests change just after a rising edge; outputs are sampled just
  // before the next one, so each Done is seen exactly once.
  initial begin
    bit complete;
    checks = 0; failures = 0; hits = 0; stalls = 0; errs = 0; issued = 0; finished = 0;
    Rd = 0; Wr = 0; Addr = 0; DataIn = 0; wait_cnt = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    @(posedge clk); #1;
    new_req();
    while (issued < N) begin
      @(negedge clk); #3;
      complete = 1'b0;
      if (err) begin
        errs++;
        complete = 1'b1;
      end else if (Done) begin
        checks++;
        if (Rd && DataOut != rw(Addr)) begin
          failures++;
          if (failures < 10) $display("FAIL: read %h = %h expected %h", Addr, DataOut, rw(Addr));
        end
        if (Wr) ref_mem[Addr] = DataIn;
        if (CacheHit) hits++;
        complete = 1'b1;
      end else begin
        if (Stall) stalls++;
        wait_cnt++;
        if (wait_cnt > 200) begin failures++; $display("FAIL: request never completes"); wait_cnt = 0; end
      end
      @(posedge clk); #1;
      if (complete) begin
        issued++;
        wait_cnt = 0;
        if (issued < N) new_req(); else begin Rd = 0; Wr = 0; end
      end
    end
    finished = 1;
  end
endmodule
