// tb_mem_system: random reads and writes through the two-way cache over a
// window larger than one way, so lines are evicted (dirty lines written
// back) and refilled. Read data must match a reference; hits must complete
// in the request cycle, a hit rate between 0 and 100 % must appear, and a
// miss on a clean line must take at least the fill time of four words
// (LATENCY 2 + 4 issues). The window holds four lines per set, so the
// replacement choice is exercised throughout.
`timescale 1ns/1ps
module tb_mem_system;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] Addr, DataIn, DataOut, load_addr, load_data;
  logic Rd, Wr, Done, Stall, CacheHit, err, load_we, finished;
  int checks, failures, hits, stalls, errs;
  logic createdump = 0;

  mem_system dut (.*);
  mem_req_driver #(.N(6000), .BASE(16'h4000), .SPAN(8192), .ODD(1'b1)) drv (.*);

  int wb_seen = 0, miss_cycles = 0, misses = 0, min_miss = 1000;
  int cur = 0;
  always @(negedge clk) if (!rst) begin
    if (dut.state == 2'd1 && dut.issue_cnt == 3'd0) wb_seen++;
    if ((Rd || Wr) && !err && !(Done && CacheHit)) cur++;
    if (Done && !CacheHit) begin
      misses++;
      if (cur < min_miss) min_miss = cur;
      cur = 0;
    end
    if (Done && CacheHit) cur = 0;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    load_we = 1;
    for (int a = 0; a < 8192; a += 2) begin
      load_addr = 16'(16'h4000 + a); load_data = load_addr ^ 16'ha5c3; @(negedge clk);
    end
    load_we = 0; rst = 0;
    wait (finished);
    checks += 5;
    if (hits == 0 || hits == checks - 5) begin failures++; $display("FAIL: hit count %0d", hits); end
    if (wb_seen == 0) begin failures++; $display("FAIL: no dirty write-back"); end
    if (errs == 0)    begin failures++; $display("FAIL: no err"); end
    if (misses == 0 || min_miss < 7) begin failures++; $display("FAIL: miss latency %0d", min_miss); end
    if (stalls == 0)  begin failures++; $display("FAIL: no stall"); end
    $display("hits=%0d misses=%0d writebacks=%0d min miss cycles=%0d", hits, misses, wb_seen, min_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
