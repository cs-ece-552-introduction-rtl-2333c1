// tb_banked_mem: checks the banked main memory. Writes then reads to
// random word addresses; read data must appear exactly LATENCY cycles
// after the accepting edge, a second access to a busy bank must stall for
// the remaining BUSY cycles, accesses to four different banks must be
// accepted on consecutive cycles, and odd addresses raise err.
`timescale 1ns/1ps
module tb_banked_mem;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] addr, data_in, data_out, load_addr, load_data;
  logic rd, wr, rvalid, stall, err, load_we;
  logic [3:0] busy;

  banked_mem #(.BANKS(4), .LATENCY(2), .BUSY(4)) dut (.*);

  logic [15:0] ref_mem [logic [15:0]];
  int checks = 0, failures = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // one access; returns the number of stall cycles before it was accepted
  task automatic access(logic [15:0] a, bit w, logic [15:0] d, output int waited);
    waited = 0;
    addr = a; wr = w; rd = !w; data_in = d;
    #1;
    while (stall) begin @(posedge clk); #1; waited++; end
    check(!err, "no err on even address");
    @(posedge clk); #1;
    rd = 0; wr = 0;
  endtask

  initial begin
    int wt, lat;
    logic [15:0] a;
    rd = 0; wr = 0; addr = 0; data_in = 0; load_we = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    load_we = 1; load_addr = 16'h0100; load_data = 16'hbeef; @(negedge clk); load_we = 0;
    ref_mem[16'h0100] = 16'hbeef;
    rst = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 400; n++) begin
      a = 16'(2 * $urandom_range(0, 127) + 16'h0100);
      if ($urandom_range(0, 1)) begin
        logic [15:0] d = 16'($urandom);
        access(a, 1, d, wt);
        ref_mem[a] = d;
      end else if (ref_mem.exists(a)) begin
        access(a, 0, 0, wt);
        lat = 0;
        while (!rvalid) begin @(posedge clk); #1; lat++; end
        check(lat == 1, $sformatf("read latency %0d", lat + 1));  // already one edge later
        check(data_out == ref_mem[a], $sformatf("read %h = %h exp %h", a, data_out, ref_mem[a]));
      end
    end
    // same bank twice: the second access waits BUSY-1 cycles
    repeat (5) @(posedge clk); #1;
    access(16'h0200, 1, 16'h1111, wt);
    check(wt == 0, "idle bank accepts at once");
    access(16'h0208, 1, 16'h2222, wt);   // same bank (addr[2:1] equal)
    check(wt == 3, $sformatf("busy bank stalls %0d cycles", wt));
    // four banks back to back: no stall
    repeat (5) @(posedge clk); #1;
    for (int b = 0; b < 4; b++) begin
      access(16'(16'h0300 + 2 * b), 0, 0, wt);
      check(wt == 0, "different banks accept on consecutive cycles");
    end
    addr = 16'h0301; rd = 1; #1;
    check(err && !stall, "odd address raises err");
    rd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
