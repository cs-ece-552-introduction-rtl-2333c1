// tb_proc: tests the pipeline alone, with testbench memories whose
// completion delay is random (0 to 3 cycles per request, or always 0).
//
// Random programs from wisc_iss_pkg run on the pipeline and on the
// instruction-set simulator; the data writes must agree in order and the
// PC after HALT must be the address after the HALT. With zero-delay memory
// the cycle count must be retired + 5 + load-use stalls + 2 x redirects.
// The testbench also checks the memory rule that a pending request is held
// unchanged until it completes.
`timescale 1ns/1ps
module tb_proc;
  import wisc_pkg::*;
  import wisc_iss_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  word_t i_addr, i_data, d_addr, d_wdata, d_rdata, pc;
  logic  i_rd, i_done, i_err, d_rd, d_wr, d_done, d_err, halt, createdump;
  perf_t perf;

  proc dut (.*);

  logic [7:0] mem [65536];
  int  max_delay;
  int  i_wait, d_wait;
  int  checks = 0, failures = 0;
  store_t got [$];
  int  held_violations = 0;
  word_t last_i_addr; logic last_i_pending;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // completion delay counters: a request completes when its counter is 0
  assign i_done = i_rd && i_wait == 0;
  assign d_done = (d_rd || d_wr) && d_wait == 0;
  assign i_err  = 1'b0;
  assign d_err  = 1'b0;
  assign i_data = i_done ? {mem[i_addr], mem[16'(i_addr + 1)]} : 16'h0000;
  assign d_rdata = (d_done && d_rd) ? {mem[d_addr], mem[16'(d_addr + 1)]} : 16'h0000;

  always @(posedge clk) begin
    if (rst) begin
      i_wait <= 0; d_wait <= 0; last_i_pending <= 0;
    end else begin
      if (i_rd && !i_done) i_wait <= i_wait - 1;
      else                 i_wait <= $urandom_range(0, max_delay);
      if ((d_rd || d_wr) && !d_done) d_wait <= d_wait - 1;
      else                           d_wait <= $urandom_range(0, max_delay);
      if (last_i_pending && !(i_rd && i_addr == last_i_addr)) held_violations++;
      last_i_pending <= i_rd && !i_done;
      last_i_addr    <= i_addr;
      if (d_wr && d_done) begin
        got.push_back('{d_addr, d_wdata});
        mem[d_addr] <= d_wdata[15:8]; mem[16'(d_addr + 1)] <= d_wdata[7:0];
      end
    end
  end

  task automatic run(logic [15:0] prog [$], string name);
    wisc_iss iss = new();
    int cyc = 0;
    rst = 1; got.delete();
    foreach (mem[a]) mem[a] = 8'h00;
    foreach (prog[i]) begin
      mem[2 * i] = prog[i][15:8]; mem[2 * i + 1] = prog[i][7:0];
      iss.load_word(16'(2 * i), prog[i]);
    end
    for (int b = 0; b < 3; b++)
      for (int a = -24; a < 24; a += 2) begin
        logic [15:0] ad = 16'(16'h4000 + 16'h0800 * b + a);
        mem[ad] = 8'(ad >> 8) ^ 8'h3c; mem[16'(ad + 1)] = 8'(ad);
        iss.load_word(ad, {mem[ad], mem[16'(ad + 1)]});
      end
    repeat (2) @(negedge clk);
    rst = 0;
    iss.run(100000, 0);
    while (!halt && cyc < 100000) begin @(negedge clk); cyc++; end
    check(halt, {name, ": halts"});
    check(got.size() == iss.stores.size(), $sformatf("%s: %0d stores, expected %0d", name, got.size(), iss.stores.size()));
    foreach (iss.stores[i])
      if (i < got.size())
        check(got[i].addr == iss.stores[i].addr && got[i].data == iss.stores[i].data,
              $sformatf("%s store %0d: %h<-%h expected %h<-%h", name, i, got[i].addr, got[i].data,
                        iss.stores[i].addr, iss.stores[i].data));
    check(pc == iss.pc, $sformatf("%s: PC after halt %h expected %h", name, pc, iss.pc));
    check(perf.retired == iss.steps - 1, $sformatf("%s: retired %0d expected %0d", name, perf.retired, iss.steps - 1));
    if (max_delay == 0)
      check(perf.cycles == perf.retired + 5 + perf.load_use + 2 * perf.squash,
            $sformatf("%s: cycles %0d", name, perf.cycles));
  endtask

  initial begin
    logic [15:0] prog [$];
    for (int r = 0; r < 60; r++) begin
      max_delay = (r % 2 == 0) ? 0 : 3;
      gen_random(prog, 80);
      run(prog, $sformatf("prog%0d delay%0d", r, max_delay));
    end
    check(held_violations == 0, "instruction request held until done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
