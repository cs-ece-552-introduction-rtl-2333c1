// tb_wisc_sp22_full: the WISC-SP22 top at its default configuration
// (two-way caches over banked memory) running the directed program and a
// set of random programs to completion. Every data write must match the
// instruction-set simulator, the PC after HALT must point past the HALT,
// and the caches must report both hits and misses.
`timescale 1ns/1ps
module tb_wisc_sp22_full;
  import wisc_pkg::*;
  import wisc_iss_pkg::*;

  logic clk = 0, rst = 1;
  logic load_we = 0;
  logic [15:0] load_addr = 0, load_data = 0;
  always #5 clk = ~clk;

  logic halt, createdump, st_valid;
  logic [15:0] pc, st_addr, st_data;
  perf_t perf;
  logic [31:0] i_access, i_hit, d_access, d_hit;

  wisc_sp22 dut (.*);

  int checks = 0, failures = 0;
  store_t got [$];
  longint tot_ihit, tot_imiss, tot_dhit, tot_dmiss;

  always @(posedge clk) if (!rst && st_valid) got.push_back('{st_addr, st_data});

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_prog(logic [15:0] prog [$], string name);
    wisc_iss iss = new();
    int cyc = 0;
    got.delete();
    rst = 1;
    @(negedge clk);
    load_we = 1;
    foreach (prog[i]) begin
      load_addr = 16'(2 * i); load_data = prog[i]; iss.load_word(load_addr, load_data); @(negedge clk);
    end
    for (int b = 0; b < 3; b++)
      for (int a = -24; a < 24; a += 2) begin
        load_addr = 16'(16'h4000 + 16'h0800 * b + a); load_data = load_addr ^ 16'h5a5a;
        iss.load_word(load_addr, load_data); @(negedge clk);
      end
    load_we = 0;
    @(negedge clk);
    rst = 0;
    iss.run(100000, 1);
    while (!halt && cyc < 100000) begin @(negedge clk); cyc++; end
    check(halt, {name, ": halts"});
    check(got.size() == iss.stores.size(), $sformatf("%s: %0d stores expected %0d", name, got.size(), iss.stores.size()));
    foreach (iss.stores[i])
      if (i < got.size())
        check(got[i] == iss.stores[i], $sformatf("%s store %0d", name, i));
    check(pc == iss.pc, $sformatf("%s: PC %h expected %h", name, pc, iss.pc));
    check(perf.retired == iss.steps - 1, $sformatf("%s: retired %0d", name, perf.retired));
    tot_ihit += i_hit; tot_imiss += i_access - i_hit; tot_dhit += d_hit; tot_dmiss += d_access - d_hit;
    $display("%s: instructions=%0d cycles=%0d CPI=%0.2f icache %0d/%0d dcache %0d/%0d", name,
             iss.steps, perf.cycles, real'(perf.cycles) / real'(iss.steps), i_hit, i_access, d_hit, d_access);
  endtask

  initial begin
    logic [15:0] prog [$];
    gen_directed(prog);
    run_prog(prog, "directed");
    for (int r = 0; r < 20; r++) begin
      gen_random(prog, 200);
      run_prog(prog, $sformatf("random%0d", r));
    end
    check(tot_ihit > 0 && tot_imiss > 0, "instruction cache hits and misses");
    check(tot_dhit > 0 && tot_dmiss > 0, "data cache hits and misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
