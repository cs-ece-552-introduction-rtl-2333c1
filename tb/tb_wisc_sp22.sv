// tb_wisc_sp22: end-to-end test of the WISC-SP22 processor with each of its
// four memory models (perfect, aligned, stalling, two-way cache) running
// side by side on the same programs.
//
// Each program is also run on the instruction-set simulator of
// wisc_iss_pkg; every data-memory write of every processor must match the
// simulator's stores, in order. Programs: a directed one (all instruction
// kinds, JR/JALR, a loop that evicts dirty cache lines, load-use pairs),
// random programs, and a misaligned-access program (the aligned, stalling
// and cache memories must halt at the bad access; the perfect memory
// executes it). With the perfect memory the cycle count must equal
// retired + 5 + load-use stalls + 2 x taken branches/jumps (pipeline fill
// plus the penalties of the design). Each mechanism - forwarding on both
// paths, register-file bypass, load-use stall, branch squash, instruction
// and data memory stalls, cache hits, misses and dirty write-backs, error
// halt - must occur at least once. A fifth processor with the optional
// exception support runs every program that is meaningful with it,
// including one that raises SIIC five times, against the simulator in its
// exception mode; the other four must treat SIIC and RTI as NOPs.
`timescale 1ns/1ps
module tb_wisc_sp22;
  import wisc_pkg::*;
  import wisc_iss_pkg::*;

  localparam int NK = 4;
  localparam int NRAND = 150;

  logic clk = 0, rst = 1;
  logic load_we = 0;
  logic [15:0] load_addr = 0, load_data = 0;
  always #5 clk = ~clk;

  logic        halt [NK], cdump [NK], st_valid [NK];
  logic [15:0] pc [NK], st_addr [NK], st_data [NK];
  perf_t       perf [NK];
  logic [31:0] i_acc [NK], i_hit [NK], d_acc [NK], d_hit [NK];

  for (genvar k = 0; k < NK; k++) begin : g_dut
    wisc_sp22 #(.MEM_KIND(mem_kind_e'(k))) dut (
      .clk, .rst, .load_we, .load_addr, .load_data,
      .halt(halt[k]), .createdump(cdump[k]), .pc(pc[k]),
      .st_valid(st_valid[k]), .st_addr(st_addr[k]), .st_data(st_data[k]),
      .perf(perf[k]), .i_access(i_acc[k]), .i_hit(i_hit[k]), .d_access(d_acc[k]), .d_hit(d_hit[k]));
  end

  // fifth processor: cache memories with the optional exception support
  logic        halt_x, cdump_x, st_valid_x;
  logic [15:0] pc_x, st_addr_x, st_data_x;
  perf_t       perf_x;
  logic [31:0] xi_acc, xi_hit, xd_acc, xd_hit;
  wisc_sp22 #(.MEM_KIND(MEM_CACHE), .EXCEPTIONS(1'b1)) dut_x (
    .clk, .rst, .load_we, .load_addr, .load_data,
    .halt(halt_x), .createdump(cdump_x), .pc(pc_x),
    .st_valid(st_valid_x), .st_addr(st_addr_x), .st_data(st_data_x),
    .perf(perf_x), .i_access(xi_acc), .i_hit(xi_hit), .d_access(xd_acc), .d_hit(xd_hit));

  int checks = 0, failures = 0;
  store_t got_x [$];
  longint m_traps;
  store_t got [NK][$];
  int n_dumps [NK];
  int writebacks = 0;

  always @(posedge clk) begin
    for (int k = 0; k < NK; k++) begin
      if (!rst && st_valid[k]) got[k].push_back('{st_addr[k], st_data[k]});
      if (!rst && cdump[k]) n_dumps[k]++;
    end
    if (!rst && st_valid_x) got_x.push_back('{st_addr_x, st_data_x});
    if (!rst && g_dut[3].dut.g_cache.u_dmem.state == 2'd1 &&
        g_dut[3].dut.g_cache.u_dmem.issue_cnt == 3'd0) writebacks++;
  end

  // mechanism tallies over all programs
  longint m_load_use, m_squash, m_exex, m_memex, m_bypass, m_dstall, m_istall;
  longint m_ihit, m_dhit, m_dmiss, m_errhalt, m_cycle_ok;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // exc_ok: the program is also meaningful with exceptions enabled
  task automatic run_prog(logic [15:0] prog [$], string name, bit misaligned_expected, bit exc_ok = 1);
    wisc_iss iss_free, iss_align, iss_exc;
    int cyc;
    iss_free  = new();
    iss_align = new();
    iss_exc   = new();
    iss_exc.exceptions = 1;
    got_x.delete();
    for (int k = 0; k < NK; k++) begin got[k].delete(); n_dumps[k] = 0; end
    // image: program at 0, a known pattern around the three data bases
    rst = 1;
    @(negedge clk);
    load_we = 1;
    for (int i = 0; i < prog.size(); i++) begin
      load_addr = 16'(2 * i); load_data = prog[i];
      iss_free.load_word(load_addr, load_data); iss_align.load_word(load_addr, load_data);
      iss_exc.load_word(load_addr, load_data);
      @(negedge clk);
    end
    for (int b = 0; b < 3; b++)
      for (int a = -24; a < 24; a += 2) begin
        load_addr = 16'(16'h4000 + 16'h0800 * b + a); load_data = load_addr ^ 16'ha5c3;
        iss_free.load_word(load_addr, load_data); iss_align.load_word(load_addr, load_data);
        iss_exc.load_word(load_addr, load_data);
        @(negedge clk);
      end
    load_we = 0;
    @(negedge clk);
    rst = 0;
    iss_free.run(100000, 0);
    iss_align.run(100000, 1);
    iss_exc.run(100000, 1);
    cyc = 0;
    while (!(halt[0] && halt[1] && halt[2] && halt[3] && (halt_x || !exc_ok)) && cyc < 200000) begin
      @(negedge clk); cyc++;
    end
    check(cyc < 200000, {name, ": all processors halt"});
    for (int k = 0; k < NK; k++) begin
      store_t exp [$];
      exp = (k == 0) ? iss_free.stores : iss_align.stores;
      check(got[k].size() == exp.size(),
            $sformatf("%s kind %0d: %0d stores, expected %0d", name, k, got[k].size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got[k].size(); i++)
        check(got[k][i].addr == exp[i].addr && got[k][i].data == exp[i].data,
              $sformatf("%s kind %0d store %0d: %h<-%h expected %h<-%h", name, k, i,
                        got[k][i].addr, got[k][i].data, exp[i].addr, exp[i].data));
      check(n_dumps[k] == 1, $sformatf("%s kind %0d: one createdump pulse", name, k));
      if (!((k == 0) ? iss_free.err : iss_align.err))
        check(pc[k] == ((k == 0) ? iss_free.pc : iss_align.pc),
              $sformatf("%s kind %0d: PC after halt %h expected %h", name, k, pc[k],
                        (k == 0) ? iss_free.pc : iss_align.pc));
      m_load_use += perf[k].load_use; m_squash += perf[k].squash;
      m_exex += perf[k].fwd_exex; m_memex += perf[k].fwd_memex; m_bypass += perf[k].rf_bypass;
      if (k >= 2) begin m_dstall += perf[k].dstall; m_istall += perf[k].istall; end
      if (k == 3) begin m_ihit += i_hit[k]; m_dhit += d_hit[k]; m_dmiss += d_acc[k] - d_hit[k]; end
    end
    if (exc_ok) begin
      check(got_x.size() == iss_exc.stores.size(),
            $sformatf("%s exceptions: %0d stores, expected %0d", name, got_x.size(), iss_exc.stores.size()));
      foreach (iss_exc.stores[i])
        if (i < got_x.size())
          check(got_x[i] == iss_exc.stores[i], $sformatf("%s exceptions: store %0d %h<-%h expected %h<-%h", name, i,
                got_x[i].addr, got_x[i].data, iss_exc.stores[i].addr, iss_exc.stores[i].data));
    end
    check(iss_align.err == misaligned_expected, {name, ": misaligned access as expected"});
    if (iss_align.err) m_errhalt++;
    // CPI model of the perfect-memory pipeline
    if (!iss_free.err) begin
      check(perf[0].cycles == perf[0].retired + 5 + perf[0].load_use + 2 * perf[0].squash,
            $sformatf("%s: cycles %0d = retired %0d + 5 + load-use %0d + 2*squash %0d", name,
                      perf[0].cycles, perf[0].retired, perf[0].load_use, perf[0].squash));
      check(perf[0].retired == iss_free.steps - 1,
            $sformatf("%s: retired %0d, expected %0d", name, perf[0].retired, iss_free.steps - 1));
      m_cycle_ok++;
    end
    $display("%s: steps=%0d cycles perfect/aligned/stall/cache = %0d/%0d/%0d/%0d", name,
             iss_free.steps, perf[0].cycles, perf[1].cycles, perf[2].cycles, perf[3].cycles);
  endtask

  initial begin
    logic [15:0] prog [$];
    foreach (n_dumps[k]) n_dumps[k] = 0;
    gen_directed(prog);
    run_prog(prog, "directed", 0, 0);   // its SIIC would re-enter the program start
    gen_exception(prog);
    run_prog(prog, "exceptions", 0);
    foreach (got_x[i]) if (got_x[i].data == 16'hBADD) m_traps++;
    for (int r = 0; r < NRAND; r++) begin
      gen_random(prog, 100);
      run_prog(prog, $sformatf("random%0d", r), 0);
    end
    // misaligned data access in the middle of a program
    prog.delete();
    prog.push_back(enc_i2(5'b11000, 6, 8'h40)); prog.push_back(enc_i2(5'b10010, 6, 8'h00));
    prog.push_back(enc_i1(5'b10000, 6, 6, 0));
    prog.push_back(enc_i1(5'b10000, 6, 6, 3));   // odd address
    prog.push_back(enc_i1(5'b10000, 6, 6, 4));
    prog.push_back(HALT);
    run_prog(prog, "misaligned", 1);

    check(m_load_use > 0, "load-use stall seen");
    check(m_squash > 0, "branch squash seen");
    check(m_exex > 0, "EX->EX forwarding seen");
    check(m_memex > 0, "MEM->EX forwarding seen");
    check(m_bypass > 0, "register-file bypass seen");
    check(m_dstall > 0, "data-memory stall seen");
    check(m_istall > 0, "instruction-memory stall seen");
    check(m_ihit > 0, "instruction-cache hit seen");
    check(m_dhit > 0, "data-cache hit seen");
    check(m_dmiss > 0, "data-cache miss seen");
    check(writebacks > 0, "dirty write-back seen");
    check(m_errhalt > 0, "misaligned-access halt seen");
    check(m_traps == 5, $sformatf("five SIIC traps handled (%0d)", m_traps));
    $display("mechanisms: load_use=%0d squash=%0d exex=%0d memex=%0d bypass=%0d dstall=%0d istall=%0d ihit=%0d dhit=%0d dmiss=%0d writebacks=%0d errhalt=%0d",
             m_load_use, m_squash, m_exex, m_memex, m_bypass, m_dstall, m_istall, m_ihit, m_dhit, m_dmiss, writebacks, m_errhalt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
