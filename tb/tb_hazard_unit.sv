// tb_hazard_unit: random register patterns for the forwarding selects and
// the load-use stall, checked against the rules: the producer in MEM wins
// over the one in WB, only registers that are written and read count, and
// a load in EX stalls a reader of its destination in ID.
`timescale 1ns/1ps
module tb_hazard_unit;
  import wisc_pkg::*;
  reg_t id_rs, id_rt, ex_rs, ex_rt, ex_rd, mem_rd, wb_rd;
  logic id_use_rs, id_use_rt, ex_use_rs, ex_use_rt, ex_reg_wr, ex_mem_rd, mem_reg_wr, wb_reg_wr;
  fwd_e fwd_a, fwd_b;
  logic load_use;
  logic clk = 0;
  always #5 clk = ~clk;

  hazard_unit dut (.*);

  int checks = 0, failures = 0;
  int seen [3];

  function automatic fwd_e expect_sel(reg_t r, logic u);
    if (!u) return FWD_RF;
    if (mem_reg_wr && mem_rd == r) return FWD_EXMEM;
    if (wb_reg_wr && wb_rd == r) return FWD_MEMWB;
    return FWD_RF;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      // small register range so that matches are frequent
      {id_rs, id_rt, ex_rs, ex_rt, ex_rd, mem_rd, wb_rd} = 21'($urandom) & 21'o1111111 * 3;
      {id_use_rs, id_use_rt, ex_use_rs, ex_use_rt, ex_reg_wr, ex_mem_rd, mem_reg_wr, wb_reg_wr} = 8'($urandom);
      #1;
      checks += 3;
      if (fwd_a != expect_sel(ex_rs, ex_use_rs)) begin failures++; $display("FAIL fwd_a"); end
      if (fwd_b != expect_sel(ex_rt, ex_use_rt)) begin failures++; $display("FAIL fwd_b"); end
      if (load_use != (ex_mem_rd && ex_reg_wr && ((id_use_rs && id_rs == ex_rd) || (id_use_rt && id_rt == ex_rd)))) begin
        failures++; $display("FAIL load_use");
      end
      seen[fwd_a]++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
