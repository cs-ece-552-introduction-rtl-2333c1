// tb_memory2c_align: random accesses checked against the aligned-memory
// rules: err on odd addresses when enabled, aligned data returned on a
// misaligned read, nothing stored on a misaligned write.
`timescale 1ns/1ps
module tb_memory2c_align;
  logic clk = 0, rst = 1;
  logic [15:0] data_in, data_out, addr, load_addr, load_data, dumps;
  logic enable, wr, createdump, load_we, err;
  always #5 clk = ~clk;

  memory2c_align dut (.*);

  logic [15:0] ref_mem [logic [15:0]];   // by aligned address
  int checks = 0, failures = 0, mis = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    enable = 0; wr = 0; createdump = 0; load_we = 0; addr = 0; data_in = 0;
    @(negedge clk);
    load_we = 1;
    for (int a = 0; a < 64; a += 2) begin
      load_addr = 16'(16'h2000 + a); load_data = 16'($urandom);
      ref_mem[load_addr] = load_data;
      @(negedge clk);
    end
    load_we = 0; rst = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] al;
      addr = 16'(16'h2000 + $urandom_range(0, 63));
      al = {addr[15:1], 1'b0};
      enable = ($urandom_range(0, 5) != 0); wr = 1'($urandom); data_in = 16'($urandom);
      #1;
      check(err == (enable && addr[0]), "err flag");
      if (enable && addr[0]) mis++;
      if (enable && !wr) check(data_out == ref_mem[al], $sformatf("read %h = %h exp %h", addr, data_out, ref_mem[al]));
      @(posedge clk);
      if (enable && wr && !addr[0]) ref_mem[al] = data_in;
      @(negedge clk);
    end
    check(mis > 0, "misaligned accesses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
