// tb_memory2c: random reads and writes (aligned and unaligned) against a
// byte-array reference: big-endian word layout, flow-through reads,
// data_out 0 when disabled or writing, load port, createdump counting.
`timescale 1ns/1ps
module tb_memory2c;
  logic clk = 0, rst = 1;
  logic [15:0] data_in, data_out, addr, load_addr, load_data, dumps;
  logic enable, wr, createdump, load_we;
  always #5 clk = ~clk;

  memory2c dut (.*);

  logic [7:0] ref_mem [logic [15:0]];
  int checks = 0, failures = 0;

  function automatic logic [7:0] rb(logic [15:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : 8'h00;
  endfunction

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    enable = 0; wr = 0; createdump = 0; load_we = 0; addr = 0; data_in = 0;
    @(negedge clk);
    // preload a window through the load port
    load_we = 1;
    for (int a = 16'h100; a < 16'h150; a += 2) begin
      load_addr = 16'(a); load_data = 16'(a * 7 + 3);
      ref_mem[16'(a)] = load_data[15:8]; ref_mem[16'(a + 1)] = load_data[7:0];
      @(negedge clk);
    end
    load_we = 0; rst = 0;
    for (int n = 0; n < 3000; n++) begin
      addr = 16'(16'h100 + $urandom_range(0, 63));
      enable = ($urandom_range(0, 5) != 0); wr = 1'($urandom); data_in = 16'($urandom);
      createdump = ($urandom_range(0, 50) == 0);
      #1;
      if (enable && !wr) check(data_out == {rb(addr), rb(16'(addr + 1))},
                               $sformatf("read %h = %h", addr, data_out));
      else check(data_out == 16'h0000, "data_out 0 when not reading");
      // flow-through: a new address in the same cycle changes data_out
      if (enable && !wr) begin
        addr = 16'(addr + 2); #1;
        check(data_out == {rb(addr), rb(16'(addr + 1))}, "flow-through read");
      end
      @(posedge clk);
      if (enable && wr) begin ref_mem[addr] = data_in[15:8]; ref_mem[16'(addr + 1)] = data_in[7:0]; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ndump = 0;
  always @(posedge clk) if (!rst && createdump) ndump++;
  final if (dumps != 16'(ndump)) $display("FAIL: dumps %0d expected %0d", dumps, ndump);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
