// tb_regfile: self-checking test of the 8 x 16-bit register file.
// Random writes and reads are compared with a shadow copy; a write to the
// register being read in the same cycle must appear on the read port
// (bypass). Reset must clear every register.
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [2:0] raddr1, raddr2, waddr;
  logic [15:0] wdata, rdata1, rdata2;
  logic wen;
  always #5 clk = ~clk;

  regfile dut (.*);

  logic [15:0] shadow [8];
  int checks = 0, failures = 0, bypasses = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    wen = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 8; i++) begin
      raddr1 = 3'(i); raddr2 = 3'(7 - i); #1;
      check(rdata1 == 0 && rdata2 == 0, "reset clears registers");
      shadow[i] = 0;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wen = 1'($urandom); waddr = 3'($urandom); wdata = 16'($urandom);
      raddr1 = 3'($urandom); raddr2 = ($urandom_range(0, 3) == 0) ? waddr : 3'($urandom);
      #1;
      check(rdata1 == ((wen && waddr == raddr1) ? wdata : shadow[raddr1]),
            $sformatf("read1 r%0d = %h", raddr1, rdata1));
      check(rdata2 == ((wen && waddr == raddr2) ? wdata : shadow[raddr2]),
            $sformatf("read2 r%0d = %h", raddr2, rdata2));
      if (wen && (waddr == raddr1 || waddr == raddr2)) bypasses++;
      @(posedge clk);
      if (wen) shadow[waddr] = wdata;
    end
    check(bypasses > 0, "bypass exercised");
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
