// tb_stallmem: random requests through mem_req_driver; read data must
// match a reference, each request must complete within the 32-cycle
// pattern, stalls must occur, odd addresses must raise err, and ready must
// follow the rotating pattern (a request waits exactly until bit 0 of the
// pattern is 1).
`timescale 1ns/1ps
module tb_stallmem;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] Addr, DataIn, DataOut, load_addr, load_data;
  logic Rd, Wr, Done, Stall, CacheHit, err, load_we, finished;
  int checks, failures, hits, stalls, errs;
  logic createdump = 0;

  stallmem #(.SEED(32'hf0f0_3c3c)) dut (.*);
  mem_req_driver #(.N(3000), .BASE(16'h4000), .SPAN(128), .ODD(1'b1)) drv (.*);

  // expected ready pattern, rotated independently
  logic [31:0] pat;
  int extra = 0, pat_err = 0;
  always @(posedge clk) begin
    if (rst) pat <= 32'hf0f0_3c3c;
    else     pat <= {pat[30:0], pat[31]};
  end
  always @(negedge clk) if (!rst && (Rd || Wr) && !Addr[0]) begin
    extra++;
    if (Done != pat[0]) pat_err++;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    load_we = 1;
    for (int a = 0; a < 128; a += 2) begin
      load_addr = 16'(16'h4000 + a); load_data = load_addr ^ 16'ha5c3; @(negedge clk);
    end
    load_we = 0; rst = 0;
    wait (finished);
    checks += 4;
    if (stalls == 0) begin failures++; $display("FAIL: no stall seen"); end
    if (errs == 0)   begin failures++; $display("FAIL: no err seen"); end
    if (hits != 0)   begin failures++; $display("FAIL: CacheHit must stay 0"); end
    if (pat_err != 0) begin failures++; $display("FAIL: ready does not follow the pattern (%0d)", pat_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
