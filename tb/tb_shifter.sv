// tb_shifter: exhaustive-amount test of the 16-bit barrel shifter against
// a reference built from 32-bit shifts, for all four operations.
`timescale 1ns/1ps
module tb_shifter;
  import wisc_pkg::*;
  logic [15:0] in, out, exp;
  logic [3:0]  amt;
  shift_op_e   op;
  logic clk = 0;
  always #5 clk = ~clk;

  shifter dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [15:0] ref_shift(logic [15:0] v, int n, shift_op_e k);
    logic [31:0] d;
    unique case (k)
      SH_ROL: begin d = {v, v} << n; return d[31:16]; end
      SH_SLL: return v << n;
      SH_ROR: begin d = {v, v} >> n; return d[15:0]; end
      default: return v >> n;
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 200; r++)
      for (int k = 0; k < 4; k++)
        for (int n = 0; n < 16; n++) begin
          in = 16'($urandom); amt = 4'(n); op = shift_op_e'(k);
          #1;
          exp = ref_shift(in, n, op);
          checks++;
          if (out !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL: op %0d in %h by %0d -> %h expected %h", k, in, n, out, exp);
          end
        end
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
