// tb_alu: random test of every ALU operation against arithmetic written
// directly from the ISA (b - a for SUB, signed compares, carry out for SCO,
// bit reverse, SLBI, link value), with corner values mixed in.
`timescale 1ns/1ps
module tb_alu;
  import wisc_pkg::*;
  logic [15:0] a, b, pc2, y, exp;
  alu_op_e op;
  shift_op_e sh_op;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.*);

  int checks = 0, failures = 0;
  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h8001};

  function automatic logic [15:0] pick();
    return ($urandom_range(0, 3) == 0) ? CORNER[$urandom_range(0, 5)] : 16'($urandom);
  endfunction

  function automatic logic [15:0] model();
    logic [16:0] c;
    logic [15:0] r;
    logic [31:0] d;
    unique case (op)
      ALU_ADD:   return a + b;
      ALU_SUB:   return b - a;
      ALU_XOR:   return a ^ b;
      ALU_ANDN:  return a & ~b;
      ALU_SHIFT: unique case (sh_op)
                   SH_ROL: begin d = {a, a} << b[3:0]; return d[31:16]; end
                   SH_SLL: return a << b[3:0];
                   SH_ROR: begin d = {a, a} >> b[3:0]; return d[15:0]; end
                   default: return a >> b[3:0];
                 endcase
      ALU_SEQ:   return {15'b0, a == b};
      ALU_SLT:   return {15'b0, $signed(a) < $signed(b)};
      ALU_SLE:   return {15'b0, $signed(a) <= $signed(b)};
      ALU_SCO:   begin c = {1'b0, a} + {1'b0, b}; return {15'b0, c[16]}; end
      ALU_BTR:   begin for (int i = 0; i < 16; i++) r[i] = a[15 - i]; return r; end
      ALU_PASSB: return b;
      ALU_SLBI:  return (a << 8) | {8'h00, b[7:0]};
      default:   return pc2;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      a = pick(); b = ($urandom_range(0, 4) == 0) ? a : pick(); pc2 = 16'($urandom);
      op = alu_op_e'($urandom_range(0, 12)); sh_op = shift_op_e'($urandom_range(0, 3));
      #1;
      exp = model();
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL: op %s a %h b %h -> %h expected %h", op.name(), a, b, y, exp);
      end
    end
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
