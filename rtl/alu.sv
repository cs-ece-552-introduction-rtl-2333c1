// alu: the Execute-stage arithmetic unit of WISC-SP22.
//
// One 16-bit adder computes a+b (ADD, ADDI, effective addresses, JR/JALR
// targets, SCO carry) or b+~a+1 = b-a (SUB/SUBI, which subtract Rs from the
// other operand, and the SLT/SLE/SEQ compares). Shifts and rotates go
// through the barrel shifter, so each result passes through at most one
// adder or one shifter, as the clock-period rule of the design requires.
// Other results: XOR, AND-NOT (a & ~b), bit reverse of a (BTR), pass b (LBI),
// (a << 8) | b[7:0] (SLBI) and the link value PC+2 (JAL/JALR).
// a is the Rs operand, b the Rt operand or the extended immediate.
// Compares are two's complement. Purely combinational.
module alu
  import wisc_pkg::*;
(
  input  word_t     a,
  input  word_t     b,
  input  alu_op_e   op,
  input  shift_op_e sh_op,
  input  word_t     pc2,
  output word_t     y
);
  word_t        sum_a, sh_out, btr;
  logic         sub;
  logic [16:0]  sum;
  logic         lt;

  // Subtract-type ops compute b - a with the same adder.
  assign sub   = (op == ALU_SUB) || (op == ALU_SEQ) || (op == ALU_SLT) || (op == ALU_SLE);
  assign sum_a = sub ? ~a : a;
  assign sum   = {1'b0, sum_a} + {1'b0, b} + {16'b0, sub};

  // a < b  <=>  b - a > 0 as a signed value, taking overflow into account.
  // Signed compare from the sign bits and the difference b - a.
  always_comb begin
    if (a[15] != b[15]) lt = a[15];          // negative a, positive b
    else                lt = ~sum[15] && (sum[15:0] != 16'd0);
  end

  shifter #(.WIDTH(16)) u_shifter (.in(a), .amt(b[3:0]), .op(sh_op), .out(sh_out));

  always_comb for (int i = 0; i < 16; i++) btr[i] = a[15-i];

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum[15:0];
      ALU_XOR:          y = a ^ b;
      ALU_ANDN:         y = a & ~b;
      ALU_SHIFT:        y = sh_out;
      ALU_SEQ:          y = {15'b0, sum[15:0] == 16'd0};
      ALU_SLT:          y = {15'b0, lt};
      ALU_SLE:          y = {15'b0, lt || (sum[15:0] == 16'd0)};
      ALU_SCO:          y = {15'b0, sum[16]};
      ALU_BTR:          y = btr;
      ALU_PASSB:        y = b;
      ALU_SLBI:         y = {a[7:0], b[7:0]};
      ALU_LINK:         y = pc2;
      default:          y = sum[15:0];
    endcase
  end
endmodule
