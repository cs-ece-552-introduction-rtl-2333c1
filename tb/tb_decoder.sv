// tb_decoder: checks the decoder on random instructions of every opcode
// against a per-opcode reference table written from the ISA summary:
// destination register, register write, memory read/write, branch/jump,
// halt, source-register use and the extended immediate.
`timescale 1ns/1ps
module tb_decoder;
  import wisc_pkg::*;
  logic [15:0] inst;
  ctrl_t ctrl;
  logic clk = 0;
  always #5 clk = ~clk;

  decoder dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %h %s", inst, msg); end
  endtask

  initial begin
    for (int n = 0; n < 6400; n++) begin
      logic [4:0] op;
      int  e_rd, kind;   // kind: 0 none, 1 writes
      bit  e_wr, e_ld, e_st, e_halt, e_br, e_j, e_rs, e_rt;
      logic [15:0] e_imm;
      bit  chk_imm;
      inst = 16'($urandom);
      inst[15:11] = 5'(n % 32);
      op = inst[15:11];
      #1;
      e_rd = 0; e_wr = 0; e_ld = 0; e_st = 0; e_halt = 0; e_br = 0; e_j = 0; e_rs = 0; e_rt = 0;
      chk_imm = 1; e_imm = 0;
      casez (op)
        5'b00000: e_halt = 1;
        5'b00001, 5'b00010, 5'b00011: chk_imm = 0;   // NOP, SIIC, RTI
        5'b00100: begin e_j = 1; e_imm = 16'($signed(inst[10:0])); end
        5'b00110: begin e_j = 1; e_wr = 1; e_rd = 7; e_imm = 16'($signed(inst[10:0])); end
        5'b00101: begin e_j = 1; e_rs = 1; e_imm = 16'($signed(inst[7:0])); end
        5'b00111: begin e_j = 1; e_rs = 1; e_wr = 1; e_rd = 7; e_imm = 16'($signed(inst[7:0])); end
        5'b01000, 5'b01001: begin e_rs = 1; e_wr = 1; e_rd = inst[7:5]; e_imm = 16'($signed(inst[4:0])); end
        5'b01010, 5'b01011, 5'b101??: begin e_rs = 1; e_wr = 1; e_rd = inst[7:5]; e_imm = {11'b0, inst[4:0]}; end
        5'b011??: begin e_br = 1; e_rs = 1; e_imm = 16'($signed(inst[7:0])); end
        5'b10000: begin e_st = 1; e_rs = 1; e_rt = 1; e_imm = 16'($signed(inst[4:0])); end
        5'b10011: begin e_st = 1; e_rs = 1; e_rt = 1; e_wr = 1; e_rd = inst[10:8]; e_imm = 16'($signed(inst[4:0])); end
        5'b10001: begin e_ld = 1; e_rs = 1; e_wr = 1; e_rd = inst[7:5]; e_imm = 16'($signed(inst[4:0])); end
        5'b10010: begin e_rs = 1; e_wr = 1; e_rd = inst[10:8]; e_imm = {8'b0, inst[7:0]}; end
        5'b11000: begin e_wr = 1; e_rd = inst[10:8]; e_imm = 16'($signed(inst[7:0])); end
        5'b11001: begin e_rs = 1; e_wr = 1; e_rd = inst[4:2]; chk_imm = 0; end
        default:  begin e_rs = 1; e_rt = 1; e_wr = 1; e_rd = inst[4:2]; chk_imm = 0; end
      endcase
      check(ctrl.reg_wr == e_wr, "reg_wr");
      if (e_wr) check(ctrl.rd == 3'(e_rd), "rd");
      check(ctrl.mem_rd == e_ld, "mem_rd");
      check(ctrl.mem_wr == e_st, "mem_wr");
      check(ctrl.halt == e_halt, "halt");
      check((ctrl.br != BR_NONE) == e_br, "branch");
      if (op == 5'b00010)      check(ctrl.jmp == JMP_TRAP, "SIIC marked as trap");
      else if (op == 5'b00011) check(ctrl.jmp == JMP_RTI, "RTI marked as return");
      else                     check((ctrl.jmp != JMP_NONE) == e_j, "jump");
      if (op == 5'b00010 || op == 5'b00011) check(!ctrl.reg_wr && !ctrl.mem_rd && !ctrl.mem_wr, "SIIC/RTI write nothing");
      check(ctrl.use_rs == e_rs, "use_rs");
      check(ctrl.use_rt == e_rt, "use_rt");
      check(ctrl.rs == inst[10:8] && ctrl.rt == inst[7:5], "source fields");
      if (chk_imm && !e_halt) check(ctrl.imm == e_imm, $sformatf("imm %h expected %h", ctrl.imm, e_imm));
      if (op == 5'b11011)
        check(ctrl.alu_op == (inst[1:0] == 0 ? ALU_ADD : inst[1:0] == 1 ? ALU_SUB :
                              inst[1:0] == 2 ? ALU_XOR : ALU_ANDN), "arith alu_op");
      if (op == 5'b01001) check(ctrl.alu_op == ALU_SUB, "SUBI alu_op");
      if (op == 5'b11010 || op[4:2] == 3'b101) check(ctrl.alu_op == ALU_SHIFT, "shift alu_op");
      if (op == 5'b11010) check(ctrl.sh_op == shift_op_e'(inst[1:0]), "shift op from extension");
      if (op[4:2] == 3'b101) check(ctrl.sh_op == shift_op_e'(op[1:0]), "shift op from opcode");
      if (op == 5'b01100) check(ctrl.br == BR_EQZ, "BEQZ");
      if (op == 5'b01110) check(ctrl.br == BR_LTZ, "BLTZ");
      if (op == 5'b00101) check(ctrl.jmp == JMP_REG && ctrl.b_imm, "JR");
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
