// decoder: instruction decode for WISC-SP22.
//
// Maps a 16-bit instruction to the control bundle ctrl_t: which registers
// are read (Rs on port 1, bits [7:5] on port 2 - Rt of the R-format and the
// store-data register Rd of ST/STU share those bits), the destination
// register and write enable, the extended immediate, the ALU operation,
// memory read/write, branch condition, jump kind and HALT.
//   Destinations: I-format 1 -> bits [7:5]; R-format and BTR -> bits [4:2];
//   LBI/SLBI -> Rs; STU -> Rs (effective address); JAL/JALR -> R7.
//   Immediates: sign-extended 5-bit for ADDI/SUBI/LD/ST/STU, zero-extended
//   5-bit for XORI/ANDNI and the shift immediates, sign-extended 8-bit for
//   LBI, branches, JR/JALR, zero-extended 8-bit for SLBI, sign-extended
//   11-bit displacement for J/JAL.
// SIIC and RTI are marked as trap and return-from-trap jumps; the pipeline
// executes them only when its exception support is enabled and otherwise
// treats them as NOP, as the specification requires of a design without
// exception handling.
// Purely combinational.
module decoder
  import wisc_pkg::*;
(
  input  word_t inst,
  output ctrl_t ctrl
);
  opcode_e op;
  word_t   simm5, zimm5, simm8, zimm8, sdisp;

  assign op    = opcode_e'(inst[15:11]);
  assign simm5 = {{11{inst[4]}}, inst[4:0]};
  assign zimm5 = {11'b0, inst[4:0]};
  assign simm8 = {{8{inst[7]}}, inst[7:0]};
  assign zimm8 = {8'b0, inst[7:0]};
  assign sdisp = {{5{inst[10]}}, inst[10:0]};

  always_comb begin
    ctrl        = '0;
    ctrl.rs     = inst[10:8];
    ctrl.rt     = inst[7:5];
    ctrl.alu_op = ALU_ADD;
    ctrl.sh_op  = shift_op_e'(inst[12:11]);
    ctrl.br     = BR_NONE;
    ctrl.jmp    = JMP_NONE;
    unique case (op)
      OP_HALT: ctrl.halt = 1'b1;
      OP_NOP: ;
      OP_SIIC: ctrl.jmp = JMP_TRAP;
      OP_RTI:  ctrl.jmp = JMP_RTI;
      OP_J:    begin ctrl.jmp = JMP_PCREL; ctrl.imm = sdisp; end
      OP_JAL:  begin ctrl.jmp = JMP_PCREL; ctrl.imm = sdisp;
                     ctrl.rd = 3'd7; ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_LINK; end
      OP_JR:   begin ctrl.jmp = JMP_REG; ctrl.imm = simm8; ctrl.use_rs = 1'b1; ctrl.b_imm = 1'b1; end
      OP_JALR: begin ctrl.jmp = JMP_REG; ctrl.imm = simm8; ctrl.use_rs = 1'b1; ctrl.b_imm = 1'b1;
                     ctrl.rd = 3'd7; ctrl.reg_wr = 1'b1; ctrl.alu_op = ALU_LINK; end
      OP_ADDI, OP_SUBI, OP_XORI, OP_ANDNI,
      OP_ROLI, OP_SLLI, OP_RORI, OP_SRLI: begin
        ctrl.use_rs = 1'b1; ctrl.b_imm = 1'b1; ctrl.rd = inst[7:5]; ctrl.reg_wr = 1'b1;
        unique case (op)
          OP_ADDI:  begin ctrl.alu_op = ALU_ADD;  ctrl.imm = simm5; end
          OP_SUBI:  begin ctrl.alu_op = ALU_SUB;  ctrl.imm = simm5; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR;  ctrl.imm = zimm5; end
          OP_ANDNI: begin ctrl.alu_op = ALU_ANDN; ctrl.imm = zimm5; end
          default:  begin ctrl.alu_op = ALU_SHIFT; ctrl.imm = zimm5; end
        endcase
      end
      OP_BEQZ, OP_BNEZ, OP_BLTZ, OP_BGEZ: begin
        ctrl.use_rs = 1'b1; ctrl.imm = simm8;
        unique case (op)
          OP_BEQZ: ctrl.br = BR_EQZ;
          OP_BNEZ: ctrl.br = BR_NEZ;
          OP_BLTZ: ctrl.br = BR_LTZ;
          default: ctrl.br = BR_GEZ;
        endcase
      end
      OP_ST, OP_STU: begin
        ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1; ctrl.b_imm = 1'b1; ctrl.imm = simm5;
        ctrl.mem_wr = 1'b1;
        if (op == OP_STU) begin ctrl.rd = inst[10:8]; ctrl.reg_wr = 1'b1; end
      end
      OP_LD: begin
        ctrl.use_rs = 1'b1; ctrl.b_imm = 1'b1; ctrl.imm = simm5;
        ctrl.mem_rd = 1'b1; ctrl.rd = inst[7:5]; ctrl.reg_wr = 1'b1;
      end
      OP_LBI:  begin ctrl.b_imm = 1'b1; ctrl.imm = simm8; ctrl.alu_op = ALU_PASSB;
                     ctrl.rd = inst[10:8]; ctrl.reg_wr = 1'b1; end
      OP_SLBI: begin ctrl.use_rs = 1'b1; ctrl.b_imm = 1'b1; ctrl.imm = zimm8; ctrl.alu_op = ALU_SLBI;
                     ctrl.rd = inst[10:8]; ctrl.reg_wr = 1'b1; end
      OP_BTR:  begin ctrl.use_rs = 1'b1; ctrl.alu_op = ALU_BTR; ctrl.rd = inst[4:2]; ctrl.reg_wr = 1'b1; end
      OP_SHIFT, OP_ARITH, OP_SEQ, OP_SLT, OP_SLE, OP_SCO: begin
        ctrl.use_rs = 1'b1; ctrl.use_rt = 1'b1; ctrl.rd = inst[4:2]; ctrl.reg_wr = 1'b1;
        ctrl.sh_op = shift_op_e'(inst[1:0]);
        unique case (op)
          OP_SHIFT: ctrl.alu_op = ALU_SHIFT;
          OP_ARITH: unique case (inst[1:0])
                      2'b00:   ctrl.alu_op = ALU_ADD;
                      2'b01:   ctrl.alu_op = ALU_SUB;
                      2'b10:   ctrl.alu_op = ALU_XOR;
                      default: ctrl.alu_op = ALU_ANDN;
                    endcase
          OP_SEQ:   ctrl.alu_op = ALU_SEQ;
          OP_SLT:   ctrl.alu_op = ALU_SLT;
          OP_SLE:   ctrl.alu_op = ALU_SLE;
          default:  ctrl.alu_op = ALU_SCO;
        endcase
      end
      default: ;
    endcase
  end
endmodule
