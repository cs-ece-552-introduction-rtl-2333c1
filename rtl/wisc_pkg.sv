// wisc_pkg: types and constants shared by the WISC-SP22 processor and its
// memory systems.
//
// WISC-SP22 is a 16-bit load/store ISA with eight general registers and
// fixed 16-bit instructions in four formats (J, I-format 1, I-format 2, R).
// The opcode is always bits [15:11]; Rs is [10:8]; Rt (R-format) and Rd
// (I-format 1) share [7:5]; Rd of R-format is [4:2]; the R-format opcode
// extension is [1:0]. Opcode values follow the ISA table. The ALU operation
// enum and the decoded control bundle are this implementation's own.
package wisc_pkg;

  localparam int unsigned XLEN = 16;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [2:0]      reg_t;

  typedef enum logic [4:0] {
    OP_HALT  = 5'b00000, OP_NOP   = 5'b00001, OP_SIIC  = 5'b00010, OP_RTI   = 5'b00011,
    OP_J     = 5'b00100, OP_JR    = 5'b00101, OP_JAL   = 5'b00110, OP_JALR  = 5'b00111,
    OP_ADDI  = 5'b01000, OP_SUBI  = 5'b01001, OP_XORI  = 5'b01010, OP_ANDNI = 5'b01011,
    OP_BEQZ  = 5'b01100, OP_BNEZ  = 5'b01101, OP_BLTZ  = 5'b01110, OP_BGEZ  = 5'b01111,
    OP_ST    = 5'b10000, OP_LD    = 5'b10001, OP_SLBI  = 5'b10010, OP_STU   = 5'b10011,
    OP_ROLI  = 5'b10100, OP_SLLI  = 5'b10101, OP_RORI  = 5'b10110, OP_SRLI  = 5'b10111,
    OP_LBI   = 5'b11000, OP_BTR   = 5'b11001, OP_SHIFT = 5'b11010, OP_ARITH = 5'b11011,
    OP_SEQ   = 5'b11100, OP_SLT   = 5'b11101, OP_SLE   = 5'b11110, OP_SCO   = 5'b11111
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_XOR, ALU_ANDN, ALU_SHIFT, ALU_SEQ, ALU_SLT, ALU_SLE,
    ALU_SCO, ALU_BTR, ALU_PASSB, ALU_SLBI, ALU_LINK
  } alu_op_e;

  // Shift/rotate selector: same code as the R-format opcode extension.
  typedef enum logic [1:0] { SH_ROL = 2'b00, SH_SLL = 2'b01, SH_ROR = 2'b10, SH_SRL = 2'b11 } shift_op_e;

  typedef enum logic [2:0] { BR_NONE, BR_EQZ, BR_NEZ, BR_LTZ, BR_GEZ } br_e;

  // JMP_TRAP (SIIC) and JMP_RTI act only when the pipeline has exceptions enabled.
  typedef enum logic [2:0] { JMP_NONE, JMP_PCREL, JMP_REG, JMP_TRAP, JMP_RTI } jmp_e;

  // Forwarding select for an EX operand.
  typedef enum logic [1:0] { FWD_RF, FWD_EXMEM, FWD_MEMWB } fwd_e;

  // Decoded control bundle produced in ID and carried down the pipeline.
  typedef struct packed {
    reg_t      rs;        // read port 1
    reg_t      rt;        // read port 2 (bits [7:5])
    logic      use_rs;
    logic      use_rt;
    reg_t      rd;        // destination register
    logic      reg_wr;
    word_t     imm;       // extended immediate / displacement
    logic      b_imm;     // ALU b operand is imm (else rt value)
    alu_op_e   alu_op;
    shift_op_e sh_op;
    logic      mem_rd;
    logic      mem_wr;
    br_e       br;
    jmp_e      jmp;
    logic      halt;
  } ctrl_t;

  // Event counters of the pipeline (each counts cycles or occurrences).
  typedef struct packed {
    logic [31:0] cycles;      // cycles since reset, until halt
    logic [31:0] retired;     // instructions written back (bubbles excluded)
    logic [31:0] load_use;    // load-use stall cycles
    logic [31:0] dstall;      // cycles the pipeline waited for data memory
    logic [31:0] istall;      // cycles ID received a bubble for lack of a fetched instruction
    logic [31:0] squash;      // taken branches and jumps (each squashes two slots)
    logic [31:0] fwd_exex;    // EX operands taken from EX/MEM
    logic [31:0] fwd_memex;   // EX operands taken from MEM/WB
    logic [31:0] rf_bypass;   // ID reads served by the register-file bypass
  } perf_t;

  // Memory model selection for the top level (one per project phase).
  typedef enum logic [1:0] { MEM_PERFECT, MEM_ALIGNED, MEM_STALL, MEM_CACHE } mem_kind_e;

endpackage
