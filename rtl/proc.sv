// proc: the WISC-SP22 five-stage pipelined processor core
// (IF, ID, EX, MEM, WB), without its memories.
//
// Pipeline:
//   IF  - PC register and instruction-memory request. The request is held
//         stable until the memory reports Done; a redirect that arrives while
//         a request is outstanding marks the returning word to be dropped.
//   ID  - decoder and register file (with write-to-read bypass).
//   EX  - ALU/shifter, operand forwarding from EX/MEM (EX->EX) and MEM/WB
//         (MEM->EX), branch condition on Rs and target adder. Branches are
//         predicted not taken: a taken branch or any jump redirects the PC
//         and squashes the two younger instructions in IF/ID and ID/EX.
//   MEM - data-memory request; while it has not completed the IF..MEM
//         stages hold and a bubble enters WB.
//   WB  - selects load data or the EX result and writes the register file.
// While the data memory stalls, the operands EX has already forwarded are
// captured into ID/EX, because their producer in WB retires meanwhile.
// Hazards: a load followed by a consumer of its result holds IF/ID for one
// cycle (bubble into EX). HALT stops fetching as soon as it is decoded, so
// the PC is left at the instruction after it; the processor halts when
// HALT reaches WB (createdump pulses that cycle). A misaligned access
// reported by either memory (err) turns that instruction into a halt.
// Exceptions (EXCEPTIONS=1): SIIC saves PC+2 in EPC and jumps to the
// handler at 0x0002; RTI jumps to EPC. Both act in EX like jumps. With
// EXCEPTIONS=0 (the default, the required design) both are NOPs.
// Memory interface (both sides): request Rd/Wr with Addr/DataIn, held until
// Done (or err); DataOut is valid with Done. This interface is the one the
// document gives the stalling memory and the cache. Resolving branches in
// EX and the one-cycle load-use stall are this design's choices.
module proc
  import wisc_pkg::*;
#(
  parameter bit EXCEPTIONS = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  // instruction memory
  output word_t i_addr,
  output logic  i_rd,
  input  word_t i_data,
  input  logic  i_done,
  input  logic  i_err,
  // data memory
  output word_t d_addr,
  output word_t d_wdata,
  output logic  d_rd,
  output logic  d_wr,
  input  word_t d_rdata,
  input  logic  d_done,
  input  logic  d_err,
  // status
  output logic  halt,
  output logic  createdump,
  output word_t pc,
  output perf_t perf
);
  // ------------------------------------------------------------ registers
  typedef struct packed {
    logic  valid;
    word_t inst;
    word_t pc2;
    logic  err;
  } ifid_t;

  typedef struct packed {
    logic  valid;
    ctrl_t c;
    word_t a;      // Rs value read in ID
    word_t b;      // port-2 value read in ID
    word_t pc2;
  } idex_t;

  typedef struct packed {
    logic  valid;
    ctrl_t c;
    word_t y;      // ALU result / effective address
    word_t sdata;  // store data
  } exmem_t;

  typedef struct packed {
    logic  valid;
    logic  halt;
    reg_t  rd;
    logic  reg_wr;
    word_t wdata;
  } memwb_t;

  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  word_t pc_q, i_hold_q, epc_q;
  logic  ex_jump;
  logic  i_busy_q, i_drop_q, halted_q;

  // ------------------------------------------------------------ control
  logic  dstall, load_use, redirect, kill, fetch_block, fetch_take;
  word_t target;
  ctrl_t id_c;
  fwd_e  fwd_a, fwd_b;

  // ---------------------------------------------------------------- ID
  word_t rf_a, rf_b;
  decoder u_dec (.inst(ifid.inst), .ctrl(id_c));

  ctrl_t id_cx;  // decoded control with the fetch error folded in
  always_comb begin
    id_cx = id_c;
    if (ifid.err) begin
      id_cx        = '0;
      id_cx.halt   = 1'b1;
    end
  end

  regfile #(.NREGS(8), .WIDTH(16)) u_rf (
    .clk, .rst,
    .raddr1(id_cx.rs), .raddr2(id_cx.rt),
    .waddr(memwb.rd), .wdata(memwb.wdata), .wen(memwb.valid && memwb.reg_wr),
    .rdata1(rf_a), .rdata2(rf_b)
  );

  hazard_unit u_hz (
    .id_rs(id_cx.rs), .id_rt(id_cx.rt),
    .id_use_rs(ifid.valid && id_cx.use_rs), .id_use_rt(ifid.valid && id_cx.use_rt),
    .ex_rs(idex.c.rs), .ex_rt(idex.c.rt),
    .ex_use_rs(idex.valid && idex.c.use_rs), .ex_use_rt(idex.valid && idex.c.use_rt),
    .ex_rd(idex.c.rd), .ex_reg_wr(idex.valid && idex.c.reg_wr), .ex_mem_rd(idex.valid && idex.c.mem_rd),
    .mem_rd(exmem.c.rd), .mem_reg_wr(exmem.valid && exmem.c.reg_wr && !exmem.c.mem_rd),
    .wb_rd(memwb.rd), .wb_reg_wr(memwb.valid && memwb.reg_wr),
    .fwd_a, .fwd_b, .load_use
  );

  // ---------------------------------------------------------------- EX
  word_t ex_a, ex_bv, ex_b, ex_y;
  logic  taken;

  always_comb begin
    unique case (fwd_a)
      FWD_EXMEM: ex_a = exmem.y;
      FWD_MEMWB: ex_a = memwb.wdata;
      default:   ex_a = idex.a;
    endcase
    unique case (fwd_b)
      FWD_EXMEM: ex_bv = exmem.y;
      FWD_MEMWB: ex_bv = memwb.wdata;
      default:   ex_bv = idex.b;
    endcase
    ex_b = idex.c.b_imm ? idex.c.imm : ex_bv;
  end

  alu u_alu (.a(ex_a), .b(ex_b), .op(idex.c.alu_op), .sh_op(idex.c.sh_op), .pc2(idex.pc2), .y(ex_y));

  always_comb begin
    unique case (idex.c.br)
      BR_EQZ:  taken = (ex_a == '0);
      BR_NEZ:  taken = (ex_a != '0);
      BR_LTZ:  taken = ex_a[15];
      BR_GEZ:  taken = !ex_a[15];
      default: taken = 1'b0;
    endcase
    ex_jump = (idex.c.jmp == JMP_PCREL) || (idex.c.jmp == JMP_REG) ||
              (EXCEPTIONS && ((idex.c.jmp == JMP_TRAP) || (idex.c.jmp == JMP_RTI)));
    // One target adder: PC+2+imm for branches, J and JAL; Rs+imm for JR/JALR.
    if (idex.c.jmp == JMP_TRAP)     target = 16'h0002;
    else if (idex.c.jmp == JMP_RTI) target = epc_q;
    else                            target = ((idex.c.jmp == JMP_REG) ? ex_a : idex.pc2) + idex.c.imm;
  end

  // --------------------------------------------------------------- MEM
  logic mem_op;
  assign mem_op  = exmem.valid && (exmem.c.mem_rd || exmem.c.mem_wr);
  assign d_rd    = exmem.valid && exmem.c.mem_rd;
  assign d_wr    = exmem.valid && exmem.c.mem_wr;
  assign d_addr  = exmem.y;
  assign d_wdata = exmem.sdata;
  assign dstall  = mem_op && !d_done && !d_err;
  assign kill    = mem_op && d_err;   // misaligned data access: squash younger work

  // --------------------------------------------------- pipeline control
  assign redirect    = !dstall && !kill && idex.valid && (ex_jump || taken);

  // EPC: written when SIIC leaves EX (only with exceptions enabled).
  always_ff @(posedge clk) begin
    if (rst)                                              epc_q <= '0;
    else if (EXCEPTIONS && redirect && idex.c.jmp == JMP_TRAP) epc_q <= idex.pc2;
  end
  assign fetch_block = halted_q || kill ||
                       (ifid.valid && id_cx.halt) || (idex.valid && idex.c.halt) ||
                       (exmem.valid && exmem.c.halt) || (memwb.valid && memwb.halt);

  // ---------------------------------------------------------------- IF
  assign i_rd   = i_busy_q || !fetch_block;
  assign i_addr = i_busy_q ? i_hold_q : pc_q;
  // A word returned for a request that a redirect overtook is dropped.
  assign fetch_take = i_done && !i_drop_q && !fetch_block && !dstall && !load_use && !redirect;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q     <= '0;
      i_hold_q <= '0;
      i_busy_q <= 1'b0;
      i_drop_q <= 1'b0;
    end else begin
      if (i_rd && !i_done && !i_err) begin
        i_busy_q <= 1'b1;
        if (!i_busy_q) i_hold_q <= pc_q;
        if (redirect || kill) i_drop_q <= 1'b1;
      end else begin
        i_busy_q <= 1'b0;
        i_drop_q <= 1'b0;
      end
      if (redirect)        pc_q <= target;
      else if (fetch_take) pc_q <= pc_q + 16'd2;
    end
  end

  // -------------------------------------------------- pipeline registers
  logic fetch_err_take;
  assign fetch_err_take = i_err && !i_busy_q && !fetch_block && !dstall && !load_use && !redirect;

  always_ff @(posedge clk) begin
    if (rst) begin
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
    end else begin
      // MEM/WB
      if (dstall) begin
        memwb.valid <= 1'b0;
      end else begin
        memwb.valid  <= exmem.valid;
        memwb.halt   <= exmem.valid && (exmem.c.halt || kill);
        memwb.rd     <= exmem.c.rd;
        memwb.reg_wr <= exmem.valid && exmem.c.reg_wr && !kill;
        memwb.wdata  <= exmem.c.mem_rd ? d_rdata : exmem.y;
      end
      if (dstall) begin
        // The producer in WB leaves while EX waits: keep the forwarded
        // operands so the held instruction does not lose them.
        idex.a <= ex_a;
        idex.b <= ex_bv;
      end else begin
        // EX/MEM
        exmem.valid <= idex.valid && !kill;
        exmem.c     <= idex.c;
        exmem.y     <= ex_y;
        exmem.sdata <= ex_bv;
        // ID/EX
        idex.valid  <= ifid.valid && !load_use && !redirect && !kill;
        idex.c      <= id_cx;
        idex.a      <= rf_a;
        idex.b      <= rf_b;
        idex.pc2    <= ifid.pc2;
        // IF/ID
        if (redirect || kill) begin
          ifid.valid <= 1'b0;
        end else if (!load_use) begin
          ifid.valid <= fetch_take || fetch_err_take;
          ifid.inst  <= i_data;
          ifid.pc2   <= pc_q + 16'd2;
          ifid.err   <= fetch_err_take;
        end
      end
    end
  end

  // ---------------------------------------------------------------- WB
  always_ff @(posedge clk) begin
    if (rst) halted_q <= 1'b0;
    else if (memwb.valid && memwb.halt) halted_q <= 1'b1;
  end

  assign halt       = halted_q;
  assign createdump = memwb.valid && memwb.halt && !halted_q;
  assign pc         = pc_q;

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk) begin
    if (rst) begin
      perf <= '0;
    end else if (!halted_q) begin
      perf.cycles <= perf.cycles + 1;
      if (memwb.valid && !memwb.halt) perf.retired <= perf.retired + 1;
      if (load_use && !dstall && ifid.valid) perf.load_use <= perf.load_use + 1;
      if (dstall) perf.dstall <= perf.dstall + 1;
      if (!dstall && !load_use && !redirect && !fetch_block && !fetch_take) perf.istall <= perf.istall + 1;
      if (redirect) perf.squash <= perf.squash + 1;
      if (!dstall && idex.valid)
        perf.fwd_exex  <= perf.fwd_exex  + 32'(fwd_a == FWD_EXMEM) + 32'(fwd_b == FWD_EXMEM);
      if (!dstall && idex.valid)
        perf.fwd_memex <= perf.fwd_memex + 32'(fwd_a == FWD_MEMWB) + 32'(fwd_b == FWD_MEMWB);
      if (ifid.valid && memwb.valid && memwb.reg_wr &&
          ((id_cx.use_rs && id_cx.rs == memwb.rd) || (id_cx.use_rt && id_cx.rt == memwb.rd)))
        perf.rf_bypass <= perf.rf_bypass + 1;
    end
  end
endmodule
