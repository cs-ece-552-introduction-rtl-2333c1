// wisc_iss_pkg: reference model and program builder for the WISC-SP22
// testbenches.
//
// wisc_iss is an instruction-set simulator written straight from the ISA
// table: it runs a memory image one instruction at a time and records every
// store (address, data) in order, so a testbench can compare the processor's
// data-memory writes with it. The enc_* functions assemble instructions;
// gen_random builds a random, always-terminating program (forward branches
// and jumps only) whose loads and stores use three base registers R4-R6
// that point to addresses mapping to the same cache set. With its
// `exceptions` flag set, the simulator also handles SIIC (EPC = PC+2, jump
// to 0x0002) and RTI (PC = EPC); otherwise both are NOPs. gen_exception
// builds a short program whose handler stores 0xBADD once per SIIC.
package wisc_iss_pkg;

  typedef struct { logic [15:0] addr; logic [15:0] data; } store_t;

  // ---------------------------------------------------------- assembler
  function automatic logic [15:0] enc_r(logic [4:0] op, int rs, int rt, int rd, logic [1:0] ext);
    return {op, 3'(rs), 3'(rt), 3'(rd), ext};
  endfunction
  function automatic logic [15:0] enc_i1(logic [4:0] op, int rs, int rd, int imm);
    return {op, 3'(rs), 3'(rd), 5'(imm)};
  endfunction
  function automatic logic [15:0] enc_i2(logic [4:0] op, int rs, int imm);
    return {op, 3'(rs), 8'(imm)};
  endfunction
  function automatic logic [15:0] enc_j(logic [4:0] op, int disp);
    return {op, 11'(disp)};
  endfunction

  localparam logic [15:0] HALT = 16'h0000;
  localparam logic [15:0] NOP  = 16'h0800;

  // --------------------------------------------------------------- ISS
  class wisc_iss;
    logic [7:0]  mem [65536];
    logic [15:0] r [8];
    logic [15:0] pc;
    logic [15:0] epc;
    bit          exceptions;   // execute SIIC/RTI (else they are NOPs)
    store_t      stores [$];
    int          steps;
    bit          halted;
    bit          err;

    function new();
      foreach (mem[i]) mem[i] = 8'h00;
      foreach (r[i]) r[i] = 16'h0000;
      pc = 0; epc = 0; steps = 0; halted = 0; err = 0; exceptions = 0;
    endfunction

    function void load_word(logic [15:0] a, logic [15:0] d);
      mem[a] = d[15:8]; mem[16'(a + 1)] = d[7:0];
    endfunction

    function logic [15:0] rd16(logic [15:0] a);
      return {mem[a], mem[16'(a + 1)]};
    endfunction

    function void run(int max_steps, bit check_align);
      while (!halted && steps < max_steps) step(check_align);
    endfunction

    function void step(bit check_align);
      logic [15:0] i, rs, rt, s5, z5, s8, z8, d11, npc, ea, res;
      logic [4:0]  op;
      logic [16:0] c;
      int a, b, dd, sh;
      if (check_align && pc[0]) begin halted = 1; err = 1; return; end
      i = rd16(pc); op = i[15:11];
      a = i[10:8]; b = i[7:5]; dd = i[4:2];
      rs = r[a]; rt = r[b];
      s5 = {{11{i[4]}}, i[4:0]}; z5 = {11'b0, i[4:0]};
      s8 = {{8{i[7]}}, i[7:0]};  z8 = {8'b0, i[7:0]};
      d11 = {{5{i[10]}}, i[10:0]};
      npc = pc + 2;
      steps++;
      case (op)
        5'b00000: begin halted = 1; pc = npc; return; end
        5'b00010: if (exceptions) begin epc = npc; npc = 16'h0002; end   // SIIC
        5'b00011: if (exceptions) npc = epc;                             // RTI
        5'b00100: npc = npc + d11;
        5'b00110: begin r[7] = npc; npc = npc + d11; end
        5'b00101: npc = rs + s8;
        5'b00111: begin r[7] = npc; npc = rs + s8; end
        5'b01000: r[b] = rs + s5;
        5'b01001: r[b] = s5 - rs;
        5'b01010: r[b] = rs ^ z5;
        5'b01011: r[b] = rs & ~z5;
        5'b10100, 5'b10101, 5'b10110, 5'b10111: r[b] = shift(rs, i[3:0], op[1:0]);
        5'b10000, 5'b10011: begin
          ea = rs + s5;
          if (check_align && ea[0]) begin halted = 1; err = 1; return; end
          stores.push_back('{ea, rt});
          mem[ea] = rt[15:8]; mem[16'(ea + 1)] = rt[7:0];
          if (op == 5'b10011) r[a] = ea;
        end
        5'b10001: begin
          ea = rs + s5;
          if (check_align && ea[0]) begin halted = 1; err = 1; return; end
          r[b] = rd16(ea);
        end
        5'b11001: for (int k = 0; k < 16; k++) r[dd][k] = rs[15-k];
        5'b11011: case (i[1:0])
                    2'b00: r[dd] = rs + rt;
                    2'b01: r[dd] = rt - rs;
                    2'b10: r[dd] = rs ^ rt;
                    2'b11: r[dd] = rs & ~rt;
                  endcase
        5'b11010: r[dd] = shift(rs, rt[3:0], i[1:0]);
        5'b11100: r[dd] = (rs == rt) ? 16'd1 : 16'd0;
        5'b11101: r[dd] = ($signed(rs) <  $signed(rt)) ? 16'd1 : 16'd0;
        5'b11110: r[dd] = ($signed(rs) <= $signed(rt)) ? 16'd1 : 16'd0;
        5'b11111: begin c = {1'b0, rs} + {1'b0, rt}; r[dd] = {15'b0, c[16]}; end
        5'b01100: if (rs == 0)     npc = npc + s8;
        5'b01101: if (rs != 0)     npc = npc + s8;
        5'b01110: if (rs[15])      npc = npc + s8;
        5'b01111: if (!rs[15])     npc = npc + s8;
        5'b11000: r[a] = s8;
        5'b10010: r[a] = {rs[7:0], 8'h00} | z8;
        default: ;  // NOP
      endcase
      pc = npc;
    endfunction

    function logic [15:0] shift(logic [15:0] v, logic [3:0] n, logic [1:0] k);
      logic [31:0] d;
      case (k)
        2'b00: begin d = {v, v} << n; return d[31:16]; end
        2'b01: return v << n;
        2'b10: begin d = {v, v} >> n; return d[15:0]; end
        default: return v >> n;
      endcase
    endfunction
  endclass

  // ------------------------------------------------------ random program
  // Body of n random instructions between a prologue that sets the base
  // registers (R4=0x5000, R5=0x4800, R6=0x4000) and an epilogue that stores
  // R0-R7 at 0x6000 and halts.
  function automatic void gen_random(ref logic [15:0] prog [$], input int n);
    int k;
    logic [4:0] op;
    prog.delete();
    prog.push_back(enc_i2(5'b11000, 4, 8'h50)); prog.push_back(enc_i2(5'b10010, 4, 8'h00));
    prog.push_back(enc_i2(5'b11000, 5, 8'h48)); prog.push_back(enc_i2(5'b10010, 5, 8'h00));
    prog.push_back(enc_i2(5'b11000, 6, 8'h40)); prog.push_back(enc_i2(5'b10010, 6, 8'h00));
    for (int j = 0; j < 8; j++) prog.push_back(enc_i2(5'b11000, j == 4 || j == 5 || j == 6 ? 0 : j, $urandom));
    for (int j = 0; j < n; j++) begin
      int d = $urandom_range(0, 3), s = $urandom_range(0, 7), t = $urandom_range(0, 7);
      int base = $urandom_range(4, 6);
      if (d == 3) d = 7;
      k = $urandom_range(0, 19);
      case (k)
        0, 1, 2: begin
          op = 5'(5'b11011 - 5'($urandom_range(0, 1)));
          prog.push_back(enc_r(op, s, t, d, 2'($urandom)));
        end
        3: prog.push_back(enc_r(5'(5'b11100 + $urandom_range(0, 3)), s, t, d, 2'b00));
        4: prog.push_back(enc_r(5'b11001, s, 0, d, 2'b00));
        5, 6: prog.push_back(enc_i1(5'(5'b01000 + $urandom_range(0, 3)), s, d, $urandom));
        7: prog.push_back(enc_i1(5'(5'b10100 + $urandom_range(0, 3)), s, d, $urandom));
        8: prog.push_back(enc_i2(5'b11000, d, $urandom));
        9: prog.push_back(enc_i2(5'b10010, d, $urandom));
        10, 11, 12: prog.push_back(enc_i1(5'b10001, base, d, 2 * $urandom_range(0, 15) - 16));
        13, 14: prog.push_back(enc_i1(5'b10000, base, s, 2 * $urandom_range(0, 15) - 16));
        15: prog.push_back(enc_i1(5'b10011, base, s == base ? 0 : s, 2 * $urandom_range(0, 2) - 2));
        16, 17: prog.push_back(enc_i2(5'(5'b01100 + $urandom_range(0, 3)), s, 2 * $urandom_range(0, 3)));
        18: prog.push_back(enc_j($urandom_range(0, 1) ? 5'b00100 : 5'b00110, 2 * $urandom_range(0, 3)));
        default: begin  // load immediately followed by its consumer
          prog.push_back(enc_i1(5'b10001, base, d, 2 * $urandom_range(0, 15) - 16));
          prog.push_back(enc_r(5'b11011, d, t, $urandom_range(0, 3), 2'b00));
        end
      endcase
    end
    // landing pad for forward branches near the end
    repeat (4) prog.push_back(NOP);
    for (int j = 0; j < 8; j++) prog.push_back(enc_i1(5'b10000, 4, j, 2 * j - 8));
    prog.push_back(HALT);
  endfunction
  // Exception program: 0x0000 jumps to main; the handler at 0x0002 loads
  // 0xBADD into R7 and returns with RTI; main raises SIIC five times in a
  // loop and stores R7 and the loop counter after each.
  function automatic void gen_exception(ref logic [15:0] p [$]);
    int loop;
    p.delete();
    p.push_back(enc_j(5'b00100, 6));                    // J main (index 4)
    p.push_back(enc_i2(5'b11000, 7, 8'hBA));            // handler: LBI R7, 0xBA
    p.push_back(enc_i2(5'b10010, 7, 8'hDD));            //          SLBI R7, 0xDD
    p.push_back(16'h1800);                              //          RTI
    p.push_back(enc_i2(5'b11000, 6, 8'h40)); p.push_back(enc_i2(5'b10010, 6, 8'h00));
    p.push_back(enc_i2(5'b11000, 1, 5));
    loop = p.size();
    p.push_back(enc_i2(5'b11000, 7, 8'h11));            // R7 = 0x0011
    p.push_back(16'h1100);                              // SIIC R1
    p.push_back(enc_i1(5'b10000, 6, 7, 0));             // ST R7
    p.push_back(enc_i1(5'b10000, 6, 1, 2));             // ST R1
    p.push_back(enc_i1(5'b01000, 1, 1, 5'h1F));         // ADDI R1, R1, -1
    p.push_back(enc_i2(5'b01101, 1, 2 * (loop - p.size() - 1)));
    p.push_back(HALT);
  endfunction

  // Directed program: every instruction kind, JR/JALR to absolute targets,
  // back-to-back dependences, a load-use pair, STU, a loop storing to three
  // addresses of one cache set (dirty evictions), all branch kinds, J/JAL,
  // SIIC/RTI as NOPs; ends by storing R0-R7 next to R4 and HALT.
  function automatic void gen_directed(ref logic [15:0] p [$]);
    int loop;
    p.delete();
    p.push_back(enc_i2(5'b11000, 6, 8'h40)); p.push_back(enc_i2(5'b10010, 6, 8'h00)); // R6=0x4000
    p.push_back(enc_i2(5'b11000, 5, 8'h48)); p.push_back(enc_i2(5'b10010, 5, 8'h00)); // R5=0x4800
    p.push_back(enc_i2(5'b11000, 4, 8'h50)); p.push_back(enc_i2(5'b10010, 4, 8'h00)); // R4=0x5000
    // JR: LBI R3,target ; JR R3,0 ; (skipped) ; target
    p.push_back(enc_i2(5'b11000, 3, 2 * (p.size() + 3)));
    p.push_back(enc_i2(5'b00101, 3, 0));
    p.push_back(enc_i2(5'b11000, 0, 8'h77));             // squashed
    // JALR: LBI R3,target-2 ; JALR R3,2 ; (skipped) ; target: ST R7
    p.push_back(enc_i2(5'b11000, 3, 2 * (p.size() + 3) - 2));
    p.push_back(enc_i2(5'b00111, 3, 2));
    p.push_back(enc_i2(5'b11000, 0, 8'h66));             // squashed
    p.push_back(enc_i1(5'b10000, 6, 7, 0));              // ST R7 (link), R6, 0
    // arithmetic with back-to-back dependences
    p.push_back(enc_i2(5'b11000, 0, 8'h05));             // R0 = 5
    p.push_back(enc_i2(5'b11000, 1, 8'hFD));             // R1 = -3
    p.push_back(enc_r(5'b11011, 0, 1, 2, 2'b00));        // ADD R2 = R0+R1
    p.push_back(enc_r(5'b11011, 2, 1, 3, 2'b01));        // SUB R3 = R1-R2
    p.push_back(enc_i1(5'b10000, 6, 3, 2));              // ST R3
    p.push_back(enc_r(5'b11011, 2, 3, 2, 2'b10));        // XOR
    p.push_back(enc_r(5'b11011, 0, 1, 3, 2'b11));        // ANDN
    p.push_back(enc_i1(5'b10000, 6, 2, 4));
    p.push_back(enc_i1(5'b10000, 6, 3, 6));
    p.push_back(enc_i1(5'b01001, 0, 2, 5'h1F));          // SUBI R2 = -1 - R0
    p.push_back(enc_i1(5'b01010, 2, 3, 5'h15));          // XORI
    p.push_back(enc_i1(5'b01011, 3, 2, 5'h0F));          // ANDNI
    p.push_back(enc_i1(5'b10000, 6, 2, 8));
    p.push_back(enc_i1(5'b10100, 2, 3, 5));              // ROLI
    p.push_back(enc_i1(5'b10101, 3, 2, 3));              // SLLI
    p.push_back(enc_i1(5'b10110, 2, 3, 7));              // RORI
    p.push_back(enc_i1(5'b10111, 3, 2, 9));              // SRLI
    p.push_back(enc_i1(5'b10000, 6, 2, 10));
    p.push_back(enc_r(5'b11010, 2, 0, 3, 2'b00));        // ROL by R0
    p.push_back(enc_r(5'b11010, 3, 0, 3, 2'b01));
    p.push_back(enc_r(5'b11010, 3, 1, 3, 2'b10));
    p.push_back(enc_r(5'b11010, 3, 0, 3, 2'b11));
    p.push_back(enc_r(5'b11001, 3, 0, 2, 2'b00));        // BTR
    p.push_back(enc_i1(5'b10000, 6, 2, 12));
    p.push_back(enc_r(5'b11100, 0, 0, 2, 2'b00));        // SEQ
    p.push_back(enc_r(5'b11101, 1, 0, 3, 2'b00));        // SLT
    p.push_back(enc_r(5'b11011, 2, 3, 2, 2'b00));
    p.push_back(enc_r(5'b11110, 0, 1, 3, 2'b00));        // SLE
    p.push_back(enc_r(5'b11011, 2, 3, 2, 2'b00));
    p.push_back(enc_r(5'b11111, 1, 1, 3, 2'b00));        // SCO
    p.push_back(enc_r(5'b11011, 2, 3, 2, 2'b00));
    p.push_back(enc_i1(5'b10000, 6, 2, 14));
    // load-use pair and store with update
    p.push_back(enc_i1(5'b10001, 6, 2, 2));              // LD R2
    p.push_back(enc_r(5'b11011, 2, 2, 3, 2'b00));        // ADD R3 = R2+R2
    p.push_back(enc_i1(5'b10011, 6, 3, 16));             // STU R3 -> R6 += 16
    p.push_back(enc_i1(5'b10000, 6, 6, 2));              // store the new R6
    // loop: three stores to one cache set, four times (evicts dirty lines)
    p.push_back(enc_i2(5'b11000, 1, 4));
    loop = p.size();
    p.push_back(enc_i1(5'b10000, 6, 1, 2));
    p.push_back(enc_i1(5'b10000, 5, 1, 2));
    p.push_back(enc_i1(5'b10000, 4, 1, 2));
    p.push_back(enc_i1(5'b10001, 5, 2, 2));
    p.push_back(enc_i1(5'b01000, 1, 1, 5'h1F));          // ADDI R1 -= 1
    p.push_back(enc_i2(5'b01101, 1, 2 * (loop - p.size() - 1)));  // BNEZ R1, loop
    p.push_back(enc_i2(5'b01100, 1, 2));                 // BEQZ taken, skips one
    p.push_back(enc_i2(5'b11000, 2, 8'h55));             // skipped
    p.push_back(enc_i2(5'b01110, 1, 2));                 // BLTZ not taken
    p.push_back(enc_i2(5'b01111, 1, 2));                 // BGEZ taken
    p.push_back(enc_i2(5'b11000, 2, 8'h44));             // skipped
    p.push_back(enc_j(5'b00110, 2));                     // JAL +2
    p.push_back(enc_i2(5'b11000, 2, 8'h33));             // skipped
    p.push_back(enc_j(5'b00100, 2));                     // J +2
    p.push_back(enc_i2(5'b11000, 2, 8'h22));             // skipped
    p.push_back(16'h1000);                               // SIIC as NOP
    p.push_back(16'h1800);                               // RTI as NOP
    for (int j = 0; j < 8; j++) p.push_back(enc_i1(5'b10000, 4, j, 2 * j - 8));
    p.push_back(HALT);
  endfunction

endpackage
