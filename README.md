# WISC-SP22: a five-stage pipelined 16-bit processor with two-way caches

WISC-SP22 is a small 16-bit load/store architecture in the spirit of the MIPS
R2000. It has eight general registers, fixed 16-bit instructions and a
byte-addressed, big-endian, word-aligned memory. Instruction and data
memories are separate (Harvard). This repository implements:

- the classic five-stage in-order pipeline (IF, ID, EX, MEM, WB), with
  register-file bypassing, two forwarding paths, a load-use interlock and
  branches predicted not taken;
- a two-way set-associative, write-back cache on each side, in front of a
  banked main memory that takes several cycles to answer;
- the simpler memories used while bringing the processor up: a single-cycle
  memory, an aligned single-cycle memory that flags odd addresses, and a
  stalling memory whose readiness follows a pseudo-random pattern.

A single parameter of the top level, `MEM_KIND`, picks the memory model. The
default is the cache configuration.

## Instruction set in brief

| format | bits | used by |
|---|---|---|
| J | `op[15:11] disp[10:0]` | J, JAL |
| I-format 1 | `op Rs[10:8] Rd[7:5] imm[4:0]` | ADDI SUBI XORI ANDNI ROLI SLLI RORI SRLI ST LD STU |
| I-format 2 | `op Rs[10:8] imm[7:0]` | LBI SLBI BEQZ BNEZ BLTZ BGEZ JR JALR |
| R | `op Rs[10:8] Rt[7:5] Rd[4:2] ext[1:0]` | ADD SUB XOR ANDN ROL SLL ROR SRL SEQ SLT SLE SCO BTR |

Points that are easy to get wrong:

- SUB and SUBI compute *other operand minus Rs*: `Rt - Rs` and `imm - Rs`.
- Arithmetic immediates and branch offsets are sign-extended. XORI and ANDNI
  immediates are zero-extended, and so is SLBI's. Shift amounts are the low
  four bits.
- Branch and J/JAL targets are `PC + 2 + offset`. JR and JALR jump to
  `Rs + imm`. JAL and JALR write `PC + 2` into R7.
- ST and STU store the register in bits [7:5], and STU also writes the
  effective address back into Rs. LBI and SLBI write Rs.
- R0 is an ordinary register.
- HALT retires normally. Nothing after it executes, and the PC is left at
  the address after the HALT.
- SIIC and RTI execute as NOPs by default. With the optional exception
  support turned on (`EXCEPTIONS = 1`), SIIC saves `PC + 2` in an internal
  EPC register and jumps to the handler at 0x0002, and RTI jumps back to
  EPC. Address 0x0000 must then hold a jump to the main program.

The opcode values are in `rtl/wisc_pkg.sv` (`opcode_e`).

## The pipeline (`proc`)

```
  IF ──► IF/ID ──► ID ──► ID/EX ──► EX ──► EX/MEM ──► MEM ──► MEM/WB ──► WB
  PC      inst     decoder          ALU      result      data       wdata    register
  i-mem            regfile          shifter  store data  memory              file write
                   hazard unit      branch/target adder
```

**Operand sources in EX.** Each EX operand comes from one of three places:

- the value read in ID;
- the EX/MEM register, i.e. the result of the instruction now in MEM
  (EX→EX forwarding);
- the MEM/WB register, i.e. the value the instruction now in WB is writing,
  including load data (MEM→EX forwarding).

The youngest producer wins. An instruction in ID that reads a register being
written by WB in the same cycle gets the new value from the register file's
bypass. This means a consumer never waits for a non-load producer.

**Load-use interlock.** Suppose the instruction in ID reads the destination
of a load that is in EX. Then IF/ID holds for one cycle and a bubble enters
EX. The loaded value then reaches the consumer through MEM→EX forwarding.

**Branches and jumps.** Branches are predicted not taken: fetch simply
continues in sequence. Branches and jumps resolve in EX. The condition tests
the forwarded Rs. One adder forms the target from either PC+2 or Rs, plus the
immediate. A taken branch, or any jump, redirects the PC and squashes the two
younger instructions in IF/ID and ID/EX, so it costs two cycles. No stage has
more than one adder, shifter, register file or memory in series.

**Memory stalls.** Both memory ports use the request/Done protocol described
below.

- Instruction side: if no word arrives, a bubble goes into ID. A request
  stays in flight until it is Done, even when a redirect overtakes it; the
  word that then arrives is dropped.
- Data side: while the MEM stage waits, IF through MEM hold and a bubble
  goes into WB.
- Forwarded operands during a data stall: the instruction in WB retires
  while EX is still waiting. The operands EX has already forwarded are
  therefore copied into ID/EX each stalled cycle, so the waiting instruction
  keeps them.

**HALT and errors.** Once a HALT is decoded, fetching stops. The processor
halts when the HALT reaches WB, and `createdump` pulses for that one cycle.
A misaligned access reported by a memory (`err`) turns the faulting
instruction into a halt. For a data access, the younger instructions are
squashed and nothing is stored.

**Timing with single-cycle memory.** A program that executes *N* instructions
including the HALT, with *L* load-use stalls and *T* taken branches/jumps,
halts after

    cycles = (N − 1) + 5 + L + 2·T

The `perf` counters report each of these terms. Two testbenches check this
formula.

**Exceptions (optional).** With `EXCEPTIONS = 1`, SIIC and RTI are handled in
EX like jumps. SIIC writes EPC and redirects to 0x0002, RTI redirects to
EPC, and both squash the two younger instructions. With `EXCEPTIONS = 0`
they pass through the pipeline as NOPs.

## Memory request protocol

The pipeline and the stalling and cache memories share one request
interface:

| signal | dir (memory side) | meaning |
|---|---|---|
| `Addr[15:0]`, `DataIn[15:0]` | in | byte address and write data |
| `Rd`, `Wr` | in | one request at a time |
| `DataOut[15:0]` | out | read data, valid in the cycle `Done` is high |
| `Done` | out | the request completes in this cycle |
| `Stall` | out | the memory is busy with the request |
| `CacheHit` | out | `Done` came from a cache hit |
| `err` | out | odd address; nothing is accessed |

The requester must hold `Rd`/`Wr`, `Addr` and `DataIn` unchanged until `Done`
or `err`. The cache asserts this rule. With the single-cycle memories, the top
level sets `Done` to the request itself.

## The cache (`mem_system`, `cache_way`, `banked_mem`)

**Geometry.** Each cache has two ways (`cache_way`). Each way holds 256 sets
of 4-word (8-byte) lines, so one cache holds 4 KiB. A 16-bit address splits
into:

- tag: bits 15..11;
- set index: bits 10..3;
- word within the line: bits 2..1;
- bit 0, which must be zero.

**Policy.** The cache is write-back and write-allocate.

- **Hit:** `Done` and `CacheHit` in the request cycle. Read data comes out
  combinationally; a write updates the word and marks the line dirty.
- **Miss:** the controller first picks a victim way:
  - an invalid way if there is one (way 0 if both are invalid);
  - otherwise the way named by a victim bit that toggles on every accepted
    access.

  This keeps replacement deterministic. Then:
  1. `WB` state, dirty victim only: its four words are written to main memory.
  2. `FILL` state: the four words of the new line are requested from the four
     banks, written into the way as they return, and the tag is installed.
  3. `DONE` state: the original access completes from the cache, with `Done`
     high and `CacheHit` low.

  `Stall` is high during `WB` and `FILL`. A clean miss takes 8 cycles from
  request to `Done`. A miss with a dirty victim takes longer, because it
  waits for bank occupancy.

**Main memory (`banked_mem`).** This is 64 KiB in four word-interleaved banks
(bank = `Addr[2:1]`), so the four words of a line sit in different banks.

- An access is accepted only when its bank is idle; otherwise `stall`.
- An accepted access keeps its bank busy for 4 cycles.
- Read data appears 2 cycles after acceptance, flagged by `rvalid`.
- Bank count, latency and occupancy are parameters (`BANKS`, `LATENCY`,
  `BUSY`).

## The simpler memories

- **`memory2c`:** 64 KiB of bytes, read as 16-bit big-endian words.
  - Unaligned accesses are allowed.
  - Reads are flow-through: `data_out` follows `addr` in the same cycle.
  - Writes happen at the clock edge.
  - `data_out` is 0 unless reading.
- **`memory2c_align`:** wraps `memory2c`. It raises `err` on an odd address
  while enabled. A misaligned read still returns the aligned word, and a
  misaligned write stores nothing.
- **`stallmem`:** a `memory2c` behind the request protocol.
  - A 32-bit pattern register (`SEED`, must be non-zero) rotates every cycle.
  - A request completes in the first cycle where bit 0 of the pattern is 1.
  - Until then it sees `Stall`.

Every memory model has a load port (`load_we`, `load_addr`, `load_data`) that
writes one 16-bit word per cycle. The top level drives it into both the
instruction and the data memory, so both start with the same image. This
should be done while `rst` is high. Memory arrays are not reset: load every
location the program reads.

## Top level (`wisc_sp22`)

| port | meaning |
|---|---|
| `clk`, `rst` | clock; synchronous active-high reset (PC = 0) |
| `load_we`, `load_addr`, `load_data` | program/data image load |
| `halt` | stays high once the processor has halted |
| `createdump` | one-cycle pulse when the HALT retires |
| `pc` | current fetch PC |
| `st_valid`, `st_addr`, `st_data` | a data write completes this cycle |
| `perf` | cycles, retired instructions, load-use stalls, data-stall and fetch-bubble cycles, redirects, forwarding and bypass counts |
| `i_access`, `i_hit`, `d_access`, `d_hit` | completed memory accesses and cache hits per side |

Parameters:

- `MEM_KIND`: one of `MEM_PERFECT`, `MEM_ALIGNED`, `MEM_STALL` or
  `MEM_CACHE` (the default).
- `EXCEPTIONS`: 1 turns on the SIIC/RTI exception support (default 0).
- `I_SEED`, `D_SEED`: seeds of the two stalling memories.

## Choices this implementation makes

The specification covers the ISA, the pipeline organisation, the forwarding
paths and the interfaces of the memories. It leaves the following open, and
they are decided here:

- **Cache details:** line size, number of sets, victim rule, controller
  states, write policy. The specification asks only for a two-way
  set-associative cache with deterministic replacement.
- **Main memory:** bank count, read latency and bank occupancy.
- **Stalling memory:** the rotation of its ready pattern, and one-cycle
  completion once it is ready.
- **Where branches resolve:** in EX, giving a two-cycle penalty. The
  load-use stall is one cycle.
- **Misaligned accesses:** the stalling memory and the cache report `err` on
  an odd address, like the aligned memory.
- **JALR link value:** `PC + 2`, as in the instruction table. One sentence
  of prose describes it as "the address of the JALR instruction plus one".
- **Loading and dumping:** programs come in through a load port, not from a
  file. `createdump` is only an output pulse (and a counter in `memory2c`);
  no dump file is written.

The specification also offers some optional features. Of these, only
exceptions are built, behind the `EXCEPTIONS` parameter. These are **not**
built:

- branch decisions in decode, extra forwarding paths, LRU replacement,
  critical-word-first fills and dynamic branch prediction;
- synthesis of the design for the course's standard-cell flow.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`wisc_iss_pkg`:** an instruction-set simulator written directly from the
  ISA, plus an assembler and a random-program generator. The random programs
  are always terminating: forward branches and jumps only, loads and stores
  around three base registers that map to the same cache set, and load-use
  pairs.
- **`tb_proc`:** the pipeline with testbench memories of random delay (0–3
  cycles), 60 random programs. Data writes, PC after HALT and retired-count
  must match the simulator, and the cycle formula above must hold.
- **`tb_wisc_sp22`:** the top in all four memory configurations side by side
  on a directed program, 150 random programs and a misaligned-access program.
  It also counts each mechanism and requires each to occur: both forwarding
  paths, bypass, load-use stall, squash, instruction/data stalls, cache
  hits/misses/dirty write-backs and error halt. A fifth copy built with
  `EXCEPTIONS = 1` runs the same programs, except the directed one. It also
  runs a program that raises SIIC five times and is checked against the
  simulator in its exception mode. All five traps must reach the handler.
- **`tb_wisc_sp22_full`:** the top with default parameters (caches), directed
  plus 20 random programs of 200 instructions. It prints the CPI and hit
  counts.
- **Unit tests:** `tb_regfile`, `tb_shifter`, `tb_alu`, `tb_decoder`,
  `tb_hazard_unit`, `tb_memory2c`, `tb_memory2c_align`, `tb_stallmem`,
  `tb_banked_mem`, `tb_cache_way` and `tb_mem_system`. The last two use
  `mem_req_driver` (random requests held until `Done`, checked against a
  reference).

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/wisc_pkg.sv tb/wisc_iss_pkg.sv tb/tb_wisc_sp22.sv --top-module tb_wisc_sp22
./obj_dir/Vtb_wisc_sp22
```

Other testbenches work the same way; leave out `tb/wisc_iss_pkg.sv` for
those that do not import it. All testbenches finish in seconds.

## Files

- `rtl/wisc_pkg.sv`: opcodes, control bundle, ALU/shift/branch enums, counters
- `rtl/proc.sv`: the pipeline
- `rtl/decoder.sv`, `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/shifter.sv`,
  `rtl/hazard_unit.sv`: its parts
- `rtl/memory2c.sv`, `rtl/memory2c_align.sv`, `rtl/stallmem.sv`: bring-up
  memories
- `rtl/mem_system.sv`, `rtl/cache_way.sv`, `rtl/banked_mem.sv`: cache and
  main memory
- `rtl/wisc_sp22.sv`: top level
- `tb/`: testbenches, the reference simulator package and the request
  driver
