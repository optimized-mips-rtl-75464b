# Pipelined MIPS with forwarding and BTFN branch prediction

This is a small 32-bit MIPS processor. It takes a multicycle MIPS core, which needs up to five
cycles for each instruction, and turns it into the classic five-stage pipeline
(IF, ID, EX, MEM, WB). Ideally one instruction then finishes every cycle. The pipeline
introduces three kinds of hazard, and each has its own remedy:

| hazard | remedy in this design |
|---|---|
| structural: fetch and data access in the same cycle | separate instruction and data memories (Harvard organisation) |
| data: an instruction needs a result that is still in the pipe | forwarding from EX/MEM and MEM/WB to the ALU inputs, a one-cycle load interlock, and a register file that is written in the first half of the cycle and read in the second |
| control: fetch must continue before a branch is decided | static Backward-Taken / Forward-Not-taken (BTFN) prediction in the fetch stage; branches are checked in MEM |

Architectural state is 32 general-purpose registers of 32 bits, with `$0` always zero, and
a 32-bit PC. Instructions are fetched as whole 32-bit words in a single cycle. Data is
accessed one byte at a time.

A reference benchmark is a Fibonacci loop: 10 iterations of `add/sub/addi/bne`, then an `sb`.
This RTL finishes it in **51 cycles**, or 75 cycles with prediction disabled. Both numbers are
the cycle counts the design was specified to reach.

## Instruction set

Encodings are standard MIPS32: R-type `op rs rt rd shamt funct`, I-type `op rs rt imm16` and
J-type `op index26`.

| instruction | operation | op | funct |
|---|---|---|---|
| `add rd, rs, rt` | rd = rs + rt | 000000 | 100000 |
| `sub rd, rs, rt` | rd = rs - rt | 000000 | 100010 |
| `and rd, rs, rt` | rd = rs & rt | 000000 | 100100 |
| `or  rd, rs, rt` | rd = rs \| rt | 000000 | 100101 |
| `slt rd, rs, rt` | rd = (rs < rt, signed) ? 1 : 0 | 000000 | 101010 |
| `addi rt, rs, imm` | rt = rs + sext(imm) | 001000 | |
| `beq rs, rt, off` | if rs == rt: PC = PC+4 + 4*sext(off) | 000100 | |
| `bne rs, rt, off` | if rs != rt: PC = PC+4 + 4*sext(off) | 000101 | |
| `j index` | PC = {PC+4[31:28], index, 00} | 000010 | |
| `lb rt, imm(rs)` | rt = sext(mem[rs + sext(imm)]) | 100000 | |
| `sb rt, imm(rs)` | mem[rs + sext(imm)] = rt[7:0] | 101000 | |

No other instructions are supported. Any other opcode executes as a no-op. The all-zero word
is `add $0,$0,$0`, which is also a no-op, and the pipeline uses it as its bubble.

## The pipeline

```
 IF              ID                    EX                        MEM                 WB
 PC ─► imem      decoder               fwd muxes ─► ALU          dmem (lb/sb)        result mux
 +4, BTFN        regfile read          comparators = =0 <0       branch check         regfile write
   │   IF/ID ──►    │      ID/EX ──►          │      EX/MEM ──►      │     MEM/WB ──►  (falling edge)
```

Each pipeline register is a set of flip-flops. Its contents are defined as packed structs in
`mips_pkg`:

| register | contents |
|---|---|
| IF/ID | valid, PC, NPC (= PC+4), IR, prediction bit |
| ID/EX | the above, plus the control word, rs value, rt value, formatted immediate, rs/rt/destination numbers |
| EX/MEM | valid, PC, NPC, IR, prediction bit, control word, ALU result, store data (rt), flags E/Z/N, destination |
| MEM/WB | valid, PC, IR, register-write and write-back-select bits, ALU result, loaded byte, destination |

Each pipeline register can be held, to stall, or cleared to all zeros. A cleared register
holds a bubble, because zero control bits write nothing.

Per stage:

- **IF.** The PC addresses the instruction memory, and the word comes back in the same cycle.
  An adder forms NPC = PC+4. The BTFN predictor decodes the fetched word to pick the next PC
  (see below).
- **ID.** The fields sit at fixed positions, so decoding and the register-file read happen in
  parallel. The decoder produces:
  - the control word;
  - the destination register: `rd` for R-type, `rt` for `addi`/`lb`, none otherwise;
  - the immediate, sign-extended, and also shifted left by two for branches.

  The hazard unit checks for a load-use hazard here.
- **EX.** Each ALU operand comes from the register value read in ID, the EX/MEM ALU result or
  the MEM/WB result. The ALU computes one of three things:
  - an arithmetic result;
  - an address, `rs + imm`;
  - a branch target, `NPC + imm*4`, with NPC switched onto the A input.

  In parallel, three comparators produce E (A == B), Z (A == 0) and N (A < 0). Only E is used
  by the present instruction set. Z and N are carried along but unused.
- **MEM.** `lb` reads and `sb` writes the byte at the ALU address. Branches are decided here.
- **WB.** The register file is written on the *falling* clock edge. An instruction in ID
  therefore reads, in the same cycle, the value that the instruction in WB is writing. So a
  producer three instructions ahead never needs forwarding.

## Data hazards: forwarding and the load interlock

The forwarding unit compares the destination of the instructions in EX/MEM and MEM/WB with
the two sources of the instruction in EX. It redirects the matching operand:

- EX/MEM wins over MEM/WB, because its result is younger.
- `$0` is never forwarded.
- A load in EX/MEM is never forwarded, because its byte does not exist until the end of MEM.

Operand B (`rt`) is forwarded for every instruction that reads `rt`: R-type, the `sb` store
data and the `beq`/`bne` comparison.

The load-use case cannot be covered by forwarding. Suppose the instruction in ID/EX is a load,
and the instruction in IF/ID reads the load's destination as rs or rt. The hazard unit then
raises `stall` for one cycle:

- PC and IF/ID keep their contents;
- ID/EX receives a bubble.

One cycle later the load is in MEM/WB, and its byte is forwarded from there. A load followed
by three users therefore completes as follows:

```
cycle        1   2   3     4     5   6   7   8   9
lb  $1       IF  ID  EX    MEM   WB
sub $4,$1,.      IF  ID    stall EX  MEM WB
and $6,$1,.          IF    stall ID  EX  MEM WB
or  $8,$1,.                stall IF  ID  EX  MEM WB
```

An assertion in `mips_pipeline` checks that a load's consumer is never in EX while the load is
in MEM.

## Control flow: prediction in fetch, completion in MEM

The hardest part of the timing is here.

- **Prediction.** The fetched word is available in IF, so the predictor decodes its opcode and
  offset in the same cycle.
  - A `beq`/`bne` with a negative offset is a backward branch, typically a loop. It is
    predicted taken, and the next fetch address is `NPC + 4*off`, from a small adder in IF.
  - A forward branch is predicted not taken.
  - A `j` is always redirected in IF. It never costs a cycle and is never checked again.

  The prediction bit travels with the branch.
- **Completion.** The branch condition is computed in EX and stored in EX/MEM. In MEM it is
  compared with the prediction. On a mismatch:
  - the PC is loaded with the target (the EX/MEM ALU result) or with the branch's own NPC;
  - IF/ID, ID/EX and EX/MEM are cleared.

  The three younger instructions are discarded before any of them writes a register or memory,
  because stores happen only in MEM.
- **Cost.** A correctly predicted branch, taken or not, costs nothing. A misprediction costs
  3 cycles.

For a loop of `n` iterations, BTFN mispredicts once, at the exit: an accuracy of `(n-1)/n`.

### Cycle counts on the Fibonacci loop

```
      addi $3,$0,10 ; addi $4,$0,1 ; addi $5,$0,-1
loop: add $4,$4,$5 ; sub $5,$4,$5 ; addi $3,$3,-1 ; bne $3,$0,loop
      sb $4,255($0)              # stores 34
```

Counted from the first fetch (cycle 1) to the cycle in which `sb` is in WB:

| configuration | parameters | this RTL | specified |
|---|---|---|---|
| forwarding + BTFN (default) | `FORWARDING=1, BTFN=1` | 51 = 44 instructions + 4 fill + 3 (one exit misprediction) | 51 |
| forwarding, no prediction | `FORWARDING=1, BTFN=0` | 75 = 48 + 9 taken branches × 3 | 75 |
| no forwarding, no prediction | `FORWARDING=0, BTFN=0` | 117 = 75 + 21 back-to-back dependences × 2 stall cycles | 109 |

The first two rows match exactly. The third configuration exists only for comparison. Its
interlock is this design's own: it stalls a consumer until the producer reaches WB. The 8-cycle
gap to the specified 109 means the original comparison pipeline hid some of those stalls in a
way that is not known here.

## Using the processor

The top module is `optimized_mips`:

| port | dir | width | purpose |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset of PC, pipeline, registers and data memory |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, log2(IMEM_WORDS), 32 | write an instruction word; use while `rst` is high |
| `dbg_reg_addr` → `dbg_reg_data` | in → out | 5 → 32 | read a register at any time |
| `dbg_mem_addr` → `dbg_mem_data` | in → out | 32 → 8 | read a data byte at any time |
| `retire_valid`, `retire_pc`, `retire_ir`, `retire_we`, `retire_dst`, `retire_data` | out | | the instruction in WB and its register write |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 32, 8 | the store in MEM this cycle |
| `ev_stall`, `ev_fwd_exmem`, `ev_fwd_memwb`, `ev_pred_taken`, `ev_jump`, `ev_mispredict` | out | 1 each | one-cycle pulses when a mechanism acts |

| parameter | default | meaning |
|---|---|---|
| `FORWARDING` | 1 | 0 removes forwarding; the interlock then covers every dependence |
| `BTFN` | 1 | 0 predicts every branch not taken |
| `IMEM_WORDS` | 256 | instruction memory size in words (addresses wrap) |
| `DMEM_BYTES` | 1024 | data memory size in bytes (addresses wrap) |

To run a program:

1. Hold `rst` high and write the program words from address 0.
2. Release `rst`. Fetch starts at address 0 in the next cycle.

There is no halt instruction. End a program with a jump to itself (`j .`).

## Files

| file | content |
|---|---|
| `rtl/mips_pkg.sv` | encodings, ALU codes, control word and pipeline-register structs |
| `rtl/optimized_mips.sv` | top: core plus both memories |
| `rtl/mips_pipeline.sv` | the core: PC, next-PC selection, stage wiring, forwarding muxes, flush logic |
| `rtl/pipe_reg.sv` | pipeline register with hold and clear |
| `rtl/decoder.sv` | control word, immediate formatting, destination selection |
| `rtl/regfile.sv` | 32 × 32 register file, falling-edge write |
| `rtl/alu_control.sv`, `rtl/alu.sv` | aluop/funct → operation; AND, OR, ADD, SUB, SLT |
| `rtl/branch_cond.sv` | E, Z, N comparators |
| `rtl/forwarding_unit.sv`, `rtl/hazard_unit.sv` | operand-source selection; load interlock |
| `rtl/btfn_predictor.sv` | fetch-stage prediction and jump redirect |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | asynchronous-read word memory; byte memory |
| `tb/mips_tb_pkg.sv` | assembler functions and an instruction-level reference model |
| `tb/tb_*.sv` | one self-checking test bench per module, plus `tb_fig18_cycles` (the three configurations above) |

## Simulation

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mips_pkg.sv tb/mips_tb_pkg.sv \
          tb/tb_optimized_mips.sv --top-module tb_optimized_mips -Mdir obj
./obj/Vtb_optimized_mips
```

Any other test bench builds the same way. Each test bench prints
`TB_RESULT checks=N failures=M` and stops.

`tb_optimized_mips` runs the full-size design (default parameters) on several programs:

- an all-instruction functionality program;
- the Fibonacci loop in both its forward-exit and backward-loop forms;
- a load-use program;
- 30 random programs that use registers densely, with loads, stores, forward branches and
  jumps;
- 20 random programs built around a counted backward loop, which exercise BTFN under data
  hazards.

`tb_fig18_cycles` first checks that the assembled Fibonacci loop matches its published
machine-code words. It then runs the loop on the three configurations above.

Every retiring instruction is compared with the reference model: its PC, its word, its
register write and its store. At the end, all registers and all data bytes are compared. The
bench also checks the 51-cycle count, and that every mechanism (stall, both forwarding paths,
predicted-taken branch, jump, misprediction) occurred.

`tb_mips_pipeline` checks exact per-instruction completion cycles on short programs.

## Design choices and departures

The following are this implementation's own decisions where the specification was silent or
inconsistent:

- **Prediction in IF and `j` handled in IF.** The scheme (BTFN) was given, but not the stage
  that applies it. Predicting in IF is the choice that yields the specified 51 cycles.
- **Branches decided in MEM.** The condition is computed in EX, and the PC is corrected in MEM.
  An alternative that was mentioned, a comparator in ID with a 1-cycle penalty, was not
  adopted: the specified cycle counts require the 3-cycle penalty.
- **Forwarding and interlock on `rt`.** The forwarding and interlock tables covered `rt` only
  for register-register consumers. Here they also cover `sb` and `beq`/`bne`, which read `rt`
  in this instruction set. Without this, those instructions would read stale values.
- **`bne`.** It is included because the benchmark uses it.
- **`lb`** sign-extends, as in MIPS32.
- **Own additions.** Memory sizes, reset behaviour, the program-load port, the debug ports and
  the retire/event outputs are additions for usability and testing.
- **Behavioural adder.** The ALU adder is a plain `+`. Faster adders (Kogge-Stone, Han-Carlson,
  Ling, carry-lookahead) were considered only as a transistor-level delay study, without one
  being chosen, so none is modelled.
- **Lint warnings.** The remaining warnings are unused bits: the high address bits above the
  memory sizes, and the Z/N flags.

Not included: the original multicycle core (byte-serial fetch, unified memory), which is only
the starting point. Also not included are the power, area and timing figures of the
synthesized chip, which RTL cannot reproduce.
