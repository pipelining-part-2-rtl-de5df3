# Two stalling pipelines: an addq-only processor and a five-stage Y86-64

A pipelined processor puts registers between the steps of executing an
instruction so that several instructions are in flight at once. A new
instruction can then start every cycle, and the cycle only has to be as long
as the slowest stage. The cost is that an instruction can reach the stage
where it reads its operands before an older instruction has written them. It
can also reach fetch before the processor knows where to fetch from.

This RTL contains two processors that deal with both problems in the simplest
way: they **stall**. The hardware holds some pipeline registers and fills
others with do-nothing values ("bubbles") until the needed value exists. There
is no forwarding and no branch prediction.

* `addq_pipe`: a four-stage pipeline (fetch, decode, execute, writeback) that
  executes only `addq rA, rB`. It is small enough to follow cycle by cycle.
* `y86_pipe`: a five-stage pipeline (fetch, decode, execute, memory,
  writeback) for the Y86-64 instruction set. It has condition codes, data
  memory, conditional jumps, call/ret and a Stat register.

`pipelining_top` puts the two side by side. They share only the clock and the
reset.

## Pipeline registers, stalls and bubbles

Every pipeline register is a `pipe_reg`. It has two controls:

| control  | effect at the clock edge                                        |
|----------|-----------------------------------------------------------------|
| none     | load what the earlier stage sends                               |
| `stall`  | keep the current value                                          |
| `bubble` | load the bubble value: icode NOP, register numbers 0xF, data 0  |

Register number 0xF (`REG_NONE`) means "no register". Reading it gives 0 and
writing it does nothing, so a bubble changes no state. Reset loads the bubble
value. Raising `stall` and `bubble` together is a controller bug, and an
assertion catches it.

Signal names follow one rule. An upper-case prefix is the register a stage
reads (`D_rA` is the fetch/decode register's `rA` field, seen by decode). A
lower-case prefix is the value a stage sends to the next register (`d_dstE` is
what decode sends).

The register file (`regfile`) writes at the end of the writeback cycle, and
decode reads it combinationally with no write-through. A value written in
cycle *n* is therefore first seen in cycle *n + 1*. Every stall rule below
follows from this one fact.

## The addq pipeline

| stage     | work                                     | register after it          |
|-----------|------------------------------------------|----------------------------|
| fetch     | read 2 bytes at PC, split into rA and rB; next PC = PC + 2 | fD: rA, rB |
| decode    | valA = R[rA], valB = R[rB], dstE = rB    | dE: valA, valB, dstE       |
| execute   | valE = valA + valB                       | eW: valE, dstE             |
| writeback | R[dstE] = valE                           | (register file)            |

The first byte of each instruction is ignored, because every instruction is
an addq.

**Stall rule (in fetch).** The instruction being fetched must not enter
decode while the instruction in decode or in execute still has to write one of
its sources. In that case `addq_stall` holds the PC and puts a bubble
(rA = rB = 0xF) into fD. An instruction in writeback needs no stall: its write
happens at the same edge that moves the fetched instruction into decode.

Worked example. At the start, R[i] = 100·i.

```
addq %r8, %r9      # R9 = 1700
addq %r9, %r8      # needs R9: two stall cycles
addq %r10, %r11
```

| cycle | PC   | D rA,rB | E valA, valB, dstE | W valE, dstE | stall |
|-------|------|---------|--------------------|--------------|-------|
| 0     | 0x0  | F,F     | –                  | –            | 0     |
| 1     | 0x2  | 8,9     | –                  | –            | 1     |
| 2     | 0x2  | F,F     | 800, 900, 9        | –            | 1     |
| 3     | 0x2  | F,F     | bubble             | 1700, 9      | 0     |
| 4     | 0x4  | 9,8     | bubble             | bubble       | 0     |
| 5     |      | 10,11   | 1700, 800, 8       | bubble       | 0     |
| 6     |      |         | 1000, 1100, 11     | 2500, 8      | 0     |

If the dependent instruction is two places behind its producer, it needs one
stall. If it is three or more places behind, it needs none. Independent
instructions complete one per cycle, with a latency of four cycles.

## The five-stage Y86-64 pipeline

| stage     | work |
|-----------|------|
| fetch     | picks the PC, reads 10 bytes, splits them into icode, ifun, rA, rB and valC, and computes valP from the instruction length |
| decode    | chooses srcA, srcB, dstE and dstM from icode, and reads the register file |
| execute   | runs the ALU (`y86_alu`), reads the condition codes (jXX, cmovXX) or writes them (OPq), and computes "taken" (`cnd`) |
| memory    | reads or writes the data memory (`data_mem`); icode decides which |
| writeback | writes R[dstE] and R[dstM], and copies the instruction's status into the Stat register |

icode travels through every pipeline register. Each stage decides locally
from its own copy. For example, the memory stage derives "is read?" and "is
write?" from `M_icode`.

`pushq rA` shows how an instruction is spread over the stages:

* decode reads valA = R[rA] and valB = R[%rsp], and sets dstE = %rsp;
* execute computes valE = valB − 8;
* memory writes M[valE] = valA;
* writeback writes R[%rsp] = valE.

### Choosing the PC

`F_predPC` holds the PC that fetch chose last cycle. It is used except in two
cases:

* a conditional jump is in the memory stage: use `M_cnd ? M_valC : M_valP`;
* a `ret` is in writeback: use `W_valM`, the return address it loaded.

Unconditional `jmp` and `call` set `F_predPC` to their target directly, so
they cost nothing.

### Control (`y86_pipe_ctrl`)

The rules are checked in priority order:

1. **Freeze.** The instruction in writeback has a status other than AOK (halt,
   bad address, bad instruction). Every pipeline register stalls and the
   processor stops with that instruction in writeback.
2. **Data hazard.** A decode source (not 0xF) equals dstE or dstM of the
   instruction in execute, memory or writeback. The PC and decode registers
   stall, and a bubble goes into execute.
3. **Fetch wait.** One of these is true:
   * a conditional jump is in decode or execute;
   * a `ret` is in decode, execute or memory;
   * an instruction with a non-AOK status is on its way.

   The PC register stalls and a bubble goes into decode.

Resulting costs:

| situation                                    | lost cycles |
|----------------------------------------------|-------------|
| operand written by the previous instruction  | 3           |
| … by the one before that                     | 2           |
| … three back                                 | 1           |
| conditional jump (taken or not)              | 2           |
| ret                                          | 3           |
| jmp, call                                    | 0           |

A `ret` placed directly after the `call` that reached it also waits for the
new `%rsp`: 3 data-stall cycles, then 3 fetch-wait cycles.

Without hazards, one instruction is fetched per cycle. An instruction is in
writeback four cycles after it is fetched.

### Stopping

Once an instruction with a non-AOK status has been fetched, fetch stops. That
instruction is `halt`, a fetch past the end of instruction memory (ADR), or an
unknown icode (INS). A bad data address in the memory stage gives ADR. Older
instructions finish normally.

Nothing younger than the faulting instruction may change state:

* the condition codes are not set while the memory or writeback instruction
  is faulting;
* memory is not written while the writeback instruction is faulting;
* the faulting instruction itself writes no register.

Stat takes the status code one cycle after the faulting instruction reaches
writeback: AOK = 0, HLT = 1, ADR = 2, INS = 3.

## What follows the source and what is this design's choice

From the lecture notes on pipelining:

* the stage structure and pipeline register contents of the addq pipeline;
* its fetch-side stall rule, checked against the printed cycle tables
  (PC, rA, rB, operand values, dstE and results, cycle by cycle);
* the stage assignment of the five-stage pipeline, including the pushq
  breakdown and icode carried through every register;
* fetch waiting on conditional jumps (outcome sent from execute through a
  register) and on ret (address used from writeback);
* the Stat register written in writeback.

This design's own choices:

* **The instruction set and encodings.** The standard Y86-64 set: halt, nop,
  rrmovq/cmovXX, irmovq, rmmovq, mrmovq, OPq (add, sub, and, xor), jXX, call,
  ret, pushq and popq. The same goes for the condition-code definitions and
  the status codes. The notes name the instructions and the icode/rA/rB
  nibble positions, but no full encoding.
* **No forwarding in the five-stage pipeline.** Decode stalls against
  execute, memory and writeback, as in the notes' decode-side stall variant.
  The notes' ret timing table has ret move to execute right after call, which
  ignores the `%rsp` dependence. Here that case costs three extra cycles.
* **How execution stops.** Fetch stops after a faulting instruction, the
  pipeline freezes on writeback status, and younger instructions are kept
  from changing state.
* **Memory organisation and sizes.** Separate instruction and data memories,
  as drawn in the notes. Instruction memory is 1024 bytes for addq and 4096
  for Y86-64; data memory is 4096 bytes. Data words are 8 bytes,
  little-endian, at any byte address.
* **Reset.** Reset is synchronous and active high. Condition codes reset to
  ZF = 1, SF = 0, OF = 0. Registers are not cleared.
* **Simulation ports.** Load ports for both memories, a register
  preload/debug port (usable while reset is held), and `obs_*` observation
  outputs.
* **No timing model.** The notes' path-delay numbers (such as a 200 ps stage
  against a 550 ps single cycle) describe the timing of a physical
  implementation. Nothing in this RTL models them.

## Files

| file | contents |
|------|----------|
| `rtl/y86_pkg.sv` | icodes, function codes, register and status codes, pipeline-register structs and their bubble values, branch-condition function |
| `rtl/pipe_reg.sv` | pipeline register with stall and bubble |
| `rtl/instr_mem.sv` | byte memory with a 10-byte combinational fetch window |
| `rtl/regfile.sv` | 15 × 64-bit registers, 2 read and 2 write ports |
| `rtl/addq_stall.sv`, `rtl/addq_pipe.sv` | addq-only pipeline |
| `rtl/data_mem.sv`, `rtl/y86_alu.sv`, `rtl/y86_pipe_ctrl.sv`, `rtl/y86_pipe.sv` | five-stage pipeline |
| `rtl/pipelining_top.sv` | both processors |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/y86_tb_util.svh` | assembler, random program generator and instruction-set reference model |

## Using and checking it

Programs and initial state are loaded while `rst` is high:

* instruction bytes through `imem_we/imem_addr/imem_data`;
* data bytes through `dmem_*`;
* registers through `reg_dbg_*`.

Lower `rst` to start. Cycle 0 is the first cycle after reset. The Y86-64
processor runs until `stat` leaves AOK. The addq processor runs forever;
fill unused memory with `0xFF` bytes, which decode as `addq` on register
0xF and do nothing.

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/y86_pkg.sv tb/y86_pipe_tb.sv --top-module y86_pipe_tb
./obj_dir/Vy86_pipe_tb
```

What the testbenches check:

* **`addq_pipe_tb`** compares three programs cycle by cycle with worked
  tables, then runs random programs. For those it compares the final
  registers with a sequential model, and the stall count and the cycle of the
  last write with an issue-time model.
* **`y86_pipe_tb`** checks the cycle cost of each hazard and of each way of
  stopping. It then runs 40 random programs (forward conditional jumps, calls,
  pushes and pops, loads and stores, cmov, every ALU function). For each it
  compares registers, condition codes, Stat and all of data memory with the
  instruction-set model in `y86_tb_util.svh`.
* **`pipelining_top_tb`** runs both processors at their default sizes. It
  counts every mechanism (addq stall, data stall, jump wait, ret wait, memory
  read and write, halt) and fails if one never happened.

To extend the Y86-64 processor with forwarding, give decode bypass paths from
`e_valE`, `m_valM`/`M_valE` and `W_valE`/`W_valM`. Then shrink the
data-hazard rule in `y86_pipe_ctrl` to the one case forwarding cannot cover: a
load in execute feeding decode. The testbenches compare architectural state
against the reference model, so they remain valid. Only the directed cycle
counts would change.
