# A five-stage pipelined LC2Kx processor

A multi-cycle processor spends several clock cycles on each instruction and
leaves most of its hardware idle in each of them. This design gets the cycles
per instruction (CPI) close to 1 without a longer clock period. It cuts
instruction execution into five stages, gives each stage its own datapath,
and places an edge-triggered **pipeline register** between neighbouring
stages. A new instruction enters every cycle, so up to five are in flight at
once, as cars move through the windows of a drive-through.

```
        IF/ID            ID/EX              EX/Mem             Mem/WB
 fetch ──┃── decode ───────┃── execute ────────┃── memory ─────────┃── writeback
 PC      ┃  reg file read  ┃  ALU (add/nand)   ┃  data memory      ┃  reg file write
 inst mem┃  sign extend    ┃  PC+1+offset      ┃  beq decision ──┐ ┃
 PC+1    ┃  dest select    ┃  eq?              ┃                 │ ┃
   ▲─────────────────────── branch target, "take branch" ────────┘
```

The machine is LC2Kx: 32-bit words, eight registers, and the instructions
add, nand, lw, sw, beq and noop. The design is deliberately the *first* version
of such a pipeline. It has no hazard detection, no forwarding and no branch
handling. The section "What the pipeline does not do" lists what software
must therefore respect. Read it before you write a program for it.

## Instruction format

| bits   | 24..22 | 21..19 | 18..16 | 15..0                  | 2..0          |
|--------|--------|--------|--------|------------------------|---------------|
| field  | opcode | regA   | regB   | offset (16-bit signed) | destReg       |

| opcode | mnemonic | effect                                      |
|--------|----------|---------------------------------------------|
| 000    | add      | destReg = regA + regB                       |
| 001    | nand     | destReg = ~(regA & regB)                    |
| 010    | lw       | regB = Mem[regA + offset]                   |
| 011    | sw       | Mem[regA + offset] = regB                   |
| 100    | beq      | if regA == regB: PC = PC + 1 + offset       |
| 111    | noop     | nothing                                     |
| 101, 110 | jalr, halt | not supported; they run as noops       |

`lc2k_pkg` provides `enc_r(op, a, b, dest)` and `enc_i(op, a, b, offset)` to
assemble instruction words, and the field-extraction functions the decoder
uses.

## The five stages and what each pipeline register carries

Each stage reads only the pipeline register before it and writes only the
one after it. The exceptions are the register-file write, which goes back
from writeback to decode, and the branch target, which goes back from
memory to fetch. Decoding is minimal: decode passes the opcode on, and each
later stage derives its own control signals from it.

| stage | module | work | register written |
|---|---|---|---|
| fetch | `fetch_stage`, `instr_mem` | Read the instruction at PC. PC ← PC+1, or the branch target when memory says so. | IF/ID = {PC+1, instruction} |
| decode | `decode_stage`, `reg_file` | Read regA and regB from the register file. Sign-extend the offset. Pick the destination register: bits 2..0 for add/nand, bits 18..16 otherwise. | ID/EX = {op, PC+1, valA, valB, offset, dest} |
| execute | `execute_stage`, `alu` | ALU input A is valA. Input B is valB for add/nand/beq and the offset for lw/sw. The ALU NANDs for nand and adds otherwise; eq? = (A == B). A second adder forms PC+1+offset. | EX/Mem = {op, target, eq?, ALU result, valB, dest} |
| memory | `memory_stage`, `data_mem` | lw reads and sw writes (data valB) at the ALU result. A beq with eq? set is taken: PC ← target at the next edge. | Mem/WB = {op, ALU result, mdata, dest} |
| writeback | `writeback_stage` | add/nand write the ALU result and lw writes mdata into dest. Other opcodes write nothing. | register file, at the edge ending the cycle |

All four pipeline registers are one type-parameterized module, `pipe_reg`,
each holding a packed struct from `lc2k_pkg` (`if_id_t`, `id_ex_t`,
`ex_mem_t`, `mem_wb_t`). The memory read data `mdata` is 0 for anything but
lw, because the data memory returns data only when a read is enabled.

## Timing

An instruction fetched at clock edge *n* is in IF/ID after edge *n*, in
ID/EX after *n+1*, in EX/Mem after *n+2* and in Mem/WB after *n+3*. Its
register write lands at edge *n+4*, and a store lands in data memory at
edge *n+3*, the edge that ends its memory cycle.
Both memories and the register file read combinationally. Every state
element changes only at the rising edge.

A worked example, starting from the reset state with R1..R7 = 36, 9, 12, 18,
7, 41, 22, Mem[29] = 99, and the program at address 0:

```
add 1 2 3 ; nand 4 5 6 ; lw 2 4 20 ; add 2 5 5 ; sw 3 7 10
```

| after edge | IF/ID | ID/EX | EX/Mem | Mem/WB | register / memory change |
|---|---|---|---|---|---|
| 1 | add, PC+1=1 | noop | noop | noop | |
| 2 | nand, 2 | add: 36, 9, off 3, dest 3 | noop | noop | |
| 3 | lw, 3 | nand: 18, 7, off 6, dest 6 | add: target 4, ALU 45 | noop | |
| 4 | add, 4 | lw: 9, 18, off 20, dest 4 | nand: target 8, ALU −3 | add: 45 → R3 | |
| 5 | sw, 5 | add: 9, 7, off 5, dest 5 | lw: target 23, ALU 29 | nand: −3 → R6 | R3 = 45 |
| 6 | noop | sw: 45, 22, off 10, dest 7 | add: target 9, ALU 16 | lw: mdata 99 → R4 | R6 = −3 |
| 7 | | noop | sw: target 15, ALU 55, valB 22 | add: 16 → R5 | R4 = 99 |
| 8 | | | noop | sw | R5 = 16, Mem[55] = 22 |

The five instructions finish in 9 cycles. The first completes four edges
after its fetch, and one more completes every cycle after that. The
end-to-end testbench checks every field of this table, cycle by cycle.

## What the pipeline does not do

The pipeline has no hardware for hazards.

* **Data hazards.** Registers are read in decode and written at the end of
  writeback, and the register file has no write-through. A later instruction
  sees the new value only if it is at least **four instructions** after the
  writer. A reader closer than that silently gets the old value. For example,
  `add 1 3 5` followed directly by `add 5 5 6` adds the *old* R5. Put noops
  or independent instructions in between.
* **Control hazards.** A beq is resolved in the memory stage. By then the
  three instructions after it have been fetched, and they are **not
  cancelled**: they always execute, whether or not the branch is taken. In
  effect beq has three delay slots. The target is computed relative to the
  beq's own PC+1.
* **Exceptions** are not handled. jalr and halt are not implemented. There
  is no way to stop the machine from inside a program; the `run` input stops
  it from outside.

## Interface of `lc2k_pipeline`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high. PC = 0, every pipeline register holds a noop with zero fields, all registers are 0. Memories keep their contents. |
| `run` | in | 1 | global enable. While low, PC, pipeline registers, register file and data memory hold. |
| `imem_load_we/addr/data` | in | 1/16/32 | writes one instruction word per cycle |
| `dmem_host_we/addr/wdata` | in | 1/16/32 | writes one data word per cycle; a pipeline store in the same cycle wins |
| `dmem_host_rdata` | out | 32 | data word at `dmem_host_addr`, combinational |
| `pc` | out | 32 | program counter |
| `if_id`, `id_ex`, `ex_mem`, `mem_wb` | out | struct | pipeline-register contents, for tracing |

To use it: hold `rst` high with `run` low, and load the program and data
through the two host ports. Then release `rst` and raise `run`. Memory
addresses use the low 16 bits of the PC or ALU result.

Parameters: `IMEM_WORDS` and `DMEM_WORDS` default to 65536, the LC2K memory
size. The register file has `NUM_REGS` = 8; R0 always reads 0 and ignores
writes.

## Files

| file | contents |
|---|---|
| `rtl/lc2k_pkg.sv` | word and register types, opcodes, pipeline-register structs, reset values, instruction field and assembly functions |
| `rtl/lc2k_pipeline.sv` | top level: the five stages, four pipeline registers, memories and register file |
| `rtl/fetch_stage.sv` | PC, +1 incrementer, PC mux |
| `rtl/instr_mem.sv` | instruction memory with load port |
| `rtl/pipe_reg.sv` | pipeline register (type parameter) |
| `rtl/reg_file.sv` | 8 × 32 register file, 2 read ports and 1 write port |
| `rtl/decode_stage.sv` | field split, sign extension, destination mux |
| `rtl/alu.sv` | add / nand / equality |
| `rtl/execute_stage.sv` | ALU input mux, ALU, branch-target adder |
| `rtl/data_mem.sv` | data memory with en and R/W controls, plus host port |
| `rtl/memory_stage.sv` | memory controls, branch decision |
| `rtl/writeback_stage.sv` | write-data mux and register write enable |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_lc2k_random.sv` | random programs against a reference model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To run the end-to-end test with the default
sizes:

```
verilator --binary --timing --assert -Irtl rtl/lc2k_pkg.sv tb/tb_lc2k_pipeline.sv \
          --top-module tb_lc2k_pipeline -o sim
./obj_dir/sim
```

Substitute any other `tb_<module>` the same way. The package must come
first on the command line; `-Irtl` lets verilator find the rest.

What the testbenches cover:

* `tb_lc2k_pipeline` runs the worked example above at full size, after a
  preamble of seven lw and three noops that loads the registers. It checks
  every pipeline-register field and register value at every step, with PCs
  shifted by the preamble's 10 words.
* It then runs a second program that exercises the rest of the design:
  * a taken beq, whose following instruction runs and whose skipped address
    does not;
  * a beq that is not taken;
  * a write to R0;
  * a read one instruction after a write, which returns the old value;
  * nand, sw and lw;
  * a three-cycle pause of `run` in mid-program.
* It counts each of these mechanisms and fails if one never happened.
* `tb_lc2k_random` runs six random 256-instruction programs for 400 cycles
  each, using 256-word memories. The programs use every opcode, with hazards
  and branches anywhere, including inside another branch's three following
  slots. The test then compares PC, registers and all of data memory with an
  instruction-level model. The model encodes the pipeline's rules rather
  than ideal sequential semantics:
  * a register write is seen four instructions later;
  * a taken beq redirects the fourth fetch after it;
  * after *C* cycles, the register writes of the first *C*−4 instructions
    and the stores of the first *C*−3 have landed.
* The unit testbenches drive their module with a few hundred random and
  corner-case inputs. They compare the outputs with values computed
  independently from the instruction bits or with a reference array.
* Each testbench fails against a deliberately broken copy of its module, for
  example a PC mux that ignores the branch or a register file that ignores
  its write enable.

## Design choices beyond the basic scheme

These are this implementation's own decisions, made where the pipeline
description leaves a detail open:

* **Word width and encoding.** The opcode, regB and destReg positions are
  the ones the datapath labels. The 32-bit word, the regA position, the
  16-bit offset and the opcode values are standard LC2K.
* **Destination selection in decode.** The destination mux sits in decode,
  and a single `dest` field travels down the pipe. Carrying both specifiers
  to writeback and choosing there would behave identically.
* **eq? from the ALU's inputs.** For beq the ALU's second input is valB, so
  eq? is exactly regA == regB.
* **Host ports, `run` and reset.** The host load ports, the `run` enable and
  the synchronous reset exist so that the machine can be loaded, started and
  paused. They are not part of the datapath proper.
* **Memory sizes** (65536 words each) are assumed.
* **R0 hard-wired to zero.** Plain LC2K only keeps R0 at zero by software
  convention; here the hardware enforces it.
* **No squashing after a branch.** This follows from the absence of any
  control-hazard mechanism, not from a separate decision.

Not included: the single-cycle and multi-cycle LC2Kx datapaths that this
pipeline improves on.
