# Functional blocks of a dual-issue 32-bit RISC-V pipeline

This is synthesizable SystemVerilog for the core functional blocks of a
five-stage (IF, ID, EX, MEM, WB) superscalar RISC-V processor that fetches two
instructions per cycle and issues one or two of them depending on register
dependencies. The blocks are:

| Module          | Stage | What it is |
|-----------------|-------|------------|
| `pc_unit`       | IF    | program counter: PC+8, PC+4 after a rollback, or a branch/interrupt target |
| `icache`        | IF    | instruction cache returning the instructions at PC and PC+4 |
| `iiu`           | ID    | instruction issuing unit: dependency check, hold register, rollback, Pipe 1 / Pipe 2 |
| `int_alu`       | EX    | 32-bit combinational ALU, 16 operations, 5 flags |
| `dcache`        | MEM   | 256 x 32-bit data cache, synchronous read and write |
| `int_regfile`   | WB    | 32 x 32-bit integer register file |
| `rv_fblocks_top`| all   | the blocks above joined by pipeline registers, with two ALU lanes |
| `rv_pkg`        | -     | shared opcode enum, flag positions, RV32I field decoding |

It does not contain a whole processor. The opcode logic, operand logic,
forwarding unit, branch predictor, floating-point unit and floating-point
register file of the pipeline are not included. Their signals are ports of
`rv_fblocks_top`, so the blocks can be driven and checked as they would be
inside the full pipeline.

## Dual issue: how the issuing unit and the PC work together

This is the part that takes the most care to follow.

Each cycle the instruction cache presents **Instruction 1** (at PC) and
**Instruction 2** (at PC+4). The issuing unit decides whether both can enter
the two execution pipes in the same cycle:

* **Independent pair:** Pipe 1 gets Instruction 1 and Pipe 2 gets Instruction 2.
  `rollback` stays low and the next PC is PC+8.
* **Dependent pair:** Instruction 2 reads a register that Instruction 1 writes
  (read after write), or both write the same register (write after write).
  x0 never counts. Pipe 1 gets Instruction 1 and Pipe 2 gets the all-zero word,
  which marks an empty slot. Instruction 2 is copied into the **hold register**
  and `rollback` is raised. The next PC is then PC+4, not PC+8.
* **Cycle after a rollback:** the fetch now starts at the held instruction.
  Pipe 1 takes the copy from the hold register. The new Instruction 2 is
  checked against that held instruction in the same way, so a chain of
  dependent instructions issues one per cycle.

Example, with B depending on A and C independent of B:

```
cycle  PC    instr1 instr2  held  rollback   Pipe1 / Pipe2 after the clock
  0    0x00    A      B      -       1         A / 0
  1    0x04    B      C      B       0         B / C
  2    0x0c    D      E      -       ...
```

`rollback` is combinational: it reaches `pc_unit` in the same cycle.
Pipe 1 and Pipe 2 are registers, so `inst_1` and `inst_2` appear one clock
after the fetch. A redirect (`redirect`/`redirect_pc`, the branch or interrupt
target) has priority over rollback and also clears the hold register
(`flush` on `iiu`). Instructions are decoded as RV32I: rd is bits 11:7, rs1
bits 19:15, rs2 bits 24:20. The opcode decides which of these fields are
really used.

The multiplexers follow the block diagram of the issuing unit:

* a three-input multiplexer (Instruction 1, Instruction 2, zero) in front of
  the hold register and another in front of Pipe 2;
* a two-input multiplexer (Instruction 1, held instruction) in front of
  Pipe 1.

The automatic control never steers Instruction 1 into Pipe 2 or into the hold
register. Those inputs are kept only because the diagram draws them.

The original description says only this much: the unit compares the operands
of the two instructions, holds the second one on a dependency and raises
rollback "to alter the next-PC value". The following are this design's own
choices:

* the exact dependency rule (RAW plus WAW);
* PC+4 as the altered next PC;
* the flush on redirect.

## Integer ALU

`int_alu` is purely combinational. Its ports are `operand_a`, `operand_b`,
a 4-bit `opcode`, an active-high `reset`, `result` and `flags[4:0]`.

| opcode | operation | opcode | operation |
|--------|-----------|--------|-----------|
| 0000 | A + B   | 1000 | ~(A \| B) |
| 0001 | A - B   | 1001 | A ^ B     |
| 0010 | A + 1   | 1010 | ~(A ^ B)  |
| 0011 | A - 1   | 1011 | A >> 1 (logical) |
| 0100 | ~A      | 1100 | A << 1    |
| 0101 | A & B   | 1101 | A > B ? 1 : 0 |
| 0110 | A \| B  | 1110 | A < B ? 1 : 0 |
| 0111 | ~(A & B)| 1111 | A == B ? 1 : 0 |

Flags:

| bit | meaning |
|-----|---------|
| 0 | carry out of add/increment, or borrow of subtract/decrement |
| 1 | even parity of the result |
| 2 | result is zero |
| 3 | sign (result bit 31) |
| 4 | signed overflow of add, subtract, increment or decrement |

The opcode table is the original one. The original names no flags. The
meanings of bits 1, 2 and 3 are worked out from the reference results.
For example, with A = 0x23 and B = 0x28:

* OR gives 0x2b with flags 0x02.
* NOR gives 0xffffffd4 with flags 0x0a.
* A > B gives 0 with flags 0x06.

Bits 0 and 4 are never set in those results. The carry/borrow and overflow
meanings given to them are this design's choice. Other choices of this
design:

* Shifts always move by one bit and ignore B. The reference results show
  0x23 becoming 0x11 and 0x46.
* Comparisons are unsigned.

While `reset` is high, both `result` and `flags` are zero.

## D-cache and register file

`dcache` holds 256 words of 32 bits at an 8-bit address. Its ports are
`clk`, `reset`, `address`, `wr_en`, `rd_en`, `w_data` and `r_data`. On
every rising edge with `rd_en` high it reads the addressed word into
`r_data`, so read latency is one clock. With `rd_en` low, `r_data` keeps its
value. When `wr_en` is high, the edge writes `w_data`. If `rd_en` is also
high, `r_data` shows the new word at once (write-first). Reset clears
`r_data` but not the contents, so an unwritten word reads whatever the RAM
holds. The reference runs suggest an array that starts cleared; this design
keeps it a plain RAM.

`int_regfile` has the same interface and timing, with 32 registers and a
5-bit address. Like the original, it has one address for both reading and
writing. This design adds two things:

* Register x0 always reads zero and ignores writes, the RISC-V rule. The
  `ZERO_REG` parameter turns this off.
* Reset clears every register.

The original text says a read takes place on every clock. Its reference
waveforms also show a read-enable pin, and `r_data` holding its value while
that pin is low. The modules follow the waveforms.

## How `rv_fblocks_top` wires the pipeline

```
 IF                     ID                 EX                 MEM            WB
 pc_unit --> icache --> iiu ==> inst_1 --> (decode, not here)
    ^          |         |      inst_2     ex_opcode/operands
    +-rollback-+---------+                  |
                                  int_alu lane 0 -> EX/MEM -> dcache addr ->  MEM/WB -> int_regfile
                                  int_alu lane 1 -> EX/MEM -> ex1_result
```

* **EX:** two `int_alu` lanes take their opcodes and operands from ports.
  Those would come from the decode, operand and forwarding logic, which is
  not included. Results and flags are registered in EX/MEM (`ex0_result`,
  `ex1_result`, `ex_flags`).
* **MEM:** the lane 0 result is a byte address. Its bits 9:2 select the
  D-cache word. A store (`ex_mem_write`, given in the EX cycle) writes
  `ex_store_data` there.
* **WB:** the write-back data is the load data (`ex_mem_read`, which also
  enables the D-cache read) or the lane 0 result. The register file writes
  it at `ex_wb_rd` when `ex_wb_en` was set, two clocks after the EX cycle. In a cycle with no write-back, the register
  file reads `rf_read_addr`, and `rf_read_data` shows that register one
  clock later.
* **Lane 1:** its registered result leaves the top on `ex1_result`.

The pipeline diagram draws a second write-back path into the integer
register file. The register file block, as specified, has only one address.
That is why lane 1 has no write-back here.

Reset is synchronous and active high everywhere. Cache sizes are parameters
of the top: `ICACHE_DEPTH` and `DCACHE_DEPTH`, both 256. The I-cache size is
this design's choice, matched to the D-cache; the original gives none. The
top's `RESET_PC` defaults to 0. The instruction cache is filled through
`icache_fill_en/addr/data`. It always hits: it has no tags and no miss
handling, because the original describes neither.

## Departures and limits

* There is no branch prediction, FPU, floating-point register file, decode,
  operand fetch or forwarding. Their signals are ports of the top.
* The instruction cache is a plain array with a fill port, not a tagged cache.
* There is one write-back lane into the single-address register file.
* Chosen without guidance from the original:
  * the dependency rule, the rollback target (PC+4) and flush on redirect;
  * ALU flag bits 0 and 4, shift by one, unsigned comparison;
  * write-first memories, x0 hardwired to zero, reset behaviour.
* Atomic memory operations, which the pipeline's memory stage is meant to
  handle, are not built: the D-cache has only single-word reads and writes.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For
example:

```
verilator --binary --timing --assert -Irtl rtl/rv_pkg.sv rtl/int_alu.sv tb/tb_int_alu.sv --top-module tb_int_alu
./obj_dir/Vtb_int_alu
verilator --binary --timing --assert -Irtl -y rtl rtl/rv_pkg.sv tb/tb_rv_fblocks_top.sv --top-module tb_rv_fblocks_top
./obj_dir/Vtb_rv_fblocks_top
```

What each testbench checks:

* `tb_int_alu`
  * every result and flag value of the reference ALU runs;
  * corner operands for all 16 opcodes;
  * 4000 random vectors against a model written independently.
* `tb_dcache`, `tb_int_regfile`
  * the reference write/read values (for example 0x1b1eb521 at D-cache
    address 0x04, and 0x4f334e03 in register 0x18);
  * a reference sequence in which `r_data` holds while `rd_en` is low;
  * random traffic against a shadow array, with one-clock read latency.
* `tb_icache`: the pairs of consecutive words, including the wrap at the end.
* `tb_pc_unit`: PC+8, PC+4 and redirect priority.
* `tb_iiu`
  * plays the fetch stage over a random RV32I program that uses x0-x3, so
    dependencies are frequent;
  * checks rollback and Pipe 1 / Pipe 2 against a reference model, and
    in-order issue;
  * the reference pair 0x78aa5495 / 0x00aa5495 must issue together.
* `tb_rv_fblocks_top`, at the default sizes
  * runs 3000 cycles with redirects, stores, loads, ALU write-backs from
    lane 0 and ALU operations in lane 1, then reads back all registers;
  * checks that every mechanism occurred: dual issue, rollback, held issue,
    redirect, every opcode in both lanes, store, load, write-back and
    register read.
