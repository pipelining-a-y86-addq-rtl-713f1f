# A four-stage pipelined addq processor

This is a small Y86-64 processor that runs one instruction, `addq rA, rB`
(`R[rB] <- R[rA] + R[rB]`), split into four pipeline stages: fetch, decode,
execute and writeback. It is a teaching-sized design. Its purpose is to show
three things in working RTL:

- how pipeline registers split a single-cycle datapath into stages;
- how an instruction that reads a register written by one of the two
  instructions ahead of it gets the wrong value (a data hazard);
- how hardware fixes that, either by stalling or by forwarding.

A second, separate piece of hardware sits beside the processor. It is the
memory read/write control of a fuller Y86-64 pipeline: the icode travels down
the pipeline with its instruction, so the data memory's read and write enables
belong to the instruction that is actually in the memory stage.

All RTL is SystemVerilog-2017 and synthesizable. The memories are plain arrays.

## The datapath

```
        +-----+   +-------+   +-----+      +----------+   +----+     +-----+   +---------+
  pP -->| PC  |-->| Instr |-->|split|-rA->|  fD      |-->|reg |-->  | dE  |-->| ADD |-->| eW      |--+
        +-----+   | Mem   |   |     |-rB->| (rA, rB) |   |file|valA | valA|   +-----+   | valE    |  |
          ^       +-------+   +-----+      +----------+   |    |valB | valB|             | dstE    |  |
          |  add 2                                        |    |     | dstE|             +---------+  |
          +---------- PC + 2                              |    |<-------------- write R[dstE] ------+
                                                          +----+
```

| Register bank | Written by | Fields (reset / bubble value) |
|---|---|---|
| `pP` | fetch (PC update) | `pc` : 64 (0) |
| `fD` | fetch | `rA` : 4, `rB` : 4 (0xF, 0xF) |
| `dE` | decode | `valA` : 64, `valB` : 64 (0), `dstE` : 4 (0xF) |
| `eW` | execute | `valE` : 64 (0), `dstE` : 4 (0xF) |

Register number 0xF means "no register". The register file ignores a write
to 0xF, and a read of 0xF returns 0. A pipeline register full of these values
is a no-op, called a bubble. The register file's second write port (`dstM`)
exists but is tied to 0xF, because addq never writes from memory.

The names follow one convention. A lower-case prefix is a stage's output,
about to be written into the next register: `f_rA`, `d_dstE`, `e_valE`. An
upper-case prefix is the contents of the register at a stage's input:
`D_rA`, `E_dstE`, `W_valE`.

Each stage has one register bank in front of it. So once the pipeline is full,
one instruction finishes every cycle. Each instruction takes four cycles from
fetch to the end of writeback. The register file is written on the clock edge
that ends writeback, and a value written at that edge can be read in the next
cycle. The register file has no internal write-to-read bypass. That choice is
what makes the hazard timing below come out as it does.

## Data hazards and how they are resolved

Take `addq %r8,%r9` followed by `addq %r9,%r8`, with every register `i`
starting at `100*i`. The second instruction reads `%r9` in decode during
cycle 2. At that point the first instruction is still in execute, and it only
writes `%r9` = 1700 at the end of cycle 3. Without help, the second
instruction reads the stale value 900.

`FORWARD` selects one of two fixes.

### Stalling (`FORWARD = 0`, the default)

`stall_unit` looks at the instruction in fetch. If either of its source
registers equals the destination of the instruction now in decode (`d_dstE`)
or in execute (`E_dstE`), two things happen:

- the PC is not updated, so the same instruction is fetched again;
- `fD` is loaded with a bubble instead of the fetched instruction.

The destination of an instruction in writeback does not need to be checked.
Its write lands at the end of this cycle, before the fetched instruction
reaches decode. The result is:

- a dependency on the previous instruction costs two stall cycles;
- a dependency on the instruction two ahead costs one;
- anything further back costs nothing.

Cycle by cycle, for `addq %r8,%r9; addq %r9,%r8; addq %r10,%r11` (`*` = PC held):

| cycle | PC | fD rA | fD rB | dE valA | dE valB | dE dstE | eW valE | eW dstE |
|---|---|---|---|---|---|---|---|---|
| 0 | 0x0 | | | | | | | |
| 1 | 0x2* | 8 | 9 | | | | | |
| 2 | 0x2* | F | F | 800 | 900 | 9 | | |
| 3 | 0x2 | F | F | | | F | 1700 | 9 |
| 4 | 0x4 | 9 | 8 | | | F | | F |
| 5 | | 10 | 11 | 1700 | 800 | 8 | | F |
| 6 | | | | 1000 | 1100 | 11 | 2500 | 8 |

`%r9` is written at the end of cycle 3 and read in cycle 4. The testbenches
check this table, and the other worked sequences listed under
"Verification", entry by entry.

### Forwarding (`FORWARD = 1`)

A result exists before it reaches the register file. It sits either on the
adder's output, while its instruction is in execute, or in `eW`, while the
instruction is in writeback. Decode has two `fwd_unit` multiplexers, one per
operand. Each takes the youngest matching value in this order:

1. `e_valE`, when `E_dstE` matches the source;
2. `W_valE`, when `W_dstE` matches the source;
3. the register file output.

With forwarding there is never a stall for addq. The stall unit is still
instantiated, with its enable tied low. In the example above, `dE` holds
valA = 1700 already in cycle 3, and `%r8` = 2500 is written in cycle 4
instead of cycle 6.

The stalling scheme, its comparison set and its timing follow the reference
description closely. The forwarding sources (the adder output and the eW
value) are the ones that description points at. The multiplexer arrangement
and its priority are this design's own.

## The memory read/write control pipeline

`mem_ctrl_pipe` carries the 4-bit icode through four registers: `fD`, `dE`,
`eM` and `mW`. Their reset and bubble value is NOP (icode 1). It decodes the data
memory's enables from `M_icode`:

- `mem_read` for `mrmovq`, `popq` and `ret`;
- `mem_write` for `rmmovq`, `pushq` and `call`.

An icode fetched in cycle *c* drives the enables in cycle *c+3*. It appears
on `W_icode` in cycle *c+4*, for a writeback stage to use. Each register
has its own `stall` and `bubble` input for an outside hazard controller.
`data_mem` is a 256-byte memory with 64-bit little-endian accesses. Reads are
combinational and zero when `rd` is low. Writes happen on the clock edge.

Only the icode path and `mrmovq` as a read are specified by the reference
material. The rest of the read and write sets follows standard Y86-64. The
processor around this block is not part of this design. So in the top level,
the icode, the address and the write data come in as ports.

## Files

| File | Contents |
|---|---|
| `rtl/addq_pkg.sv` | widths, `REG_NONE`, icode enum, pipeline-register structs and their bubble values |
| `rtl/pipe_reg.sv` | generic pipeline register bank (type parameter), with stall and bubble |
| `rtl/instr_mem.sv` | instruction memory, 10-byte combinational fetch window, byte load port |
| `rtl/fetch_logic.sv` | `split` (rA = bits 15:12, rB = bits 11:8, icode = bits 7:4) and `add 2` |
| `rtl/regfile.sv` | 15 x 64-bit registers, 2 read and 2 write ports, plus an observation port |
| `rtl/exec_add.sv` | the 64-bit adder |
| `rtl/stall_unit.sv` | hazard detection by stalling |
| `rtl/fwd_unit.sv` | one operand's forwarding multiplexer |
| `rtl/addq_pipe.sv` | the processor |
| `rtl/mem_ctrl_pipe.sv` | icode pipeline and memory enables |
| `rtl/data_mem.sv` | data memory |
| `rtl/y86_pipe_top.sv` | top level: processor and memory control side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_y86_pipe_full` |
| `tb/y86_top_drv.svh` | stimulus shared by the two top-level testbenches |

## Interface and timing of the top level

- `clk` is the only clock. `rst` is synchronous and active high. Reset does
  three things: PC = 0, every pipeline register gets its bubble value, and
  register `i` gets `i * RESET_STEP` (default 100, so `%r8` = 800).
- To load a program, hold `ld_en` and write one byte per clock at `ld_addr`.
  The pipeline keeps running during loading, so assert `rst` afterwards.
- Every fetched instruction is executed as an addq, whatever its first byte.
  For padding after a program, fill memory with `60 FF` (addq 0xF,0xF), which
  does nothing. Zero bytes would execute as `addq %rax,%rax`.
- `dbg_src` / `dbg_val` read any register combinationally.
- These outputs show the pipeline cycle by cycle:
  - `F_q`, `D_q`, `E_q`, `W_q`: the four register banks;
  - `e_valE`: the adder output;
  - `stall_F` / `bubble_D`: the stall controls;
  - `fwd_e` / `fwd_w`: which operand was forwarded from execute or from
    writeback (bit 0 = A, bit 1 = B).

| Parameter | Default | Meaning |
|---|---|---|
| `FORWARD` | 0 | 0 = resolve hazards by stalling, 1 = by forwarding |
| `IMEM_BYTES` | 256 | instruction memory size |
| `DMEM_BYTES` | 256 | data memory size |
| `RESET_STEP` | 100 | register `i` resets to `i * RESET_STEP` |

## Simulating

Each testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/addq_pkg.sv tb/tb_addq_pipe.sv --top-module tb_addq_pipe
./obj_dir/Vtb_addq_pipe
```

Use the same command for any other `tb/tb_*.sv`. To lint one module:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/addq_pkg.sv rtl/addq_pipe.sv`.

## Verification

- `tb_addq_pipe` runs a stalling and a forwarding processor side by side. It
  checks every pipeline register, the PC and the stall signal in every cycle
  of four worked sequences:
  - the hazard-free four-instruction timing example;
  - the back-to-back dependency above;
  - the dependency two instructions apart: one stall, or forwarding from
    writeback;
  - `addq %r8,%r9; addq %r10,%r9`: forwarding into the second operand.

  It then runs twelve random 30-instruction programs. Every writeback (cycle,
  register, value) and every final register is compared with an
  instruction-set model and a cycle model of the stall rule.
- `tb_y86_pipe_top` runs both modes through the top level. It also runs a
  store/load sequence through the memory control pipeline, with one held and
  one bubbled register. It requires each mechanism to occur at least once:
  stall, bubble, forward, memory read, memory write, hold and bubble.
- `tb_y86_pipe_full` does the same for the top level at its default
  parameters alone (stalling, so no forwarding).
- Every module has its own testbench against an independent model. Each
  testbench was checked to fail on a version of its module with one
  deliberate bug, such as a missing compare in the stall unit.

## Limits and departures

- **addq only.** The first instruction byte is not decoded, and there is no
  halt. A program simply runs on into the padding.
- **Timing is not modelled.** The reference discusses stage delays: 550 ps per
  instruction unpipelined, against about 200 ps plus register overhead
  pipelined. RTL cannot show these. Only the cycle-level behaviour is shown:
  four stages, one instruction per cycle, four-cycle latency.
- **Choices made here**, not taken from the reference:
  - the memory sizes;
  - the little-endian byte order of the fetch window;
  - the load and observation ports;
  - synchronous reset, and the reset contents of the register file (taken
    from the examples' starting state);
  - `dstM` winning over `dstE` when both write the same register;
  - stall beating bubble in `pipe_reg`;
  - the forwarding priority.
