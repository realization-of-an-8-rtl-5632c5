# An 8-bit processor with a four-segment instruction pipeline

This is a small 8-bit processor built to show instruction pipelining in its
simplest form. Each instruction passes through four segments, one clock cycle
each:

| segment | name            | what happens |
|---------|-----------------|--------------|
| FI      | fetch           | `IR <= program_memory[PC]`, `PC <= PC + 1` |
| DA      | decode, address | the instruction word is decoded into a control bundle and the 12-bit effective address `AR`; JMP and HLT act on the fetch side here |
| FO      | fetch operand   | the register file is read (`R[RA]`, `R[RB]`, `R0`); LDA reads `mem[AR]` |
| EX      | execute, store  | the ALU computes; the result goes to the register file; STA writes `R0` to `mem[AR]` |

While one instruction executes, the next fetches its operands, the one after
it is decoded and a fourth is fetched. A straight-line program of *n*
instructions therefore completes in *n* + 3 cycles instead of 4*n*. The
four-instruction example program `MVI R1,CF / MVI R2,D8 / ADD R1,R2 / HLT`
takes 8 cycles: 4 + 3, plus one stall because ADD needs the R2 value
that the MVI just ahead of it has not stored yet.

## Machine organisation

* 8-bit data path, sixteen 8-bit registers `R0`..`R15`. `R0` also serves as
  the accumulator of STA and LDA.
* Separate memories: 16 words × 16 bits of program memory, 4096 words × 8 bits
  of data memory.
* A 6-bit program counter. The program memory is indexed by its 4 LSBs, so
  program addresses wrap every 16 words.
* A 12-bit address register `AR` (the low 12 bits of a memory-reference
  instruction). Its 6 LSBs, called `ad`, are the target of JMP.
* One carry/borrow flag. ADC and SBB need it. ADD and ADC set it to the
  carry out. SUB and SBB set it to the borrow out.

## Instruction set

A 16-bit instruction, most significant bit first:

```
 15   14..12   11..8     7..4   3..0
 I    opcode   instruct  RA     RB
```

`I = 0` selects a register-reference instruction and `I = 1` a memory-reference instruction.

| I | opcode | mnemonic | effect |
|---|--------|----------|--------|
| 0 | 000 | HLT | stop; `halted` rises when it reaches EX |
| 0 | 001 | MVI | `R[instruct] <= {RA,RB}` (8-bit immediate) |
| 0 | 010 | ALU | operation chosen by `instruct`, result to `R[RA]` |
| 1 | 000 | STA | `mem[AR] <= R0` |
| 1 | 001 | LDA | `R0 <= mem[AR]` |
| 1 | 010 | JMP | `PC <= AR[5:0]` |

ALU operations (`instruct` field):

| code | op  | result in R[RA] | carry |
|------|-----|-----------------|-------|
| 0000 | MOV | R[RB] | – |
| 0001 | ADD | R[RA] + R[RB] | carry out |
| 0010 | ADC | R[RA] + R[RB] + C | carry out |
| 0011 | SBB | R[RA] − R[RB] − C | borrow out |
| 0100 | SUB | R[RA] − R[RB] | borrow out |
| 0110 | INC | R[RA] + 1 | – |
| 0111 | DEC | R[RA] − 1 | – |
| 1000 | CMP | ~R[RA] (complement) | – |
| 1001 | AND | R[RA] & R[RB] | – |
| 1010 | OR  | R[RA] \| R[RB] | – |
| 1011 | XOR | R[RA] ^ R[RB] | – |
| 1100 | SHR | R[RA] >> 1, 0 shifted in | – |
| 1101 | SHL | R[RA] << 1, 0 shifted in | – |

The remaining codes are no-operations. These are opcodes 011–111 of both
kinds and ALU codes 0101, 1110 and 1111. A no-operation still passes
through the pipeline and takes its cycle.

## Keeping the pipeline correct

This is the part that needs the most care. Three situations would break the
simple "one instruction per cycle" flow.

**Data dependencies (stall).** Results are stored at the end of EX. Operands
are read during FO. Suppose an instruction in FO reads a register that the
instruction just ahead of it, now in EX, is about to write. It would get the
old value. `hazard_unit` compares:

* the registers the FO instruction reads: `R[RA]`, `R[RB]`, and `R0` for STA;
* the register the EX instruction writes.

It also compares an LDA in FO with an STA in EX to the same address. On a
match, FI, DA and FO hold their contents for one cycle and EX gets a bubble.
In the next cycle the write has taken place and FO reads the new value. An
instruction two or more places behind the writer never needs to wait. There
is no forwarding path; stalling is the whole mechanism. Each stall costs
exactly one cycle.

**Jumps.** JMP needs no operand, so it is taken as soon as it is decoded in
DA. The PC is loaded with `ad`. The one instruction already fetched behind
the JMP is discarded. A taken jump costs one cycle.

**Halt.** HLT is also recognised in DA. Fetching stops there, and the
instruction behind it is discarded. Every older instruction completes. When
HLT reaches EX, `halted` rises. The processor then idles until reset.

Cycle count of a run, from the first cycle after reset to the first cycle
with `halted` high: *executed instructions* + 3 + *stalls* + *taken jumps*.

## Blocks

| file | role |
|------|------|
| `rtl/cpu_pkg.sv` | widths, opcode and ALU-code constants, the `ctrl_t` control bundle that travels DA → FO → EX |
| `rtl/micropipeline.sv` | top: PC, pipeline registers FI/DA, DA/FO, FO/EX, carry flag, stall/jump/halt control |
| `rtl/program_memory.sv` | 16 × 16 instruction store; combinational read, synchronous load port |
| `rtl/instruction_decoder.sv` | combinational decode of IR into `ctrl_t` (read/write sets, immediate, AR) |
| `rtl/register_file.sv` | 16 × 8 registers; 3 read ports for FO, 1 write port for EX, 1 observation port; cleared by reset |
| `rtl/data_memory.sv` | 4096 × 8 data store; combinational read for FO, synchronous write for EX, observation port |
| `rtl/hazard_unit.sv` | FO-against-EX dependency check that produces the stall |
| `rtl/alu.sv` | combinational ALU for the 13 operations and the carry |

## Top-level interface (`micropipeline`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (clears PC, pipeline, registers, carry) |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 4, 16 | program-memory write port; use it while `rst` is high |
| `halted` | out | 1 | HLT has executed |
| `pc` | out | 6 | program counter |
| `carry` | out | 1 | carry/borrow flag |
| `dbg_reg_addr` / `dbg_reg_data` | in/out | 4 / 8 | read any register combinationally |
| `dbg_mem_addr` / `dbg_mem_data` | in/out | 12 / 8 | read any data-memory word combinationally |
| `ev_retire`, `ev_stall_reg`, `ev_stall_mem`, `ev_jump` | out | 1 | one-cycle pulses: instruction in EX, register stall, memory stall, jump taken |

Parameters: `IMEM_DEPTH` (16) and `DMEM_DEPTH` (4096). The data and
instruction widths are fixed in `cpu_pkg`. The data memory is not reset, so
write a word before a program reads it.

Typical use: hold `rst` high and write the program, one word per clock.
Release `rst` and wait for `halted`. Then read the results through the
`dbg_*` ports.

## Where this design makes its own choices

The processor's specification fixes the four segments, the register
organisation, the memory sizes and the instruction set, including the
opcode and ALU codes. It also specifies stalling on a dependency. It leaves
open, or states inconsistently, the points below, which were settled as follows:

* **Carry flag.** ADC and SBB are specified, but the flag itself is not. Only
  ADD/ADC/SUB/SBB update it. "Carry" after a subtraction means borrow.
* **Data addresses.** STA and LDA use the full 12-bit AR, so all 4096 words
  are reachable. JMP uses the 6-bit `ad`.
* **Stall scope.** The stall covers every register operand and the STA→LDA
  memory case. It lasts one cycle, the minimum this timing allows.
* **Jumps and halt.** Both act in DA, with the one-instruction discard
  described above.
* **Separate memories.** Program and data memories are separate, each with
  a port per segment that uses it.
* **Opcode and ALU codes.** The specification's reference listing uses
  opcode 011 for ALU operations and a shifted ALU-code table. It also has an
  extra register-move opcode. This design follows the published instruction
  list instead: opcode 010 and the table above. MOV covers register-to-register
  moves.
* **Added ports.** The program load port, the observation ports and the event
  pulses are additions for loading and checking the design.
* **Unused codes.** They are no-operations.
* **Not built.** A non-pipelined variant of the same processor exists only as
  a point of comparison and is not part of this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

* `tb_alu`: 4000 vectors over all 16 codes, checked against arithmetic on
  integers.
* `tb_instruction_decoder`: all 65 536 instruction words.
* `tb_register_file`, `tb_data_memory`, `tb_program_memory`: random traffic
  checked against shadow arrays. The data-memory test also fills and reads
  back all 4096 words.
* `tb_hazard_unit`: 20 000 random FO/EX pairs plus directed cases.
* `tb_micropipeline`: the full design at its default size. It contains an
  instruction-level reference model that also predicts the cycle count. It
  runs four kinds of program:
  * the example program, expecting R1 = A7, carry = 1, 8 cycles;
  * 15 independent instructions plus HLT, expecting 19 cycles;
  * a directed program using every instruction class;
  * 400 random programs with forward jumps, over few registers and
    addresses, so that stalls are frequent.

  For each program it compares registers, carry, memory, cycle count and
  event counts. It also requires that register stalls, memory stalls, jumps,
  halts and ADC/SBB all occurred.

* `tb_example_program`: the four-instruction example program, checked
  cycle by cycle. It checks in which cycles EX retires an instruction, the
  cycle of the stall, and the cycle in which `halted` rises.

Running a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cpu_pkg.sv tb/tb_micropipeline.sv --top-module tb_micropipeline
./obj_dir/Vtb_micropipeline
```

The top-level test runs in well under a second.
