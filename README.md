# SEQ: a single-cycle Y86-64 processor in SystemVerilog

This is a processor that runs one Y86-64 instruction per clock cycle. Y86-64 is a small
teaching instruction set modelled on x86-64: fifteen 64-bit registers, three condition flags,
and twelve instructions (`halt`, `nop`, `rrmovq`/`cmovXX`, `irmovq`, `rmmovq`, `mrmovq`, `OPq`,
`jXX`, `call`, `ret`, `pushq`, `popq`).

Between two rising clock edges, combinational logic does all the work for one instruction:

1. fetch and split the instruction;
2. read up to two registers;
3. run the ALU and evaluate a condition;
4. read data memory or prepare a write;
5. choose the register write-backs and the next PC.

At the rising edge, the PC, the registers, the condition codes, data memory and the status
register all change together. Nothing is pipelined and nothing stalls, so the design has no
hazards. What makes it interesting is the set of multiplexers that let a single datapath serve
every instruction. Most of this README is about them.

The design follows lecture notes on the "SEQ" processor and on HCLRS, a hardware description
language made for a course. In HCLRS the register file and the memories are built-in parts, and
students write only the glue logic. Here every part is RTL. Beside the main processor, the top
level also holds the two small example processors from the same notes: a nop/jmp/halt machine
and an "add" machine that only uses the register file.

## Instruction format

Each cycle, program memory returns ten bytes starting at PC as one 80-bit little-endian word,
`i10bytes`. Bit 0 is the least significant bit of the byte at PC. The fields are at fixed
positions:

| field   | bits      | meaning |
|---------|-----------|---------|
| `ifun`  | [3:0]     | ALU operation (OPq) or condition (jXX, cmovXX) |
| `icode` | [7:4]     | instruction |
| `rB`    | [11:8]    | second register |
| `rA`    | [15:12]   | first register |
| `valC`  | [79:16]   | constant of irmovq, rmmovq, mrmovq (bytes 2-9) |
| `valC`  | [71:8]    | target of jXX, call (bytes 1-8) |

| icode | instruction | bytes |
|-------|-------------|-------|
| 0 | halt | 1 |
| 1 | nop | 1 |
| 2 | rrmovq / cmovXX rA, rB | 2 |
| 3 | irmovq V, rB | 10 |
| 4 | rmmovq rA, D(rB) | 10 |
| 5 | mrmovq D(rB), rA | 10 |
| 6 | OPq rA, rB (add, sub, and, xor) | 2 |
| 7 | jXX Dest | 9 |
| 8 | call Dest | 9 |
| 9 | ret | 1 |
| A | pushq rA | 2 |
| B | popq rA | 2 |

`valP` is PC plus the length of the instruction. Conditions are numbered 0 always, 1 le, 2 l,
3 e, 4 ne, 5 ge, 6 g. Register 4 is `%rsp`. Register number `0xF` means "no register": it reads
as 0, and writing to it does nothing.

## The control multiplexers

Each multiplexer is a small function of `icode`. Together these tables are the processor's
control logic.

**Registers read** (`seq_decode`):

| instruction | srcA | srcB |
|-------------|------|------|
| halt, nop, jXX, irmovq | none | none |
| rrmovq, cmovXX | rA | none |
| mrmovq | none | rB |
| rmmovq, OPq | rA | rB |
| call, ret | none | %rsp |
| pushq, popq | rA | %rsp |

`valA` and `valB` are the values read. `popq` reads `rA` even though it does not use the value.

**ALU inputs** (`seq_execute`). The ALU computes `valE = aluB OP aluA`:

| instruction | aluA | aluB | OP |
|-------------|------|------|----|
| OPq | valA | valB | ifun |
| rrmovq, cmovXX | valA | 0 | add |
| rmmovq, mrmovq | valB | valC | add |
| pushq, call | 8 | valB | sub |
| popq, ret | 8 | valB | add |

With this order, `subq rA, rB` gives `R[rB] - R[rA]`. A memory instruction's address is
displacement plus `R[rB]`, and a stack instruction gives `%rsp - 8` or `%rsp + 8`. `irmovq`
does not use the ALU: its constant goes straight to the register write-back multiplexer.

Only `OPq` loads the condition codes (ZF, SF, OF). `cnd` is evaluated on the flags held
*before* the current instruction, so a `jXX` right after an `OPq` sees that `OPq`'s result.

**Memory** (`seq_memory_ctrl`):

| instruction | access | address | data written |
|-------------|--------|---------|--------------|
| rmmovq | write | valE | valA |
| pushq | write | valE (= %rsp - 8) | valA |
| call | write | valE (= %rsp - 8) | valP (return address) |
| mrmovq | read | valE | |
| popq, ret | read | valB (= old %rsp) | |

A read returns its value `valM` in the same cycle. A write takes effect at the clock edge.

**Write-back** (`seq_writeback`):

| instruction | dstE | E value | dstM |
|-------------|------|---------|------|
| irmovq | rB | valC | none |
| OPq | rB | valE | none |
| rrmovq, cmovXX | rB if `cnd`, else none | valE | none |
| pushq, popq, call, ret | %rsp | valE | popq: rA |
| mrmovq | none | | rA |

A failed `cmovXX` is therefore a register write to `0xF`. When both ports name the same
register, the M port wins. That is how `popq %rsp` ends up with the popped value.

**Next PC** (`seq_pc_update`):

- `call`: `valC`;
- `jXX`: `valC` if `cnd`, else `valP`;
- `ret`: `valM`;
- anything else: `valP`.

## Status and stopping

The `Stat` register tells whether the machine keeps running. The encoding is:

| code | name | meaning |
|------|------|---------|
| 1 | AOK | running |
| 2 | HLT | a halt instruction executed |
| 3 | ADR | an address was outside memory |
| 4 | INS | the instruction was invalid |

`pc_stat_reg` works out the status of the current instruction. The first match wins:

1. fetch address out of range: ADR;
2. invalid icode or function code: INS;
3. halt: HLT;
4. data address out of range: ADR.

An instruction is committed only if Stat is AOK and its own status is AOK. A committed
instruction writes the registers, the condition codes, memory and the PC. An instruction that
stops the machine changes nothing but `Stat`. From then on the processor holds, with PC still
pointing at that instruction.

The cycle counter counts every cycle up to and including the stopping one. For example, the
course's `nopjmp` program (`nop; jmp C; B: jmp D; C: jmp B; D: nop; nop; halt`) stops with HLT
at PC `0x1e` after 7 cycles. That matches the reference simulator's "Stopped in 7 steps at PC =
0x1e".

## Memories and loading

`instr_mem` and `data_mem` are byte arrays of `MEM_BYTES` bytes. The default is 4096; the notes
give no size.

- **Program memory** returns ten bytes at PC. Bytes past the end read as zero.
- **Data memory** gives one little-endian 64-bit access per cycle. An access whose eight bytes
  are not all inside the array raises ADR.
- **Loading.** Each processor has a byte-wide load port (`load_en`, `load_addr`, `load_data`).
  It writes both memories with the same image, while `rst` is held high.

The two memories are separate arrays. A store changes the data copy only, so self-modifying
code is not seen by fetch. The course simulator has one sparse 64-bit memory instead.

The register file has 15 registers, two combinational read ports and two write ports. A reset
clears every register to 0.

## The example processors

- **`nopjmp_cpu`** has a PC register, program memory, and a two-way next-PC multiplexer: PC + 1
  for `nop`, or the destination at bytes 1-8 for `jmp`. Stat is AOK for nop and jmp, HLT for
  halt, and INS otherwise. `jmp` ignores its condition field.
- **`add_cpu`** treats every instruction as two bytes. Each cycle it writes `R[rA] + R[rB]`
  into `R[rB]` and adds 2 to the PC. It stops at a halt byte. The notes leave its status rule
  open; stopping at halt is this design's choice. Its registers would otherwise start at zero,
  so it has a preload port (`preg_en`, `preg_num`, `preg_val`) that writes one register per
  cycle during reset.

## Where this design departs from or fills in the notes

- **Call's return address is PC + 9.** One line of the notes says the value `call` stores is
  PC + 10. The instruction table and the assembled listings both make `call` and `jmp` 9 bytes
  long, so this design stores PC + 9.
- **The value stored is valA.** The notes say the value to write is "mostly valB". Their own
  table of registers read puts `rA` (the value `rmmovq` and `pushq` store) on port A, so this
  design stores valA.
- **Conditions include the overflow flag.** A figure in the notes draws `le` as `SF | ZF` and
  `l` as `SF`. This design uses the full conditions with the overflow flag (`(SF^OF)|ZF`,
  `SF^OF`), which agree with the figure whenever OF = 0. The reference simulator reports an
  overflow flag.
- **Filled-in details.** The following are this design's choices:
  - the ALU operand order beyond the figure's `aluB` ∈ {valB, valC} multiplexer;
  - using old `%rsp` from port B as the `popq`/`ret` address;
  - ADR as the status for out-of-range addresses;
  - function-code validity checks;
  - the priority order of status checks;
  - M-port priority in the register file;
  - the condition-code reset value Z=1 S=0 O=0.
- **Not modelled.** The HCLRS language and its simulator, trace printing, and the `stall` and
  `bubble` register-bank controls. The notes mention stall and bubble only as later topics.

## Files

`rtl/`:

| file | what it is |
|------|------------|
| `y86_pkg.sv` | instruction codes, status codes, register numbers, types |
| `seq_top.sv` | top level: the three processors side by side |
| `seq_cpu.sv` | the single-cycle processor, wiring the blocks below |
| `seq_fetch.sv` | instruction splitter, length and `valP` |
| `seq_decode.sv` | srcA/srcB selection |
| `regfile.sv` | 15 × 64-bit register file, 2 read + 2 write ports |
| `seq_execute.sv` | ALU input selection, with `alu.sv` and `cond_codes.sv` |
| `seq_memory_ctrl.sv` | memory enables, address and data selection |
| `data_mem.sv`, `instr_mem.sv` | the memories |
| `seq_writeback.sv` | dstE/dstM and register input selection |
| `seq_pc_update.sv` | next PC |
| `pc_stat_reg.sv` | PC, Stat, commit rule, cycle counter |
| `nopjmp_cpu.sv`, `add_cpu.sv` | the example processors |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. There is also
`y86_ref_pkg.sv`, an instruction-level reference model of the machine.

## Verification

The processor testbenches compare the hardware with the reference model after every cycle. The
comparison covers PC, Stat, all registers, the condition codes and the cycle count.

- **`tb_seq_cpu`** runs three kinds of program:
  - the `nopjmp` program;
  - an array-sum program that uses every instruction; its result is also checked against a
    hand-computed value;
  - 25 random programs. These mix valid and invalid instructions, jumps, calls and returns to
    random targets, and memory and stack traffic.
- **`tb_seq_top`** runs the whole top at default parameters. It runs the same kinds of programs
  with 60 random ones, together with the two example processors. It counts every instruction,
  taken and untaken jumps and moves, each stop reason (HLT, ADR, INS), and `popq %rsp`, where
  both write ports name one register. It fails if any of
  them never occurred.
- **The unit testbenches** check each block against its table or an independent model.

Each passes with its module intact. Each testbench has also been run against a copy of its
module with one deliberate bug, and each detected that bug. Examples of the bugs:
`le` without OF, pushq adding instead of subtracting, cmov ignoring its condition, E winning
over M in the register file.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/y86_pkg.sv tb/y86_ref_pkg.sv \
    rtl/*.sv tb/tb_seq_top.sv --top-module tb_seq_top -Mdir obj
./obj/Vtb_seq_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The simulations finish in well
under a second.

To change the memory size, set `MEM_BYTES` on `seq_top`, or on a processor directly.
