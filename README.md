# SMP8: an 8-bit single-cycle accumulator processor

SMP8 is a very small processor built on the same plan as the textbook MIPS
single-cycle machine. A purely combinational controller drives a small datapath.
Every instruction is fetched, decoded and completed in one clock cycle. There is
no pipeline, so there are no stalls, hazards or forwarding paths between
instructions. The goal is simplicity, not speed.

The machine has:

* an 8-bit accumulator `AC` and one 8-bit operand register `R`;
* a 4-bit program counter, so a program has at most 16 instructions;
* a 1-bit zero flag `Z`;
* a 16 x 8 instruction memory (read-only) and a 16 x 8 data memory;
* 16 one-byte instructions, NOP included.

## Instruction set

Each instruction is one byte. `instr[7:4]` is the opcode. `instr[3:0]` is an
operand `a`. It is a data address for LDAC and STAC, and a jump target for the
three jumps. The other instructions ignore it.

| op | mnemonic | effect                 | op | mnemonic | effect        |
|----|----------|------------------------|----|----------|---------------|
| 0  | NOP      | nothing                | 8  | ADD      | AC ← AC + R   |
| 1  | LDAC a   | AC ← M[a]              | 9  | SUB      | AC ← AC − R   |
| 2  | STAC a   | M[a] ← AC              | A  | INAC     | AC ← AC + 1   |
| 3  | MVAC     | R ← AC                 | B  | CLAC     | AC ← 0        |
| 4  | MOVR     | AC ← R                 | C  | AND      | AC ← AC & R   |
| 5  | JUMP a   | PC ← a                 | D  | OR       | AC ← AC \| R  |
| 6  | JMPZ a   | if Z: PC ← a           | E  | XOR      | AC ← AC ^ R   |
| 7  | JPNZ a   | if !Z: PC ← a          | F  | NOT      | AC ← ~AC      |

Arithmetic wraps modulo 256. There is no carry or overflow flag. The PC wraps
from 15 to 0.

## The control word

The controller (`smp8_controller`) turns the opcode and the zero flag into a
nine-bit word, `{nop, load, store, mva, mvr, jump, alu[2:0]}`:

| op        | nop | load | store | mva | mvr | jump | alu |
|-----------|-----|------|-------|-----|-----|------|-----|
| NOP       | 1   | 0    | 0     | 0   | 0   | 0    | 100 |
| LDAC      | 0   | 1    | 0     | 0   | 0   | 0    | 100 |
| STAC      | 1   | 0    | 1     | 0   | 0   | 0    | 100 |
| MVAC      | 0   | 0    | 0     | 1   | 0   | 0    | 100 |
| MOVR      | 0   | 0    | 0     | 0   | 1   | 0    | 100 |
| JUMP      | 1   | 0    | 0     | 0   | 0   | 1    | 000 |
| JMPZ      | 1   | 0    | 0     | 0   | 0   | Z    | 000 |
| JPNZ      | 1   | 0    | 0     | 0   | 0   | !Z   | 000 |
| ADD … NOT | 0   | 0    | 0     | 0   | 0   | 0    | 000 … 111 |

The fields mean:

* `nop`: the accumulator keeps its value. Despite the name, this bit is also set
  for STAC and for the jumps.
* `load` and `mvr`: choose where the new AC value comes from. `mvr` selects R,
  `load` selects the data memory, and otherwise the ALU result is used.
* `mva`: R takes the value of AC.
* `store`: the data memory writes AC.
* `jump`: the next PC is the operand nibble.

The ALU select codes are 000 ADD, 001 SUB, 010 INC, 011 CLEAR, 100 AND, 101 OR,
110 XOR and 111 NOT.

Five rows are a judgement call. Two sources for the original design disagree
on them: its control-word table and its control-unit code. The two sources
differ on the ALU field of JUMP, JMPZ, JPNZ and MOVR, and on the width of the
NOP word. In every case this design follows the table. The recorded simulation
waveforms of the original agree with the table for the jumps: they show ALU
select 000 while JPNZ and JMPZ execute.

## The zero flag: the subtle part

The ALU runs on every instruction. The zero register loads "ALU result == 0" at
every clock edge, whatever the instruction. Two consequences matter when you
write or read an SMP8 program:

1. **The flag describes what the ALU computed, not what AC holds.** Instructions
   that do not use the ALU still compute something. NOP, LDAC, STAC, MVAC and
   MOVR compute `AC & R`. The jumps compute `AC + R`. So after `LDAC`, Z tells
   you whether `old AC & R` was zero, not whether the loaded value is zero.
   That is why the ALU field of non-arithmetic rows in the table has a visible
   effect.
2. **JMPZ and JPNZ test the flag left by the previous instruction.** They also
   overwrite it, because a jump computes `AC + R`. Two conditional jumps in a
   row therefore test different things.

Example from the second demonstration program: after `XOR` leaves AC = FF, the
flag is 0. `JMPZ A` is not taken, and it computes FF + 01 = 00, so the flag is
set to 1 for the next instruction.

## Datapath (`smp8_datapath`)

In one cycle:

```
pcnext = jump ? a : pc + 1                      (smp8_adder, smp8_mux2)
aluout = f_alu(AC, mva ? AC : R)                (smp8_alu)
acnext = mvr ? R : (load ? M[a] : aluout)       (two smp8_mux2)
at the rising edge:
  PC ← pcnext
  Z  ← (aluout == 0)
  AC ← acnext     unless nop
  R  ← AC         if mva
  M[a] ← AC       if store
```

All registers are `smp8_flopr`: an asynchronous, active-high reset to zero plus
a load enable. Both memories are read combinationally. The data memory is
written at the clock edge.

### Clocking, and why MVAC has a bypass

The original design gated its clocks. The accumulator was clocked by
`~nop & clk`, and R was clocked by the rising edge of the `mva` control signal.
This RTL uses one clock everywhere and turns both into clock enables. That is
safe for FPGA and ASIC flows and gives the same state after every edge, with
one exception, which the bypass repairs.

In the original, R was clocked by `mva`, which rises early in the MVAC cycle.
The ALU therefore already saw the new R (equal to AC) during that same cycle.
The AC register is written on MVAC with the ALU result, which was
`AC & AC = AC`, so AC stayed unchanged. The flag was "AC == 0".

With a plain enable, R would change only at the end of the cycle. AC would then
be overwritten with `AC & old R`. To keep the original behaviour, the ALU's
second operand is taken from AC while `mva` is 1. That is the extra `u_bmux` in
the datapath, and `tb_smp8_datapath` exercises it.

## Memories and programs

* `smp8_imem` is a 16 x 8 ROM. `smp8_dmem` is a 16 x 8 RAM that reset does not
  clear.
* Their contents are set by parameters of type `smp8_pkg::mem_image_t`, an
  unpacked array of 16 bytes with index 0 first. No files are read.
  * `smp8_top` has `IMEM_INIT` and `DMEM_INIT`.
  * `smp8` and `smp8_datapath` have `DMEM_INIT`.
* The defaults hold demonstration program 1 and its data.
* `smp8_pkg` also defines `TEST2_IMEM`, demonstration program 2.

The two demonstration programs are the original design's own tests. Unused
words are filled with 00 (NOP).

**Program 1** `10 A0 74 50 A0 30 80 22 00`. Data: M[0] = 0x37.

| PC | instr | action             | AC after | Z after |
|----|-------|--------------------|----------|---------|
| 0  | 10    | LDAC 0             | 37       | 1 (0 & 0) |
| 1  | A0    | INAC               | 38       | 0       |
| 2  | 74    | JPNZ 4 (taken)     | 38       | 0       |
| 4  | A0    | INAC               | 39       | 0       |
| 5  | 30    | MVAC (R ← 39)      | 39       | 0       |
| 6  | 80    | ADD                | 72       | 0       |
| 7  | 22    | STAC 2 (M[2] ← 72) | 72       | 0       |
| 8  | 00    | NOP                | 72       |         |

The JUMP 0 at address 3 is skipped. The result is 0x72 = 55 + 1 + 1 + 57.

**Program 2** `B0 A0 30 F0 E0 6A 24 00 00`. The sequence is CLAC, INAC, MVAC,
NOT (FE), XOR (FF), JMPZ A (not taken), STAC 4 (M[4] ← FF), NOP. The result
is AC = 0xFF = ~(0 + 1) ^ 1.

The value M[0] = 0x37 is not given explicitly for the original design. It is
inferred from program 1's result and from the recorded accumulator value after
the first load. The other data words are set to zero.

## Timing and cost

One instruction takes one clock. Program 1 reaches its final NOP after 7
cycles, because the skipped JUMP costs nothing. The original design closed
timing on an FPGA at an 8.5 ns clock period. Its critical path ran from the AC
register through the ALU into the zero-flag register, partly because of the
skew that the gated clock added. This RTL has no gated clock.

Coarse synthesis of `smp8_top` gives about 65 word-level cells, 21 flip-flop
bits (PC 4, AC 8, R 8, Z 1) and two 128-bit memories.

## Departures from the original, in one place

* Single clock with enables, instead of the gated AC clock and the
  `mva`-clocked R. An AC→ALU bypass during MVAC keeps the original results.
* Where the control-word table and the control-unit code disagree (JUMP, JMPZ,
  JPNZ and MOVR ALU fields; the NOP word), the table is followed.
* The ALU has no power-up `initial` values and no unreachable default branch.
* Memory contents come from parameters, not from data files. Unused
  instruction words are NOP. Data words other than M[0] = 0x37 are zero.
* `smp8` has an extra `zero` output. `smp8_top` (core plus instruction memory)
  brings out `pc`, `instr`, `ac` and `zero`. The original top-level wrapper is
  not available, so this one is the simplest that serves.
* Not covered: the FPGA board demonstration (switches, displays, pin mapping),
  which is not part of the processor.

## Files

RTL (`rtl/`), one unit per file:

| file | content |
|------|---------|
| `smp8_pkg.sv` | widths, opcode and ALU enums, `ctrl_t` control word, memory images |
| `smp8_alu.sv` | 8-function ALU with zero output |
| `smp8_controller.sv` | opcode + Z → control word |
| `smp8_flopr.sv` | register with async reset and enable |
| `smp8_mux2.sv`, `smp8_adder.sv` | 2:1 mux, adder (PC + 1) |
| `smp8_imem.sv`, `smp8_dmem.sv` | 16 x 8 instruction ROM, 16 x 8 data RAM |
| `smp8_datapath.sv` | registers, muxes, ALU, data memory |
| `smp8.sv` | core = controller + datapath |
| `smp8_top.sv` | system = core + instruction memory (top level) |

Testbenches (`tb/`) are all self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_smp8_alu` | every function on corner and random operands |
| `tb_smp8_controller` | all 16 opcodes × Z against the control-word table |
| `tb_smp8_flopr`, `tb_smp8_mux2`, `tb_smp8_adder`, `tb_smp8_imem`, `tb_smp8_dmem` | the building blocks against simple models |
| `tb_smp8_datapath` | 2000 cycles of random control words against a register-level model, including the MVAC bypass |
| `tb_smp8` | program 1 cycle by cycle, then 60 random programs against an instruction-level model (`smp8_ref_pkg`), then a read-back of the data memory |
| `tb_smp8_top` | program 2, checked cycle by cycle (PC, AC, Z), plus a program that reaches every mechanism (taken and not-taken conditional jumps, JUMP, load, store, MVAC, MOVR, accumulator hold, all eight ALU functions, PC wrap). It counts each one and fails if any never occurs. |
| `tb_smp8_full` | the default `smp8_top`, with no parameters overridden, running program 1 cycle by cycle |

`smp8_ref_pkg` is an instruction-level model. It is written from the
instruction semantics above, not from the RTL structure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/smp8_pkg.sv tb/smp8_ref_pkg.sv tb/tb_smp8_top.sv --top-module tb_smp8_top
./obj_dir/Vtb_smp8_top
```

Replace `tb_smp8_top` with any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/smp8_pkg.sv rtl/smp8_top.sv`.

To run your own program, instantiate `smp8_top` with
`.IMEM_INIT('{8'h.., ...})` and, if needed, `.DMEM_INIT(...)`. Hold `reset`
high for at least one clock, then release it. Execution starts at address 0.
