# 16-bit RISC processor with a Vedic (Urdhva Tiryakbhyam) multiplier

A small 16-bit multi-cycle processor whose ALU multiplies with a Vedic
multiplier instead of a conventional array or shift-and-add design. The
multiplier uses the Urdhva Tiryakbhyam ("vertically and crosswise") rule. All
partial products of a size are formed in parallel from four half-size
multipliers. They are then summed by a fixed network of adders. The same
recipe builds 2x2, 4x4, 8x8 and 16x16 multipliers. The ALU's adder uses the
same divide-in-halves idea: a 16-bit adder is two 8-bit adders, and each of
those is two 4-bit ripple-carry adders.

Around the ALU sits a plain von Neumann machine. It has a control unit, an
instruction register, a program counter, a memory address register, an
address multiplexer, a four-entry register file and one 16 x 16-bit memory
that holds both program and data. The machine executes fourteen instructions.

Everything is synthesizable SystemVerilog. There is no vendor IP.

## The Vedic multiplier

### The 2x2 cell (`vedic_mul2`)

For `a = a1a0` and `b = b1b0`:

| product bit | formed by |
|---|---|
| p0 | `a0 & b0` (vertical) |
| p1 | sum of half adder 1 on `a1&b0`, `a0&b1` (crosswise) |
| p2 | sum of half adder 2 on `a1&b1` and the carry of half adder 1 (vertical) |
| p3 | carry of half adder 2 |

That is four AND gates and two half adders.

### Doubling the width (`vedic_mul4`, `vedic_mul8`, `vedic_mul16`)

An N x N multiplier splits each operand into halves of H = N/2 bits,
`a = {aH, aL}` and `b = {bH, bL}`, and uses four H x H multipliers in
parallel:

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (each N bits)
a*b = q3 << N  +  (q1 + q2) << H  +  q0
```

These are summed by three N-bit adders and one half adder. The instance names
are the same in every size:

```
gate1 : {c1, s1} = q1 + q2
gate2 : {c2, s2} = s1 + (q0 >> H)
ha_1  : {hc, hs} = c1 + c2
gate3 : p[2N-1:N] = q3 + {hc, hs, s2[N-1:H]}     (carry out unused)
p[N-1:H] = s2[H-1:0]
p[H-1:0] = q0[H-1:0]
```

Two points are easy to miss:

* **c1 and c2 are never both 1.** The middle term `q1 + q2 + (q0 >> H)` is
  below 2^(N+1). So at most one carry comes out of gate1 and gate2, and `hc`
  is always 0. The half adder is kept because it is part of the structure.
  It also keeps the sum correct without relying on that argument.
* **gate3 cannot overflow.** Its sum is the top half of a 2N-bit product, so
  its carry out is left open. Lint reports this as an empty pin connection.

`vedic_mul4` uses `rca4`, `vedic_mul8` uses `rca8` and `vedic_mul16` uses
`rca16` as its N-bit adders. The 16 x 16 multiplier therefore contains 64
2x2 cells in all. It is purely combinational.

### The MAC (`mac`)

The multiply-accumulate unit is the 16 x 16 Vedic multiplier followed by a
33-bit product register (`regis_mod`). It has no accumulating adder: the
register loads the product, and bit 32 is always 0. `z` shows `a*b` one clock
after an edge at which `en` was high, and holds it until the next enabled
edge. Worked example: 252 x 846 = 213192.

## The adder (`rca4`, `rca8`, `rca16`)

`full_adder` is XOR for the sum and AND/OR for the carry. `rca4` chains four
of them. `rca8` is two `rca4` and `rca16` is two `rca8`, in both cases with
the carry passed from the low half to the high half. The ALU uses one `rca16`
for addition. A second `rca16` computes `a + ~b + 1` for subtraction.

## The ALU (`alu`)

| code | op | 32-bit result |
|---|---|---|
| 0 | ADD | `{15'b0, carry, a + b}` |
| 1 | SUB | `a - b`, 16 bits, zero-extended |
| 2 | MUL | `a * b` from the Vedic MAC |
| 3 | DIV | `{a % b, a / b}`; for b = 0: `{a, 16'hFFFF}` |
| 4 | AND | `a & b` |
| 5 | OR | `a \| b` |
| 6 | XOR | `a ^ b` |
| 7 | NOT | `~b` |
| 8 | SHL | `a << b[3:0]` |
| 9 | SHR | `a >> b[3:0]` (logical) |

Timing: on a rising edge with `en` high, the result is registered and the
single-bit **Z flag** register records whether the result is zero. `result`
is valid from the next cycle and holds while `en` is low. For MUL, the
product is held in the MAC's register and selected at the output; Z is then
`a == 0 || b == 0`, which is exactly "product is zero". The divider is a
plain combinational `/` and `%`.

## The processor (`processor`, `control_unit`, `risc_pkg`)

### Data path

```
 PC ──┐                       ┌──> IR ──> control unit ──> all control signals
      ├─ address_mux ─> addr ─┤ memory
 MAR ─┘                       └──> data (rdata) ──> IR / register file (LDA)
 register file  port A (rd, or R0) ──> ALU a ──┐
                port B (rs)         ──> ALU b ──┴─> result[15:0]  -> rd
                                                   result[31:16] -> rs (MUL, DIV)
 register file port A ──> memory wdata (STA)
```

The sub-block instances are named `v0` (control unit) to `v6` (ALU).

### Instruction set

Instructions are 8 bits and sit in the low byte of a memory word.

| opcode | mnemonic | format | effect |
|---|---|---|---|
| 0-9 | ADD, SUB, MUL, DIV, AND, OR, XOR, NOT, SHL, SHR | `{op, rd, rs}` | `rd <= rd OP rs`; sets Z |
| | MUL | | `rd <= low half`, `rs <= high half` |
| | DIV | | `rd <= quotient`, `rs <= remainder` |
| | NOT | | `rd <= ~rs` |
| A | LDA | `{op, addr}` | `R0 <= M[addr]` |
| B | STA | `{op, addr}` | `M[addr] <= R0` |
| C | JMP | `{op, addr}` | `PC <= addr` |
| D | JZ | `{op, addr}` | if Z: `PC <= addr` |
| E, F | (unused) | | no operation |

Other rules of the instruction set:

* If `rd == rs` for MUL or DIV, the register ends up with the upper half.
* The PC and the MAR are 4 bits wide, so a program and its data share 16
  words.
* There is no halt instruction. A program stops by jumping to itself.
* There is no move or load-immediate instruction. To copy R0 into R1, use
  `XOR R1,R1` followed by `OR R1,R0`.

### Control sequence

| state | action |
|---|---|
| FETCH | address = PC; `IR <= M[PC]`; `PC <= PC+1` |
| DECODE | `MAR <= IR[3:0]`; JMP/JZ load the PC and finish; E/F finish |
| EXECUTE | ALU op: ALU captures result and Z. LDA/STA: address = MAR, then finish |
| WRITEBACK | `rd <= result[15:0]`; MUL/DIV also `rs <= result[31:16]` |

Cycle counts are 4 for ALU instructions, 3 for LDA and STA, and 2 for jumps
and the unused codes. Memory reads are combinational and writes are
synchronous. Reset (`rst`) is synchronous and active high. It clears the PC,
the MAR, the IR, the registers, the ALU result and Z. It does not clear
memory.

### Top level (`vedic_risc_system`)

The top connects the processor to `memory`. To run a program:

1. Hold `rst` high.
2. Write the 16 words through `ld_en`, `ld_addr` and `ld_data`, one per
   clock.
3. Release `rst`. The processor fetches from address 0.

`dbg` shows the PC, the IR, Z, the ALU result and the control state.

## How far to trust it, and where it is this design's own

The design description gives the following:

* the Vedic multiplier hierarchy and its 16x16 combining network
* the two-halves adder hierarchy
* the MAC as a multiplier plus a 33-bit register
* a 16-bit ALU with a 4-bit select, add, subtract, multiply and divide, and
  a 32-bit registered output with a Z flag
* the list of processor blocks and the 8-bit IR and 4-bit PC/MAR sizes
* a fourteen-instruction count

It does not give an instruction set, encodings, a control sequence, a
register-file size, a memory size or how memory is loaded. All of these are
choices made here:

* the ten ALU operations beyond add/sub/mul/div, and their codes
* LDA, STA, JMP and JZ, and the 8-bit format
* four 16-bit registers with a second write port for the upper result half
* the four-state control sequence
* a combinational address multiplexer (the original registers it)
* the MAC enable input
* the divide-by-zero result
* the memory load port

The earlier ALU built from reversible-logic full adders is not included. It
served only as a baseline.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

* Adders and the 2x2, 4x4 and 8x8 multipliers are checked exhaustively.
  `rca16` and `vedic_mul16` are checked on corner cases and random vectors,
  including 252 x 846.
* The MAC, ALU, register file, PC, MAR, IR, multiplexer and memory are
  checked against reference models, including latency and hold.
* `tb_control_unit` checks every control signal in every state for all 16
  opcodes with Z clear and set, plus the cycle counts.
* `tb_processor` (memory modelled in the testbench) and
  `tb_vedic_risc_system` (full system, default parameters) run the worked
  multiply example, a count-down loop and hundreds of random 16-word
  programs. An instruction-level reference model runs the same programs.
  After every instruction the testbench compares the PC, Z, the registers or
  ALU result, the stores and the cycle count. The system test also counts
  each of the fourteen instructions, JZ taken and not taken, add carry out,
  divide by zero and multiplies with a non-zero upper half. It fails if any
  of these never happens.

Run a testbench with plain Verilator from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/risc_pkg.sv tb/tb_vedic_risc_system.sv --top-module tb_vedic_risc_system
./obj_dir/Vtb_vedic_risc_system
```

Replace the testbench name to run another block's test. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/risc_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/risc_pkg.sv` | opcodes, control-state enum, control and debug structs |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | adder cells |
| `rtl/rca4.sv`, `rtl/rca8.sv`, `rtl/rca16.sv` | hierarchical adder |
| `rtl/vedic_mul2.sv` ... `rtl/vedic_mul16.sv` | Vedic multipliers |
| `rtl/regis_mod.sv`, `rtl/mac.sv` | MAC unit |
| `rtl/alu.sv` | ALU with Z flag |
| `rtl/register_file.sv`, `rtl/program_counter.sv`, `rtl/memory_address_register.sv`, `rtl/instruction_register.sv`, `rtl/address_mux.sv`, `rtl/control_unit.sv` | processor blocks |
| `rtl/processor.sv` | the CPU |
| `rtl/memory.sv` | unified memory |
| `rtl/vedic_risc_system.sv` | top level |
