# AM2901 bit-slice processor element in SystemVerilog

The AM2901 is a 4-bit "slice" of a processor data path: a register file, an
accumulator-like Q register, an eight-function ALU and two shifters, controlled
cycle by cycle by a 9-bit microinstruction. It holds no program of its own.
A microsequencer outside the slice supplies one microinstruction per clock.
Wider machines are built by placing several slices side by side. They share the
microinstruction and register addresses, and they are chained through their
carry and shift pins.

This repository models one slice (`am2901`) and a word of four slices
(`am2901_word`, 16 bits, the top level). Between the slices, carries come from
a lookahead unit (`am2901_cla`) or simply ripple. The RTL is synthesizable
SystemVerilog with rising-edge storage only. Every module has a self-checking
testbench.

## One clock cycle

Each rising edge of `cp` completes one microinstruction:

1. Registers `A` (address `a`) and `B` (address `b`) are read from the 16x4
   register file. The reads are combinational.
2. The source field `I[2:0]` picks the two ALU operands, R and S.
3. The function field `I[5:3]` computes `F` and the flags from R, S and the
   carry in `cn`.
4. The destination field `I[8:6]` decides what the edge stores. `F` can go
   into register `B` (as is, halved or doubled), into Q, or nowhere. Q can
   also shift. `Y` shows either `F` or `A`.

Register `B` is read and written in the same instruction. That makes
`B <- B op A` a single-cycle operation. The write happens at the edge, so
within the cycle every output shows the old contents.

### Microinstruction fields

| `I[2:0]` | R | S |   | `I[5:3]` | F |   | `I[8:6]` | RAM | Q | Y |
|---|---|---|---|---|---|---|---|---|---|---|
| 0 AQ | A | Q | | 0 | R + S + Cn | | 0 QREG | – | F | F |
| 1 AB | A | B | | 1 | S − R − 1 + Cn | | 1 NOP | – | – | F |
| 2 ZQ | 0 | Q | | 2 | R − S − 1 + Cn | | 2 RAMA | F | – | A |
| 3 ZB | 0 | B | | 3 | R or S | | 3 RAMF | F | – | F |
| 4 ZA | 0 | A | | 4 | R and S | | 4 RAMQD | F/2 | Q/2 | F |
| 5 DA | D | A | | 5 | (not R) and S | | 5 RAMD | F/2 | – | F |
| 6 DQ | D | Q | | 6 | R xor S | | 6 RAMQU | 2F | 2Q | F |
| 7 DZ | D | 0 | | 7 | R xnor S | | 7 RAMU | 2F | – | F |

Each source and function pair gives a familiar operation. For example:

- ZQ with function 1 and Cn = 0 gives Q − 1.
- ZB with function 2 and Cn = 1 gives −B.
- DA with function 0 gives D + A.

`tb_am2901` checks 24 such combinations.

## The ALU and its flags

This part of the design needs the most care.

**Subtraction leaves the +1 to the carry input.** The ALU subtracts by
inverting one operand and adding. It never adds the 1 that two's complement
needs. The user supplies it through `cn`:

- To get a true difference, set `cn = 1`. With `cn = 0` the result is one
  less.
- After a subtraction, `cn_4` means "no borrow". It is the inverse of a
  borrow flag and must be inverted before it is read as one.

The same convention lets a multi-word subtraction chain carries between words
without extra logic.

**Structure.** The operand to invert is inverted first:

- R is inverted for S − R, for (not R) and S, and for xor.
- S is inverted for R − S.

Four full-adder cells then form a ripple chain. Each cell also reports its
propagate `p = r | s` and generate `g = r & s`. From these, the slice computes
its lookahead outputs:

```
P = p3 p2 p1 p0                          p_n = not P
G = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0  g_n = not G
```

Both outputs are active low: `p_n = 0` means a carry entering the slice goes
through it, and `g_n = 0` means the slice produces a carry by itself. For the
arithmetic functions, `cn_4` is the ripple carry out of bit 3, and overflow is
`c3 xor c4`.

**Flags of the logic functions** follow the original part's flag table. They
are not forced to zero. Examples:

- For OR, `cn_4 = not P + cn`.
- For AND, `cn_4 = G0 + G1 + G2 + G3 + cn`.
- For xnor and xor, the flags are longer sum-of-products expressions; see the
  comments in `am2901_alu.sv`.

These values have no arithmetic meaning. They are reproduced so that a board
built around the part behaves the same. `f_zero` (F = 0) and `f3` (sign) are
valid for every function.

`p_n` and `g_n` never depend on `cn`. The RTL keeps them in a separate
combinational block from the carry-dependent flags. Without that split, the
lookahead path between slices would appear to a simulator as a combinational
loop.

## Shifts and the end pins

The RAM shifter sits between F and the register file. The Q shifter sits in
front of Q.

- **Down shift** (destinations 4 and 5): bit 3 takes the `ram3_i` (or `q3_i`)
  pin. Bit 0 leaves on `ram0_o` (or `q0_o`).
- **Up shift** (destinations 6 and 7): bit 0 takes `ram0_i` (or `q0_i`). Bit 3
  leaves on `ram3_o` (or `q3_o`).

On the real part these four pins are bidirectional, and Y is a 3-state output.
Here each pin is split into an input, an output and an output enable:

| Pin | Enable | Drives when |
|---|---|---|
| RAM0 | `ram0_oe` | down shift |
| Q0 | `q0_oe` | down shift |
| RAM3 | `ram3_oe` | up shift |
| Q3 | `q3_oe` | up shift |
| Y | `y_oe` | `oe_n` is low |

The 3-state buffers themselves are left to the pad ring or the board.

`am2901_word` chains the pins between neighbouring slices:

- On a down shift, slice *k*'s RAM3/Q3 input reads slice *k+1*'s RAM0/Q0
  output.
- On an up shift, slice *k+1*'s RAM0/Q0 input reads slice *k*'s RAM3/Q3
  output.

The pins at the two ends of the word are brought out as `ram0_*`, `q0_*`
(least significant end) and `ramn_*`, `qn_*` (most significant end). Wiring
them to each other, to a constant or to a flag gives rotates, arithmetic
shifts and the usual shift-and-add multiply step.

## Cascading slices

`am2901_word #(NSLICES, LOOKAHEAD)` places `NSLICES` slices (default 4). Each
slice takes four bits of `d` and `y`. Carries between slices are chosen by
`LOOKAHEAD`:

- **`LOOKAHEAD = 1` (default).** `am2901_cla` computes every slice's carry in
  one level of logic:
  `C[k] = G[k] + P[k]G[k-1] + … + P[k]…P[0]·cn`. It also gives group `p_n` and
  `g_n` outputs, so that groups can be cascaded the same way.
- **`LOOKAHEAD = 0`.** Each slice's `cn_4` feeds the next slice's `cn`.

The word flags are formed as on a board:

- Carry out, overflow and sign come from the top slice.
- `f_zero` is the AND of all slices' F = 0 outputs. The original part uses a
  wired-AND of open-collector pins.

## Timing and reset

- All storage is rising-edge flip-flops. Write enables are multiplexers in
  front of the flip-flops (`am2901_dffe`); no logic ever touches the clock.
- The register file reads combinationally. Its 16 words are built from 16
  enabled 4-bit registers, a write-address decoder and two read multiplexers.
- `rst` is a synchronous, active-high reset that clears the registers and Q.
  The original part has no reset. This one is added so that simulation starts
  from a known state.

## How this model differs from the original part

- Bidirectional and 3-state pins are split into in/out/enable signals (see
  above). For that reason the pin count does not match the 40-pin package.
- The original latches the A and B read data while the clock is high. Here
  the reads are plain combinational reads of edge-triggered registers. For the
  normal one-instruction-per-clock use, the two give the same results.
- A reset input is added.
- For pins that the original's destination table marks "don't care", the
  model makes them inputs (output enable low).
- Some flag equations of the original's table are hard to read, so a reading
  had to be chosen:
  - Function 6 (xor) uses the xnor equations with R inverted.
  - The xnor `Cn+4` is read as `not(G3 + P3G2 + P3P2G1 + P3P2P1P0·(G0 + not Cn))`.
  - In the second term of the xnor overflow equation, the leading `P3` is
    taken as inverted, like the first term.

  If your reference disagrees on these points, the logic is in one place:
  `am2901_alu.sv`.
- The word size (four slices) and the lookahead default belong to
  `am2901_word` only. The slice itself is fixed at 4 bits and 16 registers
  (`am2901_pkg`).

## Files

| File | Contents |
|---|---|
| `rtl/am2901_pkg.sv` | widths, field encodings (enums), decoded-control and flag structs |
| `rtl/am2901_full_adder.sv` | one-bit adder cell with propagate and generate |
| `rtl/am2901_alu.sv` | eight functions, ripple chain, lookahead outputs, flags |
| `rtl/am2901_src_mux.sv` | R/S operand selection from `I[2:0]` |
| `rtl/am2901_dest_decode.sv` | `I[8:6]` to RAM/Q write and shift, Y select, pin directions |
| `rtl/am2901_shifter.sv` | pass / down / up shifter with end bits (used for RAM and Q) |
| `rtl/am2901_dffe.sv` | D register with write enable |
| `rtl/am2901_regfile.sv` | 16x4 register file, two reads, one conditional write |
| `rtl/am2901_qreg.sv` | Q register with its shifter and input multiplexer |
| `rtl/am2901.sv` | one slice |
| `rtl/am2901_cla.sv` | carry lookahead across slices |
| `rtl/am2901_word.sv` | top: `NSLICES` slices cascaded into one word |

Each `tb/tb_<module>.sv` tests the module of the same name:

- Combinational blocks (adder, ALU, shifter, lookahead) are checked
  exhaustively. The ALU is checked over all 4096 combinations of function,
  operands and carry.
- The register file, Q and the D register are checked against array and
  register models under random traffic.
- `tb_am2901` runs the instruction table, then 20,000 random microinstructions
  against a behavioural model of a slice. It also compares the entire register
  file and Q at regular intervals.
- `tb_am2901_word` does the same for the 16-bit word at default parameters. It
  adds a short program in which the carry crosses all slices and a value is
  shifted through every slice boundary.
- `tb_am2901_word_ripple` repeats that test with rippled carries.

The slice and word testbenches count how often each mechanism occurred and
fail if any never did. Mechanisms counted include every destination, down and
up shifts, Y = A, carry out, overflow, F = 0, propagate, generate, the carry
into each upper slice, and the Y output disabled.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/am2901_pkg.sv tb/tb_am2901_word.sv --top-module tb_am2901_word
./obj_dir/Vtb_am2901_word
```

Replace the testbench name to run another. Each testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog that reports a
failure if the run hangs. All of them finish in well under a second.
