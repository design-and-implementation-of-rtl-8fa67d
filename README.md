# Reversible priority encoders from Toffoli gates

A priority encoder turns a set of request lines into the binary index of
the most important active line. This library builds that function, and
some related encoders, from **reversible gates**. A reversible gate maps
its inputs to its outputs one to one, so no information is lost. That is
the property that reversible and quantum computing rely on for low
dissipation. The rules are strict: no AND or OR gates, every gate has as
many outputs as inputs, constant inputs (ancillas) may be added, and
outputs that are not needed (garbage) are simply left unused.

The central circuit is a 4:2 priority encoder made of three Toffoli gates
and five inverters. An 8-to-3 BCD priority encoder made of Toffoli and CNOT
gates extends it. Conventional encoders sit alongside for comparison and as
building blocks: decimal-to-BCD, PE8, PE16, and a two-level encoder of
M x N = 64 inputs. Everything is combinational SystemVerilog with no clock
or reset. In simulation, the reversible circuits behave exactly like
ordinary logic with the same truth table.

## Building block: the Toffoli gate (`toffoli_gate`)

    P = A        Q = B        R = A.B xor C

The two controls pass through, and the target is inverted when both
controls are 1. Applying the gate twice gives back the inputs. The gate
makes all the logic in this library:

| target C | R          | use                                 |
|----------|------------|-------------------------------------|
| 0        | A AND B    | product terms                       |
| 1        | A NAND B   | (not used here)                     |
| running  | acc xor AB | adds a term into an output by XOR   |

An OR comes from De Morgan: invert the inputs, AND them in a Toffoli gate,
and invert the result. `cnot_gate` (P = A, Q = A xor B) is the 2x2
companion. With B = 0 it copies A.

## The 4:2 reversible priority encoder (`pri_enc`)

Inputs I3..I0, with I3 the most important. Outputs:

    Y1 = I2 + I3
    Y0 = not(I2).I1 + I3

| I3 | I2 | I1 | I0 | Y1 Y0 |
|----|----|----|----|-------|
| 0  | 0  | 0  | 1  | 00    |
| 0  | 0  | 1  | x  | 01    |
| 0  | 1  | x  | x  | 10    |
| 1  | x  | x  | x  | 11    |

Netlist. Each `s` net is named after the inverter or gate output that
drives it:

    s1 = not I2               s2 = not I3
    CHIP1 = TG(s1, I1, 0)  -> s3 = not(I2).I1
    s4 = not s3
    CHIP2 = TG(s2, s4, 0)  -> s5 = not(I3).not(s3)      Y0 = not s5
    CHIP3 = TG(s1, s2, 0)  -> s6 = not(I2).not(I3)      Y1 = not s6

There are three constant-0 ancillas and six garbage outputs (the P and Q
of each gate). I0 reaches no gate. An encoder without a "valid" output
cannot tell "only I0" from "nothing", so both give 00. The circuit has
only the four inputs and two outputs.

**Where this departs from the source schematic.** The source prints a
circuit with the same parts: three Toffoli gates, inverters producing s1,
s2 and s4, and output inverters on Y0 and Y1. Its input routing is
different: I0 goes to the first control of every gate, CHIP1 = TG(I0, I1,
s1), CHIP2 = TG(I0, s1, s2) and CHIP3 = TG(I0, I3, s4). That routing
computes

    Y0 = I0.not(I2) xor I3
    Y1 = not(I0.I3 xor I0.I1 xor I2)

which is not a priority encoder. For example, it gives Y1 = 1 for an
all-zero input, and 00 when I3 and I0 are both set, where the
code should be 11. This library keeps the
published truth table and equations, and rewires the gate inputs to
realise them with the same parts. The printed circuit also maps to a LUT3
and a LUT4 on its FPGA (Y1 depends on all four inputs). This version needs
one 3-input and one 2-input function.

## The 8-to-3 BCD priority encoder (`bcd_pri_enc`)

Inputs I7..I0, with I7 the most important. Output {C, B, A} is the index of
the highest active input. For example, I7 and I4 both active gives 111, and
I4 is ignored. No active input gives 000. Only Toffoli, CNOT and NOT gates
are used. The idea:

1. **"Nothing above" flags.** h7 = not I7. Then a chain of Toffoli gates
   with 0 targets gives h_k = h_(k+1).not I_k for k = 6..2. Five gates.
2. **One-hot terms.** e_k = I_k.h_(k+1) is 1 only when I_k is the
   highest active input, and e7 = I7. At most one e_k is 1, so an OR of
   several terms equals their XOR. XOR is exactly what a Toffoli target
   accumulates.
3. **Outputs by accumulation.** Each output line starts at 0. A CNOT
   copies e7 = I7 into it. Three Toffoli gates TG(I_k, h_(k+1), line) then
   add the other terms:

        C = e7 ^ e6 ^ e5 ^ e4
        B = e7 ^ e6 ^ e3 ^ e2
        A = e7 ^ e5 ^ e3 ^ e1

The total is 14 Toffoli, 3 CNOT and 6 NOT gates, with 8 constant-0
inputs. The source quotes 15 Toffoli and 5 CNOT gates (quantum cost 80,
with constant inputs of both values) but gives no wiring. This netlist is
this library's own: it has the same truth table and a quantum cost of 73,
counting Toffoli = 5, CNOT = 1 and NOT = 0. In both 4:2 and 8-to-3
circuits, a signal fans out to several gates over plain wires, as the
source's 4:2 schematic also does. A strictly reversible realisation would
copy such signals with CNOT gates.

## Conventional encoders

- `d2be`: decimal-to-BCD encoder. Ten lines D0..D9 in, {A, B, C, D} out
  (weights 8, 4, 2, 1): A = D8+D9, B = D4+..+D7, C = D2+D3+D6+D7,
  D = D1+D3+D5+D7+D9. It is a plain OR array. If several lines are
  active, it gives the OR of their codes, so there is no priority.
- `pe8`: 8-bit priority encoder as sum of products. Each term is masked by
  the inputs above it. For example, Q1 = not D5.not D4.(D2+D3) + D6 + D7.
- `pe16`: 16-bit priority encoder. Q3 = OR of the upper byte selects
  which byte's PE8 code forms Q2..Q0. This is the nesting of the flat
  PE16 equations, in which every lower-byte term is masked by
  not(D8..D15).

PE8 and PE16 have no valid output. With only bit 0 set, or nothing set,
the code is 0.

## Large encoders: `pe2d` (M groups of N bits)

Flat equations grow quickly with width, so a wide encoder is built in two
levels:

- The L = M x N inputs are cut into M groups of N adjacent bits.
- Each group has its own N-input encoder, which also reports whether the
  group is active.
- An M-input encoder over those activity flags picks the highest active
  group.
- A multiplexer takes that group's local index.

Because M and N are powers of two, the result is {group, local index}, and
v reports that any input is set. The sub-encoders are `pri_enc` (the
reversible PE4) for width 4, `pe8` for 8 and `pe16` for 16. The helper
`pe_any` uses a scan loop for other widths. The default is (M, N) = (8, 8)
at L = 64. The arrangements (4, 16), (16, 4), (2, 32) and (32, 2) are
selected with the parameters, and all five are simulated. There are no
pipeline registers.

## Top level (`rev_pe_top`)

The encoders are independent circuits. `rev_pe_top` places them side by
side, each with its own ports: `pe4_*`, `bcd_*`, `d2be_*`, `pe8_*`,
`pe16_*` and `pe64_*`. Its parameters M and N (defaults 8 and 8) are passed
to the 64-bit encoder.

## Files

`rtl/`:

- `toffoli_gate.sv`, `cnot_gate.sv`: reversible gates
- `pri_enc.sv`: reversible 4:2 priority encoder
- `bcd_pri_enc.sv`: reversible 8-to-3 BCD priority encoder
- `d2be.sv`: decimal-to-BCD encoder
- `pe8.sv`, `pe16.sv`: conventional priority encoders
- `pe_any.sv`: width-generic encoder with a valid flag
- `pe2d.sv`: two-level encoder
- `rev_pe_top.sv`: top level

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`.
Each testbench compares the module's outputs with a reference computed
inside the testbench, usually a scan for the highest set bit. It prints
`TB_RESULT checks=N failures=F` and has a watchdog.

- The gates are checked exhaustively, including that each gate undoes
  itself.
- `pri_enc`, `bcd_pri_enc`, `pe8` and `pe16` are checked over every input
  pattern.
- `pe2d` is checked in all five 64-bit arrangements, with directed and
  random patterns.
- `tb_rev_pe_top` drives the whole top at its default sizes. It also
  counts that each behaviour occurred: priority overrides in both
  reversible encoders, every decimal digit, both PE16 byte choices, group
  overrides and the empty input in the 64-bit encoder.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_rev_pe_top tb/tb_rev_pe_top.sv
    ./obj_dir/Vtb_rev_pe_top

Replace the name to run another testbench. Each one finishes in well under
a second. Lint reports unused signals. These are the garbage outputs of
the reversible gates and the lowest-priority inputs that no output depends
on. Both are expected.

## How far to trust it

- Every module is checked against an independent reference. The reversible
  encoders and PE8/PE16 are checked over all inputs.
- Following the source: the Toffoli gate equations, the 4:2 truth table
  and equations, the parts list of the 4:2 circuit, the BCD priority
  truth table, the decimal-to-BCD equations, the PE8 equations and the
  list of (M, N) arrangements.
- This library's own choices:
  - the gate-input wiring of the 4:2 circuit (see above)
  - the whole gate netlist of the 8-to-3 BCD encoder
  - PE16 written as two PE8s instead of one flat expression
  - the group structure of `pe2d` and its valid output
  - all port names beyond the printed I/Y/D/Q signal names
- Not reproduced: quantum-cost bookkeeping (it is not a property of the
  RTL), and the source's FPGA utilisation and timing (2 LUTs, 6.626 ns on
  a Spartan-3A). The latter come from a vendor flow and from its
  differently wired circuit.
