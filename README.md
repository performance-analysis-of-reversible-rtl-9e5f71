# A 16-bit ALU made only of reversible logic gates

This is a 16-bit arithmetic and logic unit (ALU) built entirely from
*reversible* gates. A reversible gate has as many outputs as inputs, and its
inputs can always be recovered from its outputs. No information is erased, so
in principle such a gate need not dissipate the kT·ln 2 per lost bit that an
ordinary AND or OR gate must. The gates used are:

| gate | size | mapping |
|---|---|---|
| NOT | 1x1 | P = ~A |
| Feynman (FY, CNOT) | 2x2 | P = A, Q = A ^ B |
| Double Feynman (DFY) | 3x3 | P = A, Q = A ^ B, R = A ^ C |
| Fredkin (FR) | 3x3 | P = A; B and C pass if A = 0, swap if A = 1 |
| Toffoli (TG) | (n+1)x(n+1) | controls pass, R = (AND of the n controls) ^ T |
| HNG | 4x4 | P = A, Q = B, R = A ^ B ^ C, S = (A ^ B)C ^ AB ^ D |

Constant inputs (*ancillae*) turn these gates into ordinary functions. With
B = 0 a Feynman gate makes a copy, because a reversible netlist may not fan a
wire out. With T = 0 a Toffoli gate is an AND. With D = 0 the HNG gate is a
full adder. The price is outputs that nothing uses (*garbage*). This RTL keeps
every garbage output and brings them all out on a port, so the netlist stays
exactly the gate network and nothing is hidden from synthesis.

The RTL models the *logic* of the reversible network. It is ordinary
synthesizable SystemVerilog, and on an FPGA or in a standard-cell flow it maps
to ordinary gates. It is not a model of adiabatic or quantum hardware.

## What the ALU computes

Inputs: `a`, `b` (16 bits), `m` (mode), `s0`, `s1` (select) and `cin`.
Outputs: `fun` (16 bits), `cout` and `garbage`.

| M | S0 | S1 | Cin | fun |
|---|---|---|---|---|
| 0 | 0 | 0 | 0 | A + B |
| 0 | 0 | 0 | 1 | A + B + 1 |
| 0 | 0 | 1 | 0 | A + ~B (= A − B − 1) |
| 0 | 0 | 1 | 1 | A − B |
| 0 | 1 | 0 | 0 | A |
| 0 | 1 | 0 | 1 | A + 1 |
| 0 | 1 | 1 | 0 | A − 1 |
| 0 | 1 | 1 | 1 | A |
| 1 | 0 | 0 | x | A ^ B |
| 1 | 0 | 1 | x | A & B |
| 1 | 1 | 0 | x | A \| B |
| 1 | 1 | 1 | x | ~A |

All arithmetic is modulo 2^16. `cout` is the carry out of bit 15. The
arithmetic unit always runs, so `cout` is valid (and changes) in logic mode
too. The ALU is purely combinational: it has no clock, no reset and no state.
Its longest path is the carry ripple through 16 HNG full adders, followed by
one multiplexer.

## Structure

```
           +-----------------+  fun_lu[15:0]
 a,b,s0,s1 | rev_logic_unit  |--------------+
      ---->| 16 x logic cell |              |     +------------------+
           +-----------------+              +---->| 16 x rev_mux2    |--> fun[15:0]
           +-----------------+  sum[15:0]   +---->| (M=1: logic,     |
 a,b,s0,s1,| rev_arith_unit  |--------------+     |  M=0: arithmetic)|
 cin ----->| 16 x arith cell |--> cout            +------------------+
           +-----------------+                           ^ m
```

Both units are chains of identical one-bit cells. In the arithmetic unit the
carry *and* the select lines S0/S1 go from cell to cell. Each cell regenerates
the select lines for the next cell out of its own gates. In the logic unit
only S0/S1 travel along the chain. Cell `i` therefore sees the select lines
only after they have passed through `i` earlier cells. That is the reversible
substitute for fan-out. Mode M is wired to all 16 multiplexer bits directly.

## The arithmetic cell (`rev_arith_cell`)

This is the cleverest part. The HNG full adder always computes A + Y1 + Cin.
The select lines do not steer the adder. They choose its second operand:

```
Y1 = ~S0 & (S1 ^ B)  |  S0 & S1

S0 S1   Y1     over 16 bits
0  0    B      A + B + Cin
0  1    ~B     A + ~B + Cin    (Cin = 1 gives two's-complement A - B)
1  0    0      A + Cin
1  1    1      A + FFFF + Cin  (Cin = 0 gives A - 1)
```

Four gates build Y1. A Fredkin gate acting as a 2:1 multiplexer does most of
the work:

```
DFY1 (B, 0, 0)          -> B                         (two spare copies: garbage)
FY   (S1, 0)            -> S1                        (spare copy: garbage)
DFY2 (S1, B, 0)         -> S1 (to next cell), S1^B, S1
FR   (S0, S1^B, S1)     -> S0 (to next cell), Y1 = S0 ? S1 : S1^B, (garbage)
HNG  (A, Cin, Y1, 0)    -> A, Cin (garbage), Sum, Cout
```

The cell uses five constant inputs and leaves six outputs unused.

## The logic cell (`rev_logic_cell`)

The cell writes the four logic operations as an OR of three product terms:

```
fun = ~S1 & (A ^ B)        t1: XOR when S0S1 = 00, and part of OR when 10
    | ~S0 & S1 & A & B     t2: AND when 01
    |  S0 & (A ^ S1)       t3: A when 10 (completes A|B = (A^B)|A), ~A when 11
```

One DFY gate makes A, A^B and A^S1. Three Toffoli gates with target 0 form
t2 (5x5, four controls ~S0, S1, A, B), t1 (3x3) and t3 (3x3). A final 4x4
Toffoli gate with inverted controls and target 1 gives
1 ^ (~t1 & ~t3 & ~t2) = t1 | t3 | t2 (De Morgan). Seven NOT gates complement
the controls. They also undo the inversions on S0 and S1, so the next cell gets
them back in true polarity. In total a cell has 12 gates (7 NOT, 4 Toffoli,
1 DFY), 4 constant inputs and 7 unused outputs.

## The multiplexer (`rev_mux2`)

The multiplexer uses the same AND/OR pattern: TG(fun, M, 0) gives fun&M;
M goes through a NOT into TG(~M, sum, 0), which gives ~M&sum; and
TG(~(fun&M), ~(~M&sum), 1) gives their OR. It has 3 constants and 5 garbage
outputs.

## The garbage port

`garbage` on `rev_alu16` has (6 + 7 + 5)·16 + 4 = 292 bits:

| bits | content |
|---|---|
| [95:0] | arithmetic cells, cell i at [6i +: 6] = {DFY1.Q, DFY1.R, FY.Q, FR.R, HNG.P, HNG.Q} |
| [207:96] | logic cells, cell i at 96 + [7i +: 7] = {A, B, A^B, A^S1, ~t1, ~t3, ~t2} |
| [287:208] | multiplexers, bit i at 208 + [5i +: 5] = {fun, ~M, sum, ~(fun&M), ~(~M&sum)} |
| [291:288] | {S0, S1} out of the arithmetic chain, {S0, S1} out of the logic chain |

Many of these bits are copies of inputs. A synthesis tool will report them as
outputs wired straight to inputs, and that is expected. Leave `garbage`
unconnected if you only want the ALU function.

## Where this RTL departs from, or adds to, the published design

- **Garbage counts.** The published design quotes 3 garbage outputs per
  arithmetic bit and 5 per logic bit. Its gate netlists leave 6 and 7 outputs
  unused. This RTL follows the netlists and exposes all of them. The counts of
  constant inputs (5, 4 and 3 per bit) and gates (12 per logic bit) agree with
  the published ones.
- **Double Feynman gate.** The design names this gate but does not define it.
  The standard mapping (P = A, Q = A^B, R = A^C) is used. It is the mapping that
  makes the published cell equations come out of the published netlists.
- **4x4 and 5x5 Toffoli gates** are the usual generalisation: the target flips
  when all controls are 1.
- **Equations with lost complement bars** (Y1, the logic function, the
  multiplexer) were reconstructed so that they match both the gate netlists
  and the function table above.
- **NOT** in the function table is NOT A, as the logic equation gives.
- **Fan-out of M** to the 16 multiplexers is not specified. It is a plain wire
  here.
- **No clock, no reset.** The design is combinational throughout.
- Published FPGA results (about 30.7 mW total power and 32 slice LUTs on an
  Artix-7) come from a vendor flow and are not reproduced here.

## Files

`rtl/`:

- `rev_alu_pkg.sv`: width, garbage counts per cell, operation enums.
- `not_gate.sv`, `feynman_gate.sv`, `double_feynman_gate.sv`,
  `fredkin_gate.sv`, `toffoli_gate.sv` (parameter `NCTRL`, default 2 for a
  3x3 gate), `hng_gate.sv`: the gate library.
- `rev_arith_cell.sv`, `rev_logic_cell.sv`, `rev_mux2.sv`: the one-bit cells.
- `rev_arith_unit.sv`, `rev_logic_unit.sv`: 16-bit chains (parameter `WIDTH`).
- `rev_alu16.sv`: the top (parameter `WIDTH`, default 16).

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

- The gate and cell testbenches are exhaustive. They also check that each gate
  is one-to-one and that every garbage output has its documented value.
- The unit testbenches drive corner and random operands for every operation.
- `tb_rev_alu16` runs the full 16-bit ALU. It replays the published example
  (A = 3FFF, B = FFFF, Cin = 1, M = 1, S0S1 = 01 gives fun = 3FFF, cout = 0).
  It then drives every row of the table with corner operands and 6000 random
  vectors. It compares against a reference written straight from the table.
  It also counts carry-outs, full 16-bit carry ripples and mode switches in
  both directions, and fails if any of them never happened.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/rev_alu_pkg.sv rtl/*.sv tb/tb_rev_alu16.sv \
          --top-module tb_rev_alu16
./obj_dir/Vtb_rev_alu16
```

Swap in another `tb_<module>.sv` and its top-module name to run a different
testbench. Each runs in well under a second.

## Changing it

`WIDTH` on `rev_alu16`, `rev_arith_unit` and `rev_logic_unit` sets the word
size. The cells do not depend on it. The garbage width follows it,
(6 + 7 + 5)·WIDTH + 4. The end-to-end testbench is written for the default
16 bits.
