# 16-bit ALU from reversible gates

This is a 16-bit arithmetic and logic unit (ALU) built entirely from
reversible logic gates and majority gates. Majority gates are the native gate
of quantum-dot cellular automata (QCA). A reversible gate has as many outputs
as inputs, so no information is thrown away. Signals cannot fan out, so the
gates pass their inputs on as copies, and outputs nobody needs are left as
*garbage outputs*. The RTL here models the logic function of that gate
netlist, gate by gate. It does not model the QCA cells or their clocking.

The ALU has three parts:

- an **arithmetic unit** (AU): transfer, increment, add, subtract and
  decrement;
- a **logic unit** (LU): any of the 16 two-input bitwise functions;
- a column of **2:1 multiplexers** that passes one of the two results to
  the output.

The whole design is combinational. It has no clock and no reset.

```
          A[15:0] B[15:0]
             |       |
     C0,C1,C2+--> arithmetic_unit --f_au--+
             |                            |--> 16 x qca_mux2 --> Y[15:0]
  C0,C1,C2,C3+--> logic_unit ------f_lu---+         ^
                                                    Sel
   Cout <-- carry out of the arithmetic unit
```

## Control word

`qca_alu_pkg::alu_ctrl_t` packs `{c0, c1, c2, c3, sel}`. With `sel = 0` the
output is the AU result. With `sel = 1` it is the LU result.

### Arithmetic unit: `{C0, C1, C2}`

Each bit forms an addend `Y = A'.C0 + A.C1`, which is 0, A, ~A or all ones.
The unit then computes `F = B + Y + C2`, with C2 acting as the carry into
bit 0:

| C0 C1 C2 | result        | meaning                       |
|----------|---------------|-------------------------------|
| 000      | B             | transfer B                    |
| 001      | B + 1         | increment B                   |
| 010      | A + B         | add                           |
| 011      | A + B + 1     | add with carry                |
| 100      | B + ~A        | one's complement B - A        |
| 101      | B + ~A + 1    | two's complement B - A        |
| 110      | B + 0xFFFF    | decrement B                   |
| 111      | B + 0xFFFF + 1| transfer B (carry out 1)      |

`Cout` is the carry out of bit 15. For code 101 it is 1 when B >= A, so it
works as a "no borrow" flag. `Cout` is driven in both modes.

### Logic unit: `{C0, C1, C2, C3}`

Each bit computes `F = A'B'.C0 + AB'.C1 + A'B.C2 + AB.C3`. The four control
lines are therefore the truth table of the function, listed for
`(A,B) = (0,0), (1,0), (0,1), (1,1)`. Some examples: AND = 0001, XOR = 0110,
OR = 0111, NOR = 1000, XNOR = 1001, NOT A = 1010, NOT B = 1100, NAND = 1110,
copy A = 0101, copy B = 0011. `qca_alu_pkg::lu_op_e` names all sixteen codes.

## The gate library

All slices use these gates (`rtl/<name>.sv`). Each is a 3x3 gate with outputs
P, Q, R, unless stated otherwise:

| module          | P            | Q         | R            | typical use                          |
|-----------------|--------------|-----------|--------------|--------------------------------------|
| `rev_not` (1x1) | A'           |           |              | select inverter                      |
| `feynman_gate` (2x2) | A       | A xor B   |              | copy / XOR                           |
| `toffoli_gate`  | A            | B         | AB xor C     | C = 0: AND                           |
| `rg1`           | A            | A xor B   | AB xor C'    | C = 1: AND, A passed on              |
| `rg2`           | A xor C      | B         | AB xor C     | C = 0: AND, A passed on              |
| `rg3`           | A            | A xor B   | A'B xor C    | C = 0: B gated by A', A passed on    |
| `rg4`           | (A+B) xor C  | B         | AB xor C     | C = 0: OR; otherwise (A+B) xor C     |
| `majority_gate` (3x1) | M = AB + BC + AC | |          | one input 0: AND, one input 1: OR    |

In the original drawing of RG3, the position of the complement bar is
unclear. The bar is read as applying to A, because every use of RG3 in the
logic unit needs that reading.

## Arithmetic slice (`au_bit`): the subtle part

The published design gives the AU only as a single bit, whose output is a
sum bit without a carry out. This design keeps that gate chain for the sum
and adds a carry out, so that 16 slices can ripple into each other:

```
RG3 (A, C0, 0)     -> A (passed on), garbage, W1 = A'.C0
TG  (A, C1, 0)     -> garbage, garbage, A.C1
RG4 (A.C1, W1, B)  -> W3 = (A.C1 + A'.C0) xor B = Y xor B,  garbage,  G4
FG  (W3, Cin)      -> G5 = W3,  F = W3 xor Cin
carry: qca_mux2(sel = G5, d0 = G4, d1 = Cin) -> Cout
```

Two points need care:

1. **The complemented term.** The published equation reads
   `(A.C0 + A.C1) xor B xor C2`, and its drawing puts a Toffoli gate first,
   which gives A.C0. With that term, rows 100, 101 and 110 of the operation
   table would not subtract or decrement. The table is only met with A'.C0.
   This design follows the table and puts an RG3 first. With the same inputs,
   RG3 produces A'.C0, as it does at the head of the logic unit.
2. **The carry comes from garbage outputs.** RG4's R output is
   `(A.C1 . A'.C0) xor B`. A.C1 and A'.C0 can never both be 1, so R is
   always a copy of B. The Feynman gate's copy output G5 is the propagate
   signal `Y xor B`. The carry is then `propagate ? Cin : B`, which is the
   standard carry of a full adder. It is built with the same majority-gate
   multiplexer as the ALU output. An immediate assertion in `au_bit` checks
   that G4 equals B.

`arithmetic_unit` chains 16 slices, with C2 as the carry into bit 0. The
critical path is the 16-slice ripple carry.

## Logic slice (`lu_bit`)

The published nine-gate netlist is reproduced as drawn. It selects one of
the four control lines, first by A and then by B:

```
stage 1  RG3(A,C0,0)->A'C0   RG2(A,C1,0)->AC1   RG3(A,C2,0)->A'C2   RG1(A,C3,1)->AC3
stage 2  RG4(AC1, A'C0, 0) -> AC1 + A'C0        RG4(AC3, A'C2, 0) -> A'C2 + AC3
stage 3  RG3(B, AC1+A'C0, 0) -> B'(...)         RG1(B, A'C2+AC3, 1) -> B(...)
stage 4  RG4(B'(...), B(...), 0) -> F
```

The third input of the stage-3 RG1 is tied to 1. That makes its output
B.(A'C2 + AC3), which is what the published output label and equation state.
The original drawing marks that input 0, but with 0 the gate would produce
the complement.

## Output multiplexer (`qca_mux2`)

`Y = S'.D0 + S.D1` is built from three majority gates:

- `M(D0, S', 0)` is an AND;
- `M(D1, S, 0)` is another AND;
- `M(., ., 1)` ORs the two.

A `rev_not` provides S'. D0 is the AU result, so `sel = 0` selects
arithmetic. The published structure does not show which select value picks
which unit, so that mapping is this design's choice.

## Departures from the published design and open points

- **Carry chain and `Cout`.** Both are additions; the original shows a
  single bit only.
- **First AU gate.** It is RG3 instead of the drawn Toffoli, as explained
  above.
- **LU control code 0010.** The published LU table lists 0010 as "copy B",
  but its own output equation gives A'.B for 0010. Copy B is 0011. The RTL
  follows the equation. Every other table row agrees with the equation.
- **Select polarity.** `sel = 0` selects the AU. This is a choice, as noted
  above.
- **Control decoder.** The original mentions a "decoder-controlled" ALU but
  never shows a decoder. The control lines are brought out directly.
- **Not modelled:**
  - QCA four-phase clock zones and cell layouts. These are physical, not
    logical. In real QCA each clock zone adds a quarter-cycle of latency,
    which this combinational model ignores.
  - The Fredkin and Peres gates. They belong to the same reversible-gate
    family but the ALU does not use them.

## Files

- `rtl/qca_alu_pkg.sv` – width, control struct, operation enums
- `rtl/qca_alu.sv` – top: AU + LU + output multiplexers (`WIDTH = 16`)
- `rtl/arithmetic_unit.sv`, `rtl/au_bit.sv` – arithmetic unit and its slice
- `rtl/logic_unit.sv`, `rtl/lu_bit.sv` – logic unit and its slice
- `rtl/qca_mux2.sv`, `rtl/majority_gate.sv`, `rtl/rev_not.sv`,
  `rtl/feynman_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/rg1.sv` … `rtl/rg4.sv`
  – gates
- `tb/tb_<module>.sv` – one self-checking testbench per module

Every module except the package takes its width from the `WIDTH` parameter,
which defaults to `qca_alu_pkg::ALU_WIDTH = 16`. Any width of 1 or more
works.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qca_alu_pkg.sv tb/tb_qca_alu.sv --top-module tb_qca_alu -o sim
./obj_dir/sim
```

What the testbenches check:

- **Gates and slices:** exhaustive. The gate testbenches compare against
  hand-written truth tables. `tb_au_bit` compares with integer addition of
  the selected addend. `tb_lu_bit` compares each code against its named
  function (AND, XOR, ...).
- **`tb_arithmetic_unit` and `tb_logic_unit`:** corner and random 16-bit
  operands for every code, checked against a word-level model.
- **`tb_qca_alu`:** runs the full-size ALU with default parameters over all
  32 control words, with corner and random operands (15,400 checks). It also
  counts how often each behaviour occurred, and fails if one never did:
  - both modes;
  - all 8 arithmetic and all 16 logic codes;
  - a carry out;
  - a carry rippling through all 16 bits;
  - a borrowing subtraction;
  - a decrement wrapping at 0.

Every testbench has a time-based watchdog. All pass, and each fails on a copy
of its module with a deliberately injected fault.

Lint reports only unused signals. These are the garbage outputs of the
reversible gates, which are intentionally left unconnected.
