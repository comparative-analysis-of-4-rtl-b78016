# Reversible bit-slice ALU (4-bit and 8-bit)

This is an arithmetic logic unit built entirely from *reversible* gates.
A reversible gate has as many outputs as inputs, and it maps each input
combination to a different output combination. So the inputs can always be
recovered from the outputs, and no information is erased along the way.
The motivation is energy: by Landauer's principle, every erased bit costs at
least kT·ln 2 of dissipated heat, and a circuit that erases nothing avoids
that floor in principle.

The ALU is a chain of identical one-bit slices. Each slice takes the operand
bits A and B, a carry-in and five select lines, S4..S0. It produces a result
bit, a carry-out and a set of *garbage* outputs. Garbage outputs carry no
useful value and exist only so that the slice stays one-to-one. Constant
inputs, called *ancillas*, supply the extra lines the gates need. The same
RTL gives the 4-bit ALU and the 8-bit ALU through one parameter, `WIDTH`,
which defaults to 8.

It computes ten operations:

| operation | `sel` (S4..S0) | result `f`           | `cout`              |
|-----------|----------------|----------------------|---------------------|
| ADD       | `00000`        | A + B + cin          | carry out           |
| SUB       | `00001`        | A − B − cin          | borrow out (A < B + cin) |
| TRA       | `00100`        | A                    | –                   |
| NOT       | `00110`        | ~A                   | –                   |
| AND       | `01000`        | A & B                | –                   |
| NAND      | `01010`        | ~(A & B)             | –                   |
| OR        | `01100`        | A \| B               | –                   |
| NOR       | `01110`        | ~(A \| B)            | –                   |
| XOR       | `10000`        | A ^ B                | –                   |
| XNOR      | `10010`        | ~(A ^ B)             | –                   |

The codes are defined as `ralu_pkg::ralu_op_e`. The original design lists
transfer A, addition, subtraction, XOR, OR, AND, NOT and NAND as its eight
operations, and it names NOR and XNOR elsewhere. Here NOR and XNOR cost no
extra gates. For the logic operations, `cout` is whatever comes out of the
carry chain and has no meaning.

## The gate set

Every gate is a small combinational module. Their equations are those of the
published design.

| module         | lines | outputs |
|----------------|-------|---------|
| `feynman_gate` | 2×2   | P = A, Q = A ⊕ B |
| `peres_gate`   | 3×3   | P = A, Q = A ⊕ B, R = AB ⊕ C |
| `fredkin_gate` | 3×3   | P = A, Q = A'B ⊕ AC, R = A'C ⊕ AB (controlled swap) |
| `bme_gate`     | 4×4   | P = X, Q = XY ⊕ Z, R = XT ⊕ Z, S = X'Y ⊕ Z ⊕ T |
| `dkg_gate`     | 4×4   | P = Y, Q = X'Z + XT, R = (X ⊕ Y)(Z ⊕ T) ⊕ ZT, S = Y ⊕ Z ⊕ T |

Reversible logic forbids fan-out, so the Feynman gate is also the copy
gate: with B = 0 it outputs A twice.

Both four-line gates have a property worth knowing:

- **BME**: as written above, it is *not* one-to-one. When X = 0, both Q and
  R equal Z.
- **DKG**: as written above, it is also *not* one-to-one. It has only 12
  distinct outputs for its 16 inputs. A variant with Q = X'Z + XT' would
  be one-to-one.

The slice only drives these gates with inputs where the problem cannot
arise. The BME gets X = T = A. The DKG gets X = 0, which makes Q = Z. The
testbench checks exhaustively that the slice as a whole is one-to-one. If
you reuse these gates somewhere else, keep this in mind.

## Inside one slice (`ralu_slice`)

The slice has three parts: an arithmetic unit, a logic unit and a result
multiplexer.

```
 A ─FG─FG─┬───────────────────────────────┐
 B ─FG─FG─┤                               │
 S1 ─FG───┤                               │
          │  rev_full_addsub(S0,A,B,Cin) ─┼─ S/D ─┐           ┌── Cout
          │  BME(A, B, S1, A) ── Q: AND^S1 ┼───────┤
          │                  ── R: A^S1    ┼───────┤  Fredkin   ├── F
          │                  ── S: OR^S1   ┼───────┤  mux tree  │
          │  DKG(0, B, A, S1) ── S: XOR^S1 ┴───────┘ (S2,S3,S4) │
```

**Arithmetic unit: `rev_full_addsub`.** This is the published one-bit
reversible full adder/subtractor. It is made of two Feynman gates and two
Peres gates, with one ancilla tied to 0:

1. FG1 computes A' = Ctrl ⊕ A.
2. PG1(A', B, 0) gives A' ⊕ B and A'·B.
3. PG2(Cin, A' ⊕ B, A'·B) gives Cin ⊕ A' ⊕ B, plus the carry
   Cin·(A' ⊕ B) ⊕ A'·B.
4. FG2 XORs Ctrl back in, so S/D = A ⊕ B ⊕ Cin in both modes.

- When Ctrl (S0) = 0, the carry is an ordinary full-adder carry.
- When Ctrl = 1, A is inverted before the carry logic, so the carry becomes
  the borrow of A − B − Cin.

A chain of slices is therefore a ripple-carry adder, or a ripple-borrow
subtractor: `cin` is the carry-in for ADD and the borrow-in for SUB.

**Logic unit: one BME gate, plus one DKG gate.** Feed the BME gate X = A,
Y = B, T = A (a copy) and Z = S1:

- Q = AB ⊕ S1 is AND, or NAND when S1 = 1.
- R = A·A ⊕ S1 = A ⊕ S1 is transfer A, or NOT A.
- S = A'B ⊕ S1 ⊕ A = (A + B) ⊕ S1 is OR, or NOR. This works because
  A ⊕ A'B = A + B.

Six of the ten operations therefore come out of a single gate, with S1 as a
shared invert line. The DKG gate with X = 0, Y = B, Z = A and T = S1 adds
XOR/XNOR on its S output (S = A ⊕ B ⊕ S1).

**Result multiplexer: four Fredkin gates.** A Fredkin gate's Q output is a
2:1 multiplexer: control 0 selects B, control 1 selects C. Four of them form
the result-select tree:

```
m0 = S2 ? (A^S1)  : S/D
m1 = S2 ? OR^S1   : AND^S1
m2 = S3 ? m1      : m0
F  = S4 ? XOR^S1  : m2
```

So {S4,S3,S2} picks the unit:

- `000`: arithmetic
- `001`: transfer/NOT
- `010`: AND/NAND
- `011`: OR/NOR
- `1xx`: XOR/XNOR

S1 inverts the logic results, and S0 switches between add and subtract. The
remaining 22 of the 32 select codes are legal: they repeat one of the ten
operations.

**Line accounting.** A slice contains 15 gates: 7 Feynman, 2 Peres, 1 BME,
1 DKG and 4 Fredkin.

- In: 8 primary inputs (A, B, Cin, S0..S4) and 7 constant-0 ancillas.
- Out: F, Cout and 13 garbage lines.

Inside the slice nothing fans out. Copies of A, B and S1 are made with
Feynman gates, and S2 passes from one Fredkin gate to the next through its
P output. Four garbage lines return select lines unchanged: S0, S2, S3 and
S4. `ralu_slice.sv` lists the order of the `garbage` bus.

## The word (`ralu`, top level)

`ralu` instantiates `WIDTH` slices:

- Slice i's `cout` drives slice i+1's `cin`.
- The five select lines go to every slice. This broadcast between slices is
  ordinary wiring, not a reversible copy.
- `garbage` is a `WIDTH × 13` array, so every slice output leaves the top.

At 8 bits the ALU has 120 gates, 56 ancillas and 104 garbage lines. The
whole design is combinational: no clock, no reset and no registers. The
critical path is the ripple through all `WIDTH` adder/subtractors, followed
by the three-level multiplexer.

## Where this departs from, or adds to, the original design

The published design defines:

- the gate equations;
- the adder/subtractor network;
- the list of operations;
- the slice interface (A, B, Cin and five select lines);
- the choice of BME and DKG gates for the ALU.

The following are this design's own choices:

- **What each select line means**, and therefore the operation codes. The
  original names five select lines but gives no encoding.
- **The exact gate network of the slice.** This covers which BME/DKG output
  provides which operation, the use of Feynman copies, and the Fredkin
  multiplexer tree. The original describes the ALU's result selection only
  as a "control unit" and "selection lines".
- **The line count.** The original states 8 inputs and 8 outputs per slice.
  This slice needs 7 ancillas and has 13 garbage outputs. It is still
  one-to-one, but it has more lines than stated.
- **The meaning of subtract mode.** SUB means A − B − cin, and `cout` is the
  borrow.
- **The ripple carry chain between slices.** The original also compares
  carry-select and Kogge-Stone style adders, but only as alternatives. They
  are not built.

Not built:

- **Multiplication and division.** The original mentions them in passing but
  does not include them in the ALU's operation list. It names a divider only
  as possible future work.
- **Toffoli and HNG gates.** The original lists them among the standard
  gates, but nothing in the ALU uses them.
- **Status flags** (zero, overflow). None are described.
- **Cost figures.** The original's quantum cost, delay and FPGA power
  figures are not something RTL simulation can reproduce.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against a reference written independently of the gate equations (integer
arithmetic or plain SystemVerilog operators) and prints
`TB_RESULT checks=N failures=M`.

| testbench            | what it covers |
|----------------------|----------------|
| `tb_feynman_gate`, `tb_peres_gate`, `tb_fredkin_gate` | all inputs; also that the gate is one-to-one (and, for Fredkin, that the number of 1s is conserved) |
| `tb_bme_gate`, `tb_dkg_gate` | all 16 inputs; for BME, also the X = T wiring that the logic unit relies on |
| `tb_rev_full_addsub` | all 16 inputs, in both add and subtract mode; also one-to-one |
| `tb_ralu_slice`      | all 256 combinations of A, B, Cin and the select lines; also that the 15 outputs never repeat, so the slice loses no information |
| `tb_ralu`            | default 8-bit ALU: every operand pair for all ten operations with cin = 0 and 1 (1.3 M cases); carry/borrow out; select lines passed through on garbage. Counts carries, borrows and full-width ripples, and fails if any of them never occurs |
| `tb_ralu_4bit`       | `WIDTH = 4`: every input including all 32 select codes; also that the whole 4-bit ALU is one-to-one over its 16,384 inputs |

All of them pass. The 8-bit run takes well under a second.

## Simulating and changing it

The package must be read first. For example, to run the 8-bit test:

```
verilator --binary --timing -Wall -Wno-fatal rtl/ralu_pkg.sv \
  rtl/feynman_gate.sv rtl/peres_gate.sv rtl/fredkin_gate.sv \
  rtl/bme_gate.sv rtl/dkg_gate.sv rtl/rev_full_addsub.sv \
  rtl/ralu_slice.sv rtl/ralu.sv tb/tb_ralu.sv --top-module tb_ralu
./obj_dir/Vtb_ralu
```

For any other test, replace `tb_ralu` with its name. The gate tests need
only their own gate file, and `tb_rev_full_addsub` needs the Feynman and
Peres gates as well.

- **Other widths:** set `ralu #(.WIDTH(n))`. Nothing else depends on the
  width.
- **Other operation codes:** change the multiplexer wiring in
  `ralu_slice.sv` and the enum in `ralu_pkg.sv` together. `tb_ralu_slice`
  and `tb_ralu_4bit` both encode the select-line table in their reference
  models.
