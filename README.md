# Fault-tolerant reversible arithmetic on the FTRA gate

Reversible logic never destroys information. Every gate maps its input
vectors one-to-one onto its output vectors and has as many outputs as inputs.
A *parity-preserving* reversible gate also keeps the XOR of all its outputs
equal to the XOR of all its inputs. Build a circuit only from such gates and
bring every output out, including the unused "garbage" outputs. Then any fault
that corrupts a single signal flips the parity of the circuit's outputs, so
the fault can be detected at the primary outputs.

This RTL models one family of such circuits. All of them are built on a
single 5-input, 5-output parity-preserving gate, the **fault-tolerant
reversible adder (FTRA)**:

- a full adder made of one FTRA;
- a full subtractor made of one FTRA;
- a 4-bit ripple carry adder;
- a 4-bit carry-skip adder;
- a programmable N-bit arithmetic logic unit (ALU) with AND, NAND, NOR, OR,
  add and subtract;
- the FTRA as a cascade of primitive quantum gates (CNOT, controlled-V,
  controlled-V⁺);
- a clocked model of the FTRA as it is laid out in quantum-dot cellular
  automata (QCA), a nanotechnology whose basic device is the three-input
  majority voter.

The RTL describes logical behaviour. It does not model reversibility in
silicon or the physics of QCA. Its job is to pin down what each circuit
computes, with every garbage output visible, so that the circuits can be
simulated, checked and reused.

## The FTRA gate

| output | function |
|---|---|
| P | A |
| Q | A ⊕ B |
| R | A ⊕ B ⊕ C ⊕ D |
| S | (A ⊕ B)(C ⊕ D) ⊕ (AB ⊕ D) |
| T | (A ⊕ B)(C ⊕ D) ⊕ (A′B ⊕ D) ⊕ E |

The mapping is a bijection on the 32 input vectors, and it preserves parity.
Tie D and E to 0 and the gate becomes a full adder: R = A ⊕ B ⊕ C is the
sum, and S = (A ⊕ B)C ⊕ AB = maj(A, B, C) is the carry. Q = A ⊕ B is the
propagate signal that the carry-skip adder uses. With D = 0, E reaches only
T, so a circuit can use E to pass a signal into the garbage outputs without
affecting anything else.

`rtl/ftra.sv` describes the gate by its Boolean mapping. Two further
models build the same gate from lower-level parts: a cascade of quantum
gates (`ftra_ncv`, below) and a network of QCA majority voters
(`ftra_qca`).

Two standard 3×3 reversible gates complete the library:

- **Feynman double gate** (`f2g`): P = A, Q = A ⊕ B, R = A ⊕ C. With B = C =
  0 it copies A twice. This is how a signal is fanned out, because reversible
  logic allows no plain fan-out. With A as a control line it inverts B and C
  together.
- **Fredkin gate** (`frg`): a controlled swap, P = A, Q = A ? C : B,
  R = A ? B : C. With C = 0, R = A·B, which makes it an AND gate. With A as
  the select, it is a 2:1 multiplexer.

## The FTRA as quantum gates

In quantum terms the FTRA costs 8 primitive gates. `ftra_ncv` builds it from
nine gates on the five lines A to E:

| step | gate | control → target | effect |
|---|---|---|---|
| 1 | CNOT | D → C | C becomes C ⊕ D |
| 2 | controlled-V | C → D | |
| 3 | controlled-V | B → D | |
| 4 | controlled-V | A → D | |
| 5 | CNOT | B → E | |
| 6 | CNOT | A → B | B becomes Q |
| 7 | CNOT | B → C | C becomes R |
| 8 | controlled-V⁺ | C → D | D becomes S |
| 9 | CNOT | D → E | E becomes T |

A CNOT followed by a controlled-V on the same two lines counts as one gate.
Counting steps 1 and 2 that way gives the cost of 8.

V is the square root of NOT, so V applied twice is NOT. A line that only ever
sees NOT, V and V⁺ under Boolean controls holds one of four states: |0⟩,
V|0⟩, |1⟩ and V|1⟩. `ncv_pkg` encodes these states as the numbers 0, 1, 2
and 3, and each gate becomes an addition modulo 4 on the target line:

- V adds 1;
- V⁺ subtracts 1;
- NOT adds 2.

This encoding is exact as long as every control line is in a basis state when
it is used. `ncv_gate` reports that on `ctrl_ok` and asserts it in
simulation.

Line D receives V from C ⊕ D, B and A, then V⁺ from R = A ⊕ B ⊕ C ⊕ D. Its
net rotation is (A + B + (C ⊕ D)) − (A ⊕ B ⊕ C ⊕ D) quarter turns, which is
always even. It equals 2·maj(A, B, C ⊕ D), so D ends as the Boolean
D ⊕ maj(A, B, C ⊕ D) = S. The `classical` output confirms that every line
ends Boolean, and the testbench checks this for all 32 inputs.

## Adders built from one gate per bit

- `ft_full_adder` is one FTRA with inputs (A, B, Cin, 0, 0). R is the sum
  and S the carry. P, Q and T are garbage.
- `ft_rca` chains N of these full adders (N = 4 by default). The S output of
  stage i is the C input of stage i+1.
- `ft_csa` is a 4-bit carry-skip adder:
  - Four FTRA full adders form the ripple chain.
  - A Feynman gate copies cin. One copy enters the chain and the other goes
    to the skip multiplexer.
  - Three Fredkin AND gates combine the four Q (propagate) outputs into the
    group propagate `skip`.
  - A final Fredkin gate computes `cout = skip ? cin : carry4`.

  The sum still ripples; only the carry out is bypassed.
- `ft_full_subtractor` keeps the published single-gate subtractor
  arrangement: the FTRA gets (C, B, A, 0, 0), R is the difference and S is
  labelled borrow-out. **Caution:** with D = 0, S is the majority of the
  three inputs whatever their order. It is therefore the carry function, not
  the borrow of A − B − C. It equals that borrow only if the A line carries
  A′. The module implements the connections as published, and its testbench
  checks exactly this behaviour. For a real subtractor, use the ALU below,
  which adds the missing inversions.

## The ALU slice, and how C0, C1, C2 program it

This is the least obvious part of the design. Each slice (`ft_alu_bit`) has
seven gates: one FTRA, two Fredkin gates and four Feynman gates. It has four
constant-0 inputs and five garbage outputs. Three control inputs C0, C1 and
C2 enter gates as control lines. Because control lines leave a reversible gate
unchanged, each slice hands the controls on to the next slice on its
`ctrl_out` port instead of fanning them out.

```
F2G (B, 0, 0)               -> b1, b2, b3            three copies of B
F2G (C0, A, b3)             -> C0, A^C0, B^C0        C0 inverts both operands
FRG (A^C0, B^C0, 0)         -> A^C0, n, (A^C0)(B^C0)
FTRA(Cin, b1, A^C0, 0, b2)  -> g, g, R, S=cout, T
F2G (C0, R, T)              -> C0, R^C0, g           undoes the inversion in R
F2G (C1, n, (A^C0)(B^C0))   -> C1, g, C1 ^ (A^C0)(B^C0)
FRG (C2, R^C0, logic)       -> C2, g, out = C2 ? R^C0 : logic
```

These gates produce two results:

- **Sum bit.** R ^ C0 = Cin ⊕ B ⊕ (A ⊕ C0) ⊕ C0 = A ⊕ B ⊕ Cin for either
  value of C0.
- **Carry or borrow out.** S = maj(Cin, B, A ⊕ C0). With C0 = 0 this is the
  carry of A + B + Cin. With C0 = 1 it is maj(A′, B, Cin), the borrow of
  A − B − Cin.

The logic path computes (A ⊕ C0)(B ⊕ C0):

- With C0 = 0 it is AB.
- With C0 = 1 it is A′B′, which is NOR by De Morgan.

C1 then optionally inverts that result.

| C0 | C1 | C2 | out | cout |
|---|---|---|---|---|
| 0 | 0 | 0 | A·B | (unused) |
| 0 | 1 | 0 | ¬(A·B) | (unused) |
| 1 | 0 | 0 | ¬(A+B) | (unused) |
| 1 | 1 | 0 | A+B | (unused) |
| 0 | x | 1 | A ⊕ B ⊕ Cin (add) | carry |
| 1 | x | 1 | A ⊕ B ⊕ Cin (subtract A − B − Cin) | borrow |

`ft_pkg` names these codes (`ALU_AND`, `ALU_NAND`, `ALU_NOR`, `ALU_OR`,
`ALU_ADD`, `ALU_SUB`) and defines the `alu_ctrl_t` struct. The function table
published with the original ALU lists the same six functions, but with the
column headings C0 and C2 exchanged relative to the gate wiring. The RTL
follows the wiring, and so does the table above.

`ft_alu` cascades N slices (N = 4 by default; the published design leaves
the width open). The `cout` of slice i becomes the `cin` of slice i+1, and
`ctrl_out` of slice i feeds `ctrl` of slice i+1. For subtraction, the first
borrow-in is `cin`, and cin = 0 gives A − B.

## QCA realisation and clock zones

`ftra_qca` builds the FTRA from 27 majority voters, MV(a, b, c) = ab + bc +
ca, plus inverters (`qca_maj`). A voter with one input at 0 is an AND gate,
and with one input at 1 an OR gate. Every XOR is the three-voter group in
`qca_xor`. The groups are:

- Q = A ⊕ B (3 voters)
- AB (1 voter), then AB ⊕ D (3)
- A′B (1 voter), then A′B ⊕ D (3)
- C ⊕ D (3)
- (A ⊕ B)(C ⊕ D) (1 voter), then R = Q ⊕ (C ⊕ D) (3)
- S = product ⊕ (AB ⊕ D) (3)
- product ⊕ (A′B ⊕ D) (3)
- T = that result ⊕ E (3)

That is 27 voters in total.

QCA is clocked in zones, four phases per clock cycle, and the published
layout delivers all five outputs 12 zones after its inputs. The model treats
one rising edge of `clk` as one zone. It evaluates the voter network in the
first zone and moves the results through a `ZONES`-deep register chain
(`ZONES = 12`). Outputs therefore appear exactly 12 edges after their inputs,
and a new input vector can be applied on every edge. Where each voter sits
among the zones is not modelled. `rst_n` is an active-low synchronous reset
that clears the chain.

Cells, wire crossings and the four-phase clock itself have no logic function
and are not modelled. The published work also measured fault tolerance by
injecting single missing-cell and extra-cell defects into a device-level
model. That needs defect behaviours from an external device library, so it is
not part of this RTL.

## Checking for faults with parity

Every circuit brings out all its garbage outputs. For each of them, the XOR of
all outputs equals the XOR of all non-constant inputs. For the ALU, the
non-constant inputs are {a, b, cin, ctrl} and the outputs are {out, cout,
ctrl_out, garbage}. A checker that compares the two parities therefore flags
any single corrupted signal inside the circuit. The testbenches check this
property on every vector. The RTL contains no such checker, because the
design leaves it to whatever consumes the outputs.

## Top level

`ft_qca_top` places all the circuits side by side, each with its own ports:

- `alu_*`: the ALU, with `ALU_N` = 4;
- `fa_*`: the full adder;
- `fs_*`: the full subtractor;
- `rca_*`: the ripple carry adder, with `RCA_N` = 4;
- `csa_*`: the carry-skip adder;
- `qca_in` / `qca_out`: the QCA FTRA, with `QCA_ZONES` = 12. The bit order
  is {A,B,C,D,E} → {P,Q,R,S,T}.
- `ncv_in` / `ncv_out` / `ncv_classical`: the quantum-gate FTRA, with the
  same bit order.

The QCA FTRA is the only part that uses `clk` and `rst_n`. Everything else is
combinational.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The packages must be given first. For
example, to run the end-to-end test at the default sizes:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ft_pkg.sv rtl/ncv_pkg.sv tb/ftra_ref_pkg.sv tb/tb_ft_qca_top.sv \
    --top-module tb_ft_qca_top
./obj_dir/Vtb_ft_qca_top
```

The same command works for any other testbench: replace the last file and
the top module name.

| testbench | what it covers |
|---|---|
| `tb_ftra` | all 32 vectors against the truth table, parity, bijectivity |
| `tb_f2g`, `tb_frg`, `tb_qca_maj` | exhaustive check of the primitive gates |
| `tb_ft_full_adder`, `tb_ft_full_subtractor` | exhaustive check, parity |
| `tb_ft_rca`, `tb_ft_csa` | all 512 operand/carry combinations; skip taken 32 times |
| `tb_ft_alu_bit` | all 8 control codes × 8 operand vectors, control pass-through, parity |
| `tb_ft_alu` | 4-bit ALU, all operands, six functions, carry and borrow; a 16-bit instance with 3000 random vectors |
| `tb_ncv_gate`, `tb_ftra_ncv` | gate action on all four line states; quantum-gate FTRA against the truth table, lines stay Boolean |
| `tb_ftra_qca` | 12-zone latency measured exactly; 244 vectors streamed one per clock |
| `tb_ftra_adder_sweep` | FTRA as a full adder (D = E = 0, A, B, C swept) in all three realisations |
| `tb_ft_qca_top` | 3000 cycles of random and directed traffic through everything; counts that every mechanism occurs |

`tb/ftra_ref_pkg.sv` holds the reference truth table of the FTRA as three
32-bit columns for R, S and T. Bit i of a column belongs to input vector i,
read as the binary number ABCDE. The reference values are P = A and Q = A ⊕ B.

## Where this RTL departs from, or goes beyond, the published design

- **FTRA S and T.** Two slightly different sets of formulas were published
  for S and T. The RTL uses the set that matches the published truth table
  in every row and keeps the gate reversible and parity preserving.
- **ALU control naming.** C0 and C2 follow the gate wiring, as explained
  above.
- **ALU width.** The default of 4 bits is a choice of this design.
- **Full subtractor.** It is kept as published, so its borrow output is
  really a majority function.
- **Ripple carry adder, E inputs.** The E inputs of stages 1–3 are tied to 0.
  The drawing can also be read as chaining each stage's T output into the
  next stage's E. Either reading gives the same sum and carry, because E
  reaches only T.
- **QCA timing.** All 12 zones of latency are modelled as one register chain
  rather than by placing voters in zones.
