# Reversible 2x2 Vedic multipliers

A reversible logic gate maps its n inputs one-to-one onto its n outputs, so no
information is lost while it computes. Such gates are the building blocks of
quantum circuits and of circuits meant to avoid the energy cost of erasing
bits. This RTL builds a 2-bit by 2-bit unsigned multiplier from reversible
gates only, in three variants. All three follow the Vedic "vertically and
crosswise" (Urdhva-Tiryagbhyam) method: every partial product is formed at
once and then summed column by column.

All modules are combinational. There is no clock, no reset and no register.

## The multiplication method

For operands `A[1:0]` and `B[1:0]` the product `VM[3:0]` is formed in three
columns:

| column | partial products                 | addition                 | product bit        |
|--------|----------------------------------|--------------------------|--------------------|
| right  | `PP0 = A0·B0` (vertical)         | none                     | `VM[0] = PP0`      |
| middle | `PP2 = A1·B0`, `PP1 = A0·B1` (cross) | `{C1, S1} = PP2 + PP1` | `VM[1] = PP2 ^ PP1` |
| left   | `PP3 = A1·B1` (vertical)         | `{C2, S2} = PP3 + C1`    | `VM[2] = PP3 ^ C1`, `VM[3] = PP3·C1` |

For 3 x 3: all four partial products are 1. The middle column gives sum 0 and
carry 1, and the left column gives sum 0 and carry 1. The product is
`1001` = 9. The middle carry `C1` is 1 only for 3 x 3, which is also the
only product with `VM[3]` set.

## Reversible gates

| gate     | module         | inputs → outputs                                   | role in the multipliers |
|----------|----------------|----------------------------------------------------|-------------------------|
| Feynman  | `feynman_gate` | (A,B) → (A, A⊕B)                                   | reversible XOR |
| Toffoli  | `toffoli_gate` | (A,B,C) → (A, B, C⊕AB)                             | reversible AND when C = 0 |
| Peres    | `peres_gate`   | (A,B,C) → (A, A⊕B, C⊕AB)                           | half adder when C = 0 |
| BVF      | `bvf_gate`     | (A,B,C,D) → (A, A⊕B, C, C⊕D)                       | two XORs in one gate |

Reversible gates have no fan-out. When an operand bit is needed by two gates,
the first gate passes it through on one of its outputs, and the second gate
takes that copy. A gate output that feeds nothing else is a *garbage* output.
A target input tied to 0 so that a gate computes an AND is a *constant input*.

## The three architectures

All three form the partial products the same way, with Toffoli gates whose
target input is 0, and chain the operand bits through them:

- TG1 (A0, B0, 0) gives `VM[0] = PP0` and passes A0 and B0 on.
- TG2 (A1, B0 from TG1, 0) gives PP2 and passes A1 on. Its B0 copy is garbage.
- TG3 (A0 from TG1, B1, 0) gives PP1 and passes B1 on. Its A0 copy is garbage.
- A fourth Toffoli gate (A1 from TG2, B1 from TG3, 0) gives PP3. Both of its
  pass-through outputs are garbage.

They differ in how they add the middle and left columns.

**Architecture 1 (`vedic2x2_arch1`): six Toffoli and two Feynman gates.**
TG5 forms PP3. TG4 (PP2, PP1, 0) forms the carry C1 and passes PP2 and PP1 on
to Feynman gate FG1, which gives `VM[1]`. TG6 (C1, PP3, 0) gives `VM[3]` and
passes C1 and PP3 on to FG2, which gives `VM[2]`.

**Architecture 2 (`vedic2x2_arch2`): six Toffoli gates and one BVF gate.**
It is the same as architecture 1, except that one BVF gate takes
(PP2, PP1, C1, PP3) from TG4 and TG6 and performs both XORs in place of FG1
and FG2.

**Architecture 3 (`vedic2x2_arch3`): four Toffoli and two Peres gates.**
TG4 forms PP3. Peres gate PG1 (PP2, PP1, 0) is the middle column's half
adder: `VM[1]` and C1. PG2 (C1, PP3, 0) is the left column's half adder:
`VM[2]` and `VM[3]`. It needs no separate gates for the carries, so it is the
cheapest variant.

`vedic_mult_top` instantiates all three on the same operands and brings out
each product and each garbage vector on ports of its own. Use one architecture
on its own by instantiating its module directly.

### Cost comparison

The gate counts are for the netlists as built here. Quantum cost uses the
usual figures: Toffoli 5, Feynman 1, Peres 4, BVF 2.

| architecture | gates | constant inputs | garbage outputs | quantum cost |
|--------------|-------|-----------------|-----------------|--------------|
| 1            | 8     | 6               | 6               | 32           |
| 2            | 7     | 6               | 6 (see below)   | 32           |
| 3            | 6     | 6               | 6               | 28           |

The original comparison lists seven garbage outputs for architecture 2. Counted from its
netlist it has six: TG2.Q, TG3.P, TG5.P, TG5.Q, BVF.P and BVF.R. This RTL keeps
the netlist and the six.

## Interfaces

Types come from `rev_mult_pkg`: `operand_t` is `logic [1:0]` and `product_t`
is `logic [3:0]`. Each architecture module has these ports:

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `a`, `b`  | in  | 2     | unsigned operands |
| `vm`      | out | 4     | product `a*b` |
| `garbage` | out | 6     | `{C1, A1·B0, B1, A1, A0, B0}`: the gate outputs that feed nothing else |

The garbage bit order is the same in all three architectures. Its top bit is
the middle-column carry C1. Four garbage bits are operand pass-throughs, so a
synthesis tool reports them as wired straight to inputs. That is in the
nature of reversible gates, not a wiring fault. Leave the garbage ports
unconnected if they are not needed.

## How far the RTL follows the source design, and where it departs

- **Taken from the source:** the gate equations of Toffoli, Feynman and Peres
  gates, and the gate lists of the three architectures. Also which partial
  product, carry and product bit each gate produces, and the cost totals.
- **This design's choices:**
  - Which pass-through copy of A0/B0 feeds TG2 and which feeds TG3. This does
    not change any result.
  - The order of C1 and PP3 at PG2's inputs. The Peres outputs used are
    symmetric in these inputs.
  - All constant inputs are 0.
  - The garbage outputs are brought out as ports.
- **BVF equations:** the BVF gate is described only as a reversible double
  XOR. The standard definition (two CNOTs side by side) is used, which agrees
  with its quantum cost of 2.
- **Gate naming:** in the architecture 1 schematic, the two XOR gates are
  labelled as Peres gates but drawn with two inputs. The gate count and cost
  totals match Feynman gates, so Feynman gates are used.
- **Not built:** the transistor-level (MOS) circuits of the gates. Only their
  logic function is given here.
- **Timing:** no delay or speed is specified. The RTL has no timing of its
  own, and the testbenches wait 1 ns after each operand change.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- **Gate testbenches:** every input vector is checked against the gate
  equation, written in a different form than in the RTL. Reversibility is
  checked in two ways: all output vectors differ, and the inverse mapping
  recovers the inputs. For the self-inverse gates, the inverse is a second copy
  of the gate.
- **Architecture testbenches:** all 16 operand pairs, and the pairs shown in
  the reference waveforms (0x0, 3x3, 2x3, 2x2, 2x1), are checked against
  integer multiplication. Every garbage bit is checked against its expected
  signal. With its constants fixed, the network must still be one-to-one, so
  the 16 (product, garbage) vectors are checked to differ.
- **`vedic_mult_top_tb`:** runs the top at its defaults. It applies the
  waveform pairs, all 16 pairs and 200 random pairs, and checks all three
  products and their agreement. It counts how often the middle-column carry C1
  and the product MSB occur in each architecture. Either one never occurring
  counts as a failure.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_mult_pkg.sv \
    tb/vedic_mult_top_tb.sv --top-module vedic_mult_top_tb
./obj_dir/Vvedic_mult_top_tb
```

Replace `vedic_mult_top_tb` with any other testbench name to run that one.
Lint with `verilator --lint-only -Wall -Irtl rtl/rev_mult_pkg.sv rtl/<module>.sv`.
