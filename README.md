# Reversible-logic binary adder: NGFE full adder, ripple carry and carry select adders

A conventional full adder destroys information: from its sum and carry you cannot tell which
of the inputs were 1. Reversible logic avoids this. Every gate maps its input vector one-to-one
onto an output vector of the same width, so the inputs can always be recovered from the outputs.
The price is extra wiring: constant inputs feed the gates, and "garbage" outputs carry the
intermediate values that make the mapping reversible but are not part of the result.

This design builds a 4-bit carry select adder out of reversible gates. Its building block is the
**NGFE full adder**: two *New Gates* (NG) and one *Feynman gate* (FE), three gates per bit. Four
NGFE full adders make a 4-bit ripple carry adder. Two such ripple adders, one assuming a carry-in
of 0 and one assuming 1, together with five 2:1 multiplexers, make the 4-bit carry select adder.
That adder is the top of the design.

Everything is combinational: there is no clock, no register and no reset.

## Module hierarchy

```
csa_ngfe                  4-bit carry select adder (top)
├── rca_for_cin0 : rca_ngfe   ripple adder, carry-in tied to 0
│   └── g_stage[0..3].fa : fa_ngfe
│       ├── ng1, ng2 : new_gate
│       └── fe2      : feynman_gate
├── rca_for_cin1 : rca_ngfe   ripple adder, carry-in tied to 1
├── for_s[0..3].mux : mux2x1  sum-bit selection
└── for_cout : mux2x1         carry-out selection
ngfe_pkg                  shared constants (garbage outputs per full adder, adder width)
```

The gate count of the top is 2 × 4 × 3 = 24 reversible gates plus 5 multiplexers.

## The two reversible gates

**Feynman gate** (`feynman_gate`), a controlled NOT, 2 inputs and 2 outputs:

| output | function |
|---|---|
| p | a |
| q | a ⊕ b |

It is its own inverse: feeding p, q into a second Feynman gate gives back a, b.

**New Gate** (`new_gate`), 3 inputs and 3 outputs:

| output | function |
|---|---|
| p | a |
| q | ab ⊕ c |
| r | a'c' ⊕ b' |

The equations are the usual definition of these two gates in the reversible-logic literature. The
adder structure fixes only their names and how they are wired, so the equations are an
assumption. The strongest support for them is that, wired as described below, they give exactly a
full adder.

## How the NGFE full adder works

`fa_ngfe` has operand bits `a`, `b` and carry-in `c`. Each New Gate has its third input tied to 0,
and with c = 0 a New Gate reduces to q = ab and r = a' ⊕ b' = a ⊕ b. The three gates then compute:

| gate | inputs | useful outputs |
|---|---|---|
| ng1 | a, b, 0 | q = ab, r = a ⊕ b |
| ng2 | c, a ⊕ b, 0 | q = c(a ⊕ b), r = a ⊕ b ⊕ c = **sum** |
| fe2 | c(a ⊕ b), ab | q = c(a ⊕ b) ⊕ ab = **carry** |

The carry step relies on one fact: ab and c(a ⊕ b) are never both 1. When a = b = 1, a ⊕ b is 0.
Their exclusive-or therefore equals their OR, and ab + c(a ⊕ b) is the majority function
ab + bc + ca.

The module's ports keep the single-letter names of the published schematic:

| port | dir | meaning |
|---|---|---|
| a, b | in | operand bits |
| c | in | carry-in |
| r | out | sum |
| u | out | carry-out |
| p | out | garbage: a |
| q | out | garbage: c |
| s | out | garbage: a ⊕ b |
| t | out | garbage: c(a ⊕ b) |

Which of p, q, s and t carries which garbage value is this design's reading of the schematic.
Only r and u matter for addition. The six outputs together are distinct for all eight input
combinations, so the full adder loses no information. The testbench checks this.

In the schematic, the full adder is a 6-input, 6-output block whose inputs are named a to f.
Three of those inputs (d, e, f) drive no gate. The module leaves them out and ties the two
constant-0 gate inputs internally.

## Ripple carry adder

`rca_ngfe` chains `WIDTH` full adders (default 4). Stage i adds `a[i]`, `b[i]` and the carry
`c[i]`. Its carry-out is `c[i+1]`, with `c[0] = cin` and `cout = c[WIDTH]`. The carry has to pass
through every stage, so the path from `cin` to `cout` goes through 2 × `WIDTH` gates: ng2 and
fe2 of each stage. ng1 depends only on the operands.

The four garbage outputs of each stage are brought out on one bus. Stage i occupies
`garbage[i*4 +: 4]`, packed as `{t, s, q, p}` (`FA_GARBAGE` = 4 in `ngfe_pkg`).

## Carry select adder (top)

`csa_ngfe` removes the carry-in from the long path. Both ripple adders work on the same `a` and
`b` at the same time: `rca_for_cin0` has its carry-in tied to 0 and `rca_for_cin1` has it tied to 1.
The real `cin` only drives the select input of five `mux2x1` instances. Four of them (`for_s`)
pick the sum bits and `for_cout` picks the carry-out. Once the two ripple adders have settled, a
change of `cin` reaches the outputs through a single multiplexer.

| port | dir | width | meaning |
|---|---|---|---|
| a, b | in | WIDTH | operands |
| cin | in | 1 | carry-in, select of all five multiplexers |
| sum | out | WIDTH | a + b + cin, low bits |
| cout | out | 1 | carry-out |
| garbage0 | out | 4·WIDTH | garbage outputs of the carry-in-0 adder |
| garbage1 | out | 4·WIDTH | garbage outputs of the carry-in-1 adder |

Here the whole 4-bit word is one carry-select group: both adders cover all four bits. This is
unlike the textbook carry select adder, where the low group has only one adder and just the
upper groups are duplicated. For the 4-bit size this design targets, a single group is the
structure used. Chaining several `csa_ngfe` blocks, with each block's `cout` driving the next
block's `cin`, would give a wider multi-group adder. No such wrapper is included.

The multiplexers are ordinary (irreversible) 2:1 selects. The structure only calls for a
multiplexer. It does not say how to build one.

## Where this RTL departs from the reversible-logic ideal

- **Fan-out.** Strict reversible design forbids fan-out, but this netlist has it. Inside the full
  adder, a ⊕ b feeds ng2 and also leaves as garbage output `s`. In the carry select adder, `a` and
  `b` feed both ripple adders and `cin` feeds five multiplexers. The RTL follows the described
  structure rather than the strict rule.
- **Constant inputs.** Each full adder uses two constant-0 inputs, so the top uses 16.
- **Garbage outputs.** Each full adder produces four, so the top produces 32. They appear as
  ports so that nothing is optimised away silently, and so that the reversibility of each stage
  can be observed. A user who does not need them can leave them unconnected.
- **Synthesis.** A standard-cell flow will not keep the gates reversible. It will merge the
  New Gates and Feynman gate into ordinary XOR/AND logic. The RTL describes the function and the
  gate-level structure. It does not describe a reversible physical implementation.
- **Not included.** The design is compared against two other full adders. One is built from
  ordinary XOR/AND/OR gates. The other is built from two Peres gates, with one constant input and
  two garbage outputs. Ripple and carry select adders built from each of them are also compared.
  They are baselines, not part of this design, and are not provided. The published area, power
  and delay figures (180 nm) are properties of a physical implementation and cannot be checked
  in RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog counts a failure if a test
does not finish in time.

| testbench | what it checks |
|---|---|
| `tb_new_gate` | all 8 input vectors against the gate equations, plus that the 8 output vectors are distinct |
| `tb_feynman_gate` | all 4 input vectors, plus that two gates in series return the inputs |
| `tb_fa_ngfe` | all 8 input vectors: sum, carry, every garbage output, and distinct output vectors |
| `tb_mux2x1` | all 8 input combinations |
| `tb_rca_ngfe` | 4-bit adder over all 512 inputs, sum and garbage; an 8-bit instance with 2000 random vectors and full-length carry ripples |
| `tb_csa_ngfe` | top at default size, all 512 inputs, sum, carry and both garbage buses |

`tb_csa_ngfe` applies each operand pair with `cin` = 0 and then with `cin` = 1. It counts how
often each mechanism occurs and fails if any count is zero:

- selection of each precomputed result;
- a carry-out decided by `cin`;
- a carry rippling through all four stages;
- a carry-out of 1.

It also checks that results are valid one time unit after the inputs change, since the adder
takes no clock cycles. Each testbench was also run against a copy of its module with one
deliberate error, and every such error was detected.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl rtl/ngfe_pkg.sv tb/tb_csa_ngfe.sv --top-module tb_csa_ngfe
./obj_dir/Vtb_csa_ngfe
```

Replace `tb_csa_ngfe` with any other testbench name. The package file must come first, because
`rca_ngfe`, `csa_ngfe` and two of the testbenches import it. To lint a module on its own:

```
verilator --lint-only -Wall -Irtl rtl/ngfe_pkg.sv rtl/csa_ngfe.sv --top-module csa_ngfe
```

To change the adder width, set `WIDTH` on `csa_ngfe` or `rca_ngfe`. The default comes from
`ADDER_WIDTH` in `ngfe_pkg`. All garbage buses scale with it.
