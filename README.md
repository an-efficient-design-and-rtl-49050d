# Reversible combinational circuits: comparator, decoders and multiplexer

In a reversible circuit, every gate maps its inputs one-to-one onto its outputs. No
information is erased, which is the property sought for low-power, quantum and nanotechnology
logic. The price is extra lines. Constant inputs (ancillas) feed in fixed 0s and 1s. Outputs
that nobody needs (garbage) must still come out, so that the mapping stays invertible. Designs
are judged by their quantum cost (a weighted gate count), their garbage outputs and their
constant inputs.

This RTL models four small reversible circuits at gate level:

| Circuit | Gates | Quantum cost | Constant inputs | Garbage lines brought out |
|---|---|---|---|---|
| 1-bit comparator | 1 NOT, 1 Peres, 2 Feynman (CNOT) | 7 | 2 (one 0, one 1) | 1 |
| 3-to-8 decoder | 1 Feynman, 6 MFG | 25 | 7 (one 1, six 0) | 6 |
| 4-to-16 decoder | 3-to-8 decoder + 8 MFG | 57 | 15 | 14 |
| 8-to-1 multiplexer | 7 Fredkin | 35 | 0 | 14 |

Each reversible gate is its own SystemVerilog module, and each circuit instantiates them exactly
as the gate network is drawn. The netlist therefore keeps the reversible structure, garbage lines
included. When synthesized for an ordinary FPGA or ASIC, this logic collapses into the usual
AND/OR/XOR gates. The RTL checks the *logic* of the reversible designs and lets them be used as
drop-in combinational blocks. It does not make a conventional chip reversible.

Everything is purely combinational. There are no clocks, resets or registers, and no
parameters: every size is fixed by the circuit.

## The gates

All gates pass their first input (the control) straight through to their first output.

- **Feynman / CNOT** (`feynman_gate`, cost 1): `p = a`, `q = a ^ b`. With `b = 1` it produces
  `a` and `~a`. That is how the decoder starts, and how the comparator turns an XNOR into an XOR.
- **Peres** (`peres_gate`, cost 4): `p = a`, `q = a ^ b`, `r = (a & b) ^ c`. With `c = 0` it
  gives the XOR and the AND of two bits at once.
- **Fredkin** (`fredkin_gate`, cost 5): a controlled swap. `q = a ? c : b`, `r = a ? b : c`.
  Used as a 2-to-1 selector: the select drives `a` and `q` carries the chosen input.
- **MFG** (`mfg_gate`, cost 4): the decoder's steering gate. Every MFG in the decoders has its
  middle input tied to 0. With control `a` and a product term `t` on `c`, it returns `a`, `a & t`
  and `~a & t`. This turns one product term into two longer ones. The source design gives only
  the MFG's name, its cost of 4 and these three output roles, not its full mapping. This RTL
  gives it the controlled-swap mapping, which is reversible and has exactly those outputs when
  the middle input is 0. So `mfg_gate` and `fredkin_gate` compute the same function. They are
  kept apart because the circuits count them at different costs.

## The 1-bit comparator (`rev_comparator_1bit`)

Exactly one of three outputs is raised: `aeb` (a = b), `agb` (a > b) or `alb` (a < b). The
cheap part is that one Peres gate produces two of the three answers together:

1. `b` is inverted. A Peres gate receives `(a, ~b, 0)` and gives `a` (the garbage line `g1`),
   `a ^ ~b` (which is XNOR(a, b), i.e. equality) and `a & ~b` (greater-than).
2. A CNOT with its target held at 1 sends the XNOR out as `aeb`. Its second output is the
   complement, `a ^ b`.
3. A second CNOT, controlled by `a & ~b` and targeting `a ^ b`, passes its control out as `agb`.
   It turns its target into `(a ^ b) ^ (a & ~b) = ~a & b`, which is `alb`.

The gate count, the gate order and the constant 1 follow the original circuit. The rest is this
design's own reading:

- The Peres gate's third input is unlabeled in the original drawing, and its simulation held
  that input at 0. Here it is tied to 0 inside the module.
- The original drawing does not say which CNOT input each line enters. This RTL picks the
  connection that yields all three outputs from exactly these gates.
- The published truth table marks `alb = 1` for `a = b = 1`. That contradicts its own `aeb = 1`
  in the same row. This design gives `alb = 0`.

## The 3-to-8 decoder (`rev_decoder_3x8`)

A reversible decoder cannot fan a signal out freely, so it is built as a tree that lengthens
product terms one variable per level:

```
level 1   FG(a, 1)                 -> a, ~a
level 2   MFG(b, 0, a)             -> b, ab,   a~b
          MFG(b', 0, ~a)           -> b, ~ab,  ~a~b      (b' = b copy from the gate above)
level 3   MFG(c, 0, term) x 4      -> c, term&c, term&~c -> the 8 minterms
```

The outputs are named as in the original truth table: `p q r s t x y z` for `abc = 000 ... 111`,
with `a` as the most significant bit. The garbage lines are the two copies of `b` and the four
copies of `c`, brought out as `garbage = {c4, c3, c2, c1, b2, b1}`. The first `b` copy also
drives the second level-2 gate, as drawn in the original network. The design has seven constant
inputs: one 1 and six 0s.

In the original drawing, the labels on the level-2 product terms do not all agree with the
gates that produce them. The wiring here follows the gate functions and the truth table. Which
level-3 gate receives which level-2 term has no effect on the outputs.

## The 4-to-16 decoder (`rev_decoder_4x16`)

The source design only names this circuit and quotes its cost, 57. This RTL builds it as the
3-to-8 decoder plus one more level of eight MFGs controlled by `d`, which adds 8 × 4 = 32 to the
cost of 25. That is the quoted total. `out[i]` is high for input value `i = {a, b, c, d}`.
The garbage lines are the decoder's six plus eight copies of `d` (14 in all). The garbage count
quoted for this decoder (3) cannot be reached by this construction. The quoted garbage figures
for the decoders are not consistent with the 3-to-8 decoder's own description either, so the
cost figure was the one followed.

## The 8-to-1 multiplexer (`rev_mux_8x1`)

This is a three-level tree of Fredkin gates. Each gate's middle output is `S'·X + S·Y`:

```
s0:  (a,b)->O1  (c,d)->O2  (e,f)->O3  (g,h)->O4
s1:  (O1,O2)->O5           (O3,O4)->O6
s2:  (O5,O6)->z
```

So `z = data[{s2, s1, s0}]` with `a` as data input 0. The other two outputs of gate *k* are
garbage `G(2k-1)` (a copy of the select) and `G(2k)` (the data line not selected). They are
brought out as `garbage[k-1] = Gk`. Because a Fredkin gate only moves bits around, the eight data
bits always appear exactly once among `z` and the even-numbered garbage lines. The testbench
checks this.

The published truth table for this multiplexer lists `s0` as the *most* significant select
bit. The tree and its equations (s0 = 0 gives O1 = a, then s1 = 0 gives O5 = a, then s2 = 0
gives z = a) place `s0` at the first level. That makes it the least significant bit, and this
RTL follows the tree. If you need the other order, swap `s0` and `s2` at the instance.

## The top level (`rev_combinational_top`)

The four circuits are independent. The top places them side by side under the prefixes `cmp_`,
`dec3_`, `dec4_` and `mux_`, with every garbage line brought out:

- Decoder outputs are packed so that bit *i* belongs to input value *i*.
- `dec3_in` is `{a, b, c}`.
- `mux_d[i]` is data input *i*, and `mux_sel` is `{s2, s1, s0}`.

## Not included

- An 8×8 reversible Wallace-tree multiplier and a reversible 16-bit adder were mentioned
  alongside these circuits. No structure for them was given, so they are not modelled here.
- The quantum-cost, garbage and gate-count comparisons against earlier designs are an analysis
  of gate netlists. They are not behaviour that RTL can reproduce. The table at the top gives the
  figures for the netlists here.

## Files

```
rtl/feynman_gate.sv  peres_gate.sv  fredkin_gate.sv  mfg_gate.sv      reversible gates
rtl/rev_comparator_1bit.sv  rev_decoder_3x8.sv  rev_decoder_4x16.sv  rev_mux_8x1.sv
rtl/rev_combinational_top.sv                                        all four side by side
tb/tb_<module>.sv                                                   one testbench per module
```

## Simulating

Each testbench checks itself against behavioural references written independently of the gate
network: relational operators, shifts and bit selects, plus permutation and self-inverse checks
for the gates. Each one ends by printing `TB_RESULT checks=N failures=M`. The gate and circuit
testbenches are exhaustive. The multiplexer testbench also uses one-hot, inverted one-hot and
random data words. The top-level testbench sweeps all four circuits together for 2048 steps. It
counts each comparator outcome, each decoder line and each multiplexer input, and fails if any
of them never occurs.

```sh
verilator --binary --timing --assert -Irtl --top-module tb_rev_combinational_top \
    tb/tb_rev_combinational_top.sv rtl/*.sv
./obj_dir/Vtb_rev_combinational_top
```

Replace the module name to run any other testbench. For lint, run
`verilator --lint-only -Wall rtl/<module>.sv -Irtl`. Each run takes well under a second.
