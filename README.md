# Reversible BCD to seven segment decoder

This design turns a 4-bit BCD digit into the seven segment drive signals A..G of an
LED display. Every gate in it is a *reversible* gate. A reversible gate has as many
outputs as inputs, and no two input patterns give the same output pattern, so the
inputs can always be recomputed from the outputs. Reversible logic matters for
ultra-low-power, adiabatic and quantum circuits, because a gate that erases no
information has no lower bound on the heat it must dissipate.

It follows the paper *Design and Implementation of BCD to Seven Segment Display
Decoder using Reversible Decoder on FPGA*. That paper built the decoder from Fredkin
gates and mapped it onto a Spartan-3E. The RTL here is a synthesizable,
gate-by-gate model of that circuit. On an FPGA or in a standard-cell flow the
synthesizer flattens it to ordinary logic. The point of writing it this way is that
the netlist keeps the structure, the gate count and the garbage lines of the
reversible circuit, and each one can be checked in simulation.

## How the circuit works

```
          en=1
  I[3:0] ──► rev_dec4to16 ──► m[0..15] (one-hot minterms of I)
                                 │
                 m0..m9 ──► rev_fanout (Feynman copies, one per user)
                                 │
                 per segment ──► rev_or_n (chain of Fredkin OR gates)
                                 │
                (COMMON_ANODE) ──► rev_not_gate ──► A B C D E F G
```

1. A reversible 4-to-16 decoder turns the input into 16 one-hot lines. Line k is
   high exactly when I = k, so each line is one minterm of the input.
2. A segment is lit by a fixed set of digits, so each segment is the OR of those
   minterms (set bits of `SEG_MINTERMS` in `rtl/rev_seg7_pkg.sv`):

   | segment | minterms            | OR gates |
   |---------|---------------------|----------|
   | A       | 0 2 3 5 7 8 9       | 6 |
   | B       | 0 1 2 3 4 7 8 9     | 7 |
   | C       | 0 1 3 4 5 6 7 8 9   | 8 |
   | D       | 0 2 3 5 6 8         | 5 |
   | E       | 0 2 6 8             | 3 |
   | F       | 0 4 5 6 8 9         | 5 |
   | G       | 2 3 4 5 6 8 9       | 6 |

3. Reversible logic forbids fan-out: a gate output may drive only one gate input.
   A minterm used by several segments is therefore copied first. Minterm 8 goes to
   all seven segments, and minterm 0 to six of them. The copies come from Feynman
   gates with one input tied to 0.
4. Minterms 10..15 are not valid BCD and belong to no segment. Those six codes
   leave the display dark.

### Gate library

All gates are 3-in/3-out unless noted. The "'" mark means complement.

| module | gate | function | cost |
|--------|------|----------|------|
| `fredkin_gate` | Fredkin (controlled swap) | P = A, Q = A'B ⊕ AC, R = A'C ⊕ AB | 5 |
| `feynman_gate` | Feynman / CNOT, 2×2 | P = A, Q = A ⊕ B | 1 |
| `rev_not_gate` | NOT, 1×1 | P = A' | 0 |
| `rev_and_gate` | Fredkin with C = 0 | R = xy (Q = x'y, P = x) | 5 |
| `rev_or_gate`  | Fredkin with C = 1 | Q = x + y (R = x' + y, P = x) | 5 |

The "cost" column is the usual quantum cost, the number of 1×1 and 2×2 primitive
operations that make up the gate. The Fredkin gate is a controlled swap. With A = 0,
B and C pass straight through. With A = 1 they are exchanged. Tie one data input to
a constant and the gate becomes an AND or an OR of the other two. The other two
outputs then become *garbage*: they are needed to keep the gate reversible, but they
carry no result.

### The reversible decoder tree (the subtle part)

`rev_dec2to4` is three Fredkin gates, with the more significant select bit `in1`:

| gate | inputs (A, B, C) | P | Q | R |
|------|------------------|---|---|---|
| 1 (`rev_and_gate`) | in1, en, 0 | garbage g[0] = in1 | INT = in1'·en | in1·en |
| 2 | in0, 0, INT | in0 → gate 3 | out[1] = in1'·in0·en | out[0] = in1'·in0'·en |
| 3 | in0 (from gate 2), 0, in1·en | garbage g[1] = in0 | out[3] = in1·in0·en | out[2] = in1·in0'·en |

Three details make this work without fan-out:

- Gate 1's "garbage" Q output (x'y) is not thrown away. It is the complement
  product INT that gate 2 needs.
- The select bit `in0` is not copied. It enters gate 2, leaves on gate 2's P output,
  and only then enters gate 3.
- The enable works through gate 1. With `en` = 0, gate 1 outputs 0 on both Q and R,
  so all four outputs are low.

Larger decoders grow by one select bit per stage (`rev_dec_stage`). Each output
d[k] of the smaller decoder goes into a Fredkin gate with inputs (sel, 0, d[k]).
That gate's Q = sel·d[k] becomes output 2k+1, and its R = sel'·d[k] becomes output
2k. As in the 2-to-4 decoder, `sel` passes from each gate's P output to the next
gate's A input. So a stage adds one garbage line, and it uses one gate per line:

- `rev_dec3to8` is `rev_dec2to4` on in[2:1], followed by a 4-gate stage on in[0].
- `rev_dec4to16` is `rev_dec3to8` on in[3:1], followed by an 8-gate stage on in[0].

The result is an ordinary one-hot decoder: `out[k]` is high when `in == k` and `en`
is 1. The garbage outputs carry the select bits, one each, which is exactly the
information needed to undo the decode. `rev_dec4to16` asserts that its output is
one-hot while enabled and all zero while disabled.

### Fan-out and OR networks

`rev_fanout #(COPIES)` is a chain of COPIES−1 Feynman gates, each with B = 0. The
line passes along the P outputs, and each Q output is one copy. Nothing is wasted
as garbage. `rev_or_n #(N)` is a chain of N−1 Fredkin OR gates. The running OR
travels on the Q outputs, and each gate leaves two garbage lines.

The top module, `rev_bcd7seg`, builds all of this with generate loops from the masks
in `rev_seg7_pkg`. Constant functions there work out three things: how many copies
each minterm needs (`minterm_uses`), which copy goes to which segment (`copy_idx`),
and where that copy sits in the segment's OR chain (`term_pos`). Edit a mask and
the rest follows.

### Output polarity

At the default, `COMMON_ANODE = 0`, the outputs suit a common-cathode display: a 1
lights the segment. Set `COMMON_ANODE = 1` for a common-anode display. Each output
then passes through a reversible NOT gate, and a 0 lights the segment.

## Size

| part | gates | quantum cost |
|------|-------|--------------|
| 4-to-16 decoder | 15 Fredkin | 75 |
| minterm copies | 37 Feynman | 37 |
| segment OR chains | 40 Fredkin | 200 |
| **total** (common cathode) | 55 Fredkin + 37 Feynman | **312** |

Common anode adds 7 NOT gates, at cost 0.

There are 4 garbage lines from the decoder and 80 from the OR chains. Six decoder
outputs (minterms 10..15) are also left unused. All of them are left unconnected at
the top, so Verilator's lint reports them as unused signals. That is expected.

## Where this RTL departs from, or adds to, the paper

- **Digits 6 and 9.** The paper gives the segment functions twice: as minterm sums,
  and as a truth table. They disagree. The table lights the top bar (A) for 6 and the
  bottom bar (D) for 9. The sums, and the paper's own simulation waveform, do not.
  This design follows the sums, so 6 is drawn without its top bar and 9 without its
  tail. To get the other style, add minterm 6 to A's mask and minterm 9 to D's mask
  in `rev_seg7_pkg`. The fan-out and OR chains re-derive themselves, and the
  expected tables in the two top-level testbenches must be updated to match.
- **Codes 10..15.** The paper treats these as don't-cares. Here they blank the
  display, which is what the minterm structure gives.
- **Cost figures.** The paper's cost table lists quantum costs of 11, 31 and 71, and
  3, 4 and 5 garbage outputs, for its 2-to-4, 3-to-8 and 4-to-16 decoders. The
  circuit built here uses 3, 7 and 15 Fredkin gates. That is quantum costs of 15,
  35 and 75, with 2, 3 and 4 garbage lines. The circuit follows the paper's 2-to-4
  schematic and its "followed by 4 / 8 Fredkin gates" rule for the larger decoders.
- **This design's own choices:**
  - the chained arrangement of the Feynman copies and of the OR gates, where the
    paper gives only the gate types;
  - which copy of a minterm feeds which segment;
  - the bit order of the decoder inputs;
  - the `COMMON_ANODE` parameter. The paper describes the common-anode inversion
    but builds the common-cathode decoder.
- **Not modelled:**
  - the LED display itself;
  - the FPGA timing. The paper reports pad-to-pad delays of roughly 7.5 to 9.9 ns on
    a Spartan-3E, against roughly 7 to 8.9 ns for a conventional decoder.

  The RTL is purely combinational: there is no clock and no reset.

## Files

- `rtl/rev_seg7_pkg.sv`: segment minterm masks, the `seg7_t` struct and the
  constant functions that wire the fan-out.
- `rtl/fredkin_gate.sv`, `feynman_gate.sv`, `rev_not_gate.sv`,
  `rev_and_gate.sv`, `rev_or_gate.sv`: the gates.
- `rtl/rev_dec2to4.sv`, `rev_dec_stage.sv`, `rev_dec3to8.sv`,
  `rev_dec4to16.sv`: the decoder tree.
- `rtl/rev_fanout.sv`, `rev_or_n.sv`: copy and OR networks.
- `rtl/rev_bcd7seg.sv`: the top. Ports `i[3:0]` and `a`..`g`; parameter
  `COMMON_ANODE`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by printing
  `TB_RESULT checks=N failures=M`. The gate and decoder benches are exhaustive. They
  also check that the garbage outputs hold the values that make the circuit
  reversible, and, for the Fredkin and Feynman gates, that two gates in a row give
  back the inputs.
- `tb/tb_rev_bcd7seg.sv`: runs every input code through both output polarities.
  It counts the digits shown and the codes blanked on each polarity.
- `tb/tb_rev_bcd7seg_full.sv`: the default top, stepped through 0..9, then 10..15.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rev_seg7_pkg.sv \
    tb/tb_rev_bcd7seg.sv --top-module tb_rev_bcd7seg
./obj_dir/Vtb_rev_bcd7seg
```

Replace `tb_rev_bcd7seg` with any other testbench name to run it. The package must
come first on the command line. Every testbench finishes in well under a second.
