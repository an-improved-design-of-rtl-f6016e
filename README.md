# Reconfigurable approximate adders in reversible logic

Image and video encoders can tolerate small arithmetic errors that a viewer
never sees. An adder that is allowed to be wrong in its low bits can skip most
of its switching there. The catch is that the amount of error you can afford
depends on the input. This design does not fix the error once, at design
time. Each adder has a run-time input, the **degree of approximation** (`da`).
It says how many of the least significant bit positions run in a cheap
approximate mode. With `da = 0` the adder is exact. Raising `da` trades
accuracy for less activity, one bit at a time.

The cells are built from **reversible gates**, in which no information is
discarded. Every gate has as many outputs as inputs, and each output pattern
has exactly one input pattern. Unneeded outputs are left as *garbage*, and
some inputs are tied to constants. The RTL keeps that structure at the gate
level, so the netlists can be read as reversible circuits. In an ordinary
logic flow they synthesise to normal gates.

The design contains:

| unit | module | what it is |
|---|---|---|
| reconfigurable ripple-carry adder | `rev_reconf_rca` | N dual-mode full adders (DMFA) in a chain |
| reconfigurable carry-lookahead adder | `rev_reconf_cla` | a tree of dual-mode lookahead blocks (DMCLB1/2, DMPGB1/2) |
| half adder/subtractor | `rev_half_addsub` | 2 Feynman + 2 Fredkin gates |
| full adder/subtractor | `rev_full_addsub` | 5 Feynman + 2 Fredkin + 1 TR gate |
| top | `rev_approx_top` | all four units side by side, each with its own ports |

N defaults to 8. Everything is combinational: there is no clock, no register
and no reset.

## The approximate cell and the degree of approximation

An approximate full adder simply relays its operands:

    accurate  (APP = 0):  S = A ^ B ^ Cin      Cout = AB + A Cin + B Cin
    approximate (APP = 1): S = B               Cout = A

This is right for 4 of the 8 input patterns for S and 6 of 8 for Cout. It
ignores `Cin`, so the carry chain is cut at every approximated bit. Carries
leaving the approximate region are just the top approximated `a` bit. In
silicon, the dual-mode cell also switches the supply of its exact adder off
while APP = 1. That power switch is not represented in RTL (see the limits section below).

A small decoder (`approx_decoder`) turns the binary `da` into one APP select
per bit. The select is a thermometer code, `app[i] = (i < da)`. Approximation
therefore always grows from bit 0 upward. `da` is `clog2(N+1)` bits wide
(4 bits for N = 8), and any value above N approximates every bit.

For operands `a = 0xB7`, `b = 0x5D`, `cin = 1` (exact sum 277):

| da | 0–3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|
| RCA result | 277 | 269 | 285 | 285 | 221 | 349 |
| CLA result | 277 | 285 | 285 | 285 | 477 | 349 |

Averaged over all 2^17 inputs, the mean absolute error of the RCA is exactly
2^(da-1) (0.5, 1, 2, ... 64). The CLA's is a little larger (0.63, 1.13,
2.83, 4.9, 11.4, 20.2, 46.3, 79.9 for da = 1..8). The reason is given below.

## Reconfigurable ripple-carry adder (`rev_reconf_rca`)

The RCA is N `rev_dmfa` cells in a chain, with the decoder feeding each cell's
APP. Each DMFA is an HNG gate with its fourth input tied to 0, followed by two
Fredkin gates used as 2:1 selectors.

* **HNG gate.** P = A, Q = B, R = A^B^C, S = (A^B)C ^ AB ^ D. With D = 0 it is
  a full adder whose P and Q outputs return A and B unchanged.
* **Selectors.** The returned A and B feed the approximate side of the
  selectors, so no plain-wire fan-out is needed.
* **Passing on APP.** A Fredkin gate copies its control input to output P.
  The first selector hands APP on to the second this way.

## Reconfigurable carry-lookahead adder (`rev_reconf_cla`)

This is the part that needs the most care.

### Tree shape

The CLA is a binary tree of four block types. For N = 8:

```
                         DMPGB1 [0-7]  -> C8, P, G
                  /                            \
         DMPGB1 [0-3] -> C4                 DMPGB2 [4-7]
         /          \                      /           \
 DMPGB1 [0-1]->C2  DMPGB2 [2-3]   DMPGB1 [4-5]->C6   DMPGB2 [6-7]
   /      \          /     \         /     \            /     \
CLB1 0  CLB2 1   CLB1 2  CLB2 3   CLB1 4  CLB2 5    CLB1 6  CLB2 7
 ->C1             ->C3             ->C5              ->C7
```

* **Leaves.** Each bit has a leaf that makes its propagate/generate pair and
  its sum. Even bits use DMCLB1, which also makes the carry into the odd bit
  above it. Odd bits use DMCLB2, which makes no carry.
* **Nodes.** Each level pairs the nodes below. The lower-order node of each
  pair, and the root, is a DMPGB1. From the carry into its own lowest bit it
  forms the carry into its sibling's lowest bit. The higher-order node is a
  DMPGB2, which makes no carry.
* **Carry ownership.** Every carry is made by exactly one block:
  * an odd carry C(2i+1) comes from the DMCLB1 below it;
  * a carry C(m·2^L), with m odd, comes from the level-L DMPGB1 that ends at
    bit m·2^L − 1.
* **Width.** The generate loops build this tree for any power-of-two N.

### Block equations

In each DMPGB, pair A comes from the lower half and pair B from the upper
half.

| block | accurate (APP = 0) | approximate (APP = 1) |
|---|---|---|
| DMCLB1 | P = A^B, G = AB, S = P^Cin, Cout = G + P·Cin | P = B, G = A, S = B, Cout = A |
| DMCLB2 | P = A^B, G = AB, S = P^Cin | P = B, G = A, S = B |
| DMPGB1 | P = PA·PB, G = GB + GA·PB, Cout = G + P·Cin | P = PA, G = GB, Cout = G + P·Cin |
| DMPGB2 | P = PA·PB, G = GB + GA·PB | P = PA, G = GB |

In a DMPGB1, `Cout` is always formed from the P and G the block actually
outputs, in either mode.

### Mode rule

Leaves follow the thermometer code. A DMPGB is approximated only when every
block in its fan-in cone is approximated. That is the same as requiring every
leaf it covers to be approximated, which `cla_mode_decoder` computes as an AND
over the covered leaf selects.

With `da = 3` on 8 bits, for example:

* leaves 0–2 are approximate;
* node [0-1] is approximate;
* node [2-3], node [0-3] and everything above them stay accurate.

### Why the CLA errs more than the RCA at the same `da`

Approximated leaves give P = b and G = a, so a leaf can report P = G = 1.
An accurate node above such a leaf therefore sees inputs that an exact adder
never produces. Those pairs propagate into carries of the accurate part.

Because of this, every "+" in the table is a true OR. A reversible design
often replaces G + P·Cin by G ^ P·Cin, since G and P of one exact bit are
never both 1. That shortcut is only used inside DMCLB1, where P and G come
straight from the operands and are exclusive. Replacing the ORs in the DMPGBs
with XORs would change results for some inputs at every `da` from 1 to N.

### Node numbering in the decoder output

`cla_mode_decoder` outputs its node selects flattened level by level from the
leaves up:

* level L (1 .. log2 N) starts at index `approx_pkg::node_base(N, L) = N - (N >> (L-1))`;
* node j of level L covers bits `j·2^L .. (j+1)·2^L − 1`.

## Reversible gates used

| module | gate | outputs | used as |
|---|---|---|---|
| `feynman_gate` | Feynman (CNOT) | P = A, Q = A^B | XOR; copy of A when B = 0 |
| `fredkin_gate` | Fredkin (controlled swap) | P = A, Q = A'B + AC, R = AB + A'C | 2:1 selector (Q), OR when C = 1, AND when C = 0 (R) |
| `peres_gate` | Peres | P = A, Q = A^B, R = AB^C | P/G pair (C = 0), AND-XOR |
| `tr_gate` | TR | P = A, Q = A^B, R = AB'^C | in the full adder/subtractor |
| `hng_gate` | HNG | P = A, Q = B, R = A^B^C, S = (A^B)C^AB^D | full adder (D = 0) |

The HNG and TR definitions are the standard ones from the reversible-logic
literature.

The dual-mode blocks follow three rules:

* Every 2:1 selector between the accurate and the approximate output is a
  Fredkin gate controlled by APP.
* APP is handed from one selector to the next through the gate's P output.
* Operand copies come from Feynman gates with a 0 input, or from the
  pass-through outputs of the gate that used the operand.

Gate counts per cell:

| cell | Feynman | Peres | Fredkin | HNG |
|---|---|---|---|---|
| DMFA | – | – | 2 | 1 |
| DMCLB1 | 4 | 2 | 4 | – |
| DMCLB2 | 3 | 1 | 3 | – |
| DMPGB1 | – | 3 | 4 | – |
| DMPGB2 | – | 2 | 3 | – |

These gate-level realisations of the lookahead blocks are this design's own.
Only their equations are given by the architecture.

The mode decoders are ordinary (irreversible) logic. They are a few gates
shared by the whole adder.

## Adder/subtractor cells

Both cells add when `ctrl = 0` and subtract when `ctrl = 1`. Read as a
two-bit number, `{cb, sd}` is the sum, or the two's-complement difference
(borrow, difference).

### Half adder/subtractor (`rev_half_addsub`)

* `sd = a ^ b`
* `cb = ab` when adding, `a'b` when subtracting

The cell uses FG2(b,0) to copy b, FG1(a,b) to make sd, F1(a,b,0) to make a'b
and ab, and F2(ctrl, ab, a'b) to select cb. That is 2 constant inputs,
3 garbage outputs and quantum cost 12.

### Full adder/subtractor (`rev_full_addsub`)

* `sd = a ^ b ^ cin`
* `cb = majority(a ^ ctrl, b, cin)`

This is the carry of a + b + cin, or the borrow of a − b − cin. Chaining cb
into the next cin gives a ripple adder/subtractor; the testbench checks an
8-bit chain.

It uses the stated gate mix: five Feynman, two Fredkin and one TR. The wiring
is this design's own:

* FG1 makes a ^ ctrl.
* Two Feynman gates copy b and cin.
* Two Feynman gates make sd.
* F1(b, cin, 0) gives b·cin and b'·cin.
* TR(b'·cin, 0, b) gives b + cin.
* F2(a ^ ctrl, b·cin, b + cin) selects cb.

This wiring needs four constant inputs and leaves six garbage outputs, one
more of each than the reference circuit. It also takes cb from a Fredkin gate
rather than from the TR gate.

## Top-level interface (`rev_approx_top`)

Parameters: `N` (default 8) and `DA_W` (default `$clog2(N+1)`).

| port | dir | width | meaning |
|---|---|---|---|
| `rca_a`, `rca_b` | in | N | RCA operands |
| `rca_cin` | in | 1 | RCA carry in |
| `rca_da` | in | DA_W | RCA degree of approximation |
| `rca_s`, `rca_cout` | out | N, 1 | RCA sum and carry out |
| `cla_a`, `cla_b`, `cla_cin`, `cla_da` | in | N, N, 1, DA_W | same for the CLA |
| `cla_s`, `cla_cout` | out | N, 1 | CLA sum and carry out (C_N) |
| `cla_p`, `cla_g` | out | 1 | group propagate/generate of the root block |
| `has_a`, `has_b`, `has_ctrl` | in | 1 | half adder/subtractor inputs |
| `has_sd`, `has_cb` | out | 1 | its sum/difference and carry/borrow |
| `fas_a`, `fas_b`, `fas_cin`, `fas_ctrl` | in | 1 | full adder/subtractor inputs |
| `fas_sd`, `fas_cb` | out | 1 | its sum/difference and carry/borrow |

Outputs settle combinationally after the inputs change. The worst path of the
RCA is the ripple through its accurate bits. The CLA's worst path is
logarithmic in N.

## Where this design departs from the reference architecture, and its limits

**Choices made here where the architecture leaves things open:**

* the binary encoding of `da` and its width;
* approximation growing from bit 0;
* selectors built as Fredkin gates;
* the gate-level insides of the four lookahead blocks;
* the full adder/subtractor wiring;
* four independent units in the top with separate ports.

**Width.** The architecture is described at 8 bits; one passage mentions a
16-bit CLA. Both adders are parameterised, and the testbenches also run them
at 16 bits.

**Not represented:**

* **Supply switching.** The supply switch that powers down each exact adder
  cell in approximate mode is a transistor-level element. Approximate mode is
  visible here only as the output selection, and RTL simulation says nothing
  about the resulting power saving.
* **Design II full adder/subtractor.** A second full adder/subtractor design
  is named but not specified, so it is not included.
* **The video encoder.** The adders are meant for an MPEG encoder whose DA is
  chosen per video to hold a PSNR bound. That encoder and its control policy
  are not specified, so only the arithmetic units are provided.
* **Conventional-gate versions.** The same adders built from ordinary full
  adders and lookahead blocks compute identical functions. They are not
  included separately.
* **Timing and power.** Reference FPGA figures (about 0.09–0.85 ns and
  0.082 W for the four 8-bit adders) cannot be checked in RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`; a watchdog stops
it if it hangs.

* **Gates.** The gate testbenches are exhaustive. They also check that every
  gate is a bijection, that is, reversible.
* **Cells and decoders.** The DMFA, the lookahead blocks, the decoders and the
  adder/subtractors are checked exhaustively. This includes the P = G = 1
  inputs that approximated children can produce.
* **8-bit adders.** `tb_rev_reconf_rca` and `tb_rev_reconf_cla` apply every
  `a`, `b`, `cin` and every `da` (2^21 cases). They compare against the
  behavioural models in `tb_approx_ref_pkg` and against exact `a + b + cin`
  at `da = 0`. The CLA model evaluates the block equations in a different
  order from the RTL. For `da >= N` the CLA is also checked against the closed
  form `s = b`, `cout = a[N-1] | (b[0] & cin)`.
* **16-bit adders.** A 16-bit instance of each adder is checked on 100,000
  random operations.
* **Top.** `tb_rev_approx_top` runs the top at its default parameters. It
  sweeps `da` and then runs 200,000 random operations, changing every unit's
  inputs and `da` each time. It counts each behaviour and fails if one never
  occurs:
  * exact addition;
  * partial and full approximation;
  * `da` switching between operations;
  * approximated DMPGB nodes;
  * accurate nodes fed by approximated children;
  * carries leaving the approximate region;
  * results that differ from the exact sum;
  * add and subtract in both adder/subtractors;
  * borrows.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/approx_pkg.sv tb/tb_approx_ref_pkg.sv tb/tb_rev_approx_top.sv \
    --top-module tb_rev_approx_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_rev_approx_top
```

Replace the testbench name to run any other; each runs in seconds. For lint,
use `verilator --lint-only -Wall -Irtl rtl/approx_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/approx_pkg.sv`: the propagate/generate pair type `pg_t` and the tree
  index helper `node_base`.
* `rtl/*_gate.sv`: the five reversible gates.
* `rtl/rev_dmfa.sv`, `rtl/rev_dmclb1.sv`, `rtl/rev_dmclb2.sv`,
  `rtl/rev_dmpgb1.sv`, `rtl/rev_dmpgb2.sv`: the dual-mode cells.
* `rtl/approx_decoder.sv`, `rtl/cla_mode_decoder.sv`: the mode decoders.
* `rtl/rev_reconf_rca.sv`, `rtl/rev_reconf_cla.sv`: the adders.
* `rtl/rev_half_addsub.sv`, `rtl/rev_full_addsub.sv`: the adder/subtractor
  cells.
* `rtl/rev_approx_top.sv`: the top level.
* `tb/tb_<module>.sv`: the testbenches.
* `tb/tb_approx_ref_pkg.sv`: the adder reference models.
