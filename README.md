# Masked 4×4 S-boxes from cellular-automata rules, and a 64-bit SPN cipher built on them

A 4×4 S-box can be made from a single 4-input Boolean function `f`, the local rule of a
one-dimensional cellular automaton with periodic boundary:

    S(X,Y,Z,W) = ( f(X,Y,Z,W), f(Y,Z,W,X), f(Z,W,X,Y), f(W,X,Y,Z) ) = (A,B,C,D)

Because every output bit uses the same function on a rotated input, hardware needs only
**one** copy of `f`. The input sits in a cyclic shift register and `f` produces one output
bit per clock. The point of the design is side-channel protection. It is
cheap to protect a single 4-input function with a *threshold implementation* (TI), far
cheaper than a whole 4→4 S-box. In a TI every value is split into Boolean shares, and every
share function leaves out at least one input share. Twelve rules, one per
algebraic class, give cryptographically optimal S-boxes: bijective, nonlinearity 4,
differential uniformity 4. This RTL contains the protected S-box in its two forms, direct
(4 shares) and composite (3 shares, two stages). It also contains a complete masked 64-bit
SPN datapath that uses the smallest of them.

## The rules

Each rule has algebraic degree 3. The class name (a,b,c) counts its cubic, quadratic
and linear monomials. `ca_sbox_pkg` stores each rule as a 16-bit ANF mask.
Bit *m* of the mask is the coefficient of the monomial whose variables are the set bits of *m*,
with X=8, Y=4, Z=2 and W=1.

| class | rule f(X,Y,Z,W) | S-box table, S(0)…S(F) |
|---|---|---|
| (1,2,2) | XZW ⊕ XY ⊕ YW ⊕ Y ⊕ Z | 06c8951e34a72bdf |
| **(1,3,1)** | YZW ⊕ XZ ⊕ YZ ⊕ YW ⊕ X | 01274aec8b56d39f |
| (1,3,3) | YZW ⊕ XY ⊕ XZ ⊕ YW ⊕ Y ⊕ Z ⊕ W | 0ed1ba29785c463f |
| (1,4,2) | YZW ⊕ XY ⊕ XZ ⊕ XW ⊕ ZW ⊕ X ⊕ W | 09316a2dc85e47bf |
| (1,5,1) | XYW ⊕ XY ⊕ XZ ⊕ XW ⊕ YW ⊕ ZW ⊕ Z | 04871aec2b56d39f |
| (1,5,3) | XYW ⊕ XY ⊕ XZ ⊕ XW ⊕ YZ ⊕ YW ⊕ Y ⊕ Z ⊕ W | 0ed4ba8c7256139f |
| (3,2,2) | XYZ ⊕ XZW ⊕ YZW ⊕ XZ ⊕ YZ ⊕ X ⊕ Y | 0361ca2d985e47bf |
| (3,3,1) | XYZ ⊕ XZW ⊕ YZW ⊕ XZ ⊕ XW ⊕ YW ⊕ Z | 048d1abc2e56739f |
| (3,3,3) | XYW ⊕ XZW ⊕ YZW ⊕ XY ⊕ XZ ⊕ YW ⊕ X ⊕ Z ⊕ W | 0db47583e2a91c6f |
| (3,4,2) | XYZ ⊕ XYW ⊕ XZW ⊕ XY ⊕ XZ ⊕ XW ⊕ YZ ⊕ Z ⊕ W | 0c923a4d615e87bf |
| (3,5,1) | XYZ ⊕ XYW ⊕ YZW ⊕ XZ ⊕ XW ⊕ YZ ⊕ YW ⊕ ZW ⊕ Y | 024b85791dace63f |
| (3,5,3) | XYZ ⊕ XYW ⊕ XZW ⊕ XY ⊕ XZ ⊕ YZ ⊕ YW ⊕ ZW ⊕ X ⊕ Y ⊕ W | 0b72ea49d15c863f |

Bit order: X is the most significant input bit and A the most significant output bit. The
tables above are derived from the rules. All twelve S-boxes are bijective, with
nonlinearity 4 and differential uniformity 4. Their branch number is 2, which matters
for the cipher below. Rules with fewer cubic terms, and with fewer other terms, give
smaller circuits. (1,3,1) is the smallest and is the default everywhere.

## The iterative S-box datapath

Both protected forms share one skeleton:

* one **cyclic shift register** (`ti_csr`) per share, holding {X,Y,Z,W} of that share. It
  loads on `load` and then rotates left every clock.
* a **2-bit state counter** (`ti_state_counter`) that says which rotation is present. It
  depends only on the clock and the load strobe, never on data, so it is not shared.
* the **shared CA rule**, which turns the rotated shares into output shares of `f`.
* one **De-MUX per share** (`ti_demux`), which writes the rule's output share into bit A, B, C
  or D of that share according to the state. Each output bit is kept in a flip-flop until
  it is next overwritten.

Timing of the direct form (load edge = edge 0):

| edge | shift registers hold | bit written |
|---|---|---|
| 0 | (X,Y,Z,W) loaded | – |
| 1 | (Y,Z,W,X) | A = f(X,Y,Z,W) |
| 2 | (Z,W,X,Y) | B |
| 3 | (W,X,Y,Z) | C |
| 4 | – | D, and `done` rises for one cycle |

The composite form adds one register between its two stages, so it writes A..D at edges
2..5 and `done` follows edge 5. A new `load` is accepted in the cycle `done` is high.

## Direct sharing: four shares, one stage (`ti_sbox_direct`)

A degree-3 function needs at least four shares if it is to be shared in one step without
any share function seeing all shares. Output share *j* is a function of three of the four
input shares:

* f1 omits share 4
* f2 omits share 1
* f3 omits share 2
* f4 omits share 3

For classes (1,2,2) and (1,3,1) the cores (`ti_ca122_direct_core`, `ti_ca131_direct_core`)
use hand-written sharings that group terms: f2, for example, works on the sums
(X2⊕X3⊕X4)… directly. The other ten classes use `ti_ca_direct_generic_core`. It expands
every monomial over all share combinations and adds each product to the lowest-numbered
output share whose index the product does not use. That construction is always correct
and non-complete. It is **not guaranteed to be uniform**, so outputs of those ten classes
may need re-masking before they are used again in a real design.

## Composite sharing: three shares, two stages (`ti_sbox_composite`)

With three shares a degree-3 function cannot be shared in one non-complete step. The rule
is therefore split into degree-2 pieces, each of which has a three-share, non-complete
sharing. Share *k* of a piece reads only input shares *k* and *k+1* (mod 3).

**Class (1,3,1)** (`ti_ca131_stage1`, `ti_ca131_stage2`):

    b1 = X ⊕ YW          b2 = YZ ⊕ YW          f = b2 ⊕ b1·Z ⊕ X

Stage 1 computes the shares of b1 and b2. The b2 shares carry extra terms ZjWj, each
present in two shares so that they cancel. They are there to make the sharing uniform.
Stage 2 multiplies the b1 shares with the Z shares (all nine cross products, three per
output share) and adds b2 and X.

**Class (1,2,2)** (`ti_ca122_stage1`, `ti_ca122_stage2`):

    b1 = X ⊕ Y ⊕ XW ⊕ YW    b2 = Z ⊕ XY ⊕ XZ    b3 = X ⊕ W ⊕ XZ ⊕ ZW
    f  = b1 ⊕ b2 ⊕ b1·b3 ⊕ b2·b3 = c·(1 ⊕ b3),  c = b1 ⊕ b2

Stage 2 shares the single product c·b3 in the same share-*k*/*k+1* pattern.

**Uniformity.** Enumerating, for each unshared input, all 256 of its three-share sharings
gives the following. The stage testbenches assert each uniform result.
* (1,3,1): the stage-1 sharing of the pair (b1, b2) is uniform. The two stages together
  give a uniform sharing of the single rule output bit.
* (1,2,2): the b1, b2 and b3 sharings are each uniform on their own, but not jointly. The
  stage-2 sharing of c·(1 ⊕ b3) is not uniform.
* For neither class is the sharing of the whole 4-bit S-box output uniform. The four
  output bits come from rotations of the same three input shares, so some output sharings
  occur more often than others.

**The register is part of the security argument, not just of the timing.** A stage-2 share
reads two b1 shares, and these were computed from all three input shares. Without a
register, a glitch in stage 2 could combine all three shares of X, Y, Z or W and leak.
The pipeline register (`r_b1`, `r_b2`, `r_b3`) stops that. It also delays the input shares
(`r_in`, used for X and Z) and the state (`r_state`), so stage 2 and the De-MUX see values
from the same rotation. For the same reason a synthesis flow must not optimise across
the share functions. Keep the hierarchy of the `ti_ca*` modules, or mark their outputs
to be kept.

## The cipher (`ti_spn_cipher`, top level)

A 64-bit state of sixteen 4-bit cells is held as `SHARES` shares. Cell *i* is bits
`[63-4i -: 4]`. A round is:

1. sixteen TI S-boxes in parallel, all loaded together;
2. a bit permutation, i.e. wiring applied to each share (in `ti_diffusion_layer`);
3. for `PARADIGM_THROUGHPUT`, MixColumns with the almost-MDS matrix
   `[0 1 1 1; 1 0 1 1; 1 1 0 1; 1 1 1 0]` (`ti_mixcolumns`), applied to each share. Each
   column computes t = c0⊕c1⊕c2⊕c3 once and outputs t⊕ci: seven XORs per bit instead of
   eight.
4. XOR with the round-key shares.

The linear steps never mix shares, so they need no protection beyond being applied to
each share.

Two configurations are intended:

| `PARADIGM` | permutation | MixColumns | rounds | cycles/block | at 526.2 MHz |
|---|---|---|---|---|---|
| `PARADIGM_THROUGHPUT` (default) | Midori ShuffleCell | yes | 16 (`ROUNDS` default) | 96 | 43.85 MB/s |
| `PARADIGM_AREA` | GIFT-64 bit permutation | no | set `ROUNDS=40` | 240 | 17.54 MB/s |

A CA S-box has branch number 2, so a bit permutation alone diffuses poorly and needs at
least 40 rounds. The 40 comes from 2⁻² per active S-box against a 2⁻⁸⁰ target. With
Midori's almost-MDS MixColumns, 16 rounds suffice, because Midori has the same S-box
properties. The 526.2 MHz clock is a reported 180 nm figure for this kind of circuit;
nothing here was synthesised to check it.

The S-box form is selected with `ARCH`:
* `ARCH_COMPOSITE` uses 3 shares and 6 cycles per round.
* `ARCH_DIRECT` uses 4 shares and 5 cycles per round.

`CLASS` selects the rule. The composite form accepts only CLS_131 and CLS_122; the direct
form accepts any class.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; ignored while `busy` |
| `pt` | in | SHARES×64 | plaintext shares, sampled at the `start` edge |
| `rk` | in | SHARES×64 | round-key shares for round `round_idx` |
| `round_idx` | out | 8 | round being computed (0 … ROUNDS-1) |
| `ct` | out | SHARES×64 | ciphertext shares; XOR them to unmask |
| `busy` | out | 1 | encryption in progress |
| `done` | out | 1 | one-cycle pulse; `ct` valid from here on |

From the `start` edge, `done` is high after exactly ROUNDS × (S-box latency + 1) clock edges.
The S-boxes are reloaded with the round output in the cycle their `done` is seen.
`rk` is sampled at that same edge, so it only has to follow `round_idx`.
There is no key schedule inside: an external unit (masked, if the key must be protected)
supplies the shared round keys. There is no random-number input and no fresh masks are
added between rounds. Because the S-box output sharing is not uniform (see above), a
product that needs a strict first-order guarantee over many rounds should re-mask the
state, for example by adding fresh shares of zero with the round key.

## Where this RTL adds to or differs from the published design

Published, and followed here:
* the twelve rules;
* the two architectures (shift registers, data-independent 2-bit counter, shared rule
  core, De-MUX; a register between composite stages);
* the direct sharings of (1,2,2) and (1,3,1);
* the composite decompositions and stage-1 sharings;
* the (1,3,1) stage-2 sharing;
* the 7-XOR MixColumns;
* the two cipher paradigms and their round counts.

This design's own choices:
* **Composite (1,3,1) details.** Two b1 shares are reconstructed as the standard completion
  of the nine YiWj products. The second stage multiplies b1 by **Z**. That is the only form
  consistent with the rule and with the published share functions (`b1·W` does not
  reproduce the rule).
* **Sharings not published.** The composite (1,2,2) second stage and the direct sharing of
  the other ten classes are not published; the ones described above are used instead.
* **Documented only by name.** The choice of Midori ShuffleCell and the GIFT-64
  permutation, the cell order, the MixColumns column layout, and the round order
  S-box → permutation → MixColumns → key XOR. The last round is the same as the others
  and there is no initial key whitening.
* **Control and reset.** The load/done handshake, holding flip-flops behind the De-MUX,
  clearing the counter on load, and resets.
* **Cycles per round.** One published figure puts the S-box at 8 cycles, while the
  published throughput figures imply 6 cycles per round. The RTL takes 6 and matches the
  throughput figures.

* **Uniformity.** The published text calls its decomposed sharings uniform. Each published
  piece is uniform on its own, but the whole S-box output is not (see the composite
  section). No re-masking is added, matching the published design.

Not provided: a key schedule, a mask generator, and any power or leakage assessment.
Simulation shows that the shares are correct and that the share functions are
non-complete. It cannot show glitch resistance; that needs a netlist-level or measured
evaluation.

## Files

| file | content |
|---|---|
| `rtl/ca_sbox_pkg.sv` | enums (class, architecture, paradigm, permutation), rule ANF masks, unprotected reference S-box |
| `rtl/ti_csr.sv`, `rtl/ti_state_counter.sv`, `rtl/ti_demux.sv` | shift register, state counter, De-MUX |
| `rtl/ti_ca122_direct_core.sv`, `rtl/ti_ca131_direct_core.sv`, `rtl/ti_ca_direct_generic_core.sv` | four-share rule cores |
| `rtl/ti_sbox_direct.sv` | direct TI S-box |
| `rtl/ti_ca131_stage1.sv`, `rtl/ti_ca131_stage2.sv`, `rtl/ti_ca122_stage1.sv`, `rtl/ti_ca122_stage2.sv` | composite stages |
| `rtl/ti_sbox_composite.sv` | composite TI S-box |
| `rtl/ti_diffusion_layer.sv`, `rtl/ti_mixcolumns.sv` | diffusion layer: permutation, then (optionally) MixColumns |
| `rtl/ti_spn_cipher.sv` | top: cipher datapath and round controller |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_sbox_tables_pkg.sv` holds reference S-box tables |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example, the
end-to-end test runs four cipher configurations side by side: the defaults, composite
(1,2,2) with 40 GIFT rounds, direct (1,3,1) with 16 Midori rounds, and direct (3,5,3) with
40 GIFT rounds. Build and run it with:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
        rtl/ca_sbox_pkg.sv tb/tb_sbox_tables_pkg.sv tb/tb_ti_spn_cipher.sv \
        --top-module tb_ti_spn_cipher -o sim
    ./obj_dir/sim

To run another test, substitute its file and top-module name.

What the testbenches check:
* The rule cores and stages are checked exhaustively over all share assignments, for
  correctness and for non-completeness: changing the share a function must not read leaves
  its output unchanged.
* The S-box tests check every input under many random sharings, the 4- or 5-cycle latency
  and back-to-back loads.
* The cipher test compares the XOR of the ciphertext shares with an unshared reference
  model. It also checks the exact cycle count (96, 240, 80, 200) and that `start` is
  ignored while busy.
* The composite stage tests also count, for each unshared input, how often each output
  sharing occurs. They check the uniform cases in the uniformity list above. The direct
  cores are not checked for uniformity.

To change the design:
* Another class for the direct form needs only `CLASS`.
* Another rule needs a new ANF mask in `ca_sbox_pkg`.
* A composite version of another class needs its own decomposition and two stage modules.
  Add them to the generate block in `ti_sbox_composite`.
