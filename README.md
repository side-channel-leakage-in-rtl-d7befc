# Masked AES S-box test device for first-order leakage experiments

Boolean masking splits every secret value `a` into a masked value `a_m = a ^ m` and a
uniformly random mask `m`. The circuit then never handles `a` directly. The circuit is
first-order secure if two things hold:

1. every mask value is equally likely;
2. averaged over the masks, the circuit consumes the same power for every value of `a`.

In a logic-level (zero-delay, toggle-count) model the second condition holds for a correct
masked circuit. In silicon it can fail through glitches and through effects that couple two
wires, for example the capacitance between a wire carrying `a_m` and one carrying `m`.
Such an effect makes the power depend on the masked value and its mask together, and so on
`a` itself.

This RTL is the device used to study that effect:

* a masked multiplier in GF(2^2), the basic unit of a masked AES S-box;
* a complete first-order masked AES S-box built from that multiplier;
* a dual-rail pre-charge (WDDL) version of the S-box, which is glitch-free by construction;
* a test wrapper with five identical S-boxes, a fixed key `8'h23` added after the S-box, and
  a sequencer that walks through every (masked input, mask) pair. Each pair is applied 1024
  times, so the power traces can be averaged while the fresh mask changes.

At the logic level the design is correct and balanced, down to every internal node of the
S-box, and the testbenches check both. The
analog effects that leak in silicon cannot be represented in RTL. Nothing here models power.

## Block diagram

```
                 masked_sbox_top
 start,pause --> stimulus_ctrl --(a_m, m, valid)--+
                 fresh_mask_gen --(f[3:0], m'[7:0])+--> input registers (a_m, m, f, m', k^m')
                                                          | pre-charge gating ({0,0} / {v,~v})
                          +-------------------------------+------------------ ... x5
                          v                                                    v
                 wddl_masked_sbox --y_m-->(^ k_m')--+                  (same, 4 more)
                          |        --y_mask->(^ m')->(^ 63)-+--> out = Sbox(a) ^ k
                          (wddl_sbox_key_add)
                                                          |
                                              output registers --> sbox_out[0..4],
                                                                   out_a_m, out_m, out_valid
```

## The masked GF(2^2) multiplier (`masked_gf4_mul`)

This is the circuit at the bottom of everything else. Its inputs are `a_m = a ^ m_a`,
`b_m = b ^ m_b`, both masks and a fresh output mask `m_q`, all 2 bits wide. Four plain GF(2^2)
multipliers form the four cross products, and a chain of XORs adds them onto the output mask:

```
i1 = a_m*b_m   i2 = a_m*m_b   i3 = m_a*b_m   i4 = m_a*m_b
q_m = i1 ^ (i2 ^ (i3 ^ (i4 ^ m_q)))  =  a*b ^ m_q
```

The mask enters the chain first, so no partial sum in the chain is ever an unmasked value.
This is the circuit whose glitches and wire coupling the experiments examine: the XOR chain
is where glitches leak, and the four multiplier outputs are where neighbouring wires couple.
Each plain multiplier (`gf4_mul`) is 4 AND and 3 XOR gates. The masked multiplier therefore
has 4·7 + 8 = 36 gates.

The field is GF(2)[z]/(z²+z+1) in the basis (z, 1); bit 1 is the coefficient of z.

## The masked S-box (`masked_sbox`)

Ports: `a_m` (8), `m` (8), `f` (4, fresh mask) in; `y_m`, `y_mask` (8 each) out. The
outputs satisfy `y_m ^ y_mask ^ 8'h63 = Sbox(a_m ^ m)`. The S-box constant and the unmasking
are left to the key stage that follows.

**Field.** The inversion is done in the tower field GF(((2²)²)²):

| level   | construction                        | constant                      |
|---------|-------------------------------------|-------------------------------|
| GF(2^2) | GF(2)[z] / (z² + z + 1)             |                               |
| GF(2^4) | GF(2^2)[y] / (y² + y + PHI)         | PHI = z (`2'b10`)             |
| GF(2^8) | GF(2^4)[x] / (x² + x + LAMBDA)      | LAMBDA = (z+1)·y (`4'b1100`)  |

An 8×8 GF(2) matrix maps bytes in and out of this field. Its columns are the powers
β⁰…β⁷ of β = `8'h42`, a root of the AES polynomial t⁸+t⁴+t³+t+1 in the tower field. The
package stores the rows (`TO_TOWER_ROW`, `FROM_TOWER_ROW`). Output bit j is the parity of
the input ANDed with row j.

**Inversion.** For an element `a = ah·x + al` of GF(2^8) over GF(2^4):

```
d     = LAMBDA·ah² + ah·al + al²
a⁻¹   = (ah·d⁻¹)·x + ((ah + al)·d⁻¹)
```

The same formula one level down inverts `d` in GF(2^4), using PHI. In GF(2^2), inversion
is squaring. Squaring, multiplication by a constant and the basis changes are linear, so
they are applied to the masked value and to the mask separately. Only the products need
masked multipliers. They come in two sizes: the GF(2^2) one above, and a GF(2^4) one with
the same four-product structure (`masked_gf16_mul`).

**Mask schedule.** This is the least obvious part of the design. The rule that drives
it: a masked multiplier's output mask must not depend on either of its input masks.
Otherwise one of the partial XOR sums (`s3` above) collapses to a form like
`mh·(x ^ 1)`, where `x` is unmasked data. The outputs are still correct and balanced, but
that internal node leaks in the first order. The obvious schedule reuses `mh`/`ml` as
output masks of the last products, which would keep `y_mask = A(m)`. It has exactly this
problem. The check of internal nodes in
`tb_masked_sbox` now guards against it.

| value / product      | input masks      | output mask                                   |
|----------------------|------------------|-----------------------------------------------|
| `ah`, `al`           |                  | `mh`, `ml` (tower form of `m`, linear)        |
| `ah·al`              | `mh`, `ml`       | `f`                                           |
| `d`                  |                  | `md = f ^ LAMBDA·mh² ^ ml²` (uniform, independent of `m`) |
| `dh·dl` (inside inv) | `mdh`, `mdl`     | `mh[1:0]`                                     |
| `e`, `e⁻¹ = e²`      |                  | `me = mh[1:0] ^ PHI·mdh² ^ mdl²`, then `me²`  |
| `d⁻¹` halves         | `mdh`/`mdh^mdl`, `me²` | `ml[3:2]`, `ml[1:0]` (so `d⁻¹` is masked by `ml`) |
| `ah·d⁻¹`             | `mh`, `ml`       | `f`                                           |
| `(ah^al)·d⁻¹`        | `mh^ml`, `ml`    | `md`                                          |
| `y_m`                |                  | `y_mask = A(from_tower({f, md}))`             |

`A` is the linear part of the AES affine map. The output mask therefore depends on both
`m` and `f`. The key stage removes it, so nothing downstream needs to know its form.

## Key addition and unmasking (`sbox_key_add`)

```
out = (y_m ^ k_m') ^ ((y_mask ^ m') ^ 8'h63)     with k_m' = k ^ m'
    = Sbox(a) ^ k
```

The masked key is added on the value path. The key mask and the S-box constant are added on
the mask path. The two paths meet in the last XOR, so the output is the first unmasked value.
It is the only unmasked value in the device: the one whose Hamming weight a logic-level
count sees, and the one a DPA attack targets.

## Dual-rail pre-charge form (`wddl_*`, `wddl_pkg`)

The measured device is glitch-free. It uses Wave Dynamic Differential Logic: every bit is a
rail pair `{t, f}`, which is `{0, 0}` during pre-charge and `{v, ~v}` during evaluation. Only
positive gates are used:

| gate | true rail                   | false rail                  |
|------|-----------------------------|-----------------------------|
| AND  | `a.t & b.t`                 | `a.f \| b.f`                |
| OR   | `a.t \| b.t`                | `a.f & b.f`                 |
| NOT  | `a.f` (rails swapped)       | `a.t`                       |
| XOR  | `a.t&b.f \| a.f&b.t`        | `a.t&b.t \| a.f&b.f`        |

With all inputs pre-charged, every node is `{0,0}`. During evaluation each rail rises at most
once, so no node can glitch, and exactly one rail of every pair switches whatever the data.
Constants are never needed: XOR with 1 is a rail swap, and XOR with 0 is a wire.
`wddl_masked_sbox` is the masked S-box above with every gate replaced this way. The masking is
kept as well. The dual-rail form removes glitches, and the mask is there to cover leakage from
unequal rail capacitances.

Pre-charge is applied where the registers feed the S-boxes: the encoder ANDs each rail with
an `eval` phase signal. The assertion in `masked_sbox_top` checks, on every cycle, that every
S-box output pair is `{0,0}` in pre-charge and complementary in evaluation.

Caveat: synthesis tools may merge the two rails of a pair or push inverters into the logic.
An implementation that must stay dual-rail needs the rails kept apart by the tool flow, for
example by mapping rail by rail or with keep/dont-touch constraints. The RTL describes the
logic only.

## The test wrapper (`masked_sbox_top`)

| parameter   | default        | meaning                                              |
|-------------|----------------|------------------------------------------------------|
| `N_SBOX`    | 5              | identical S-boxes driven with the same inputs         |
| `REPEAT`    | 1024           | consecutive applications of each (a_m, m) pair        |
| `KEY`       | `8'h23`        | key added after the S-box                             |
| `SEED`      | `32'h1ACE_B00C`| fresh-mask generator seed (non-zero)                  |
| `DUAL_RAIL` | 1              | 1: WDDL S-boxes; 0: single-rail masked S-boxes        |

| port           | dir | width        | meaning                                               |
|----------------|-----|--------------|-------------------------------------------------------|
| `clk`, `rst_n` | in  | 1            | clock; asynchronous active-low reset                  |
| `start`        | in  | 1            | begin a run (ignored while busy)                      |
| `pause`        | in  | 1            | hold the run                                          |
| `busy`         | out | 1            | run in progress                                       |
| `done`         | out | 1            | one-cycle pulse after the last stimulus is issued     |
| `out_valid`    | out | 1            | results below are new this cycle                      |
| `out_new_pair` | out | 1            | first of the `REPEAT` results of a pair (averaging trigger) |
| `out_a_m`, `out_m` | out | 8        | stimulus of this result; `a = out_a_m ^ out_m`        |
| `sbox_out`     | out | `N_SBOX` × 8 | `Sbox(a) ^ KEY` from each S-box                       |

**Sequence.** `stimulus_ctrl` steps the masked input `a_m` from 0 to 255 (outer loop) and,
for each, the mask `m` from 0 to 255 (inner loop). Each pair is issued `REPEAT` times in a
row. At the defaults a run is 65,536 pairs, or 67,108,864 stimuli.

**Masks.** `fresh_mask_gen` is a 32-bit maximal-length Galois LFSR
(x³² + x²² + x² + x + 1). It advances 12 steps per stimulus and gives the 4-bit fresh mask
`f` and an 8-bit key mask `m'`. The masked key `KEY ^ m'` is formed as the input registers
load.

**Timing.** A stimulus issued in cycle t is loaded into the input registers at the end of t.
Cycle t+1 is pre-charge and cycle t+2 is evaluation. The result is registered at the end of
t+2 and appears with `out_valid` in cycle t+3. A new stimulus can be issued in the evaluation
cycle, so the peak rate is one stimulus every two cycles. With `DUAL_RAIL = 0` the timing is
the same, and the pre-charge cycle is simply idle.

## What the testbenches show

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. Reference values
come from `tb/aes_ref_pkg.sv`. That package computes directly in the AES field (inverse as
a²⁵⁴, then the affine map) and in GF(2)[z]/(z²+z+1). It uses no tower field and no basis
change, so it is independent of the RTL.

| testbench                   | what it does                                                                 | time |
|-----------------------------|------------------------------------------------------------------------------|------|
| `tb_gf4_mul`                | all 16 products                                                              | <1 s |
| `tb_masked_gf4_mul`         | all 1024 input combinations; output mask cancels; logic-1 count of `q_m` equal for every unmasked (a, b) and for every Hamming-weight group 0..4 | <1 s |
| `tb_masked_sbox`            | all 2²⁰ (a_m, m, f); S-box value; logic-1 count of both output shares, summed over (m, f), equal for every `a`; the same per bit for 136 internal node bits (products, partial sums, inverter) | ~1 s |
| `tb_wddl_masked_sbox`       | the same 2²⁰ cases through pre-charge and evaluation; all rails 0 in pre-charge, complementary in evaluation, exactly 16 output rails high; 272 internal rails all 0 in pre-charge and each balanced over `a` | ~8 s |
| `tb_sbox_key_add`           | 5000 random share/key combinations                                          | <1 s |
| `tb_fresh_mask_gen`         | against a bit-serial LFSR model; hold when not stepped; 4-bit mask histogram | <1 s |
| `tb_stimulus_ctrl`          | `REPEAT = 3`: order, repetitions, pause, `new_pair`, single `done`, restart  | <1 s |
| `tb_masked_sbox_top`        | WDDL, `REPEAT = 2`, complete run of 131,072 stimuli with random pauses       | ~2 s |
| `tb_masked_sbox_top_single` | single-rail, `REPEAT = 1024`, the complete 67,108,864-stimulus run           | ~50 s |
| `tb_masked_sbox_top_full`   | every parameter at its default (WDDL): first 4096 pairs × 1024 (4,194,304 stimuli) | ~70 s |

The top-level tests check, for every result: the pair order, all five outputs against
`AES_Sbox(a) ^ 8'h23`, and the three-cycle latency. They also count each mechanism and fail
if one never happened: pauses, pre-charge cycles, first-of-pair markers, mask wrap-arounds,
the fresh mask changing within a pair, all 16 fresh-mask values, and the `done` pulse.
A complete WDDL run at the default length simulates at about 17 s per million stimuli, or
about 19 minutes in total. The default-parameter test therefore stops after 4096 pairs.

The logic-1 balance checks are the logic-level counterpart of condition 2. They pass, as
they should for a correct masked circuit, and they say nothing about silicon.

### Running a test with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv rtl/wddl_pkg.sv tb/aes_ref_pkg.sv \
    --top-module tb_masked_sbox_top tb/tb_masked_sbox_top.sv
./obj_dir/Vtb_masked_sbox_top
```

Substitute any testbench name. Packages must be listed first. Every module lives in
`rtl/<name>.sv`, and `-y` finds the rest.

## Design choices and departures

These follow the source description:

* the masked multiplier's four-product, mask-first XOR-chain structure and its 2-bit ports;
* the 8/8/4-bit S-box inputs;
* the key-addition and unmasking arrangement with `8'h63`, and the key `8'h23`;
* five identical S-boxes;
* the 256 × 256 enumeration with 1024-fold repetition;
* the conversion of the masked logic to WDDL.

These are this design's own:

* **Internals of the masked S-box.** The tower field, its constants, the basis matrix and the
  whole mask schedule were chosen here. Any first-order masked S-box with these ports could
  stand in for this one.
* **Fresh-mask source.** An LFSR is used. It gives uniform-looking masks for test purposes and
  is not a cryptographic random source.
* **Key mask.** The key mask `m'` is a new value for every stimulus.
* **Stimulus sequencing.** The run is controlled by a counter-based sequencer with a
  start/pause/busy/done handshake. The original setup used a small embedded processor with a
  serial link to a PC. That processor, the link, the oscilloscope and the PC are not part of
  this RTL. The `out_a_m`/`out_m` ports carry what the PC needs to group traces by `a`.
* **Registers and timing.** The register stages and the two-cycle pre-charge/evaluate
  schedule were chosen here.
* **Single-rail option.** `DUAL_RAIL = 0` selects the single-rail S-boxes. This corresponds to
  the netlist used for the logic-level (toggle-count) experiment.
* **Not modelled.** Glitch power, inter-wire coupling capacitance, IR drop and every other
  electrical effect are outside what RTL can express.

## Files

`rtl/`:

* `gf_pkg` holds the field types and linear maps.
* `gf4_mul`, `masked_gf4_mul`, `gf16_mul`, `masked_gf16_mul`, `masked_gf16_inv`,
  `masked_sbox` and `sbox_key_add` make up the single-rail datapath.
* `wddl_pkg` and the `wddl_*` modules are the dual-rail counterparts.
* `fresh_mask_gen`, `stimulus_ctrl` and `masked_sbox_top` form the wrapper.

`tb/` holds one testbench per block, three top-level runs and the reference package.
