# Reconfigurable 64-tap FIR filter in the residue number system

A conventional FIR filter spends most of its delay and power in wide binary
multipliers and in carry chains that run across the whole word. This design
evaluates the same filter, y[n] = sum h[i]·x[n-i] over 64 taps, in a
**residue number system (RNS)** with the three moduli

    m1 = 2^n - 1,   m0 = 2^n,   m3 = 2^n + 1        (default n = 8: 255, 256, 257)

Every sample and coefficient is replaced by its three remainders. Addition and
multiplication then work on each remainder independently. The three 8- or
9-bit channels never exchange carries, so the 64-tap filter becomes three small
filters running side by side. A converter at the input splits each binary
sample into residues. A converter at the output joins the three channel
results back into one signed binary number.

The structure follows a published RNS FIR architecture for software-defined
radio: forward conversion, per-modulus transposed-form filters, and reverse
conversion. That architecture uses a Sklansky parallel-prefix adder with
end-around carry for 2^n-1 and a high-radix multiplier for 2^n-1 built from
squares. Several details were left open there; the choices made here are
listed in the last section.

## Data path

```
 in_data (32b signed) ─► fwd_conv ─► reg ─┬─► rns_fir_channel  mod 255 ─┐
                                          ├─► rns_fir_channel  mod 256 ─┼─► rev_conv ─► out_data (24b signed)
                                          └─► rns_fir_channel  mod 257 ─┘
 coef_data (32b signed) ─► fwd_conv ──────────► coefficient registers of all three channels
```

| stage | clock | what happens |
|---|---|---|
| 1 | sample clock | `fwd_conv` forms the three residues; they are registered |
| 2 | +1 | the three channels advance their transposed filters |
| 3 | +2 | `rev_conv` reconstructs the signed value; it is registered |

`out_valid` follows `in_valid` by exactly three clocks. The design accepts one
sample per clock. Gaps are allowed: the filter state advances only on valid
samples.

### Range and overflow

The three moduli together represent M = 255·256·257 = 16,776,960 distinct
values. The output is read as signed, so it covers -M/2 … M/2-1
(-8,388,480 … 8,388,479), in a 24-bit `out_data`. Inside that range every
output is exact. A true result outside it comes out wrapped modulo M into the
range. The hardware has no overflow flag. The 32-bit input port accepts any
32-bit sample, and the residues are always correct. The caller must keep
|sum h[i]·x[n-i]| below M/2. That is guaranteed when 64·max|x|·max|h| < M/2,
for example with 10-bit samples and 8-bit coefficients (64·2^9·2^7 = 2^22).

## Residue arithmetic, channel by channel

Each modulus gets the cheapest exact arithmetic for its form.

**2^n − 1: end-around carry.** Because 2^n ≡ 1, a carry out of the top bit is
worth 1 and is added back at the bottom. `ppa_adder` (EAC=1) computes all
carries with a Sklansky prefix tree. The carry fed back is
`G[n-1:0] | P[n-1:0]`. The P term also wraps a sum of exactly 2^n-1, so the
result is always the canonical zero, never the all-ones pattern. The
feedback costs one extra AND-OR level, not a second addition. One corner
case remains: adding all-ones to all-ones returns all-ones, which is congruent
to zero. No final output in the design takes that path.

**2^n − 1: high-radix multiplier (`mod_mul_m1`).** This is the most intricate
block. Split both operands into k = n/2-bit halves, P = P1·2^k + P0 and
Q = Q1·2^k + Q0. Since 2^(2k) = 2^n ≡ 1:

    |P·Q| = |2^k·A1 + A0|,   A1 = P1·Q0 + P0·Q1,   A0 = P1·Q1 + P0·Q0

The two cross sums come from four squares instead of four half-word
multipliers:

    a = P0+P1+Q0+Q1   b = P0-P1-Q0+Q1   c = P0+P1-Q0-Q1   d = P0-P1+Q0-Q1
    A0 = (a² - b² - c² + d²) / 8         A1 = (a² + b² - c² - d²) / 8

(a² − c² = 4(P0+P1)(Q0+Q1) and d² − b² = 4(P0−P1)(Q0−Q1), which gives the
identities.) The division by 8 is exact. The bits of 2^k·A1 + A0 above bit
n-1 fold back onto the low bits through one modulo 2^n-1 prefix adder. The
scheme needs n even.

**2^n: plain truncation.** `mod_mul_2n` is a shift-and-add multiplier. Its
partial products are summed by Sklansky adders with the carry out dropped
(`ppa_adder`, EAC=0).

**2^n + 1: fold with a sign change.** Residues need n+1 bits (0 … 2^n).
`mod_add_p1` adds and subtracts 2^n+1 once if needed. `mod_mul_p1` forms the
full product H·2^n + L and uses 2^n ≡ −1 to reduce it to |L − H|, with one
correction.

### Forward conversion (`fwd_conv`)

The 32-bit input is cut into four n-bit chunks, X = M3·2^3n + M2·2^2n +
M1·2^n + M0:

* mod 2^n−1: x1 = |M3 + M2 + M1 + M0|, three end-around-carry adders;
* mod 2^n:   x0 = M0;
* mod 2^n+1: x3 = |M0 − M1 + M2 − M3|, three 2^n+1 adders.

Inputs are two's complement. A negative sample's bit pattern is X + 2^W, so
for a set sign bit the constant |−2^W| is added in the two odd channels. In
the 2^n channel 2^W vanishes. The module accepts any width W with
3n < W ≤ 4n. The same converter also translates the coefficients.

### Reverse conversion (`rev_conv`)

The output uses a mixed-radix form that needs no reduction modulo the full
range M. Write X = x0 + 2^n·Y. Then Y (< 2^2n − 1) has the residues

    |Y| mod 2^n−1 = |x1 − x0| =: a        (one end-around-carry add; −x0 is ~x0)
    |Y| mod 2^n+1 = |x0 − x3| =: b

and Y = a + (2^n−1)·t with t = |(b − a)·2^(n−1)| mod 2^n+1. Here 2^(n−1) is
the inverse of 2^n−1 ≡ −2 modulo 2^n+1. The binary result is the
concatenation {Y, x0}. A value ≥ M/2 is then read as negative (X − M).

## Filter channel (`rns_fir_channel`)

Each channel is a transposed direct-form FIR. Every tap multiplies the
current input residue by its coefficient residue and adds the product to the
partial sum from the tap after it:

    z[i] <= h[i]·x + z[i+1]  (mod m),   z[63] <= h[63]·x,   y = z[0]

The critical path is one modular multiplier plus one modular adder, whatever
the number of taps. The parameter `KIND` (`CH_M1`, `CH_M0`, `CH_P1`, from
`rrns_pkg`) selects the arithmetic.

## Reconfiguration

The filter is reconfigured by rewriting its coefficients at run time. Assert
`coef_we` with a tap index `coef_addr` (0–63) and a signed 32-bit `coef_data`.
The value is converted to residues and stored in all three channels in that
clock, one tap per clock. The new value applies to every sample whose
`in_valid` is high in the same clock or later. Writes may be interleaved with
samples. In a transposed filter, partial sums already in flight were formed
with the old coefficients. The 63 outputs after a change therefore mix old
and new coefficients. Send zeros, or discard those outputs, if a clean
switch is needed. After reset all coefficients and partial sums are zero.

## Interface of `rrns_fir_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_data` | in | 1, 32 | signed sample, one per clock at most |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 6, 32 | coefficient write |
| `out_valid`, `out_data` | out | 1, 24 | signed result, 3 clocks after its sample |

Parameters: `N` (8), `DATA_W` (32), `COEF_W` (32), `TAPS` (64). Three limits
apply: `N` must be even and at least 4; `DATA_W` and `COEF_W` must lie in
(3N, 4N]; the output is 3N bits wide.

## Files

* `rtl/rrns_pkg.sv`: channel-kind enum and an elaboration-time `pow2_mod`.
* `rtl/ppa_adder.sv`, `mod_add_p1.sv`: modular adders.
* `rtl/mod_mul_m1.sv`, `mod_mul_2n.sv`, `mod_mul_p1.sv`: modular multipliers.
* `rtl/fwd_conv.sv`, `rev_conv.sv`: converters.
* `rtl/rns_fir_channel.sv`, `rrns_fir_top.sv`: filter channel and top.
* `tb/tb_<module>.sv`: one self-checking testbench per module, plus
  `tb/tb_rrns_audio_filter.sv`, an audio filtering workload.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* The adders and multipliers are checked exhaustively against integer `%`
  arithmetic, for n = 8 and, where applicable, n = 4.
* `tb_fwd_conv` covers all 16-bit patterns, edge values and 50,000 random
  32-bit values, at W = 32, 16 and 27.
* `tb_rev_conv` sweeps the whole n = 4 range and 20,000+ random n = 8 values,
  including both ends of the range.
* `tb_rns_fir_channel` runs 8-tap channels of all three kinds and a 64-tap
  channel. It feeds random gaps and rewrites the coefficients three times.
* `tb_rrns_fir_top` runs the default-size design (no parameter overrides)
  against an exact 64-bit integer model. It covers an impulse response,
  in-range random data, reconfiguration while streaming, and large data that
  wraps. It checks the three-clock latency. It counts gaps, reconfigurations,
  negative results and wrapped results, and fails if any of them never
  happened.
* `tb_rrns_audio_filter` is an audio-style workload. It loads a 64-tap
  Hamming-windowed low-pass (8-bit coefficients, cutoff 0.1·fs) through the
  coefficient port. It then filters 4096 samples of a 14-bit two-tone signal
  (0.02·fs and 0.35·fs). Every output must match exact integer convolution.
  The passband gain must be within 5 % of sum h, and the stopband tone must
  drop by more than 35 dB (about 45 dB is measured).

Each block testbench also catches a deliberately broken copy of its module.

To simulate with Verilator, for example the top:

```
verilator --binary --timing -Irtl -y rtl rtl/rrns_pkg.sv tb/tb_rrns_fir_top.sv \
          --top-module tb_rrns_fir_top
./obj_dir/Vtb_rrns_fir_top
```

The full-size run takes well under a second.

## How this design departs from the published architecture

* **Word length and moduli.** The source gives a 20-bit data objective in one
  place. Elsewhere it gives 16-bit (earlier design, moduli 7, 8, 9) and 32-bit
  (proposed) input words. Its moduli for the proposed column do not have the
  2^n±1 form it builds everything else on. This design takes the 32-bit word
  and n = 8: four 8-bit chunks, with n even as the multiplier needs.
* **Square formulas.** The published A0/A1 formulas for the high-radix
  multiplier carry a sign pattern that does not reproduce the products they
  stand for. The corrected pattern above is used.
* **Encoding of the 2^n+1 channel.** The source mentions a diminished-one
  representation and a Booth-8 multiplier for 2^n+1. This design uses normal
  binary residues and a fold-based multiplier, so all three channels and both
  converters share one encoding.
* **Reverse conversion.** The source names the Chinese remainder theorem and
  mixed-radix conversion as options. The mixed-radix form specialised to this
  moduli set is used.
* **Where the modulo reduction happens.** The source's summary mentions
  replacing modulo adders by binary adders followed by a single modulo
  reduction stage, but its filter description uses modular adders in a
  transposed chain. This design reduces at every tap. That keeps each tap
  register at residue width, n or n+1 bits.
* **Multiplier of the 2^n channel.** The shift-and-add multiplier with
  prefix adders is used only in the 2^n channel. The source shows such a
  multiplier without saying which channel it serves.
* **Precomputed RAM tables and distributed arithmetic.** The source also
  speaks of RAM blocks holding precomputed values. It gives neither their
  contents nor their place in the data path, so none are built. All
  arithmetic here is logic.
* **Own choices.** These were not specified and are this design's own: the
  coefficient write port, the pipeline registers and three-clock latency,
  the valid handshake, and synchronous reset.
* **Overflow.** Overflow and scaling handling is left open by the source. The
  output simply wraps modulo M.
* **Cost figures.** The published resource and speed figures (for an FPGA
  implementation, and a 500 MHz ASIC target) are not reproduced here. This
  RTL stores 64 coefficients and 64 partial sums per channel, about 1,650
  flip-flops in total. Its timing has not been characterised.
