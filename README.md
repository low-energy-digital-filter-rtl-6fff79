# Timing-error-tolerant single-MAC digital filters

Lowering the supply voltage of a filter below the point where its slowest
path still meets the clock saves a great deal of energy, but in a
conventional datapath the output quality collapses almost immediately. The
reason is specific. In a multiply-accumulate (MAC) datapath the adder at the
end of the multiplier-adder chain fails first. Its longest carry chains occur
when two *small* numbers of *opposite sign* are added. In two's complement,
-3 + 5 ripples a carry through every sign bit up to the MSB. When such a
carry is cut short by a too-slow supply, the MSBs come out wrong and the
error is as large as the number range.

This design accepts timing errors but controls where they land. It uses two
measures:

1. **Dynamic bitwidth.** Each addition first checks whether both operands are
   small. If they are, the addition is done in a narrower configuration of
   the same adder, and the result is sign-extended back to full width. Small
   operands then never drive carries into the upper bits. The worst error an
   addition can suffer shrinks from about 2^W1 to about 2^W2.
2. **Tap reordering.** The filter taps are accumulated in ascending order of
   coefficient magnitude. This keeps the intermediate sums small for as long
   as possible. Each tap also gets a fixed adder width that is just wide
   enough for the largest value its running sum can reach.

With correct timing, both measures leave the result **bit-exact**. Every
output equals that of a plain full-width filter. They only change which
carries can be long, so that under voltage overscaling the quality drops
gracefully instead of suddenly. The RTL here is the logic of that
architecture. It does not model the timing errors themselves (see
"Limits").

The top level, `tea_filter_top`, holds three independent filters built from
the same single-MAC core:

| instance | filter | taps | coefficient / sample / accumulator format | full / reduced adder |
|---|---|---|---|---|
| `u_fir` | 5th-order least-squares low-pass, audio at 22 kHz, pass band to 6 kHz, stop band from 7.5 kHz | 6 | Q1.21 / Q3.29 / Q4.50 | 54 / 39 bits |
| `u_iir` | 3rd-order type-II Chebyshev low-pass, audio at 22 kHz, cut-off 8 kHz | 4 + 3 | Q1.21 / Q3.29 / Q4.50 | 54 / 38 bits |
| `u_shp` | image sharpening, the 3x3 "unsharp" kernel applied as a 1-D filter | 9 | Q4.12 / Q8.0 / Q12.12 | 24 / 20 bits |

Qm.n means a signed number with m integer bits (sign included) and n
fractional bits. For example, Q4.50 is 54 bits wide.

## The dynamic-width adder

`dyn_adder` is the core of the technique. It has three parts: a single W1-bit
adder, a magnitude checker, and a truncation multiplexer.

```
 a (product) ──┬──────────────► +  ──raw sum──► width_ctrl ──► sum
 b (acc)     ──┼──┬───────────► ▲                   ▲
               │  │                                  │ eff_w
               └──┴─► mag_check ── fits ──► min(W2, static_w) or static_w
                                                     ▲
                                         static_w (from tap control)
```

**Magnitude check (`mag_check`).** For each operand, two AND trees test
whether its top CHK bits are all ones or all zeros. If this holds for both
operands, `fits` is raised. The check is about log2(CHK) gate levels deep and
runs in parallel with the multiplier, so it adds no delay.

**How many bits are checked.** CHK = W1 - W2 + 2. With that many uniform top
bits, each operand fits in W2 - 1 bits, so their sum always fits in W2 bits.
The reduced addition is therefore exact, not just usually exact. Checking
only W1 - W2 + 1 bits (operands fit in W2 bits) would allow a one-bit
overflow in the reduced adder.

**Truncation and sign extension (`width_ctrl`).** The multiplexer keeps bits
[w-1:0] of the raw sum and copies bit w-1 into every bit above it. Each
output bit is a 2:1 multiplexer. At full width it passes the sum through,
which is the configuration on the critical path. At reduced width, the upper
adder bits still toggle, but their value is discarded. The point is that
once those bits are discarded, a slow carry into them does no harm.

**Effective width.**

- When `fits` = 0, the effective width is `static_w`, the width the tap
  controller assigned to this tap.
- When `fits` = 1, it is min(W2, `static_w`).

`reduced` reports `fits` and is brought out of every filter as
`*_mac_reduced`, so the fraction p2 of reduced additions can be measured.
The average effective width is then W_avg = W1 * (1 - p2) + W2 * p2.

**Choosing W2.** There is a trade-off. With a wider W2, more operands
qualify, but the reduced adder's own worst error grows. With a narrower W2,
more small operands fall back to the full-width adder. A useful design-time
model assumes zero-mean Laplacian operands with scale b and a magnitude
threshold x = 2^W2. It minimises the average width, which works out to

    W_avg(x) = W1 - (W1 - log2 x) * (1 - e^(-x/b))^2

The smaller the signal variance, the smaller the best W2. The widths used
here (39, 38 and 20 bits) are fixed parameters. Nothing in the hardware
adapts W2.

## Tap reordering and static tap widths

`tap_ctrl` issues one tap per cycle. It computes two tables at elaboration
time, using constant functions on the coefficient parameter:

- **Order.** Feedforward taps b_i are sorted by ascending |b_i|. Feedback
  taps a_i are sorted separately by ascending |a_i|. The feedback section
  comes after the feedforward one. Ties keep their original index order.
- **Static width.** After step k, the running sum can be at most
  G_k * 2^(DW-1), where G_k is the sum of |c| over the taps issued so far.
  The width of step k is the smallest two's-complement width that holds this
  bound, capped at W1. The same bound applies to feedback taps, because past
  outputs are saturated to the same DW-bit format as the inputs.

Values for the three instances (order as original tap index, b then a):

| filter | order | static width per step |
|---|---|---|
| FIR | b1 b4 b0 b5 b2 b3 | 49 50 51 52 53 54 |
| IIR | b0 b3 b1 b2, a3 a1 a2 | 51 52 54 54 54 54 54 |
| sharpen | c0 c2 c6 c8 c1 c3 c5 c7 c4 (corners, edges, centre) | 18 19 20 20 21 22 22 22 23 |

The static width and the dynamic check share one truncation multiplexer
(see the effective width rule above). Whichever is narrower wins. Neither can
change the result, because both bounds are exact.

Two cases limit the benefit of reordering:

- If the taps are already in ascending order, reordering gains nothing.
- If all coefficients are equal, as in a rectangular window, reordering
  gains nothing either, although the static widths still apply.

## Sequencing and timing (`sm_filter`)

The filter computes y(n) = sum_{i=0}^{NB-1} b_i x(n-i) + sum_{i=1}^{NA} a_i y(n-i).
The feedback sign is "+": the IIR's a coefficients are stored as negative
numbers.

```
edge      e0        e1 .. eNT            eNT+1
          accept    MAC steps 0..NT-1    out_valid=1, out_data=y(n)
          x push                         y pushed to history (IIR)
in_ready  ─┐ 0 ......................... 1 during the last step
```

- A sample is accepted when `in_valid && in_ready`. It is shifted into the x
  history (`delay_line`) at that edge.
- The following NT = NB + NA cycles each perform one MAC. The first step
  uses 0 instead of the accumulator (`clr`).
- One cycle after the last step, the accumulator (Q4.50 for audio) is shifted
  right by CF bits and saturated to DW bits. Flooring, not rounding, is used
  for the shift. The result is registered as `out_data` with a one-cycle
  `out_valid` pulse, and for an IIR it is pushed into the y history.
- Latency is NT + 1 cycles from acceptance to `out_valid`.
- `in_ready` is also high during the last MAC step. A continuous stream is
  therefore accepted every NT cycles, and the MAC never idles.
- Overlapping samples are safe because feedback taps are issued after all
  feedforward taps (NB >= 1). The y history is updated before any a_i of the
  next sample is read.
- The output has no back-pressure. A consumer must take every `out_valid`
  pulse.
- Reset is asynchronous and active low. It clears the histories, the
  accumulator and the sequencer.

At the clock rates this architecture was characterised at (207.5 MHz for the
FIR, 303 MHz for the sharpening filter), a 22 kHz audio stream uses well
under 0.1 % of the MAC's capacity.

## Files

| file | contents |
|---|---|
| `rtl/tea_pkg.sv` | shared constants (`TEA_MAXT` = 128 taps), the coefficient table type, width helpers |
| `rtl/mag_check.sv` | operand magnitude checker |
| `rtl/width_ctrl.sv` | truncation / sign-extension multiplexer |
| `rtl/dyn_adder.sv` | dynamic-width adder |
| `rtl/mac_unit.sv` | multiplier + dynamic-width adder + accumulator, one cycle |
| `rtl/tap_ctrl.sv` | reordered tap sequencer with static widths |
| `rtl/delay_line.sv` | x / y sample history with random read |
| `rtl/sm_filter.sv` | the single-MAC filter |
| `rtl/tea_filter_top.sv` | the three filter instances |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_workloads.sv` | long runs of the evaluated workloads |
| `tb/tb_error_acceptance.sv` | error of a carry-limited adder model on the design's own operands |
| `tb/filt_agent.sv`, `tb/tea_ref_pkg.sv` | stream driver/checker and 64-bit reference filter |

## Using and changing it

A new filter is an `sm_filter` instance with these parameters:

- `CW`, `CF`, `DW`: coefficient width, coefficient fractional bits and
  sample width. The accumulator width is W1 = CW + DW.
- `W2`: the reduced adder width.
- `NB`, `NA`: the number of feedforward and feedback taps.
- `COEF`: the integer coefficient codes (real value * 2^CF), given as
  `'{0: b0, 1: b1, ..., NB: a1, ..., default: 0}`.

Everything else, including order, static widths and checker size, is
derived. Output samples use the same format as input samples.

To simulate any testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tea_pkg.sv tb/tea_ref_pkg.sv tb/tb_tea_filter_top.sv --top-module tb_tea_filter_top
./obj_dir/Vtb_tea_filter_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Verification

Each block has a testbench that compares it against values computed
independently:

- `tb_mag_check`, `tb_width_ctrl`, `tb_dyn_adder`: several thousand random
  operands, plus the range edges, checked against integer range tests and
  64-bit shift arithmetic.
- `tb_mac_unit`: random sums checked against a wrapped 64-bit model.
- `tb_tap_ctrl`: the IIR order, worked out by hand, the static widths, and
  chaining of sequences.
- `tb_delay_line`: checked against a queue model.
- `tb_sm_filter`: the FIR and IIR configurations.
- `tb_tea_filter_top`: all three filters at full size.

The filter tests use a direct-form reference (`tea_ref_pkg::ref_filter`).
Its tap order is the original one, so reordering errors would show. For
every output they check the value, the NT + 1 latency and the NT-cycle
sample period. The end-to-end test also requires every mechanism to occur
at least once per filter:

- reduced and full-width additions;
- steps at a static width below W1;
- taps issued out of order;
- refused inputs;
- back-to-back samples;
- output saturation;
- for the IIR, feedback taps reading a non-zero output.

`tb_workloads` runs the evaluated workloads in full:

- 88000 samples (4 s at 22 kHz) through the FIR and the IIR. The samples are
  Laplacian with variance 0.005 on a ±0.5 signal range.
- A 256 x 256 pixel stream through the sharpening filter.

It prints the reduced fraction and W_avg. With this data, the audio filters
use the reduced width for under 1 % of additions: at this signal level most
products are far above 2^(W2-2). Quiet passages are what the reduced width
serves. The image filter uses it for 87 % of additions (W_avg about 20.5 of
24 bits).

`tb_error_acceptance` puts a number on the benefit with a deliberately
simple stand-in for an overscaled supply. In this model a carry can travel
at most L bit positions per clock period. The testbench runs the FIR on
20000 samples of speech-like audio, with loud segments alternating with
pauses 1000 times quieter. About half of the additions then use the reduced
width. For each addition the design actually performs, it compares the
model's error in two cases:

- the model adder used at the full 54 bits;
- the model adder used at the effective width the hardware chose.

Mean squared error per addition, relative to full scale:

| carry budget L | full width | managed width |
|---|---|---|
| 8 bits | -16 dB | -21 dB |
| 14 bits | -25 dB | -34 dB |
| 20 bits | -16 dB | -57 dB |
| 26 bits | -32 dB | no error |
| 32 bits | -49 dB | no error |

This shows the mechanism, not the silicon result. Real timing errors depend
on the gate-level netlist and on the supply.

## Limits and departures

- **Timing errors are not modelled.** The benefit of both techniques appears
  only when the gate-level netlist runs at a reduced supply. The reference
  design was characterised that way in a 45 nm library: about 58 % energy
  saving for the audio filters at 0.75 V and 70 % for the sharpening filter
  at 0.70 V, at about 120 dB segmental SNR and 23 dB PSNR, with about 2 %
  area overhead. None of these figures can be reproduced in RTL simulation,
  and none have been here.
- **Reduced-adder check.** The checker tests one bit more than the plain
  reading "both operands fit in W2 bits" requires, so that the reduced sum
  cannot overflow. The checkers are therefore 17, 18 and 6 bits wide, not
  16, 17 and 5.
- **Coefficient precision.** The audio coefficients are four-decimal values
  rounded to Q1.21. They are close to the intended least-squares and
  Chebyshev designs but not identical to them.
- **Sharpening kernel.** The kernel is the standard unsharp kernel with
  alpha = 0.2:
  [-1/6 -2/3 -1/6; -2/3 13/3 -2/3; -1/6 -2/3 -1/6]. It is applied as 9 taps
  in row order to a single pixel stream. Two points are assumptions:
  - The filter is described as "9th order", which would be 10 taps. This
    design uses the kernel's 9 coefficients.
  - Pixels are signed Q8.0, so grey levels must be offset by -128.

  A true 2-D convolution would need line buffers, which are not part of the
  architecture and are not built.
- **Design choices.** The following are choices of this design:
  - the handshake;
  - flooring and saturation at the output;
  - the overlap of consecutive samples;
  - feedforward-first ordering and the tie-break rule;
  - using the full sample range as the bound for the static widths.
- **Only two adder widths.** Three or four widths were found to help only
  modestly, and are not built.
- **Larger filters.** The FIR studies of order 15 to 81 and the 63rd-order
  music/speech filter need coefficient sets that are not available. The core
  takes up to 128 taps by parameter, but no such instance is included.
