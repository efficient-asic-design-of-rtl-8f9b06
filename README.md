# WCDMA digital down converter (DDC)

A receiver for a third-generation (WCDMA) base station digitises its
intermediate-frequency (IF) signal directly: a 14-bit ADC delivers real samples
at 61.44 MSPS. The digital down converter turns that stream into complex
baseband at 7.68 MSPS, twice the 3.84 Mchip/s chip rate, ready for timing
recovery. It does three things:

1. **Mixing.** A direct digital synthesizer makes `cos(w0 n)` and `sin(w0 n)` at
   the IF. A mixer multiplies the real input by `e^{-j w0 n}`:
   `I = x cos(w0 n)`, `Q = -x sin(w0 n)`. This moves the wanted carrier to 0 Hz.
2. **Decimation.** The rate is cut by 8 in three steps of 2. Doing it in one
   step would need a very long filter. The steps are two half-band filters and
   then a root-raised-cosine (RRC) channel filter:
   61.44 → 30.72 → 15.36 → 7.68 MSPS.
3. **Matched filtering.** The last stage is the RRC pulse-shaping filter
   (roll-off 0.22). It also removes the adjacent 5 MHz carriers.

The design is built for small area. Each filter uses a **partially serial
pipelined MAC** (PSPMAC): a few multipliers are reused over several clock
cycles for each output, instead of one multiplier per tap. The multiplier
counts are 3 for the 11-tap first half-band, 5 for the 27-tap second
half-band and 38 for the 61-tap RRC. That is 46 multipliers for one real
chain.

```
              +-----------+   I   +-----------------------------------------+
ddc_in 14b -->|           |------>| ddc_chain: HB1 /2 -> HB2 /2 -> RRC /2   |--> ddc_out_i 16b
              | ddc_mixer |       +-----------------------------------------+
              |           |   Q   +-----------------------------------------+
              |           |------>| ddc_chain (identical)                   |--> ddc_out_q 16b
              +-----------+       +-----------------------------------------+--> ce_out
                 ^cos ^sin
              +-----------+
phase_inc --->| cordic_dds|
              +-----------+
```

## Files

| file | contents |
|---|---|
| `rtl/ddc_pkg.sv` | coefficient sets, CORDIC angle table, default widths |
| `rtl/psp_decimator.sv` | generic partially serial pipelined MAC decimator by 2 |
| `rtl/ddc_stage1_hb.sv` | 11-tap half-band, 3 multipliers, 61.44 → 30.72 MSPS |
| `rtl/ddc_stage2_hb.sv` | 27-tap half-band, 5 multipliers, 30.72 → 15.36 MSPS |
| `rtl/ddc_stage3_rrc.sv` | 61-tap RRC, 38 multipliers, 15.36 → 7.68 MSPS |
| `rtl/ddc_chain.sv` | the three stages in cascade (one real path) |
| `rtl/cordic_dds.sv` | phase accumulator plus 16-stage pipelined CORDIC |
| `rtl/ddc_mixer.sv` | real × complex mixer |
| `rtl/ddc_top.sv` | complete DDC: synthesizer, mixer, I and Q chains |
| `tb/*.sv`, `tb/ddc_ref.svh` | self-checking test benches and their reference arithmetic |

## Clocking and sample strobes

Everything runs on one clock, `clk`, with an asynchronous active-high `reset`.
The nominal clock is the 61.44 MHz input rate. `clk_enable` marks the clock
cycles that carry an input sample. Hold it high for a full-rate stream, or pull
it low to stall the input. Rates are never made by dividing the clock. Each
stage instead passes a one-clock strobe to the next:

* `clk_enable` goes into the mixer (registered, one clock of latency);
* the mixer's `out_valid` goes into stage 1;
* stage 1's `out_valid` goes into stage 2, and stage 2's into stage 3;
* stage 3's `out_valid` is the top's `ce_out`.

So at full rate stage 1 sees a sample every clock, stage 2 every 2 clocks,
stage 3 every 4 clocks, and `ce_out` pulses every 8 clocks. An output word
holds its value between strobes. The synthesizer also advances only on
`clk_enable`, so the LO phase moves once per accepted input sample whatever
the gaps in the stream.

## The partially serial MAC decimator (`psp_decimator`)

This is the core of the design. All three filter stages are instances of it,
with different coefficient sets and multiplier counts.

**Only the kept outputs are computed.** A decimator by 2 throws away every
second output of the filter. This one computes
`y[m] = sum_k h[k] · x[2m+1-k]` once per input pair and never computes the
others. This is the polyphase form of the decimator. The first output comes
after the second input following reset. Samples before reset count as zero.

**Snapshot register.** A tap delay line shifts on every input strobe. When
the second sample of a pair arrives, the whole delay line is copied, new
sample included, into a second register bank, the input pipeline register.
The multipliers then work on that copy for the next `P` clocks while the
delay line goes on taking new samples. Without the copy, the data would move
under the MAC in the middle of a computation.

**Folding.** The filters have linear phase, so `h[k] = h[N-1-k]`. With
`FOLD = 1`, pre-adders form `x[k] + x[N-1-k]`, leaving `U = ceil(N/2)`
products. With `FOLD = 0` all `U = N` taps are multiplied.

**Serial schedule.** `NMULT` multipliers handle the `U` products in
`P = ceil(U / NMULT)` cycles. In cycle `c`, multiplier `m` takes product
`u = c·NMULT + m`. Its coefficient comes from a constant multiplexer over the
`P` cycles. Products are registered, then summed into an accumulator. After
the last group the sum is rounded and saturated into the output register.

| stage | taps | fold | products | multipliers | MAC cycles P | clocks per pair at full rate | latency |
|---|---|---|---|---|---|---|---|
| HB1 | 11 | yes | 6 | 3 | 2 | 2 | 4 |
| HB2 | 27 | yes | 14 | 5 | 3 | 4 | 5 |
| RRC | 61 | no | 61 | 38 | 2 | 8 | 4 |

**Throughput rule.** `P` must not exceed the number of clocks between two
snapshots. Stage 1 is the tight one: 2 cycles for 2 clocks. An assertion in
`psp_decimator` flags a pair that arrives while the MAC is still busy.
Gaps in the input only make the rule easier to meet.

**Latency.** A stage's output strobe comes `P + 2` clocks after the clock
that presented the second sample of the pair: one clock for the snapshot,
`P` for the products, one for accumulate-and-round. The whole chain takes
13 clocks from the clock that presented the 8th input of a group to
`ce_out`.

**Numbers.** Coefficients are 16-bit Q1.15 values. The accumulator is wide
enough never to overflow. The output keeps `OUT_W - IN_W` extra low bits:
stage 1 turns 14-bit samples into 16-bit samples with gain 1. Rounding is
half up: add `2^(s-1)`, then shift right arithmetically by `s`. The result is
then clamped to the output range. Saturation is reachable: the half-bands and
the RRC have a peak gain above 1 for worst-case sign patterns.

## The filters

The coefficient values live in `ddc_pkg`, with the formulas that produced
them. Each set is quantised to Q1.15 and scaled to unity gain at DC.

* **HB1**: 11 taps (order 10), an equiripple half-band for 61.44 MSPS. The
  pass band ends at 2.34 MHz and the stop band starts at 28.38 MHz. The
  alternate taps are exactly zero and the centre tap is exactly 0.5. After
  quantisation the pass-band error is below 2·10^-5 dB, and the attenuation
  from 28.38 MHz upwards is better than 120 dB.
* **HB2**: 27 taps, an equiripple half-band for 30.72 MSPS with the same
  pass band. The stop band starts at 13.02 MHz. The quantised taps were fine-tuned by
  ±1 LSB so that the pass-band error stays within 0.0001 dB. The stop-band
  attenuation is better than 98 dB.
* **RRC**: 61 taps, a root-raised-cosine at 4 samples per chip with roll-off
  0.22 and a 50 dB Chebyshev window. Its response is -3.5 dB at 1.92 MHz, as
  a root-Nyquist filter should be at half the chip rate. From 2.8 MHz
  upwards it is below -71 dB.

A half-band multiplies its zero taps like any other tap. The stage is sized
by the full tap count, so the zeros cost cycles but no logic beyond a
constant-zero coefficient slot.

## The synthesizer (`cordic_dds`)

A 28-bit phase accumulator adds `phase_inc` once per sample. The output
frequency is `phase_inc · 61.44 MHz / 2^28`, in steps of 0.23 Hz. The top 20
bits of the phase, taken as a fraction of a turn, drive a rotation-mode
CORDIC:

* angles in the second and third quadrants get half a turn added, and the
  results are negated at the end;
* 16 shift-and-add iterations follow, one per pipeline stage, so one angle
  enters per clock;
* the start vector is `(0.60725 · A, 0)`, which pre-cancels the CORDIC gain;
* two guard bits are carried and rounded off at the output.

The outputs are 16-bit with amplitude 32767 and are within 4 LSB of the
ideal. They lag the accumulator by `CORDIC_N + 2 = 18` enabled clocks. For
the DDC this lag is only a constant phase offset of the mixed-down signal.

## The mixer (`ddc_mixer`)

The mixer computes `x · cos` and `-x · sin`, divides by 2^15 with
round-half-up, and saturates back to 14 bits. Each chain therefore sees the
ADC's own precision. The one product that can overflow is
`x = -8192` times a word of -1, and it saturates to +8191.

## Interface of the top (`ddc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, nominally 61.44 MHz |
| `reset` | in | 1 | asynchronous, active high |
| `clk_enable` | in | 1 | `ddc_in` holds a sample this clock |
| `ddc_in` | in | 14 | real IF sample, two's complement |
| `phase_inc` | in | 28 | LO tuning word; it can change at any time without a reset |
| `ddc_out_i`, `ddc_out_q` | out | 16 | baseband I and Q, 7.68 MSPS at full rate |
| `ce_out` | out | 1 | one-clock pulse with each new I/Q pair |

A tone `f_IF + d` with amplitude `A` (in input LSBs) at the input comes out
as a complex tone at `+d` with amplitude about `2A` in output LSBs. The
factor is 1/2 from the real-to-complex mixing times 4 from the two extra
output bits. Parameters: `IN_W` (14), `OUT_W` (16), `PW` (28).
`ddc_chain` on its own, with `IN_W = OUT_W = 12`, gives a 12-bit-in,
12-bit-out variant.

## How far it is verified

`tb_ddc_pkg` checks the tables themselves: symmetry, half-band zeros, unity
DC gain, the RRC's response at 1.92 MHz and above 2.8 MHz, and the CORDIC
angles against `atan`.

Each test bench checks its outputs against values it computes itself. The
decimator references are direct-form convolutions in 64-bit integers, with
no folding and no serial schedule. They share only the coefficient values
and the rounding rule with the RTL.

* `tb_ddc_stage1_hb`, `tb_ddc_stage2_hb`, `tb_ddc_stage3_rrc` (all built on
  `decim_tb_core`): each stage is fed at the rate it sees in the chain, then
  with random gaps, then with saturating sign patterns, then with a DC level.
  Every output is checked bit-exactly. The latency is checked at full rate,
  and so is the DC gain.
* `tb_ddc_chain`: the 14/16 chain and the 12/12 chain run side by side on a
  pulse, a ramp, a chirp across the whole input band, random data and random
  `clk_enable` gaps. The outputs are checked bit-exactly, along with one
  output per 8 inputs and the 13-clock latency. The chirp passes at full
  amplitude below 1 MHz and is at least 40 dB down from 5.5 to 27 MHz
  (measured: about 75 dB).
* `tb_cordic_dds`: every cos/sin pair is compared with real-valued cos/sin of
  the test bench's own phase, to within 4 LSB. The run includes a retune,
  random enable gaps, and all four quadrants.
* `tb_ddc_mixer`: the mixer is checked bit-exactly on random operands and on
  the saturating corner.
* `tb_ddc_top`: the complete DDC at its default sizes, run end to end. It
  checks the mixer bit-exactly against the synthesizer's words and both
  chains bit-exactly against the reference cascade. It also makes physical
  checks:
  * a tone 300 kHz above a 10 MHz LO gives amplitude 2A (within 15%),
    turning in the positive direction;
  * after retuning to 15.36 MHz, with 25% input gaps, a tone 500 kHz below
    gives the same amplitude, turning the other way;
  * a carrier 5 MHz away is rejected by more than 40 dB (in practice by
    about 80 dB);
  * full-scale input saturates the mixer.

Simulation with Verilator 5 (two-state, so all state is reset):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ddc_pkg.sv tb/tb_ddc_top.sv --top-module tb_ddc_top -o sim
./obj_dir/sim          # prints TB_RESULT checks=... failures=0
```

Replace `tb_ddc_top` with any other test bench name. Every run ends with a
`TB_RESULT` line, and each has a watchdog.

## Design decisions and departures

* **Coefficients are this design's own.** The filters are designed to the
  stated specifications: band edges, ripple targets, tap counts, RRC roll-off
  and window, and 16-bit coefficients. No coefficient values are published
  with the specification.
* **Second half-band length.** The specification gives both "order 18" and
  "27 coefficients". The RTL uses 27 taps, the count tied to the hardware
  description and to the 5 multipliers. A 19-tap version would be
  `HB2_TAPS = 19` with new coefficients; 10 folded products on 5 multipliers
  would also fit.
* **Complex path.** The published resource count (46 multipliers, 34 I/O pins
  = 14 + 16 + 4) describes a single real chain, `ddc_chain` here. The top
  follows the mathematical description of the mixer and runs two chains, for
  I and Q. It therefore has 92 filter multipliers plus 2 in the mixer.
* **Symmetry folding in the half-bands, none in the RRC.** Folding is what
  lets 3 and 5 multipliers keep up at one input sample per clock. Not folding
  the RRC keeps all 38 of its multipliers busy.
* **Synthesizer quality.** A 115 dB SFDR is named as a requirement for a
  reference design. The 16-bit CORDIC here has up to 4 LSB of error, which
  limits it to roughly 80 dB (an estimate; SFDR was not measured). For more,
  widen `TRIG_W`/`CORDIC_N` in `ddc_pkg`. Widen `ANGLE_W` too, and extend
  `CORDIC_ATAN` with `round(atan(2^-i) / 2pi · 2^ANGLE_W)`.
* **Word widths between stages, rounding, saturation and reset style** are
  this design's choices and are listed above. Flip-flop names in the original
  schematics suggest asynchronous clear in stage 1 and synchronous reset in
  stage 2; here asynchronous reset is used everywhere.
* **Not covered:** the ADC and analog front end, the chip-rate back end, and
  anything specific to the 90 nm implementation (cells, floorplan, power).
