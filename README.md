# Real-time receiver for a Nyquist-WDM optical channel (4-QAM)

This design receives one channel of an optical Nyquist-WDM link. The optical front end and a
dual 1.6 GS/s ADC turn the channel into baseband I and Q samples. Rather than decode the full
rate, the FPGA captures 8192 consecutive samples per channel in bursts. It then processes each
burst at a slow, fixed rate and measures the bit-error rate (BER) of a known test block.

Within each burst, the receiver does the following:
- finds the sample peak and normalises the signal;
- applies a matched filter with 4x interpolation;
- removes the carrier phase;
- recovers the symbol timing;
- decides the 4-QAM symbols;
- fixes the quarter-turn ambiguity of the phase estimate;
- finds the start of the test block and counts bit errors against a stored copy.

Everything runs in one 200 MHz clock domain. The only other domains are the 400 MHz ADC
data clocks on the capture side.

```
ADC I/Q (DDR, 400 MHz) ─► data_sort ─► receiver_final ─────────────────────────────► error counters
   8 async FIFOs/channel    │            normalizer ─► iq_filter ─► phase_recovery
   state machine, tick      │            ─► qam_pll ─► 2 x sync_fifo ─► qam_demod
pll_init ─► synthesizer     │            ─► ninety_degree_shift ─► barker_data_checker
```

## Clocking and the 6.25 MHz tick

The system clock `clk` is 200 MHz. The slow processing rate is 6.25 MHz, one sample per
channel every 32 clocks. Here that rate is not a clock. It is a one-clock enable `ce6`, taken
from the rising edge of bit 3 of `generic_counter`, which advances every second clock.

The acquisition state machine, the synthesizer programming and the receiver's FIFO state
machine all move on `ce6`. All datapath stages run on `clk` with valid strobes:

| Point in the chain | Rate |
|---|---|
| Samples in | 1 per 32 clocks |
| After interpolation | 4 per 32 clocks |
| Symbols | about 1 per 9.56 interpolated samples (4-QAM, 2.39 input samples per symbol) |
| Bits | 2 per symbol, at least 4 clocks apart |

The original hardware ran separate clocks at these rates. Replacing them with enables is a
choice of this design; the rates themselves are kept.

## Acquisition (`data_sort`, `demux_fifo_sort`, `adc_data_interface`, `async_fifo`)

**Input format.** Each ADC channel delivers two 12-bit buses, `d` and `dd`, on both edges of a
400 MHz data clock, so one period carries four samples. `adc_data_interface` registers the
rising-edge pair and the falling-edge pair. It presents them as `d1d, d1, d2d, d2` in that time
order.

**Capture.** `demux_fifo_sort` writes the four samples into four FIFOs on the rising edge of
the half-rate clock and four more on its falling edge. That gives 8 Gray-pointer asynchronous
FIFOs of 1024 words each, which is 8192 samples per channel. Read side: on each tick it takes
one word from FIFO 0, 1, …, 7 in turn. The sample order on the output is therefore the ADC's
own time order.

**Write enable.** The write enable crosses into the data-clock domain through a two-flop
synchroniser. The falling-edge FIFOs get the enable one edge later, so both halves start on
the same four-sample boundary.

**State machine.** `data_sort` runs the ten-state acquisition sequence:
1. wait for the 100 MHz clock manager;
2. start synthesizer programming;
3. wait for the synthesizer lock;
4. release and wait for the ADC clock managers;
5. then loop over:
   - reset FIFOs;
   - wait;
   - write until every FIFO is full;
   - clock transition;
   - read until empty;
   - wait for the receiver's check-done.

Every control output is a function of the state. The state sequence, the state table and the
1024-word lanes follow the source design. The synchroniser depth and the Gray-code FIFO are
this design's own.

**Synthesizer.** `pll_init` programs the external synthesizer over a 3-wire interface. For each
of 13 register words (20 data bits and a 4-bit address) it sends 24 bits, MSB first, two ticks
per bit, then a one-tick latch pulse. The word values are top-level ports.

## Receiver chain (`receiver_final`)

**normalizer.** Tracks the largest positive sample and multiplies each sample by
`(2047 << 12) / max`, so the peak fills the 12-bit range. The output saturates at ±2047
because a negative sample can exceed the positive peak. That saturation is this design's
choice.

**iq_filter / tdm_fir.** A 100-tap matched filter interpolates by 4. A 50-tap derivative filter
gives the slope used by the timing loop. The document's point is that the filters are
over-clocked: multipliers are reused across clock cycles.
- `tdm_fir` is a polyphase filter that produces one output every 8 clocks.
- It accumulates each output over `ceil(taps_per_phase / MACS)` cycles: 4 multipliers for the
  matched filter (25 taps per phase, 7 cycles) and 7 for the derivative (50 taps, 8 cycles).
- Coefficients are 18-bit ports (Q2.16 scaling). They are computed offline for the channel.
- The matched output is delayed so that each matched sample is paired with the derivative at
  the same instant.

**phase_recovery (Viterbi-Viterbi).** Raises each sample to the fourth power, which removes the
4-QAM modulation, and averages it with a sliding sum. A pipelined CORDIC (`cordic_vec`) takes
the angle, which is divided by 4. A second CORDIC (`cordic_rot`) turns it into cos and sin, and
the sample is rotated back. The fourth-power method leaves a 90° ambiguity, resolved later.
Widths, the averaging length and the CORDIC depth are this design's.

**qam_pll (symbol timing).** The timing error is the derivative multiplied by the sign of the
matched sample, summed over I and Q. A proportional-plus-integral loop filter with gains `k1`
and `k2` drives a modulo-1 down counter. The counter advances by about 1/9.56 per interpolated
sample. When it underflows, the current sample is taken as the symbol. Taking the nearest
interpolated sample, with no fractional interpolator, follows the document. The gains are
ports because they depend on the signal.

**Receiver FIFOs.** Two FIFOs of 3072 symbols sit between the timing loop and the decoder. The
receiver state machine (reset, write, read, done) fills them until full, then empties them one
symbol per 8 clocks into the decoder. "Done" is reported as `checkdonewrong`: the FIFOs ran dry
before a check finished. The depth is this design's. It holds the worst-case wait for a block
start plus the 1088 symbols of one check.

**qam_demod.** The constellation is a "cross": 00 = +I, 01 = −I, 11 = +Q, 10 = −Q. The first bit
says which axis dominates; the second gives the sign. A second decoder runs on (I, −Q) and
feeds the ambiguity stage.

## Resolving the quarter-turn ambiguity (`ninety_degree_shift`)

This is the least obvious part of the design. After phase recovery the constellation can still
be off by 0°, 90°, 180° or 270°.

**Test block preamble.** Each test block contains this preamble, starting on a symbol boundary:
- Barker-11;
- a spare bit;
- the negated Barker-11;
- another spare bit.

**Correlators.** Three correlators compare the last 24 decoded bits against the pattern that
preamble takes under −90°, +90° and 180° rotation. The patterns are derived in
`rx_pkg::rotated_b11`. Both halves must match completely, and the negated half is compared
against its own rotated image: under ±90°, rotating the negated code is not the same as negating
the rotated code. The first match is latched.

**Correction chain.** The latched trigger sets up a chain of three multiplexers:

| Mux | Choice it makes | Effect |
|---|---|---|
| MUX1 | (I, Q) or (I, −Q) decoder | mirror over the I axis |
| MUX2 | invert every second bit or not | 180° |
| MUX3 | invert all bits or not | mirror over the diagonal |

Two mirrors make a rotation. The selects follow the document's trigger table:

| Trigger | Received rotation | MUX1 | MUX2 | MUX3 |
|---|---|---|---|---|
| Filt1 | −90° | 1 | 0 | 1 |
| Filt2 | +90° | 1 | 1 | 1 |
| Filt3 | 180° | 0 | 1 | 0 |
| none | 0° | 0 | 0 | 0 |

The document's schematic drives MUX3 from Filt1 only. That would leave Filt2 as a mirror rather
than a rotation, so the table is followed instead. The data are delayed by 24 bits, so the
preamble itself is corrected too.

## Block detection and error counting (`barker_data_checker`)

**The test block.** It is 2048 bits long:
- 20 synchronisation bits;
- the Barker-11 preamble above;
- Barker-13 followed by its negation;
- a PRBS-9 payload (x⁹ + x⁵ + 1, seed all ones).

The document does not publish its block contents, so this layout and the payload are this
design's. `rtl/check_rom.hex` holds the 2176 bits that follow the Barker-13 pair: bit *n* of the
ROM is block bit (70 + *n*) mod 2048, one bit per line.

**Detection and counting.** A 26-bit window looks for "+13 then −13" (trigger I), or the
opposite (trigger Q: stream inverted, so the data are inverted before comparison). While a
trigger is held, each bit is compared with the ROM. After 2176 bits the checker pulses
`checkdoneright`, stores the count and clears.

**Top-level counters.** These are ports:
- `error_accum` sums the counts;
- `trial_count` counts finished checks;
- `attempt_count` counts every check-done event.

BER = `error_accum / (2176 * trial_count)`.

**Reset handshake.** Two flip-flops in `top_level_design` complete the loop:
- the receiver reset is the acquisition FIFO reset, delayed by one clock;
- a check-done flip-flop is set by the receiver's done and cleared by that reset.

## Top level and what lies outside it

`top_level_design` wires the parts above together. Everything that is not logic in this design
enters or leaves as a port:

| Ports | Source outside this design |
|---|---|
| the 200 MHz clock, ADC data clocks, their halves, lock flags | clock managers |
| single-ended ADC buses | input buffers and the ADC |
| the 3-wire serial lines | synthesizer chip |
| counters and the `dbg` struct | logic-analyzer core |

The optics, anti-alias filter, ADC and synthesizer are analog or external parts. `pll_ce` is
constant 1, as in the document's control table.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `MF_TAPS` / `DF_TAPS` | 100 / 50 | document |
| `FIFO_DEPTH` (per lane, 8 lanes per channel) | 1024 | document |
| `RX_FIFO_DEPTH` | 3072 | this design |
| `NREG` (synthesizer words) | 13 | document |
| `CHECK_BITS` | 2176 | document |
| `W_NOM` | round(2²⁴ / 9.5621) | document's samples per symbol |
| Sample width | 12 bits | document |
| Coefficient width | 18 bits | this design |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each one was also run against a deliberately broken copy of
its module and caught it. To build and run one with Verilator:

```
verilator --binary --timing -Wno-fatal --assert -y rtl -y tb +libext+.sv -Irtl \
  rtl/rx_pkg.sv tb/tb_qam_demod.sv --top-module tb_qam_demod -o sim && obj_dir/sim
```

**Shared test signal.** The receiver-level and top-level tests also need
`-Itb tb/tb_sig_pkg.sv`. That package builds the test signal independently of the design:
- raised-cosine pulses (roll-off 0.25) at 2.39 samples per symbol;
- a carrier rotation and small noise;
- windowed-sinc matched filter and derivative filter coefficients.

**End-to-end test.** `tb_top_level_design` runs the whole design at full size, with no
parameter overrides:
- It programs the synthesizer, brings the lock flags up, and drives the ADC buses in DDR form.
- It runs four complete capture loops, with carrier rotations of 10°, 190°, 100° and 280°. The
  190° capture also carries short inverted bursts.
- It counts every mechanism and fails any that never happens: ticks, words, every acquisition
  and receiver state, FIFO full and empty, normaliser updates, strobes, loop activity, both
  triggers, both kinds of done, the hold flip-flop, receiver reset and all three counters.
- Result: 0 errors in the clean captures and 3–8 in the impaired one. Each capture gets its
  expected correction (none, 180°, and the two quarter turns), with 8192 samples and about 3426
  symbols per capture.
- It takes about ten seconds.

## Limits and open points

- **Timing-loop pull-in.** This is the main weakness. With the gains used in the tests
  (`k1 = 100000`, `k2 = 100`; positive for the error sign used here) the loop locks cleanly from
  most starting timing phases. From some it stays near the unstable point between symbols for
  the whole capture, and then no block is found. In a sweep of eight start offsets, 11 of 16
  checks completed, all of them with 0 errors. Gains from the document's formulas were not
  available as numbers. Better gain tuning or a fractional interpolator is the first thing to
  revisit.
- **Test scenarios.** The end-to-end tests use 0 ppm symbol-rate offset. At 500 ppm some runs
  slip cycles.
- **Inverted block.** The inverted-block trigger (trigger Q) is exercised by the unit
  testbenches only. Every correction case is also run end to end.
- **Coefficients and gains.** The filter coefficients and loop gains are inputs. The document
  derives them offline for each channel spacing, and none are built in.
- **Lint.** Package constants that a given module does not use show up as unused-parameter lint
  warnings when that module is compiled alone. The asynchronous FIFO testbench varies its clock
  periods, which gives zero-delay warnings in that testbench only.
