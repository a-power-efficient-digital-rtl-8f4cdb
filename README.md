# Gain and offset correction for banks of slope ADCs by stopping the counter clock

A single-slope ADC converts by counting clock pulses until its comparator sees
the ramp cross the input signal. If some of those pulses are withheld from the
counter, spread evenly over the ramp, the result is scaled by a factor just
below one. This is a gain correction that needs neither a multiplier nor a
look-up table. If some pulses are counted before the ramp starts, the result is
shifted. This is an offset correction.

In an imager with one ADC per pixel, all converters run in lock-step. One
shared **pulse generator** can therefore drive a small bus of "stop" lines for
the whole array. Each ADC holds a few memory bits that select which bus lines
may stop its clock. Per ADC, the cost is one AND gate per bus line, one wide
NOR, one flip-flop and a 9-bit shift register. A blocked clock pulse also
saves the counter's switching energy.

This RTL implements the digital part of such a bank: 128 channels, 9-bit
counters and a 9-line bus by default. It includes the extension with extra
LSB counter flip-flops that gives finer gain steps. The comparators, the ramp
DAC and the photo-sensors are analog and sit outside the RTL.

## One conversion

A conversion starts when `rst` is released. All parts are synchronous to `clk`,
and the reset is synchronous and active high.

| phase | length (clocks) | what happens |
|---|---|---|
| `PH_START` | 1 | the generator latches `n_gc`, the number of bus lines used for gain |
| `PH_OFFSET` | 2^K − 1, with K = M − `n_gc` (skipped if K = 0) | the ramp has not started; counters count the offset pulses that their memory does not block |
| `PH_GAIN` | 2^C − 1, with C = N + E | `gain_run` is high and the external ramp runs; counters count until their comparator drops, minus blocked pulses |
| `PH_DONE` | until the next reset | the bus is low, nothing counts, and `dout` is valid |

With the defaults (6 gain lines and 3 offset lines) a conversion takes
1 + 7 + 511 clocks. In every ADC, a counter advances on a clock edge only if
both of these were high one clock earlier:

* the comparator sample (`cmp`, high while the ramp is below the signal);
* the clock enable CE = NOR over k of (`bus[k]` AND `mem[k]`), which is also
  forced low outside the offset and gain phases.

Both signals are registered once, so they stay aligned with each other.

## The bus pulse pattern

This is the core of the design. Everything else is bookkeeping.

**Gain lines.** Gain uses lines 0 .. `n_gc`−1. In the gain phase the generator
numbers the cycles t = 1 .. 2^C − 1. Line k is high in cycle t when the lowest
set bit of t is bit C−1−k. With C = 9:

* line 8 is high in every odd cycle (256 pulses);
* line 7 is high in cycles 2, 6, 10, … (128 pulses);
* line 0 is high only in cycle 256 (1 pulse).

So line k carries 2^k pulses, spaced exactly 2^(C−k) cycles apart. No two lines
are ever high in the same cycle (an assertion checks this). An ADC whose gain
bits hold the value B therefore loses exactly B pulses over a full ramp:

    gain = (2^C − 1 − B) / (2^C − 1)        e.g. B = 52  ->  459/511 = 0.898

Using m gain lines limits B to 2^m − 1:

| m | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| smallest gain | 0.998 | 0.994 | 0.986 | 0.971 | 0.939 | 0.877 | 0.751 | 0.501 | 0 |

Six lines (0.877 .. 1) are enough for typical pixel-to-pixel gain spread.

**Offset lines.** The offset phase uses the remaining K lines, `n_gc` .. M−1.
Its cycles are numbered t = 1 .. 2^K − 1. Line `n_gc`+j is high when the lowest
set bit of t is K−1−j, which gives 2^j pulses. A set memory bit can only
*remove* pulses: the gates are AND then NOR. So an ADC counts
(2^K − 1) − (its offset bits) in this phase. **The offset is stored as its
complement.** With 3 lines, offset bits 100b give +3.

Offsets below zero come from the common `preset` that every counter loads
during reset. For example, a preset of −7 combined with 3 offset lines gives
offsets −7 .. 0.

**Correction word of one ADC** (M bits; bit k controls bus line k):

    word[n_gc-1:0] = (2^C - 1) - gain_numerator      // pulses to block
    word[M-1:n_gc] = (2^K - 1) - offset              // offset 0 .. 2^K-1

Worked example with 6 gain lines: gain 459/511 and offset +3 give the word
`100_110100`b. A full-scale conversion then ends at 3 + 459 = 462.

The choice of split between gain and offset lines is made per conversion,
through the `n_gc` input. It is up to the system, not fixed in the ADCs.

## Loading the correction words

Each ADC's memory is a shift register clocked by `prog_clk`. The registers of
all ADCs form one chain:

* `prog_in` feeds bit M−1 of ADC 0;
* bit 0 of ADC i feeds ADC i+1;
* `prog_out` leaves ADC NADC−1.

To program the whole bank, send NADC·M bits, each word LSB first, starting
with the word for ADC NADC−1. The memories have no reset. They keep their
contents across conversions, and only the counters are cleared.

## Counters and precise gain correction

The default counter is a 9-bit maximal-length LFSR. It uses XNOR feedback,
taps 9 and 5, and has 511 states. That is why the coefficients have a
denominator of 511. The correction does not depend on the counter code, so a
binary counter (`CODE = CNT_BINARY`) works just as well. Its results are plain
integers.

For finer gain steps, set `E` > 0 with a binary counter. The counter then has
E extra flip-flops below the N output bits, and the digital clock must run
2^E times faster than the ramp. `dout` is the top N bits. Example with E = 2
and the 9 bus lines: the counter has C = 11 bits, coefficients run from
1536/2047 to 2047/2047 (the smallest is 1 − 2^(M−C) = 0.75), and the step is
four times finer. An LFSR counter with E > 0 is rejected at elaboration.

## Linearity

Withholding pulses makes the step between codes uneven. Evaluated over the RTL
for every coefficient (`tb_gc_linearity`):

| counter width C (= M) | max INL | at coefficient | INL / full scale | DNL range | missing codes |
|---|---|---|---|---|---|
| 9 | 1.444 LSB | 426/511 | 0.283 % | −0.50 .. 1.00 | none |
| 10 | 1.667 LSB | 682/1023 | 0.163 % | −0.50 .. 1.00 | none |
| 11 | 1.778 LSB | 1706/2047 | 0.087 % | −0.50 .. 1.00 | none |
| 12 | 2.000 LSB | 2730/4095 | 0.049 % | −0.50 .. 1.00 | none |
| 13 | 2.111 LSB | 6826/8191 | 0.026 % | −0.50 .. 1.00 | none |
| 14 | 2.333 LSB | 10922/16383 | 0.014 % | −0.50 .. 1.00 | none |

Absolute INL grows slowly with counter width, by roughly 1 LSB per 6 bits.
INL relative to full scale falls, so a wider counter is the way to reduce relative INL. The
coefficients where the maximum occurs (426/511 and 1706/2047) are the ones the
original measurements single out as worst cases. This agreement supports the
pulse placement used here.

## Modules

| file | module | role |
|---|---|---|
| `rtl/gc_pkg.sv` | `gc_pkg` | counter code and phase enums, LFSR tap table |
| `rtl/gc_adc_bank.sv` | `gc_adc_bank` | top: generator plus NADC channels, memory chain |
| `rtl/gc_pulse_generator.sv` | `gc_pulse_generator` | phase control and bus decode |
| `rtl/gc_adc_channel.sv` | `gc_adc_channel` | one ADC: comparator flip-flop, clock stop, G1 enable, counter, memory |
| `rtl/gc_clock_stop.sv` | `gc_clock_stop` | AND gates, NOR, CE flip-flop |
| `rtl/gc_coeff_mem.sv` | `gc_coeff_mem` | M-bit correction shift register |
| `rtl/gc_counter.sv` | `gc_counter` | LFSR or binary counter with preset |

Top-level parameters of `gc_adc_bank`:

| parameter | default | meaning |
|---|---|---|
| `NADC` | 128 | number of ADCs |
| `M` | 9 | bus lines = memory bits per ADC |
| `N` | 9 | output bits |
| `E` | 0 | extra LSB counter flip-flops (needs `CNT_BINARY` if > 0) |
| `CODE` | `CNT_LFSR` | counter code |

Require C = N + E ≥ M.

## Testbenches

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`.

* `tb_gc_counter`: the LFSR period is 511 with no lock-up state; the binary count matches; both hold when disabled.
* `tb_gc_coeff_mem`: shift-in and shift-out order.
* `tb_gc_clock_stop`: the CE truth table under random inputs.
* `tb_gc_pulse_generator`: for C = 9 and 11 and six splits, checks phase lengths, pulses per line, even spacing, one line at a time, and blocked-pulse counts.
* `tb_gc_adc_channel`: the LFSR and precise (E = 2) channels against a cycle model, plus programming through the chain.
* `tb_gc_adc_bank`: full size with default parameters. It covers the worked example, random words and signal levels, 1..9 gain lines against the smallest-gain table, a calibrated imager (gains 0.92..1, offsets −6..0 via preset −7), and offset-only operation. It checks conversion length and counts that every mechanism occurred.
* `tb_gc_precise`: E = 1 and E = 2 banks, coefficient range and 1706/2047.
* `tb_gc_linearity`: the table above (about 15 seconds).

The reference model (`tb/gc_ref_pkg.sv`) predicts results in closed form. Line
k blocks floor((T + 2^(C−1−k)) / 2^(C−k)) pulses within the first T gain
cycles. It does not replay the generator's decode.

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/gc_pkg.sv tb/gc_ref_pkg.sv \
        tb/tb_gc_adc_bank.sv --top-module tb_gc_adc_bank -Mdir obj && obj/Vtb_gc_adc_bank

All of them finish within seconds; `tb_gc_linearity` takes about 15.

## Design choices beyond the original circuit

* **Exact pulse placement.** The original only requires evenly interrupted
  clocking. The lowest-set-bit decode is this design's choice. It is
  confirmed only indirectly, by the linearity agreement above.
* **Line assignment.** Gain uses the lowest-weight lines and offset the
  highest.
* **Phases and timing.** The idle start cycle, the done phase, the offset
  phase length of 2^K − 1 and the complement offset encoding are choices made
  here.
* **Static gates.** The NOR/AND gates are static logic. The original built
  them in dynamic logic, which is why a gain of 1 costs no switching energy
  there.
* **G1 as an enable.** G1 is a synchronous count enable. A silicon
  implementation would gate the counter clock with a clock-gating cell. The
  count is the same, but the energy saving only appears with real gating.
* **Extra input on the NOR.** CE has an extra input that holds counting off
  outside the conversion window.
* **Interface details.** The comparator polarity, the synchronous reset, the
  LFSR polynomial, the memory shift direction and the chaining of memories
  across ADCs were all chosen here.
* **Readout.** After conversion, the original reuses the bus to read the
  counters out through readout buffers. That protocol is not specified, so
  the counters are brought out in parallel on `dout` instead. The hidden
  extra LSBs of the precise mode are not read out.
* **Not modelled.** Comparators, ramp DAC, photo-sensors, the energy figures
  and the software that computes the coefficients from flat-field images.
