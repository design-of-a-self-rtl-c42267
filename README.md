# Self test for a beam loss monitoring acquisition chain

Between fills, when no beam circulates, a beam loss monitor (BLM) channel can
be checked end to end. A known low-frequency sine (about 0.15 Hz) is injected
into the chain, and the chain's response is compared with the stimulus by a
simple harmonic analysis. Two numbers per channel are measured:

* **gain**: the channel's peak-to-peak amplitude divided by the reference's;
* **phase**: the delay between the two signals, as a fraction of one period.

This block sits next to the measurement logic of the acquisition FPGA. It
reads the running sums that the measurement electronics already produce and
the samples of the reference signal. It gives a gain bus and a phase bus for
each channel, both in unsigned fixed point. If a measurement cannot be made,
an error code goes on those buses instead. The final pass/fail decision
(comparing the results with bounds, and the beam-permit flag) is not part of
this RTL.

The default configuration is the four-channel test configuration:

* running sum 7, refreshed every 2.56 ms;
* 40-bit running sums and a 16-bit reference;
* 16-bit divider operands and 6 fractional result bits;
* an input frequency of 0.153 Hz.

## How the two measurements work

**Peak-to-peak.** Each sample is compared with the one before it. When a
rising signal starts to fall, the previous sample was a maximum, and it is
stored. When a falling signal starts to rise, the previous sample was a
minimum. The stored maximum minus this minimum is the peak-to-peak value, and
`p2p_valid` pulses for one clock. This happens once per period, always just
after the minimum. That makes the `p2p_valid` pulse a time mark as well as
an amplitude measurement.

**Gain.** The gain is the channel's peak-to-peak value divided by the
reference's.

**Phase.** Two counters measure it. Both count reference samples.

* `ref_counter` restarts on each reference `p2p_valid`. It keeps the length
  of the last period (the "360°" count).
* `channel_counter` restarts on the reference *or* the selected channel's
  `p2p_valid`. When the channel's pulse arrives, it keeps the delay since
  the reference's pulse.

Restarting a counter never loses the count it reached (`reset_hold`): that
value stays on `held_value`. This matters because the phase division runs
about 24 clocks after the counters restart. The phase is delay / period;
multiply by 360 for degrees.

Both divisions use the same divider. A control unit takes the four channels
in turn: first the gain, then the phase.

**Why a filter.** Comparing successive samples gives no protection against
noise: one noisy sample near a peak makes a false extremum. So each channel
first goes through a second-order Butterworth low-pass filter. The
reference is used unfiltered.

## Data path

```
rs_data[ch][12], rs_enable[6]
      │
 rs_decoder ── running sum RS_NUMBER of every channel, strobe = enable RS_NUMBER/2
      │
 iir_filter ×4 ── 2nd-order Butterworth, cut-off 2·F
      │
 peak_to_peak ×4              ref_data, ref_valid ── peak_to_peak (reference)
      │                                                  │
 channel_select (address from control_unit) ─────────────┤
      │   p2p value, p2p_valid of the channel            │ ref p2p, ref p2p_valid
      │                                                  │
      │          ref_counter      (reset_hold = ref p2p_valid)
      │          channel_counter  (reset_hold = ref p2p_valid OR channel p2p_valid)
      │                 │   both tick on ref_valid
      ▼                 ▼
 operand mux: gain  = ch p2p / ref p2p
              phase = channel delay / reference period
      │
 fixed_point_divider ──► result_store (gain[4], phase[4], error codes)
      ▲
 control_unit (sequence, channel address, operand select, writes)
```

The whole block runs on one clock, `test_clock`. Sample strobes
(`ref_valid` and the selected running-sum enable) mark the clocks that carry
a new sample. The divider, the filters and the counters are
clock-enabled by these strobes, or run every clock.

## The control sequence

`control_unit` is a Moore machine. Seven states form the normal sequence of
one channel, and three error states handle failures.

| state | what happens | leaves when |
|---|---|---|
| `WAIT_REF` | waits for a reference `p2p_valid` | reference pulse → `WAIT_CH`; reference counter overflow → `ERR_REF_OVF` |
| `WAIT_CH` | waits for the selected channel's `p2p_valid` | channel pulse → `LOAD_GAIN`; channel counter overflow → `ERR_CH_OVF` |
| `LOAD_GAIN` | divider loads ch p2p / ref p2p | next clock |
| `DIV_GAIN` | divider runs | divider's `finishing` → `STORE_GAIN` (or `ERR_DIV0`) |
| `STORE_GAIN` | gain written; divider loads delay / period | next clock |
| `DIV_PHASE` | divider runs | `finishing` → `STORE_PHASE` (or `ERR_DIV0`) |
| `STORE_PHASE` | phase written; channel address + 1 (wraps) | next clock → `WAIT_REF` |
| `ERR_CH_OVF` | code `100…0` on both buses of the channel; next channel | next clock |
| `ERR_REF_OVF` | code `110…0` on both buses of the channel; next channel | next clock |
| `ERR_DIV0` | code `111…0` on the bus of the running measurement | after a gain error the phase is still measured |

Which bus carries a code tells which channel failed, and whether it was the
gain or the phase.

Details that are easy to miss:

* After `test_enable` rises, the first reference pulse only starts the
  period count. Without this, the first phase would be divided by a
  partial period.
* If a channel pulse comes in the same clock as a reference pulse, it is not
  used as the channel's time mark. The next channel pulse is used instead.
* The channel counter also restarts on every reference pulse. So it can
  overflow only when neither signal produces events. The reference counter
  overflows in that same clock, so in `WAIT_CH` the channel overflow has
  priority.
* A channel that goes flat while the reference keeps running never
  overflows anything. The sequence then waits on that channel, and its
  result buses keep their last values.
* At the top level a division by zero cannot happen. A peak-to-peak value is
  always positive, and a period is at least one sample. The path is still
  there, and the control unit's testbench exercises it.

**Timing of one channel.** With 16-bit operands and 6 decimals:

| edge | what happens |
|---|---|
| 0 | the gain operands are loaded (the edge that ends `LOAD_GAIN`) |
| 1 to 22 | the divider takes 22 steps |
| 23 | the gain is stored and, on the same edge, the phase operands are loaded |
| 46 | the phase is stored |

So one division takes 2 + 16 + 6 = 24 clocks, counting load and store.
Because the phase load shares an edge with the gain store, both results are
in their registers 2 + 2·(16 + 6) = 46 clocks after the load. Both numbers
are checked in simulation.

## The divider

`fixed_point_divider` is a restoring shift-and-subtract divider, kept as
small as possible. It has three registers and one subtractor:

* a partial-remainder register, into which the dividend is shifted one bit at
  a time;
* a quotient shift register;
* a divisor register, which does not change during the operation.

Every clock, both shift registers move by one bit. The subtractor computes
*remainder·2 + next dividend bit − divisor*, and its borrow bit decides the
step:

* no borrow: the divisor fitted; the difference becomes the new remainder
  and a 1 enters the quotient;
* borrow: the difference is dropped, the remainder only shifts, and a 0
  enters the quotient.

After `DW` steps every dividend bit has entered. `DEC` more steps shift in
zeros, which produces the fractional bits. The quotient has `DW + DEC` bits,
with `DEC` of them fractional. The latency is fixed: it depends on neither
the operand values nor a zero divisor.

A zero divisor is flagged when the operands are loaded (`div_by_zero`). The
steps still run, so the latency does not change.

## The Butterworth filter and its coefficients

The filter implements
`y(n) = [x(n) + 2x(n−1) + x(n−2) − b1·y(n−1) − b2·y(n−2)] / C`.
The coefficients come from the analog filter `1/(1 + √2·s/ωc + (s/ωc)²)`
through the bilinear transform:

```
ωc = 2π·(2F)          K = Ts·ωc
C  = 1 + 2√2/K + 4/K²
b1 = 2 − 8/K²        (z⁻¹ term, weights y(n−1))
b2 = 1 − 2√2/K + 4/K²  (z⁻² term, weights y(n−2))
```

`Ts` is the update period of the chosen running sum, from the 12-entry table
in `selftest_pkg`. The cut-off is one octave above the input frequency.

The package computes these values at elaboration. It then divides them by C
and rounds them to the coefficient format, `sfixed(1 downto −18)`: 20 bits,
18 of them fractional. The data format is `sfixed(21 downto −14)`: 36 bits,
14 of them fractional. The running sum enters as an integer and saturates
at 2²¹ − 1. The five products are summed at full precision. The sum is then
rounded (half up) to 14 fractional bits and saturated. The filter processes
one sample per strobe, in a single clock.

**Coefficient rounding is coarse at the default sample period.** With
Ts = 2.56 ms and F = 0.153 Hz, C ≈ 165 700. That makes 1/C and 2/C only
2 and 3 units of 2⁻¹⁸. The feedback coefficients are
−522 463·2⁻¹⁸ and 260 326·2⁻¹⁸.

The rounded filter is still stable (pole radius 0.9965), and its DC gain is
exactly 1. But its response at F differs from the ideal Butterworth:

| | gain at F | lag at F |
|---|---|---|
| rounded filter | 0.996 | 39.6° |
| ideal filter | 0.970 | 43.3° |

Like the cable and chamber effects, these offsets belong in the acceptance
bounds. They do not change the valid/not-valid decision. A longer running
sum (larger Ts) gives a better-resolved filter.

## Result format and error codes

`gain[c]` and `phase[c]` are `INT_DW + DEC` = 22 bits wide, with 6
fractional bits.

* A gain of 1.0 reads `64`.
* A phase of 90° reads 0.25 of a period, which is `16`.

The phase has a resolution of 1/64 of a period (5.6°) and is truncated, not
rounded. The reference period is about 2553 samples, so the counters
themselves resolve 0.14°.

Error codes are left-aligned on the 22 bits:

| code | meaning |
|---|---|
| `100…0` | channel counter overflow |
| `110…0` | reference counter overflow |
| `111…0` | division by zero |

Only a gain of 32 768 or more would read like an error code. Acceptance
bounds are expected to be far below that.

## Parameters

All sizes are in `rtl/selftest_pkg.sv` and reach the modules as parameters.
The defaults are the values of the test configuration.

| constant | default | meaning |
|---|---|---|
| `RUNNING_SUM_NUMBER` | 7 | running sum used (0–11) |
| `CHANNEL_DATA_WIDTH` | 40 | running-sum width |
| `REFERENCE_DATA_WIDTH` | 16 | reference sample width |
| `INTERNAL_DATA_WIDTH` | 16 | divider operand and counter width |
| `NUM_CHANNELS` | 4 | channels tested in turn |
| `OUTPUT_DECIMALS` | 6 | fractional bits of the results |
| `FILTER_INTERNAL_MSB/LSB` | 21 / −14 | filter data format |
| `FILTER_COEF_MSB/LSB` | 1 / −18 | filter coefficient format |
| `INPUT_FREQUENCY` | 0.153 | stimulus frequency, Hz |
| `RS_UPDATES[12]` | 40 µs … 655 ms | update period of each running sum |

The 16-bit counters limit the number of samples in one period to 65 535. At
0.153 Hz that rules out running sums 0–5. Their periods are 163 399 samples
(sums 0–3) and 81 699 samples (sums 4–5). With those sums, the reference
counter overflows and every channel reports `110…0`. Sums 6–11 fit.

## Top-level interface (`selftest_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `test_clock` | in | 1 | clock of the whole block |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `test_enable` | in | 1 | runs the test; low holds everything at its start state |
| `rs_data` | in | 4×12×40 | running sums, `[channel][sum]` |
| `rs_enable` | in | 6 | refresh strobe of each pair of running sums |
| `ref_data` | in | 16 | reference sample (unsigned) |
| `ref_valid` | in | 1 | new reference sample; also the counters' tick |
| `gain` | out | 4×22 | gain per channel, or an error code |
| `phase` | out | 4×22 | phase per channel, or an error code |
| `ch_addr` | out | 2 | channel under measurement |
| `state_code` | out | 4 | control-unit state, for observation |

Concurrent assertions check three rules:

* the divider is never restarted while busy;
* a quotient is stored only in the clock after a division ends;
* the divider's step counter stays in range.

## Where this RTL departs from the original design

* **One clock.** The original uses a local clock tree at the running-sum
  rate. It also notes that the divider can run from a faster global clock.
  Here everything runs on `test_clock`, with sample strobes as enables.
  The divider runs at the full clock rate.
* **Counter tick.** The counters tick on reference samples. The original
  leaves the counter clock open.
* **Counter reset.** `reset_hold` is a synchronous input, where the
  original describes an asynchronous reset.
* **Peak-to-peak output.** The result is registered, so it is valid one
  clock after the sample that follows the minimum. The original subtracts
  combinationally.
* **Feedback coefficients.** The original's two statements of the
  recurrence disagree on which of b1 and b2 weights y(n−1). This RTL
  follows the coefficient definitions: b1 is the z⁻¹ term.
* **Filter data width.** The filter keeps the 36-bit data format of the
  global constants. A 20-bit width is also mentioned for the filter's data
  registers; it was not used.
* **Width reduction.** A channel's peak-to-peak value reaches the divider
  through a saturating reduction to 16 bits. The original does not say how
  the width is reduced.
* **Control unit.** The state diagram, the error handling and the start-up
  arming are reconstructed from the description of the states and their
  triggers.
* **Not included.** The magnitude comparators and the beam-permit flag are
  not included. The original leaves them undefined.

## Simulating

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. For example, the end-to-end test
at full default size takes about half a second:

```
verilator --binary --timing --assert -y rtl --top-module tb_selftest_top \
    rtl/selftest_pkg.sv tb/tb_selftest_top.sv -o sim
./obj_dir/sim
```

`tb_selftest_top` drives a reference of 20 000 counts peak to peak and four
channels with gains 0.8 to 2.4 and lags of 10° to 200°, with a little noise.
It checks:

* every gain and phase, against the response of the rounded filter, within
  2 LSB;
* the 46-clock pair timing;
* a reference failure, which must give `110…0` on every channel;
* a failure of everything while a channel is awaited, which must give
  `100…0`;
* a restart through `test_enable`.

`tb_selftest_running_sums` runs the top level with two other running sums:

* running sum 9 (80 samples per period): all results are checked;
* running sum 3 (163 399 samples per period): every channel must report a
  reference counter overflow.

Unit testbenches:

| testbench | what it checks |
|---|---|
| `tb_iir_filter` | bit-exact against an integer model of the recurrence, at two sample periods |
| `tb_fixed_point_divider` | random and corner divisions, and the 24-clock latency |
| `tb_peak_to_peak` | against a reference model |
| `tb_hold_counter` | held values, restart and overflow |
| `tb_control_unit` | the state sequence and all its timings, with a modelled divider |
| `tb_channel_select`, `tb_result_store`, `tb_rs_decoder` | the multiplexers, the result registers and error codes, and the running-sum selection |

## Files

| file | contents |
|---|---|
| `rtl/selftest_pkg.sv` | constants, error-code type, coefficient functions |
| `rtl/selftest_top.sv` | top level |
| `rtl/rs_decoder.sv` | running-sum selection |
| `rtl/iir_filter.sv` | Butterworth filter |
| `rtl/peak_to_peak.sv` | peak-to-peak extractor |
| `rtl/hold_counter.sv` | `ref_counter` and `channel_counter` |
| `rtl/channel_select.sv` | channel multiplexers |
| `rtl/fixed_point_divider.sv` | divider |
| `rtl/control_unit.sv` | sequencer |
| `rtl/result_store.sv` | output registers and error codes |
| `tb/tb_*.sv` | one testbench per module, plus `tb_selftest_running_sums` |
