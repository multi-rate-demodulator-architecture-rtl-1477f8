# Multi-Rate Demodulator (MRD) for OQPSK

One digital demodulator that serves either **one wideband channel** or
**32 narrowband channels**, without changing the hardware. The wideband channel
carries 1.024 Msymbol/s; each narrowband channel carries 1/32 of that,
32 ksymbol/s. The channelizer ahead of the demodulator always delivers
1.44 Msample/s of complex baseband. In wideband mode these are consecutive
samples of one signal. In narrowband mode they are 32 channels interleaved
sample by sample (45 ksample/s each). Because the aggregate sample rate is the
same, one time-shared datapath with per-channel state handles both cases. A
mode switch changes only which state is used in which time slot.

The modulation is differentially encoded offset QPSK (OQPSK, also called
staggered QPSK): Q is delayed by half a symbol relative to I. Each symbol
carries two bits, so the output is 2.048 Mbit/s for the wideband channel or
64 kbit/s per narrowband channel. Most modulation-dependent work is done
through look-up tables, so other quadrature formats need new table contents
rather than new logic:

- the pulse-shaping coefficients
- the phase-error law
- the decision rule

This repository holds synthesizable SystemVerilog for the whole demodulator
(`rtl/`) and a self-checking testbench for every block and for the complete
design (`tb/`).

## The epoch: one input sample, 16 clocks

The system clock is 16 times the input sample rate (23.04 MHz). The 16 clocks
that belong to one input sample form an **epoch**. An epoch does all the work
for one input sample: for the wideband channel, or for one narrowband channel.
Narrowband channels take turns in the order 0, 1, ... 31, 0, ... The channels
never interact, because every piece of state is kept once per channel:

- the filter history
- both NCOs
- both loop filters
- the de-stagger samples
- the midpoint/transition parity

All of this state is held as 32-entry arrays. Wideband mode uses entry 0 only.

## Signal chain

```
 in_i/in_q ─► input_buffer ─► resample_fir ─► derotate ─► destagger_buffer ─┬─► symbol_decision ─► dout/dclk, 32 lines
 (per channel   (32 x 16)      16 taps, 4 MACs   complex      (32 x 8)       │
  RAM)                ▲          ▲   ▲           multiply                    ├─► timing_error_est ─► loop_filter ─┐
                      │   rs_coef_rom x2         ▲                           │                                    │
                      │   (512 x 8)      sincos_rom (256 x 8)                └─► phase_error_rom ─► loop_filter ─┐│
                      │          ▲               ▲                               (1024 x 8)                      ││
                      │    sym_sync_nco ◄────────┼───────────────────────────────────────────────────────────────┼┘
                      │    (mu_a, mu_b, one/two) carrier_nco ◄──────────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `epoch_sequencer` | epoch clock count, channel index, wideband/narrowband mode |
| `input_buffer` | dual-port RAM, last 16 samples of each channel |
| `rs_coef_rom` | 32 coefficient sets x 16 taps (square-root raised cosine), one set per timing offset |
| `resample_fir` | four multiply-accumulators: two interpolants (A, B) x two arms (I, Q) |
| `sym_sync_nco` | 24-bit NCO per channel: how many interpolants this epoch (1 or 2) and their offsets |
| `derotate` | complex multiply by exp(-j·θ) |
| `carrier_nco`, `sincos_rom` | 24-bit carrier phase per channel; top 8 bits → cos/sin |
| `destagger_buffer` | dual-port RAM, last 8 derotated interpolants of each channel |
| `timing_error_est` | data-transition-tracking loop (DTTL) timing error |
| `phase_error_rom` | atan(Q/I) minus the ideal QPSK phase, by look-up |
| `loop_filter` | proportional + integral filter, power-of-two gains (two instances) |
| `symbol_decision` | differential decisions by table, serial output with strobe and channel index |
| `mrd_top` | wiring and the cycle schedule |
| `mrd_pkg` | shared sizes, types (`cplx_t`), saturation helper |

## Re-sampling: one or two interpolants per epoch

The demodulator needs exactly two samples per symbol: a **midpoint** (mp) and a
**transition point** (t). The input gives 1.40625 samples per symbol
(1.44/1.024), and its sample times are unrelated to the symbol clock. The
filters therefore compute the two samples by interpolation. The
interpolator is fused with the matched filter. Tap k of coefficient set mu
holds the square-root-raised-cosine pulse at (k − 8 + mu/32) input samples.
One filter pass thus yields the matched-filter output at a fractional position
of the current input interval, resolved to 1/32 of an input sample.

The symbol sync NCO decides where the interpolants fall. Its 24-bit
accumulator is the position of the next interpolant within the current input
interval, as a fraction of an input sample. Each epoch:

1. The first interpolant is made at mu_a = the accumulator's top 5 bits.
2. The accumulator is advanced by the step `ratio − K_T·loop`. The nominal ratio is 1.44/2.048 = 0.703125
   (`24'hB40000`).
3. If that update overflows, the current samples support no further
   interpolant, and the epoch makes **one**. Otherwise a second interpolant is
   made at mu_b and the accumulator is advanced again (this always overflows).
   The epoch then makes **two**.

On average this gives 1/0.703125 = 1.422 interpolants per epoch, which is two
per symbol. The pattern is irregular (2, 1, 2, 1, 1, 2, 1, …). The step is
clamped to [½, 1) of an input sample so that one or two interpolants are always
enough. A positive timing error shortens the step, which moves the interpolants
earlier.

All 16 taps are read once per epoch. The two coefficient ROMs are addressed
with mu_a and mu_b in parallel, so both interpolants of both arms come out of
one 16-clock pass.

## De-staggering: labelling mp and t

Interpolants are labelled alternately by a per-channel parity bit. Because Q
lags I by half a symbol, the labels mean the following:

| label | I arm | Q arm |
|---|---|---|
| even | midpoint | transition |
| odd  | transition | midpoint |

A symbol is complete when an odd interpolant arrives. At that moment the four
newest interpolants (n = odd one, n−1, n−2, n−3) hold everything both arms
need:

| | previous midpoint | transition | current midpoint |
|---|---|---|---|
| I | n−3 .I | n−2 .I | n−1 .I |
| Q | n−2 .Q | n−1 .Q | n .Q |

An epoch makes at most two interpolants, so at most one symbol completes per
epoch. In about 29 % of epochs no odd interpolant arrives. In others the buffer
does not yet hold three earlier interpolants, for example after reset or after
a mode switch. In both cases the epoch's estimates, loop-filter updates and
decisions are **bypassed**. Both NCOs still advance in every epoch.

The parity is not aligned to the signal at start-up. If it starts half a symbol
off, the "midpoints" sit on transitions. That is the DTTL's unstable point, and
the timing loop pushes away from it towards the correct alignment. It can
linger there for a few hundred symbols (the usual DTTL hang-up). The end-to-end
test allows 600 symbols for acquisition.

## The two loops

Both loops use the same `loop_filter`:

- output = K_L·e + integrator
- integrator += K_I·e

The output is followed by a K_T scaling into an NCO. All three gains are powers
of two, given as shift amounts on the top's ports (K = 2^−k), so they can be
programmed.

The error is aligned to the top of a 24-bit word before shifting, so the
24-bit output covers loop bandwidths across several decades. Each channel's
output is held between updates, because the filter is updated once per symbol
and the NCOs once per epoch.

**Symbol sync (DTTL).** For each arm, the signs of the previous and current
midpoint show whether a transition happened between them:

- negative → positive: the error is +T, where T is the transition sample
- positive → negative: the error is −T
- no sign change: the error is 0

The I and Q errors are summed. A transition sampled late gives a positive
error, which speeds the interpolants up.

**Carrier tracking.** The current I and Q midpoints, 5 most significant bits
each, address a 1024-word table. Each word holds atan2(Q, I) minus the ideal
phase of that quadrant (π/4, 3π/4, −3π/4 or −π/4), in units of π/128. A
proportional-plus-integral filter followed by the phase accumulator makes a
second-order, type-2 loop, so a carrier frequency offset is tracked with no
steady phase error. The top 8 bits of the 24-bit carrier NCO are the phase
(256 steps over ±π). They address the cos/sin table, and the derotator then
forms:

- I·cos + Q·sin
- Q·cos − I·sin

Loop gains are inputs and have no built-in values. These values acquire
reliably in simulation, with rate offsets up to ±200 ppm and carrier offsets
up to ±2·10⁻³ rad per input sample:

| loop | K_L | K_I | K_T |
|---|---|---|---|
| symbol sync | 2^-2 | 2^-9 | 1 |
| carrier | 2^-2 | 2^-8 | 2^-2 |

## Clock schedule

An epoch starts on the clock after `in_strobe`. The front end works on the new
channel while the back end finishes the previous one.

| clock | front end (channel c) | back end (channel of the previous epoch) |
|---|---|---|
| t=0 | write sample; NCO update → mu_a, mu_b, one/two | |
| t=1…16 | read taps oldest-first, both coefficient sets | |
| t=2…17 | multiply-accumulate | |
| t=18 = next t=2 | results | b0: carrier phase → cos/sin |
| | | b1, b2: derotate A, B → b2, b3: write to the de-stagger buffer |
| | | b4: symbol complete? b4…b7: read n…n−3 |
| | | b9: timing error, decision bits; symbol sync loop update |
| | | b10: carrier loop update |
| | | b11: carrier NCO advance (every epoch) |

In wideband mode every epoch belongs to channel 0. A loop update made in the
back end therefore reaches the symbol sync NCO one epoch later than it would
in a non-pipelined schedule. The loops tolerate this extra delay easily.

## Decisions and output

The table in `symbol_decision` maps the four sign bits to two data bits.
Differential decoding is the XOR of each arm's previous and current midpoint
sign, parameter `DEC_TABLE = 32'h14BE_BE14`, address {I cur, I prev, Q cur,
Q prev}. Per symbol, the I bit and then the Q bit leave on `dout`, each with a
one-clock `dclk` strobe and the channel number on `dout_ch`. In narrowband
mode this one line is time-division multiplexed. The same bits also appear on
per-channel lines `nbc_data[c]`, each with its own strobe `nbc_clk[c]`.

## Interface of `mrd_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 23.04 MHz system clock; asynchronous active-low reset |
| `in_strobe` | in | 1 | one pulse per input sample, exactly every 16 clocks (checked by an assertion) |
| `in_sof` | in | 1 | the sample is narrowband channel 0 |
| `in_i`, `in_q` | in | 8 | signed complex baseband sample |
| `nbc_mode` | in | 1 | 1 = 32 narrowband channels, 0 = one wideband channel |
| `ratio` | in | 24 | coarse re-sample ratio, nominal `24'hB40000` |
| `ss_kl/ki/kt`, `ct_kl/ki/kt` | in | 5 each | loop gain shifts |
| `dout`, `dclk`, `dout_ch` | out | 1, 1, 5 | serial data, strobe, channel |
| `nbc_data`, `nbc_clk` | out | 32 each | per-channel data and strobes |

`nbc_mode` is taken at a frame boundary: at channel 0 in narrowband mode, or at
any sample in wideband mode. A change clears all channel state. The filter
result still in flight is dropped, and the channels re-acquire.

## What is given and what is chosen

These come from the architecture this RTL implements:

- the block structure and the 16-clock epoch
- 32 channels
- the 16-tap filter with 32 offset sets in a 512 × 8 table, square-root raised
  cosine
- the 24-bit NCOs, with the top 5 bits selecting the offset
- the one-or-two interpolant rule and the bypass
- the DTTL error table
- the phase error by 1024 × 8 table
- the 8-bit phase into a 256 × 8 cos/sin table
- the derotation equation
- the PI loop filters with power-of-two gains and a 24-bit output
- differential sign-bit decisions
- a serial TDM output plus 32 separate lines

These are this implementation's own choices:

- **Word widths.** 8-bit samples and coefficients, with the rounding and
  saturation points.
- **Roll-off 0.40625.** This is the widest roll-off whose bandwidth, 1.024
  MHz × 1.40625, fits the 1.44 MHz complex sample rate.
- **Table scalings.**
- **Phase-error table addressing.** The 5 + 5 bit split of the address.
- **The cycle schedule**, and with it the extra epoch of loop delay in wideband
  mode.
- **Parity labelling and buffer depths.**
- **Sign of the NCO fine term.**
- **Step clamp.**
- **Mode-switch handling.**
- **`in_sof` framing input.**
- **Output strobe format and bit order.**

All tables are computed by constant functions from their defining formulas. To
change the pulse shape or the modulation law, edit the function in
`rs_coef_rom`, `phase_error_rom` or the `DEC_TABLE` parameter.

## Known limits

- **90° carrier ambiguity.** A QPSK carrier loop can settle at any of four
  phases. Per-arm differential decoding removes a 180° ambiguity, but a 90°
  lock exchanges the arms. The I output then carries the Q bits, and the Q
  output the I bits of the next symbol. The end-to-end test accepts either
  mapping and reports how many channels locked each way.
- **Acquisition time.** Acquisition depends on the gains and on where the
  parity starts (see above).
- **Clock rate not checked.** Timing at 23.04 MHz has not been checked on any
  technology.

## Simulation

Each block has `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example:

```
verilator --binary --timing --assert -Irtl rtl/mrd_pkg.sv rtl/resample_fir.sv tb/tb_resample_fir.sv --top-module tb_resample_fir
./obj_dir/Vtb_resample_fir
```

The end-to-end test `tb/tb_mrd_top.sv` runs the design at its full size. Build
it with all of `rtl/`:

```
verilator --binary --timing --assert -Irtl rtl/mrd_pkg.sv rtl/*.sv tb/tb_mrd_top.sv --top-module tb_mrd_top -j 8
```

Its generator produces differentially encoded OQPSK with square-root-raised-
cosine pulses for each channel. Each channel gets a random symbol-rate offset,
timing phase, carrier phase and frequency offset. The test runs three phases of
1100 symbols per channel:

1. wideband
2. 32 narrowband channels
3. wideband again

After 600 symbols of acquisition, every decoded bit of every channel must
match. The test also requires each mechanism to occur:

- epochs with one and with two interpolants
- bypassed and processed epochs
- both mode switches, with the in-flight result dropped
- agreement of the TDM line and the per-channel lines

It also checks the average of 1.42 interpolants per epoch. It takes about
20 seconds.
