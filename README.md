# Reconfigurable decimation and FIR filtering for a sigma-delta telemetry channel

In a conventional data acquisition channel, the analog filter in front of the converter fixes
the passband, the stopband and the sampling rate. To move any of them you have to change
resistors and capacitors. This design puts that filtering in logic instead. The 1-bit stream of
a sigma-delta modulator is decimated by a sinc filter whose decimation factor can be set at run
time. The resulting samples then pass through a 60-tap equiripple FIR filter whose coefficients
can be rewritten. The FIR filter's roll-off is much sharper than the sinc filter's, so the
channel can carry more of the band at the data rate and still reject what lies above it.
Retuning the channel means writing one register and 60 coefficients.

The second idea is frugality. The FIR filter contains no hardware multiplier. Each tap has a
small sequential shift-and-add multiplier that takes one coefficient bit per clock. The filter
is therefore built from adders, shifters and registers only, at the cost of 19 clocks per
output sample.

```
 analog in   +------------------+  bit_valid/   +----------------+ dec_valid/  +---------------------+ out_valid/
 ----------> | sigma-delta      |  bit_in       | sinc^3         | dec_sample  | 60-tap FIR          | out_sample
             | modulator        | ------------> | decimator      | ----------> | 60 x shift_add_mult | ---------->
             | (analog, model   |               | R = 2..1024    |  (drop +    | 60-word coef bank   |
             |  in tb/ only)    |               | (32 at reset)  |  overrun if |                     |
             +------------------+               +----------------+  busy)      +---------------------+
                                                  ^ dec_we/dec_factor            ^ coef_we/addr/data
```

`rtl/daq_top.sv` is everything to the right of the modulator. The modulator itself is analog
and is not part of the RTL. `tb/sd_modulator_model.sv` is a second-order behavioural model of
it, used only for simulation.

## Number formats

| quantity | format |
|---|---|
| modulator bit | 1 = +1, 0 = -1 |
| decimated sample, filter input/output, coefficient | 16-bit two's complement Q1.15 |
| multiplier product | 32-bit Q2.30 |
| filter accumulator | 38 bits, so the sum of 60 products cannot wrap |
| sinc integrators and combs | 31 bits (1 + 3·log2 1024) |
| decimation factor | 11 bits, 2..1024 |

Shared constants, types and the reset coefficients are in `rtl/daq_pkg.sv`.

## Sinc decimation unit (`sinc_decimator`)

This is a third-order cascaded integrator-comb filter:

- Three integrators advance on every accepted bit. They are not pipelined, so every stage sees
  the new bit in the same clock.
- After every R bits, the last integrator is sampled into three first-difference (comb) stages.

The comb output is exactly the input convolved with three R-long boxcars. Its gain is R³. The
result is scaled to Q1.15 by a power of two:

    sample = saturate( floor( full · 2^15 / 2^(3·ceil(log2 R)) ) )

- For power-of-two factors this is unity gain. A full-scale run of ones saturates to 32767.
- For other factors the gain is R³ / 2^(3·ceil(log2 R)), which is below 1. For example, R = 31
  gives 0.91.

The integrators wrap in two's complement, as a CIC filter allows. The 31-bit width keeps the
comb output exact up to R = 1024.

To change the factor, pulse `cfg_we` (top level: `dec_we`) with the new value:

- The value is clamped to 2..1024.
- All integrators, combs and the bit counter are cleared.
- The first three samples after a change are the filter's start-up transient.

`out_valid` pulses on the clock edge after the one that accepted the R-th bit of a group.

## Shift-and-add multiplier (`shift_add_mult`)

This is a 16 × 16 → 32-bit signed multiplier with one adder. When `en` is high while the unit
is idle:

- It loads the multiplicand (sign-extended to 32 bits) and the multiplier.
- It clears the accumulator and the 4-bit `state` counter.

On each of the next 16 clocks it looks at multiplier bit `state`. If that bit is set, it adds the
multiplicand shifted left by `state`. Then the multiplicand shifts left and the multiplier
shifts right. Bit 15 carries weight -2^15 in two's complement, so for that bit the shifted
multiplicand is *subtracted*. This makes the unit correct for signed operands without Booth
recoding.

When `state` reaches 15:

- `done` pulses for one clock and the product is final.
- `product` then holds until the next start.

If `en` is held high, the next operation starts one clock after `done`, so back-to-back
operations take 17 clocks each.

```
clk edge      0      1      2   ...   16     17
en            1      -      -          -      -
state         -      0->1   1->2      15     -
done          0      0      0          1(after edge 16)
```

## 60-tap FIR filter (`fir_filter`)

The filter is direct form:

- a delay line of 60 samples (the newest sample plus 59 delay registers)
- a bank of 60 coefficient registers
- one multiplier per tap
- one 60-input sum (59 adders)

All 60 multipliers start on the same clock and finish together. An assertion checks this, and
also checks that none is started while it is busy. The sum is rounded to Q1.15 (add 2^14, shift
right 15) and saturated.

Schedule of one sample (state machine `IDLE → START → MULT → IDLE`):

| edge | action |
|---|---|
| 0 | `in_valid && in_ready`: delay line shifts, new sample enters tap 0 |
| 1 | all multipliers load (tap k × coefficient k) |
| 2..17 | multipliers step through the 16 coefficient bits |
| 18 | products summed, rounded, saturated; `out_valid` high after this edge |

- Latency is 18 clocks.
- `in_ready` is high only in IDLE, so the filter takes at most one sample every 19 clocks.
- A coefficient write (`coef_we`, `coef_addr` = age of the sample it multiplies, `coef_data`)
  is allowed at any time. The multipliers copy their operands at edge 1, so a write made during
  a sample takes effect from the next sample.
- Writes to addresses 60..63 are ignored.

### Reset coefficients

The bank resets to `DEFAULT_COEFFS` in `rtl/daq_pkg.sv`. This is a 60-tap Parks-McClellan
(equiripple) low-pass designed at the filter's input rate fs:

- passband 0 .. 0.205·fs, stopband 0.25·fs .. 0.5·fs
- stopband weight 10
- each tap rounded to round(h·2^15)

The quantised filter has about 0.16 dB of passband ripple and more than 59 dB of stopband
rejection. Its DC gain is 33066/32768, about +0.08 dB.

To retune the channel, design a new 60-tap filter for the new data rate and write its Q1.15
coefficients. For example, use a passband edge at 0.205 × data rate and put the stopband where
the application needs it.

## Rates and overrun

The filter needs 19 clocks per sample and gets one every R accepted bits. With one bit per clock
(`bit_valid` always high), factors of 19 and above are therefore safe. For smaller factors,
`bit_valid` must be high on no more than R of every 19 clocks, or the clock must run faster
than the bit rate by the same ratio.

If a decimated sample arrives while the filter is busy:

- the sample is dropped
- `overrun` pulses in that clock
- `overrun_seen` stays set until reset

Nothing else is disturbed. The filter's delay line simply misses that sample.

## Verification

Each testbench checks itself. It ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_shift_add_mult` | corner and 300 random operand pairs against a native multiply; done exactly 16 clocks after start, one clock long; product holds; back-to-back restarts every 17 clocks |
| `tb_sinc_decimator` | every sample against a reference built from three direct moving sums (no integrators or combs); output timing; factors 32 (reset), 2, 5, 31, 1024, clamping of 1 and 2000; saturation |
| `tb_fir_filter` | impulse response of the reset coefficients; random data; latency 18 and one sample per 19 clocks; 260 coefficient writes, some during a sample; saturation |
| `tb_fir_response` | frequency response of the reset coefficients as built: 12 sine tones straight into the filter; passband within 0.2 dB (measured ripple 0.15 dB), stopband at least 50 dB down (worst measured -60.9 dB); a passband tone with an equal stopband interferer |
| `tb_daq_top` | whole chain at default parameters, driven by the modulator model: every decimated and filtered sample against independent models; a passband tone (0.051·data rate) plus an equal interferer (0.35·data rate) at R = 32 (rejection measured with a windowed DFT, must exceed 50 dB; about 67 dB is obtained); switch to R = 16 (overruns must occur); switch to R = 64 with a full coefficient reload |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/daq_pkg.sv tb/tb_daq_top.sv --top-module tb_daq_top -o sim
./obj_dir/sim
```

Replace `tb_daq_top` with any other testbench name. All five finish in well under a second.

## Where this design makes its own choices

The following are decisions of this implementation, not a fixed specification:

- **Decimation structure.** The decimator is a sinc³ CIC filter with differential delay 1 and
  power-of-two output scaling. Only "a sinc filter" with factors from 2 to 1024 and a nominal
  factor of 32 is prescribed.
- **Signed arithmetic.** The multiplier is signed and handles the sign bit by subtraction.
- **Filter schedule.** All 60 multipliers run in parallel, which gives the 19-clock sample
  period.
- **Output arithmetic.** Filter outputs are rounded and saturated to 16 bits.
- **Stopband edge of the reset coefficients.** The nominal specification puts the stopband edge
  at 0.5 × data rate, which is the Nyquist frequency of the filter's input. The reset filter
  therefore uses 0.25·fs. This meets the 0.2 dB / 50 dB goal with 60 taps.
- **No droop compensation.** The reset coefficients have a flat passband and do not compensate
  the sinc droop. At 0.205·fs the sinc³ droop is about 1.8 dB. A compensating filter can be
  loaded through the coefficient port.
- **Interface details.** The following are all interface choices of this design:
  - the `bit_valid` clock enable
  - the overrun handling
  - the run-time configuration ports
  - asynchronous active-low reset

## Files

- `rtl/daq_pkg.sv`: formats, limits, reset coefficients
- `rtl/shift_add_mult.sv`: sequential shift-and-add multiplier
- `rtl/sinc_decimator.sv`: sinc³ decimation unit
- `rtl/fir_filter.sv`: 60-tap filter
- `rtl/daq_top.sv`: the channel
- `tb/sd_modulator_model.sv`: behavioural sigma-delta modulator (simulation only)
- `tb/tb_*.sv`: testbenches
