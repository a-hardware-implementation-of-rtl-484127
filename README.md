# Hardware Levinson solver for linear-prediction RFI suppression

Radio antennas that look for air showers from cosmic rays (30–80 MHz) pick
up narrow-band human-made interference (RFI). Narrow-band signals can be
predicted from their own past, while the short broadband pulse of an air
shower cannot. So a linear predictor is used: a FIR filter estimates each
sample from the samples before it, and the estimate is subtracted from
the trace. What is left is the part that cannot be predicted, which
includes the pulse.

The predictor coefficients come from a set of linear equations built from
the covariances of the trace. If the RFI changes, the coefficients go stale
within milliseconds. On a processor, recomputing them takes 20 ms to
seconds. This design solves the equations in the FPGA fabric instead. The
covariance matrix is a symmetric Toeplitz matrix, so the Levinson
recursion replaces Gaussian elimination. That recursion runs on a small
double-precision micro-controller. One refresh of all 32 coefficients
takes about 319 µs at 100 MHz, and refreshes can run back to back.

The RTL is SystemVerilog (IEEE 1800-2017) and is written to be
synthesizable. It has been simulated with Verilator 5, which ran a
self-checking testbench for every block and for the full system at its
default size.

## Data flow

```
             200 MHz (clk_adc)                                          
 adc_data ──┬──────────── ram_shift_register ──(raw, delayed)──┐        
            │                                                  ▼        
            ├──────────── fir_filter (32 taps) ──prediction──► rfi_subtract ──► cleaned
            │                    ▲ coef_load                            
            ▼                    │                                      
      sample_capture        coefficient bank (32 x 18 bit)              
            │                    ▲                                      
   ─ ─ ─ ─ ─│─ ─ ─ ─ ─ ─ ─ ─ ─ ─ │ ─ ─ ─ ─ ─ ─ clock-domain boundary ─ ─ 
            ▼                    │              100 MHz (clk_sys)        
     dual_port_ram ──► covariances ──► fp_from_int ──► levinson ──► fp_to_fixed
                      (32 cells,       (39-bit int     (double      (18-bit,
                       r and y)         → double)       precision)   15 frac)
                                  refresh_ctrl sequences all of this
```

The top level is `levinson_rfi_top`. The direct path runs at the ADC
rate. The refresh path runs at half that rate, from a block of samples held
in the dual-port RAM.

## The prediction equations

The predictor is trained on a block of `NSAMP` = 512 samples `s[n]`. With
a prediction distance `DIST` = 1, the covariance bank forms two sets of
sums:

* `r[k] = Σ_n s[n]·s[n+k]`, for k = 0..31. These are the autocovariances,
  the first row of the Toeplitz matrix.
* `y[k] = Σ_n s[n]·s[n+DIST+k]`, for k = 0..31. These form the right-hand
  side.

The Levinson unit solves `Σ_j r[|i−j|]·c[j] = y[i]`. The filter then
predicts `p[n] = Σ_k c[k]·s[n−DIST−k]`. In `fir_filter`, coefficient
`c[0]` sits on the output of the first delay stage. That makes it a
one-step predictor, so no extra delay is needed for `DIST` = 1.

## The Levinson micro-controller (`levinson.sv`)

This is the most involved block. It keeps two vectors and a scalar:

* `a` is the forward predictor, with `a[0] = 1`.
* `x` is the solution built up so far.
* `e` is the prediction-error power.

It starts with `e = r[0]` and `x[0] = y[0]/r[0]`. Then, for each order
n = 1..31, it runs four loops:

| loop | computes | operations |
|------|----------|------------|
| A | reflection coefficient `xi = −(Σ_{i<n} r[n−i]·a[i]) / e` | n multiply–subtract, 1 divide |
| B | `a[j] ← a[j] + a[n−j]·xi`, j = 1..n, then `e ← e·(1 − xi²)` | n multiply–add, 3 operations |
| C | `pm = (y[n] − Σ_{i<n} r[n−i]·x[i]) / e` | n multiply–subtract, 1 divide |
| D | `x[i] ← x[i] + a[n−i]·pm`, i = 0..n (x[n] starts at 0) | n+1 multiply–add |

Loop B must read the *old* values of `a`. Updating `a[j]` in place would
corrupt the later update of `a[n−j]`. So the controller copies `a` into a
snapshot register file in one clock before loop B. The copy costs nothing
in time and replaces the temp-variable pairing a software version needs.

**Datapath.** The controller shares one pipelined unit of each kind:

* `fp_mul`, 5 clocks
* `fp_addsub`, 7 clocks
* `fp_div`, 24 clocks

The vectors `r`, `y`, `a`, the snapshot of `a`, and `x` are register files
of 32 × 64 bits. Operand selection is a plain multiplexer on the loop
indices.

**Schedule.** The controller issues one operation, waits for its result,
writes the result back, and moves on. So one multiply–accumulate step
takes 5 + 1 + 7 + 1 = 14 clocks. Order n costs 56·n + 84 clocks. The
whole recursion takes 25 + Σ_{n=1}^{31}(56n + 84) = **30,406 clocks**
(304 µs at 100 MHz). The testbench checks this count exactly. The
published design needed about 53,800 clocks; its internal schedule is not
known. Loops B and D have no dependence from one step to the next, so
they could be pipelined. That would roughly halve their share, but it is
not done here.

**Observability.** The unit has these status outputs:

* `order` is the current n.
* `loop_a` to `loop_d` show which loop is running. `loop_b` also covers
  the update of `e`.
* `busy` and `done` bracket a run.

Load `r` and `y` through `wr_en`/`wr_sel`/`wr_addr`/`wr_data` while the
unit is idle, then pulse `start`.

**Accuracy.** All operations round to nearest, ties to even. That makes
every intermediate result identical to IEEE double arithmetic in
software, provided the operations are done in the same order. The
testbenches use this and compare all 32 coefficients bit for bit. On the
test traces, the relative residual of the solved system is 3·10⁻¹⁴ to
2·10⁻¹³.

## Floating-point units

All units are parameterised by exponent width `EW` and fraction width
`MW`. The defaults are IEEE double: 11 and 52. Each unit is one
combinational stage followed by `LAT` pipeline registers. A synthesis
tool with register retiming is expected to spread the logic over those
registers. Each unit accepts one operation per clock.

| unit | function | latency |
|------|----------|---------|
| `fp_mul` | a·b, round to nearest even | 5 |
| `fp_addsub` | a ± b, guard/round/sticky alignment, leading-zero normalisation | 7 (own choice) |
| `fp_div` | a / b, restoring division of the mantissas, remainder as sticky bit | 24 |
| `fp_from_int` | 39-bit signed integer → double; exact, because 39 ≤ 53 | 6 (own choice) |
| `fp_to_fixed` | double → 18-bit signed, 15 fractional bits; nearest, ties away from zero; saturating | 1 |

Limits:

* Subnormal inputs are read as zero, and a subnormal result is flushed
  to zero.
* An exponent overflow gives infinity, and dividing by zero gives
  infinity.
* NaN is not produced or propagated in any special way.

None of these limits matter for covariance data, but they make the units
unsuitable as general IEEE cores.

## Covariance bank (`cov_accu.sv`, `covariances.sv`)

**The cell.** Each of the 32 cells has three parts:

* a registered 14 × 14 signed multiplier, enabled by `ena`;
* a 38-bit adder;
* an accumulator register, enabled by `sclr OR ena` and cleared
  synchronously by `sclr`.

Because the product is registered, a burst is driven like this:

1. Raise `sclr` together with `ena` on the first operand pair.
2. Keep `ena` high for each further pair.
3. Give one more `ena` after the last pair.

The 38-bit sum is wide enough: 512 products of up to 2²⁶ need 35 bits.

**The bank.** Samples shift through a window of 32 + `DIST` registers.
The oldest sample feeds the `data_a` input of every cell. Cell k receives
the sample k positions later for `r`, or `DIST + k` later for `y`.
Producing 64 sums from 32 cells takes two passes over the buffer, one for
`r` and one for `y`. Each pass reads `NSAMP + 32 + DIST − 1` = 544
samples. `done` comes `NSAMP + W + 2` clocks after `start`, where `W` is
the window length (32 + `DIST`).

## Prediction filter and subtraction

`fir_filter` has three stages:

* a 32-stage tapped delay line;
* 32 multipliers (14-bit samples × 18-bit coefficients), with registered
  products;
* a five-level adder tree with a register at each level.

After the tree, a half-up rounding shift by 15 bits gives
`yout(t) = round(Σ_k c[k]·xin(t−8−k) / 2¹⁵)`. The latency is therefore 8
clocks.

The prediction made at clock t is for sample `t − 8 + DIST`. To line the
raw trace up with it, `ram_shift_register` delays the raw trace by
`8 − DIST` = 7 clocks. `rfi_subtract` then registers `raw − prediction`,
saturated to 15 bits, and raises `cleaned_sat` whenever it saturates.

`coef_load` copies the whole coefficient bank in one clock, so a change
of coefficients falls between two samples.

## Refresh sequence and timing (`refresh_ctrl.sv`)

A refresh starts on a pulse of `ext_start`. While `continuous` is high, a
new refresh also starts at the end of each one. Each refresh does these
steps, and each step waits for the done or valid signal of the unit it
drives:

1. Request capture. The request crosses to the 200 MHz domain, 544
   samples are written into the RAM, and the done event crosses back.
2. Stream the buffer into the covariance bank for `r`. Convert the 32
   sums to double and write them into the Levinson unit.
3. Do the same again for `y`.
4. Run the Levinson recursion.
5. Convert the 32 coefficients to fixed point and write them into the
   coefficient bank.
6. Pulse `coef_update`. It crosses to the filter domain as `coef_loaded`.

Simulated time from `ext_start` to `coef_loaded` is 318.9 µs:

* about 3 µs for the capture;
* about 12 µs for the two covariance passes and the conversions;
* 304 µs for the recursion.

The published design quotes about 560 µs per refresh at the same clocks,
with 12 µs of that for the covariances.

## Clock domains

The design uses two clocks: `clk_adc` (200 MHz) and `clk_sys` (100 MHz).
The crossings are:

* **Events.** The capture request, capture done and coefficient update
  are single pulses. Each passes through a `toggle_sync`: the source
  domain flips a toggle, the destination domain runs it through two flops
  and detects the edge.
* **Samples.** The dual-port RAM is written in the ADC domain and read in
  the calculation domain. It is read only after the capture-done event.
* **Coefficients.** The coefficient bank is written in `clk_sys`. The
  filter copies it in `clk_adc` on the synchronised update pulse. By
  then the bank is stable, and it stays stable for the next 30,000+
  clocks.

`rst_n` is an asynchronous reset for both domains. Release it in step
with both clocks, using a reset synchroniser per domain on a board.
Verilator reports `SYNCASYNCNET` for `rst_n`. The cause is that the
handshake assertions in the top use `rst_n` in `disable iff`; the
warning is harmless.

## Parameters

Defaults are in `lev_pkg.sv`, and the top exposes the main ones.

| name | default | origin |
|------|---------|--------|
| `ORDER` | 32 | filter stages and Levinson dimension, as published |
| `SAMPLE_W` | 14 | ADC/covariance operand width, as published |
| `ACC_W` | 38 | covariance accumulator, as published |
| `CVT_IN_W` | 39 | integer input of the int-to-float converter, as published |
| `FP_EW`, `FP_MW` | 11, 52 | double precision, as published |
| `MUL_LAT`, `DIV_LAT` | 5, 24 | as published |
| `ADD_LAT`, `CVT_LAT` | 7, 6 | own choice |
| `NSAMP` | 512 | own choice, chosen so two passes take ≈ 11 µs |
| `PRED_DIST` | 1 | own choice, matches a filter whose first coefficient is on the first delay stage |
| `COEF_W`, `COEF_FRAC` | 18, 15 | own choice |
| `BUF_AW` | 10 | own choice (1024-word buffer) |

## Where this RTL departs from, or fills in for, the published design

Filled in by this design because the original does not specify it:

* The covariance sample count and the two-pass scheme for `r` and `y`.
* The prediction distance.
* The fixed-point coefficient format.
* The adder and converter latencies.
* All control and handshakes.
* The clock-domain crossings.

Built here with the simplest structure that does the job, since the
original used vendor cores:

* The floating-point units. Their subnormals are flushed to zero (see
  "Floating-point units").

Different from the original:

* The Levinson schedule is issue-and-wait. It takes 30,406 clocks,
  against about 53,800 in the original.

Not built:

* A 48-bit floating-point variant was also reported for the original,
  with much poorer accuracy (about 10⁻²). The units and `levinson` take
  `EW`/`MW` parameters, but the top level is fixed at 64 bits. A 48-bit
  build would need the `lev_x` port and the converters widened or
  narrowed to match.
* The ADC is outside the FPGA and is not modelled. `adc_data` is a
  top-level input.

## Simulating

Each block has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
To run one, for example the full system at its default parameters:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl +libext+.sv -Irtl rtl/lev_pkg.sv rtl/lev_state_pkg.sv \
  tb/levinson_rfi_top_tb.sv --top-module levinson_rfi_top_tb -o sim
./obj_dir/sim
```

For another block, replace the testbench file and the top module name.

The system testbench does the following:

* It generates a two-tone trace with noise and records the block that is
  captured.
* It recomputes the covariances, the Levinson solution and the
  fixed-point coefficients itself, and requires bit-exact agreement.
* It checks every prediction and cleaned sample against a reference
  filter.
* It requires the power of the trace to drop by at least 100×. It
  measures about 700× and 2800×.
* It runs one single refresh, then two in continuous mode.
* It counts captures, both covariance passes, the four Levinson loops,
  filter loads and continuous restarts, and fails if any of them never
  happens.

It simulates in well under a second.

`tb/rfi_nonstationary_tb.sv` tests the case the design exists for: RFI
that changes. It runs the full design in continuous mode at its default
parameters. At 500 µs, both interferers jump to new frequencies. Each
coefficient load is tagged with the time its training block was
captured.

* Before the jump, the power ratio raw/cleaned is about 2400.
* Coefficients trained before the jump make things worse after it. The
  cleaned trace is about 30 times stronger than the raw one.
* The first coefficients trained on the new RFI take effect 457 µs after
  the jump, and the ratio returns to about 1500.

In the worst case the response time is two refresh periods, about 640 µs.
One period is needed to finish the refresh already running, and one to
compute the new coefficients.

`tb/refresh_200mhz_tb.sv` runs the calculation clock at 200 MHz as
well. The refresh then takes 160.8 µs (32,166 clocks):

* 31,618 calculation clocks;
* 544 ADC clocks for the capture, which runs on the ADC clock either way;
* a few clocks in the synchronisers.

The published design reached 275 µs at that rate. Whether this RTL meets
200 MHz timing in an FPGA has not been checked.

`tb/toggle_sync_tb.sv` checks the event synchroniser in both directions.
It checks pulse count, pulse width and latency.

## Files

| file | contents |
|------|----------|
| `rtl/lev_pkg.sv` | shared constants, leading-zero count |
| `rtl/lev_state_pkg.sv` | state encoding of the Levinson controller |
| `rtl/levinson_rfi_top.sv` | top level |
| `rtl/levinson.sv` | Levinson micro-controller |
| `rtl/fp_mul.sv`, `fp_addsub.sv`, `fp_div.sv`, `fp_from_int.sv`, `fp_to_fixed.sv` | arithmetic |
| `rtl/cov_accu.sv`, `covariances.sv` | covariance cell and bank |
| `rtl/fir_filter.sv`, `rfi_subtract.sv`, `ram_shift_register.sv` | direct path |
| `rtl/sample_capture.sv`, `dual_port_ram.sv`, `toggle_sync.sv` | capture and crossings |
| `rtl/refresh_ctrl.sv` | refresh sequencer |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/rfi_nonstationary_tb.sv`, `tb/refresh_200mhz_tb.sv` | system-level workload tests (changing RFI, 200 MHz calculation clock) |
