# 16-point FFT processor on a reduced-hardware CORDIC

A radix-2 FFT needs, in every butterfly, a multiplication of a complex
difference by a twiddle factor `W16^t = exp(-j*2*pi*t/16)`. A CORDIC can do this
multiplication as a vector rotation with only adds and shifts. A conventional
CORDIC, though, needs a table of angles, an angle accumulator, a direction
decision per step and barrel shifters.

This processor uses a cheaper CORDIC. It builds every twiddle angle from just two
elementary angles:

* `atan(1) = 45 degrees`, taken `k0` times, and
* `atan(2^-3) = 7.125 degrees`, taken `k1` times.

Every step turns anticlockwise, and only two shift amounts ever occur (0 and 3).
So the rotator needs no angle accumulator, no direction multiplexer and no barrel
shifter. It uses one subtractor, one adder, four 2:1 multiplexers and a fixed
0.707 scaler. Instead of angles, a small 8 x 4 ROM stores the pair `(k0, k1)` for
each twiddle power.

The processor around it works in place. It loads 16 complex samples into a
16-word memory, runs one CORDIC butterfly 32 times (4 decimation-in-frequency
stages of 8 butterflies), and streams the 16 bins out in natural order.

## The rotation-count table

| twiddle power `t` | nominal angle | `k0` | `k1` | realised angle | realised gain |
|---|---|---|---|---|---|
| 0 | 0      | 0 | 0 | 0       | 1 |
| 1 | 22.5   | 0 | 3 | 21.375  | 1.0235 |
| 2 | 45     | 1 | 0 | 45      | 0.99989 |
| 3 | 67.5   | 1 | 3 | 66.375  | 1.0234 |
| 4 | 90     | 2 | 0 | 90      | 0.99978 |
| 5 | 112.5  | 2 | 3 | 111.375 | 1.0233 |
| 6 | 135    | 3 | 0 | 135     | 0.99967 |
| 7 | 157.5  | 3 | 3 | 156.375 | 1.0231 |

The realised angle is `45*k0 + 7.125*k1`. The realised gain is
`(sqrt(2)*181/256)^k0 * sqrt(1 + 1/64)^k1`.

**The odd twiddle powers are approximate by design.** Three 7.125-degree steps
give 21.375 degrees, not 22.5. The scaler corrects only the 45-degree steps, so
those rotations also carry about 2.3 % extra gain. The even powers are exact to
within the 181/256 approximation of `1/sqrt(2)`. As a result, the transform
differs from an exact DFT by roughly 1-2 % of full scale on random data. With
inputs of ±1900, the largest distance to the exact DFT was around 100-250 LSB.
Treat it as a low-cost, approximate FFT. Extra 7.125-degree steps, or a
different pair of elementary angles, would reduce the error at the price of
latency.

## The rotator (`rh_cordic`)

```
          m=0         m=1
  M0:     Y           Y/8        (arithmetic shift by 3)
  M1:     X           X/8
  sub:    X - M0
  add:    Y + M1
  M2/M3:  0.707*(sub/add)   sub/add (unscaled)    -> back into X, Y registers
```

`cordic_fsm` holds two down-counters loaded from the table. While the `k0`
counter is non-zero it outputs `m = 0` (45-degree step). After that it outputs
`m = 1` until `k1` reaches zero. Then it raises `stop`.

* **Latency:** `1 + k0 + k1` cycles, from 1 to 7. One cycle loads the inputs,
  then each rotation takes one clock.
* **Outputs:** `stop` and the X/Y outputs hold until the next `start`.

Internally the X/Y registers carry `GUARD = 3` fractional bits and one extra
integer bit. The 45-degree step grows the vector by `sqrt(2)` before the
scaler, and the extra bit gives it room. Outputs are truncated.

`cordic_scaler` multiplies by `181/256 = 0.70703`. It forms
`(128 + 64 - 8 - 2 - 1) * d` from shifted copies of `d`, using two adds and
three subtracts, then shifts right by 8 once. Truncation happens only in that
final shift.

## The butterfly (`cordic_butterfly`)

The rotator only turns anticlockwise, but the twiddle `exp(-j*theta)` turns
clockwise. The butterfly solves this with two rotators, one for each part of
the difference:

* CORDIC a rotates the real vector `(a0 - a1, 0)` and gives
  `((a0-a1)cos, (a0-a1)sin)`.
* CORDIC b rotates `(b0 - b1, 0)` and gives `((b0-b1)cos, (b0-b1)sin)`.
* A final adder forms `Re = (a0-a1)cos + (b0-b1)sin`.
* A final subtractor forms `Im = (b0-b1)cos - (a0-a1)sin`.

Together these give `(A - B) * exp(-j*theta)`. The sum `A + B` is registered
when `start` is sampled.

Both rotators get the same twiddle power, so they finish together. An assertion
checks that they stay in step. `done` is the AND of their `stop` bits.

Widths:

| signal | width |
|---|---|
| inputs | `DW` bits |
| sums | `DW+1` bits |
| rotators, rotated difference | `DW+2` bits |

## Processor organisation

| module | role |
|---|---|
| `fft16_pkg` | sizes (16 points, 4 stages, 3-bit twiddle power), `rot_count_t`, state enums |
| `twiddle_lut` | 8 x 4 ROM: twiddle power -> `{k0, k1}` |
| `cordic_fsm` | step sequencer: `m`, `rot_en`, `stop` |
| `cordic_scaler` | multiply by 0.707 with shifts and add/subtract |
| `rh_cordic` | the rotator: table, sequencer, muxes M0-M3, subtractor, adder, two scalers |
| `cordic_butterfly` | DIF butterfly from two rotators |
| `fft_addr_gen` | stage/butterfly -> word addresses `p`, `q` and twiddle power |
| `fft_data_mem` | 16-word complex register file, 2 read and 2 write ports |
| `fft_controller` | load / compute / output sequencing |
| `fft16_top` | the processor |

**Address schedule.** In stage `s` (span `8 >> s`), butterfly `j` works on two
words:

* `p` is `j` with a 0 inserted at bit `3 - s`.
* `q` is `p + span`.
* The twiddle power is `(j << s) mod 8`.

After stage 3, bin `X[k]` sits at address `bitreverse(k)`. The output phase
reads through that permutation, so results leave in natural order.

**Timing of one transform.** A transform takes 140 cycles plus any input stalls:

| phase | cycles |
|---|---|
| load | 16 (plus one per cycle with `in_valid` low) |
| compute: each butterfly | `2 + k0 + k1` (1 issue cycle + CORDIC latency; write-back in the last cycle) |
| compute: total | 108 (stage 0: 40, stage 1: 28, stage 2: 24, stage 3: 16) |
| output | 16 consecutive cycles |

**Interface of `fft16_top`:**

* `in_valid`/`in_ready` with `in_re`, `in_im`: 16 samples in natural order.
  `in_ready` is high throughout the load phase.
* `out_valid`, `out_idx`, `out_last`, `out_re`, `out_im`: bins 0..15, one per
  cycle. There is no back-pressure.
* `busy` is high during the compute phase, and `stage` gives the current stage.
* `rst_n` is an asynchronous active-low reset. It resets all control state, but
  not the data memory.

**Arithmetic range.** Samples are `DW`-bit two's complement numbers (default 16).
There is no scaling between stages, and results are truncated to `DW` bits when
written back. Keep `|re|, |im| < 2^(DW-1)/17` (1927 for `DW = 16`) to avoid
wrap-around. Within that range, the output matches a floating-point model of the
same realised twiddles to within 9 LSB.

## What follows the source design and what was chosen here

These parts follow the source design:

* the two elementary angles
* the `(k0, k1)` table and its 8 x 4 size
* the state machine's `m`/`stop` behaviour and the order of the steps
* the mux/subtractor/adder/scaler structure of the rotator
* the anticlockwise-only rotation
* the two-rotator butterfly producing `(a0-a1)cos + (b0-b1)sin` and
  `(b0-b1)cos - (a0-a1)sin`
* the 16-point radix-2 DIF algorithm

These are this implementation's choices:

* data width, guard bits and truncation
* the 181/256 scaler constant
* the one-cycle load before rotating
* a single butterfly reused 32 times
* the register-file memory and in-place schedule
* the valid/ready handshake
* natural-order output
* reset behaviour

The table stores non-negative counts, so it needs no sign bit. The rotator
reaches 156.4 degrees at most, which covers every twiddle a 16-point DIF
transform uses (0 to 157.5 degrees). It cannot rotate by 180 degrees.

The conventional fully pipelined CORDIC, against which this design is normally
compared, is not included. Neither are the FPGA power and timing figures.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fft16_pkg.sv tb/tb_fft16_top.sv --top-module tb_fft16_top
./obj_dir/Vtb_fft16_top
```

| testbench | what it checks |
|---|---|
| `tb_twiddle_lut` | all 8 entries; realised angle within 1.2 degrees of nominal |
| `tb_cordic_fsm` | all 16 `(k0, k1)`: step counts per `m`, order, latency, `stop` hold |
| `tb_cordic_scaler` | exact `floor(181*d/256)` and closeness to `d/sqrt(2)` |
| `tb_rh_cordic` | random vectors, all powers, against ideal rotation by the realised angle and gain (measured error within 1.3 LSB); latency |
| `tb_cordic_butterfly` | exact sums; rotated difference within 3 LSB; latency |
| `tb_fft_addr_gen` | the full in-place schedule and coverage of every word per stage |
| `tb_fft_data_mem` | random dual-port traffic against a shadow copy |
| `tb_fft_controller` | load addressing with stalls, butterfly order, write-back, bit-reversed read-out, 108-cycle compute time (with a behavioural butterfly) |
| `tb_fft16_top` | full design at default parameters: constant and impulse inputs (exact), 20 random transforms against the realised-twiddle model, cycle counts, and counts of every mechanism (45-degree steps, 7.125-degree steps, all 8 twiddle powers, unrotated butterflies, input stalls, completed transforms) |

To change the precision, set `DW` and `GUARD` on `fft16_top`. The input-range
bound above scales with `DW`.
