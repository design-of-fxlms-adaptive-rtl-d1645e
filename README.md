# FXLMS adaptive noise-cancelling datapath

An active noise canceller gets two signals: a reference that carries the noise, and a
sensor signal in which that noise is mixed with what should be kept. An adaptive filter
learns how the reference reaches the sensor and removes it. A plain LMS filter goes
unstable when another filter, the *secondary path* (loudspeaker, air, microphone), sits
between its output and the point where the error is measured. The filtered-x LMS (FXLMS)
family deals with that path by putting a model of it into the signal chain. This RTL
is a fixed-point, fully pipelined FXLMS datapath. It takes two 16-bit sample streams at
one sample per clock and delivers one error-corrected 16-bit stream 8 clocks later.

The published architecture has six blocks: three LMS adaptive filters, a secondary-path
filter, a subtractor and a multiplier. The block set, their connections, the 16-bit
buses, the 8-clock latency, the one-sample-per-clock throughput and the port list
(4 inputs and 1 output, 50 port bits) come from that architecture. Tap counts, step
size, coefficient values, number formats, reset and the role of each input were not
specified. They are this design's choices and are listed under
[Choices not fixed by the architecture](#choices-not-fixed-by-the-architecture).

## Signal flow

```
 din1 ──┬──────────────► LMS 1 (x) ──w_err1──► secondary S ──out1──► SUB (b)
 din2 ──│──┬───────────► LMS 1 (d)                                    │ error_out
        │  └───────────► LMS 2 (x) ──w_err2──► delay 3 ──────────► MUL (b)
        ├──────────────► LMS 2 (d)                                    │ out2
        ├──► delay 4 ──► SUB (a)                                      ▼
        └──► delay 6 ──────────────────────────────────────────► LMS 3 (d),  out2 ► LMS 3 (x)
                                                                      │
                                                                      ▼ final_out
```

| Instance     | Module             | Inputs                                  | Output      |
|--------------|--------------------|-----------------------------------------|-------------|
| `u_lms1`     | `lms_filter`       | x = `din1`, d = `din2`                  | `w_err1`    |
| `u_sec`      | `secondary_filter` | `w_err1`                                | `out1`      |
| `u_sub`      | `sat_sub`          | a = `din1` delayed 4, b = `out1`        | `error_out` |
| `u_lms2`     | `lms_filter`       | x = `din2`, d = `din1`                  | `w_err2`    |
| `u_mul`      | `q15_mul`          | a = `error_out`, b = `w_err2` delayed 3 | `out2`      |
| `u_lms3`     | `lms_filter`       | x = `out2`, d = `din1` delayed 6        | `final_out` |

The last filter sees its input only after that input has gone through the secondary-path
model, and its error signal is the design's output. This is the "commuted" form of
FXLMS: the channel is moved ahead of the adaptive filter, so the error comes straight
out of the filter instead of being measured after the channel.

## The LMS filter (`lms_filter`)

Each of the three filters is an adaptive transversal filter with `TAPS` taps
(default 8). It implements:

```
y(k)   = -sum_i w_i(k) * x(k-i)        anti-noise output
e(k)   =  d(k) + y(k)                  error, formed by addition
w(k+1) =  w(k) + mu * e(k) * x(k)      coefficient update, mu = 2^-MU_SHIFT
```

The error is formed by **adding** the filter output to the desired signal, as an acoustic
sensor does: the anti-noise and the noise add up in the air. With an ordinary
convolution output, that error combined with a `+mu` update would drive the coefficients
the wrong way. Making the output the *negated* convolution fixes this: then
`e = d - w·x`, and the `+mu` update is ordinary gradient descent. Each filter converges
to `w = h` when `d = h * x`, and its residual error is its output (`e_out`, the `w_err`
and `final_out` buses).

Timing inside the filter:

* **Edge k:** `x(k)` enters the tap line and `d(k)` is registered.
* **Cycle k:** all `TAPS` products, the sum, `y(k)`, `e(k)` and the `TAPS` new
  coefficients are computed combinationally.
* **Edge k+1:** `e(k)` is registered as the output and all coefficients are written.

The latency is therefore 2 clocks, and the filter takes one sample every clock. The
update uses the error and the tap vector of the same sample, so this is exact LMS, not
the delayed-LMS variant. It has a cost: the critical path is one full multiply-add
tree plus the update multipliers, with no pipeline register inside.

Arithmetic:

| Quantity         | Format                                          |
|------------------|-------------------------------------------------|
| samples x, d, e  | signed Q1.15, 16 bits                           |
| coefficients w   | signed, `COEF_W` = 24 bits, `COEF_FRAC` = 22 fractional bits (range ±2) |
| accumulator      | full precision, 16 + 24 + log2(TAPS+1) bits     |
| update step      | `(e * x_i) >>> (30 - COEF_FRAC + MU_SHIFT)`, i.e. `>>> 12` by default |

Every right shift is arithmetic, so it rounds toward minus infinity. `y`, `e` and every
coefficient saturate at their limits instead of wrapping. The eight fractional bits that
coefficients have beyond a sample's 15 keep small updates from being truncated to zero.

## Secondary-path filter, SUB and MUL

* `secondary_filter` is a fixed FIR with Q1.15 coefficients, `COEFS` (default
  `0, 0.5, 0.25, 0.125`: one sample of pure delay, then a decay). The output is
  floored to Q1.15 and saturated. Latency is 2 clocks: the tap register, then the output
  register. `COEFS` must be given whenever `TAPS` is changed. The default response sums
  to 0.875 and so can never saturate.
* `sat_sub` computes `a - b` with saturation, one register stage.
* `q15_mul` computes the Q1.15 product, `(a*b) >>> 15`. It clamps the single case that
  overflows (`-1 × -1`), one register stage.

## Pipeline alignment and the 8-clock latency

The longest path is LMS 1 (2) → secondary filter (2) → SUB (1) → MUL (1) → LMS 3 (2),
which is 8 clocks. Three register chains (`delay_line`) make sure every block combines
values that belong to the same input sample k:

* `din1` is delayed by 4 before SUB, to meet `out1(k)`.
* `w_err2` is delayed by 3 before MUL, to meet `error_out(k)`.
* `din1` is delayed by 6 before the d input of LMS 3, to meet `out2(k)`.

An elaboration-time assertion in `fxlms_top` checks that the stage latencies add up to 8.
If you add a pipeline register to a block, raise its `*_LAT` constant in `fxlms_top` so
that the delay lines follow.

Reset (`rst`) is synchronous and active high. It clears every tap line, every
coefficient, every pipeline register and the delay chains. The design then behaves as if
all earlier samples had been zero.

## Choices not fixed by the architecture

* **Tap counts.** None were given. The LMS filters have 8 taps (`LMS_TAPS`); the
  secondary filter has 4.
* **Step size.** None was given. `mu = 2^-4` (`MU_SHIFT`), so the update needs a shift
  and no multiplier.
* **Secondary-path coefficients.** None were given; the defaults above are placeholders
  for a measured path estimate.
* **Input roles.** The architecture shows which buses reach each block, but not which
  input is x and which is d. The table above is this design's reading. The operand order
  of SUB (`din1 - out1`) is also a choice.
* **Number format.** Fixed point, with the Q formats and saturation above.
* **Reset.** Synchronous, active high, clears everything.

## Known departures

* **Filtered-x update.** The algorithm as described filters the reference through the
  secondary-path estimate and uses that filtered-x signal, together with the error, for
  the coefficient update. In the block diagram, no connection runs from the secondary
  filter into any filter's coefficient update. The diagram was followed: each LMS filter
  adapts with its own input samples, and the secondary-path model acts only in the signal
  chain (the commuted form described above).
* **Normalisation.** The description mentions a "normalized" gradient, but the update
  equation it gives is plain LMS. The plain LMS equation is built; there is no division
  by input power (NLMS).
* **One wire not connected.** The diagram also draws the `din1` bus into the secondary
  filter, without saying what it does there. That input is not connected.
* **Pipelined variant not built.** A pipelined variant of the architecture is named but
  not described, so it is not built.
* **Physical figures are not RTL targets.** The published results are for a 130 nm
  standard-cell implementation: 79.2 MHz, about 265 k cells, about 0.25 mm² of cell area,
  about 170 mW. They depend on the library and on the tap counts, so this RTL is not
  tuned to them. The port count (50 bits) does match.

## Files

| File                         | Contents |
|------------------------------|----------|
| `rtl/fxlms_pkg.sv`           | sample type, widths, saturation helpers |
| `rtl/lms_filter.sv`          | adaptive LMS transversal filter |
| `rtl/secondary_filter.sv`    | fixed secondary-path FIR |
| `rtl/sat_sub.sv`             | saturating subtractor (SUB) |
| `rtl/q15_mul.sv`             | Q1.15 multiplier (MUL) |
| `rtl/delay_line.sv`          | alignment register chain |
| `rtl/fxlms_top.sv`           | top level |
| `tb/fxlms_ref_pkg.sv`        | reference models (64-bit integer, floor division spelled out) |
| `tb/*_tb.sv`                 | one self-checking testbench per block, plus the end-to-end one |

## Verification

Every testbench compares the RTL with a reference model, sample by sample and bit for
bit, at exactly the block's latency. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if the simulation hangs.

* `lms_filter_tb` identifies an unknown 4-tap FIR from white noise. It checks every
  output and the whole coefficient vector on every clock. It requires the error energy
  to fall by at least 16× and the coefficients to end near the true FIR. A full-scale
  burst must cause saturation, and a reset must clear the state.
* `secondary_filter_tb` checks the impulse response (the first tap shows up 2 clocks
  after the impulse) and random and full-scale streams. A second instance with a gain
  near 2 exercises saturation.
* `sat_sub_tb` and `q15_mul_tb` cover all pairs of the corner values, plus random pairs.
* `fxlms_top_tb` runs the top level at its default parameters:
  * an impulse, which must reach `final_out` after exactly 8 clocks;
  * 4000 samples of a 1 ksample/s scenario: a reference noise, and a sensor signal made
    of a 50 Hz tone plus that noise through a 3-tap primary path. The first filter
    must learn that path: the noise left in its error (its error minus the tone) must
    fall at least tenfold. In a typical run it falls about 90-fold;
  * a full-scale burst;
  * a reset in the middle of the stream.

  It counts how often each mechanism happens: adaptation in each of the three filters,
  saturation in the filters, SUB and MUL, and the resets. It fails if any of them never
  happens.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fxlms_pkg.sv tb/fxlms_ref_pkg.sv tb/fxlms_top_tb.sv \
    --top-module fxlms_top_tb -o sim
./obj_dir/sim
```

Replace `fxlms_top_tb` with any other testbench name. All of them finish in well under
a second.

What the tests do not show: that this arrangement of blocks cancels noise well in an
acoustic setting. The tests prove that the RTL matches its arithmetic specification, and
that each LMS filter converges when used as a system identifier. How well the whole
chain performs depends on the input roles and the secondary-path model, and both of
those are choices of this design.
