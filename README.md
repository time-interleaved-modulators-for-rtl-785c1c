# Time-interleaved sigma-delta modulator for FPGAs

A single-bit sigma-delta (ΣΔ) modulator needs a very high output rate, because
its signal-to-noise ratio grows with oversampling. An FPGA fabric tops out at a
few hundred MHz, so the modulator's feedback loop (quantize, feed back, add,
integrate) limits how fast it can run. This design gets around that by
unrolling the loop in time. The modulator's node equations are written out for
N consecutive sampling instants. The N copies are chained inside one clock
period, each using the integrator states that the previous copy just computed.
Only the states of the last instant are stored. Each clock then yields N output
bits. The result is the same modulator running at N times the clock rate:
400 Mb/s from a 100 MHz clock with the default N = 4.

This is not the same as N modulators side by side, each fed every N-th input
sample. That arrangement only gives a noise shaping that repeats every clock
rate: about 3 dB of SNR per doubling of N. In the unrolled loop, every output
bit sees the noise shaping of the full-rate modulator. The output is bit for
bit the same as that of a conventional modulator clocked N times faster, and
the testbenches check exactly that.

The RTL follows the architecture of T. Podsiadlik and R. Farrell,
"Time-Interleaved ΣΔ Modulators for FPGAs". Where that work leaves something
open (coefficient values, word formats, interfaces), this code makes its own
choice, and the sections below say so.

## The loop being unrolled

The modulator is a low-pass CIFB loop: a cascade of M integrators with
distributed feedback. It has a two-level quantizer that reads the *registered*
state of the last integrator:

    q[n]   = Sgn{u_M[n-1]}                       (q = ±1, Sgn{0} = +1)
    u_1[n] = b1·x[n] − a_1·q[n] + u_1[n−1]
    u_k[n] = u_{k−1}[n−1] − a_k·q[n] + u_k[n−1]   k = 2..M

Because q comes from a stored state, the longest path through one instant is
short: the sign bit selects +a_k or −a_k, followed by one three-operand
addition. This does not grow with the order. That short path is what makes unrolling worthwhile.

The noise transfer function (NTF) is (1−z⁻¹)^M / D(z), where
D(z) = (1−z⁻¹)^M + Σ a_k z^−(M−k+1) (1−z⁻¹)^(k−1). The NTF poles are the
published ones, all designed for a peak NTF gain of 1.5. This design solves
D(z) for the a_k that place its roots on those poles (`tisd_pkg`):

| order | NTF poles                      | a_1 … a_M                               |
|-------|--------------------------------|-----------------------------------------|
| 1     | 0 (own choice)                 | 1                                       |
| 2     | 0.61 ± j0.26                   | 0.2197, 0.78                            |
| 3     | 0.77 ± j0.28, 0.67             | 0.043329, 0.2831, 0.79                  |
| 4     | 0.85 ± j0.25, 0.75 ± j0.088    | 0.00597074, 0.0635732, 0.305244, 0.8    |

Order 1 has no published pole set. For it, a_1 = 1 is this design's choice,
which gives the plain NTF 1 − z⁻¹. In all orders b1 is set equal to a_1, so
the signal transfer function b1·z^−M/D(z) is exactly 1 at DC. That too is
this design's choice.

**Number format.** The integrators are W-bit two's complement values on a 2^FRAC
scale. The defaults are the 11-bit word length of the FPGA build and FRAC = 8,
a range of ±4. The order-2 states stay below about 1.5 for inputs up to 0.8 of
full scale. Coefficients are rounded to the nearest integer on that scale: the
order-2 loop uses a = {56, 200} and b1 = 56. The input x is an XW-bit signed
fraction (x / 2^(XW−1)). Sums wrap and do not saturate, so the input must stay
inside the loop's stable range. Orders 3 and 4 have much smaller a_1 and need
more fraction bits: 14 bits with FRAC = 10 for order 3, and 16 bits with
FRAC = 13 for order 4 work.

## Unrolling: `tisd_cifb_section` and `tisd_core`

`tisd_cifb_section` is one instant of the equations above, purely
combinational. `tisd_core` chains N of them:

    state reg ─► sec 0 ─► sec 1 ─► … ─► sec N−1 ─┐
        ▲        (Nn)     (Nn+1)        (Nn+N−1)  │
        └─────────────────────────────────────────┘
                  q[0]     q[1]          q[N−1]

- Section k reads all M states of section k−1. Section 0 reads the state
  register, which holds instant Nn−1.
- Only the last section's states are stored: M registers of W bits,
  whatever N is.
- `q[k]` is the bit of instant Nn+k, so `q[0]` is the earliest. The group is
  registered, so it appears one clock after the clock that computed it.
- `q_valid` is low from reset until the first group is out. After that it
  stays high.

The clock period has to cover N section delays. This limits N to about the
clock period divided by the delay of one instant, so every addition taken out
of a section counts N times. One addition is taken out here. The input term
and the first feedback, b1·x ∓ a_1, do not change during a clock. The core
forms both sums from the held input, outside the chain, and the first
integrator of each section only selects one and adds it to u_1. For a
first-order loop this leaves one addition per output instead of two. For
higher orders the u_M update (u_(M−1) + u_M ∓ a_M, three operands) stays the
longest step. Rewriting the higher integrators in the same way is not done.

Reset is synchronous and active low. It clears the integrators to zero.

## Getting the input in: sample-and-hold, zero insertion or full rate

In the plain expansion each section gets its own input sample, x[Nn+k]. That
takes N input samples per clock and an input multiplier per section. When the
oversampling ratio is high, the input changes slowly compared with the output
rate, and one low-rate sample can serve all N sections. The parameter `MODE`
chooses the form:

- **`IN_SAMPLE_HOLD` (default, the FPGA build).** Every section gets the same
  b1·x. This amounts to upsampling by repetition. The images of the input fall
  at multiples of the input sample rate, which is where the hold's sinc
  response has its nulls, so they are strongly attenuated. `tisd_input_sh` loads x when
  `x_valid` is high and keeps it, already multiplied by b1, for as many clocks
  as needed. The FPGA build takes a sample every second 100 MHz clock
  (50 MS/s).
- **`IN_ZERO_INSERT`.** One section, `ZI_SLOT` (default 0, the earliest
  instant), gets N·b1·x and the others get 0. This saves the input adder in
  every other section. Zero insertion has a flat response, so its images are
  as strong as the signal and only the loop's low-pass signal transfer
  function suppresses them. The N-fold input gain also narrows the usable
  input range: with order 2, N = 16 and 11-bit integrators, a DC input of 0.5
  already overloads the loop.
- **`IN_FULL_RATE`.** The unreduced form: section k gets b1·x[Nn+k], so N
  input samples arrive per clock on `x_slot`. This is the form to use when the
  input really is at the full output rate. How the serial input is split into
  N parallel words is left to the source of the samples.

The product with b1 is taken once per sample and registered in
`tisd_input_sh`, so the multiplier is not on the loop's critical path. A
sample taken on clock edge t first shows in `q` after edge t+1.

## Getting the bits out: `tisd_out_packer`

The N bits per clock have to leave the chip as one serial stream. On the FPGA
that is done by a multi-gigabit transceiver used as a 20-bit parallel-to-serial
register. The transceiver is vendor hard IP and is not part of this RTL.
`tisd_out_packer` feeds it: it shifts in the groups for which `in_valid` is
high, and every SER_W/N clocks it presents a SER_W-bit word with a one-clock
`word_valid` pulse. With the defaults that is 20 bits every 5 clocks. The
earliest bit is bit 0, so the serializer must send bit 0 first. SER_W must be
a multiple of N. The bit order and the shift-register packing are this
design's choices.

## The unrolling method on an FIR filter: `fir_ti`

The same method applied to a second-order transposed FIR:

    u1[n] = a1·x[n];   u2[n] = a2·x[n] + u1[n−1];   y[n] = a3·x[n] + u2[n−1]

`fir_ti` builds N slices of this, with N = 2 by default. Slice k uses u1 and u2
of slice k−1, and slice 0 uses the registered values of the previous clock's
last slice. It takes N consecutive inputs per clock and returns N consecutive
outputs, combinationally. The coefficients (19, −37, 53) and the word lengths
are arbitrary choices. The example has no connection to the modulator. In the
top it has its own ports.

## Top level: `tisd_top`

`tisd_top` = `tisd_core` (N = 4, order 2, sample-and-hold) → `tisd_out_packer`
(20-bit words), with `fir_ti` beside it.

| port          | dir | width            | meaning                                    |
|---------------|-----|------------------|--------------------------------------------|
| `clk`, `rst_n`| in  | 1                | clock; synchronous active-low reset        |
| `x_valid`     | in  | 1                | take `x` on this clock                     |
| `x`           | in  | XW = 11          | signed input fraction                      |
| `x_slot`      | in  | XW × N           | one sample per instant (`IN_FULL_RATE` only) |
| `q_par`       | out | N = 4            | output bits of this clock, bit 0 earliest  |
| `q_par_valid` | out | 1                | `q_par` holds a group                      |
| `ser_word`    | out | SER_W = 20       | word for the serializer, bit 0 first       |
| `ser_valid`   | out | 1                | one-clock word strobe                      |
| `fir_x`       | in  | 12 × FIR_N       | FIR example inputs, one per instant        |
| `fir_y`       | out | 21 × FIR_N       | FIR example outputs                        |

Parameters, with defaults: `N` = 4, `M` = 2, `W` = 11, `FRAC` = 8, `XW` = 11,
`MODE` = `IN_SAMPLE_HOLD`, `SER_W` = 20, `FIR_N` = 2, `FIR_DW` = 12,
`FIR_CW` = 8. N, M, the 11-bit word length and the 20-bit word come from the
FPGA build. The rest are this design's choices.

Configurations that have been evaluated for this architecture, and how this
RTL covers them:

- **Order 2, N = 1, 2, 4 (100, 200, 400 MHz from a 100 MHz clock).** N = 4 is
  the default. N = 1 and N = 2 are set by parameter, and both are simulated.
- **Order 1, N = 4.** Set by parameter (`M = 1`) and simulated.
- **Order 3 with N = 8, and orders 3 and 4 with N = 16, sample-and-hold.**
  Simulated with wider integrators (see above).
- **Zero insertion with the loop's own low-pass signal transfer function.**
  Simulated for order 2 (N = 16), order 3 (N = 8) and order 4 (N = 16).
- **Zero insertion with a flat signal transfer function (STF = 1).** This
  needs a different loop filter, which is not specified, so it is not built.
- **SNR results.** The published spectra and SNR tables for orders 2 to 4 at
  an oversampling ratio of 200 are not reproduced. The one exception is the
  N = 1, 2, 4 rate comparison, which `tb_tisd_snr` repeats (see below).
- **Achieved clock rates.** These depend on place-and-route and are not
  checked here.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
after a fixed number of cycles. The reference models in the testbenches use
hand-rounded coefficients, not the ones the RTL computes, so the coefficient
derivation is checked too.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_tisd_pkg`          | the package's a_k put the NTF poles on the targets, b1 = a_1, integer coefficients |
| `tb_tisd_cifb_section` | one instant against the equations, random states, both quantizer signs |
| `tb_tisd_input_sh`     | load on `x_valid`, hold otherwise, gains 56 and 224 |
| `tb_tisd_core`         | N = 4 and N = 1 sample-and-hold, N = 4 zero insertion and N = 4 full rate, every bit against a serial model; `q_valid`; DC mean of the output equals the input |
| `tb_tisd_out_packer`   | word contents, bit order and `word_valid` timing, with gaps in `in_valid`, for N = 4 and N = 2 |
| `tb_fir_ti`            | N = 2 and N = 3 slices against the direct-form FIR |
| `tb_tisd_top`          | whole design at default parameters: 50 MS/s sine input held over 2 clocks, `q_par` against the serial model, each 20-bit word against the next 20 reference bits, words exactly 5 clocks apart, the FIR; counts samples, held clocks, words, +1 and −1 bits, and fails if any of them never occurs |
| `tb_tisd_snr`          | in-band SNR (1.25 MHz band, 50 MS/s held sine) for N = 1, 2, 4 on a 100 MHz clock: at least 10 dB per doubling of N with 16-bit integrators, and at least 40 dB for the default 11-bit build |
| `tb_tisd_workloads`    | the configurations listed above: orders 1 to 4, N = 2 to 16, sample-and-hold and zero insertion, every bit against the serial model, plus DC means |

`tb_cifb_ref_pkg` is the serial order-2 model that the core and top
testbenches share.

To run one testbench with Verilator (5.x), from the folder that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/tisd_pkg.sv tb/tb_cifb_ref_pkg.sv tb/tb_tisd_top.sv --top tb_tisd_top
    ./obj_dir/Vtb_tisd_top

For the other testbenches, replace the last file and `--top`. Leave out
`tb_cifb_ref_pkg.sv` for the testbenches that do not import it. Verilator
finds the modules in `rtl/` by file name. Each testbench runs in well under a
second.

Measured by `tb_tisd_snr` (0.5 full-scale sine at 0.4 MHz):

| build                        | N = 1   | N = 2   | N = 4   |
|------------------------------|---------|---------|---------|
| 16-bit integrators, 2^13     | 55.6 dB | 68.3 dB | 80.0 dB |
| 11-bit integrators (default) |         |         | 55.4 dB |

The 12 dB or so gained per doubling is the noise shaping of the full-rate
second-order loop. N independent modulators would gain only 3 dB. At 11 bits
the input term b1·x keeps only about 7 bits, and that sets the noise floor.

## Limits and departures

- The coefficient values, b1 = a_1, FRAC, the input format and its floor
  rounding, Sgn{0} = +1, wrap-around arithmetic, zero reset, the registered
  output with `q_valid`, and the packer's bit order are all this design's own
  choices.
- The word length of 11 bits is the one used for the FPGA build. At N = 4 and
  higher output rates, finite word length is known to raise the in-band noise
  floor. Widen `W` and `FRAC` together if that matters.
- There is no overload detection or integrator saturation. An unstable input
  wraps the integrators.
- The transceiver, its PLL and the 1-bit DAC at the board output are outside
  this RTL.
