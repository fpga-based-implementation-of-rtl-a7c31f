# Instantaneous frequency of heart sounds in hardware

Heart sounds and murmurs differ in how their frequency content moves over
time. One compact way to follow it is the *instantaneous frequency* (IF): the
rate of change of the phase of the analytic signal `z(n) = x(n) + j H[x(n)]`,
where `H` is the Hilbert transform. This RTL computes the IF of a
phonocardiogram (PCG) sample stream in real time:

```
x(n) ──► analytic signal ──► CORDIC phase ──► unwrap ──► central difference ──► IF(n)
         (sliding Hilbert,    atan2(im,re)     ±2π        (φ(n+1)-φ(n-1))/(4π)
          window N = 128)
```

The central difficulty is the Hilbert transform. A full DFT-based Hilbert
transform per sample is expensive. Instead, the design uses a recursion derived
from the *moving discrete Hartley transform*. It updates the Hilbert transform
of a sliding window from that of the previous window, using one subtraction and
N/2 multiply-adds per sample. With one shared multiplier this takes N/2 + 3 = 67
clocks per sample at N = 128. A codec sampling at 8 kHz leaves thousands of
clocks per sample.

All data words are 26-bit signed fixed point. The input is a 20-bit sample,
which is the resolution of an audio codec.

## The sliding Hilbert transform

Take the last N samples as a window `w(m)`, `m = 0 … N-1`, with `m = 0` the
oldest. Its circular discrete Hilbert transform is

```
H(p) = Σ_m h((p - m) mod N) · w(m),   h(d) = (2/N)·cot(π d / N) for odd d, 0 for even d
```

When a new sample `x_add` arrives, the window rotates by one place. The only
change, seen circularly, is at the last position: `x_old` (the sample leaving)
is replaced by `x_add`. The Hilbert transform is linear and shift-invariant, so
the new transform follows from the old one:

```
Y        = x_add - x_old                                  (y_ln)
H'(m)    = H(m+1)                       for odd m         (pure shift)
H'(m)    = H(m+1) + Y · C(m)            for even m        (multiply-add)
C(m)     = (2/N) · cot(π (m+1) / N)                        (cot_rom)
H(N)     ≡ H(0)                          (the window is circular)
```

The recursion is exact. Starting from an all-zero window, which has a zero
transform, it reproduces the circular Hilbert transform of every later window.
The only error is the rounding of the products.

### Memory trick: the shift is free

Moving N values by one place every sample would cost N memory writes. Instead,
`hilbert_feedback` stores position `m` of window `n` at the fixed address
`(m + n) mod N`. Then `H(m+1)` of the old window and `H'(m)` of the new window
share the same address, so the shift needs no data movement. Per sample, only
the N/2 even positions are read, have `Y·C(m)` added and are written back. Their
addresses are `base + 2k` (mod N), with `k = 0 … N/2-1`. Here `base` is a pointer
that advances by one per sample. The set of updated addresses therefore
alternates between even and odd from one sample to the next.

### What is output

The imaginary part is position 0 of the window: the Hilbert value of the
window's oldest sample. It is read at address `base` just before the pointer
advances. The real part must belong to the same sample. `sync_delay` (an
addressable shift register) delays it by exactly N samples. Each accepted sample
therefore yields the analytic sample `z = x(t-N) + j·H_{t-1}(0)`, N samples late.

Position 0 lies at the edge of the window. A circular transform is least
accurate there for signals that are not periodic in the window, because the
wrap-around joins the newest samples to the oldest. This choice follows the
delay-equals-window arrangement of the design this RTL implements. Moving the
output to the window centre would mean reading address `base + N/2` and
shortening the delay to N/2 samples.

### Schedule (`hilbert_ctrl`)

| clock | action |
|---|---|
| after reset, N clocks | clearing sweep: every Hilbert word is set to 0, `x_ready` low |
| accept (0) | read `H(0)` for the output; `y_ln` forms Y; `sync_delay` shifts; `base++` |
| 1 … N/2 | one update per clock: ROM read and memory read (stage 1), product (stage 2), add and write (stage 3) |
| N/2+1, N/2+2 | drain the last two updates |
| N/2+3 | idle, `x_ready` high |

Within one sample all updated addresses are distinct, and the next sample starts
only after the drain. The read-modify-write pipeline therefore has no hazards.
`z_valid` pulses one clock after the accept.

## Phase, unwrap and frequency

* `cordic_vectoring` is a fully parallel, pipelined CORDIC in circular
  vectoring mode. A pre-rotation by ±π brings the vector into the right half
  plane. Then 22 micro-rotations drive `y` to zero and accumulate the angle. The
  x/y path is 2 bits wider than the input (CORDIC gain and √2 growth) and has
  4 guard fraction bits. The output is `atan2(im, re)` in [-π, π], radians,
  Q4.22. The latency is 23 clocks, at one sample per clock.
* `phase_unwrap` keeps a running correction. It subtracts 2π when the wrapped
  phase jumps up by more than π and adds 2π when it jumps down by more than π.
* `if_cfd` holds φ(n) and φ(n-1) in two registers. When φ(n+1) arrives it
  outputs `(φ(n+1) - φ(n-1)) · 1/(4π)` through a constant multiplier. The
  result is in cycles per sample, in [-0.5, 0.5]. Multiply by the sample rate
  to get hertz.

**Word wrap-around is intentional.** The unwrapped phase grows without bound
(about 3.5·10⁴ rad over 2 s of a 250 Hz sound). In 26 bits with 22 fraction bits
it wraps every 16 rad. This does no harm: the subtraction in `if_cfd` is done in
the same 26-bit modular arithmetic. It is exact whenever the true difference is
below 8 rad, and a central difference is at most 2π.

## Number formats

| signal | format | notes |
|---|---|---|
| input `x_in` | 20-bit signed fraction, [-1, 1) | aligned to Q4.22 by a 3-bit shift |
| Y, Hilbert values, `z_re`, `z_im` | Q4.22 | the Hilbert transform of a bounded signal can exceed it (about (2/π)·ln N) |
| C(m) | Q1.25 | \|C\| ≤ 2/π; the table is computed at elaboration from the formula |
| phase | Q4.22 radians | unwrapped phase wraps modulo 16 rad (see above) |
| IF | Q1.25 cycles/sample | |

Products are rounded to the nearest value. Sums wrap without saturation.

## Top-level interface (`pcg_if_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `x_valid`, `x_ready` | in/out | 1 | sample handshake; a sample is taken when both are high |
| `x_in` | in | 20 | PCG sample |
| `if_valid`, `if_out` | out | 1, 26 | IF of the analytic sample N+1 samples older than the current one |
| `wrap_up`, `wrap_down` | out | 1 | the unwrap applied −2π / +2π (for observation) |

Parameters: `N` (window, 128), `IN_W` (20), `DATA_W` (26). The fraction
positions and the CORDIC iteration count are in `rtl/pcg_if_pkg.sv`. `N` must be
a power of two, because addresses wrap in `$clog2(N)` bits. IF output
latency is 26 clocks after the accept that completes it (1 analytic + 23 CORDIC +
1 unwrap + 1 difference). The first output appears after the third accepted
sample.

## Files

| file | block |
|---|---|
| `rtl/pcg_if_pkg.sv` | shared widths, π, rounding helper |
| `rtl/pcg_if_top.sv` | complete chain |
| `rtl/analytic_signal.sv` | analytic-signal module: wires the blocks below |
| `rtl/y_ln.sv` | N-sample window buffer and `Y = x_add - x_old` |
| `rtl/cot_rom.sv` | C(m) table, N/2 words, synchronous read |
| `rtl/hilbert_mult.sv` | ROM plus 26×26 multiplier, 2-stage pipeline |
| `rtl/hilbert_feedback.sv` | N-word Hilbert memory with read and read-modify-write ports |
| `rtl/sync_delay.sv` | addressable shift register for the real part |
| `rtl/hilbert_ctrl.sv` | control unit (clear sweep, output read, update schedule, handshake) |
| `rtl/cordic_vectoring.sv` | pipelined CORDIC, vectoring mode |
| `rtl/phase_unwrap.sv` | ±2π unwrap |
| `rtl/if_cfd.sv` | central finite difference and 1/(4π) scaling |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each ends with a
line `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The references are
computed independently in floating point inside the testbenches:

* `tb_analytic_signal` (N = 16): the imaginary part is compared with the
  circular Hilbert transform evaluated directly as a sum over the window. The
  maximum error is about 2·10⁻⁶. The test uses random and sinusoidal input, and
  back-pressure occurs.
* `tb_pcg_if_top` runs at the default parameters (N = 128). It feeds a synthetic
  PCG of 17450 samples (2.2 s at 8 kHz) with first and second sounds and a weak
  murmur. Its reference chain is a direct Hilbert sum, `atan2`, unwrap and
  central difference. Outputs are compared wherever |z| > 0.02, which is about
  6900 samples. The maximum error seen is 8·10⁻⁵ cycles/sample, about 0.7 Hz at
  8 kHz. The RMS error is 9·10⁻⁶ cycles/sample, about 0.07 Hz. Every output must
  also arrive exactly 26 clocks after the accept that completes it. The test also requires back-pressure, both unwrap corrections,
  left-half-plane vectors and several passes through the circular memory. It
  runs in a few seconds.
* The other testbenches check their block's arithmetic and its exact cycle
  timing: Y and delay-line contents, ROM words within 1 LSB, product latency of
  2 clocks, the clearing sweep, the update address sequence, a busy time of
  N/2+3 clocks, CORDIC accuracy of 10⁻⁵ rad and latency of ITER+1 clocks, and
  the unwrap and difference results.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pcg_if_top \
    -y rtl +libext+.sv rtl/pcg_if_pkg.sv tb/tb_pcg_if_top.sv
./obj_dir/Vtb_pcg_if_top
```

Replace the testbench name to run the others. Every file lints cleanly with
`verilator --lint-only -Wall`, apart from unused-parameter and unused-bit
warnings. The only unused bits are the high bits of the rounded products.

## Relation to the original design, and limits

Taken from the design this RTL implements:

* the algorithm: the MDHT-based Hilbert recursion with L = 1, a rectangular
  window and N = 128, then CORDIC vectoring phase, unwrap and central-difference
  IF;
* the block partition: Y_Ln subtractor, cotangent ROM and parallel multiplier,
  feedback, synchronization delay equal to the window, and control unit;
* the 26-bit data width and the 20-bit codec resolution.

Choices made here, where the original says nothing:

* every binary-point position;
* rounding, and wrap-around instead of saturation;
* the circular reading of the recursion at `m = N-1`;
* the output position 0 of the window;
* the serial single-multiplier schedule and address mapping;
* the clearing sweep after reset and the valid/ready handshake;
* the CORDIC width, guard bits and iteration count;
* the unwrap tolerance of π;
* the IF output in cycles per sample.

Not included:

* the audio codec and its AC97 link;
* the state machine that configures the codec over that link;
* the hardware co-simulation link to a PC.

The top takes parallel samples. A codec front end has to supply `x_valid` and
`x_in`.

Known limits:

* The recursion has no decay. Product rounding errors therefore stay in the
  Hilbert memory and grow slowly, roughly with the square root of the number of
  samples. Over 17450 samples the error remained near 10⁻⁶. Very long runs may
  want a periodic reset of the memory, or wider words in `hilbert_feedback`.
* Where |z| is small, in the silences between heart sounds, the phase is
  dominated by rounding noise. The IF is then meaningless there, exactly as in a
  floating-point computation.
* The window-edge output position makes the Hilbert estimate less accurate for
  signals that are not periodic in the window than a centred position would be.
