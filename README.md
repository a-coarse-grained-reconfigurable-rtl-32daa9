# Reconfigurable wavelet denoiser for neural recordings

Extracellular neural recordings carry spikes buried in background noise that
is close to Gaussian. This design removes that noise with the undecimated
("a-trous") wavelet transform and hard thresholding. Area and power matter
here, because the target is wearable and implantable devices. So every filter
of every decomposition and recomposition level runs on one small shared
datapath: two multipliers and three adders. That datapath is switched at run
time between the three computations the denoiser needs, and the host can
change the level count, the filters, the frame length and the thresholds
between frames. No new hardware is needed for any of these changes.

The approach comes from a published coarse-grained reconfigurable design. In
that work, the dataflow kernels of the denoiser were merged into one
"global kernel" by the Multi-Dataflow Composer tool. The SystemVerilog here
is an independent implementation of that architecture. Where the publication
gives no detail, the choices made are listed in
[Departures and own choices](#departures-and-own-choices).

## What one frame goes through

The coprocessor works on frames of `b_len` samples. At most 512 fit, and the
evaluated set-up uses 500 samples at 12 kHz. With `N` levels (at most 4) and
filters `h` (low pass) and `g` (high pass) of up to 4 taps, one frame goes
through these steps:

```
LOAD   a0[n] = x[n]                                    n = 0 .. b_len-1
for j = 0 .. N-1
  DEC  a(j+1)[n] = sum_k h[k] * aj[n + 2^j k]
       d(j+1)[n] = sum_k g[k] * aj[n + 2^j k]
  EST  update the noise threshold of level j from d(j+1)
  THR  d(j+1)[n] = |d(j+1)[n]| > th_j ? d(j+1)[n] : 0
for j = N-1 .. 0
  REC  aj[n] = 1/2 * sum_k ( h~[k] * a(j+1)[n - 2^j k] + g~[k] * d(j+1)[n - 2^j k] )
       (a_N is replaced by zero when "remove approximation" is set)
OUT    y[n] = a0[n]
```

All indices wrap around inside the frame: the frame is extended circularly.
Nothing is decimated, so every level keeps `b_len` samples, and the result
does not depend on where a spike falls relative to the frame grid. The
dilation `2^j` of the filters is only an address offset. The same taps serve
every level.

For an orthonormal wavelet pair, `|H|^2 + |G|^2 = 2`. With zero thresholds,
the factor 1/2 in recomposition then gives back the input exactly, apart from
coefficient quantisation and rounding (at most a few LSB).

Removing the last approximation turns the denoiser into a band-pass filter.
At 12 kHz with four levels, `a4` holds roughly 0–375 Hz, so the output keeps
375 Hz up to Nyquist. The publication also quotes an output band of
375 Hz–3 kHz for the same set-up. This design follows the 375 Hz–6 kHz
figure. If the 3–6 kHz band must also go, write a threshold above full scale
for level 1.

## The shared kernel (`wd_global_kernel`)

This is the core of the design. Its two multipliers are instances of
`wd_fu_mult` and its three adders are instances of `wd_fu_add`, so the unit
count can be read directly from the RTL. It takes one filter tap per clock
cycle and has three configurations, selected by `mode`. The configuration
decides which operands reach each unit:

| mode     | multiplier m0 | multiplier m1 | adder aC        | adder aA      | adder aB      |
|----------|---------------|---------------|-----------------|---------------|---------------|
| `KM_DEC` | `c0*x0`       | `c1*x0`       | unused          | `accA += m0`  | `accB += m1`  |
| `KM_REC` | `c0*x0`       | `c1*x1`       | `m0 + m1`       | `accA += aC`  | unused        |
| `KM_THR` | unused        | unused        | `|x1| - thr`    | unused        | unused        |

- **Decomposition.** The low-pass and high-pass filters of a level advance
  together on the same input sample. One read of the approximation therefore
  feeds both outputs.
- **Recomposition.** The approximation and detail samples at the same index
  are read in the same cycle. Their two products are summed before they are
  accumulated.
- **Thresholding.** The sign of `|d| - th` from adder aC decides whether the
  detail sample passes or is cleared.

Timing and formats:

- `first` marks the first tap of an output. On that tap the accumulators are
  loaded with the rounding constant instead of zero, so rounding costs no
  extra adder.
- `out_valid` rises the cycle after the tap marked `last`. `y0` and `y1` are
  then the accumulators shifted by 14 bits, or by 15 bits for recomposition,
  which folds in the factor 1/2. Both are saturated to 20 bits.

The publication reports exactly this unit count for its merged kernel: 2
multipliers and 3 adders. Without sharing, the three kernels as built here
would need 4 multipliers and 5 adders; the publication's unshared variant has
4 and 6. A fully parallel four-level denoiser would need 32 multipliers and 20
adders.

## Noise threshold estimation (`wd_thr_estimator`)

The threshold of level `j` is 3.9 times an estimate of the noise standard
deviation. The estimate is taken over the four most recent frames of that
level's detail samples, before thresholding:

```
s      = sum over one frame of d^2
th_j   = 3.9 * sqrt( (s1 + s2 + s3 + s4) / (4 * (b_len - 1)) )
```

How it is computed:

1. During `DEC` the estimator squares and sums every detail sample the
   kernel produces. It has its own squarer, because it is not part of the
   filter datapath.
2. At the end of the level it shifts the window energy into a four-entry
   history per level.
3. It divides the history sum by `4*(b_len-1)` with a restoring divider,
   one bit per cycle.
4. It takes a bit-serial integer square root, one bit per cycle.
5. It multiplies by 998/256 and rounds.

One update takes 80 cycles at the default widths. The histories start at
zero, so the first three frames after reset see lower thresholds.

The `auto_thr` control bit chooses what the thresholding step uses: these
estimated thresholds, or the four thresholds written by the host. The
estimated values can always be read back.

## Memories and schedule (`wd_coprocessor`, `wd_ram`)

There are six 512 × 20-bit buffers, each with one synchronous write port and
one synchronous read port:

- **Approximation banks 0 and 1** are used ping-pong. Level `j` of `DEC`
  reads bank `j%2` and writes bank `(j+1)%2`. `REC` runs the other way.
  `LOAD` writes bank 0 and `OUT` reads bank 0.
- **One detail bank per level** keeps every level's detail until it is
  recomposed. `THR` rewrites the detail bank in place.

All banks share one read address and one write address.

A pass (`DEC`, `REC` or `THR`) is a three-stage pipeline:

1. Address issue.
2. RAM read and kernel tap.
3. Kernel result and write-back.

A `DEC` or `REC` pass takes `b_len*taps + 3` cycles and a `THR` pass takes
`b_len + 3`. The processing time between the last input sample and the first
output sample is therefore about `N*(b_len*(2*taps+1) + 90)` cycles. Measured
at `b_len` = 500 and N = 4, it is 10,363 cycles with Haar and 18,363 with
Daubechies-2. Input takes one cycle per sample and output three. A 500-sample
frame lasts 41.7 ms at 12 kHz, which is about 2 million cycles at 50 MHz, so
the coprocessor is idle most of the time. A slower clock or a smaller memory
organisation could use that slack.

The parameter set (including coefficients and host thresholds) is copied when
the first sample of a frame is accepted. A register write during a frame
therefore takes effect from the next frame.

## Programming it

The register bus has a write port (`reg_wr_en`, `reg_wr_addr`,
`reg_wr_data`) and a combinational read port (`reg_rd_addr` → `reg_rd_data`).
Word addresses:

| address      | contents |
|--------------|----------|
| `0x00`       | `[2:0]` levels N (clamped to 1..4), `[3]` remove last approximation, `[4]` use estimated thresholds |
| `0x01`       | `[2:0]` taps per filter (clamped to 1..4) |
| `0x02`       | `[9:0]` b_len (clamped to 32..512) |
| `0x03`       | read only: `[0]` busy, `[15:8]` frames completed |
| `0x10 + j`   | host threshold of level j (magnitude, 20 bits) |
| `0x18 + j`   | read only: estimated threshold of level j |
| `0x20 + 8f + k` | coefficient k of filter f: 0 analysis low, 1 analysis high, 2 synthesis low, 3 synthesis high; signed, 14 fractional bits |

Reset values:

- Four levels, last approximation removed, host thresholds (all zero).
- Haar filters (±11585 = 2^14/√2, two taps).
- 500-sample frames.

For Daubechies-2, write `h` = 7913, 13705, 3672, −2120 and
`g[k] = (−1)^k h[3−k]` = −2120, −3672, 13705, −7913 to both the analysis and
the synthesis sets, then set four taps.

Samples travel on two valid/ready streams of 16-bit signed samples.
`in_ready` is high while a frame is being loaded. `out_valid` holds its data
until `out_ready` takes it. `frame_done` pulses after the last sample of a
frame. An assertion in the top checks the output hold rule.

## Number formats

| quantity            | width | format |
|---------------------|-------|--------|
| input/output sample | 16    | signed integer |
| internal samples    | 20    | signed; 4 bits of headroom, since each analysis level of an orthonormal wavelet can grow the approximation by √2 |
| coefficients        | 16    | signed, 14 fractional bits (range ±2) |
| filter accumulators | 40    | signed |
| window energies     | 49    | unsigned (sum of 4: 51) |
| SC = 3.9            | 10    | 998 / 256 |

Outputs of every filter pass are rounded to nearest and saturated. The final
output is saturated to 16 bits.

## Departures and own choices

The publication describes the algorithm, the list of runtime parameters, the
maximum frame length, the threshold formula and the functional-unit budget.
The following points are this design's own:

- Circular extension at the frame edges and whole-frame processing. Loading,
  processing and output do not overlap.
- The split into three kernels (decomposition, recomposition, thresholding)
  and the mapping of their operations onto the two multipliers and three
  adders. The publication gives only the unit counts.
- The order of steps per frame, the ping-pong plus per-level memory
  organisation, and the frame-boundary update of parameters.
- The register bus, its map, clamping and reset values, and the valid/ready
  streams. In the original prototype a processor on the FPGA drives the
  coprocessor and exchanges data with a PC over UDP/Ethernet. Neither is part
  of this RTL; the register bus and streams are where they would connect.
- Bit widths, rounding, the tap limit (4, enough for Daubechies-2) and the
  level limit (4, the evaluated depth). One tap count applies to all four
  filters; shorter filters of a biorthogonal pair can be padded with zero
  taps.
- Reading of the threshold formula. The four windows are the current frame
  and the three before it. The normalisation is `4*(b_len-1)`. The energy is
  taken before thresholding, with integer floor division and square root.
- Minimum frame length 32, so that the widest dilated filter (24 samples)
  wraps at most once.

The publication reports FPGA and 90 nm ASIC results. None of them are
reproduced here.

## Verification

Every testbench is self-checking and prints a final `TB_RESULT` line:

- `tb_wd_global_kernel`: random taps in all three modes against a 64-bit
  integer model. It also checks saturation, strict thresholding at equal
  magnitude, and `out_valid` timing.
- `tb_wd_thr_estimator`: random windows on all levels and two frame lengths,
  with full-scale samples. Each result is checked against an integer model,
  within 0.5 % + 5 LSB of the real-valued formula, and against the exact
  80-cycle latency.
- `tb_wd_ram`, `tb_wd_regfile`: read/write behaviour, clamping, reset values
  and read-only registers.
- `tb_wd_fu_add`, `tb_wd_fu_mult`: random and corner operands of the two
  functional units against 64-bit arithmetic.
- `tb_wd_coprocessor`: the whole design at its default size. Ten frames of
  synthetic spikes plus noise run with Haar and Db2, 4 and 2 levels, 500,
  128 and 512 samples, approximation kept and removed, host and estimated
  thresholds, random input gaps and output back-pressure, and a threshold
  write during a frame. Every output sample is compared bit for bit with an
  independent array-based model. It also checks perfect reconstruction
  (within 4 LSB) for zero thresholds, the estimated thresholds read back over
  the bus, and the processing-cycle budget, and it counts that each of these
  mechanisms occurred.
- `tb_wd_accuracy`: the evaluation set-up (12 kHz, 500 samples, N = 4,
  approximation removed, estimated thresholds). The input is synthetic neural
  recordings: one neuron's spikes, smaller background spikes and Gaussian
  noise. It runs Haar and Db2 at a low and a high noise level, scores the last
  four of eight frames, and requires the error power against the clean spike
  train to drop. Typical improvements are about 2 dB at low noise and 7–9 dB
  at high noise. The low-noise figure is limited because the band-pass output
  drops the slow part of the spike waveform. With zero thresholds it also
  measures the pass band. A 96 Hz tone is cut by 25.6 dB (Haar) and 46 dB
  (Db2); tones at 1488 Hz and 4800 Hz pass within 0.05 dB.

To run a testbench with Verilator 5, for example the full design:

```
verilator --binary --timing --assert -Irtl rtl/wd_pkg.sv \
  -y rtl -y tb +libext+.sv --top-module tb_wd_coprocessor tb/tb_wd_coprocessor.sv
./obj_dir/Vtb_wd_coprocessor
```

The other testbenches build the same way with their own top module. All run
in well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/wd_pkg.sv` | widths, limits, register map, `kmode_e`, `cfg_t` |
| `rtl/wd_coprocessor.sv` | top: sequencer, memories, wiring |
| `rtl/wd_global_kernel.sv` | shared 2-multiplier / 3-adder datapath |
| `rtl/wd_fu_mult.sv`, `rtl/wd_fu_add.sv` | multiplier and adder functional units |
| `rtl/wd_thr_estimator.sv` | per-level noise threshold |
| `rtl/wd_regfile.sv` | runtime parameter registers |
| `rtl/wd_ram.sv` | frame buffer |
| `tb/*.sv` | the testbenches above |
