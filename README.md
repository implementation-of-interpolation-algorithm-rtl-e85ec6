# Fine frequency measurement by FFT peak interpolation

An FFT tells the frequency of a tone only to the nearest bin: with N points at
sampling rate Fs the answer is K·Fs/N, and the error can reach half a bin
spacing (±2.6 MHz for 256 points at 1350 MHz). A larger FFT costs hardware and
power. This design keeps the small FFT and refines the answer instead. Where
a tone falls between two bin centres, its energy spreads into the neighbouring
bins. A parabola fitted through the log magnitudes of the peak bin and its
two neighbours puts its vertex close to the true frequency. The circuit finds
that vertex with a few adds and one division per measurement.

The target is the digital receiver of a radar intercept (ESM) system. An 8-bit
ADC samples a 750–1250 MHz IF band at 1350 MHz (band-pass sampling, second
Nyquist zone), and the FPGA runs a 256-point FFT on each pulse. The default
parameters of the RTL are that configuration.

## The interpolation

With bin K holding the largest log magnitude β, and α and γ those of bins K−1
and K+1, the parabola through the three points peaks at

    p = (α − γ) / (2·(α − 2β + γ))          offset from K, in bins
    f = (K + p) · Fs/N

When β is the largest of the three, |p| ≤ 0.5. p is negative when the left
neighbour is the larger, which moves the estimate towards K−1. The base of the
logarithm cancels in the ratio, so any log scale gives the same p.

The hardware computes the same formula in a different order:

1. `diff_calc` computes the numerator α − γ.
2. `denom_calc` computes the denominator 2·(2β − (α + γ)). This is positive for a real peak.
3. `divider` computes q = (α − γ) / (2·(2β − α − γ)), rounded toward zero, with 8 fractional bits.
4. `bin_estimate` sets p = −q. It outputs K + p, the coarse frequency, and the
   estimated frequency.

Steps 1 and 2 run side by side. The denominator always leaves the divider
positive, so the sign of p comes only from α − γ.

### Fixed-point formats, and why the order of truncation matters

| quantity | format |
|---|---|
| log magnitude | log2(re² + im²), unsigned, 6 integer + 8 fractional bits (1 unit ≈ 3.01 dB) |
| p | signed, 10 bits, 8 fractional bits (saturating) |
| K + p | unsigned, 8 integer + 8 fractional bits |
| frequencies | MHz, unsigned 16 bits, 2 fractional bits (0.25 MHz steps) |

The two frequencies are computed as

    f_coarse = floor(K · Fs/N · 4) / 4
    f_fine   = f_coarse + floor(p · Fs/N · 4) / 4

Note the order: the shift is added to the coarse frequency after that value
has already been truncated. It is not computed as floor((K + p)·Fs/N). The two
orders differ by 0.25 MHz at times. The first order reproduces measured
hardware results exactly. Peak bin 209 with log values 28.9414, 31.5938 and
21.5820 gives q = 74/256. The coarse frequency is 1102.00 MHz and the estimate
is 1100.25 MHz. K + p = 208 + 182/256, whose fraction is 0.7109.
`tb_published_cases` checks these numbers.

### Bins and frequencies under band-pass sampling

A real tone at f between 675 and 1350 MHz aliases to Fs − f. Its mirror image
sits at bin f·N/Fs in the upper half of the FFT. The design reads bins 142 to
238 directly as frequency K·Fs/N, and p keeps its sign there. Tones from 750
to 1250 MHz fall in those bins. The default window (`K_MIN = 142`,
`K_MAX = 238`) is floor(750·256/1350) to ceil(1250·256/1350).

## Blocks and data flow

```
adc_data ─> adc_latch ─> fft ─> log_magnitude ─> peak_detect ─┬─> diff_calc ──┐
                                                             └─> denom_calc ─┴─> divider ─> bin_estimate ─> res_*
```

| module | what it does |
|---|---|
| `fe_pkg` | Default sizes and formats, shared by all modules. |
| `adc_latch` | Registers every ADC sample. A `start` pulse captures the next N valid samples as one frame. Samples are converted from offset binary to two's complement and tagged first/last. |
| `fft` | Pipelined N-point FFT: log2(N) radix-2 decimation-in-frequency stages with single-path delay feedback (R2SDF). Stage s holds a delay line of N/2^(s+1) words and a butterfly with one complex twiddle multiplier. There is no scaling between stages (18-bit data). Twiddles are 16 bits with 14 fractional bits, computed with `$cos`/`$sin` at elaboration. A bit-reversal buffer puts the bins back in natural order. |
| `log_magnitude` | log2(re² + im²). The integer part is the position of the leading one. The fraction comes from a 256-entry table of log2(1 + m/256), also computed at elaboration. The error is below 2/256. The latency is 2 clocks. |
| `peak_detect` | Finds the largest log value in bins K_MIN..K_MAX as bins stream past, and keeps the values on either side of it. The spectrum is not stored. On a tie the lower bin wins. |
| `diff_calc` | α − γ, registered. |
| `denom_calc` | 2·(2β − (α + γ)), registered. |
| `divider` | Restoring shift-subtract divider, one quotient bit per clock, 24 clocks. A denominator ≤ 0 gives 0 and sets `den_bad`. |
| `bin_estimate` | p = −q, K + p, and the two frequencies. Division by N is a shift. |
| `freq_estimator` | Top level. It wires the chain together and holds the result of each frame. |

### Top-level interface (`freq_estimator`)

Parameters: `N` (256), `ADC_W` (8), `FS_MHZ` (1350), `K_MIN` (142), `K_MAX` (238).

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock and asynchronous active-low reset |
| `adc_data[ADC_W]`, `adc_valid` | in | ADC samples in offset binary, one per clock when valid |
| `start` | in | capture the next N valid samples; ignored while a frame is in flight |
| `busy` | out | from an accepted `start` until the result |
| `res_valid` | out | one-clock pulse per frame; the `res_*` values hold until the next result |
| `res_k` | out | peak bin K |
| `res_alpha`, `res_beta`, `res_gamma` | out | log2\|X\|² of bins K−1, K, K+1 (8 fractional bits) |
| `res_p`, `res_p_bad` | out | bin offset p (8 fractional bits); flag set when no maximum exists (p forced to 0) |
| `res_est_bin` | out | K + p (8 fractional bits) |
| `res_f_coarse`, `res_f_fine` | out | K·Fs/N and (K+p)·Fs/N in MHz, 2 fractional bits |

### Timing

Assume one sample per clock and no gaps. `res_valid` rises 3N + log2(N) + 32
clocks after the edge that took `start`, which is 808 clocks at the defaults.
The parts of that count are:

- N + 2 clocks to capture the frame;
- N + log2(N) − 2 clocks to flush the FFT pipeline, and 2 clocks into the
  reorder buffer;
- N clocks to read out the bins;
- 2 clocks for the log stage and 1 for the peak search;
- 1 clock for the two terms;
- 25 clocks in the divider (1 to take the operands, 24 to divide);
- 1 clock for the estimate and 1 for the result registers.

The FFT pipeline moves only on a sample, or by itself while it flushes a
finished frame. It takes a new frame once that flush is done, 2N + log2(N)
clocks after the previous `start` at the earliest. The read-out of one frame
and the back end then overlap with the capture of the next. `busy` counts
frames in flight.

### The FFT pipeline in more detail

In stage s (delay D = N/2^(s+1)) the incoming stream is cut into blocks of
2D samples. During the first half of a block, each sample goes into the
delay line, and the line's old contents go out: the differences the stage
computed in the previous block. During the second half, each new sample b
meets its partner a from D samples earlier. a + b goes out at once, and
(a − b)·W^(j·2^s) goes into the line, where j is the position in the half
block. Each stage adds D + 1 samples of delay, N − 1 + log2(N) in total. The
results leave the last stage in bit-reversed order. They are written to the
reorder buffer at bit-reversed addresses and read back in order. One buffer
is enough: the next frame's first result reaches the buffer N + log2(N) − 2
samples after that frame starts, by which time the previous read-out of N
clocks has finished.

## How far it can be trusted

All modules compile without errors in Verilator (`-Wall` lint) and in the
slang front end of Yosys. Each block has a self-checking testbench that
compares it against values computed independently in the testbench:

- `tb_fft` compares the FFT with a direct DFT in floating point. The largest
  error is 12.3 LSB, out of ±32768 full scale. It comes from twiddle rounding
  in the early stages, which grows through the later ones.
- `tb_log_magnitude` compares the log with `$ln`.
- `tb_divider` and `tb_bin_estimate` compare against integer arithmetic.
- `tb_peak_detect` compares against a reference search.

For each testbench, a deliberately broken copy of its block was run through
the testbench, and the testbench caught the fault.

`tb_freq_estimator` runs the whole design at its default size. It sends
8-bit tones at 1000, 1100 and 1200 MHz, a 750–780 MHz sweep in 0.5 MHz steps,
30 random frequencies (some with gaps in `adc_valid`), and pairs of frames
sent back to back so that their processing overlaps. Over the sweep the
RMS error is 1.55 MHz for the FFT alone and 0.71 MHz with interpolation. The
reference implementation reported 1.52 and 0.82 MHz for the same sweep. All
estimates fall within 1.6 MHz of the true tone. The residual error is the known
bias of parabolic interpolation on a rectangular window; it is not caused by
rounding.

`tb_pulse_power` repeats the measurement at four signal levels (4 to 120
LSB peak) and three pulse widths: 200, 150 and 100 ns, where a 256-sample
frame lasts 190 ns. With interpolation the RMS error is 0.6–0.8 MHz for full
frames and 0.3–0.5 MHz for the shorter pulses. The FFT alone gives 1.2–1.6
MHz. The shorter pulses do better because the rest of the frame is empty:
the main lobe gets wider and its top is closer to a parabola.

## Where it departs from the reference implementation

- **FFT.** The reference used a vendor pipelined FFT core; its internals
  and word lengths are not known. This FFT is also pipelined, but it
  flushes between frames. It therefore takes a frame every 2N + log2(N)
  clocks rather than every N.
- **Divider.** The reference used a vendor divider core. This design uses a
  sequential divider.
- **Log format.** The reference measured magnitudes "in logarithmic scale"
  with 1/256 resolution. The base and the scaling (log2 of the squared
  magnitude) are this design's choice. The measured values in the reference
  (around 31.6 for a strong peak) are consistent with it, but the logs the
  front end produces differ from them. Only the log values after the FFT were
  published, not the ADC codes. The end-to-end test tones therefore show
  slightly different estimates: 1100.50 MHz against 1100.25 MHz published for
  the 1100 MHz pulse, and 1000.50 against 1000.00 MHz for the 1000 MHz pulse.
  The back end alone reproduces the published case exactly.
- **Unspecified details.** These are this design's own choices: ADC framing
  and the start/busy handshake, offset-binary input, the window limits, tie
  handling, reset, rounding and saturation, and all widths except the 8
  fractional bits of the log and of p and the 0.25 MHz frequency step.
- **One sample per clock.** At 1350 MS/s a real FPGA gets the ADC stream
  demultiplexed into several samples per clock. This design takes one
  sample per clock, so a full-rate front end needs a parallel (multi-path)
  FFT ahead of the same back end.
- **No windowing.** No window function is applied before the FFT.
- **Pulses shorter than one frame.** A frame is always N samples (190 ns at
  1350 MHz). A pulse shorter than that leaves the rest of the frame with
  whatever the ADC delivers; nothing gates the samples.
- **Outside the RTL.** The antenna, the RF down-converter, the ADC and the
  display are outside the RTL. The ADC's samples are the top's input ports,
  and the display would read the `res_*` outputs.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends. Run from
the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fe_pkg.sv \
          tb/tb_freq_estimator.sv --top-module tb_freq_estimator -o sim
./obj_dir/sim
```

Replace the testbench file and module with the block testbench you want:
`tb_adc_latch`, `tb_fft`, `tb_log_magnitude`, `tb_peak_detect`,
`tb_diff_calc`, `tb_denom_calc`, `tb_divider`, `tb_bin_estimate`,
`tb_published_cases` or `tb_pulse_power`. Each runs in well under a second. The end-to-end test
prints the three single-tone results, the sweep's RMS errors, and how often
each mechanism occurred (positive and negative p, ignored `start`, input
gaps, overlapped frames).

## Changing it

- **Another FFT size.** Set `N` (a power of two). The FFT data width follows
  as ADC_W + log2(N) + 2. Choose `K_MIN`/`K_MAX` for the band; the window must
  leave one bin on each side (1 ≤ K_MIN, K_MAX ≤ N−2).
- **Another sampling rate.** Set `FS_MHZ`. The frequency words are 16 bits
  with 2 fractional bits, enough up to 16383 MHz.
- **Other formats.** The log, offset and frequency formats are in `fe_pkg`
  (`LOG_FRAC`, `P_FRAC`, `P_W`, `FREQ_FRAC`, `FREQ_W`).
- **Continuous frames.** To take a frame every N clocks, let the next
  frame's samples push the previous frame out of the FFT in place of the
  flush. The reorder buffer then needs a second half (ping-pong). The back
  end only needs the bins 0..N−1 in order, with `out_idx`, `out_valid` and
  `out_last`.
