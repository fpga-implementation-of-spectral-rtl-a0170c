# Fixed-point spectral subtraction for in-car speech recognition

This RTL cleans up speech from a single microphone before a speech recogniser
sees it. It uses magnitude spectral subtraction. The first eight frames of a
recording are taken to be noise only. Their average magnitude spectrum becomes
the noise estimate |D(w)|, and that estimate stays fixed for the rest of the
recording. Every later frame has this estimate subtracted from its magnitude
spectrum. Where the result falls to half the noise estimate or below, it is
replaced by that noise floor:

    S = |Y(w)| - |D(w)|
    |X(w)| = S           if S > 0.5 |D(w)|
           = 0.5 |D(w)|  otherwise

The noisy phase is kept. The enhanced spectrum goes back to the time domain
and is overlap-added. The input is 16-bit speech sampled at 16 kHz, cut into
512-sample frames with 50 % overlap.

The architecture, frame size, noise-estimation scheme, parameters (gamma = 1,
beta = 0.5, eight noise frames) and fixed-point widths come from the published
FPGA design "FPGA Implementation of Spectral Subtraction for Automotive Speech
Recognition" (Whittington, Deo, Kleinschmidt, Mason). That design used the
"optimised" bit widths. The insides of several units were left unspecified
there, or were vendor IP cores: the FFT, the CORDICs, the sequencing and
buffering. Those are written here from scratch. The section "Departures and
own choices" lists them.

## Signal path and number formats

Formats are written X.Y: X bits in two's complement, of which Y are fractional.

| stage | module | format out |
|---|---|---|
| input | – | 16.15 |
| pre-emphasis y[n] = x[n] − 0.97 x[n−1] | `preemphasis` | 17.15 (one extra integer bit, since the output can nearly double) |
| framing, 512 samples, hop 256 | `framer` | 17.15 |
| Hamming window | `hamming_window` | 18.15 |
| forward FFT (shared engine) | `fft_ifft` | 24.23 |
| magnitude and phase | `cordic_arctan` | 28.23 (phase in radians) |
| noise estimate, mean of 8 frames | `noise_estimator` | 28.23 |
| subtraction and noise floor | `subtract_floor` | 28.23 |
| sin/cos and two multipliers | `polar_to_cartesian` | 24.23 (saturated) |
| inverse FFT (same engine) | `fft_ifft` | 24.23 |
| window reapplied, overlap-add | `overlap_add` | 18.15 internally, 16.15 out (saturated) |

With gamma = 1, the general algorithm's "raise to the power gamma" and "raise
to 1/gamma" steps are identities, so they have no hardware. With beta = 0.5,
the noise floor is the noise estimate shifted right by one bit.

`ss_pkg` holds the shared widths and constants. It also holds constant
functions that compute every coefficient table at elaboration from its closed
form:

* Hamming window: w[n] = 0.54 − 0.46 cos(2πn/511), as unsigned 1.16.
* FFT twiddles: cos and sin of 2πk/512, as signed 2.22.
* CORDIC angles: atan(2^−i).
* CORDIC gain: 1/K = Π 1/sqrt(1 + 2^−2i).

No data files are needed.

### Scaling through the transforms

The FFT works on 24.23 numbers, whose range is ±1. A windowed sample can reach
about ±2, so the top enters it into the FFT shifted left by six bits. As a
24.23 number that is the sample value divided by 4. The forward transform
halves its data in each of its nine passes, so it delivers X[k]/512 and can
never grow out of range. The inverse transform does not scale. The top takes
bits [23:6] of its real output as an 18.15 number, which multiplies the value
back by 4. The subtraction rule scales linearly with the magnitude, so these
constant factors cancel. The output then has the same scale as a
floating-point implementation without any scaling.

## How a frame is processed

A single FFT engine is shared between the forward and inverse transforms, so
the top processes one frame at a time. A sequencer in
`spectral_subtraction_top` steps through seven states:

| state | what happens | clocks (N = 512) |
|---|---|---|
| IDLE | wait until the framer has a frame pending and the FFT is free | – |
| LOAD_F | the framer streams the 512 samples through the window into the FFT memory (bit-reversed addresses) | ~515 |
| RUN_F | forward FFT: 9 passes × 256 butterflies, one butterfly per clock | 2304 |
| PROC | read the 512 bins in order through CORDIC (26 clocks) → noise estimator (1) → subtract/floor (1) → sin/cos and multipliers (26) into the spectrum buffer | ~570 |
| LOAD_I | copy the spectrum buffer into the FFT memory | ~513 |
| RUN_I | inverse FFT | 2304 |
| UNLOAD_I | read the 512 time samples into overlap-add, which emits 256 finished output samples | ~513 |

One frame takes 6717 clocks. One frame is due every 256 input samples, which
at 16 kHz is every 16 ms. Any clock above about 0.42 MHz therefore keeps up in
real time.

The spectrum pipeline is one bin per clock. The phase from the CORDIC does not
go into a frame buffer. It travels as a sideband tag next to the magnitude
through the noise and subtraction stages, together with the bin index. The
recombined bin is written into the 512-entry spectrum buffer at its bin index.
That buffer exists because the FFT memory is still being read in bin order
while results arrive. Writing them straight back to their bit-reversed
addresses would overwrite bins that have not been read yet.

The framer holds 1024 samples, twice the frame length. The 256 samples that
arrive while a frame waits or is read out therefore never overwrite it. A
frame can become pending while the previous one is still waiting. This only
happens when samples arrive faster than one per ~26 clocks. The older frame is
then dropped and `frame_overrun` pulses.

## Noise estimate, the first frames, and restart

`noise_estimator` keeps one accumulator per bin in a circular buffer (31 bits,
so eight 28-bit magnitudes cannot overflow). Its bin pointer advances with
every bin and wraps at 512, which also counts frames. The first frame writes
the accumulators and the next seven add to them. Then the estimate freezes and
is read out as the sum shifted right by three bits. Until then, every bin of
the enhanced spectrum is forced to zero. The output of a recording's first
eight frames (2048 samples) is therefore silence.

`restart` marks the start of a new recording. It clears the pre-emphasis
delay, the framer, the noise estimate and the overlap-add history, and returns
the sequencer to IDLE. Apply it between recordings.

## Top-level interface (`spectral_subtraction_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| restart | in | 1 | begin a new recording |
| in_valid, in_sample | in | 1, 16 | one 16.15 sample per strobe |
| out_valid, out_sample | out | 1, 16 | enhanced 16.15 samples, in bursts of 256 per frame |
| busy | out | 1 | a frame is being processed |
| noise_ready | out | 1 | noise estimate complete |
| frame_overrun | out | 1 | a pending frame was dropped |
| fft_overflow | out | 1 | the last FFT run saturated |
| bin_floored | out | 1 | the noise floor replaced this bin |
| spec_sat | out | 1 | a recombined bin was clipped to the FFT input range |
| out_sat | out | 1 | an output sample was clipped |
| frame_done | out | 1 | one frame finished |

Parameters:

* `N`: frame length, default 512.
* `NFRAMES`: number of noise frames, default 8, must be a power of two.
* `ITER`: CORDIC iterations, default 24.

The output lags the input by one frame plus the processing time. The output
samples of frame k are input samples 256k … 256k+255, which start 512 samples
before the hop that triggered frame k.

## Departures and own choices

* **FFT engine.** The original design used a vendor FFT core with block
  scaling. `fft_ifft` is a radix-2 in-place decimation-in-time engine of its
  own. It runs one butterfly per clock over a dual 512×24-bit array. The
  forward transform has a fixed 1/2 per pass. The inverse transform is
  unscaled and saturating, and sets `overflow` when it clips. Its errors are
  therefore not the vendor core's. In particular, the core's occasional
  output spikes, caused by its changing scale factor, do not occur here.
* **CORDICs.** The original design names a CORDIC arctan unit and a CORDIC
  sin-cos unit followed by two multipliers. Here both are fully pipelined,
  with 24 iterations, 2 guard bits, and a ±π/2 quadrant pre-rotation. The
  vectoring unit corrects its gain with a 1/K multiply. The rotation unit
  starts from (1/K, 0).
* **Window.** The symmetric Hamming window is used both for analysis and for
  reapplication before overlap-add. Its coefficients are unsigned 1.16. The
  sum of the two overlapped squared windows is not constant: it ranges from
  0.58 to 1.0 over a hop. The original design does not normalise it, and
  neither does this one.
* **Rounding.** Products and shifts truncate toward minus infinity. The
  polar-to-Cartesian output and the final 16.15 output *saturate* rather than
  drop high bits.
* **Sequencing, spectrum buffer, framer depth, overrun policy, restart.**
  These are this implementation's own. The original design only mentions
  "appropriate control logic" and a buffer.
* **Not included.** The sample acquisition path is not included; the original
  design used a USB test harness. The FPGA clock manager is not included
  either. The top simply has sample ports and one clock.
* **Resources.** The original design runs in a small fraction of a
  Spartan-3A DSP 1800A: 13 % of slices, 29 % of DSP48s, 10 block RAMs. This
  RTL holds about 115 kbit of arrays:
  * the FFT data and twiddles;
  * the 1024-sample frame buffer;
  * the noise accumulators;
  * the spectrum buffer;
  * the window tables;
  * the overlap-add half frame.

  Its two CORDIC pipelines use about 5900 flip-flops. An iterative CORDIC
  would trade those for fewer bins per clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against values computed independently in the testbench, mostly in floating
point. Each ends with a `TB_RESULT checks=… failures=…` line.

| testbench | checks |
|---|---|
| `tb_preemphasis` | integer and real-valued models, latency, restart |
| `tb_framer` | frame contents and order on a ramp, first frame after 512 samples, overrun drops the older frame, restart |
| `tb_hamming_window` | every coefficient and product against the window formula, end points and symmetry |
| `tb_fft_ifft` | forward transform against DFT/512 (≤ 6 LSB), inverse against the unscaled inverse DFT (≤ 128 LSB), round trip, 2304-clock run time, saturation and `overflow` |
| `tb_cordic_arctan` | magnitude (≤ 8 LSB) and phase against sqrt and atan2 in all quadrants, 26-clock latency |
| `tb_polar_to_cartesian` | m·cos, m·sin (≤ 8 LSB) over −π…π, saturation, latency |
| `tb_noise_estimator` | ready only after 8 frames, estimate = floor(sum/8) per bin, frozen afterwards, restart |
| `tb_subtract_floor` | rule incl. the equality edge case, zero output before the estimate exists |
| `tb_overlap_add` | windowed overlap-add against an integer model, saturation, restart |
| `tb_spectral_subtraction_top` | see below |

`tb_spectral_subtraction_top` runs the whole design at its default size. It
compares the design against a floating-point model of the same algorithm,
built into the testbench from the DFT definition. It runs three recordings:

1. Noise followed by a 1 kHz tone, paced at one sample per 32 clocks. Outputs
   during noise estimation must be exactly zero. All later outputs must match
   the model within 0.001 of full scale; the observed error is about
   1.3·10⁻⁴. No frame may be dropped, and each frame must finish within its
   256-sample budget.
2. A full-scale burst, too fast to process. It must drop frames and saturate
   outputs.
3. After `restart`, a new recording: an amplitude-modulated chirp in
   low-frequency-heavy noise. Its first eight frames must be silent again, and
   the rest must match the model.

The test also counts how often each mechanism occurs and fails if one never
does:

* zeroed frames
* kept bins
* floored bins
* dropped frames
* restart
* output saturation

It runs in well under a second.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl --top-module tb_fft_ifft \
        rtl/ss_pkg.sv tb/tb_fft_ifft.sv
    ./obj_dir/Vtb_fft_ifft

Replace the name for the other testbenches. Each module file starts with a
comment on its function, interface and timing.
