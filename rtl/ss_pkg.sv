// ss_pkg: shared constants, fixed-point widths and constant functions of the
// spectral-subtraction speech enhancer.
//
// Number formats are written X.Y: X bits in total (two's complement) of which
// Y are fractional. The widths follow the "optimised" column of the bit-width
// table of the design: pre-emphasis 17.15, framing and windowing 18.15,
// FFT/IFFT 24.23, spectral-subtraction blocks 28.23, reconstruction 18.15,
// with 16.15 at the input and output interface.
//
// The constant functions below compute the coefficient tables (Hamming window,
// FFT twiddles, CORDIC arctangents and gain) at elaboration time from their
// closed forms, so no table files are needed.
package ss_pkg;

  // Frame geometry: 512-sample frames with 50 % overlap.
  localparam int unsigned FRAME_N = 512;

  // Data widths (total bits); fractional bits in *_FRAC.
  localparam int unsigned IO_W    = 16;  // 16.15 interface samples
  localparam int unsigned PRE_W   = 17;  // 17.15 pre-emphasis output
  localparam int unsigned WIN_W   = 18;  // 18.15 framed and windowed samples
  localparam int unsigned SMP_FRAC = 15;
  localparam int unsigned FFT_W   = 24;  // 24.23 FFT/IFFT data
  localparam int unsigned FFT_FRAC = 23;
  localparam int unsigned SS_W    = 28;  // 28.23 magnitude, phase, noise
  localparam int unsigned SS_FRAC = 23;

  // Hamming coefficients are unsigned 1.16 (65536 represents 1.0).
  localparam int unsigned WCOEF_W    = 17;
  localparam int unsigned WCOEF_FRAC = 16;

  // FFT twiddles are signed 24-bit with 22 fractional bits, so +1.0 fits.
  localparam int unsigned TW_W    = 24;
  localparam int unsigned TW_FRAC = 22;

  // Number of noise-only frames averaged for the noise estimate (power of two).
  localparam int unsigned NOISE_FRAMES = 8;

  localparam real PI = 3.14159265358979323846;

  // Symmetric Hamming window w[n] = 0.54 - 0.46 cos(2 pi n / (N-1)), as 1.16.
  function automatic int hamming_coef(input int n, input int len);
    real w;
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(len - 1));
    return int'($floor(w * 65536.0 + 0.5));
  endfunction

  // cos(2 pi k / len) and sin(2 pi k / len) in TW format.
  function automatic int twiddle_cos(input int k, input int len);
    return int'($floor($cos(2.0 * PI * real'(k) / real'(len)) * 4194304.0 + 0.5));
  endfunction

  function automatic int twiddle_sin(input int k, input int len);
    return int'($floor($sin(2.0 * PI * real'(k) / real'(len)) * 4194304.0 + 0.5));
  endfunction

  // atan(2^-i) in radians with 'frac' fractional bits.
  function automatic longint cordic_atan(input int i, input int frac);
    return longint'($floor($atan(2.0 ** (-i)) * (2.0 ** frac) + 0.5));
  endfunction

  // 1/K for 'iters' CORDIC iterations, K = prod sqrt(1 + 2^-2i), with 'frac'
  // fractional bits.
  function automatic longint cordic_inv_gain(input int iters, input int frac);
    real k;
    k = 1.0;
    for (int i = 0; i < iters; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'($floor((1.0 / k) * (2.0 ** frac) + 0.5));
  endfunction

endpackage
