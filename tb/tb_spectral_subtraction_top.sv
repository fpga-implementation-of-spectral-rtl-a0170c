// tb_spectral_subtraction_top: end-to-end test of the enhancer at its default
// size (512-point frames, 8 noise frames), against a floating-point model of
// the same algorithm computed here (pre-emphasis with 0.97, symmetric Hamming
// window, DFT, magnitude and phase, mean of the first 8 frames' magnitudes as
// noise estimate, X = max-rule with beta = 0.5, inverse DFT, window
// reapplication, 50 % overlap-add).
//
// Phase 1, one recording paced at one sample every PACE clocks: 8 frames of
// noise only, then a tone in noise. Outputs of the first 8 frames must be
// exactly zero; every later output must match the model within TOL. Every
// frame must be finished before the next one is due (real-time: one frame
// per 256 input samples) and no frame may be dropped.
// Phase 2, a loud full-scale burst at one sample every 2 clocks: frames
// arrive faster than they can be processed, so frames are dropped
// (frame_overrun) and output samples saturate (out_sat).
// Phase 3, restart and a second recording: an amplitude-modulated chirp in
// low-frequency-heavy noise (a stand-in for wind and engine noise). The noise
// estimate must be rebuilt, so the first 8 frames are zero again, and the
// rest must match the model of this recording.
// The counts of each mechanism are printed; one that never happened is a
// failure.
module tb_spectral_subtraction_top;
  localparam int  N      = 512;
  localparam int  HOP    = 256;
  localparam int  NFR    = 16;                 // frames in phase 1
  localparam int  NS     = HOP * (NFR + 1);    // samples in phase 1
  localparam int  NFR3   = 14;                 // frames in phase 3
  localparam int  NS3    = HOP * (NFR3 + 1);
  localparam int  PACE   = 32;                 // clocks per input sample
  localparam real TOL    = 0.001;              // output tolerance (full scale 1.0)
  localparam real PI     = 3.141592653589793;

  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic signed [15:0] in_sample = '0;
  logic out_valid, busy, noise_ready, frame_overrun, fft_overflow;
  logic bin_floored, spec_sat, out_sat, frame_done;
  logic signed [15:0] out_sample;
  int checks = 0, failures = 0;

  spectral_subtraction_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  real maxerr = 0;
  int  xin[], xin3[];
  real refout[], refout3[];
  real cs[N], sn[N], hw[N];

  // Floating-point model: output samples r[0 .. HOP*nfr-1] for input x.
  task automatic build_reference(input int x[], input int nfr, output real r[]);
    real pre[];
    real mag[][N], ph[][N];
    real noise[N];
    real tw[][N];
    pre = new[x.size()];
    mag = new[nfr]; ph = new[nfr]; tw = new[nfr];
    r = new[x.size()];
    for (int m = 0; m < N; m++) begin
      cs[m] = $cos(2.0 * PI * m / N);
      sn[m] = $sin(2.0 * PI * m / N);
      hw[m] = 0.54 - 0.46 * $cos(2.0 * PI * m / (N - 1));
    end
    for (int n = 0; n < x.size(); n++)
      pre[n] = (x[n] - 0.97 * ((n > 0) ? x[n-1] : 0)) / 32768.0;
    for (int k = 0; k < nfr; k++) begin
      real f[N];
      for (int n = 0; n < N; n++) f[n] = pre[HOP * k + n] * hw[n];
      for (int b = 0; b < N; b++) begin
        real re, im;
        re = 0; im = 0;
        for (int n = 0; n < N; n++) begin
          re += f[n] * cs[(b * n) % N];
          im -= f[n] * sn[(b * n) % N];
        end
        mag[k][b] = $sqrt(re * re + im * im);
        ph[k][b]  = $atan2(im, re);
      end
    end
    for (int b = 0; b < N; b++) begin
      noise[b] = 0;
      for (int k = 0; k < 8; k++) noise[b] += mag[k][b] / 8.0;
    end
    for (int k = 0; k < nfr; k++) begin
      real zr[N], zi[N];
      for (int b = 0; b < N; b++) begin
        real v, s;
        if (k < 8) v = 0;
        else begin
          s = mag[k][b] - noise[b];
          v = (s > 0.5 * noise[b]) ? s : 0.5 * noise[b];
        end
        zr[b] = v * $cos(ph[k][b]);
        zi[b] = v * $sin(ph[k][b]);
      end
      for (int n = 0; n < N; n++) begin
        real t;
        t = 0;
        for (int b = 0; b < N; b++)
          t += zr[b] * cs[(b * n) % N] - zi[b] * sn[(b * n) % N];
        tw[k][n] = t / N * hw[n];
      end
    end
    for (int k = 0; k < nfr; k++)
      for (int n = 0; n < HOP; n++)
        r[HOP * k + n] = tw[k][n] + ((k > 0) ? tw[k-1][n + HOP] : 0.0);
  endtask

  // Compares one output sample with the model: exact zero while the noise
  // estimate is being built, within TOL afterwards.
  task automatic check_out(input int idx, input int limit, input real r[], input string rec);
    real got, e;
    got = out_sample / 32768.0;
    checks++;
    if (idx >= limit) begin
      failures++;
      $display("FAIL %s: extra output", rec);
    end else if (idx < 8 * HOP) begin
      if (out_sample != 0) begin
        failures++;
        if (failures < 10) $display("FAIL %s: output %0d during noise estimation: %0d", rec, idx, out_sample);
      end
    end else begin
      e = got - r[idx];
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("FAIL %s: output %0d got %f exp %f", rec, idx, got, r[idx]);
      end
    end
  endtask

  // ------------------------------------------------------ monitors
  int  phase = 1;
  int  nout = 0, nout3 = 0;
  int  n_zero_frames = 0, n_floored = 0, n_bins_after = 0, n_overrun = 0;
  int  n_out_sat = 0, n_fft_ovf = 0, n_spec_sat = 0, n_frames = 0, n_restart = 0;
  int  busy_len = 0, max_busy = 0, max2 = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (frame_overrun) n_overrun++;
      if (out_sat) n_out_sat++;
      if (spec_sat) n_spec_sat++;
      if (bin_floored) n_floored++;
      if (frame_done) begin
        n_frames++;
        if (!noise_ready) n_zero_frames++;
        else n_bins_after += N;
        if (fft_overflow) n_fft_ovf++;
      end
      if (busy) busy_len++;
      else begin
        if (busy_len > max_busy && phase == 1) max_busy = busy_len;
        busy_len = 0;
      end
      if (out_valid && phase == 1) begin
        check_out(nout, NFR * HOP, refout, "recording 1");
        nout++;
      end
      if (out_valid && phase == 2 && (out_sample > max2 || -out_sample > max2)) max2 = (out_sample > 0) ? out_sample : -out_sample;
      if (out_valid && phase == 3) begin
        check_out(nout3, NFR3 * HOP, refout3, "recording 2");
        nout3++;
      end
    end
  end

  task automatic send(input int x, input int gap);
    @(negedge clk);
    in_valid = 1; in_sample = 16'(x);
    @(negedge clk);
    in_valid = 0;
    repeat (gap - 2) @(negedge clk);
  endtask

  initial begin
    xin = new[NS];
    xin3 = new[NS3];
    // Noise: uniform +-0.03; from sample 2400 a 1 kHz tone of amplitude 0.3.
    for (int n = 0; n < NS; n++) begin
      int v;
      v = int'($urandom_range(0, 2000)) - 1000;
      if (n >= 2400 && n < 4000) v += int'(9830.0 * $sin(2.0 * PI * 1000.0 * n / 16000.0));
      xin[n] = v;
    end
    // Second recording: low-pass noise (one-pole, pole 0.97) plus, from
    // sample 2400, a chirp from 200 Hz to 3 kHz with a 4 Hz amplitude
    // modulation, peak 0.25.
    begin
      real lp, ph_c;
      lp = 0; ph_c = 0;
      for (int n = 0; n < NS3; n++) begin
        real v, fr;
        int  u;
        u  = int'($urandom_range(0, 600)) - 300;
        lp = 0.97 * lp + u;
        v = lp;
        if (n >= 2400) begin
          fr = 200.0 + 2800.0 * (n - 2400) / (NS3 - 2400);
          ph_c += 2.0 * PI * fr / 16000.0;
          v += 8192.0 * (0.5 + 0.5 * $sin(2.0 * PI * 4.0 * n / 16000.0)) * $sin(ph_c);
        end
        xin3[n] = int'(v);
      end
    end
    build_reference(xin, NFR, refout);
    build_reference(xin3, NFR3, refout3);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Phase 1
    for (int n = 0; n < NS; n++) send(xin[n], PACE);
    while (busy || nout < NFR * HOP) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (nout != NFR * HOP) begin failures++; $display("FAIL %0d outputs, exp %0d", nout, NFR * HOP); end
    checks++;
    if (n_frames != NFR) begin failures++; $display("FAIL %0d frames, exp %0d", n_frames, NFR); end
    checks++;
    if (n_overrun != 0) begin failures++; $display("FAIL frames dropped at the real-time pace"); end
    checks++;
    if (max_busy > HOP * PACE) begin failures++; $display("FAIL frame took %0d clocks, budget %0d", max_busy, HOP * PACE); end
    $display("phase 1: %0d outputs, max error %f, longest frame %0d clocks", nout, maxerr, max_busy);
    maxerr = 0;

    // Phase 2: loud, fast
    phase = 2;
    for (int n = 0; n < 2048; n++) send((n % 2) ? 32767 : -32767, 2);
    // let the last pending frame through: at most two frames of work
    repeat (3 * HOP * PACE) @(negedge clk);
    $display("phase 2: largest output %0d, frames %0d", max2, n_frames);

    // Phase 3: restart, new recording
    phase = 3;
    @(negedge clk); restart = 1; n_restart++; @(negedge clk); restart = 0;
    checks++;
    if (noise_ready) begin failures++; $display("FAIL noise estimate survived restart"); end
    for (int n = 0; n < NS3; n++) send(xin3[n], PACE);
    while (busy || nout3 < NFR3 * HOP) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (nout3 != NFR3 * HOP) begin failures++; $display("FAIL %0d outputs after restart, exp %0d", nout3, NFR3 * HOP); end
    $display("phase 3: %0d outputs, max error %f", nout3, maxerr);

    $display("mechanisms: zeroed frames (noise estimation) %0d, bins kept %0d, bins floored %0d, frames dropped %0d, restarts %0d, saturated outputs %0d, saturated bins %0d, FFT runs with overflow %0d",
             n_zero_frames, n_bins_after - n_floored, n_floored, n_overrun, n_restart, n_out_sat, n_spec_sat, n_fft_ovf);
    checks++; if (n_zero_frames == 0) begin failures++; $display("FAIL no zeroed frame"); end
    checks++; if (n_floored == 0) begin failures++; $display("FAIL noise floor never applied"); end
    checks++; if (n_bins_after - n_floored <= 0) begin failures++; $display("FAIL no bin kept"); end
    checks++; if (n_overrun == 0) begin failures++; $display("FAIL no frame overrun"); end
    checks++; if (n_out_sat == 0) begin failures++; $display("FAIL no output saturation"); end
    checks++; if (n_restart == 0) begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
