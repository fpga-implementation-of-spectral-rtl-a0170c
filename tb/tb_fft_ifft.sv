// tb_fft_ifft: checks the shared FFT/IFFT engine at its full size (512
// points, 24.23) against a floating-point DFT computed here.
//   1. Forward transform of random complex data: every bin must equal
//      DFT(x)/512 within a few LSB, and busy must last 9 * 256 = 2304 clocks.
//   2. Inverse transform of a random spectrum: every point must equal the
//      unscaled inverse DFT within tolerance.
//   3. Round trip: forward, read out, reload, inverse returns the input.
//   4. An inverse transform of a large spectrum must saturate and raise
//      overflow; a normal run must leave overflow low.
module tb_fft_ifft;
  localparam int N = 512;
  localparam real SCALE = 8388608.0;   // 2^23
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0;
  logic load_valid = 0, start = 0, inverse = 0, rd_en = 0;
  logic [8:0] load_addr = '0, rd_addr = '0, rd_idx;
  logic signed [23:0] load_re = '0, load_im = '0, rd_re, rd_im;
  logic busy, done, overflow, rd_valid;
  int checks = 0, failures = 0;

  fft_ifft #(.N(N), .W(24)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int xr[N], xi[N];     // data loaded (integers)
  int yr[N], yi[N];     // data read back
  real cr[N], sr[N];

  task automatic load_all();
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      load_valid = 1; load_addr = 9'(n); load_re = 24'(xr[n]); load_im = 24'(xi[n]);
    end
    @(negedge clk);
    load_valid = 0;
  endtask

  task automatic run(input logic inv, output int cycles);
    @(negedge clk);
    start = 1; inverse = inv;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic read_all();
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 9'(n);
      @(negedge clk);
      rd_en = 0;
      if (!rd_valid || rd_idx != 9'(n)) begin
        failures++;
        $display("FAIL read handshake at %0d", n);
      end
      yr[n] = int'(rd_re); yi[n] = int'(rd_im);
    end
  endtask

  // Compare the read-back data with the DFT of x (sign = -1 forward, +1
  // inverse), scaled by 'scl', with tolerance 'tol' LSB.
  task automatic compare(input int sgn, input real scl, input real tol, input string what);
    real er, ei, maxerr;
    maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        int m;
        m = (k * n) % N;
        er += xr[n] * cr[m] - sgn * xi[n] * sr[m];
        ei += xi[n] * cr[m] + sgn * xr[n] * sr[m];
      end
      er *= scl; ei *= scl;
      if (fabs(er - yr[k]) > maxerr) maxerr = fabs(er - yr[k]);
      if (fabs(ei - yi[k]) > maxerr) maxerr = fabs(ei - yi[k]);
      checks++;
      if (fabs(er - yr[k]) > tol || fabs(ei - yi[k]) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL %s bin %0d got (%0d,%0d) exp (%f,%f)", what, k, yr[k], yi[k], er, ei);
      end
    end
    $display("%s: max error %f LSB", what, maxerr);
  endtask

  initial begin
    int cyc;
    for (int m = 0; m < N; m++) begin
      cr[m] = $cos(2.0 * PI * m / N);
      sr[m] = $sin(2.0 * PI * m / N);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. forward
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 4000000) - 2000000;
      xi[n] = $urandom_range(0, 4000000) - 2000000;
    end
    load_all();
    run(1'b0, cyc);
    checks++;
    if (cyc != 9 * N / 2) begin failures++; $display("FAIL forward took %0d clocks, exp %0d", cyc, 9 * N / 2); end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow on forward run"); end
    read_all();
    compare(-1, 1.0 / N, 6.0, "forward");

    // 2. inverse of a random spectrum (small values: no growth beyond range)
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 20000) - 10000;
      xi[n] = $urandom_range(0, 20000) - 10000;
    end
    load_all();
    run(1'b1, cyc);
    checks++;
    if (cyc != 9 * N / 2) begin failures++; $display("FAIL inverse took %0d clocks", cyc); end
    read_all();
    compare(1, 1.0, 128.0, "inverse");

    // 3. round trip
    for (int n = 0; n < N; n++) begin
      xr[n] = $urandom_range(0, 4000000) - 2000000;
      xi[n] = 0;
    end
    begin
      int orig_r[N];
      orig_r = xr;
      load_all();
      run(1'b0, cyc);
      read_all();
      xr = yr; xi = yi;
      load_all();
      run(1'b1, cyc);
      read_all();
      for (int n = 0; n < N; n++) begin
        checks++;
        if (fabs(yr[n] - orig_r[n]) > 512 || fabs(yi[n]) > 512) begin
          failures++;
          if (failures < 10) $display("FAIL round trip %0d got %0d exp %0d", n, yr[n], orig_r[n]);
        end
      end
    end

    // 4. inverse of a large flat spectrum: must saturate
    for (int n = 0; n < N; n++) begin xr[n] = 4000000; xi[n] = 0; end
    load_all();
    run(1'b1, cyc);
    checks++;
    if (!overflow) begin failures++; $display("FAIL no overflow flagged"); end
    read_all();
    checks++;
    if (yr[0] != 8388607) begin failures++; $display("FAIL saturated value %0d", yr[0]); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
