// tb_noise_estimator: sends 12 frames of random per-bin magnitudes at the
// full 512-bin size. During the first 8 frames out_ready and noise_ready must
// be low; from frame 9 on out_noise must equal floor(sum of the first 8
// frames / 8) for every bin, frozen (later frames do not change it), with
// the magnitude and tag passed through one clock later. After restart the
// estimate must be rebuilt from the next 8 frames.
module tb_noise_estimator;
  localparam int N = 512;
  localparam int NF = 8;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic signed [27:0] in_mag = '0, out_mag, out_noise;
  logic [8:0] in_tag = '0, out_tag;
  logic out_valid, out_ready, noise_ready;
  int checks = 0, failures = 0;

  noise_estimator #(.N(N), .W(28), .NFRAMES(NF), .TAG_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum[N];

  task automatic run_frames(input int nframes);
    for (int f = 0; f < nframes; f++) begin
      for (int b = 0; b < N; b++) begin
        int m;
        m = $urandom_range(0, 100000000);
        if (f < NF) sum[b] += m;
        @(negedge clk);
        in_valid = 1; in_mag = 28'(m); in_tag = 9'(b);
        @(posedge clk); #1;
        checks++;
        if (!out_valid || out_mag != 28'(m) || out_tag != 9'(b)) begin
          failures++;
          if (failures < 10) $display("FAIL passthrough f%0d b%0d", f, b);
        end
        checks++;
        if (f < NF) begin
          if (out_ready) begin failures++; if (failures < 10) $display("FAIL ready during frame %0d", f); end
        end else begin
          if (!out_ready || longint'(out_noise) != (sum[b] >>> 3)) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d b%0d noise %0d exp %0d", f, b, out_noise, sum[b] >>> 3);
          end
        end
        // idle clocks between some bins
        if ($urandom_range(0, 9) == 0) begin
          @(negedge clk); in_valid = 0;
          @(posedge clk);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (sum[b]) sum[b] = 0;
    run_frames(NF - 1);
    checks++;
    if (noise_ready) begin failures++; $display("FAIL noise_ready early"); end
    run_frames(1);
    checks++;
    if (!noise_ready) begin failures++; $display("FAIL noise_ready late"); end
    // frames 9..12 must see the frozen estimate
    for (int k = 0; k < 4; k++) begin
      longint keep[N];
      keep = sum;
      run_frames_after(keep);
    end
    // restart and rebuild
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    checks++;
    if (noise_ready) begin failures++; $display("FAIL noise_ready after restart"); end
    foreach (sum[b]) sum[b] = 0;
    run_frames(NF + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame after the estimate is complete: checks every bin.
  task automatic run_frames_after(input longint est[N]);
    for (int b = 0; b < N; b++) begin
      int m;
      m = $urandom_range(0, 100000000);
      @(negedge clk);
      in_valid = 1; in_mag = 28'(m); in_tag = 9'(b);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || !out_ready || out_mag != 28'(m) || longint'(out_noise) != (est[b] >>> 3)) begin
        failures++;
        if (failures < 10) $display("FAIL frozen b%0d noise %0d exp %0d", b, out_noise, est[b] >>> 3);
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask
endmodule
