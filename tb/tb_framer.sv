// tb_framer: feeds a ramp (sample value = its index) and checks that frame k
// holds samples 256k .. 256k+511 in order with correct out_idx/out_last, that
// the first frame appears only after 512 samples, and that no frame is lost
// while the consumer keeps up. Then it stops requesting frames so that two
// hops complete while a frame waits: overrun must pulse and the frame read
// afterwards must be the newest one. Finally restart must drop everything.
module tb_framer;
  localparam int N = 512;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, frame_req = 0;
  logic signed [16:0] in_sample = '0, out_sample;
  logic frame_pending, out_valid, out_last, overrun;
  logic [8:0] out_idx;
  int checks = 0, failures = 0;
  int sent = 0;          // samples sent so far
  int frames_seen = 0;   // frames fully read
  int overruns = 0;
  int expect_start = 0;  // index of the first sample of the next frame
  int pos = 0;

  framer #(.N(N), .W(17)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: compare every read sample with the ramp.
  always @(posedge clk) begin
    if (rst_n && overrun) overruns++;
    if (rst_n && out_valid) begin
      checks++;
      if (out_idx != 9'(pos) || int'(out_sample) != expect_start + pos || out_last != (pos == N - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL frame@%0d pos %0d: idx %0d data %0d last %0b", expect_start, pos, out_idx, out_sample, out_last);
      end
      pos++;
      if (pos == N) begin
        pos = 0;
        frames_seen++;
        expect_start += N / 2;
      end
    end
  end

  task automatic send(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_sample = 17'(sent); sent++;
      @(negedge clk);
      in_valid = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame_req = 1;
    send(N - 1, 0);
    checks++;
    if (frame_pending || frames_seen != 0 || pos != 0) begin failures++; $display("FAIL frame before %0d samples", N); end
    send(1, 0);
    // Consumer keeps up: 6 further hops, each gap long enough for a readout.
    send(6 * N / 2, 2);
    repeat (2 * N) @(negedge clk);
    checks++;
    if (frames_seen != 7) begin failures++; $display("FAIL frames_seen=%0d exp 7", frames_seen); end
    checks++;
    if (overruns != 0) begin failures++; $display("FAIL unexpected overrun"); end
    // Stall the consumer for two hops: one frame is dropped.
    frame_req = 0;
    send(N, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL overruns=%0d exp 1", overruns); end
    checks++;
    if (!frame_pending) begin failures++; $display("FAIL no pending frame"); end
    expect_start += N / 2;   // the older of the two frames was dropped
    frame_req = 1;
    repeat (2 * N) @(negedge clk);
    checks++;
    if (frames_seen != 8) begin failures++; $display("FAIL frames_seen=%0d exp 8", frames_seen); end
    // Restart: a new recording needs N samples again before a frame.
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    sent = 0; expect_start = 0;
    send(N / 2, 0);
    checks++;
    if (frame_pending || out_valid) begin failures++; $display("FAIL frame after restart too early"); end
    send(N / 2, 0);
    repeat (2 * N) @(negedge clk);
    checks++;
    if (frames_seen != 9) begin failures++; $display("FAIL frames_seen=%0d exp 9", frames_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
