// tb_preemphasis: checks y[n] = x[n] - 0.97 x[n-1] against an integer model
// (coefficient 31785 / 2^15, product floored) and against the real-valued
// filter within one LSB, the one-clock latency, and that restart clears the
// delay register.
module tb_preemphasis;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic signed [15:0] in_sample = '0;
  logic out_valid;
  logic signed [16:0] out_sample;
  int checks = 0, failures = 0;

  preemphasis dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic signed [15:0] x, input longint xprev);
    longint exp_i;
    real    exp_r;
    @(negedge clk);
    in_valid  = 1;
    in_sample = x;
    @(negedge clk);
    in_valid  = 0;
    // Out must be valid exactly one clock after the strobe.
    exp_i = longint'(x) - ((xprev * 31785) >>> 15);
    exp_r = real'(x) - 0.97 * real'(xprev);
    checks++;
    if (!out_valid || longint'(out_sample) != exp_i) begin
      failures++;
      $display("FAIL x=%0d xprev=%0d got %0d (valid %0b) exp %0d", x, xprev, out_sample, out_valid, exp_i);
    end
    checks++;
    if ((real'(out_sample) - exp_r) > 1.1 || (exp_r - real'(out_sample)) > 1.1) begin
      failures++;
      $display("FAIL real model: got %0d exp %f", out_sample, exp_r);
    end
  endtask

  initial begin
    longint prev;
    logic signed [15:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev = 0;
    // Extremes first: output must reach nearly twice the input magnitude.
    drive(16'sh7fff, prev); prev = 32767;
    drive(-16'sh8000, prev); prev = -32768;
    drive(16'sh7fff, prev); prev = 32767;
    for (int i = 0; i < 2000; i++) begin
      x = 16'($urandom);
      drive(x, prev);
      prev = x;
      // idle gaps between samples must not disturb the state
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // restart clears x[n-1]
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    checks++;
    if (out_valid) begin failures++; $display("FAIL output during restart"); end
    drive(16'sd1000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
