// tb_overlap_add: sends frames of random 18.15 samples and checks each output
// sample against an independent model: the Hamming coefficient
// round(65536 * (0.54 - 0.46 cos(2 pi n / 511))), windowed value
// floor(x * w / 65536), first half of each frame plus the stored second half
// of the previous frame (nothing before the first frame), saturated to 16.15.
// Also checks that each frame yields exactly 256 outputs, that a loud frame
// saturates and raises out_sat, and that restart clears the history.
module tb_overlap_add;
  localparam int N = 512;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0;
  logic [8:0] in_idx = '0;
  logic signed [17:0] in_sample = '0;
  logic out_valid, out_sat;
  logic signed [15:0] out_sample;
  int checks = 0, failures = 0, n_sat = 0;

  overlap_add #(.N(N), .IN_W(18), .OUT_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint coef(input int n);
    return longint'($floor((0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * n / (N - 1))) * 65536.0 + 0.5));
  endfunction

  longint prev_tail[N/2];
  logic   have_prev = 0;
  longint expq[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (out_sat) n_sat++;
        if (longint'(out_sample) != e || out_sat != (e == 32767 || e == -32768)) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d exp %0d", out_sample, e);
        end
      end
    end
  end

  task automatic frame(input int amp);
    longint w, s;
    for (int n = 0; n < N; n++) begin
      int x;
      x = int'($urandom_range(0, 2 * amp)) - amp;
      w = (longint'(x) * coef(n)) >>> 16;
      if (n < N / 2) begin
        s = w + (have_prev ? prev_tail[n] : 0);
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        expq.push_back(s);
      end else begin
        prev_tail[n - N / 2] = w;
      end
      @(negedge clk);
      in_valid = 1; in_idx = 9'(n); in_sample = 18'(x);
    end
    @(negedge clk);
    in_valid = 0;
    have_prev = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) frame(30000);
    frame(131071);           // loud: saturates
    frame(20000);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    have_prev = 0;
    frame(25000);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation seen"); end
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
