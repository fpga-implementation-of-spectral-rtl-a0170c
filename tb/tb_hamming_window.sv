// tb_hamming_window: multiplies random frames by the window and compares each
// result with an independent model: coefficient round(65536 * (0.54 - 0.46
// cos(2 pi n / 511))) and floor(x * coef / 65536). Also checks the window end
// points and symmetry, the one-clock latency and that the tag is carried.
module tb_hamming_window;
  localparam int N = 512;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [8:0] in_idx = '0, out_idx;
  logic signed [16:0] in_sample = '0;
  logic signed [17:0] out_sample;
  logic [3:0] in_tag = '0, out_tag;
  logic out_valid;
  int checks = 0, failures = 0;

  hamming_window #(.N(N), .IN_W(17), .OUT_W(18), .TAG_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint coef(input int n);
    real w;
    w = 0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * n / (N - 1));
    return longint'($floor(w * 65536.0 + 0.5));
  endfunction

  initial begin
    logic signed [16:0] x;
    longint exp_v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        x = (f == 0) ? 17'sd65535 : 17'($urandom);
        in_valid = 1; in_idx = 9'(n); in_sample = x; in_tag = 4'(n);
        @(negedge clk);
        in_valid = 0;
        exp_v = (longint'(x) * coef(n)) >>> 16;
        checks++;
        if (!out_valid || out_idx != 9'(n) || out_tag != 4'(n) || longint'(out_sample) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d x=%0d got %0d exp %0d", n, x, out_sample, exp_v);
        end
      end
    end
    // End points (0.08) and the peak (close to 1.0) of the window table.
    checks++; if (dut.rom[0] != 17'd5243 || dut.rom[N-1] != 17'd5243) begin failures++; $display("FAIL end points %0d %0d", dut.rom[0], dut.rom[N-1]); end
    checks++; if (dut.rom[255] != dut.rom[256] || dut.rom[255] < 17'd65530) begin failures++; $display("FAIL peak %0d", dut.rom[255]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
