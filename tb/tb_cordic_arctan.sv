// tb_cordic_arctan: streams random vectors from all four quadrants (and the
// axes) through the CORDIC one per clock and compares magnitude with
// sqrt(re^2 + im^2) and phase with atan2(im, re), both in 28.23, against
// floating-point values computed here. Also checks the ITER + 2 clock latency
// and that the tag stays with its data.
module tb_cordic_arctan;
  localparam int ITER = 24;
  localparam int NV = 3000;
  localparam real S = 8388608.0;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [23:0] in_re = '0, in_im = '0;
  logic [8:0] in_tag = '0, out_tag;
  logic out_valid;
  logic signed [27:0] out_mag, out_phase;
  int checks = 0, failures = 0;

  cordic_arctan #(.ITER(ITER), .TAG_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vr[NV], vi[NV];
  int sent_cycle[NV];
  int cycle = 0;
  int got = 0;
  real maxm = 0, maxp = 0;

  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real em, ep, dm, dp;
      em = $sqrt(real'(vr[got]) * vr[got] + real'(vi[got]) * vi[got]);
      ep = $atan2(real'(vi[got]), real'(vr[got])) * S;
      dm = real'(out_mag) - em;
      dp = real'(out_phase) - ep;
      // phase +pi and -pi are the same angle
      if (dp > PI * S) dp -= 2.0 * PI * S;
      if (dp < -PI * S) dp += 2.0 * PI * S;
      if (dm < 0) dm = -dm;
      if (dp < 0) dp = -dp;
      if (dm > maxm) maxm = dm;
      if (em > 1000000.0 && dp > maxp) maxp = dp;
      checks++;
      // Phase resolution is limited by the vector length: allow 4 LSB of the
      // input divided by the length, in radians, plus 64 LSB.
      if (dm > 8.0 || (em > 1000.0 && dp > 64.0 + 4.0 * S / em) || out_tag != 9'(got)) begin
        failures++;
        if (failures < 10) $display("FAIL v%0d (%0d,%0d): mag %0d exp %f phase %0d exp %f tag %0d", got, vr[got], vi[got], out_mag, em, out_phase, ep, out_tag);
      end
      checks++;
      if (cycle - sent_cycle[got] != ITER + 2) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cycle - sent_cycle[got]);
      end
      got++;
    end
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      vr[i] = int'($urandom_range(0, 16777214)) - 8388607;
      vi[i] = int'($urandom_range(0, 16777214)) - 8388607;
      if (i % 7 == 1) vr[i] = vr[i] / 1024;
      if (i % 7 == 2) vi[i] = vi[i] / 4096;
    end
    vr[0] = 8388607;  vi[0] = 0;         // axes and extremes
    vr[3] = 0;        vi[3] = 8388607;
    vr[4] = -8388607; vi[4] = 0;
    vr[5] = 0;        vi[5] = -8388608;
    vr[6] = -8388608; vi[6] = -8388608;
    vr[7] = -8388608; vi[7] = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_valid = 1; in_re = 24'(vr[i]); in_im = 24'(vi[i]); in_tag = 9'(i);
      sent_cycle[i] = cycle + 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (ITER + 10) @(negedge clk);
    checks++;
    if (got != NV) begin failures++; $display("FAIL got %0d results", got); end
    $display("max magnitude error %f LSB, max phase error (|v| > 1e6 LSB) %f LSB", maxm, maxp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
