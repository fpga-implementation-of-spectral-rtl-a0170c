// tb_polar_to_cartesian: streams random (magnitude, phase) pairs, phase over
// the whole -pi..pi range, and compares re = m cos(phi), im = m sin(phi) in
// 24.23 with floating-point values computed here. Checks the ITER + 2 clock
// latency, the tag, and that a magnitude beyond the 24.23 range saturates and
// raises out_sat.
module tb_polar_to_cartesian;
  localparam int ITER = 24;
  localparam int NV = 3000;
  localparam real S = 8388608.0;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [27:0] in_mag = '0, in_phase = '0;
  logic [8:0] in_tag = '0, out_tag;
  logic out_valid, out_sat;
  logic signed [23:0] out_re, out_im;
  int checks = 0, failures = 0;

  polar_to_cartesian #(.ITER(ITER), .TAG_W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vm[NV], vp[NV];
  int sent_cycle[NV];
  int cycle = 0, got = 0, sats = 0;
  real maxe = 0;

  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real er, ei, dr, di;
      logic exp_sat;
      er = real'(vm[got]) * $cos(real'(vp[got]) / S);
      ei = real'(vm[got]) * $sin(real'(vp[got]) / S);
      exp_sat = 0;
      if (er > 8388607.0) begin er = 8388607.0; exp_sat = 1; end
      if (er < -8388608.0) begin er = -8388608.0; exp_sat = 1; end
      if (ei > 8388607.0) begin ei = 8388607.0; exp_sat = 1; end
      if (ei < -8388608.0) begin ei = -8388608.0; exp_sat = 1; end
      dr = real'(out_re) - er; if (dr < 0) dr = -dr;
      di = real'(out_im) - ei; if (di < 0) di = -di;
      if (dr > maxe) maxe = dr;
      if (di > maxe) maxe = di;
      if (out_sat) sats++;
      checks++;
      if (dr > 8.0 || di > 8.0 || out_tag != 9'(got) || out_sat != exp_sat) begin
        failures++;
        if (failures < 10) $display("FAIL v%0d m=%0d p=%0d: got (%0d,%0d) exp (%f,%f) sat %0b", got, vm[got], vp[got], out_re, out_im, er, ei, out_sat);
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
      vm[i] = int'($urandom_range(0, 8388000));
      vp[i] = int'($urandom_range(0, 52707178)) - 26353589;   // -pi..pi in 28.23
    end
    vp[0] = 26353589;  vp[1] = -26353589;  vp[2] = 0;  vp[3] = 13176795; vp[4] = -13176795;
    vm[10] = 3 * 8388608; vp[10] = 0;          // 3.0 at 0 rad: saturates
    vm[11] = 3 * 8388608; vp[11] = 26353589;   // 3.0 at pi: saturates negative
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_valid = 1; in_mag = 28'(vm[i]); in_phase = 28'(vp[i]); in_tag = 9'(i);
      sent_cycle[i] = cycle + 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (ITER + 10) @(negedge clk);
    checks++;
    if (got != NV || sats < 2) begin failures++; $display("FAIL got %0d results, %0d saturations", got, sats); end
    $display("max error %f LSB", maxe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
