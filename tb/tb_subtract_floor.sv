// tb_subtract_floor: random |Y| and |D| pairs (and hand-picked edge cases)
// against the rule X = Y - D if Y - D > D/2, else floor(D/2); X = 0 while no
// noise estimate is available. Checks the one-clock latency, the floored flag
// and that both branches of the rule were exercised.
module tb_subtract_floor;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready = 0;
  logic signed [27:0] in_mag = '0, in_noise = '0, out_mag;
  logic [3:0] in_tag = '0, out_tag;
  logic out_valid, out_floored;
  int checks = 0, failures = 0, n_floor = 0, n_keep = 0, n_zero = 0;

  subtract_floor #(.W(28), .BETA_SHIFT(1), .TAG_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint y, input longint d, input logic rdy);
    longint s, fl, ex;
    logic exf;
    @(negedge clk);
    in_valid = 1; in_mag = 28'(y); in_noise = 28'(d); in_ready = rdy; in_tag = 4'(y);
    @(negedge clk);
    in_valid = 0;
    s  = y - d;
    fl = d / 2;                     // d >= 0: floor
    if (!rdy)       begin ex = 0;  exf = 0; n_zero++; end
    else if (s > fl) begin ex = s; exf = 0; n_keep++; end
    else             begin ex = fl; exf = 1; n_floor++; end
    checks++;
    if (!out_valid || longint'(out_mag) != ex || out_floored != exf || out_tag != 4'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL y=%0d d=%0d rdy=%0b got %0d/%0b exp %0d/%0b", y, d, rdy, out_mag, out_floored, ex, exf);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(1000, 400, 1);   // S = 600 > 200: kept
    one(300, 200, 1);    // S = 100 = floor 100: floored (strict >)
    one(301, 200, 1);    // S = 101 > 100: kept
    one(0, 134217727, 1);// large negative S: floor
    one(134217727, 0, 1);
    one(5000, 10, 0);    // no estimate yet: zero
    for (int i = 0; i < 5000; i++)
      one($urandom_range(0, 134217727), $urandom_range(0, 134217727) >> $urandom_range(0, 8), $urandom_range(0, 7) != 0);
    checks++;
    if (n_floor == 0 || n_keep == 0 || n_zero == 0) begin failures++; $display("FAIL branch coverage"); end
    $display("kept %0d floored %0d zeroed %0d", n_keep, n_floor, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
