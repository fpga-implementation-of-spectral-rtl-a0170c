// subtract_floor: the spectral subtraction rule with a noise floor,
//   S = |Y| - |D|,   X = S if S > beta |D|, otherwise beta |D|,
// with beta = 2^-BETA_SHIFT (0.5 in the design, so the noise floor is the
// noise estimate shifted right by one bit: pure wiring). While no noise
// estimate exists yet (in_ready low, i.e. during the first frames of a
// recording) the output magnitude is forced to zero.
//
// All values are 28.23; S is formed one bit wider so the difference cannot
// wrap. Timing: one bin per clock, result one clock later. 'out_floored'
// reports that the floor replaced S for this bin; it and the one-clock
// register stage are this implementation's additions.
module subtract_floor
  import ss_pkg::*;
#(
  parameter int unsigned W          = SS_W,
  parameter int unsigned BETA_SHIFT = 1,
  parameter int unsigned TAG_W      = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_mag,     // |Y|
  input  logic signed [W-1:0]  in_noise,   // |D|
  input  logic                 in_ready,   // noise estimate available
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_mag,    // |X|
  output logic                 out_floored,
  output logic [TAG_W-1:0]     out_tag
);

  logic signed [W:0] s, floor_v;
  logic              keep;

  always_comb begin
    s       = (W+1)'(in_mag) - (W+1)'(in_noise);
    floor_v = (W+1)'(in_noise) >>> BETA_SHIFT;
    keep    = (s > floor_v);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_mag     <= '0;
      out_floored <= 1'b0;
      out_tag     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        if (!in_ready) begin
          out_mag     <= '0;
          out_floored <= 1'b0;
        end else begin
          out_mag     <= keep ? W'(s) : W'(floor_v);
          out_floored <= !keep;
        end
      end
    end
  end

endmodule
