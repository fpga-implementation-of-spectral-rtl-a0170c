// preemphasis: first-order high-pass pre-emphasis filter
//   y[n] = x[n] - 0.97 * x[n-1]
//
// Built, as the design describes, from one delay register, one constant
// multiplication and one sum. The input is a 16.15 sample; because the output
// can reach almost twice the input magnitude, it is one integer bit wider
// (17.15). The coefficient is held as a signed 1.15 constant (0.97 ->
// 31785); the product is truncated toward minus infinity to 15 fractional
// bits. Both of these roundings are this implementation's choice.
//
// Interface: in_valid qualifies in_sample (one sample per strobe, e.g. at
// 16 kHz). out_sample/out_valid follow one clock later. The delay register
// is cleared by reset and by 'restart', so a new recording starts from
// x[-1] = 0.
module preemphasis
  import ss_pkg::*;
#(
  parameter int unsigned IN_W  = IO_W,
  parameter int unsigned OUT_W = PRE_W,
  parameter int          COEF  = 31785   // 0.97 in signed 1.15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sample
);

  logic signed [IN_W-1:0]    x_prev;
  logic signed [IN_W+16:0]   prod;     // x_prev * COEF, 30 fractional bits
  logic signed [OUT_W-1:0]   scaled;   // prod back to 15 fractional bits
  logic signed [OUT_W-1:0]   diff;

  always_comb begin
    prod   = x_prev * $signed(17'(COEF));
    scaled = OUT_W'(prod >>> 15);
    diff   = OUT_W'(in_sample) - scaled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev     <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid && !restart;
      if (restart) begin
        x_prev <= '0;
      end else if (in_valid) begin
        x_prev     <= in_sample;
        out_sample <= diff;
      end
    end
  end

endmodule
