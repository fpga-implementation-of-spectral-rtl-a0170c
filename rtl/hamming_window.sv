// hamming_window: multiplies a stream of frame samples by a stored Hamming
// window.
//
// The window table is the symmetric Hamming window
//   w[n] = 0.54 - 0.46 cos(2 pi n / (N - 1)),  n = 0..N-1,
// held as unsigned 1.16 numbers and computed at elaboration from that
// formula. Each input sample arrives with its position 'in_idx' within the
// frame; the sample (signed, SMP_FRAC fractional bits) is multiplied by
// w[in_idx] and truncated back to SMP_FRAC fractional bits. The same module
// serves the analysis window after framing (17.15 in, 18.15 out) and the
// window reapplied before overlap-add (18.15 in and out).
//
// Interface: one sample per in_valid; result, index and tag one clock later.
// Which window form (symmetric) and the 1.16 coefficient format are this
// implementation's choices; the design names only a predefined Hamming window.
module hamming_window
  import ss_pkg::*;
#(
  parameter int unsigned N      = FRAME_N,
  parameter int unsigned IN_W   = PRE_W,
  parameter int unsigned OUT_W  = WIN_W,
  parameter int unsigned TAG_W  = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(N)-1:0]     in_idx,
  input  logic signed [IN_W-1:0]   in_sample,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_idx,
  output logic signed [OUT_W-1:0]  out_sample,
  output logic [TAG_W-1:0]         out_tag
);

  typedef logic [WCOEF_W-1:0] coef_t;

  function automatic coef_t rom_entry(input int n);
    return coef_t'(hamming_coef(n, N));
  endfunction

  coef_t rom [N];
  initial begin
    for (int n = 0; n < N; n++) rom[n] = rom_entry(n);
  end

  logic signed [IN_W+WCOEF_W:0] prod;

  always_comb prod = in_sample * $signed({1'b0, rom[in_idx]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_idx    <= '0;
      out_sample <= '0;
      out_tag    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx    <= in_idx;
        out_sample <= OUT_W'(prod >>> WCOEF_FRAC);
        out_tag    <= in_tag;
      end
    end
  end

endmodule
