// cordic_arctan: pipelined CORDIC in vectoring mode; converts each FFT bin
// (re, im) to magnitude |Y| and phase arg(Y).
//
// A pre-rotation by +/- pi/2 moves the vector into the right half-plane;
// then ITER micro-rotations by atan(2^-i) drive the imaginary part to zero
// while the angle register collects the phase. The remaining real part is
// K |Y| (K ~ 1.6468, the CORDIC gain) and is multiplied by the constant 1/K.
// Internally the datapath keeps GUARD extra fractional bits.
//
// Formats: inputs 24.23; magnitude and phase 28.23 (phase in radians, range
// -pi..pi), the width the design uses for its spectral-subtraction blocks.
// Timing: fully pipelined, one bin per clock, latency ITER + 2 clocks; a TAG_W
// sideband (the bin index in this design) travels with each bin. The design
// names a CORDIC arctangent block; iteration count, guard bits and the
// pipelining are this implementation's choices.
module cordic_arctan
  import ss_pkg::*;
#(
  parameter int unsigned IN_W  = FFT_W,
  parameter int unsigned OUT_W = SS_W,
  parameter int unsigned FRAC  = FFT_FRAC,   // fractional bits, in and out
  parameter int unsigned ITER  = 24,
  parameter int unsigned GUARD = 2,
  parameter int unsigned TAG_W = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_mag,
  output logic signed [OUT_W-1:0] out_phase,
  output logic [TAG_W-1:0]        out_tag
);

  localparam int unsigned IF  = FRAC + GUARD;      // internal fractional bits
  localparam int unsigned XW  = OUT_W + GUARD + 1; // internal x/y/z width
  localparam int unsigned GF  = 24;                // fractional bits of 1/K
  localparam longint      HALF_PI = cordic_atan(0, IF) * 2;  // atan(1) = pi/4

  typedef logic signed [XW-1:0] w_t;

  w_t                 x [ITER+1];
  w_t                 y [ITER+1];
  w_t                 z [ITER+1];
  logic               v [ITER+1];
  logic [TAG_W-1:0]   t [ITER+1];

  // Stage 0: quadrant pre-rotation.
  w_t xi, yi;
  always_comb begin
    xi = w_t'(in_re) <<< GUARD;
    yi = w_t'(in_im) <<< GUARD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0;  y[0] <= '0;  z[0] <= '0;  v[0] <= 1'b0;  t[0] <= '0;
    end else begin
      v[0] <= in_valid;
      t[0] <= in_tag;
      if (xi >= 0) begin
        x[0] <= xi;   y[0] <= yi;   z[0] <= '0;
      end else if (yi >= 0) begin          // rotate by -pi/2
        x[0] <= yi;   y[0] <= -xi;  z[0] <= w_t'(HALF_PI);
      end else begin                       // rotate by +pi/2
        x[0] <= -yi;  y[0] <= xi;   z[0] <= -w_t'(HALF_PI);
      end
    end
  end

  for (genvar i = 0; i < int'(ITER); i++) begin : g_iter
    localparam w_t ATAN = w_t'(cordic_atan(i, IF));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0;  y[i+1] <= '0;  z[i+1] <= '0;  v[i+1] <= 1'b0;  t[i+1] <= '0;
      end else begin
        v[i+1] <= v[i];
        t[i+1] <= t[i];
        if (y[i] >= 0) begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN;
        end else begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN;
        end
      end
    end
  end

  // Gain correction and output formatting.
  localparam longint INV_K = cordic_inv_gain(ITER, GF);
  logic signed [XW+GF+1:0] mag_full;
  always_comb mag_full = x[ITER] * $signed({1'b0, GF'(INV_K)});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_phase <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= v[ITER];
      out_tag   <= t[ITER];
      out_mag   <= OUT_W'(mag_full >>> (GF + GUARD));
      out_phase <= OUT_W'(z[ITER] >>> GUARD);
    end
  end

endmodule
