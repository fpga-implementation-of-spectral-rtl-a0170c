// polar_to_cartesian: recombines the enhanced magnitude with the retained
// phase and converts it to real and imaginary parts for the inverse FFT.
//
// As in the design, a CORDIC sine-cosine unit followed by two multipliers:
// the CORDIC runs in rotation mode from the vector (1/K, 0), so after ITER
// micro-rotations it holds (cos phi, sin phi) with unit gain; a quadrant
// pre-rotation by +/- pi/2 extends the range to -pi..pi. The two multipliers
// then form re = |X| cos phi and im = |X| sin phi, which are truncated and
// saturated from the 28.23 spectral-subtraction format to the 24.23 FFT input
// format.
//
// Timing: fully pipelined, one bin per clock, latency ITER + 2 clocks; a TAG_W
// sideband (the bin index here) travels with each bin. Iteration count, guard
// bits, pipelining and saturation are this implementation's choices.
module polar_to_cartesian
  import ss_pkg::*;
#(
  parameter int unsigned IN_W  = SS_W,
  parameter int unsigned OUT_W = FFT_W,
  parameter int unsigned FRAC  = SS_FRAC,   // fractional bits, in and out
  parameter int unsigned ITER  = 24,
  parameter int unsigned GUARD = 2,
  parameter int unsigned TAG_W = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_mag,
  input  logic signed [IN_W-1:0]  in_phase,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [TAG_W-1:0]        out_tag,
  output logic                    out_sat    // re or im was clipped
);

  localparam int unsigned IF  = FRAC + GUARD;
  localparam int unsigned XW  = IN_W + GUARD + 1;
  localparam longint      HALF_PI = cordic_atan(0, IF) * 2;
  localparam longint      INV_K   = cordic_inv_gain(ITER, IF);

  typedef logic signed [XW-1:0]   w_t;
  typedef logic signed [IN_W-1:0] m_t;

  w_t               x [ITER+1];
  w_t               y [ITER+1];
  w_t               z [ITER+1];
  m_t               m [ITER+1];
  logic             v [ITER+1];
  logic [TAG_W-1:0] t [ITER+1];

  w_t zi;
  always_comb zi = w_t'(in_phase) <<< GUARD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0;  y[0] <= '0;  z[0] <= '0;  m[0] <= '0;  v[0] <= 1'b0;  t[0] <= '0;
    end else begin
      v[0] <= in_valid;
      t[0] <= in_tag;
      m[0] <= in_mag;
      if (zi > w_t'(HALF_PI)) begin
        x[0] <= '0;  y[0] <= w_t'(INV_K);   z[0] <= zi - w_t'(HALF_PI);
      end else if (zi < -w_t'(HALF_PI)) begin
        x[0] <= '0;  y[0] <= -w_t'(INV_K);  z[0] <= zi + w_t'(HALF_PI);
      end else begin
        x[0] <= w_t'(INV_K);  y[0] <= '0;   z[0] <= zi;
      end
    end
  end

  for (genvar i = 0; i < int'(ITER); i++) begin : g_iter
    localparam w_t ATAN = w_t'(cordic_atan(i, IF));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0;  y[i+1] <= '0;  z[i+1] <= '0;  m[i+1] <= '0;  v[i+1] <= 1'b0;  t[i+1] <= '0;
      end else begin
        v[i+1] <= v[i];
        t[i+1] <= t[i];
        m[i+1] <= m[i];
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN;
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN;
        end
      end
    end
  end

  // The two multipliers: magnitude times cosine and sine.
  localparam int unsigned PW = IN_W + XW;
  logic signed [PW-1:0] pr, pi_;
  logic signed [PW-1:0] re_s, im_s;
  logic                 re_ovf, im_ovf;
  localparam logic signed [PW-1:0] MAXV = PW'(2 ** (OUT_W - 1) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(2 ** (OUT_W - 1));
  always_comb begin
    pr   = m[ITER] * x[ITER];
    pi_  = m[ITER] * y[ITER];
    re_s = pr  >>> IF;
    im_s = pi_ >>> IF;
    re_ovf = (re_s > MAXV) || (re_s < MINV);
    im_ovf = (im_s > MAXV) || (im_s < MINV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_tag   <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= v[ITER];
      out_tag   <= t[ITER];
      out_sat   <= v[ITER] && (re_ovf || im_ovf);
      out_re    <= re_ovf ? (re_s[PW-1] ? MINV[OUT_W-1:0] : MAXV[OUT_W-1:0]) : OUT_W'(re_s);
      out_im    <= im_ovf ? (im_s[PW-1] ? MINV[OUT_W-1:0] : MAXV[OUT_W-1:0]) : OUT_W'(im_s);
    end
  end

endmodule
