// fft_ifft: shared N-point complex FFT / inverse FFT engine.
//
// One engine performs both transforms: the forward FFT of each windowed frame
// and, after spectral subtraction, the inverse FFT of the enhanced spectrum.
// It is an in-place radix-2 decimation-in-time engine over a dual array
// (real and imaginary parts, FFT_W = 24 bits, 24.23 format). Loading writes
// sample 'load_addr' to the bit-reversed address, so after log2(N) passes of
// N/2 butterflies (one butterfly per clock) the result is in natural order.
//
// Scaling: the forward transform halves after every pass, giving X[k]/N and
// never growing; the inverse transform does not scale, so IFFT(FFT(x)/N) = x.
// Additions saturate to the 24-bit range; any saturation during a run sets
// 'overflow' until the next start. Twiddles are cos/sin(2 pi k / N) as signed
// 2.22 numbers computed at elaboration; products are truncated.
//
// Interface and timing:
//   load:  load_valid/load_addr/load_re/load_im, one point per clock, engine idle.
//   run:   pulse 'start' with 'inverse' set for the IFFT; 'busy' is high for
//          log2(N) * N/2 clocks (2304 for N = 512), then 'done' pulses.
//   read:  rd_en/rd_addr, data on rd_re/rd_im with rd_valid/rd_idx one clock later.
// The transform size and the 24-bit width are the design's; the radix-2
// architecture, scaling schedule and saturation are this implementation's own.
module fft_ifft
  import ss_pkg::*;
#(
  parameter int unsigned N = FRAME_N,
  parameter int unsigned W = FFT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load_valid,
  input  logic [$clog2(N)-1:0]  load_addr,
  input  logic signed [W-1:0]   load_re,
  input  logic signed [W-1:0]   load_im,
  input  logic                  start,
  input  logic                  inverse,
  output logic                  busy,
  output logic                  done,
  output logic                  overflow,
  input  logic                  rd_en,
  input  logic [$clog2(N)-1:0]  rd_addr,
  output logic                  rd_valid,
  output logic [$clog2(N)-1:0]  rd_idx,
  output logic signed [W-1:0]   rd_re,
  output logic signed [W-1:0]   rd_im
);

  localparam int unsigned LOG = $clog2(N);
  localparam int unsigned PW  = W + TW_W + 1;   // product width
  localparam int unsigned SW  = W + 3;          // sum width

  typedef logic signed [W-1:0]    data_t;
  typedef logic signed [TW_W-1:0] tw_t;

  data_t mem_re [N];
  data_t mem_im [N];

  tw_t tw_cos [N/2];
  tw_t tw_sin [N/2];
  initial begin
    for (int k = 0; k < int'(N / 2); k++) begin
      tw_cos[k] = tw_t'(twiddle_cos(k, N));
      tw_sin[k] = tw_t'(twiddle_sin(k, N));
    end
  end

  function automatic logic [LOG-1:0] bitrev(input logic [LOG-1:0] a);
    for (int i = 0; i < int'(LOG); i++) bitrev[i] = a[LOG-1-i];
  endfunction

  function automatic data_t sat(input logic signed [SW-1:0] v);
    if (v > SW'(2 ** (W - 1) - 1))      return {1'b0, {(W-1){1'b1}}};
    else if (v < -SW'(2 ** (W - 1)))    return {1'b1, {(W-1){1'b0}}};
    else                                return W'(v);
  endfunction

  function automatic logic overflows(input logic signed [SW-1:0] v);
    return (v > SW'(2 ** (W - 1) - 1)) || (v < -SW'(2 ** (W - 1)));
  endfunction

  // Run state
  logic                  inv_q;
  logic [$clog2(LOG)-1:0] stage;
  logic [LOG-2:0]        bfly;

  // Butterfly addressing
  logic [LOG-1:0] top_a, bot_a;
  logic [LOG-2:0] tw_k;
  always_comb begin
    logic [LOG-1:0] j_ext, half, grp;
    j_ext = LOG'(bfly);
    half  = LOG'(1) << stage;
    grp   = (j_ext >> stage) << (stage + 1);
    top_a = grp | (j_ext & (half - 1'b1));
    bot_a = top_a | half;
    tw_k  = (LOG-1)'((j_ext & (half - 1'b1)) << (($clog2(LOG))'(LOG - 1) - stage));
  end

  // Complex butterfly. Forward: t = b * (c - j s); inverse: t = b * (c + j s).
  data_t ar, ai, br, bi;
  tw_t   c, s;
  logic signed [PW-1:0] p_rc, p_is, p_ic, p_rs;
  logic signed [SW-1:0] tr, ti, sum_r, sum_i, dif_r, dif_i;
  data_t nar, nai, nbr, nbi;
  logic  ovf_now;
  always_comb begin
    ar = mem_re[top_a];  ai = mem_im[top_a];
    br = mem_re[bot_a];  bi = mem_im[bot_a];
    c  = tw_cos[tw_k];   s  = tw_sin[tw_k];
    p_rc = br * c;  p_is = bi * s;
    p_ic = bi * c;  p_rs = br * s;
    if (!inv_q) begin
      tr = SW'((p_rc + p_is) >>> TW_FRAC);
      ti = SW'((p_ic - p_rs) >>> TW_FRAC);
    end else begin
      tr = SW'((p_rc - p_is) >>> TW_FRAC);
      ti = SW'((p_ic + p_rs) >>> TW_FRAC);
    end
    sum_r = SW'(ar) + tr;  sum_i = SW'(ai) + ti;
    dif_r = SW'(ar) - tr;  dif_i = SW'(ai) - ti;
    if (!inv_q) begin
      sum_r = sum_r >>> 1;  sum_i = sum_i >>> 1;
      dif_r = dif_r >>> 1;  dif_i = dif_i >>> 1;
    end
    nar = sat(sum_r);  nai = sat(sum_i);
    nbr = sat(dif_r);  nbi = sat(dif_i);
    ovf_now = overflows(sum_r) || overflows(sum_i) || overflows(dif_r) || overflows(dif_i);
  end

  wire last_bfly = (bfly == {(LOG-1){1'b1}});
  wire last_pass = (stage == ($clog2(LOG))'(LOG - 1));

  always_ff @(posedge clk) begin
    if (busy) begin
      mem_re[top_a] <= nar;  mem_im[top_a] <= nai;
      mem_re[bot_a] <= nbr;  mem_im[bot_a] <= nbi;
    end else if (load_valid) begin
      mem_re[bitrev(load_addr)] <= load_re;
      mem_im[bitrev(load_addr)] <= load_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      overflow <= 1'b0;
      inv_q    <= 1'b0;
      stage    <= '0;
      bfly     <= '0;
      rd_valid <= 1'b0;
      rd_idx   <= '0;
      rd_re    <= '0;
      rd_im    <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= rd_en && !busy;
      if (rd_en && !busy) begin
        rd_idx <= rd_addr;
        rd_re  <= mem_re[rd_addr];
        rd_im  <= mem_im[rd_addr];
      end
      if (!busy && start) begin
        busy     <= 1'b1;
        inv_q    <= inverse;
        stage    <= '0;
        bfly     <= '0;
        overflow <= 1'b0;
      end else if (busy) begin
        if (ovf_now) overflow <= 1'b1;
        bfly <= bfly + 1'b1;
        if (last_bfly) begin
          if (last_pass) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
          end
        end
      end
    end
  end

endmodule
