// spectral_subtraction_top: single-microphone magnitude spectral subtraction
// speech enhancer (gamma = 1, beta = 0.5, noise estimate from the first eight
// frames of each recording).
//
// Sample path (one 16.15 sample per in_valid, e.g. 16 kHz):
//   preemphasis -> framer (512-sample frames, 50 % overlap) -> hamming_window
//   -> fft_ifft (forward) -> cordic_arctan (|Y|, phase)
//   -> noise_estimator (|D|) -> subtract_floor (|X|) -> polar_to_cartesian
//   -> spectrum buffer -> fft_ifft (inverse) -> overlap_add -> out_sample.
// The one FFT engine performs both transforms. With gamma = 1 the power and
// inverse-power steps of the general algorithm are identities and have no
// hardware.
//
// A sequencer runs one frame at a time: LOAD_F (framed, windowed samples into
// the FFT), RUN_F (forward FFT), PROC (stream the 512 bins through the
// magnitude/phase, noise, subtraction and recombination pipeline into the
// spectrum buffer; the phase rides along as a sideband), LOAD_I, RUN_I
// (inverse FFT), UNLOAD_I (time samples into overlap-add). A frame takes about
// 6.9 k clocks, so any clock above ~0.5 MHz keeps up with 16 kHz input
// (a frame every 256 samples = 16 ms).
//
// Scaling between formats: the 18.15 windowed sample enters the 24.23 FFT
// shifted left by 6 bits (value / 4, so that |x| < 1); the forward FFT scales
// by 1/N. The inverse output is shifted back (bits [23:6] as 18.15, value * 4).
// Spectral subtraction is homogeneous in the magnitude, so these scalings do
// not change the result.
//
// Outputs: out_valid/out_sample carry the enhanced 16.15 signal, in bursts of
// 256 samples per frame. During the first eight frames of a recording the
// spectrum is forced to zero. Status: busy, noise_ready, frame_overrun (a
// frame was dropped because the previous one was still waiting),
// fft_overflow (saturation in the last FFT run), bin_floored (the noise floor
// replaced a bin), spec_sat (a recombined bin was clipped to the FFT input
// range), out_sat (an output sample was clipped), frame_done.
// restart begins a new recording (new noise estimate, empty history).
//
// The chain of blocks, the frame size and overlap, gamma = 1, beta = 0.5,
// the eight-frame noise estimate and the number formats follow the published
// design; the sequencer, the spectrum buffer, the phase sideband and the
// scaling conversions around the FFT are this implementation's own.
module spectral_subtraction_top
  import ss_pkg::*;
#(
  parameter int unsigned N       = FRAME_N,
  parameter int unsigned NFRAMES = NOISE_FRAMES,
  parameter int unsigned ITER    = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic                   in_valid,
  input  logic signed [IO_W-1:0] in_sample,
  output logic                   out_valid,
  output logic signed [IO_W-1:0] out_sample,
  output logic                   busy,
  output logic                   noise_ready,
  output logic                   frame_overrun,
  output logic                   fft_overflow,
  output logic                   bin_floored,
  output logic                   spec_sat,
  output logic                   out_sat,
  output logic                   frame_done
);

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned FFT_IN_SHIFT = FFT_W - WIN_W;   // 6

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD_F, S_RUN_F, S_PROC, S_LOAD_I, S_RUN_I, S_UNLOAD_I
  } state_t;

  state_t state;

  // ---------------------------------------------------------------- front end
  logic                     pre_valid;
  logic signed [PRE_W-1:0]  pre_sample;

  preemphasis u_pre (
    .clk, .rst_n, .restart,
    .in_valid, .in_sample,
    .out_valid (pre_valid),
    .out_sample(pre_sample)
  );

  logic                     fr_req, fr_pending, fr_valid, fr_last;
  logic [IW-1:0]            fr_idx;
  logic signed [PRE_W-1:0]  fr_sample;

  framer #(.N(N), .W(PRE_W)) u_framer (
    .clk, .rst_n, .restart,
    .in_valid     (pre_valid),
    .in_sample    (pre_sample),
    .frame_req    (fr_req),
    .frame_pending(fr_pending),
    .out_valid    (fr_valid),
    .out_idx      (fr_idx),
    .out_sample   (fr_sample),
    .out_last     (fr_last),
    .overrun      (frame_overrun)
  );

  logic                     win_valid;
  logic [IW-1:0]            win_idx;
  logic signed [WIN_W-1:0]  win_sample;
  logic                     win_last;

  hamming_window #(.N(N), .IN_W(PRE_W), .OUT_W(WIN_W), .TAG_W(1)) u_win (
    .clk, .rst_n,
    .in_valid  (fr_valid),
    .in_idx    (fr_idx),
    .in_sample (fr_sample),
    .in_tag    (fr_last),
    .out_valid (win_valid),
    .out_idx   (win_idx),
    .out_sample(win_sample),
    .out_tag   (win_last)
  );

  // ---------------------------------------------------------------- FFT/IFFT
  logic                     fft_load_valid, fft_start, fft_inverse;
  logic [IW-1:0]            fft_load_addr;
  logic signed [FFT_W-1:0]  fft_load_re, fft_load_im;
  logic                     fft_busy, fft_done;
  logic                     fft_rd_en, fft_rd_valid;
  logic [IW-1:0]            fft_rd_addr, fft_rd_idx;
  logic signed [FFT_W-1:0]  fft_rd_re, fft_rd_im;

  fft_ifft #(.N(N), .W(FFT_W)) u_fft (
    .clk, .rst_n,
    .load_valid(fft_load_valid),
    .load_addr (fft_load_addr),
    .load_re   (fft_load_re),
    .load_im   (fft_load_im),
    .start     (fft_start),
    .inverse   (fft_inverse),
    .busy      (fft_busy),
    .done      (fft_done),
    .overflow  (fft_overflow),
    .rd_en     (fft_rd_en),
    .rd_addr   (fft_rd_addr),
    .rd_valid  (fft_rd_valid),
    .rd_idx    (fft_rd_idx),
    .rd_re     (fft_rd_re),
    .rd_im     (fft_rd_im)
  );

  // -------------------------------------------------------- spectral pipeline
  logic                     proc_in_valid;
  logic                     ca_valid;
  logic signed [SS_W-1:0]   ca_mag, ca_phase;
  logic [IW-1:0]            ca_bin;

  assign proc_in_valid = fft_rd_valid && (state == S_PROC);

  cordic_arctan #(.IN_W(FFT_W), .OUT_W(SS_W), .FRAC(FFT_FRAC), .ITER(ITER), .TAG_W(IW)) u_polar (
    .clk, .rst_n,
    .in_valid (proc_in_valid),
    .in_re    (fft_rd_re),
    .in_im    (fft_rd_im),
    .in_tag   (fft_rd_idx),
    .out_valid(ca_valid),
    .out_mag  (ca_mag),
    .out_phase(ca_phase),
    .out_tag  (ca_bin)
  );

  typedef struct packed {
    logic signed [SS_W-1:0] phase;
    logic [IW-1:0]          bin;
  } bin_tag_t;

  bin_tag_t                 ne_tag;
  logic                     ne_valid, ne_ready;
  logic signed [SS_W-1:0]   ne_mag, ne_noise;

  noise_estimator #(.N(N), .W(SS_W), .NFRAMES(NFRAMES), .TAG_W($bits(bin_tag_t))) u_noise (
    .clk, .rst_n, .restart,
    .in_valid   (ca_valid),
    .in_mag     (ca_mag),
    .in_tag     (bin_tag_t'{phase: ca_phase, bin: ca_bin}),
    .out_valid  (ne_valid),
    .out_mag    (ne_mag),
    .out_noise  (ne_noise),
    .out_ready  (ne_ready),
    .out_tag    (ne_tag),
    .noise_ready(noise_ready)
  );

  bin_tag_t                 sf_tag;
  logic                     sf_valid, sf_floored;
  logic signed [SS_W-1:0]   sf_mag;

  subtract_floor #(.W(SS_W), .BETA_SHIFT(1), .TAG_W($bits(bin_tag_t))) u_sub (
    .clk, .rst_n,
    .in_valid   (ne_valid),
    .in_mag     (ne_mag),
    .in_noise   (ne_noise),
    .in_ready   (ne_ready),
    .in_tag     (ne_tag),
    .out_valid  (sf_valid),
    .out_mag    (sf_mag),
    .out_floored(sf_floored),
    .out_tag    (sf_tag)
  );

  assign bin_floored = sf_valid && sf_floored;

  logic                     pc_valid;
  logic signed [FFT_W-1:0]  pc_re, pc_im;
  logic [IW-1:0]            pc_bin;

  polar_to_cartesian #(.IN_W(SS_W), .OUT_W(FFT_W), .FRAC(SS_FRAC), .ITER(ITER), .TAG_W(IW)) u_cart (
    .clk, .rst_n,
    .in_valid (sf_valid),
    .in_mag   (sf_mag),
    .in_phase (sf_tag.phase),
    .in_tag   (sf_tag.bin),
    .out_valid(pc_valid),
    .out_re   (pc_re),
    .out_im   (pc_im),
    .out_tag  (pc_bin),
    .out_sat  (spec_sat)
  );

  // Spectrum buffer: collects the recombined bins while the FFT memory is
  // being read, then feeds the inverse transform.
  logic signed [2*FFT_W-1:0] spec_buf [N];
  logic                      sb_rd_valid;
  logic [IW-1:0]             sb_rd_idx;
  logic signed [2*FFT_W-1:0] sb_rd_data;

  always_ff @(posedge clk) begin
    if (pc_valid) spec_buf[pc_bin] <= {pc_re, pc_im};
  end

  // -------------------------------------------------------------- back end
  logic                     ola_in_valid;
  assign ola_in_valid = fft_rd_valid && (state == S_UNLOAD_I);

  overlap_add #(.N(N), .IN_W(WIN_W), .OUT_W(IO_W)) u_ola (
    .clk, .rst_n, .restart,
    .in_valid  (ola_in_valid),
    .in_idx    (fft_rd_idx),
    .in_sample (fft_rd_re[FFT_W-1:FFT_IN_SHIFT]),
    .out_valid,
    .out_sample,
    .out_sat
  );

  // -------------------------------------------------------------- sequencer
  logic [IW-1:0] cnt;        // read address counter
  logic          issuing;    // counter still issuing reads

  assign busy   = (state != S_IDLE);
  assign fr_req = (state == S_IDLE) && !fft_busy && !restart;

  always_comb begin
    fft_load_valid = 1'b0;
    fft_load_addr  = '0;
    fft_load_re    = '0;
    fft_load_im    = '0;
    fft_start      = 1'b0;
    fft_inverse    = 1'b0;
    unique case (state)
      S_LOAD_F: begin
        fft_load_valid = win_valid;
        fft_load_addr  = win_idx;
        fft_load_re    = FFT_W'(win_sample) <<< FFT_IN_SHIFT;
        fft_start      = win_valid && win_last;
      end
      S_LOAD_I: begin
        fft_load_valid = sb_rd_valid;
        fft_load_addr  = sb_rd_idx;
        fft_load_re    = sb_rd_data[2*FFT_W-1:FFT_W];
        fft_load_im    = sb_rd_data[FFT_W-1:0];
        fft_start      = sb_rd_valid && (sb_rd_idx == IW'(N - 1));
        fft_inverse    = 1'b1;
      end
      default: ;
    endcase
    fft_rd_en   = issuing && (state == S_PROC || state == S_UNLOAD_I);
    fft_rd_addr = cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      issuing     <= 1'b0;
      sb_rd_valid <= 1'b0;
      sb_rd_idx   <= '0;
      sb_rd_data  <= '0;
      frame_done  <= 1'b0;
    end else begin
      frame_done  <= 1'b0;
      sb_rd_valid <= 1'b0;
      if (issuing) begin
        cnt <= cnt + 1'b1;
        if (cnt == IW'(N - 1)) issuing <= 1'b0;
      end
      if (restart) begin
        state   <= S_IDLE;
        issuing <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE:
            if (fr_pending && fr_req) state <= S_LOAD_F;
          S_LOAD_F:
            if (fft_start) state <= S_RUN_F;
          S_RUN_F:
            if (fft_done) begin
              state   <= S_PROC;
              cnt     <= '0;
              issuing <= 1'b1;
            end
          S_PROC:
            if (pc_valid && pc_bin == IW'(N - 1)) begin
              state   <= S_LOAD_I;
              cnt     <= '0;
              issuing <= 1'b1;
            end
          S_LOAD_I: begin
            if (issuing) begin
              sb_rd_valid <= 1'b1;
              sb_rd_idx   <= cnt;
              sb_rd_data  <= spec_buf[cnt];
            end
            if (fft_start) state <= S_RUN_I;
          end
          S_RUN_I:
            if (fft_done) begin
              state   <= S_UNLOAD_I;
              cnt     <= '0;
              issuing <= 1'b1;
            end
          S_UNLOAD_I:
            if (fft_rd_valid && fft_rd_idx == IW'(N - 1)) begin
              state      <= S_IDLE;
              frame_done <= 1'b1;
            end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The FFT engine must be idle whenever the sequencer loads it.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOAD_F || state == S_LOAD_I) |-> !fft_busy);

endmodule
