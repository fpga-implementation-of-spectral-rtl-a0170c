// noise_estimator: per-bin average magnitude of the first NFRAMES frames of a
// recording, the constant noise estimate |D(w)|.
//
// As in the design, a circular buffer of one accumulator per frequency bin and
// one adder: each incoming bin magnitude is added to the value accumulated for
// that bin so far (the first frame overwrites instead, so the buffer needs no
// clearing). The bin pointer advances with every input and wraps after N bins,
// which also counts frames. After NFRAMES frames the estimate is frozen; its
// value is the accumulated sum shifted right by log2(NFRAMES) (three bits for
// eight frames). 'noise_ready' is low while the estimate is still being built.
//
// Timing: one bin per clock. For each input the module outputs, one clock
// later, the same magnitude (out_mag), the noise estimate for that bin
// (out_noise, meaningful when out_ready), whether the estimate was complete
// when this bin arrived (out_ready) and the tag. 'restart' begins a new
// recording and a new estimate. The accumulator width (SS_W + log2 NFRAMES,
// no overflow possible) is this implementation's choice.
module noise_estimator
  import ss_pkg::*;
#(
  parameter int unsigned N       = FRAME_N,
  parameter int unsigned W       = SS_W,
  parameter int unsigned NFRAMES = NOISE_FRAMES,
  parameter int unsigned TAG_W   = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_mag,
  input  logic [TAG_W-1:0]      in_tag,
  output logic                  out_valid,
  output logic signed [W-1:0]   out_mag,
  output logic signed [W-1:0]   out_noise,
  output logic                  out_ready,
  output logic [TAG_W-1:0]      out_tag,
  output logic                  noise_ready
);

  localparam int unsigned SH = $clog2(NFRAMES);
  localparam int unsigned AW = W + SH;
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned FW = $clog2(NFRAMES + 1);

  logic signed [AW-1:0] acc [N];
  logic [PW-1:0]        ptr;
  logic [FW-1:0]        frames;
  logic signed [AW-1:0] acc_rd;

  initial assert (NFRAMES == (1 << SH)) else $error("NFRAMES must be a power of two");

  assign noise_ready = (frames == FW'(NFRAMES));
  assign acc_rd      = acc[ptr];

  always_ff @(posedge clk) begin
    if (in_valid && !restart && !noise_ready) begin
      if (frames == '0) acc[ptr] <= AW'(in_mag);
      else              acc[ptr] <= acc_rd + AW'(in_mag);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      frames    <= '0;
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_noise <= '0;
      out_ready <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && !restart;
      if (restart) begin
        ptr    <= '0;
        frames <= '0;
      end else if (in_valid) begin
        ptr       <= ptr + 1'b1;
        if (ptr == PW'(N - 1) && !noise_ready) frames <= frames + 1'b1;
        out_mag   <= in_mag;
        out_noise <= W'(acc_rd >>> SH);
        out_ready <= noise_ready;
        out_tag   <= in_tag;
      end
    end
  end

endmodule
