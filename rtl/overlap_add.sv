// overlap_add: reconstruction stage. Reapplies the Hamming window to each
// time-domain frame from the inverse FFT and overlap-adds consecutive frames
// (50 % overlap) into the output sample stream.
//
// Frames arrive as N samples in order (in_idx = 0..N-1) in the 18.15
// reconstruction format. Each sample is multiplied by the same Hamming window
// used for analysis (a hamming_window instance). The first half of a windowed
// frame is added to the stored second half of the previous frame and emitted
// as N/2 finished output samples; the second half is stored for the next
// frame. Before the first frame of a recording the stored half counts as zero.
// Output samples are saturated to the 16.15 interface format.
//
// Timing: output sample k of a frame appears two clocks after input sample k
// (k < N/2); a frame therefore yields a burst of N/2 output samples.
// 'restart' starts a new recording. Zero history at the start and saturation
// are this implementation's choices.
module overlap_add
  import ss_pkg::*;
#(
  parameter int unsigned N     = FRAME_N,
  parameter int unsigned IN_W  = WIN_W,
  parameter int unsigned OUT_W = IO_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic                    in_valid,
  input  logic [$clog2(N)-1:0]    in_idx,
  input  logic signed [IN_W-1:0]  in_sample,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_sample,
  output logic                    out_sat
);

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned HW = IW - 1;

  logic                   w_valid;
  logic [IW-1:0]          w_idx;
  logic signed [IN_W-1:0] w_sample;
  logic [0:0]             w_tag_unused;

  hamming_window #(.N(N), .IN_W(IN_W), .OUT_W(IN_W), .TAG_W(1)) u_win (
    .clk, .rst_n,
    .in_valid (in_valid && !restart),
    .in_idx,
    .in_sample,
    .in_tag   (1'b0),
    .out_valid (w_valid),
    .out_idx   (w_idx),
    .out_sample(w_sample),
    .out_tag   (w_tag_unused)
  );

  logic signed [IN_W-1:0] tail [N/2];
  logic                   have_tail;
  logic signed [IN_W:0]   sum;
  logic                   ovf;

  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'(2 ** (OUT_W - 1) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(2 ** (OUT_W - 1));

  always_comb begin
    sum = (IN_W+1)'(w_sample);
    if (have_tail) sum = sum + (IN_W+1)'(tail[w_idx[HW-1:0]]);
    ovf = (sum > MAXV) || (sum < MINV);
  end

  always_ff @(posedge clk) begin
    if (w_valid && w_idx[HW]) tail[w_idx[HW-1:0]] <= w_sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_tail  <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      out_sat    <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sat   <= 1'b0;
      if (restart) begin
        have_tail <= 1'b0;
      end else if (w_valid) begin
        if (!w_idx[HW]) begin
          out_valid  <= 1'b1;
          out_sat    <= ovf;
          out_sample <= ovf ? (sum[IN_W] ? MINV[OUT_W-1:0] : MAXV[OUT_W-1:0]) : OUT_W'(sum);
        end else if (w_idx == IW'(N - 1)) begin
          have_tail <= 1'b1;
        end
      end
    end
  end

endmodule
