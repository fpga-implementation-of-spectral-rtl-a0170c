// framer: cuts the sample stream into overlapping frames.
//
// Incoming samples are written into a circular buffer of 2*N entries. After
// the first N samples, and then after every further N/2 samples (50 %
// overlap), a frame of the latest N samples becomes pending. When the
// downstream sequencer raises frame_req while a frame is pending, the frame
// is read out oldest sample first, one sample per clock, with its position
// out_idx = 0..N-1 and out_last on the final sample.
//
// The buffer is twice the frame length so that the N/2 samples that arrive
// while a frame waits or is being read never overwrite it. If another hop
// completes while a frame is still pending, the older frame is dropped and
// 'overrun' pulses for one clock; the newest frame is then the pending one.
// The 2*N buffer depth and the overrun policy are this implementation's
// choices; the design specifies a buffer, 512-sample frames and 50 % overlap.
//
// 'restart' forgets all buffered samples (a new recording begins).
module framer
  import ss_pkg::*;
#(
  parameter int unsigned N   = FRAME_N,
  parameter int unsigned W   = PRE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_sample,
  input  logic                  frame_req,
  output logic                  frame_pending,
  output logic                  out_valid,
  output logic [$clog2(N)-1:0]  out_idx,
  output logic signed [W-1:0]   out_sample,
  output logic                  out_last,
  output logic                  overrun
);

  localparam int unsigned AW = $clog2(N) + 1;   // buffer address, 2N entries
  localparam int unsigned IW = $clog2(N);

  logic signed [W-1:0] buf_q [2*N];

  logic [AW-1:0] wr_ptr;        // next write position
  logic [IW-1:0] hop_cnt;       // samples since the last frame became pending
  logic          primed;        // at least N samples received
  logic [AW-1:0] pend_start;    // first sample of the pending frame
  logic          reading;
  logic [AW-1:0] rd_ptr;
  logic [IW-1:0] rd_idx;
  logic          hop_done;
  logic          start_rd;

  assign start_rd = !reading && frame_pending && frame_req;

  always_comb begin
    hop_done = 1'b0;
    if (in_valid) begin
      if (!primed) hop_done = (hop_cnt == IW'(N - 1));
      else         hop_done = (hop_cnt == IW'(N / 2 - 1));
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) buf_q[wr_ptr] <= in_sample;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr        <= '0;
      hop_cnt       <= '0;
      primed        <= 1'b0;
      pend_start    <= '0;
      frame_pending <= 1'b0;
      reading       <= 1'b0;
      rd_ptr        <= '0;
      rd_idx        <= '0;
      out_valid     <= 1'b0;
      out_idx       <= '0;
      out_sample    <= '0;
      out_last      <= 1'b0;
      overrun       <= 1'b0;
    end else begin
      overrun   <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (restart) begin
        wr_ptr        <= '0;
        hop_cnt       <= '0;
        primed        <= 1'b0;
        frame_pending <= 1'b0;
        reading       <= 1'b0;
      end else begin
        if (in_valid) begin
          wr_ptr <= wr_ptr + 1'b1;
          if (hop_done) begin
            hop_cnt    <= '0;
            primed     <= 1'b1;
            // The frame is the N samples ending with this one.
            pend_start <= wr_ptr + 1'b1 - AW'(N);
          end else begin
            hop_cnt <= hop_cnt + 1'b1;
          end
        end

        // Pending flag: set by a finished hop, cleared when readout starts.
        // A hop that finds an older frame still waiting drops that frame.
        if (hop_done)       frame_pending <= 1'b1;
        else if (start_rd)  frame_pending <= 1'b0;
        if (hop_done && frame_pending && !start_rd) overrun <= 1'b1;

        if (start_rd) begin
          reading <= 1'b1;
          rd_ptr  <= pend_start;
          rd_idx  <= '0;
        end else if (reading) begin
          out_valid  <= 1'b1;
          out_idx    <= rd_idx;
          out_sample <= buf_q[rd_ptr];
          out_last   <= (rd_idx == IW'(N - 1));
          rd_ptr     <= rd_ptr + 1'b1;
          rd_idx     <= rd_idx + 1'b1;
          if (rd_idx == IW'(N - 1)) reading <= 1'b0;
        end
      end
    end
  end

endmodule
