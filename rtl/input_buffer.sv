// input_buffer: frames one channel's sample stream into overlapping frames.
//
// Samples are written into a ring of 2*N_FFT words (one block RAM per
// channel). After the first N_FFT samples, and then after every further
// N_FFT/2 samples, the newest N_FFT samples form a frame: consecutive frames
// overlap by 50%. A ready frame raises `req` towards the arbiter; when `ack`
// arrives the frame is read out on `out_*`, one sample per clock, oldest
// first, with `out_last` on the final sample. Writing continues during the
// read-out; the ring is twice the frame length, so new samples never reach
// the frame being read as long as samples arrive no faster than one every two
// clocks.
//
// Overload: if a frame is still waiting for the engine when the next one
// becomes ready, the waiting frame is discarded, the newer one takes its
// place and `drops` counts it. The channel therefore loses whole frames
// under overload but never blocks. Frame length and overlap are the
// design's; the ring size, the drop policy and the read-out timing are this
// implementation's choices.
//
// Timing: the first sample appears on `out_*` two clocks after `ack`;
// `out_valid` then stays high for N_FFT consecutive clocks.
module input_buffer #(
  parameter int unsigned N_FFT    = psd_pkg::N_FFT,
  parameter int unsigned SAMPLE_W = psd_pkg::SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_sample,
  output logic                       req,
  input  logic                       ack,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_data,
  output logic                       out_last,
  output logic [15:0]                drops
);
  localparam int unsigned RW = $clog2(2 * N_FFT);  // ring address width
  localparam int unsigned FW = $clog2(N_FFT);      // frame index width

  logic signed [SAMPLE_W-1:0] ring [2 * N_FFT];

  logic [RW-1:0] wr_ptr, rd_ptr, pend_base, new_base;
  logic [FW:0]   since;      // samples since the last frame boundary
  logic          primed;     // first full frame has been collected
  logic          pending;
  logic          streaming;
  logic [FW-1:0] out_cnt;
  logic          frame_ready;

  assign frame_ready = in_valid && (primed ? (since == (FW+1)'(N_FFT/2 - 1))
                                           : (since == (FW+1)'(N_FFT - 1)));
  assign new_base    = wr_ptr + RW'(1) - RW'(N_FFT);
  assign req         = pending;

  always_ff @(posedge clk) begin
    if (in_valid) ring[wr_ptr] <= in_sample;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      since     <= '0;
      primed    <= 1'b0;
      pending   <= 1'b0;
      pend_base <= '0;
      streaming <= 1'b0;
      rd_ptr    <= '0;
      out_cnt   <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      drops     <= '0;
    end else begin
      // ---- write side ----
      if (in_valid) begin
        wr_ptr <= wr_ptr + RW'(1);
        since  <= frame_ready ? '0 : since + (FW+1)'(1);
        if (frame_ready) primed <= 1'b1;
      end

      // ---- frame bookkeeping ----
      if (frame_ready) begin
        if (pending && !ack) drops <= drops + 16'd1;
        pending   <= 1'b1;
        pend_base <= new_base;
      end else if (ack) begin
        pending <= 1'b0;
      end

      // ---- read-out ----
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (ack && pending) begin
        streaming <= 1'b1;
        rd_ptr    <= pend_base;
        out_cnt   <= '0;
      end else if (streaming) begin
        out_valid <= 1'b1;
        out_data  <= ring[rd_ptr];
        out_last  <= (out_cnt == FW'(N_FFT - 1));
        rd_ptr    <= rd_ptr + RW'(1);
        out_cnt   <= out_cnt + FW'(1);
        if (out_cnt == FW'(N_FFT - 1)) streaming <= 1'b0;
      end
    end
  end
endmodule
