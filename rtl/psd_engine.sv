// psd_engine: the shared main engine that turns a frame of samples into a
// power spectrum.
//
// A frame from the input handler passes through the window handler into the
// FFT; the FFT's bins go through the normalization stage (|X|^2, lower half
// of the spectrum). One housekeeper per channel counts the spectra of its
// channel; when a transform starts to unload, the housekeeper of the frame's
// channel decides whether this spectrum completes the current average, and
// that decision travels with the spectrum as `out_avg_last`. Window, FFT,
// normalization and per-channel housekeepers are the blocks of the design's
// main engine; their exact wiring is this implementation's.
//
// Interface: `ready` (the FFT is idle) goes to the arbiter; the frame comes
// in as N_FFT beats with `in_last` on the final one. The spectrum leaves as
// N_FFT/2 beats, bin 0 first, tagged with the channel.
// Timing: the first bin appears log2(N)*N/2 + 4 clocks after the frame's
// last sample; the engine is busy for about N + log2(N)*N/2 + N clocks per
// frame (7168 at N = 1024).
module psd_engine #(
  parameter int unsigned N_CH     = psd_pkg::N_CH,
  parameter int unsigned N_FFT    = psd_pkg::N_FFT,
  parameter int unsigned SAMPLE_W = psd_pkg::SAMPLE_W,
  parameter int unsigned POWER_W  = psd_pkg::POWER_W,
  parameter int unsigned NAVG_W   = psd_pkg::NAVG_W,
  parameter int unsigned COEF_W   = psd_pkg::COEF_W
) (
  input  logic                       clk,
  input  logic                       rst,
  output logic                       ready,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_data,
  input  logic                       in_last,
  input  logic [$clog2(N_CH)-1:0]    in_ch,
  input  logic [NAVG_W-1:0]          n_avg,
  input  logic                       coef_we,
  input  logic [$clog2(N_FFT)-1:0]   coef_addr,
  input  logic [COEF_W-1:0]          coef_wdata,
  output logic [COEF_W-1:0]          coef_rdata,
  output logic                       out_valid,
  output logic [POWER_W-1:0]         out_power,
  output logic [$clog2(N_FFT)-2:0]   out_bin,
  output logic [$clog2(N_CH)-1:0]    out_ch,
  output logic                       out_last,
  output logic                       out_avg_last,
  output logic [31:0]                spectra [N_CH]
);
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned L  = $clog2(N_FFT);

  logic                       w_valid, w_last;
  logic signed [SAMPLE_W-1:0] w_data;
  logic [CW-1:0]              w_tag;

  window_handler #(.N_FFT(N_FFT), .SAMPLE_W(SAMPLE_W), .COEF_W(COEF_W), .TAG_W(CW)) u_win (
    .clk, .rst,
    .in_valid, .in_data, .in_last, .in_tag(in_ch),
    .out_valid(w_valid), .out_data(w_data), .out_last(w_last), .out_tag(w_tag),
    .coef_we, .coef_addr, .coef_wdata, .coef_rdata
  );

  logic                       f_valid, f_last;
  logic signed [SAMPLE_W-1:0] f_re, f_im;
  logic [L-1:0]               f_idx;
  logic [CW-1:0]              f_tag;

  fft_r2 #(.N(N_FFT), .DATA_W(SAMPLE_W), .TW_W(SAMPLE_W), .TAG_W(CW)) u_fft (
    .clk, .rst, .ready,
    .in_valid(w_valid), .in_data(w_data), .in_last(w_last), .in_tag(w_tag),
    .out_valid(f_valid), .out_re(f_re), .out_im(f_im), .out_idx(f_idx),
    .out_last(f_last), .out_tag(f_tag)
  );

  // Housekeepers: one per channel, advanced when a spectrum starts to unload.
  logic [N_CH-1:0] hk_start, hk_last;
  logic            avg_flag;
  logic [NAVG_W-1:0] hk_count [N_CH];   // observable in simulation only

  for (genvar c = 0; c < N_CH; c++) begin : g_hk
    assign hk_start[c] = f_valid && (f_idx == '0) && (f_tag == CW'(c));
    housekeeper #(.NAVG_W(NAVG_W)) u_hk (
      .clk, .rst, .n_avg, .start(hk_start[c]), .avg_last(hk_last[c]),
      .count(hk_count[c]), .spectra(spectra[c])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) avg_flag <= 1'b0;
    else if (hk_start != '0) avg_flag <= hk_last[f_tag];
  end

  power_norm #(.N(N_FFT), .DATA_W(SAMPLE_W), .POWER_W(POWER_W), .TAG_W(CW)) u_norm (
    .clk, .rst,
    .in_valid(f_valid), .in_re(f_re), .in_im(f_im), .in_idx(f_idx), .in_tag(f_tag),
    .out_valid, .out_power, .out_bin, .out_last, .out_tag(out_ch)
  );
  assign out_avg_last = avg_flag;

  logic unused_fft_last;
  assign unused_fft_last = f_last;
endmodule
