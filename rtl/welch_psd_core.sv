// welch_psd_core: a multichannel Welch power-spectral-density core.
//
// Four channels of 18-bit samples are each cut into 1024-sample frames that
// overlap by half. A token arbiter hands the one shared engine to the
// channels in turn; the engine windows a frame (Welch window by default),
// takes a 1024-point FFT and forms |X[k]|^2 for the 512 bins from DC to just
// below Nyquist. Per-channel accumulators sum n such spectra (the averaging
// of Welch's method); each finished average is stored in a circular buffer
// that a host reads over a simple register bus, with a one-clock `done`
// pulse announcing each new spectrum.
//
// Structure: input_handler (input buffers + token_arbiter) -> psd_engine
// (window_handler, fft_r2, power_norm, housekeepers) -> accumulator ->
// register_interface. This chain and the sizes follow the design; the
// parallel sample inputs (in place of a serial ADC link) and the generic
// register bus (in place of a CoreConnect OPB attachment) are this
// implementation's interfaces.
//
// Timing: one engine pass takes about 2*N_FFT + log2(N_FFT)*N_FFT/2 clocks
// (7168 at 1024 points), so at 100 MHz the engine serves about 13900 frames
// per second; a 250 kS/s channel produces 488 frames per second. Samples
// must arrive at most once every two clocks per channel. The host must set
// REG_CTRL[0] before samples are taken.
module welch_psd_core #(
  parameter int unsigned N_CH     = psd_pkg::N_CH,
  parameter int unsigned N_FFT    = psd_pkg::N_FFT,
  parameter int unsigned SAMPLE_W = psd_pkg::SAMPLE_W,
  parameter int unsigned SLOTS    = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N_CH-1:0]             sample_valid,
  input  logic signed [SAMPLE_W-1:0]  sample [N_CH],
  input  logic [psd_pkg::BUS_AW-1:0]  bus_addr,
  input  logic                        bus_wr,
  input  logic [psd_pkg::BUS_DW-1:0]  bus_wdata,
  output logic [psd_pkg::BUS_DW-1:0]  bus_rdata,
  output logic                        done
);
  import psd_pkg::*;
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned BW = $clog2(N_FFT) - 1;

  logic                       enable;
  logic [NAVG_W-1:0]          n_avg;
  logic [31:0]                drops;
  logic                       coef_we;
  logic [$clog2(N_FFT)-1:0]   coef_addr;
  logic [COEF_W-1:0]          coef_wdata, coef_rdata;

  // input handler -> engine
  logic                       ih_valid, ih_last, eng_ready;
  logic signed [SAMPLE_W-1:0] ih_data;
  logic [CW-1:0]              ih_ch;
  logic [N_CH-1:0]            pending;

  input_handler #(.N_CH(N_CH), .N_FFT(N_FFT), .SAMPLE_W(SAMPLE_W)) u_in (
    .clk, .rst, .enable,
    .in_valid(sample_valid), .in_sample(sample),
    .engine_ready(eng_ready),
    .out_valid(ih_valid), .out_data(ih_data), .out_last(ih_last), .out_ch(ih_ch),
    .req_dbg(pending), .drops
  );

  // engine -> accumulator
  logic                       ps_valid, ps_last, ps_avg_last;
  logic [POWER_W-1:0]         ps_power;
  logic [BW-1:0]              ps_bin;
  logic [CW-1:0]              ps_ch;
  logic [31:0]                spectra [N_CH];

  psd_engine #(.N_CH(N_CH), .N_FFT(N_FFT), .SAMPLE_W(SAMPLE_W)) u_eng (
    .clk, .rst, .ready(eng_ready),
    .in_valid(ih_valid), .in_data(ih_data), .in_last(ih_last), .in_ch(ih_ch),
    .n_avg, .coef_we, .coef_addr, .coef_wdata, .coef_rdata,
    .out_valid(ps_valid), .out_power(ps_power), .out_bin(ps_bin), .out_ch(ps_ch),
    .out_last(ps_last), .out_avg_last(ps_avg_last), .spectra
  );

  // accumulator -> register interface
  logic                       av_valid, av_last, acc_init;
  logic [ACC_W-1:0]           av_sum;
  logic [BW-1:0]              av_bin;
  logic [CW-1:0]              av_ch;

  accumulator #(.N_CH(N_CH), .N_FFT(N_FFT)) u_acc (
    .clk, .rst, .init_busy(acc_init),
    .in_valid(ps_valid), .in_power(ps_power), .in_bin(ps_bin), .in_ch(ps_ch),
    .in_last(ps_last), .in_avg_last(ps_avg_last),
    .out_valid(av_valid), .out_sum(av_sum), .out_bin(av_bin), .out_ch(av_ch),
    .out_last(av_last)
  );

  register_interface #(.N_CH(N_CH), .N_FFT(N_FFT), .SLOTS(SLOTS)) u_regs (
    .clk, .rst,
    .in_valid(av_valid), .in_sum(av_sum), .in_bin(av_bin), .in_ch(av_ch), .in_last(av_last),
    .done,
    .bus_addr, .bus_wr, .bus_wdata, .bus_rdata,
    .enable, .n_avg, .drops,
    .coef_we, .coef_addr, .coef_wdata, .coef_rdata
  );

  // Status-only signals, kept for observation in simulation.
  logic unused_status;
  assign unused_status = acc_init ^ (|pending) ^ (^spectra[0]);
endmodule
