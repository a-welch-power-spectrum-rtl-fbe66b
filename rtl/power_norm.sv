// power_norm: the normalization stage of the engine, forming the squared
// 2-norm of each FFT bin.
//
// For every complex bin X[k] it outputs |X[k]|^2 = re^2 + im^2 as an unsigned
// POWER_W-bit value. A real input gives a conjugate-symmetric spectrum, so
// only bins k = 0 .. N/2-1 (DC up to just below Nyquist) are passed on;
// `out_last` marks bin N/2-1. Computing |X|^2 and keeping the half spectrum
// follow the design; treating the "normalization" block as this squared-norm
// stage is this implementation's reading of it.
//
// Timing: one clock of latency, one bin per clock; the tag is carried along.
module power_norm #(
  parameter int unsigned N       = psd_pkg::N_FFT,
  parameter int unsigned DATA_W  = psd_pkg::SAMPLE_W,
  parameter int unsigned POWER_W = psd_pkg::POWER_W,
  parameter int unsigned TAG_W   = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_re,
  input  logic signed [DATA_W-1:0] in_im,
  input  logic [$clog2(N)-1:0]     in_idx,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic [POWER_W-1:0]       out_power,
  output logic [$clog2(N)-2:0]     out_bin,
  output logic                     out_last,
  output logic [TAG_W-1:0]         out_tag
);
  localparam int unsigned L = $clog2(N);

  logic signed [2*DATA_W-1:0] re2, im2;
  logic                       lower_half;

  always_comb begin
    re2        = in_re * in_re;
    im2        = in_im * in_im;
    lower_half = (in_idx[L-1] == 1'b0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_power <= '0;
      out_bin   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && lower_half;
      out_last  <= in_valid && (in_idx == L'(N/2 - 1));
      if (in_valid && lower_half) begin
        out_power <= POWER_W'($unsigned(re2)) + POWER_W'($unsigned(im2));
        out_bin   <= in_idx[L-2:0];
        out_tag   <= in_tag;
      end
    end
  end
endmodule
