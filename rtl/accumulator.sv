// accumulator: per-channel summing of power spectra (the averaging of the
// Welch method).
//
// There is one accumulator of N_FFT/2 words per channel, held together in one
// memory addressed by {channel, bin}. Each incoming power bin is added to its
// word. On a spectrum flagged `in_avg_last` the sums leave on `out_*`
// instead, bin by bin, and each word is emptied (set to zero) in the same
// clock, ready for the next average. After reset the memory is cleared by a
// sweep of N_CH*N_FFT/2 clocks (`init_busy`); no spectrum may arrive during
// it. Summing n spectra per channel and emptying after forwarding follow the
// design; the single shared memory, the read-modify-write per clock and the
// clearing sweep are this implementation's choices.
//
// Timing: one beat per clock in, one clock of latency out. The sum of up to
// 2^(ACC_W-POWER_W) full-scale spectra fits without overflow.
module accumulator #(
  parameter int unsigned N_CH    = psd_pkg::N_CH,
  parameter int unsigned N_FFT   = psd_pkg::N_FFT,
  parameter int unsigned POWER_W = psd_pkg::POWER_W,
  parameter int unsigned ACC_W   = psd_pkg::ACC_W
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic                      init_busy,
  input  logic                      in_valid,
  input  logic [POWER_W-1:0]        in_power,
  input  logic [$clog2(N_FFT)-2:0]  in_bin,
  input  logic [$clog2(N_CH)-1:0]   in_ch,
  input  logic                      in_last,
  input  logic                      in_avg_last,
  output logic                      out_valid,
  output logic [ACC_W-1:0]          out_sum,
  output logic [$clog2(N_FFT)-2:0]  out_bin,
  output logic [$clog2(N_CH)-1:0]   out_ch,
  output logic                      out_last
);
  localparam int unsigned BW    = $clog2(N_FFT) - 1;
  localparam int unsigned CW    = $clog2(N_CH);
  localparam int unsigned AW    = BW + CW;
  localparam int unsigned WORDS = N_CH * N_FFT / 2;

  logic [ACC_W-1:0] acc [WORDS];
  logic [AW-1:0]    addr, init_addr;
  logic [ACC_W-1:0] sum;

  assign addr = {in_ch, in_bin};
  assign sum  = acc[addr] + ACC_W'(in_power);

  always_ff @(posedge clk) begin
    if (init_busy)     acc[init_addr] <= '0;
    else if (in_valid) acc[addr]      <= in_avg_last ? '0 : sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_busy <= 1'b1;
      init_addr <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_sum   <= '0;
      out_bin   <= '0;
      out_ch    <= '0;
    end else begin
      if (init_busy) begin
        init_addr <= init_addr + AW'(1);
        if (init_addr == AW'(WORDS - 1)) init_busy <= 1'b0;
      end
      out_valid <= in_valid && in_avg_last && !init_busy;
      out_last  <= in_valid && in_avg_last && in_last && !init_busy;
      if (in_valid && in_avg_last) begin
        out_sum <= sum;
        out_bin <= in_bin;
        out_ch  <= in_ch;
      end
    end
  end

  a_no_input_during_init: assert property (@(posedge clk) disable iff (rst) init_busy |-> !in_valid);
endmodule
