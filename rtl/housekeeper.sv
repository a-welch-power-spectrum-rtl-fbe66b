// housekeeper: per-channel bookkeeping of the averaging in the main engine.
//
// One housekeeper exists per input channel. It counts the power spectra of
// its channel that enter the accumulator and tells, while a spectrum is on
// its way (`avg_last`), whether that spectrum is the n-th of the current
// average, i.e. the one after which the accumulated sum is forwarded and
// the accumulator emptied. An n of 0 or 1 forwards every spectrum. `spectra`
// counts all spectra of the channel since reset (status). That a housekeeper
// exists per channel is the design's; what it keeps is this implementation's
// reading of the block.
//
// Timing: `avg_last` is combinational from the count and `n_avg`; the count
// advances on the clock edge at which `start` is high.
module housekeeper #(
  parameter int unsigned NAVG_W = psd_pkg::NAVG_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NAVG_W-1:0] n_avg,
  input  logic              start,     // a spectrum of this channel begins
  output logic              avg_last,  // that spectrum completes the average
  output logic [NAVG_W-1:0] count,     // spectra already in the accumulator
  output logic [31:0]       spectra
);
  assign avg_last = (n_avg <= NAVG_W'(1)) || (count >= n_avg - NAVG_W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      spectra <= '0;
    end else if (start) begin
      count   <= avg_last ? '0 : count + NAVG_W'(1);
      spectra <= spectra + 32'd1;
    end
  end
endmodule
