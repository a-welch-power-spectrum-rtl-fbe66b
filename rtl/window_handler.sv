// window_handler: applies the analysis window to each frame on its way into
// the FFT.
//
// A table of N_FFT unsigned coefficients in 1.17 format (1.0 = 2^17) is
// indexed by the position of the sample within its frame; the sample is
// multiplied by its coefficient, rounded and scaled back to SAMPLE_W bits.
// The table is writable from the host, so any window can be used; it starts
// out holding the Welch window
//     w[n] = 1 - ((n - N/2) / (N/2))^2 ,  n = 0 .. N-1,
// computed in integer arithmetic at elaboration. A writable window and the
// Welch default follow the design; the coefficient format, the rounding and
// the host port are this implementation's choices.
//
// Timing: one clock of latency; the channel tag and `last` travel with the
// sample. The position counter restarts after each `in_last`.
module window_handler #(
  parameter int unsigned N_FFT    = psd_pkg::N_FFT,
  parameter int unsigned SAMPLE_W = psd_pkg::SAMPLE_W,
  parameter int unsigned COEF_W   = psd_pkg::COEF_W,
  parameter int unsigned TAG_W    = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_data,
  input  logic                       in_last,
  input  logic [TAG_W-1:0]           in_tag,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_data,
  output logic                       out_last,
  output logic [TAG_W-1:0]           out_tag,
  // host access to the coefficient table
  input  logic                       coef_we,
  input  logic [$clog2(N_FFT)-1:0]   coef_addr,
  input  logic [COEF_W-1:0]          coef_wdata,
  output logic [COEF_W-1:0]          coef_rdata
);
  localparam int unsigned AW   = $clog2(N_FFT);
  localparam int unsigned FRAC = COEF_W - 1;            // 1.17 format
  localparam longint      ONE  = longint'(1) << FRAC;

  typedef logic [COEF_W-1:0] table_t [N_FFT];

  function automatic table_t welch_table();
    table_t t;
    longint half = longint'(N_FFT) / 2;
    for (int n = 0; n < int'(N_FFT); n++) begin
      longint d = longint'(n) - half;
      t[n] = COEF_W'(ONE - ((d * d) << FRAC) / (half * half));
    end
    return t;
  endfunction

  logic [COEF_W-1:0] coef [N_FFT];
  initial coef = welch_table();

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_wdata;
  end
  assign coef_rdata = coef[coef_addr];

  logic [AW-1:0] pos;
  logic signed [SAMPLE_W+COEF_W:0] prod;
  logic signed [SAMPLE_W+COEF_W:0] rounded;
  localparam logic signed [SAMPLE_W-1:0] MAXV = {1'b0, {(SAMPLE_W-1){1'b1}}};
  localparam logic signed [SAMPLE_W-1:0] MINV = {1'b1, {(SAMPLE_W-1){1'b0}}};

  always_comb begin
    prod    = in_data * $signed({1'b0, coef[pos]});
    rounded = (prod + (SAMPLE_W+COEF_W+1)'(ONE >> 1)) >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_tag  <= in_tag;
        if (rounded > (SAMPLE_W+COEF_W+1)'(MAXV))      out_data <= MAXV;
        else if (rounded < (SAMPLE_W+COEF_W+1)'(MINV)) out_data <= MINV;
        else                                          out_data <= SAMPLE_W'(rounded);
        pos <= in_last ? '0 : pos + AW'(1);
      end
    end
  end
endmodule
