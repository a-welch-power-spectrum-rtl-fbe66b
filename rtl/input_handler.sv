// input_handler: the four channel input buffers, the token arbiter and the
// frame multiplexer in front of the shared engine.
//
// Each channel's buffer collects 50%-overlapped frames and requests the
// engine; the arbiter acknowledges one request at a time while the engine
// reports `engine_ready`, and the acknowledged buffer streams its frame out.
// The handler forwards that stream tagged with its channel number. Only one
// buffer streams at a time, so the multiplexer simply selects the channel
// of the last acknowledge. The structure (buffers that request, an arbiter
// that acknowledges) is the design's; port naming and tagging are this
// implementation's.
//
// Timing: frame samples appear two clocks after the acknowledge, one per
// clock for N_FFT clocks. `drops` sums the frames every buffer discarded.
module input_handler #(
  parameter int unsigned N_CH     = psd_pkg::N_CH,
  parameter int unsigned N_FFT    = psd_pkg::N_FFT,
  parameter int unsigned SAMPLE_W = psd_pkg::SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       enable,
  input  logic [N_CH-1:0]            in_valid,
  input  logic signed [SAMPLE_W-1:0] in_sample [N_CH],
  input  logic                       engine_ready,
  output logic                       out_valid,
  output logic signed [SAMPLE_W-1:0] out_data,
  output logic                       out_last,
  output logic [$clog2(N_CH)-1:0]    out_ch,
  output logic [N_CH-1:0]            req_dbg,   // pending requests (status)
  output logic [31:0]                drops
);
  localparam int unsigned CW = $clog2(N_CH);

  logic [N_CH-1:0]            req, ack, bvalid, blast;
  logic signed [SAMPLE_W-1:0] bdata [N_CH];
  logic [15:0]                bdrops [N_CH];
  logic [CW-1:0]              grant_idx, cur_ch;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    input_buffer #(.N_FFT(N_FFT), .SAMPLE_W(SAMPLE_W)) u_buf (
      .clk, .rst,
      .in_valid (in_valid[c] && enable),
      .in_sample(in_sample[c]),
      .req      (req[c]),
      .ack      (ack[c]),
      .out_valid(bvalid[c]),
      .out_data (bdata[c]),
      .out_last (blast[c]),
      .drops    (bdrops[c])
    );
  end

  token_arbiter #(.N(N_CH)) u_arb (
    .clk, .rst, .req, .ready(engine_ready), .ack, .grant_idx
  );

  always_ff @(posedge clk) begin
    if (rst) cur_ch <= '0;
    else if (ack != '0) cur_ch <= grant_idx;
  end

  always_comb begin
    out_valid = bvalid[cur_ch];
    out_data  = bdata[cur_ch];
    out_last  = blast[cur_ch];
    out_ch    = cur_ch;
    drops     = '0;
    for (int c = 0; c < N_CH; c++) drops += 32'(bdrops[c]);
  end
  assign req_dbg = req;
endmodule
