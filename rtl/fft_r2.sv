// fft_r2: N-point radix-2 burst FFT with scaling, the shared transform of the
// power-spectrum engine.
//
// Operation is in three phases on one in-place working memory:
//   load    : N real samples arrive one per clock and are written at
//             bit-reversed addresses (imaginary parts cleared);
//   compute : log2(N) decimation-in-time stages of N/2 butterflies, one
//             butterfly per clock. Each butterfly computes
//                 t = x[bot] * W^k ,  x[top] = (x[top] + t)/2 ,
//                 x[bot] = (x[top] - t)/2
//             with W = exp(-j*2*pi/N), i.e. a fixed scaling of 1/2 per stage
//             (1/N overall), which cannot overflow for a real input;
//   unload  : the N bins leave in natural order k = 0..N-1, one per clock.
// Twiddle factors are DATA_W-bit (1.17 for 18 bits) cosine and sine tables
// computed at elaboration, with +1.0 clipped to the largest code.
//
// The transform size, radix-2 burst architecture, 18-bit input and twiddle
// widths and the use of scaling follow the design's configuration of its FFT
// core; the schedule (1/2 every stage), rounding and memory organisation are
// this implementation's own.
//
// Interface: `ready` is high in idle; a frame is N consecutive or gapped
// `in_valid` beats ending with `in_last`. The tag given with the first beat is
// returned with every output beat. Latency from the last input beat to the
// first output bin is log2(N)*N/2 + 1 clocks; one transform occupies the
// core for N + log2(N)*N/2 + N clocks (7168 for N = 1024).
module fft_r2 #(
  parameter int unsigned N      = psd_pkg::N_FFT,
  parameter int unsigned DATA_W = psd_pkg::SAMPLE_W,
  parameter int unsigned TW_W   = psd_pkg::TWIDDLE_W,
  parameter int unsigned TAG_W  = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic                     ready,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     in_last,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_re,
  output logic signed [DATA_W-1:0] out_im,
  output logic [$clog2(N)-1:0]     out_idx,
  output logic                     out_last,
  output logic [TAG_W-1:0]         out_tag
);
  localparam int unsigned L    = $clog2(N);
  localparam int unsigned FRAC = TW_W - 1;
  localparam int unsigned PW   = DATA_W + TW_W;     // product width
  localparam int unsigned SW   = DATA_W + 3;        // butterfly sum width

  typedef logic signed [TW_W-1:0] tw_table_t [N/2];

  // cos (sel=0) or sin (sel=1) of 2*pi*k/N, scaled to 2^FRAC, clipped.
  function automatic tw_table_t make_twiddles(input bit sel);
    tw_table_t t;
    real pi = 3.14159265358979323846;
    real full = real'(longint'(1) << FRAC);
    for (int k = 0; k < int'(N/2); k++) begin
      real v = (sel ? $sin(2.0 * pi * k / N) : $cos(2.0 * pi * k / N)) * full;
      if (v > full - 1.0) v = full - 1.0;
      t[k] = TW_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_table_t COS_T = make_twiddles(1'b0);
  localparam tw_table_t SIN_T = make_twiddles(1'b1);

  function automatic logic [L-1:0] bitrev(input logic [L-1:0] a);
    for (int i = 0; i < int'(L); i++) bitrev[i] = a[L-1-i];
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMPUTE, S_UNLOAD} state_t;
  state_t state;

  logic signed [DATA_W-1:0] mem_re [N];
  logic signed [DATA_W-1:0] mem_im [N];

  logic [L-1:0]             cnt;      // load / unload index, butterfly index
  logic [$clog2(L+1)-1:0]   stage;
  logic [TAG_W-1:0]         tag;

  // ---------------- butterfly datapath (combinational) ----------------
  logic [L-1:0]             top, bot;
  logic [L-2:0]             twk, jmask;
  logic signed [DATA_W-1:0] ar, ai, br, bi;
  logic signed [TW_W-1:0]   wc, ws;
  logic signed [PW:0]       tr_full, ti_full;
  logic signed [SW-1:0]     tr, ti;
  logic signed [SW-1:0]     s0r, s0i, s1r, s1i;
  logic signed [DATA_W-1:0] y0r, y0i, y1r, y1i;

  localparam logic signed [SW-1:0] MAXV = SW'((longint'(1) << (DATA_W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -MAXV - SW'(1);

  // (v / 2) rounded, saturated to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] half_sat(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] h;
    h = (v + SW'(1)) >>> 1;
    if (h > MAXV)      return DATA_W'(MAXV);
    else if (h < MINV) return DATA_W'(MINV);
    else               return DATA_W'(h);
  endfunction

  always_comb begin
    // Butterfly b = cnt[L-2:0] of stage s (span h = 2^s): j = b mod h,
    // top = 2h*(b div h) + j, bot = top + h, twiddle exponent j*N/(2h).
    logic [L-2:0] b, j;
    b     = cnt[L-2:0];
    jmask = (L-1)'((32'd1 << stage) - 32'd1);
    j     = b & jmask;
    top   = {b & ~jmask, 1'b0} | {1'b0, j};
    bot   = top | L'(32'd1 << stage);
    twk   = j << (32'(L) - 32'd1 - 32'(stage));
    ar = mem_re[top];  ai = mem_im[top];
    br = mem_re[bot];  bi = mem_im[bot];
    wc = COS_T[twk];
    ws = SIN_T[twk];
    // t = x[bot] * (cos - j sin)
    tr_full = (PW+1)'(br * wc) + (PW+1)'(bi * ws);
    ti_full = (PW+1)'(bi * wc) - (PW+1)'(br * ws);
    tr = SW'((tr_full + (PW+1)'(longint'(1) << (FRAC - 1))) >>> FRAC);
    ti = SW'((ti_full + (PW+1)'(longint'(1) << (FRAC - 1))) >>> FRAC);
    s0r = SW'(ar) + tr;  s0i = SW'(ai) + ti;
    s1r = SW'(ar) - tr;  s1i = SW'(ai) - ti;
    y0r = half_sat(s0r); y0i = half_sat(s0i);
    y1r = half_sat(s1r); y1i = half_sat(s1i);
  end

  // ---------------- memory writes ----------------
  always_ff @(posedge clk) begin
    if ((state == S_IDLE || state == S_LOAD) && in_valid) begin
      mem_re[bitrev(cnt)] <= in_data;
      mem_im[bitrev(cnt)] <= '0;
    end else if (state == S_COMPUTE) begin
      mem_re[top] <= y0r;  mem_im[top] <= y0i;
      mem_re[bot] <= y1r;  mem_im[bot] <= y1i;
    end
  end

  // ---------------- control ----------------
  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cnt       <= '0;
      stage     <= '0;
      tag       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_idx   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_IDLE, S_LOAD: if (in_valid) begin
          if (state == S_IDLE) tag <= in_tag;
          state <= S_LOAD;
          cnt   <= cnt + L'(1);
          if (in_last) begin
            state <= S_COMPUTE;
            cnt   <= '0;
            stage <= '0;
          end
        end
        S_COMPUTE: begin
          if (cnt[L-2:0] == {(L-1){1'b1}}) begin
            cnt <= '0;
            if (32'(stage) == L - 1) state <= S_UNLOAD;
            else                     stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + L'(1);
          end
        end
        S_UNLOAD: begin
          out_valid <= 1'b1;
          out_re    <= mem_re[cnt];
          out_im    <= mem_im[cnt];
          out_idx   <= cnt;
          out_tag   <= tag;
          out_last  <= (cnt == {L{1'b1}});
          cnt       <= cnt + L'(1);
          if (cnt == {L{1'b1}}) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
