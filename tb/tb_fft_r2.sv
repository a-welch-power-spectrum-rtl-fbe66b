// tb_fft_r2: checks the radix-2 burst FFT against a double-precision DFT.
//
// Three 1024-point frames are transformed: a cosine on bin 124, a full-scale
// pseudo-random frame and a single impulse. Every output bin is compared with
// (1/N) * sum x[n] exp(-j 2 pi k n / N) within a small tolerance for the
// fixed-point rounding. The test also checks the output order and tag, the
// latency from the last input to the first bin (log2(N)*N/2 + 1 clocks) and
// the time until `ready` returns (log2(N)*N/2 + N clocks after the last
// input, i.e. 2N + log2(N)*N/2 clocks per transform).
module tb_fft_r2;
  localparam int N = 1024;
  localparam int L = 10;
  localparam int W = 18;
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 6;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ready, in_valid = 0, in_last = 0, out_valid, out_last;
  logic signed [W-1:0] in_data = '0, out_re, out_im;
  logic [L-1:0] out_idx;
  logic [1:0] in_tag = '0, out_tag;

  fft_r2 #(.N(N), .DATA_W(W), .TW_W(W), .TAG_W(2)) dut (.*);

  int checks = 0, failures = 0;
  int x [N];
  real ref_re [N], ref_im [N];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(input int kind, input logic [1:0] tag);
    int k, n, first_out, lat;
    for (n = 0; n < N; n++) begin
      case (kind)
        0: x[n] = $rtoi(100000.0 * $cos(2.0 * PI * 124 * n / N));
        1: x[n] = int'($signed(18'($urandom)));
        default: x[n] = (n == 5) ? 131071 : 0;
      endcase
    end
    for (k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (n = 0; n < N; n++) begin
        real a = 2.0 * PI * real'((k * n) % N) / N;
        sr += x[n] * $cos(a);
        si -= x[n] * $sin(a);
      end
      ref_re[k] = sr / N;
      ref_im[k] = si / N;
    end
    // Feed the frame.
    wait (ready);
    @(posedge clk);
    for (n = 0; n < N; n++) begin
      #1 in_valid = 1; in_data = W'(x[n]); in_last = (n == N - 1); in_tag = tag;
      @(posedge clk);
    end
    #1 in_valid = 0; in_last = 0;
    busy_edges = 0;
    // Collect the bins; `lat` counts clock edges after the one that took in_last.
    first_out = -1;
    lat = 0;
    for (k = 0; k < N; ) begin
      @(posedge clk);
      #1 lat++;
      if (out_valid) begin
        if (first_out < 0) first_out = lat;
        check(out_idx == L'(k), $sformatf("bin order %0d got %0d", k, out_idx));
        check(out_tag == tag, "tag");
        check(fabs(real'(out_re) - ref_re[k]) <= TOL && fabs(real'(out_im) - ref_im[k]) <= TOL,
              $sformatf("frame %0d bin %0d: got (%0d,%0d) want (%0.1f,%0.1f)", kind, k,
                        out_re, out_im, ref_re[k], ref_im[k]));
        check(out_last == (k == N - 1), "last flag");
        k++;
      end
    end
    check(first_out == L * N / 2 + 1, $sformatf("latency %0d", first_out));
    check(ready && busy_edges == N + L * N / 2, $sformatf("busy after last input %0d", busy_edges));
  endtask

  // Clock edges at which the core is still busy (ready low) after a frame.
  int busy_edges = 0;
  always @(posedge clk) if (!ready) busy_edges++;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run_frame(0, 2'd1);
    run_frame(1, 2'd2);
    run_frame(2, 2'd3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
