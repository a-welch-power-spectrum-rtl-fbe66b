// tb_psd_engine: runs frames through the full-size engine (1024 points) and
// compares the power spectrum with a floating-point model.
//
// The model windows the frame with the Welch window, takes the DFT scaled by
// 1/N and forms |X|^2 for bins 0..511. Frames: a 30 kHz tone sampled at
// 250 kS/s on channel 1 (peak expected at bin 123), the same again, and
// random noise on channel 2. With n = 2 the housekeeper of channel 1 must
// mark the second of its spectra as completing the average, channel 2's
// first spectrum must not be marked. Also checked: 512 bins per spectrum,
// channel tag, `last`, and that the engine is ready again after
// 2N + log2(N)*N/2 clocks.
module tb_psd_engine;
  localparam int N = 1024, W = 18, NB = N / 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ready, in_valid = 0, in_last = 0;
  logic signed [W-1:0] in_data = '0;
  logic [1:0] in_ch = '0, out_ch;
  logic [15:0] n_avg = 16'd2;
  logic coef_we = 0;
  logic [9:0] coef_addr = '0;
  logic [17:0] coef_wdata = '0, coef_rdata;
  logic out_valid, out_last, out_avg_last;
  logic [35:0] out_power;
  logic [8:0] out_bin;
  logic [31:0] spectra [4];

  psd_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int x [N];
  real pref [NB];

  task automatic frame(input int kind, input logic [1:0] ch, input bit exp_avg_last);
    int peak_bin, busy;
    longint unsigned peak;
    for (int n = 0; n < N; n++)
      x[n] = kind == 0 ? $rtoi(120000.0 * $sin(2.0 * PI * 30000.0 * n / 250000.0))
                       : int'($signed(W'($urandom)));
    for (int k = 0; k < NB; k++) begin
      real sr, si, a, wv;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        wv = 1.0 - ((n - 512) / 512.0) * ((n - 512) / 512.0);
        a = 2.0 * PI * real'((k * n) % N) / N;
        sr += x[n] * wv * $cos(a);
        si -= x[n] * wv * $sin(a);
      end
      sr /= N; si /= N;
      pref[k] = sr * sr + si * si;
    end
    wait (ready);
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      #1 in_valid = 1; in_data = W'(x[n]); in_last = (n == N - 1); in_ch = ch;
      @(posedge clk);
    end
    #1 in_valid = 0; in_last = 0;
    peak = 0; peak_bin = -1; busy = 0;
    for (int k = 0; k < NB; ) begin
      @(posedge clk); #1;
      if (out_valid) begin
        real tol;
        tol = 24.0 * $sqrt(pref[k]) + 600.0;
        check(out_bin == 9'(k) && out_ch == ch && out_last == (k == NB - 1), "bin/tag/last");
        check(out_avg_last == exp_avg_last, "average-complete flag");
        check(real'(out_power) - pref[k] <= tol && pref[k] - real'(out_power) <= tol,
              $sformatf("bin %0d power %0d want %0.0f", k, out_power, pref[k]));
        if (out_power > peak) begin peak = out_power; peak_bin = k; end
        k++;
      end
    end
    if (kind == 0) check(peak_bin == 123, $sformatf("peak at bin %0d", peak_bin));
    while (!ready) begin @(posedge clk); #1; end
  endtask

  int busy_edges = 0;
  always @(posedge clk) if (!rst && !ready) busy_edges++;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    frame(0, 2'd1, 1'b0);
    check(busy_edges == 2 * N + 10 * N / 2 - 1, $sformatf("engine busy %0d clocks", busy_edges));
    frame(0, 2'd1, 1'b1);
    frame(1, 2'd2, 1'b0);
    check(spectra[1] == 2 && spectra[2] == 1 && spectra[0] == 0, "housekeeper counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
