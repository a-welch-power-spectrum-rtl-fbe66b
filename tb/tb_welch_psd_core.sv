// tb_welch_psd_core: end-to-end test of the whole core at 64 points.
//
// Four channels carry tones exactly on bins 5, 9, 13 and 20. A host model
// programs the core over the register bus, waits for stored spectra, reads
// each one completely and releases it. It runs through these phases:
//   1. normal load, Welch window, n = 2: every channel's averaged spectrum
//      must peak at its own bin, match a floating-point model of that
//      channel's tone alone in every bin (channel separation), and have a
//      peak level twice that of a single windowed frame (averaging, n = 2);
//   2. rectangular window written over the bus (window switch): the peak
//      must rise to twice (A/2)^2 and the bin two away from it must be
//      essentially empty (no leakage for a tone on a bin);
//   3. the host stops reading: the circular buffer fills and further
//      spectra must be discarded and counted;
//   4. overload: samples arrive 1.3 times faster than the engine can
//      process four channels; frames must be dropped and counted, and the
//      core must keep delivering correct spectra (no lock-up).
// Each mechanism is counted; one that never happened is a failure.
module tb_welch_psd_core;
  import psd_pkg::*;
  localparam int NC = 4, N = 64, NB = N / 2, W = 18, L = 6;
  localparam real PI = 3.14159265358979323846;
  localparam real A = 100000.0;
  localparam int ENGINE_CLOCKS = 2 * N + L * N / 2;   // per frame
  localparam int TONE [NC] = '{5, 9, 13, 20};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [NC-1:0] sample_valid = '0;
  logic signed [W-1:0] sample [NC];
  logic [BUS_AW-1:0] bus_addr = '0;
  logic bus_wr = 0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic done;

  welch_psd_core #(.N_CH(NC), .N_FFT(N), .SAMPLE_W(W), .SLOTS(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ---------------- sample source ----------------
  int period = 100;    // clocks between samples
  int t = 0;
  bit go = 0;          // set once sampling is enabled: frames start at t = 0
  initial begin
    for (int c = 0; c < NC; c++) sample[c] = '0;
    wait (go);
    forever begin
      repeat (period - 1) @(posedge clk);
      #1;
      for (int c = 0; c < NC; c++)
        sample[c] = W'($rtoi(A * $cos(2.0 * PI * TONE[c] * t / N)));
      sample_valid = '1;
      @(posedge clk);
      #1 sample_valid = '0;
      t++;
    end
  end

  int dones = 0;
  always @(posedge clk) if (done) dones++;

  // ---------------- host bus ----------------
  task automatic rd(input logic [BUS_AW-1:0] a, output logic [31:0] d);
    #1 bus_addr = a;
    @(posedge clk);
    #1 d = bus_rdata;
  endtask
  task automatic wr(input logic [BUS_AW-1:0] a, input logic [31:0] d);
    #1 bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(posedge clk);
    #1 bus_wr = 0;
  endtask

  longint unsigned spec [NB];
  int got [NC];
  int m_avg = 0, m_switch = 0, m_overflow = 0, m_drop = 0, m_separation = 0;

  // Wait for a stored spectrum, read it, release it; returns its channel.
  task automatic fetch(output int ch);
    logic [31:0] d, lo, hi;
    do rd(REG_HEAD, d); while (!d[31]);
    ch = d[7:0];
    for (int b = 0; b < NB; b++) begin
      rd({PAGE_SPEC, 12'(2 * b)}, lo);
      rd({PAGE_SPEC, 12'(2 * b + 1)}, hi);
      spec[b] = {hi[15:0], lo};
    end
    wr(REG_POP, 0);
    got[ch]++;
  endtask

  // Checks one averaged spectrum of channel ch (n spectra summed).
  task automatic check_spectrum(input int ch, input int n, input bit rect);
    real single, ratio;
    int peak_bin;
    peak_bin = 0;
    for (int b = 1; b < NB; b++) if (spec[b] > spec[peak_bin]) peak_bin = b;
    check(peak_bin == TONE[ch], $sformatf("ch %0d peak at %0d", ch, peak_bin));
    // Level of one frame: |A/2 * mean(w)|^2, mean of the window in use.
    single = rect ? (A / 2.0) ** 2 : (A / 2.0 * (1.0 - (N * N + 2.0) / (3.0 * N * N))) ** 2;
    ratio = real'(spec[TONE[ch]]) / (n * single);
    check(ratio > 0.97 && ratio < 1.03, $sformatf("ch %0d level ratio %f", ch, ratio));
    if (ratio > 0.97 && ratio < 1.03 && n > 1) m_avg++;
    // Every bin against a floating-point model of this channel's own tone
    // alone: any energy from another channel would show up here.
    for (int b = 0; b < NB; b++) begin
      real sr, si, wv, pr, tol;
      sr = 0.0; si = 0.0;
      for (int k = 0; k < N; k++) begin
        wv = rect ? 1.0 : 1.0 - ((k - N / 2) / real'(N / 2)) * ((k - N / 2) / real'(N / 2));
        sr += A * $cos(2.0 * PI * TONE[ch] * k / N) * wv * $cos(2.0 * PI * b * k / N);
        si -= A * $cos(2.0 * PI * TONE[ch] * k / N) * wv * $sin(2.0 * PI * b * k / N);
      end
      pr  = n * ((sr / N) ** 2 + (si / N) ** 2);
      tol = n * (24.0 * $sqrt(pr / n) + 600.0);
      check(real'(spec[b]) - pr <= tol && pr - real'(spec[b]) <= tol,
            $sformatf("ch %0d bin %0d: %0d, model %0.0f", ch, b, spec[b], pr));
    end
    m_separation++;
    if (rect) begin
      check(real'(spec[TONE[ch] + 2]) < 1e-6 * real'(spec[TONE[ch]]), "rectangular window: no leakage");
      m_switch++;
    end
  endtask

  initial begin
    logic [31:0] d;
    int ch;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (300) @(posedge clk);          // accumulator clearing sweep
    wr(REG_NAVG, 2);
    wr(REG_CTRL, 1);
    go = 1;

    // Phase 1: Welch window, n = 2.
    repeat (12) begin fetch(ch); check_spectrum(ch, 2, 0); end
    for (int c = 0; c < NC; c++) check(got[c] >= 2, $sformatf("phase 1: channel %0d got %0d", c, got[c]));

    // Phase 2: rectangular window. Spectra already in flight still use the
    // old window, so the first few are skipped.
    for (int n = 0; n < N; n++) wr({PAGE_WINDOW, 12'(n)}, 32'd131072);
    repeat (12) fetch(ch);
    repeat (8) begin fetch(ch); check_spectrum(ch, 2, 1); end

    // Phase 3: stop reading until the circular buffer overflows.
    repeat (10 * 2 * (NB) * period) @(posedge clk);
    rd(REG_STATUS, d);
    check(d[7:0] == 4, $sformatf("buffer full: %0d stored", d[7:0]));
    if (d[31:16] > 0) m_overflow++;
    repeat (4) begin fetch(ch); end
    rd(REG_DROPS, d);
    check(d == 0, $sformatf("no frames dropped under normal load (%0d)", d));

    // Phase 4: overload 1.3: four frames need 4*ENGINE_CLOCKS clocks, and
    // arrive every N/2 samples.
    period = (4 * ENGINE_CLOCKS * 10) / (13 * (N / 2));
    repeat (4) fetch(ch);                 // flush what was produced before
    repeat (16) begin fetch(ch); check_spectrum(ch, 2, 1); end
    rd(REG_DROPS, d);
    if (d > 0) m_drop++;
    check(d > 0, "frames dropped under overload");
    $display("mechanisms: averaging %0d, window switch %0d, buffer overflow %0d, frame drops %0d, separation %0d, done pulses %0d",
             m_avg, m_switch, m_overflow, m_drop, m_separation, dones);
    check(m_avg > 0 && m_switch > 0 && m_overflow > 0 && m_drop > 0 && m_separation > 0, "every mechanism happened");
    check(dones >= 44, $sformatf("done pulses %0d", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
