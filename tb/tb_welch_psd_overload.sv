// tb_welch_psd_overload: the overload test at the core's default size.
//
// Four channels (tones of 30, 10, 50 and 90 kHz at a nominal 250 kS/s) send
// samples so fast that four frames need 1.3 times the time between two
// frame boundaries: one engine pass is 2*1024 + 5*1024 = 7168 clocks, four
// passes 28672 clocks, and a frame boundary comes every 512 samples, so the
// sample period is 28672 / (1.3 * 512) = 43 clocks. The core must keep
// running (no lock-up of the arbiter), must drop and count frames, and every
// averaged spectrum it delivers (n = 2) must still peak at its channel's
// bin with the full level. Twelve spectra, three per channel on average,
// are read; each channel must be served.
module tb_welch_psd_overload;
  import psd_pkg::*;
  localparam int NC = 4, N = 1024, NB = 512, W = 18;
  localparam real PI = 3.14159265358979323846;
  localparam real A = 100000.0;
  localparam real FS = 250000.0;
  localparam real FREQ [NC] = '{30000.0, 10000.0, 50000.0, 90000.0};
  localparam int  PEAK [NC] = '{123, 41, 205, 369};
  localparam int  PERIOD = 43;   // clocks per sample: load 1.3

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;        // 100 MHz

  logic [NC-1:0] sample_valid = '0;
  logic signed [W-1:0] sample [NC];
  logic [BUS_AW-1:0] bus_addr = '0;
  logic bus_wr = 0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic done;

  welch_psd_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  bit go = 0;
  int t = 0;
  initial begin
    for (int c = 0; c < NC; c++) sample[c] = '0;
    wait (go);
    forever begin
      repeat (PERIOD - 1) @(posedge clk);
      #1;
      for (int c = 0; c < NC; c++)
        sample[c] = W'($rtoi(A * $sin(2.0 * PI * FREQ[c] * t / FS)));
      sample_valid = '1;
      @(posedge clk);
      #1 sample_valid = '0;
      t++;
    end
  end

  int dones = 0;
  always @(posedge clk) if (done) dones++;

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

  initial begin
    logic [31:0] d, lo, hi;
    longint unsigned spec [NB];
    bit seen [NC];
    int ch, pk;
    real level;
    // Level of one frame for a bin-centred tone of amplitude A under the
    // Welch window: (A/2 * mean(w))^2 with mean(w) about 2/3; off-centre
    // tones (scalloping) lose a little, so the check is a band.
    level = (A / 2.0 * 2.0 / 3.0) ** 2;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (2100) @(posedge clk);   // accumulator clearing sweep
    wr(REG_NAVG, 2);
    wr(REG_CTRL, 1);
    go = 1;
    for (int i = 0; i < 12; i++) begin
      do rd(REG_HEAD, d); while (!d[31]);
      ch = d[7:0];
      seen[ch] = 1;
      for (int b = 0; b < NB; b++) begin
        rd({PAGE_SPEC, 12'(2 * b)}, lo);
        rd({PAGE_SPEC, 12'(2 * b + 1)}, hi);
        spec[b] = {hi[15:0], lo};
      end
      wr(REG_POP, 0);
      pk = 1;
      for (int b = 1; b < NB; b++) if (spec[b] > spec[pk]) pk = b;
      check(pk == PEAK[ch], $sformatf("channel %0d peak at bin %0d, want %0d", ch, pk, PEAK[ch]));
      check(real'(spec[pk]) > 2.0 * level * 0.6 && real'(spec[pk]) < 2.0 * level * 1.05,
            $sformatf("channel %0d peak level %0d vs %0.0f", ch, spec[pk], 2.0 * level));
      $display("channel %0d: peak bin %0d (%0.1f kHz), level %0d", ch, pk, pk * FS / N / 1000.0, spec[pk]);
    end
    for (int c = 0; c < NC; c++) check(seen[c], $sformatf("channel %0d served", c));
    rd(REG_DROPS, d);
    $display("frames dropped: %0d, samples sent: %0d", d, t);
    check(d > 0, "frames dropped under overload");
    check(dones >= 12, $sformatf("done pulses %0d", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
