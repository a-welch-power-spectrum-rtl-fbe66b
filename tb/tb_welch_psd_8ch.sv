// tb_welch_psd_8ch: the core with its channel count raised to eight (64-point
// frames to keep the run short).
//
// Eight channels carry tones exactly on bins 4, 7, 10, ..., 25 at a load
// the engine can carry. The host reads 24 averaged spectra (n = 2); each
// must come from a valid channel, peak at that channel's bin with twice
// the single-frame Welch level, and every channel must be delivered.
module tb_welch_psd_8ch;
  import psd_pkg::*;
  localparam int NC = 8, N = 64, NB = N / 2, W = 18;
  localparam real PI = 3.14159265358979323846;
  localparam real A = 100000.0;

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

  function automatic int tone(input int c);
    return 4 + 3 * c;
  endfunction

  // Engine pass 2N + 3N = 320 clocks; 8 frames per 32 samples need 2560
  // clocks, so one sample every 150 clocks loads the engine to about 53%.
  bit go = 0;
  int t = 0;
  initial begin
    for (int c = 0; c < NC; c++) sample[c] = '0;
    wait (go);
    forever begin
      repeat (149) @(posedge clk);
      #1;
      for (int c = 0; c < NC; c++) sample[c] = W'($rtoi(A * $cos(2.0 * PI * tone(c) * t / N)));
      sample_valid = '1;
      @(posedge clk);
      #1 sample_valid = '0;
      t++;
    end
  end

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
    int seen [NC];
    int ch, pk;
    real single, ratio;
    single = (A / 2.0 * (1.0 - (N * N + 2.0) / (3.0 * N * N))) ** 2;
    for (int c = 0; c < NC; c++) seen[c] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (300) @(posedge clk);
    wr(REG_NAVG, 2);
    wr(REG_CTRL, 1);
    go = 1;
    repeat (24) begin
      do rd(REG_HEAD, d); while (!d[31]);
      ch = d[7:0];
      check(ch < NC, $sformatf("channel number %0d", ch));
      if (ch >= NC) ch = 0;
      seen[ch]++;
      for (int b = 0; b < NB; b++) begin
        rd({PAGE_SPEC, 12'(2 * b)}, lo);
        rd({PAGE_SPEC, 12'(2 * b + 1)}, hi);
        spec[b] = {hi[15:0], lo};
      end
      wr(REG_POP, 0);
      pk = 0;
      for (int b = 1; b < NB; b++) if (spec[b] > spec[pk]) pk = b;
      check(pk == tone(ch), $sformatf("channel %0d peak at %0d, want %0d", ch, pk, tone(ch)));
      ratio = real'(spec[pk]) / (2.0 * single);
      check(ratio > 0.97 && ratio < 1.03, $sformatf("channel %0d level ratio %f", ch, ratio));
    end
    for (int c = 0; c < NC; c++) check(seen[c] >= 2, $sformatf("channel %0d delivered %0d times", c, seen[c]));
    rd(REG_DROPS, d);
    check(d == 0, $sformatf("no drops at this load (%0d)", d));
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
