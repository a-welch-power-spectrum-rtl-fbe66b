// tb_input_handler: four channels feeding one engine model (N_FFT = 32).
//
// Channel c sends samples c*4096 + k (k = sample number), each channel at
// its own spacing. The engine model takes one frame at a time and stays busy
// for a while after it. Every frame coming out must be contiguous, carry
// the right channel tag, start at a multiple of N/2 samples and match the
// channel's data. Token fairness: every channel that was waiting when a
// channel got the engine must get it before that channel gets it again.
module tb_input_handler;
  localparam int NC = 4, N = 32, W = 18;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic enable = 0;
  logic [NC-1:0] in_valid = '0;
  logic signed [W-1:0] in_sample [NC];
  logic engine_ready = 1;
  logic out_valid, out_last;
  logic signed [W-1:0] out_data;
  logic [1:0] out_ch;
  logic [NC-1:0] req_dbg;
  logic [31:0] drops;

  input_handler #(.N_CH(NC), .N_FFT(N), .SAMPLE_W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int sent [NC];
  int served [NC];
  int spacing [NC] = '{27, 29, 31, 28};

  for (genvar c = 0; c < NC; c++) begin : g_src
    initial begin
      sent[c] = 0;
      in_sample[c] = '0;
      @(negedge rst);
      forever begin
        repeat (spacing[c] - 1) @(posedge clk);
        #1 in_valid[c] = 1; in_sample[c] = W'(c * 4096 + sent[c]);
        @(posedge clk);
        #1 in_valid[c] = 0;
        sent[c]++;
      end
    end
  end

  // Engine model and frame checker.
  int frames = 0, fair_cases = 0;
  logic [NC-1:0] snapshot [NC] = '{default: '0};
  logic [NC-1:0] served_since [NC] = '{default: '0};
  logic [NC-1:0] waiting;
  initial begin
    @(negedge rst);
    forever begin
      int ch, base;
      @(posedge clk); #1;
      if (out_valid) begin
        engine_ready = 0;
        ch = out_ch;
        waiting = req_dbg;
        base = int'(out_data) - ch * 4096;
        check(base % (N / 2) == 0 && base >= 0, $sformatf("frame start %0d", base));
        for (int i = 0; i < N; i++) begin
          check(out_valid && out_ch == 2'(ch), "contiguous frame, stable tag");
          check(int'(out_data) == ch * 4096 + base + i, $sformatf("ch %0d sample %0d", ch, i));
          check(out_last == (i == N - 1), "last");
          @(posedge clk); #1;
        end
        // Fairness: whoever was waiting when this channel was last served
        // must have been served before this channel's turn came again.
        if (served[ch] > 0) begin
          check((snapshot[ch] & ~served_since[ch]) == '0,
                $sformatf("ch %0d served again before waiting %b", ch, snapshot[ch] & ~served_since[ch]));
          if (snapshot[ch] != '0) fair_cases++;
        end
        for (int d = 0; d < NC; d++) served_since[d][ch] = 1'b1;
        served_since[ch] = '0;
        snapshot[ch] = waiting & ~NC'(1 << ch);
        served[ch]++;
        frames++;
        repeat (60) @(posedge clk);
        #1 engine_ready = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1 enable = 1;
    repeat (12000) @(posedge clk);
    for (int c = 0; c < NC; c++) check(served[c] >= 8, $sformatf("channel %0d served %0d", c, served[c]));
    check(fair_cases > 5, $sformatf("fairness exercised %0d times", fair_cases));
    check(drops == 0, "no drops at this load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
