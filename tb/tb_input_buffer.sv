// tb_input_buffer: checks framing with 50% overlap, read-out timing and the
// overload policy of one channel's input buffer (N_FFT = 64 to keep it
// short).
//
// Samples carry their own sequence number, so every frame read out can be
// checked against the sample numbers it must hold: frame f covers samples
// f*N/2 .. f*N/2 + N - 1. Acknowledges come promptly in the first part; in
// the second part they are held back for longer than N/2 samples, so that
// frames must be dropped, and the test checks that the drop counter counts
// them and that the frame finally read is the newest one.
module tb_input_buffer;
  localparam int N = 64;
  localparam int W = 18;
  localparam int SPACING = 3;   // clocks between samples
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, req, ack = 0, out_valid, out_last;
  logic signed [W-1:0] in_sample = '0, out_data;
  logic [15:0] drops;

  input_buffer #(.N_FFT(N), .SAMPLE_W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int sent = 0;
  bit hold_ack = 0;
  int frames = 0, exp_drops = 0;

  // Sample source: sample k carries the value k.
  initial begin
    @(negedge rst);
    forever begin
      repeat (SPACING - 1) @(posedge clk);
      #1 in_valid = 1; in_sample = W'(sent);
      @(posedge clk);
      #1 in_valid = 0;
      sent++;
    end
  end

  // Acknowledge and read-out checker.
  initial begin
    int first, lat;
    @(negedge rst);
    forever begin
      @(posedge clk);
      #1;
      if (req && !hold_ack) begin
        // Which frame is pending: the newest complete one.
        first = ((sent - N) / (N / 2)) * (N / 2);
        ack = 1;
        @(posedge clk);
        #1 ack = 0;
        lat = 0;
        while (!out_valid) begin @(posedge clk); #1 lat++; end
        check(lat == 1, $sformatf("first sample %0d clocks after the ack edge", lat + 1));
        for (int i = 0; i < N; i++) begin
          check(out_valid, "valid throughout the frame");
          check(out_data == W'(first + i), $sformatf("frame at %0d sample %0d: got %0d", first, i, out_data));
          check(out_last == (i == N - 1), "last flag");
          @(posedge clk); #1;
        end
        check(!out_valid, "frame ends after N samples");
        frames++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Part 1: prompt service; frames become ready at N, 1.5N, 2N, ...
    // samples; at 6N samples ten of them have been read out completely.
    wait (sent == 6 * N);
    check(frames == 10, $sformatf("frames in part 1: %0d", frames));
    check(drops == 0, "no drops under prompt service");
    // Part 2: hold acknowledges until 8N+4 samples: the frame ready at 6N
    // is already granted; those ready at 6.5N .. 8N replace each other, so
    // three are dropped and only the newest (8N) is read afterwards. The
    // frame of 8.5N then follows; the one of 9N is still being read.
    @(posedge clk); #1 hold_ack = 1;
    wait (sent == 8 * N + 4);
    check(drops == 3, $sformatf("drops %0d", drops));
    #1 hold_ack = 0;
    wait (frames == 12);
    wait (sent == 9 * N + 4);
    check(frames == 13, $sformatf("frames after part 2: %0d", frames));
    check(drops == 3, "no further drops");
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
