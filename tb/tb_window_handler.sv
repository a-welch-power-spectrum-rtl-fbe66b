// tb_window_handler: checks the default Welch window, the multiplication and
// the host-writable coefficient table (N_FFT = 1024).
//
// The coefficient table is read back and compared with
// 2^17 * (1 - ((n - 512)/512)^2) computed in floating point. Two frames of
// random samples are windowed and compared with round(x * w[n]); one clock of
// latency and the travelling tag and `last` are checked. A rectangular
// window (all 2^17) is then written and a frame must pass unchanged.
module tb_window_handler;
  localparam int N = 1024, W = 18, CW = 18;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic signed [W-1:0] in_data = '0, out_data;
  logic [1:0] in_tag = '0, out_tag;
  logic coef_we = 0;
  logic [9:0] coef_addr = '0;
  logic [CW-1:0] coef_wdata = '0, coef_rdata;

  window_handler #(.N_FFT(N), .SAMPLE_W(W), .COEF_W(CW), .TAG_W(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  real w [N];

  task automatic frame(input bit rect, input logic [1:0] tag);
    int x;
    for (int n = 0; n < N; n++) begin
      x = int'($signed(W'($urandom)));
      #1 in_valid = 1; in_data = W'(x); in_last = (n == N - 1); in_tag = tag;
      @(posedge clk);
      #1 in_valid = 0;
      check(out_valid && out_tag == tag && out_last == (n == N - 1), "valid/tag/last after one clock");
      if (rect) check(out_data == W'(x), $sformatf("rect n=%0d", n));
      else begin
        real e;
        e = x * w[n];
        check(real'(out_data) - e <= 1.0 && e - real'(out_data) <= 1.0,
              $sformatf("n=%0d x=%0d got %0d want %0.1f", n, x, out_data, e));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < N; n++) begin
      w[n] = 1.0 - ((n - 512) / 512.0) * ((n - 512) / 512.0);
      #1 coef_addr = 10'(n);
      #1 check(real'(coef_rdata) - w[n] * 131072.0 <= 1.0 && w[n] * 131072.0 - real'(coef_rdata) <= 1.0,
               $sformatf("coef %0d = %0d", n, coef_rdata));
    end
    @(posedge clk);
    frame(0, 2'd1);
    frame(0, 2'd2);
    // Rectangular window.
    for (int n = 0; n < N; n++) begin
      #1 coef_we = 1; coef_addr = 10'(n); coef_wdata = CW'(131072);
      @(posedge clk);
    end
    #1 coef_we = 0;
    frame(1, 2'd3);
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
