// tb_power_norm: checks |X|^2 = re^2 + im^2 and the half-spectrum selection
// (N = 64). Two transforms' worth of random and extreme bins are fed; only
// bins 0..31 may come out, one clock later, with the right power, bin
// number, tag and `last` on bin 31.
module tb_power_norm;
  localparam int N = 64, W = 18;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, out_last;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic [5:0] in_idx = '0;
  logic [4:0] out_bin;
  logic [1:0] in_tag = '0, out_tag;
  logic [35:0] out_power;

  power_norm #(.N(N), .DATA_W(W), .POWER_W(36), .TAG_W(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    longint re, im;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < N; k++) begin
        re = (k == 3) ? -131072 : longint'($signed(W'($urandom)));
        im = (k == 3) ? -131072 : longint'($signed(W'($urandom)));
        #1 in_valid = 1; in_re = W'(re); in_im = W'(im); in_idx = 6'(k); in_tag = 2'(f + 1);
        @(posedge clk);
        #1 in_valid = 0;
        check(out_valid == (k < N / 2), $sformatf("valid for bin %0d", k));
        if (k < N / 2) begin
          check(out_power == 36'(re * re + im * im), $sformatf("power bin %0d", k));
          check(out_bin == 5'(k) && out_tag == 2'(f + 1), "bin/tag");
          check(out_last == (k == N / 2 - 1), "last");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
