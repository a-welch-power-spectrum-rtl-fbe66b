// tb_accumulator: checks per-channel summing, forwarding and emptying
// (N_CH = 4, N_FFT = 16, so 8 bins per spectrum).
//
// Random spectra for random channels are fed, each flagged as completing
// the average or not (as the housekeepers would). A reference model keeps
// the sums per channel and bin; on a completing spectrum the forwarded sums
// must equal the model's, one clock later, and the model's accumulator is
// emptied. The clearing sweep after reset must take N_CH*N_FFT/2 clocks.
module tb_accumulator;
  localparam int NC = 4, N = 16, NB = N / 2, PW = 36, AW = 48;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic init_busy, in_valid = 0, in_last = 0, in_avg_last = 0, out_valid, out_last;
  logic [PW-1:0] in_power = '0;
  logic [2:0] in_bin = '0, out_bin;
  logic [1:0] in_ch = '0, out_ch;
  logic [AW-1:0] out_sum;

  accumulator #(.N_CH(NC), .N_FFT(N), .POWER_W(PW), .ACC_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  longint unsigned model [NC][NB];
  int forwarded = 0;

  initial begin
    int init_len;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    init_len = 0;
    while (init_busy) begin @(posedge clk); #1 init_len++; end
    check(init_len == NC * NB, $sformatf("init sweep %0d clocks", init_len));
    for (int c = 0; c < NC; c++) for (int b = 0; b < NB; b++) model[c][b] = 0;
    repeat (200) begin
      int ch;
      bit fin;
      ch  = $urandom_range(0, NC - 1);
      fin = ($urandom_range(0, 3) == 0);
      for (int b = 0; b < NB; b++) begin
        longint unsigned p;
        p = {$urandom, $urandom} & ((64'd1 << PW) - 1);
        #1 in_valid = 1; in_power = PW'(p); in_bin = 3'(b); in_ch = 2'(ch);
        in_last = (b == NB - 1); in_avg_last = fin;
        @(posedge clk);
        #1 in_valid = 0;
        model[ch][b] += p;
        check(out_valid == fin, "forward only completing spectra");
        if (fin) begin
          check(out_sum == AW'(model[ch][b]) && out_bin == 3'(b) && out_ch == 2'(ch) && out_last == (b == NB - 1),
                $sformatf("ch %0d bin %0d sum %0d want %0d", ch, b, out_sum, model[ch][b]));
          model[ch][b] = 0;
        end
      end
      if (fin) forwarded++;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    check(forwarded > 20, "enough averages forwarded");
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
