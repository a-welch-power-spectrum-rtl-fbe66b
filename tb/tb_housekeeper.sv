// tb_housekeeper: checks the per-channel averaging count. For n = 1, 3 and
// 10 a series of spectrum starts is given; `avg_last` must be high exactly on
// every n-th start, and the count must wrap to zero after it.
module tb_housekeeper;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] n_avg = 16'd3, count;
  logic start = 0, avg_last;
  logic [31:0] spectra;

  housekeeper #(.NAVG_W(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int total = 0;
  task automatic run(input int n, input int starts);
    #1 n_avg = 16'(n);
    for (int i = 0; i < starts; i++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 start = 1;
      check(avg_last == ((i % (n < 1 ? 1 : n)) == (n < 1 ? 0 : n - 1)), $sformatf("n=%0d start %0d", n, i));
      check(count == 16'(n <= 1 ? 0 : i % n), "count");
      @(posedge clk);
      #1 start = 0;
      total++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(3, 12);
    run(1, 5);
    run(10, 30);
    run(0, 3);
    check(spectra == 32'(total), "spectra counter");
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
