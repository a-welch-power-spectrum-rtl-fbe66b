// tb_register_interface: checks the circular spectrum buffer, the done flag
// and the register map (N_FFT = 16, i.e. 8 bins; SLOTS = 2).
//
// Spectra with known contents are pushed in as the accumulator would send
// them. Each completely stored spectrum must give a one-clock `done`. The
// host side reads the head channel and all bins (low and high words) of the
// oldest spectrum and releases it; order must be first in, first out. With
// both slots full a further spectrum must be discarded and counted. The
// control registers, the drop counter and the window-coefficient page are
// exercised as well.
module tb_register_interface;
  import psd_pkg::*;
  localparam int NC = 4, N = 16, NB = N / 2, AW = 48;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, in_last = 0, done;
  logic [AW-1:0] in_sum = '0;
  logic [2:0] in_bin = '0;
  logic [1:0] in_ch = '0;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic bus_wr = 0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  logic enable;
  logic [15:0] n_avg;
  logic [31:0] drops = 32'd77;
  logic coef_we;
  logic [3:0] coef_addr;
  logic [17:0] coef_wdata, coef_rdata;
  assign coef_rdata = 18'h2_0000 | 18'(coef_addr);

  register_interface #(.N_CH(NC), .N_FFT(N), .ACC_W(AW), .SLOTS(2), .NAVG_RESET(10)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int dones = 0;
  always @(posedge clk) if (done) dones++;

  function automatic logic [AW-1:0] pattern(input int id, input int b);
    return AW'({16'(id), 32'(b * 1000 + id)}) ^ (AW'(b) << 40);
  endfunction

  task automatic push(input int id, input int ch);
    for (int b = 0; b < NB; b++) begin
      #1 in_valid = 1; in_sum = pattern(id, b); in_bin = 3'(b); in_ch = 2'(ch); in_last = (b == NB - 1);
      @(posedge clk);
    end
    #1 in_valid = 0; in_last = 0;
    @(posedge clk);
  endtask

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

  task automatic read_head(input int id, input int ch);
    logic [31:0] d, lo, hi;
    rd(REG_HEAD, d);
    check(d[31] && d[7:0] == 8'(ch), $sformatf("head %h want ch %0d", d, ch));
    for (int b = 0; b < NB; b++) begin
      rd({PAGE_SPEC, 12'(2 * b)}, lo);
      rd({PAGE_SPEC, 12'(2 * b + 1)}, hi);
      check({hi[15:0], lo} == pattern(id, b), $sformatf("spectrum %0d bin %0d", id, b));
    end
    wr(REG_POP, 0);
  endtask

  initial begin
    logic [31:0] d;
    int done_len;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    rd(REG_NAVG, d);   check(d == 10, "n reset value");
    wr(REG_NAVG, 4);   check(n_avg == 4, "n written");
    rd(REG_CTRL, d);   check(d == 0 && !enable, "disabled after reset");
    wr(REG_CTRL, 1);   check(enable, "enable");
    rd(REG_DROPS, d);  check(d == 77, "drop counter readable");
    wr({PAGE_WINDOW, 12'd5}, 32'h1234);
    rd({PAGE_WINDOW, 12'd9}, d); check(d == 32'h2_0009, "window read page");
    rd(REG_HEAD, d);   check(!d[31], "empty");
    // Done flag: exactly one clock per stored spectrum.
    fork
      push(1, 2);
      begin
        done_len = 0;
        wait (done);
        while (done) begin @(posedge clk); #1 done_len++; end
      end
    join
    check(done_len == 1, $sformatf("done high for %0d clocks", done_len));
    push(2, 0);
    rd(REG_STATUS, d); check(d[7:0] == 2 && d[31:16] == 0, "two stored");
    push(3, 1);        // buffer full: discarded
    rd(REG_STATUS, d); check(d[7:0] == 2 && d[31:16] == 1, $sformatf("overflow counted %h", d));
    check(dones == 2, "no done for a discarded spectrum");
    read_head(1, 2);
    push(4, 3);
    read_head(2, 0);
    read_head(4, 3);
    rd(REG_HEAD, d);   check(!d[31], "empty again");
    check(dones == 3, "three dones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Window page writes reach the coefficient port.
  always @(posedge clk) if (coef_we) check(coef_addr == 4'd5 && coef_wdata == 18'h1234, "coefficient write");

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
