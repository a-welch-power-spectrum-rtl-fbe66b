// tb_token_arbiter: checks the token-passing arbiter against a reference
// model of the rule "grant the first requester at or after the token holder,
// then pass the token to the next one", with a simple engine model that
// drops `ready` a few clocks after each acknowledge and raises it again
// after a busy period. It checks that acknowledges are one-hot, that they
// only go to requesters, that no second acknowledge is given before the
// engine took the first, and that under permanent requests from all
// channels the grants rotate 0,1,2,3,0,... (fairness).
module tb_token_arbiter;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0, ack;
  logic ready = 1;
  logic [1:0] grant_idx;

  token_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Engine model: after an ack, ready stays high for 2 more edges, then low
  // for `busy_len` edges.
  int busy_left = 0, delay_left = -1, busy_len = 7;
  int model_token = 0;
  bit model_wait = 0;
  int grants [N];
  int last_grant = -1;
  bit all_req_phase = 0;

  always @(posedge clk) if (!rst) begin
    // Check the acknowledge given in the previous clock against the model.
    int exp_pick = -1;
    if (ack != '0) begin
      check($onehot(ack), "ack one-hot");
      check(ack[grant_idx], "grant_idx matches ack");
      grants[grant_idx]++;
      if (all_req_phase && last_grant >= 0)
        check(int'(grant_idx) == (last_grant + 1) % N, "rotation under full load");
      last_grant = grant_idx;
      delay_left = 2;
    end
    // Engine model.
    if (delay_left == 0) begin ready <= 0; busy_left = busy_len; delay_left = -1; end
    else if (delay_left > 0) delay_left--;
    else if (busy_left > 0) begin busy_left--; if (busy_left == 0) ready <= 1; end
  end

  // Reference decision for the edge: sampled on the same signals as the DUT.
  always @(posedge clk) if (!rst) begin
    automatic int pick = -1;
    if (!ready) model_wait = 0;
    if (ready && !model_wait) begin
      for (int i = 0; i < N; i++)
        if (pick < 0 && req[(model_token + i) % N]) pick = (model_token + i) % N;
    end
    #1;
    if (pick >= 0) begin
      check(ack == N'(1 << pick), $sformatf("expected ack %0d got %b", pick, ack));
      model_token = (pick + 1) % N;
      model_wait = 1;
    end else begin
      check(ack == '0, $sformatf("unexpected ack %b", ack));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Phase 1: all channels request permanently.
    all_req_phase = 1;
    req = '1;
    repeat (400) @(posedge clk);
    all_req_phase = 0;
    // Phase 2: random requests, dropped once acknowledged.
    repeat (3000) begin
      @(posedge clk);
      #2;
      req = req & ~ack;
      if ($urandom_range(0, 3) == 0) req[$urandom_range(0, N - 1)] = 1'b1;
    end
    for (int i = 0; i < N; i++) check(grants[i] > 20, $sformatf("channel %0d served %0d", i, grants[i]));
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
