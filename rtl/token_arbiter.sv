// token_arbiter: fair arbitration of the shared FFT engine between the input
// buffers.
//
// A token circulates over the requesters. When the engine is free
// (`ready`), the first requester found starting at the token holder is
// acknowledged with a one-cycle `ack` pulse and the token moves to the
// requester after it, so every channel gets the engine at most once before
// each other waiting channel has had its turn. This keeps the scheme fair and
// free of lock-up under any load. The request/acknowledge pairing and the
// token-passing rule follow the description of the design; the search order
// and the one-cycle acknowledge are this implementation's choices.
//
// Timing: `ack` is registered; at most one bit is set. After an acknowledge
// the arbiter waits until it has seen `ready` low (the engine has taken the
// frame) before it acknowledges again, so the delay between `ack` and the
// engine leaving its idle state may be any number of clocks.
module token_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,    // a buffer has a frame ready
  input  logic         ready,  // shared engine can take a new frame
  output logic [N-1:0] ack,    // one-hot, one cycle
  output logic [$clog2(N)-1:0] grant_idx // index of the acknowledged requester
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] token;
  logic [IW-1:0] pick;
  logic          found;
  logic          busy;   // acknowledge given; waiting for ready to fall

  always_comb begin
    found = 1'b0;
    pick  = token;
    for (int unsigned i = 0; i < N; i++) begin
      logic [IW-1:0] c;
      c = IW'((32'(token) + i) % N);
      if (!found && req[c]) begin
        found = 1'b1;
        pick  = c;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      token     <= '0;
      ack       <= '0;
      grant_idx <= '0;
      busy      <= 1'b0;
    end else begin
      ack <= '0;
      if (!ready) busy <= 1'b0;
      if (ready && found && !busy) begin
        ack[pick] <= 1'b1;
        grant_idx <= pick;
        token     <= IW'((32'(pick) + 1) % N);
        busy      <= 1'b1;
      end
    end
  end

  // At most one requester is acknowledged at a time.
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(ack));
endmodule
