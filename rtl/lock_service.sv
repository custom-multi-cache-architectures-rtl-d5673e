// lock_service: mutual-exclusion lock guarding one shared heap region.
//
// Each of the N parallel units raises req[i] to ask for the lock
// (requestLock), waits for grant[i] (waitForLock), and drops req[i] to give it
// back (releaseLock). At most one unit holds the grant. A free lock goes to the
// next requester after the last owner in round-robin order, so no unit can
// starve. Timing: a free lock is granted in the cycle after the request is
// seen (grant is a register); a released lock is free one cycle after req
// falls and is re-granted the cycle after that.
// The request/grant behaviour follows the lock-synchronised access of the
// evaluated system; the level-sensitive handshake and the round-robin order are
// this implementation's choices.
module lock_service #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic         ev_contended  // a request waited while the lock was held
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          held;
  logic [IW-1:0] owner, last;
  logic          pick_valid;
  logic [IW-1:0] pick;

  // round-robin choice, starting after the last owner
  always_comb begin
    pick_valid = 1'b0;
    pick       = '0;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] c;
      c = IW'((int'(last) + k) % N);
      if (!pick_valid && req[c]) begin
        pick_valid = 1'b1;
        pick       = IW'(c);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held         <= 1'b0;
      owner        <= '0;
      last         <= IW'(N - 1);
      grant        <= '0;
      ev_contended <= 1'b0;
    end else begin
      ev_contended <= held && ((req & ~(N'(1) << owner)) != '0);
      if (held) begin
        if (!req[owner]) begin
          held  <= 1'b0;
          grant <= '0;
        end
      end else if (pick_valid) begin
        held  <= 1'b1;
        owner <= pick;
        last  <= pick;
        grant <= N'(1) << pick;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
