// lock_service_tb: four clients request, hold and release the lock at random.
// Checks on every cycle: at most one grant; a grant only goes to a unit that
// requested in the previous cycle; a free lock requested by a single unit is
// granted on the next edge; a new grant goes to the first requester after the
// previous owner in round-robin order; every client is served within a
// bound (no starvation); contention is reported.
// Stimulus changes on the falling clock edge.
module lock_service_tb;
  localparam int unsigned N = 4;
  localparam int unsigned MAX_HOLD = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0;
  logic [N-1:0] grant;
  logic         ev_contended;

  lock_service #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_contended = 0, n_grants = 0;
  logic [N-1:0] req_prev = '0, grant_prev = '0;
  int last_owner = N - 1;
  int waited [N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // monitor, sampling just before each rising edge
  always @(negedge clk) if (rst_n) begin
    check($countones(grant) <= 1, "at most one grant");
    check((grant & ~req_prev) == '0, "grant without request");
    if (grant != '0 && grant_prev == '0) begin
      automatic int g = $clog2(grant);
      n_grants++;
      // round robin: no requester between the previous owner and g was skipped
      for (int k = 1; k < N; k++) begin
        automatic int c = (last_owner + k) % N;
        if (c == g) break;
        check(!req_prev[c], $sformatf("unit %0d skipped when granting %0d", c, g));
      end
      last_owner = g;
    end
    for (int i = 0; i < N; i++) begin
      if (req[i] && !grant[i]) waited[i]++;
      else                     waited[i] = 0;
      check(waited[i] < int'(N * (MAX_HOLD + 4)), $sformatf("unit %0d starved", i));
    end
    if (ev_contended) n_contended++;
    req_prev   = req;
    grant_prev = grant;
  end

  task automatic client(int i, int rounds);
    for (int r = 0; r < rounds; r++) begin
      repeat ($urandom % 8) @(negedge clk);
      req[i] = 1'b1;
      @(negedge clk);
      while (!grant[i]) @(negedge clk);
      repeat (1 + $urandom % MAX_HOLD) @(negedge clk);
      req[i] = 1'b0;
      @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) waited[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // single requester on a free lock: granted one edge later
    req[2] = 1'b1;
    @(negedge clk);
    check(grant == 4'b0100, "free lock granted on the next edge");
    req[2] = 1'b0;
    repeat (3) @(negedge clk);
    fork
      client(0, 60);
      client(1, 60);
      client(2, 60);
      client(3, 60);
    join
    repeat (4) @(negedge clk);
    check(n_grants >= 4 * 60, $sformatf("all requests served (%0d grants)", n_grants));
    check(n_contended > 0, "contention happened");
    $display("grants=%0d contended_cycles=%0d", n_grants, n_contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
