// cache_bank_store_tb: random reads and writes against a reference array.
// Stimulus changes on the falling clock edge. Checks every read value and that each read answers exactly 3 cycles after
// its request, including back-to-back requests to alternating banks.
module cache_bank_store_tb;
  localparam int unsigned LINES = 64, NBANKS = 4, W = 40, LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req_valid = 1'b0, req_we = 1'b0;
  logic [5:0]   req_idx = '0;
  logic [W-1:0] req_wentry = '0;
  logic         rsp_valid;
  logic [W-1:0] rsp_entry;

  cache_bank_store #(.LINES(LINES), .NBANKS(NBANKS), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [LINES];
  // expected responses: value and cycle
  logic [W-1:0] exp_q [$];
  // reads seen on the request port, delayed by the expected latency
  logic [LAT-1:0] rd_pipe = '0;

  always @(posedge clk) begin
    rd_pipe <= {rd_pipe[LAT-2:0], req_valid && !req_we};
    if (rst_n && (rsp_valid != rd_pipe[LAT-1])) begin
      checks++; failures++;
      $display("response timing wrong: rsp_valid=%b expected=%b", rsp_valid, rd_pipe[LAT-1]);
    end
    if (rst_n && rsp_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected response");
      end else begin
        if (rsp_entry !== exp_q[0]) begin
          failures++;
          $display("mismatch: got %h, want %h", rsp_entry, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  task automatic issue(bit we, int idx, logic [W-1:0] v);
    req_valid  = 1'b1;
    req_we     = we;
    req_idx    = 6'(idx);
    req_wentry = v;
    if (we) ref_mem[idx] = v;
    else exp_q.push_back(ref_mem[idx]);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < LINES; i++) issue(1'b1, i, {$urandom, 8'(i)});
    for (int n = 0; n < 2000; n++) begin
      automatic int idx = $urandom % LINES;
      if ($urandom % 3 == 0) issue(1'b1, idx, {$urandom, 8'($urandom)});
      else                   issue(1'b0, idx, '0);
      if ($urandom % 4 == 0) @(negedge clk);
    end
    // read right after a write to the same line
    issue(1'b1, 5, 40'h12_3456_789A);
    issue(1'b0, 5, '0);
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
