// hls_bus_bridge_tb: a kernel model drives the FIFO-style bus with random
// reads and writes of 3-word data items (WORDS = 3, so every access is split
// into three line-sized chunks); a cache model answers after a random delay.
// Checks: each item becomes three cache requests at item address x 3 + 0, 1,
// 2 with the matching write chunk, the first one cycle after the push; the
// assembled read data returns to the kernel; writes need no pop; the bridge
// refuses requests while enable is low and while a request is outstanding;
// idle is low exactly while a request is outstanding.
// Stimulus changes on the falling clock edge.
module hls_bus_bridge_tb;
  import mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned WORDS = 3, BW = WORDS * DATA_W;

  logic       enable = 1'b1;
  logic       req_write = 1'b0, req_din = 1'b0, rsp_read = 1'b0;
  addr_t      address = '0;
  logic [BW-1:0] dataout = '0;
  logic       req_full_n, rsp_empty_n, idle;
  logic [BW-1:0] datain;
  logic       c_req_valid, c_req_ready = 1'b0;
  cache_req_t c_req;
  logic       c_rsp_valid = 1'b0;
  data_t      c_rsp_rdata = '0;

  hls_bus_bridge #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0;
  cache_req_t exp_q [$];

  function automatic data_t cache_word(addr_t a);
    return {10'h2A5, a, 32'hC0FFEE00 ^ 32'(a)};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // cache model: accept after a random delay, answer after another one
  initial begin
    forever begin
      @(negedge clk);
      if (c_req_valid && rst_n) begin
        automatic cache_req_t r = c_req;
        repeat ($urandom % 3) @(negedge clk);
        c_req_ready = 1'b1;
        @(negedge clk);
        c_req_ready = 1'b0;
        check(exp_q.size() > 0 && r == exp_q[0], "request reaches the cache unchanged");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        repeat ($urandom % 5) begin
          check(!idle && !req_full_n, "busy while a request is outstanding");
          @(negedge clk);
        end
        c_rsp_valid = 1'b1;
        c_rsp_rdata = r.we ? '0 : cache_word(r.addr);
        @(negedge clk);
        c_rsp_valid = 1'b0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      automatic bit    we = 1'($urandom % 2);
      automatic addr_t a  = addr_t'($urandom);
      automatic logic [BW-1:0] v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      automatic logic [BW-1:0] rd;
      // occasionally hold the bridge off, as the lock does
      if ($urandom % 5 == 0) begin
        enable = 1'b0;
        repeat (2) begin
          @(negedge clk);
          check(!req_full_n, "no acceptance while disabled");
          n_stall++;
        end
        enable = 1'b1;
      end
      while (!req_full_n) @(negedge clk);
      check(idle, "idle before a new request");
      req_write = 1'b1; req_din = we; address = a; dataout = v;
      for (int k = 0; k < int'(WORDS); k++) begin
        exp_q.push_back('{we: we, addr: addr_t'(32'(a) * WORDS + k), wdata: v[k*DATA_W +: DATA_W]});
        rd[k*DATA_W +: DATA_W] = cache_word(addr_t'(32'(a) * WORDS + k));
      end
      @(negedge clk);
      req_write = 1'b0;
      check(c_req_valid, "request forwarded one cycle after the push");
      if (!we) begin
        while (!rsp_empty_n) @(negedge clk);
        check(datain == rd, $sformatf("read data %h", datain));
        rsp_read = 1'b1;
        @(negedge clk);
        rsp_read = 1'b0;
      end else begin
        while (!idle) begin
          check(!rsp_empty_n, "no read data for a write");
          @(negedge clk);
        end
      end
    end
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all requests reached the cache");
    check(n_stall > 0, "enable stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
