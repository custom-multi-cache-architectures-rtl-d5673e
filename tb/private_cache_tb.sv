// private_cache_tb: random reads and writes from one kernel through a small
// private cache to the behavioural off-chip memory.
//
// Checks: every read returns the value of a reference memory; every access is
// a hit or miss exactly as a shadow tag array of a direct-mapped cache
// predicts (the same model that the hit-rate estimator uses); a miss
// evicting a dirty line writes it back; hits answer after HIT_LAT cycles;
// after a flush the off-chip memory equals the reference memory.
// Stimulus changes on the falling clock edge.
module private_cache_tb;
  import mc_pkg::*;

  localparam int unsigned LINES   = 16;
  localparam int unsigned SPAN    = 96;   // addresses used: 6 per line on average
  localparam int unsigned HIT_LAT = 4;    // falling edges from request to answer
  localparam int unsigned IDX_W   = $clog2(LINES);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_valid = 1'b0, req_ready;
  cache_req_t req = '0;
  logic       rsp_valid;
  data_t      rsp_rdata;
  logic       mem_req_valid, mem_req_ready;
  mem_req_t   mem_req;
  logic       mem_rsp_valid;
  data_t      mem_rsp_rdata;
  logic       flush_req = 1'b0, flush_ack;
  logic       ev_hit, ev_miss, ev_wb;
  logic       unused_id;

  private_cache #(.LINES(LINES), .NBANKS(4)) dut (.*);

  offchip_mem_model #(.AW(ADDR_W), .ID_W(1), .LATENCY(6)) u_mem (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req.we),
    .req_addr(mem_req.addr), .req_wdata(mem_req.wdata), .req_id(1'b0),
    .rsp_valid(mem_rsp_valid), .rsp_id(unused_id), .rsp_rdata(mem_rsp_rdata)
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0;
  data_t ref_mem [SPAN];
  logic  sh_valid [LINES];
  logic  sh_dirty [LINES];
  addr_t sh_addr  [LINES];

  always @(posedge clk) if (rst_n) begin
    if (ev_hit)  n_hit++;
    if (ev_miss) n_miss++;
    if (ev_wb)   n_wb++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(bit we, int a, data_t v);
    int    idx = a % LINES;
    bit    exp_hit = sh_valid[idx] && sh_addr[idx] == addr_t'(a);
    bit    exp_wb  = !exp_hit && sh_valid[idx] && sh_dirty[idx];
    int    wait_n = 0;
    int    hits0 = n_hit, wb0 = n_wb;
    req_valid = 1'b1;
    req       = '{we: we, addr: addr_t'(a), wdata: v};
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    wait_n = 1;
    while (!rsp_valid) begin
      @(negedge clk);
      wait_n++;
    end
    if (!we) check(rsp_rdata == ref_mem[a], $sformatf("read %0d: got %h want %h", a, rsp_rdata, ref_mem[a]));
    else     ref_mem[a] = v;
    @(negedge clk);
    check((n_hit - hits0) == int'(exp_hit), $sformatf("hit/miss of %0d: hit=%0d expected %0d", a, n_hit - hits0, exp_hit));
    check((n_wb - wb0) == int'(exp_wb), $sformatf("write-back on access to %0d", a));
    if (exp_hit) check(wait_n == HIT_LAT, $sformatf("hit latency %0d, expected %0d", wait_n, HIT_LAT));
    sh_valid[idx] = 1'b1;
    sh_addr[idx]  = addr_t'(a);
    sh_dirty[idx] = (exp_hit && sh_dirty[idx]) || we;
  endtask

  initial begin
    for (int a = 0; a < SPAN; a++) ref_mem[a] = tb_pkg::init_word(64'(a));
    for (int i = 0; i < LINES; i++) begin
      sh_valid[i] = 1'b0; sh_dirty[i] = 1'b0; sh_addr[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // stack-like phase: pushes and pops near the head, high locality
    for (int n = 0; n < 300; n++) begin
      automatic int top = 8 + ($urandom % 8);
      access(1'($urandom % 2), top, {$urandom, $urandom});
    end
    // scattered phase: conflicts and dirty evictions
    for (int n = 0; n < 1500; n++) begin
      automatic int a = $urandom % SPAN;
      access(($urandom % 3) == 0, a, {$urandom, $urandom});
    end
    // flush and compare the whole off-chip image
    flush_req = 1'b1;
    while (!flush_ack) @(negedge clk);
    flush_req = 1'b0;
    repeat (2) @(negedge clk);
    for (int a = 0; a < SPAN; a++)
      check(u_mem.peek(ADDR_W'(a)) == ref_mem[a], $sformatf("memory word %0d after flush", a));
    // after the flush all lines are clean: a conflicting miss writes nothing back
    check(n_hit > 100 && n_miss > 100 && n_wb > 50, "hits, misses and write-backs all occurred");
    $display("hits=%0d misses=%0d write-backs=%0d", n_hit, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
