// coherent_ring_tb: four coherent caches on a ring sharing one memory region
// through the memory arbiter and the behavioural off-chip memory.
//
// Phase 1 sends random reads and writes, one at a time, from random nodes to
// a small shared address range. Every read must return the last value
// written by any node. Phase 2 runs all nodes at once: each performs
// read-modify-write increments of shared counters inside a testbench-level
// critical section. The final counter values must equal the number of
// increments, which works only if each node sees its peers' latest writes.
// After a flush the off-chip image must match the reference. The test also
// checks the hit latency and that snoop write-backs, invalidations, upgrades
// and token waits all happened.
// Stimulus changes on the falling clock edge.
module coherent_ring_tb;
  import mc_pkg::*;

  localparam int unsigned P       = 4;
  localparam int unsigned LINES   = 8;
  localparam int unsigned SPAN    = 24;
  localparam int unsigned NCNT    = 4;    // shared counters in phase 2
  localparam int unsigned INCS    = 40;   // increments per node
  localparam int unsigned HIT_LAT = 4;
  localparam int unsigned ID_W    = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       req_valid [P];
  logic       req_ready [P];
  cache_req_t req       [P];
  logic       rsp_valid [P];
  data_t      rsp_rdata [P];
  logic       mem_req_valid [P];
  logic       mem_req_ready [P];
  mem_req_t   mem_req       [P];
  logic       mem_rsp_valid [P];
  data_t      mem_rsp_rdata [P];
  logic       flush_req = 1'b0;
  logic       flush_ack [P];
  logic       ev_hit [P], ev_miss [P], ev_wb [P], ev_snoop_wb [P], ev_inv [P];

  logic                    off_req_valid, off_req_ready, off_req_we;
  logic [ID_W+ADDR_W-1:0]  off_req_addr;
  data_t                   off_req_wdata, off_rsp_rdata;
  logic [ID_W-1:0]         off_req_id, off_rsp_id;
  logic                    off_rsp_valid, ev_conflict;

  coherent_ring #(.P(P), .LINES(LINES), .NBANKS(2)) dut (.*);

  mem_arbiter #(.N(P), .SHARED_FIRST(0)) u_arb (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata),
    .off_req_valid, .off_req_ready, .off_req_we, .off_req_addr, .off_req_wdata,
    .off_req_id, .off_rsp_valid, .off_rsp_id, .off_rsp_rdata, .ev_conflict
  );

  offchip_mem_model #(.AW(ID_W + ADDR_W), .ID_W(ID_W), .LATENCY(5)) u_mem (
    .clk, .rst_n,
    .req_valid(off_req_valid), .req_ready(off_req_ready), .req_we(off_req_we),
    .req_addr(off_req_addr), .req_wdata(off_req_wdata), .req_id(off_req_id),
    .rsp_valid(off_rsp_valid), .rsp_id(off_rsp_id), .rsp_rdata(off_rsp_rdata)
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_swb = 0, n_inv = 0, n_tokwait = 0, n_upg = 0;
  data_t ref_mem [SPAN];
  bit    cs_busy = 1'b0;   // testbench critical section for phase 2

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < P; i++) begin
      if (ev_hit[i])      n_hit++;
      if (ev_miss[i])     n_miss++;
      if (ev_snoop_wb[i]) n_swb++;
      if (ev_inv[i])      n_inv++;
    end
    if (dut.g_node[0].u_cache.want_tok) n_tokwait++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one access from node n; returns the read data and the cycles waited
  task automatic access(int n, bit we, int a, data_t v, output data_t rd, output int lat);
    req_valid[n] = 1'b1;
    req[n]       = '{we: we, addr: addr_t'(a), wdata: v};
    while (!req_ready[n]) @(negedge clk);
    @(negedge clk);
    req_valid[n] = 1'b0;
    lat = 1;
    while (!rsp_valid[n]) begin
      @(negedge clk);
      lat++;
    end
    rd = rsp_rdata[n];
    @(negedge clk);
  endtask

  task automatic node_incs(int n);
    for (int k = 0; k < INCS; k++) begin
      automatic int    c = 16 + int'(($urandom + n) % NCNT);
      automatic data_t v;
      automatic int    lat;
      while (cs_busy) @(negedge clk);
      cs_busy = 1'b1;
      access(n, 1'b0, c, '0, v, lat);
      access(n, 1'b1, c, v + 1, v, lat);
      cs_busy = 1'b0;
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < P; i++) begin
      req_valid[i] = 1'b0;
      req[i]       = '0;
    end
    for (int a = 0; a < SPAN; a++) ref_mem[a] = tb_pkg::init_word(64'(a));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // phase 1: sequential, random node, random op
    for (int k = 0; k < 1200; k++) begin
      automatic int    n  = $urandom % P;
      automatic int    a  = $urandom % SPAN;
      automatic bit    we = ($urandom % 3) == 0;
      automatic data_t v  = {$urandom, $urandom};
      automatic data_t rd;
      automatic int    lat;
      automatic int    h0 = n_hit;
      automatic int    up = n_miss;
      access(n, we, a, v, rd, lat);
      if (we) ref_mem[a] = v;
      else    check(rd == ref_mem[a], $sformatf("node %0d read %0d: got %h want %h", n, a, rd, ref_mem[a]));
      if (n_hit != h0) check(lat == HIT_LAT, $sformatf("hit latency %0d", lat));
      // same node, same address again: must now hit
      h0 = n_hit;
      access(n, we, a, v, rd, lat);
      check(n_hit == h0 + 1, $sformatf("repeat access of node %0d to %0d did not hit", n, a));
      if (!we) check(rd == ref_mem[a], "repeat read value");
      if (we && n_miss > up) n_upg++;
    end
    // phase 2: concurrent lock-protected increments of shared counters
    for (int c = 0; c < int'(NCNT); c++) begin
      automatic data_t rd;
      automatic int    lat;
      access(0, 1'b1, 16 + c, '0, rd, lat);
      ref_mem[16 + c] = '0;
    end
    fork
      node_incs(0);
      node_incs(1);
      node_incs(2);
      node_incs(3);
    join
    begin
      automatic data_t total = '0;
      for (int c = 0; c < int'(NCNT); c++) begin
        automatic data_t rd;
        automatic int    lat;
        access(c % P, 1'b0, 16 + c, '0, rd, lat);
        total += rd;
        ref_mem[16 + c] = rd;
      end
      check(total == data_t'(P * INCS), $sformatf("counter total %0d, expected %0d", total, P * INCS));
    end
    // flush and compare the off-chip image of the shared region (region 0)
    flush_req = 1'b1;
    begin
      automatic bit seen [P] = '{default: 1'b0};
      automatic bit all;
      do begin
        @(posedge clk);
        all = 1'b1;
        for (int i = 0; i < P; i++) begin
          if (flush_ack[i]) seen[i] = 1'b1;
          all &= seen[i];
        end
      end while (!all);
    end
    @(negedge clk);
    flush_req = 1'b0;
    for (int a = 0; a < SPAN; a++)
      check(u_mem.peek((ID_W + ADDR_W)'(a)) == ref_mem[a], $sformatf("memory word %0d after flush", a));
    check(n_swb > 0,     "snoop write-backs happened");
    check(n_inv > 0,     "invalidations happened");
    check(n_upg > 0,     "write misses happened");
    check(n_tokwait > 0, "token waits happened");
    $display("hits=%0d misses=%0d snoop_wbs=%0d invalidations=%0d", n_hit, n_miss, n_swb, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
