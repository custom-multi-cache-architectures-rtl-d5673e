// multi_cache_top_tb: end-to-end run of the hybrid multi-cache system at its
// default configuration (4 parallel units, 3 private caches and 1 coherent
// cache each, 1 kB per cache), driven by four kernel models that mimic the
// parallelised K-means filtering loop.
//
// Each unit repeatedly pops a stack record (private cache ST), reads a tree
// node (private cache TR, a region much larger than the cache), reads and
// writes a candidate-center set (private cache CS), and either pushes two new
// stack records or, at a dead end, adds its contribution w to a centroid
// accumulator in the shared region: it raises its lock request, waits for the
// grant, reads the accumulator, writes back the sum and drops the request.
//
// Checks: every read returns what the reference image holds; every shared
// read inside the critical section sees the latest sum; after the run and a
// flush, the off-chip image equals the reference image and each accumulator
// holds the sum of all contributions. The test also counts each mechanism of
// the design and fails if one never happened: private hits and misses, dirty
// write-backs, coherent misses, snoop write-backs, invalidations, lock waits,
// coherent requests held off until the grant, memory-port conflicts and the
// flush. The private hit and access counters must equal those of a
// direct-mapped model fed with the same address trace.
// Stimulus changes on the falling clock edge.
module multi_cache_top_tb;
  import mc_pkg::*;

  localparam int unsigned P = 4, NPRIV = 3, NI = P * (NPRIV + 1);
  localparam int unsigned ID_W = $clog2(NI), OFF_AW = ID_W + ADDR_W;
  localparam int unsigned K_CS = 0, K_ST = 1, K_TR = 2;
  localparam int unsigned ITERS     = 300;  // loop iterations per unit
  localparam int unsigned TREE_SPAN = 1024; // tree words per unit
  localparam int unsigned CS_SPAN   = 64;
  localparam int unsigned NACC      = 4;    // centroid accumulators

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              bus_req_write   [NI];
  logic              bus_req_full_n  [NI];
  logic              bus_req_din     [NI];
  addr_t             bus_address     [NI];
  data_t             bus_dataout     [NI];
  logic              bus_rsp_empty_n [NI];
  logic              bus_rsp_read    [NI];
  data_t             bus_datain      [NI];
  logic [P-1:0]      lock_req = '0;
  logic [P-1:0]      lock_grant;
  logic              off_req_valid, off_req_ready, off_req_we;
  logic [OFF_AW-1:0] off_req_addr;
  data_t             off_req_wdata, off_rsp_rdata;
  logic [ID_W-1:0]   off_req_id, off_rsp_id;
  logic              off_rsp_valid;
  logic              flush_req = 1'b0, flush_done;
  logic [31:0]       stat_priv_hits, stat_priv_accesses, stat_coh_hits, stat_coh_accesses;
  logic [31:0]       stat_writebacks, stat_snoop_wbs, stat_invalidations;
  logic [31:0]       stat_lock_waits, stat_mem_conflicts;

  multi_cache_top dut (.*);

  offchip_mem_model #(.AW(OFF_AW), .ID_W(ID_W), .LATENCY(12)) u_mem (
    .clk, .rst_n,
    .req_valid(off_req_valid), .req_ready(off_req_ready), .req_we(off_req_we),
    .req_addr(off_req_addr), .req_wdata(off_req_wdata), .req_id(off_req_id),
    .rsp_valid(off_rsp_valid), .rsp_id(off_rsp_id), .rsp_rdata(off_rsp_rdata)
  );

  int checks = 0, failures = 0;
  int n_held_off = 0, n_flush = 0;
  data_t refm [logic [OFF_AW-1:0]];
  data_t acc_sum [NACC];
  longint unsigned cyc = 0;

  // direct-mapped model of every private cache (all 128 lines)
  logic        mv   [P*NPRIV][128];
  addr_t       mtag [P*NPRIV][128];
  int unsigned m_hits = 0, m_acc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // direct-mapped hit model: hit if the line holds this block; then it does
  function automatic void model_access(int i, addr_t a);
    if (i >= int'(P * NPRIV)) return;
    m_acc++;
    if (mv[i][a % 128] && mtag[i][a % 128] == a / 128) m_hits++;
    mv[i][a % 128]   = 1'b1;
    mtag[i][a % 128] = a / 128;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [OFF_AW-1:0] full_addr(int i, addr_t a);
    int region = (i < int'(P * NPRIV)) ? i : int'(P * NPRIV);
    return {ID_W'(region), a};
  endfunction

  // random value below m
  function automatic data_t rnd(int unsigned m);
    int unsigned r = $urandom % m;
    return data_t'(r);
  endfunction

  function automatic data_t ref_read(logic [OFF_AW-1:0] fa);
    if (refm.exists(fa)) return refm[fa];
    return tb_pkg::init_word(64'(fa));
  endfunction

  // count coherent requests that wait for the lock grant
  always @(negedge clk) if (rst_n)
    for (int p = 0; p < int'(P); p++)
      if (bus_req_write[P * NPRIV + p] && !bus_req_full_n[P * NPRIV + p] && !lock_grant[p]) n_held_off++;

  // one bus read on interface i, checked against the reference image
  task automatic bus_read(int i, addr_t a, output data_t v);
    model_access(i, a);
    bus_req_write[i] = 1'b1;
    bus_req_din[i]   = 1'b0;
    bus_address[i]   = a;
    while (!bus_req_full_n[i]) @(negedge clk);
    @(negedge clk);
    bus_req_write[i] = 1'b0;
    while (!bus_rsp_empty_n[i]) @(negedge clk);
    v = bus_datain[i];
    check(v == ref_read(full_addr(i, a)), $sformatf("interface %0d read %0d: got %h want %h", i, a, v, ref_read(full_addr(i, a))));
    bus_rsp_read[i] = 1'b1;
    @(negedge clk);
    bus_rsp_read[i] = 1'b0;
  endtask

  // one posted bus write on interface i
  task automatic bus_write(int i, addr_t a, data_t v);
    model_access(i, a);
    bus_req_write[i] = 1'b1;
    bus_req_din[i]   = 1'b1;
    bus_address[i]   = a;
    bus_dataout[i]   = v;
    while (!bus_req_full_n[i]) @(negedge clk);
    refm[full_addr(i, a)] = v;
    @(negedge clk);
    bus_req_write[i] = 1'b0;
  endtask

  task automatic unit(int p);
    int    i_cs = p * NPRIV + K_CS, i_st = p * NPRIV + K_ST, i_tr = p * NPRIV + K_TR;
    int    i_ci = P * NPRIV + p;
    int    sp = 0;
    data_t v;
    // root record
    bus_write(i_st, addr_t'(sp), rnd(TREE_SPAN));
    sp++;
    for (int it = 0; it < int'(ITERS); it++) begin
      automatic int node;
      automatic int cs;
      if (sp == 0) begin
        bus_write(i_st, '0, rnd(TREE_SPAN));
        sp = 1;
      end
      // pop
      sp--;
      bus_read(i_st, addr_t'(sp), v);
      node = int'(v % 64'(TREE_SPAN));
      // tree node
      bus_read(i_tr, addr_t'(node), v);
      if ($urandom % 8 == 0) bus_write(i_tr, addr_t'(node), {$urandom, $urandom});
      // candidate centers: read one set, write a new one
      cs = $urandom % CS_SPAN;
      bus_read(i_cs, addr_t'(cs), v);
      bus_write(i_cs, addr_t'(($urandom % CS_SPAN)), v ^ data_t'(it));
      if (($urandom % 3 != 0) && sp < 40) begin
        // push left and right children
        bus_write(i_st, addr_t'(sp), rnd(TREE_SPAN));
        bus_write(i_st, addr_t'(sp + 1), rnd(TREE_SPAN));
        sp += 2;
      end else begin
        // dead end: update the shared centroid information under the lock
        automatic int    z = $urandom % NACC;
        automatic data_t w = rnd(1000);
        lock_req[p] = 1'b1;
        bus_read(i_ci, addr_t'(z), v);      // held off until the grant
        bus_write(i_ci, addr_t'(z), v + w);
        acc_sum[z] += w;
        lock_req[p] = 1'b0;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < int'(P * NPRIV); i++)
      for (int j = 0; j < 128; j++) begin
        mv[i][j]   = 1'b0;
        mtag[i][j] = '0;
      end
    for (int i = 0; i < int'(NI); i++) begin
      bus_req_write[i] = 1'b0; bus_req_din[i] = 1'b0; bus_address[i] = '0;
      bus_dataout[i] = '0; bus_rsp_read[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // clear the accumulators (unit 0, under the lock)
    lock_req[0] = 1'b1;
    for (int z = 0; z < int'(NACC); z++) begin
      bus_write(P * NPRIV, addr_t'(z), '0);
      acc_sum[z] = '0;
    end
    lock_req[0] = 1'b0;
    repeat (4) @(negedge clk);
    fork
      unit(0);
      unit(1);
      unit(2);
      unit(3);
    join
    // wait for the last posted writes, then flush every cache
    // (the coherent bridges refuse requests while the lock is free, so only
    // the private ones are polled)
    for (int i = 0; i < int'(P * NPRIV); i++) while (!bus_req_full_n[i]) @(negedge clk);
    repeat (20) @(negedge clk);
    check(stat_priv_accesses == m_acc, $sformatf("accesses %0d, model %0d", stat_priv_accesses, m_acc));
    check(stat_priv_hits == m_hits,    $sformatf("hits %0d, model %0d", stat_priv_hits, m_hits));
    flush_req = 1'b1;
    while (!flush_done) @(negedge clk);
    n_flush++;
    flush_req = 1'b0;
    @(negedge clk);
    // compare the off-chip image
    foreach (refm[a]) check(u_mem.peek(a) == refm[a], $sformatf("off-chip word %h after flush", a));
    for (int z = 0; z < int'(NACC); z++)
      check(u_mem.peek(full_addr(P * NPRIV, addr_t'(z))) == acc_sum[z],
            $sformatf("accumulator %0d: %0d, expected %0d", z, u_mem.peek(full_addr(P * NPRIV, addr_t'(z))), acc_sum[z]));
    // every mechanism must have happened
    check(stat_priv_hits > 0,                          "private cache hits");
    check(stat_priv_accesses > stat_priv_hits,         "private cache misses");
    check(stat_writebacks > 0,                         "dirty write-backs");
    check(stat_coh_accesses > stat_coh_hits,           "coherent misses");
    check(stat_snoop_wbs > 0,                          "snoop write-backs");
    check(stat_invalidations > 0,                      "invalidations");
    check(stat_lock_waits > 0,                         "lock contention");
    check(n_held_off > 0,                              "coherent requests held off until the grant");
    check(stat_mem_conflicts > 0,                      "memory-port conflicts");
    check(n_flush == 1,                                "flush completed");
    $display("cycles=%0d private hit rate=%0d/%0d coherent hits=%0d/%0d", cyc,
             stat_priv_hits, stat_priv_accesses, stat_coh_hits, stat_coh_accesses);
    $display("write-backs=%0d snoop write-backs=%0d invalidations=%0d lock waits=%0d held off=%0d conflicts=%0d",
             stat_writebacks, stat_snoop_wbs, stat_invalidations, stat_lock_waits, n_held_off, stat_mem_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
