// workload_reflect_tree_tb: the tree-reflection application on the
// multi-cache system: four parallel units, each with two private caches (tree
// nodes and traversal stack) and one coherent cache for a shared running
// minimum, guarded by the lock (P = 4, NPRIV = 2, NCOH = 1).
//
// Each unit owns a random binary search tree of TREE_NODES nodes in its
// private tree region. Node n (n >= 1) keeps its key, left and right child
// pointers in words 3n, 3n+1 and 3n+2; 0 is the null pointer. The unit first
// writes its tree through its tree interface. It then traverses the tree
// depth first with an explicit stack in its private stack region: pop a node,
// read key and children, swap the two child pointers of every node with an
// odd key, fold the key into the running minimum under the lock (request,
// wait for the grant, read, write if smaller, release), and push the
// non-null children. All four units traverse at the same time.
//
// The private caches have custom sizes: large tree caches, small stack
// caches. Checks: every read returns the reference image; after a flush every
// tree node in off-chip memory holds its key and its children, swapped
// exactly where the key is odd (worked out from the tree the test built, not
// from the bus traffic), and the shared minimum equals the smallest key of
// all trees. The private hit and access counters must equal those of a
// direct-mapped model driven with the same address trace. Private hits and
// misses, write-backs, coherent misses, snoop write-backs, invalidations,
// lock waits, coherent requests held off until the grant and memory-port
// conflicts must all occur.
// Stimulus changes on the falling clock edge.
module workload_reflect_tree_tb;
  import mc_pkg::*;

  localparam int unsigned P = 4, NPRIV = 2, NCOH = 1, NI = P * (NPRIV + NCOH), NP = P * NPRIV;
  localparam int unsigned ID_W = $clog2(NI), OFF_AW = ID_W + ADDR_W;
  localparam int unsigned TREE_NODES = 1000;    // nodes per unit
  localparam int unsigned KEY_MAX    = 1000000;
  localparam int unsigned K_TR = 0, K_ST = 1;
  // per cache: unit p tree cache = entry 2p, stack cache = entry 2p+1
  localparam int unsigned LINES [P*NPRIV] = '{256, 16, 512, 8, 128, 32, 256, 16};

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

  multi_cache_top #(.P(P), .NPRIV(NPRIV), .NCOH(NCOH), .PRIV_LINES(LINES)) dut (.*);


  offchip_mem_model #(.AW(OFF_AW), .ID_W(ID_W), .LATENCY(12)) u_mem (
    .clk, .rst_n,
    .req_valid(off_req_valid), .req_ready(off_req_ready), .req_we(off_req_we),
    .req_addr(off_req_addr), .req_wdata(off_req_wdata), .req_id(off_req_id),
    .rsp_valid(off_rsp_valid), .rsp_id(off_rsp_id), .rsp_rdata(off_rsp_rdata)
  );

  int checks = 0, failures = 0;
  data_t refm [logic [OFF_AW-1:0]];
  longint unsigned cyc = 0;
  // direct-mapped model of every private cache
  logic        mv   [NP][];
  addr_t       mtag [NP][];
  int unsigned m_hits = 0, m_acc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [OFF_AW-1:0] full_addr(int i, addr_t a);
    int region = (i < int'(NP)) ? i : int'(NP);
    return {ID_W'(region), a};
  endfunction

  function automatic data_t ref_read(logic [OFF_AW-1:0] fa);
    if (refm.exists(fa)) return refm[fa];
    return tb_pkg::init_word(64'(fa));
  endfunction

  // direct-mapped hit model: hit if the line holds this block; then it does
  function automatic void model_access(int i, addr_t a);
    int unsigned idx, lines;
    addr_t       tg;
    if (i >= int'(NP)) return;
    lines = LINES[i];
    idx   = 32'(a) % lines;
    tg    = addr_t'(32'(a) / lines);
    m_acc++;
    if (mv[i][idx] && mtag[i][idx] == tg) m_hits++;
    mv[i][idx]   = 1'b1;
    mtag[i][idx] = tg;
  endfunction

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

  // the trees as built, per unit: key, left, right of node n
  int unsigned tkey   [P][TREE_NODES+1];
  int unsigned tleft  [P][TREE_NODES+1];
  int unsigned tright [P][TREE_NODES+1];
  int unsigned min_key = '1;
  int n_held_off = 0, n_swaps = 0;

  // count coherent requests that wait for the lock grant
  always @(negedge clk) if (rst_n)
    for (int p = 0; p < int'(P); p++)
      if (bus_req_write[NP + p] && !bus_req_full_n[NP + p] && !lock_grant[p]) n_held_off++;

  // random binary search tree of unit p, in the test's own arrays
  function automatic void make_tree(int p);
    for (int n = 1; n <= int'(TREE_NODES); n++) begin
      automatic int unsigned k = $urandom % KEY_MAX;
      automatic int unsigned cur = 1;
      tkey[p][n] = k;
      tleft[p][n] = 0;
      tright[p][n] = 0;
      if (k < min_key) min_key = k;
      if (n > 1)
        forever begin
          if (k < tkey[p][cur]) begin
            if (tleft[p][cur] == 0) begin tleft[p][cur] = n; break; end
            cur = tleft[p][cur];
          end else begin
            if (tright[p][cur] == 0) begin tright[p][cur] = n; break; end
            cur = tright[p][cur];
          end
        end
    end
  endfunction

  task automatic build(int p);
    int i_tr = p * NPRIV + K_TR;
    for (int n = 1; n <= int'(TREE_NODES); n++) begin
      bus_write(i_tr, addr_t'(3 * n),     data_t'(tkey[p][n]));
      bus_write(i_tr, addr_t'(3 * n + 1), data_t'(tleft[p][n]));
      bus_write(i_tr, addr_t'(3 * n + 2), data_t'(tright[p][n]));
    end
  endtask

  task automatic traverse(int p);
    int    i_tr = p * NPRIV + K_TR, i_st = p * NPRIV + K_ST, i_ci = NP + p;
    int    sp = 0;
    data_t v, key, l, r;
    bus_write(i_st, '0, data_t'(1));   // push the root
    sp = 1;
    while (sp > 0) begin
      automatic addr_t n;
      sp--;
      bus_read(i_st, addr_t'(sp), v);
      n = addr_t'(v);
      bus_read(i_tr, 3 * n,     key);
      bus_read(i_tr, 3 * n + 1, l);
      bus_read(i_tr, 3 * n + 2, r);
      if (key[0]) begin
        bus_write(i_tr, 3 * n + 1, r);
        bus_write(i_tr, 3 * n + 2, l);
        n_swaps++;
      end
      lock_req[p] = 1'b1;
      bus_read(i_ci, '0, v);            // held off until the grant
      if (key < v) bus_write(i_ci, '0, key);
      lock_req[p] = 1'b0;
      if (l != '0) begin
        bus_write(i_st, addr_t'(sp), l);
        sp++;
      end
      if (r != '0) begin
        bus_write(i_st, addr_t'(sp), r);
        sp++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < int'(NI); i++) begin
      bus_req_write[i] = 1'b0; bus_req_din[i] = 1'b0; bus_address[i] = '0;
      bus_dataout[i] = '0; bus_rsp_read[i] = 1'b0;
    end
    for (int i = 0; i < int'(NP); i++) begin
      mv[i]   = new[LINES[i]];
      mtag[i] = new[LINES[i]];
      foreach (mv[i][j]) begin
        mv[i][j] = 1'b0;
        mtag[i][j] = '0;
      end
    end
    for (int p = 0; p < int'(P); p++) make_tree(p);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // running minimum starts at the largest value (unit 0, under the lock)
    lock_req[0] = 1'b1;
    bus_write(NP, '0, '1);
    lock_req[0] = 1'b0;
    fork
      build(0);
      build(1);
      build(2);
      build(3);
    join
    fork
      traverse(0);
      traverse(1);
      traverse(2);
      traverse(3);
    join
    repeat (40) @(negedge clk);
    check(stat_priv_accesses == m_acc, $sformatf("accesses %0d, model %0d", stat_priv_accesses, m_acc));
    check(stat_priv_hits == m_hits,    $sformatf("hits %0d, model %0d", stat_priv_hits, m_hits));
    flush_req = 1'b1;
    while (!flush_done) @(negedge clk);
    flush_req = 1'b0;
    @(negedge clk);
    foreach (refm[a]) check(u_mem.peek(a) == refm[a], $sformatf("off-chip word %h after flush", a));
    // the reflected trees, from the trees as built
    for (int p = 0; p < int'(P); p++)
      for (int n = 1; n <= int'(TREE_NODES); n++) begin
        automatic bit sw = tkey[p][n][0];
        automatic data_t k = u_mem.peek(full_addr(p * NPRIV + K_TR, addr_t'(3 * n)));
        automatic data_t l = u_mem.peek(full_addr(p * NPRIV + K_TR, addr_t'(3 * n + 1)));
        automatic data_t r = u_mem.peek(full_addr(p * NPRIV + K_TR, addr_t'(3 * n + 2)));
        check(k == data_t'(tkey[p][n]), $sformatf("unit %0d node %0d key", p, n));
        check(l == (sw ? data_t'(tright[p][n]) : data_t'(tleft[p][n])) &&
              r == (sw ? data_t'(tleft[p][n]) : data_t'(tright[p][n])),
              $sformatf("unit %0d node %0d children %0d %0d", p, n, l, r));
      end
    check(u_mem.peek(full_addr(NP, '0)) == data_t'(min_key),
          $sformatf("running minimum %0d, expected %0d", u_mem.peek(full_addr(NP, '0)), min_key));
    check(stat_priv_hits > 0,                  "private cache hits");
    check(stat_priv_accesses > stat_priv_hits, "private cache misses");
    check(stat_writebacks > 0,                 "dirty write-backs");
    check(stat_coh_accesses > stat_coh_hits,   "coherent misses");
    check(stat_snoop_wbs > 0,                  "snoop write-backs");
    check(stat_invalidations > 0,              "invalidations");
    check(stat_lock_waits > 0,                 "lock contention");
    check(n_held_off > 0,                      "coherent requests held off until the grant");
    check(stat_mem_conflicts > 0,              "memory-port conflicts");
    check(n_swaps > 0,                         "child swaps");
    $display("cycles=%0d private hit rate=%0d/%0d (model %0d/%0d) coherent hits=%0d/%0d swaps=%0d",
             cyc, stat_priv_hits, stat_priv_accesses, m_hits, m_acc, stat_coh_hits, stat_coh_accesses, n_swaps);
    $display("write-backs=%0d snoop write-backs=%0d invalidations=%0d lock waits=%0d held off=%0d conflicts=%0d",
             stat_writebacks, stat_snoop_wbs, stat_invalidations, stat_lock_waits, n_held_off, stat_mem_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
