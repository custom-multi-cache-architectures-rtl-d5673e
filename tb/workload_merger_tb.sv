// workload_merger_tb: the linked-list merger application on the multi-cache
// system: four parallel units, two private caches each and no coherent
// caches or lock (P = 4, NPRIV = 2, NCOH = 0). This is the configuration for
// a program whose parallel units touch only disjoint heap regions.
//
// Build phase, all units in parallel: unit p inserts LIST_LEN random keys
// into its own sorted singly linked list. A list node n (n >= 1) keeps its
// key in word n of the unit's key region (private cache 0) and its next
// pointer in word n of the unit's link region (private cache 1). Word 0 of the
// link region is the head pointer, and 0 is the null pointer. A sorted insert
// walks the list from the head, reading key and link of every node it passes,
// then writes the new node and relinks its predecessor.
// Merge phase: the four lists are merged into one sorted output stream. Each
// list is read through its own unit's interfaces, and every consumed node is
// disposed by clearing its link word.
//
// The private caches have custom, unequal sizes (PRIV_LINES) so that some
// lists overflow their caches and others fit. Checks: every read returns the
// reference image; the output stream is sorted and is a permutation of all
// inserted keys; after a flush the off-chip image equals the reference image.
// The hit and access counters must equal those of a direct-mapped model
// driven with the same address trace, which is the hit-rate model used to
// size the caches. Private hits, misses, write-backs and memory-port
// conflicts must all occur, and the coherent counters must stay 0.
// Stimulus changes on the falling clock edge.
module workload_merger_tb;
  import mc_pkg::*;

  localparam int unsigned P = 4, NPRIV = 2, NCOH = 0, NI = P * (NPRIV + NCOH);
  localparam int unsigned ID_W = $clog2(NI), OFF_AW = ID_W + ADDR_W;
  localparam int unsigned LIST_LEN = 160;    // keys per unit
  localparam int unsigned KEY_MAX  = 100000;
  // per cache: unit p key cache = entry 2p, link cache = entry 2p+1
  localparam int unsigned LINES [P*NPRIV] = '{64, 32, 256, 256, 128, 64, 32, 16};

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
  logic        mv   [NI][];
  addr_t       mtag [NI][];
  int unsigned m_hits = 0, m_acc = 0;
  int unsigned keys_in [$];
  int unsigned keys_out [$];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [OFF_AW-1:0] full_addr(int i, addr_t a);
    return {ID_W'(i), a};
  endfunction

  function automatic data_t ref_read(logic [OFF_AW-1:0] fa);
    if (refm.exists(fa)) return refm[fa];
    return tb_pkg::init_word(64'(fa));
  endfunction

  // direct-mapped hit model: hit if the line holds this block; then it does
  function automatic void model_access(int i, addr_t a);
    int unsigned idx = 32'(a) % LINES[i];
    addr_t       tg  = addr_t'(32'(a) / LINES[i]);
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

  // build phase of unit p: sorted insertion of LIST_LEN random keys
  task automatic build(int p);
    int    i_key = p * NPRIV, i_lnk = p * NPRIV + 1;
    data_t v;
    bus_write(i_lnk, '0, '0);   // empty list
    for (int n = 1; n <= int'(LIST_LEN); n++) begin
      automatic int unsigned k = $urandom % KEY_MAX;
      automatic addr_t prev = '0;
      automatic addr_t cur;
      keys_in.push_back(k);
      bus_read(i_lnk, '0, v);
      cur = addr_t'(v);
      while (cur != '0) begin
        bus_read(i_key, cur, v);
        if (v >= data_t'(k)) break;
        prev = cur;
        bus_read(i_lnk, cur, v);
        cur = addr_t'(v);
      end
      bus_write(i_key, addr_t'(n), data_t'(k));
      bus_write(i_lnk, addr_t'(n), data_t'(cur));
      bus_write(i_lnk, prev, data_t'(n));
    end
  endtask

  // merge phase: repeatedly emit the smallest head, advance and dispose it
  task automatic merge_all();
    addr_t head [P];
    data_t hkey [P];
    data_t v;
    for (int p = 0; p < int'(P); p++) begin
      bus_read(p * NPRIV + 1, '0, v);
      head[p] = addr_t'(v);
      if (head[p] != '0) bus_read(p * NPRIV, head[p], hkey[p]);
    end
    forever begin
      automatic int best = -1;
      for (int p = 0; p < int'(P); p++)
        if (head[p] != '0 && (best < 0 || hkey[p] < hkey[best])) best = p;
      if (best < 0) break;
      keys_out.push_back(int'(hkey[best]));
      bus_read(best * NPRIV + 1, head[best], v);
      bus_write(best * NPRIV + 1, head[best], '0);   // dispose the node
      head[best] = addr_t'(v);
      if (head[best] != '0) bus_read(best * NPRIV, head[best], hkey[best]);
    end
    for (int p = 0; p < int'(P); p++) bus_write(p * NPRIV + 1, '0, '0);
  endtask

  initial begin
    for (int i = 0; i < int'(NI); i++) begin
      bus_req_write[i] = 1'b0; bus_req_din[i] = 1'b0; bus_address[i] = '0;
      bus_dataout[i] = '0; bus_rsp_read[i] = 1'b0;
      mv[i]   = new[LINES[i]];
      mtag[i] = new[LINES[i]];
      foreach (mv[i][j]) begin
        mv[i][j] = 1'b0;
        mtag[i][j] = '0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    fork
      build(0);
      build(1);
      build(2);
      build(3);
    join
    merge_all();
    repeat (40) @(negedge clk);
    // the output stream is the sorted multiset of all inserted keys
    keys_in.sort();
    check(keys_out.size() == keys_in.size(), $sformatf("merged %0d of %0d keys", keys_out.size(), keys_in.size()));
    for (int j = 0; j < keys_out.size() && j < keys_in.size(); j++)
      check(keys_out[j] == keys_in[j], $sformatf("output %0d: %0d, expected %0d", j, keys_out[j], keys_in[j]));
    // the caches behave exactly as the direct-mapped hit-rate model
    check(stat_priv_accesses == m_acc, $sformatf("accesses %0d, model %0d", stat_priv_accesses, m_acc));
    check(stat_priv_hits == m_hits,    $sformatf("hits %0d, model %0d", stat_priv_hits, m_hits));
    flush_req = 1'b1;
    while (!flush_done) @(negedge clk);
    flush_req = 1'b0;
    @(negedge clk);
    foreach (refm[a]) check(u_mem.peek(a) == refm[a], $sformatf("off-chip word %h after flush", a));
    check(stat_priv_hits > 0,                  "private cache hits");
    check(stat_priv_accesses > stat_priv_hits, "private cache misses");
    check(stat_writebacks > 0,                 "dirty write-backs");
    check(stat_mem_conflicts > 0,              "memory-port conflicts");
    check(stat_coh_accesses == 0 && stat_snoop_wbs == 0 && stat_invalidations == 0 && stat_lock_waits == 0,
          "no coherence or lock activity without a shared region");
    $display("cycles=%0d private hit rate=%0d/%0d (model %0d/%0d) write-backs=%0d conflicts=%0d",
             cyc, stat_priv_hits, stat_priv_accesses, m_hits, m_acc, stat_writebacks, stat_mem_conflicts);
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
