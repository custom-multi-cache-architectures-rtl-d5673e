// workload_cache_sizing_tb: custom cache sizing on a single-unit system with
// two private caches (P = 1, NPRIV = 2, NCOH = 0), one for the records of a
// traversal stack and one for the nodes of a binary tree.
//
// Two copies of the system run the same program side by side. One has
// equal caches of 1024 kB each (131072 lines). The other splits about the same
// on-chip memory as 32 kB for the stack (4096 lines) and 2048 kB for the tree
// (262144 lines). The program writes a random binary search tree of
// TREE_NODES nodes (key, left and right pointer in words 3n .. 3n+2). It then
// visits every node depth first with an explicit stack in the stack region,
// summing the keys. Every value read is compared with the test's own copy of
// the tree and of the stack.
//
// Checks: all reads are correct and every node is visited once (key sum). In
// each system, the private hit and access counters equal those of a
// direct-mapped model fed with the same address trace. The tailored split
// must reach a higher aggregate hit rate than the equal split, because the
// whole tree fits only in the larger tree cache.
// Stimulus changes on the falling clock edge.
module workload_cache_sizing_tb;
  import mc_pkg::*;

  localparam int unsigned P = 1, NPRIV = 2, NCOH = 0, NI = P * (NPRIV + NCOH);
  localparam int unsigned ID_W = 1, OFF_AW = ID_W + ADDR_W;
  localparam int unsigned TREE_NODES = 60000;
  localparam int unsigned K_ST = 0, K_TR = 1;
  localparam int unsigned NCFG = 2;   // 0: equal sizes, 1: tailored sizes
  localparam int unsigned LINES_EQ [NPRIV] = '{131072, 131072};
  localparam int unsigned LINES_TL [NPRIV] = '{4096, 262144};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              bus_req_write   [NCFG][NI];
  logic              bus_req_full_n  [NCFG][NI];
  logic              bus_req_din     [NCFG][NI];
  addr_t             bus_address     [NCFG][NI];
  data_t             bus_dataout     [NCFG][NI];
  logic              bus_rsp_empty_n [NCFG][NI];
  logic              bus_rsp_read    [NCFG][NI];
  data_t             bus_datain      [NCFG][NI];
  logic [31:0]       st_hits [NCFG], st_acc [NCFG];
  logic              flush_done [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic              off_req_valid, off_req_ready, off_req_we;
    logic [OFF_AW-1:0] off_req_addr;
    data_t             off_req_wdata, off_rsp_rdata;
    logic [ID_W-1:0]   off_req_id, off_rsp_id;
    logic              off_rsp_valid;
    logic [P-1:0]      lock_grant;
    logic [31:0]       s_ch, s_ca, s_wb, s_swb, s_inv, s_lw, s_cf;

    multi_cache_top #(.P(P), .NPRIV(NPRIV), .NCOH(NCOH),
                      .PRIV_LINES(c == 0 ? LINES_EQ : LINES_TL)) dut (
      .clk, .rst_n,
      .bus_req_write  (bus_req_write[c]),
      .bus_req_full_n (bus_req_full_n[c]),
      .bus_req_din    (bus_req_din[c]),
      .bus_address    (bus_address[c]),
      .bus_dataout    (bus_dataout[c]),
      .bus_rsp_empty_n(bus_rsp_empty_n[c]),
      .bus_rsp_read   (bus_rsp_read[c]),
      .bus_datain     (bus_datain[c]),
      .lock_req       ('0),
      .lock_grant,
      .off_req_valid, .off_req_ready, .off_req_we, .off_req_addr, .off_req_wdata, .off_req_id,
      .off_rsp_valid, .off_rsp_id, .off_rsp_rdata,
      .flush_req          (1'b0),
      .flush_done         (flush_done[c]),
      .stat_priv_hits     (st_hits[c]),
      .stat_priv_accesses (st_acc[c]),
      .stat_coh_hits      (s_ch),
      .stat_coh_accesses  (s_ca),
      .stat_writebacks    (s_wb),
      .stat_snoop_wbs     (s_swb),
      .stat_invalidations (s_inv),
      .stat_lock_waits    (s_lw),
      .stat_mem_conflicts (s_cf)
    );

    offchip_mem_model #(.AW(OFF_AW), .ID_W(ID_W), .LATENCY(12)) u_mem (
      .clk, .rst_n,
      .req_valid(off_req_valid), .req_ready(off_req_ready), .req_we(off_req_we),
      .req_addr(off_req_addr), .req_wdata(off_req_wdata), .req_id(off_req_id),
      .rsp_valid(off_rsp_valid), .rsp_id(off_rsp_id), .rsp_rdata(off_rsp_rdata)
    );
  end

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  int unsigned tkey   [TREE_NODES+1];
  int unsigned tleft  [TREE_NODES+1];
  int unsigned tright [TREE_NODES+1];
  longint unsigned key_sum = 0;
  longint unsigned visit_sum [NCFG];
  // direct-mapped model of every cache of both systems
  logic        mv   [NCFG][NPRIV][];
  addr_t       mtag [NCFG][NPRIV][];
  int unsigned m_hits [NCFG], m_acc [NCFG];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int unsigned lines_of(int c, int i);
    return (c == 0) ? LINES_EQ[i] : LINES_TL[i];
  endfunction

  // direct-mapped hit model: hit if the line holds this block; then it does
  function automatic void model_access(int c, int i, addr_t a);
    int unsigned idx = 32'(a) % lines_of(c, i);
    addr_t       tg  = addr_t'(32'(a) / lines_of(c, i));
    m_acc[c]++;
    if (mv[c][i][idx] && mtag[c][i][idx] == tg) m_hits[c]++;
    mv[c][i][idx]   = 1'b1;
    mtag[c][i][idx] = tg;
  endfunction

  task automatic bus_read(int c, int i, addr_t a, data_t want, string what);
    model_access(c, i, a);
    bus_req_write[c][i] = 1'b1;
    bus_req_din[c][i]   = 1'b0;
    bus_address[c][i]   = a;
    while (!bus_req_full_n[c][i]) @(negedge clk);
    @(negedge clk);
    bus_req_write[c][i] = 1'b0;
    while (!bus_rsp_empty_n[c][i]) @(negedge clk);
    check(bus_datain[c][i] == want, $sformatf("system %0d %s: got %0d want %0d", c, what, bus_datain[c][i], want));
    bus_rsp_read[c][i] = 1'b1;
    @(negedge clk);
    bus_rsp_read[c][i] = 1'b0;
  endtask

  task automatic bus_write(int c, int i, addr_t a, data_t v);
    model_access(c, i, a);
    bus_req_write[c][i] = 1'b1;
    bus_req_din[c][i]   = 1'b1;
    bus_address[c][i]   = a;
    bus_dataout[c][i]   = v;
    while (!bus_req_full_n[c][i]) @(negedge clk);
    @(negedge clk);
    bus_req_write[c][i] = 1'b0;
  endtask

  // random binary search tree in the test's own arrays, root = node 1
  function automatic void make_tree();
    for (int n = 1; n <= int'(TREE_NODES); n++) begin
      automatic int unsigned k = $urandom % 1000000;
      automatic int unsigned cur = 1;
      tkey[n] = k;
      tleft[n] = 0;
      tright[n] = 0;
      key_sum += 64'(k);
      if (n > 1)
        forever begin
          if (k < tkey[cur]) begin
            if (tleft[cur] == 0) begin tleft[cur] = n; break; end
            cur = tleft[cur];
          end else begin
            if (tright[cur] == 0) begin tright[cur] = n; break; end
            cur = tright[cur];
          end
        end
    end
  endfunction

  // build the tree, then visit it depth first with a stack in memory
  task automatic run(int c);
    int unsigned stk [$];
    visit_sum[c] = 0;
    for (int n = 1; n <= int'(TREE_NODES); n++) begin
      bus_write(c, K_TR, addr_t'(3 * n),     data_t'(tkey[n]));
      bus_write(c, K_TR, addr_t'(3 * n + 1), data_t'(tleft[n]));
      bus_write(c, K_TR, addr_t'(3 * n + 2), data_t'(tright[n]));
    end
    bus_write(c, K_ST, '0, data_t'(1));
    stk.push_back(1);
    while (stk.size() > 0) begin
      automatic int unsigned n = stk.pop_back();
      bus_read(c, K_ST, addr_t'(stk.size()), data_t'(n), "stack record");
      bus_read(c, K_TR, addr_t'(3 * n),     data_t'(tkey[n]),   "key");
      bus_read(c, K_TR, addr_t'(3 * n + 1), data_t'(tleft[n]),  "left");
      bus_read(c, K_TR, addr_t'(3 * n + 2), data_t'(tright[n]), "right");
      visit_sum[c] += 64'(tkey[n]);
      if (tleft[n] != 0) begin
        bus_write(c, K_ST, addr_t'(stk.size()), data_t'(tleft[n]));
        stk.push_back(tleft[n]);
      end
      if (tright[n] != 0) begin
        bus_write(c, K_ST, addr_t'(stk.size()), data_t'(tright[n]));
        stk.push_back(tright[n]);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < int'(NCFG); c++) begin
      m_hits[c] = 0;
      m_acc[c]  = 0;
      for (int i = 0; i < int'(NI); i++) begin
        bus_req_write[c][i] = 1'b0; bus_req_din[c][i] = 1'b0; bus_address[c][i] = '0;
        bus_dataout[c][i] = '0; bus_rsp_read[c][i] = 1'b0;
        mv[c][i]   = new[lines_of(c, i)];
        mtag[c][i] = new[lines_of(c, i)];
        foreach (mv[c][i][j]) begin
          mv[c][i][j]   = 1'b0;
          mtag[c][i][j] = '0;
        end
      end
    end
    make_tree();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    fork
      run(0);
      run(1);
    join
    repeat (40) @(negedge clk);
    for (int c = 0; c < int'(NCFG); c++) begin
      check(visit_sum[c] == key_sum, $sformatf("system %0d visited every node once", c));
      check(st_acc[c] == m_acc[c],   $sformatf("system %0d accesses %0d, model %0d", c, st_acc[c], m_acc[c]));
      check(st_hits[c] == m_hits[c], $sformatf("system %0d hits %0d, model %0d", c, st_hits[c], m_hits[c]));
      $display("system %0d (%s): aggregate hit rate %0d/%0d = %0d.%01d%%", c, c == 0 ? "equal sizes" : "tailored sizes",
               st_hits[c], st_acc[c], 100 * st_hits[c] / st_acc[c], (1000 * st_hits[c] / st_acc[c]) % 10);
    end
    check(longint'(st_hits[1]) * st_acc[0] > longint'(st_hits[0]) * st_acc[1],
          "tailored sizes give the higher aggregate hit rate");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
