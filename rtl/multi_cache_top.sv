// multi_cache_top: application-specific hybrid multi-cache memory system for
// P parallel HLS kernels that work on pointer-linked data structures in an
// off-chip heap.
//
// Program analysis splits the heap into partitions. A partition used by one
// kernel only gets a cheap private cache (private_cache). The one region that
// all kernels update gets one coherent cache per kernel, joined by a ring
// (coherent_ring), plus a lock (lock_service) that makes each update atomic.
// Every cache is reached from the kernel through an hls_bus_bridge, and all
// caches share the single off-chip memory port through mem_arbiter.
//
// The default configuration is the parallelised K-means filtering kernel with
// P = 4: per unit, private caches for center sets, stack records and tree
// nodes (NPRIV = 3), plus one coherent cache for the centroid information
// (NCOH = 1), i.e. 16 caches of 1 kB (128 lines of 64 bits). Other
// applications use other NPRIV/NCOH values (a list merger needs two private
// caches per unit and no coherent one). Each private cache has its own size
// in PRIV_LINES, so the sizes can be tuned per cache.
//
// Interface numbering: bus interface p*NPRIV + k is private cache k of unit
// p; interface P*NPRIV + p is the coherent cache of unit p. The coherent
// interface of unit p accepts requests only while lock_grant[p] is high. The
// lock is held (lock request kept up) until that bridge is idle, which acts
// as the memory fence before the release. Off-chip addresses are
// {region, word address}. Region r < P*NPRIV is private interface r, and
// region P*NPRIV is the shared one. flush_req writes back all dirty lines;
// flush_done goes high when every cache has finished, and stays high until
// flush_req drops.
// BUS_WORDS sets the width of the kernel data (in 64-bit words); the bridges
// split wider accesses into line-sized chunks.
// Statistics counters count cache hits and accesses, write-backs, snoop
// write-backs, invalidations, lock waits and memory-port conflicts since reset.
module multi_cache_top
  import mc_pkg::*;
#(
  parameter int unsigned P          = 4,    // parallel units
  parameter int unsigned NPRIV      = 3,    // private caches per unit (CS, ST, TR)
  parameter int unsigned NCOH       = 1,    // coherent caches per unit (CI), 0 or 1
  parameter int unsigned PRIV_LINES [P*NPRIV] = '{default: 128},  // 1 kB each
  parameter int unsigned COH_LINES  = 128,  // 1 kB
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BUS_WORDS  = 1,    // 64-bit words per kernel datum
  localparam int unsigned NI        = P * (NPRIV + NCOH),
  localparam int unsigned ID_W      = (NI > 1) ? $clog2(NI) : 1,
  localparam int unsigned OFF_AW    = ID_W + ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel memory buses, one per interface
  input  logic              bus_req_write   [NI],
  output logic              bus_req_full_n  [NI],
  input  logic              bus_req_din     [NI],
  input  addr_t             bus_address     [NI],
  input  logic [BUS_WORDS*DATA_W-1:0] bus_dataout [NI],
  output logic              bus_rsp_empty_n [NI],
  input  logic              bus_rsp_read    [NI],
  output logic [BUS_WORDS*DATA_W-1:0] bus_datain  [NI],
  // critical-region lock, one request/grant pair per unit
  input  logic [P-1:0]      lock_req,
  output logic [P-1:0]      lock_grant,
  // off-chip memory port
  output logic              off_req_valid,
  input  logic              off_req_ready,
  output logic              off_req_we,
  output logic [OFF_AW-1:0] off_req_addr,
  output data_t             off_req_wdata,
  output logic [ID_W-1:0]   off_req_id,
  input  logic              off_rsp_valid,
  input  logic [ID_W-1:0]   off_rsp_id,
  input  data_t             off_rsp_rdata,
  // maintenance
  input  logic              flush_req,
  output logic              flush_done,
  // statistics
  output logic [31:0]       stat_priv_hits,
  output logic [31:0]       stat_priv_accesses,
  output logic [31:0]       stat_coh_hits,
  output logic [31:0]       stat_coh_accesses,
  output logic [31:0]       stat_writebacks,
  output logic [31:0]       stat_snoop_wbs,
  output logic [31:0]       stat_invalidations,
  output logic [31:0]       stat_lock_waits,
  output logic [31:0]       stat_mem_conflicts
);
  localparam int unsigned NP = P * NPRIV;

  // bridge <-> cache
  logic       c_req_valid [NI];
  logic       c_req_ready [NI];
  cache_req_t c_req       [NI];
  logic       c_rsp_valid [NI];
  data_t      c_rsp_rdata [NI];
  logic       br_idle     [NI];
  logic       br_enable   [NI];
  // cache <-> arbiter
  logic       m_req_valid [NI];
  logic       m_req_ready [NI];
  mem_req_t   m_req       [NI];
  logic       m_rsp_valid [NI];
  data_t      m_rsp_rdata [NI];
  // events
  logic       f_ack  [NI];
  logic       e_hit  [NI];
  logic       e_miss [NI];
  logic       e_wb   [NI];
  logic       e_swb  [NI];
  logic       e_inv  [NI];
  logic       e_lock, e_conf;

  // ---------------------------------------------------------------- bridges
  for (genvar i = 0; i < NI; i++) begin : g_bridge
    hls_bus_bridge #(.WORDS(BUS_WORDS)) u_bridge (
      .clk, .rst_n,
      .enable     (br_enable[i]),
      .req_write  (bus_req_write[i]),
      .req_full_n (bus_req_full_n[i]),
      .req_din    (bus_req_din[i]),
      .address    (bus_address[i]),
      .dataout    (bus_dataout[i]),
      .rsp_empty_n(bus_rsp_empty_n[i]),
      .rsp_read   (bus_rsp_read[i]),
      .datain     (bus_datain[i]),
      .idle       (br_idle[i]),
      .c_req_valid(c_req_valid[i]),
      .c_req_ready(c_req_ready[i]),
      .c_req      (c_req[i]),
      .c_rsp_valid(c_rsp_valid[i]),
      .c_rsp_rdata(c_rsp_rdata[i])
    );
  end

  // --------------------------------------------------------- private caches
  for (genvar i = 0; i < NP; i++) begin : g_priv
    assign br_enable[i] = 1'b1;
    assign e_swb[i]     = 1'b0;
    assign e_inv[i]     = 1'b0;
    private_cache #(.LINES(PRIV_LINES[i]), .NBANKS(NBANKS)) u_cache (
      .clk, .rst_n,
      .req_valid    (c_req_valid[i]),
      .req_ready    (c_req_ready[i]),
      .req          (c_req[i]),
      .rsp_valid    (c_rsp_valid[i]),
      .rsp_rdata    (c_rsp_rdata[i]),
      .mem_req_valid(m_req_valid[i]),
      .mem_req_ready(m_req_ready[i]),
      .mem_req      (m_req[i]),
      .mem_rsp_valid(m_rsp_valid[i]),
      .mem_rsp_rdata(m_rsp_rdata[i]),
      .flush_req,
      .flush_ack    (f_ack[i]),
      .ev_hit       (e_hit[i]),
      .ev_miss      (e_miss[i]),
      .ev_wb        (e_wb[i])
    );
  end

  // ----------------------------------- coherent caches, ring and lock service
  if (NCOH > 0) begin : g_shared
    logic [P-1:0] lock_hold;

    // keep the lock until the last shared access has completed (memory fence)
    for (genvar p = 0; p < P; p++) begin : g_fence
      assign lock_hold[p]       = lock_req[p] || (lock_grant[p] && !br_idle[NP + p]);
      assign br_enable[NP + p]  = lock_grant[p];
    end

    lock_service #(.N(P)) u_lock (
      .clk, .rst_n,
      .req         (lock_hold),
      .grant       (lock_grant),
      .ev_contended(e_lock)
    );

    coherent_ring #(.P(P), .LINES(COH_LINES), .NBANKS(NBANKS)) u_ring (
      .clk, .rst_n,
      .req_valid    (c_req_valid[NP +: P]),
      .req_ready    (c_req_ready[NP +: P]),
      .req          (c_req[NP +: P]),
      .rsp_valid    (c_rsp_valid[NP +: P]),
      .rsp_rdata    (c_rsp_rdata[NP +: P]),
      .mem_req_valid(m_req_valid[NP +: P]),
      .mem_req_ready(m_req_ready[NP +: P]),
      .mem_req      (m_req[NP +: P]),
      .mem_rsp_valid(m_rsp_valid[NP +: P]),
      .mem_rsp_rdata(m_rsp_rdata[NP +: P]),
      .flush_req,
      .flush_ack    (f_ack[NP +: P]),
      .ev_hit       (e_hit[NP +: P]),
      .ev_miss      (e_miss[NP +: P]),
      .ev_wb        (e_wb[NP +: P]),
      .ev_snoop_wb  (e_swb[NP +: P]),
      .ev_inv       (e_inv[NP +: P])
    );
  end else begin : g_no_shared
    assign lock_grant = '0;
    assign e_lock     = 1'b0;
  end

  // ------------------------------------------------------------ memory port
  mem_arbiter #(.N(NI), .SHARED_FIRST(NP)) u_arb (
    .clk, .rst_n,
    .req_valid    (m_req_valid),
    .req_ready    (m_req_ready),
    .req          (m_req),
    .rsp_valid    (m_rsp_valid),
    .rsp_rdata    (m_rsp_rdata),
    .off_req_valid,
    .off_req_ready,
    .off_req_we,
    .off_req_addr,
    .off_req_wdata,
    .off_req_id,
    .off_rsp_valid,
    .off_rsp_id,
    .off_rsp_rdata,
    .ev_conflict  (e_conf)
  );

  // ---------------------------------------------------------- flush control
  logic [NI-1:0] f_seen;
  always_ff @(posedge clk) begin
    if (!rst_n || !flush_req) f_seen <= '0;
    else for (int i = 0; i < NI; i++) if (f_ack[i]) f_seen[i] <= 1'b1;
  end
  assign flush_done = flush_req && (&f_seen);

  // ------------------------------------------------------------- statistics
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stat_priv_hits     <= '0;
      stat_priv_accesses <= '0;
      stat_coh_hits      <= '0;
      stat_coh_accesses  <= '0;
      stat_writebacks    <= '0;
      stat_snoop_wbs     <= '0;
      stat_invalidations <= '0;
      stat_lock_waits    <= '0;
      stat_mem_conflicts <= '0;
    end else begin
      automatic logic [31:0] ph = '0, pa = '0, ch = '0, ca = '0, wb = '0, sw = '0, iv = '0;
      for (int i = 0; i < NI; i++) begin
        if (i < int'(NP)) begin
          ph += 32'(e_hit[i]);
          pa += 32'(e_hit[i]) + 32'(e_miss[i]);
        end else begin
          ch += 32'(e_hit[i]);
          ca += 32'(e_hit[i]) + 32'(e_miss[i]);
        end
        wb += 32'(e_wb[i]);
        sw += 32'(e_swb[i]);
        iv += 32'(e_inv[i]);
      end
      stat_priv_hits     <= stat_priv_hits + ph;
      stat_priv_accesses <= stat_priv_accesses + pa;
      stat_coh_hits      <= stat_coh_hits + ch;
      stat_coh_accesses  <= stat_coh_accesses + ca;
      stat_writebacks    <= stat_writebacks + wb;
      stat_snoop_wbs     <= stat_snoop_wbs + sw;
      stat_invalidations <= stat_invalidations + iv;
      stat_lock_waits    <= stat_lock_waits + 32'(e_lock);
      stat_mem_conflicts <= stat_mem_conflicts + 32'(e_conf);
    end
  end

endmodule
