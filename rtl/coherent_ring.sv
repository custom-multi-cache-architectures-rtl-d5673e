// coherent_ring: P coherent caches that front one shared heap region, joined
// into a unidirectional ring.
//
// Node i sends its ring messages and the token to node (i+1) mod P. Each ring
// hop is one register stage, so a request travels once round the ring in P
// cycles plus the time each peer spends snooping it. Each node keeps its own
// kernel-side and memory-side port; the memory ports all address the same
// shared region. The caches appear to the kernels as independent interfaces
// and share data only through the ring, as in the evaluated system. The ring
// protocol itself is described in coherent_cache.
module coherent_ring
  import mc_pkg::*;
#(
  parameter int unsigned P      = 4,    // parallel units = ring nodes
  parameter int unsigned LINES  = 128,  // 1 kB per cache
  parameter int unsigned NBANKS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid     [P],
  output logic       req_ready     [P],
  input  cache_req_t req           [P],
  output logic       rsp_valid     [P],
  output data_t      rsp_rdata     [P],
  output logic       mem_req_valid [P],
  input  logic       mem_req_ready [P],
  output mem_req_t   mem_req       [P],
  input  logic       mem_rsp_valid [P],
  input  data_t      mem_rsp_rdata [P],
  input  logic       flush_req,
  output logic       flush_ack     [P],
  output logic       ev_hit        [P],
  output logic       ev_miss       [P],
  output logic       ev_wb         [P],
  output logic       ev_snoop_wb   [P],
  output logic       ev_inv        [P]
);
  ring_msg_t    msg [P];
  logic         tok [P];
  logic [P-1:0] tok_vec;

  always_comb for (int i = 0; i < P; i++) tok_vec[i] = tok[i];

  for (genvar i = 0; i < P; i++) begin : g_node
    localparam int unsigned PREV = (i + P - 1) % P;
    coherent_cache #(.LINES(LINES), .NBANKS(NBANKS), .NODE(i)) u_cache (
      .clk, .rst_n,
      .req_valid    (req_valid[i]),
      .req_ready    (req_ready[i]),
      .req          (req[i]),
      .rsp_valid    (rsp_valid[i]),
      .rsp_rdata    (rsp_rdata[i]),
      .mem_req_valid(mem_req_valid[i]),
      .mem_req_ready(mem_req_ready[i]),
      .mem_req      (mem_req[i]),
      .mem_rsp_valid(mem_rsp_valid[i]),
      .mem_rsp_rdata(mem_rsp_rdata[i]),
      .msg_in       (msg[PREV]),
      .msg_out      (msg[i]),
      .tok_in       (tok[PREV]),
      .tok_out      (tok[i]),
      .flush_req,
      .flush_ack    (flush_ack[i]),
      .ev_hit       (ev_hit[i]),
      .ev_miss      (ev_miss[i]),
      .ev_wb        (ev_wb[i]),
      .ev_snoop_wb  (ev_snoop_wb[i]),
      .ev_inv       (ev_inv[i])
    );
  end

  // exactly one token exists once reset is over
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0(tok_vec));

endmodule
