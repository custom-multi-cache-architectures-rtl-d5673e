// mem_arbiter: shares the single off-chip memory port among all caches of the
// multi-cache system.
//
// Each cache port presents region-local requests (one outstanding request per
// port). The arbiter picks one requesting port per cycle in round-robin order,
// places the port's region number above the local address, tags the request
// with the port number, and returns each memory response to the port named by
// its tag. Ports below SHARED_FIRST are private heap partitions and get region
// number = port number. Ports from SHARED_FIRST up are the coherent caches of
// the shared region and all map to region SHARED_FIRST, so they see one
// common memory.
// Interface: per port mem_req_valid/ready, mem_req, and one rsp pulse per
// request. Off-chip side: off_req_valid/ready with off_req_* and a tag, and
// off_rsp_valid with the tag and read data (answers may come in any order).
// Timing: purely combinational on the request path, no added latency.
// Sharing one memory behind all caches follows the evaluated system; the
// region mapping and the round-robin order are this implementation's choices.
module mem_arbiter
  import mc_pkg::*;
#(
  parameter int unsigned N            = 16,  // number of cache ports
  parameter int unsigned SHARED_FIRST = 12,  // first coherent-cache port
  localparam int unsigned ID_W        = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned REG_W       = ID_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       req_valid [N],
  output logic                       req_ready [N],
  input  mem_req_t                   req       [N],
  output logic                       rsp_valid [N],
  output data_t                      rsp_rdata [N],
  output logic                       off_req_valid,
  input  logic                       off_req_ready,
  output logic                       off_req_we,
  output logic [REG_W+ADDR_W-1:0]    off_req_addr,
  output data_t                      off_req_wdata,
  output logic [ID_W-1:0]            off_req_id,
  input  logic                       off_rsp_valid,
  input  logic [ID_W-1:0]            off_rsp_id,
  input  data_t                      off_rsp_rdata,
  output logic                       ev_conflict  // several ports requested at once
);
  logic [ID_W-1:0] last;
  logic            pick_valid;
  logic [ID_W-1:0] pick;
  int unsigned     nreq;

  always_comb begin
    pick_valid = 1'b0;
    pick       = '0;
    nreq       = 0;
    for (int k = 1; k <= N; k++) begin
      logic [ID_W-1:0] c;
      c = ID_W'((int'(last) + k) % N);
      if (req_valid[c]) nreq++;
      if (!pick_valid && req_valid[c]) begin
        pick_valid = 1'b1;
        pick       = ID_W'(c);
      end
    end
  end

  logic [REG_W-1:0] region;
  assign region = (int'(pick) >= int'(SHARED_FIRST)) ? REG_W'(SHARED_FIRST) : REG_W'(pick);

  assign off_req_valid = pick_valid;
  assign off_req_we    = req[pick].we;
  assign off_req_addr  = {region, req[pick].addr};
  assign off_req_wdata = req[pick].wdata;
  assign off_req_id    = pick;
  assign ev_conflict   = (nreq > 1);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_ready[i] = off_req_ready && pick_valid && (pick == ID_W'(i));
      rsp_valid[i] = off_rsp_valid && (off_rsp_id == ID_W'(i));
      rsp_rdata[i] = off_rsp_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                             last <= ID_W'(N - 1);
    else if (off_req_valid && off_req_ready) last <= pick;
  end

endmodule
