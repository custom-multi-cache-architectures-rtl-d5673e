// offchip_mem_model: behavioural model of the off-chip DRAM and its controller
// behind the memory arbiter (not synthesizable).
//
// Accepts a request when req_ready is high (ready is randomly withheld about a
// quarter of the time to exercise back-pressure). Writes take effect at
// acceptance. Every request is answered, in order, LATENCY cycles after
// acceptance with rsp_valid and its tag (read data, or an acknowledge for a
// write). Never-written words read as tb_pkg::init_word(address).
module offchip_mem_model
  import mc_pkg::*;
#(
  parameter int unsigned AW      = 26,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned LATENCY = 10,
  parameter bit          STALLS  = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_we,
  input  logic [AW-1:0]   req_addr,
  input  data_t           req_wdata,
  input  logic [ID_W-1:0] req_id,
  output logic            rsp_valid,
  output logic [ID_W-1:0] rsp_id,
  output data_t           rsp_rdata
);
  typedef struct {
    longint unsigned due;
    logic [ID_W-1:0] id;
    data_t           data;
  } pend_t;

  data_t           mem [logic [AW-1:0]];
  pend_t           q [$];
  longint unsigned cyc;
  int unsigned     n_reads, n_writes;

  function automatic data_t peek(logic [AW-1:0] a);
    if (mem.exists(a)) return mem[a];
    return tb_pkg::init_word(64'(a));
  endfunction

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_id    = '0;
    rsp_rdata = '0;
    cyc       = 0;
    n_reads   = 0;
    n_writes  = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      q.delete();
      rsp_valid <= 1'b0;
      req_ready <= 1'b0;
    end else begin
      if (req_valid && req_ready) begin
        pend_t e;
        e.due = cyc + 64'(LATENCY);
        e.id  = req_id;
        if (req_we) begin
          mem[req_addr] = req_wdata;
          e.data = '0;
          n_writes++;
        end else begin
          e.data = peek(req_addr);
          n_reads++;
        end
        q.push_back(e);
      end
      rsp_valid <= 1'b0;
      if (q.size() > 0 && q[0].due <= cyc) begin
        rsp_valid <= 1'b1;
        rsp_id    <= q[0].id;
        rsp_rdata <= q[0].data;
        void'(q.pop_front());
      end
      req_ready <= STALLS ? (($urandom % 4) != 0) : 1'b1;
    end
  end
endmodule
