// hls_bus_bridge: adapter between the memory bus port of an HLS-generated
// kernel and one cache of the multi-cache system.
//
// The kernel side follows the FIFO-style bus handshake that HLS tools emit for
// a pointer argument mapped to a bus: the kernel pushes a request with
// req_write when req_full_n is high, giving req_din (1 = write, 0 = read),
// address and dataout; a push takes place on a clock edge where req_write and
// req_full_n are both high. Read data comes back through a one-entry response
// buffer: rsp_empty_n says datain is valid, and the kernel pops it with
// rsp_read. The kernel's own scheduler stalls while req_full_n or rsp_empty_n
// keep it waiting, which is how a cache miss stalls the kernel.
//
// The bridge has at most one request outstanding at the cache. It accepts a
// new request only when the previous one is answered and its read data has
// been taken. idle is high when nothing is outstanding. It is used as the
// memory fence: a lock may only be released once the last write to the shared
// region has completed. The enable input can hold requests off; it is tied high
// for private caches and driven by the lock grant for the shared region.
// A kernel datum may be wider than a cache line: with WORDS > 1 the bus data
// is WORDS x 64 bits, item address a covers cache words a*WORDS ..
// a*WORDS+WORDS-1, and the bridge splits the access into WORDS sequential
// cache accesses, lowest word first. Write data is taken from the low end of
// a shift register; read data is shifted in from the top.
// Timing: the first cache request is presented in the cycle after req_write;
// each further chunk follows the cycle after the previous answer; read data
// appears on datain/rsp_empty_n the cycle after the last cache answer.
// The bridging role, the stall-until-served behaviour and the splitting of
// wide data into sequential line-sized chunks follow the evaluated system;
// the exact port set (no burst length, chunk order) is this implementation's
// choice.
module hls_bus_bridge
  import mc_pkg::*;
#(
  parameter int unsigned WORDS = 1,   // 64-bit cache words per kernel datum
  localparam int unsigned BW   = WORDS * DATA_W,
  localparam int unsigned CW   = $clog2(WORDS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  // kernel side
  input  logic          req_write,
  output logic          req_full_n,
  input  logic          req_din,
  input  addr_t         address,
  input  logic [BW-1:0] dataout,
  output logic          rsp_empty_n,
  input  logic          rsp_read,
  output logic [BW-1:0] datain,
  output logic          idle,
  // cache side
  output logic          c_req_valid,
  input  logic          c_req_ready,
  output cache_req_t    c_req,
  input  logic          c_rsp_valid,
  input  data_t         c_rsp_rdata
);
  typedef enum logic [1:0] {B_IDLE, B_ISSUE, B_WAIT, B_DATA} bstate_t;

  bstate_t       state;
  logic          r_we;
  addr_t         r_addr;   // cache word address of the current chunk
  logic [BW-1:0] r_wdata;  // chunks still to write, current one at the bottom
  logic [CW-1:0] left;     // chunks after the current one

  assign req_full_n  = enable && (state == B_IDLE);
  assign c_req_valid = (state == B_ISSUE);
  assign rsp_empty_n = (state == B_DATA);
  assign idle        = (state == B_IDLE);

  always_comb begin
    c_req.we    = r_we;
    c_req.addr  = r_addr;
    c_req.wdata = r_wdata[DATA_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= B_IDLE;
      r_we    <= 1'b0;
      r_addr  <= '0;
      r_wdata <= '0;
      left    <= '0;
      datain  <= '0;
    end else begin
      unique case (state)
        B_IDLE: if (req_write && req_full_n) begin
          r_we    <= req_din;
          r_addr  <= addr_t'(32'(address) * WORDS);
          r_wdata <= dataout;
          left    <= CW'(WORDS - 1);
          state   <= B_ISSUE;
        end
        B_ISSUE: if (c_req_ready) state <= B_WAIT;
        B_WAIT: if (c_rsp_valid) begin
          datain  <= (datain >> DATA_W) | (BW'(c_rsp_rdata) << ((WORDS - 1) * DATA_W));
          r_wdata <= r_wdata >> DATA_W;
          r_addr  <= r_addr + 1'b1;
          left    <= left - 1'b1;
          if (left != '0) state <= B_ISSUE;
          else            state <= r_we ? B_IDLE : B_DATA;
        end
        B_DATA: if (rsp_read) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  // the kernel may only pop read data that is there
  assert property (@(posedge clk) disable iff (!rst_n) rsp_read |-> rsp_empty_n);

endmodule
