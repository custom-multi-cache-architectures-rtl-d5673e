// private_cache: direct-mapped, write-back cache in front of one private heap
// partition in off-chip memory.
//
// A private cache serves a memory region that the program analysis proved to
// be touched by one parallel unit only, so it needs no coherence traffic. Each
// line holds one 64-bit word; an entry in the banked store is
// {valid, dirty, tag, data}. On a miss the old line is written back first if
// dirty, then a read miss fetches the word from memory; a write miss replaces
// the whole line, so it allocates without a fetch. flush_req writes every dirty
// line back (lines stay valid and become clean) and answers with a one-cycle
// flush_ack.
//
// Interface: one request at a time (req_valid/req_ready); every request,
// read or write, is answered by exactly one rsp_valid pulse (rsp_rdata holds the
// read data). Memory side: mem_req_valid/mem_req_ready, and one mem_rsp_valid
// pulse per memory request (read data or write acknowledge).
// Timing: a hit answers 4 cycles after the accepting clock edge (store latency 3
// plus the decision). After reset the cache spends LINES cycles clearing
// its tags and does not accept requests meanwhile.
// Direct mapping, write-back and the 64-bit line follow the evaluated system;
// write-allocate without fetch, the flush port and the event outputs are this
// implementation's choices.
module private_cache
  import mc_pkg::*;
#(
  parameter int unsigned LINES  = 128,  // 1 kB of 64-bit lines
  parameter int unsigned NBANKS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // kernel side
  input  logic       req_valid,
  output logic       req_ready,
  input  cache_req_t req,
  output logic       rsp_valid,
  output data_t      rsp_rdata,
  // memory side
  output logic       mem_req_valid,
  input  logic       mem_req_ready,
  output mem_req_t   mem_req,
  input  logic       mem_rsp_valid,
  input  data_t      mem_rsp_rdata,
  // maintenance and statistics
  input  logic       flush_req,
  output logic       flush_ack,
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_wb
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - IDX_W;

  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
    data_t            data;
  } entry_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WB_REQ, S_WB_WAIT, S_ALLOC, S_FILL_REQ, S_FILL_WAIT,
    S_FL_RD, S_FL_WAIT, S_FL_WB, S_FL_WBREQ, S_FL_NEXT
  } state_t;

  state_t           state;
  cache_req_t       cur;
  entry_t           ent;
  logic [IDX_W-1:0] scan;

  logic             st_req_valid, st_req_we;
  logic [IDX_W-1:0] st_req_idx;
  entry_t           st_wentry, st_rentry;
  logic             st_rsp_valid;

  logic [IDX_W-1:0] cur_idx;
  logic [TAG_W-1:0] cur_tag;
  assign cur_idx = cur.addr[IDX_W-1:0];
  assign cur_tag = cur.addr[ADDR_W-1:IDX_W];

  cache_bank_store #(.LINES(LINES), .NBANKS(NBANKS), .W($bits(entry_t))) u_store (
    .clk, .rst_n,
    .req_valid (st_req_valid),
    .req_we    (st_req_we),
    .req_idx   (st_req_idx),
    .req_wentry(st_wentry),
    .rsp_valid (st_rsp_valid),
    .rsp_entry (st_rentry)
  );

  logic hit;
  assign hit = st_rentry.valid && (st_rentry.tag == cur_tag);

  assign req_ready = (state == S_IDLE) && !flush_req;

  // store requests
  always_comb begin
    st_req_valid = 1'b0;
    st_req_we    = 1'b0;
    st_req_idx   = cur_idx;
    st_wentry    = '0;
    unique case (state)
      S_INIT: begin
        st_req_valid = 1'b1;
        st_req_we    = 1'b1;
        st_req_idx   = scan;
      end
      S_IDLE: begin
        st_req_valid = req_valid && req_ready;
        st_req_idx   = req.addr[IDX_W-1:0];
      end
      S_LOOKUP: begin
        if (st_rsp_valid && hit && cur.we) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_wentry    = '{valid: 1'b1, dirty: 1'b1, tag: cur_tag, data: cur.wdata};
        end
      end
      S_ALLOC: begin
        st_req_valid = 1'b1;
        st_req_we    = 1'b1;
        st_wentry    = '{valid: 1'b1, dirty: 1'b1, tag: cur_tag, data: cur.wdata};
      end
      S_FILL_WAIT: begin
        if (mem_rsp_valid) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_wentry    = '{valid: 1'b1, dirty: 1'b0, tag: cur_tag, data: mem_rsp_rdata};
        end
      end
      S_FL_RD: begin
        st_req_valid = 1'b1;
        st_req_idx   = scan;
      end
      S_FL_WB: begin
        if (mem_rsp_valid) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_req_idx   = scan;
          st_wentry    = ent;
          st_wentry.dirty = 1'b0;
        end
      end
      default: ;
    endcase
  end

  // memory requests
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    unique case (state)
      S_WB_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = {ent.tag, cur_idx};
        mem_req.wdata = ent.data;
      end
      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.addr  = cur.addr;
      end
      S_FL_WBREQ: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = {ent.tag, scan};
        mem_req.wdata = ent.data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_INIT;
      cur       <= '0;
      ent       <= '0;
      scan      <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      flush_ack <= 1'b0;
      ev_hit    <= 1'b0;
      ev_miss   <= 1'b0;
      ev_wb     <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      flush_ack <= 1'b0;
      ev_hit    <= 1'b0;
      ev_miss   <= 1'b0;
      ev_wb     <= 1'b0;
      unique case (state)
        S_INIT: begin
          scan <= scan + 1'b1;
          if (scan == IDX_W'(LINES - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (flush_req) begin
            scan  <= '0;
            state <= S_FL_RD;
          end else if (req_valid) begin
            cur   <= req;
            state <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (st_rsp_valid) begin
            ent <= st_rentry;
            if (hit) begin
              ev_hit    <= 1'b1;
              rsp_valid <= 1'b1;
              rsp_rdata <= cur.we ? '0 : st_rentry.data;
              state     <= S_IDLE;
            end else begin
              ev_miss <= 1'b1;
              if (st_rentry.valid && st_rentry.dirty) state <= S_WB_REQ;
              else if (cur.we)                         state <= S_ALLOC;
              else                                     state <= S_FILL_REQ;
            end
          end
        end
        S_WB_REQ: if (mem_req_ready) begin
          ev_wb <= 1'b1;
          state <= S_WB_WAIT;
        end
        S_WB_WAIT: if (mem_rsp_valid) state <= cur.we ? S_ALLOC : S_FILL_REQ;
        S_ALLOC: begin
          rsp_valid <= 1'b1;
          rsp_rdata <= '0;
          state     <= S_IDLE;
        end
        S_FILL_REQ: if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_rsp_valid) begin
          rsp_valid <= 1'b1;
          rsp_rdata <= mem_rsp_rdata;
          state     <= S_IDLE;
        end
        S_FL_RD: state <= S_FL_WAIT;
        S_FL_WAIT: if (st_rsp_valid) begin
          ent <= st_rentry;
          if (st_rentry.valid && st_rentry.dirty) state <= S_FL_WBREQ;
          else                                     state <= S_FL_NEXT;
        end
        S_FL_WBREQ: if (mem_req_ready) begin
          ev_wb <= 1'b1;
          state <= S_FL_WB;
        end
        S_FL_WB: if (mem_rsp_valid) state <= S_FL_NEXT;
        S_FL_NEXT: begin
          scan <= scan + 1'b1;
          if (scan == IDX_W'(LINES - 1)) begin
            flush_ack <= 1'b1;
            state     <= S_IDLE;
          end else begin
            state <= S_FL_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (LINES >= 2 && (LINES & (LINES - 1)) == 0)
    else $error("private_cache: LINES must be a power of two >= 2");
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> !flush_ack);

endmodule
