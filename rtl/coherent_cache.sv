// coherent_cache: direct-mapped, write-back cache for a heap region shared by
// several parallel units, kept coherent with its peers over a ring.
//
// Each line holds one 64-bit word and an MSI state (I, S, M). Reads hit in S
// or M, writes hit only in M. Any other access is a coherence miss. The node
// then waits for the single ring token, sends a request (GETS for a read, GETX
// for a write) around the ring, and waits until the request comes back to it.
// On the way, every other node snoops it. A node holding the line in M writes
// the line back to memory and drops to S (GETS) or I (GETX). A node holding it
// in S drops to I on a GETX. Back home, the requester writes back its own dirty
// victim if there is one. A read then fills the line from memory in S. A write
// installs the new word in M; a line is one word, so no fetch is needed.
// Finally the node releases the token. Only the token holder can have a
// request on the ring, so coherence transactions are serialised and every
// node sees them in the same order. A node forwards a snooped request only
// after its write-back is acknowledged, so the requester's fill always reads
// the latest data.
//
// Interface: kernel side and memory side as in private_cache (one request at
// a time, one response pulse per request; one memory response per memory
// request). Ring side: msg_in/msg_out carry one ring_msg_t per cycle from the
// previous to the next node; tok_in/tok_out carry the token. Node NODE == 0
// holds the token after reset. Timing: a hit answers 4 cycles after the
// accepting edge; a miss costs at least the token wait plus one ring round trip
// (one cycle per node) plus the memory latency.
// Direct mapping, write-back and the ring follow the evaluated system; the
// MSI states, the token serialisation and the message format are this
// implementation's choices.
module coherent_cache
  import mc_pkg::*;
#(
  parameter int unsigned LINES  = 128,  // 1 kB of 64-bit lines
  parameter int unsigned NBANKS = 4,
  parameter int unsigned NODE   = 0     // position on the ring
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
  // ring
  input  ring_msg_t  msg_in,
  output ring_msg_t  msg_out,
  input  logic       tok_in,
  output logic       tok_out,
  // maintenance and statistics
  input  logic       flush_req,
  output logic       flush_ack,
  output logic       ev_hit,
  output logic       ev_miss,
  output logic       ev_wb,       // any write-back (victim, snoop or flush)
  output logic       ev_snoop_wb, // write-back forced by a peer's request
  output logic       ev_inv       // line invalidated by a peer's GETX
);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - IDX_W;
  localparam logic [NODE_W-1:0] ME = NODE_W'(NODE);

  typedef struct packed {
    coh_state_t       st;
    logic [TAG_W-1:0] tag;
    data_t            data;
  } entry_t;

  typedef enum logic [4:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WAIT_TOK, S_SEND, S_WAIT_RET, S_RELOOK,
    S_VWB_REQ, S_VWB_WAIT, S_DO, S_FILL_REQ, S_FILL_WAIT,
    S_SNP_RD, S_SNP_WAIT, S_SNP_WB_REQ, S_SNP_WB_WAIT, S_SNP_UPD,
    S_FL_RD, S_FL_WAIT, S_FL_WB_REQ, S_FL_WB_WAIT, S_FL_NEXT
  } state_t;

  state_t           state, snp_ret;
  cache_req_t       cur;
  entry_t           ent;
  logic [IDX_W-1:0] scan;
  ring_msg_t        snp;        // snooped request waiting to be handled
  logic             ret_seen;   // our own request came back
  logic             have_tok;

  logic             st_req_valid, st_req_we;
  logic [IDX_W-1:0] st_req_idx;
  entry_t           st_wentry, st_rentry;
  logic             st_rsp_valid;

  logic [IDX_W-1:0] cur_idx, snp_idx;
  logic [TAG_W-1:0] cur_tag, snp_tag;
  assign cur_idx = cur.addr[IDX_W-1:0];
  assign cur_tag = cur.addr[ADDR_W-1:IDX_W];
  assign snp_idx = snp.addr[IDX_W-1:0];
  assign snp_tag = snp.addr[ADDR_W-1:IDX_W];

  cache_bank_store #(.LINES(LINES), .NBANKS(NBANKS), .W($bits(entry_t))) u_store (
    .clk, .rst_n,
    .req_valid (st_req_valid),
    .req_we    (st_req_we),
    .req_idx   (st_req_idx),
    .req_wentry(st_wentry),
    .rsp_valid (st_rsp_valid),
    .rsp_entry (st_rentry)
  );

  logic tag_match, local_hit;
  assign tag_match = (st_rentry.st != COH_I) && (st_rentry.tag == cur_tag);
  assign local_hit = tag_match && (!cur.we || st_rentry.st == COH_M);

  // state of the snooped line after the peer's request
  coh_state_t snp_next;
  always_comb begin
    snp_next = ent.st;
    if (ent.st != COH_I && ent.tag == snp_tag) begin
      if (snp.op == RING_GETX)    snp_next = COH_I;
      else if (ent.st == COH_M)   snp_next = COH_S;
    end
  end

  logic want_tok;
  assign want_tok  = (state == S_WAIT_TOK) && !have_tok;
  assign req_ready = (state == S_IDLE) && !snp.valid && !flush_req;

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
        st_wentry.st = COH_I;
      end
      S_IDLE: begin
        st_req_valid = req_valid && req_ready;
        st_req_idx   = req.addr[IDX_W-1:0];
      end
      S_LOOKUP: begin
        if (st_rsp_valid && local_hit && cur.we) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_wentry    = '{st: COH_M, tag: cur_tag, data: cur.wdata};
        end
      end
      S_WAIT_RET: st_req_valid = ret_seen;
      S_DO: begin
        if (cur.we) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_wentry    = '{st: COH_M, tag: cur_tag, data: cur.wdata};
        end
      end
      S_FILL_WAIT: begin
        if (mem_rsp_valid) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_wentry    = '{st: COH_S, tag: cur_tag, data: mem_rsp_rdata};
        end
      end
      S_SNP_RD: begin
        st_req_valid = 1'b1;
        st_req_idx   = snp_idx;
      end
      S_SNP_UPD: begin
        st_req_valid = (snp_next != ent.st);
        st_req_we    = 1'b1;
        st_req_idx   = snp_idx;
        st_wentry    = ent;
        st_wentry.st = snp_next;
      end
      S_FL_RD: begin
        st_req_valid = 1'b1;
        st_req_idx   = scan;
      end
      S_FL_WB_WAIT: begin
        if (mem_rsp_valid) begin
          st_req_valid = 1'b1;
          st_req_we    = 1'b1;
          st_req_idx   = scan;
          st_wentry    = ent;
          st_wentry.st = COH_S;
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
      S_VWB_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = {ent.tag, cur_idx};
        mem_req.wdata = ent.data;
      end
      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.addr  = cur.addr;
      end
      S_SNP_WB_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = snp.addr;
        mem_req.wdata = ent.data;
      end
      S_FL_WB_REQ: begin
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
      state       <= S_INIT;
      snp_ret     <= S_IDLE;
      cur         <= '0;
      ent         <= '0;
      scan        <= '0;
      snp         <= '0;
      ret_seen    <= 1'b0;
      have_tok    <= 1'b0;
      tok_out     <= (NODE == 0);
      msg_out     <= '0;
      rsp_valid   <= 1'b0;
      rsp_rdata   <= '0;
      flush_ack   <= 1'b0;
      ev_hit      <= 1'b0;
      ev_miss     <= 1'b0;
      ev_wb       <= 1'b0;
      ev_snoop_wb <= 1'b0;
      ev_inv      <= 1'b0;
    end else begin
      rsp_valid   <= 1'b0;
      flush_ack   <= 1'b0;
      ev_hit      <= 1'b0;
      ev_miss     <= 1'b0;
      ev_wb       <= 1'b0;
      ev_snoop_wb <= 1'b0;
      ev_inv      <= 1'b0;
      msg_out     <= '0;

      // token: keep it when waiting for it, otherwise pass it on
      tok_out <= 1'b0;
      if (tok_in) begin
        if (want_tok) have_tok <= 1'b1;
        else          tok_out  <= 1'b1;
      end

      // ring input: a peer's request is buffered, our own one is noted
      if (msg_in.valid) begin
        if (msg_in.src == ME) ret_seen <= 1'b1;
        else                  snp      <= msg_in;
      end

      unique case (state)
        S_INIT: begin
          scan <= scan + 1'b1;
          if (scan == IDX_W'(LINES - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (snp.valid) begin
            snp_ret <= S_IDLE;
            state   <= S_SNP_RD;
          end else if (flush_req) begin
            scan  <= '0;
            state <= S_FL_RD;
          end else if (req_valid) begin
            cur   <= req;
            state <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (st_rsp_valid) begin
            if (local_hit) begin
              ev_hit    <= 1'b1;
              rsp_valid <= 1'b1;
              rsp_rdata <= cur.we ? '0 : st_rentry.data;
              state     <= S_IDLE;
            end else begin
              ev_miss <= 1'b1;
              state   <= S_WAIT_TOK;
            end
          end
        end
        S_WAIT_TOK: begin
          if (have_tok)       state <= S_SEND;
          else if (snp.valid) begin
            snp_ret <= S_WAIT_TOK;
            state   <= S_SNP_RD;
          end
        end
        S_SEND: begin
          msg_out <= '{valid: 1'b1, op: cur.we ? RING_GETX : RING_GETS, src: ME, addr: cur.addr};
          state   <= S_WAIT_RET;
        end
        S_WAIT_RET: begin
          if (ret_seen) begin
            ret_seen <= 1'b0;
            state    <= S_RELOOK;
          end
        end
        S_RELOOK: begin
          if (st_rsp_valid) begin
            ent <= st_rentry;
            if (st_rentry.st == COH_M && st_rentry.tag != cur_tag) state <= S_VWB_REQ;
            else                                                   state <= S_DO;
          end
        end
        S_VWB_REQ: if (mem_req_ready) begin
          ev_wb <= 1'b1;
          state <= S_VWB_WAIT;
        end
        S_VWB_WAIT: if (mem_rsp_valid) state <= S_DO;
        S_DO: begin
          if (cur.we) begin
            rsp_valid <= 1'b1;
            rsp_rdata <= '0;
            have_tok  <= 1'b0;
            tok_out   <= 1'b1;
            state     <= S_IDLE;
          end else begin
            state <= S_FILL_REQ;
          end
        end
        S_FILL_REQ: if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_rsp_valid) begin
          rsp_valid <= 1'b1;
          rsp_rdata <= mem_rsp_rdata;
          have_tok  <= 1'b0;
          tok_out   <= 1'b1;
          state     <= S_IDLE;
        end
        // snoop of a peer's request
        S_SNP_RD: state <= S_SNP_WAIT;
        S_SNP_WAIT: if (st_rsp_valid) begin
          ent <= st_rentry;
          if (st_rentry.st == COH_M && st_rentry.tag == snp_tag) state <= S_SNP_WB_REQ;
          else                                                   state <= S_SNP_UPD;
        end
        S_SNP_WB_REQ: if (mem_req_ready) begin
          ev_wb       <= 1'b1;
          ev_snoop_wb <= 1'b1;
          state       <= S_SNP_WB_WAIT;
        end
        S_SNP_WB_WAIT: if (mem_rsp_valid) state <= S_SNP_UPD;
        S_SNP_UPD: begin
          ev_inv  <= (snp_next == COH_I) && (ent.st != COH_I);
          msg_out <= snp;
          snp     <= '0;
          state   <= snp_ret;
        end
        // flush: write back every M line, keep it as S
        S_FL_RD: state <= S_FL_WAIT;
        S_FL_WAIT: if (st_rsp_valid) begin
          ent <= st_rentry;
          if (st_rentry.st == COH_M) state <= S_FL_WB_REQ;
          else                       state <= S_FL_NEXT;
        end
        S_FL_WB_REQ: if (mem_req_ready) begin
          ev_wb <= 1'b1;
          state <= S_FL_WB_WAIT;
        end
        S_FL_WB_WAIT: if (mem_rsp_valid) state <= S_FL_NEXT;
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
    else $error("coherent_cache: LINES must be a power of two >= 2");
  // a second peer request can never arrive before the first is forwarded
  assert property (@(posedge clk) disable iff (!rst_n)
                   (msg_in.valid && msg_in.src != ME) |-> !snp.valid);

endmodule
