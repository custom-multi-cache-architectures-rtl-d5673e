// cache_bank_store: the on-chip memory of one cache, split into parallel banks
// with a pipeline register at the input and one at the output.
//
// Large cache memories spread over many block RAMs; registering the request
// before it fans out to the banks and the read data after the bank multiplexer
// keeps the long cross-chip wires out of the critical path. The low index bits
// select the bank, the high bits the row inside it.
//
// Interface: one request per cycle (req_valid, req_we, req_idx, req_wentry).
// Timing: a write lands in its bank two clock edges after it is presented; a
// read returns rsp_entry with rsp_valid three cycles after the request
// (input register, bank read, output register). Requests are handled in
// order, so a read issued after a write to the same index sees the new value.
// Splitting into banks with buffers at both ends follows the cache design the
// system is built from; the bank count and the fixed three-cycle read latency
// are this implementation's choices. The memory content is not reset: the
// owning cache clears it after reset.
module cache_bank_store #(
  parameter int unsigned LINES  = 128,  // number of entries (power of two)
  parameter int unsigned NBANKS = 4,    // number of parallel banks (power of two)
  parameter int unsigned W      = 64    // entry width in bits
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req_valid,
  input  logic                     req_we,
  input  logic [$clog2(LINES)-1:0] req_idx,
  input  logic [W-1:0]             req_wentry,
  output logic                     rsp_valid,
  output logic [W-1:0]             rsp_entry
);
  localparam int unsigned IDX_W  = $clog2(LINES);
  localparam int unsigned BANK_W = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned ROWS   = LINES / NBANKS;
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1;

  // stage 0: input buffer
  logic             s0_valid, s0_we;
  logic [IDX_W-1:0] s0_idx;
  logic [W-1:0]     s0_wentry;
  // stage 1: bank access
  logic             s1_valid;
  logic [BANK_W-1:0] s1_bank;
  logic [W-1:0]     bank_q [NBANKS];

  logic [BANK_W-1:0] s0_bank;
  logic [ROW_W-1:0]  s0_row;

  always_comb begin
    if (NBANKS > 1) s0_bank = BANK_W'(s0_idx % NBANKS);
    else            s0_bank = '0;
    if (ROWS > 1)   s0_row  = ROW_W'(s0_idx / NBANKS);
    else            s0_row  = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s0_valid  <= 1'b0;
      s0_we     <= 1'b0;
      s0_idx    <= '0;
      s0_wentry <= '0;
      s1_valid  <= 1'b0;
      s1_bank   <= '0;
      rsp_valid <= 1'b0;
      rsp_entry <= '0;
    end else begin
      s0_valid  <= req_valid;
      s0_we     <= req_we;
      s0_idx    <= req_idx;
      s0_wentry <= req_wentry;
      s1_valid  <= s0_valid && !s0_we;
      s1_bank   <= s0_bank;
      rsp_valid <= s1_valid;
      if (s1_valid) rsp_entry <= bank_q[s1_bank];
    end
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic [W-1:0] mem [ROWS];
    logic [W-1:0] q;
    always_ff @(posedge clk) begin
      if (s0_valid && s0_bank == BANK_W'(b)) begin
        if (s0_we) mem[s0_row] <= s0_wentry;
        else       q           <= mem[s0_row];
      end
    end
    assign bank_q[b] = q;
  end

endmodule
