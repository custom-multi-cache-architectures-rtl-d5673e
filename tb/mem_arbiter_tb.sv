// mem_arbiter_tb: four cache-like clients share the off-chip memory model
// through the arbiter. Ports 0 and 1 are private regions, ports 2 and 3 the
// shared region (SHARED_FIRST = 2).
// Checks: every response returns to the port that asked; private ports see
// their own data only, while ports 2 and 3 see each other's writes; the
// off-chip address is {region, local address}; no port waits longer than the
// round-robin bound; conflicts occur.
// Stimulus changes on the falling clock edge.
module mem_arbiter_tb;
  import mc_pkg::*;

  localparam int unsigned N = 4, SF = 2, ID_W = 2;
  localparam int unsigned SPAN = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid [N];
  logic     req_ready [N];
  mem_req_t req       [N];
  logic     rsp_valid [N];
  data_t    rsp_rdata [N];
  logic                   off_req_valid, off_req_ready, off_req_we;
  logic [ID_W+ADDR_W-1:0] off_req_addr;
  data_t                  off_req_wdata, off_rsp_rdata;
  logic [ID_W-1:0]        off_req_id, off_rsp_id;
  logic                   off_rsp_valid, ev_conflict;

  mem_arbiter #(.N(N), .SHARED_FIRST(SF)) dut (.*);

  offchip_mem_model #(.AW(ID_W + ADDR_W), .ID_W(ID_W), .LATENCY(4)) u_mem (
    .clk, .rst_n,
    .req_valid(off_req_valid), .req_ready(off_req_ready), .req_we(off_req_we),
    .req_addr(off_req_addr), .req_wdata(off_req_wdata), .req_id(off_req_id),
    .rsp_valid(off_rsp_valid), .rsp_id(off_rsp_id), .rsp_rdata(off_rsp_rdata)
  );

  int checks = 0, failures = 0, n_conf = 0;
  data_t ref_mem [3][SPAN];   // regions 0, 1 and shared (index 2)
  bit    outstanding [N];
  bit    shared_busy = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int region_of(int p);
    return (p >= int'(SF)) ? int'(SF) : p;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (ev_conflict) n_conf++;
    for (int i = 0; i < N; i++)
      if (rsp_valid[i]) check(outstanding[i], $sformatf("response to port %0d that did not ask", i));
  end

  task automatic client(int p, int ops);
    for (int n = 0; n < ops; n++) begin
      automatic int    a  = $urandom % SPAN;
      automatic bit    we = 1'($urandom % 2);
      automatic data_t v  = {$urandom, $urandom};
      automatic int    r  = region_of(p);
      automatic int    wt = 0;
      automatic data_t expv;
      // the two shared ports take turns so the expected value is well defined
      if (r == int'(SF)) begin
        while (shared_busy) @(negedge clk);
        shared_busy = 1'b1;
      end
      req_valid[p] = 1'b1;
      req[p]       = '{we: we, addr: addr_t'(a), wdata: v};
      #1;  // let the combinational grant settle before sampling it
      while (!req_ready[p]) begin
        @(negedge clk);
        #1;
        wt++;
      end
      check(off_req_addr == {ID_W'(r), addr_t'(a)}, $sformatf("port %0d off-chip address %h", p, off_req_addr));
      check(wt <= int'(N) * 4, $sformatf("port %0d waited %0d cycles", p, wt));
      outstanding[p] = 1'b1;
      expv = ref_mem[(r == int'(SF)) ? 2 : r][a];
      if (we) ref_mem[(r == int'(SF)) ? 2 : r][a] = v;
      @(negedge clk);
      req_valid[p] = 1'b0;
      while (!rsp_valid[p]) @(negedge clk);
      if (!we) check(rsp_rdata[p] == expv, $sformatf("port %0d read %0d", p, a));
      @(negedge clk);
      outstanding[p] = 1'b0;
      if (r == int'(SF)) shared_busy = 1'b0;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      req_valid[i] = 1'b0; req[i] = '0; outstanding[i] = 1'b0;
    end
    for (int a = 0; a < SPAN; a++) begin
      ref_mem[0][a] = tb_pkg::init_word(64'(a));
      ref_mem[1][a] = tb_pkg::init_word(64'((1 << ADDR_W) + a));
      ref_mem[2][a] = tb_pkg::init_word((64'(SF) << ADDR_W) + 64'(a));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    fork
      client(0, 300);
      client(1, 300);
      client(2, 300);
      client(3, 300);
    join
    check(n_conf > 0, "conflicts happened");
    $display("conflict cycles=%0d", n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
