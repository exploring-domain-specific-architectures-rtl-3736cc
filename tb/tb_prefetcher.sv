// Self-checking test of the graph prefetcher. The testbench builds a random
// graph in a behavioural word memory (node layout: successor count at +0,
// successor pointers from +4, a 16-bit "distance" parameter at +0x42 and a
// 32-bit "cost" parameter at +0x44), programs the prefetch registers, and
// asks for the successors of many nodes. After each request the buffer model
// must hold the distances of all successors contiguously from sample 100 and
// their costs (two samples each) from sample 200, and count must give the
// number of successors, clamped to MAX_SUCC. Memory latency and buffer
// readiness are random.
module tb_prefetcher;
  localparam int MAXS = 8;
  localparam int NNODES = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en, cfg_we, go, busy, done;
  logic [3:0]  cfg_idx;
  logic [31:0] cfg_wdata, go_addr;
  logic [3:0]  count;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_resp_data;
  logic        buf_valid, buf_ready;
  logic [12:0] buf_idx;
  logic [15:0] buf_data;

  prefetcher #(.MAX_SUCC(MAXS), .MAX_PARAMS(4), .SI_W(13)) dut (.*);

  // ---------------- graph in memory ----------------
  logic [31:0] mem [int unsigned];
  function automatic int unsigned node_addr(int n);
    return 32'h0010_0000 + 32'(n) * 32'h80;
  endfunction

  int nsucc [NNODES];
  int succ  [NNODES][12];

  task automatic build_graph();
    for (int n = 0; n < NNODES; n++) begin
      int unsigned a;
      a = node_addr(n);
      nsucc[n] = (n == 5) ? 11 : $urandom_range(0, 6);
      mem[a] = 32'(nsucc[n]);
      for (int s = 0; s < nsucc[n]; s++) begin
        succ[n][s] = $urandom_range(0, NNODES - 1);
        mem[a + 4 + 4 * s] = node_addr(succ[n][s]);
      end
      mem[a + 32'h40] = {16'(n * 3 + 1), 16'hAAAA};  // distance in the upper half
      mem[a + 32'h44] = 32'(n * 32'h0001_0203 + 7);  // cost
    end
  endtask

  // ---------------- memory model ----------------
  logic pend = 0;
  int   lat;
  logic [31:0] paddr;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      pend <= 1; paddr <= mem_req_addr; lat <= $urandom_range(1, 4);
    end
    if (pend) begin
      if (lat <= 1) begin
        pend <= 0;
        mem_resp_valid <= 1'b1;
        mem_resp_data  <= mem.exists(paddr) ? mem[paddr] : 32'hDEAD_0000;
      end else lat <= lat - 1;
    end
    mem_req_ready <= ($urandom_range(0, 3) != 0) && !pend;
    buf_ready     <= ($urandom_range(0, 3) != 0);
  end

  // ---------------- buffer model ----------------
  logic [15:0] bufm [8192];
  always @(posedge clk)
    if (buf_valid && buf_ready) bufm[buf_idx] <= buf_data;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic cfg(int idx, logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_idx = 4'(idx); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; cfg_we = 0; cfg_idx = 0; cfg_wdata = 0; go = 0; go_addr = 0;
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = 0; buf_ready = 0;
    build_graph();
    #22 rst_n = 1;
    // prefetch init: node layout and two parameters
    cfg(0, 32'h0);                     // successor count offset
    cfg(1, 32'h4);                     // successor array offset
    cfg(2, 32'd2);                     // two parameters
    cfg(4, 32'h42);                    // distance: 16 bits at +0x42
    cfg(5, {14'b0, 2'd1, 16'd100});    // one sample per node, array at 100
    cfg(6, 32'h44);                    // cost: 32 bits at +0x44
    cfg(7, {14'b0, 2'd2, 16'd200});    // two samples per node, array at 200
    for (int t = 0; t < 80; t++) begin
      int n, k;
      n = (t == 3) ? 5 : $urandom_range(0, NNODES - 1);
      for (int i = 0; i < 300; i++) bufm[i] = 16'hFFFF;
      @(negedge clk); go = 1; go_addr = node_addr(n);
      @(negedge clk); go = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy not raised"); end
      while (!done) @(negedge clk);
      @(negedge clk);
      k = (nsucc[n] > MAXS) ? MAXS : nsucc[n];
      expect_eq(int'(count), k, "successor count");
      for (int s = 0; s < k; s++) begin
        int m;
        logic [31:0] cost;
        m = succ[n][s];
        cost = 32'(m * 32'h0001_0203 + 7);
        expect_eq(int'(bufm[100 + s]), (m * 3 + 1) & 16'hFFFF, $sformatf("distance[%0d] of node %0d", s, n));
        expect_eq(int'(bufm[200 + 2 * s]), int'(cost[15:0]), "cost low");
        expect_eq(int'(bufm[201 + 2 * s]), int'(cost[31:16]), "cost high");
      end
      expect_eq(int'(bufm[100 + k]), 16'hFFFF, "no write past the array");
    end
    // power-gated: a start request is ignored
    en = 0;
    @(negedge clk); go = 1; go_addr = node_addr(1);
    @(negedge clk); go = 0;
    @(negedge clk);
    expect_eq(int'(busy), 0, "gated prefetcher stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
