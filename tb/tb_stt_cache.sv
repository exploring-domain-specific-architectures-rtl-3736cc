// Self-checking test of stt_cache at its full 32 KB, 4-way, 64-byte geometry
// with a short retention time (RET_CYCLES = 400). A behavioural main memory
// with random latencies answers refills and takes write-through stores; a
// shadow copy of memory is the reference for every load. The test checks
// read data, hit latency (response one cycle after acceptance), that a second
// access to a line hits, that five lines in one set evict each other, that
// stores update both the cache and memory, and that a line not written for
// longer than the retention window misses again (retention expiry).
module tb_stt_cache;
  localparam int RET = 400;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_exp = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         req_valid, req_ready, req_we, resp_valid;
  logic [31:0]  req_addr;
  logic [127:0] req_wdata, resp_rdata;
  logic [15:0]  req_be;
  logic         mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0]  mem_req_addr;
  logic [127:0] mem_req_wdata;
  logic [15:0]  mem_req_be;
  logic [511:0] mem_resp_rdata;
  logic         ev_hit, ev_miss, ev_expired;

  stt_cache #(.RET_CYCLES(RET)) dut (.*);

  // ---------------- behavioural main memory ----------------
  logic [7:0] written [int unsigned];
  function automatic logic [7:0] mem_byte(int unsigned a);
    if (written.exists(a)) return written[a];
    return 8'(a * 37 + (a >> 8) * 11 + 5);
  endfunction

  logic        pending = 0;
  int          lat;
  logic [31:0] paddr;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin
        for (int b = 0; b < 16; b++)
          if (mem_req_be[b]) written[mem_req_addr + 32'(b)] = mem_req_wdata[b*8 +: 8];
      end else begin
        pending <= 1'b1;
        paddr   <= mem_req_addr;
        lat     <= $urandom_range(1, 5);
      end
    end
    if (pending) begin
      if (lat <= 1) begin
        pending <= 1'b0;
        mem_resp_valid <= 1'b1;
        for (int b = 0; b < 64; b++) mem_resp_rdata[b*8 +: 8] <= mem_byte(paddr + 32'(b));
      end else lat <= lat - 1;
    end
    mem_req_ready <= ($urandom_range(0, 2) != 0);
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_expired) n_exp++;
  end

  // ---------------- CPU-side accesses ----------------
  task automatic access(input logic we, input logic [31:0] addr, input logic [127:0] wd,
                        input logic [15:0] be, output logic [127:0] rd, output int cycles);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wd; req_be = be;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    cycles = 1;
    while (!resp_valid) begin @(negedge clk); cycles++; end
    rd = resp_rdata;
  endtask

  task automatic load_check(input logic [31:0] addr, input int want_hit);
    logic [127:0] rd, exp;
    int cyc, h0;
    h0 = n_hit;
    access(0, addr, '0, '0, rd, cyc);
    for (int b = 0; b < 16; b++) exp[b*8 +: 8] = mem_byte({addr[31:4], 4'b0} + 32'(b));
    checks++;
    if (rd !== exp) begin
      failures++;
      $display("FAIL load %h got %h exp %h", addr, rd, exp);
    end
    if (want_hit == 1) begin
      checks++;
      if (cyc != 1) begin failures++; $display("FAIL expected hit latency 1 at %h, got %0d", addr, cyc); end
    end
    if (want_hit == 0) begin
      checks++;
      if (cyc < 2) begin failures++; $display("FAIL expected miss at %h", addr); end
    end
  endtask

  task automatic store(input logic [31:0] addr, input logic [127:0] wd, input logic [15:0] be);
    logic [127:0] rd;
    int cyc;
    access(1, addr, wd, be, rd, cyc);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    mem_req_ready = 1; mem_resp_valid = 0; mem_resp_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // cold miss then hit
    load_check(32'h0000_1000, 0);
    load_check(32'h0000_1010, 1);
    load_check(32'h0000_1030, 1);
    // five lines mapping to set 0x50 (set stride = 8 KB): the fifth evicts one
    for (int k = 0; k < 5; k++) load_check(32'h0001_1400 + 32'(k) * 32'h2000, 0);
    begin
      int misses_before;
      misses_before = n_miss;
      for (int k = 0; k < 5; k++) load_check(32'h0001_1400 + 32'(k) * 32'h2000, -1);
      checks++;
      if (n_miss == misses_before) begin
        failures++; $display("FAIL no eviction among five lines of one set");
      end
    end
    // store hit (write-through) and store miss (no allocate)
    store(32'h0000_1004, {32'h0, 32'h0, 32'hCAFEF00D, 32'h0}, 16'h00F0);
    load_check(32'h0000_1000, 1);
    store(32'h0000_9000, {4{32'h11223344}}, 16'hFFFF);
    load_check(32'h0000_9000, 0);
    // random traffic in a 64 KB window
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] a;
      a = 32'($urandom_range(0, 16'hFFFF)) & 32'hFFFF_FFF0;
      if ($urandom_range(0, 3) == 0)
        store(a, {$urandom, $urandom, $urandom, $urandom}, 16'($urandom));
      else
        load_check(a, -1);
    end
    // retention: a line untouched for longer than 3/4 of RET has expired
    load_check(32'h0000_4000, -1);
    load_check(32'h0000_4000, 1);
    repeat (RET) @(negedge clk);
    e0 = n_exp;
    load_check(32'h0000_4000, 0);
    checks++;
    if (n_exp != e0 + 1) begin failures++; $display("FAIL expired miss not reported"); end
    $display("hits=%0d misses=%0d expired=%0d", n_hit, n_miss, n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
