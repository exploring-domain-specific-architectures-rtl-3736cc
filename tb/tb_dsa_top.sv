// End-to-end test of the whole DSA core at its default parameters (32 KB
// STT-RAM caches with 75 us = 75000-cycle retention, 16 KB buffer, eight
// successors, four prefetch parameters).
//
// Behavioural models stand in for what lies outside the design: main memory
// (line refills, write-through stores, prefetcher word reads), the sensors
// and the host front end, which issues micro-operations. A reference model
// (dsa_ref_pkg) executes each micro-operation when it is accepted and every
// register write-back of the RTL is compared with it, in order.
//
// The program walks through the design's mechanisms: SIMD kernels (vector
// add, multiply-add, compare/shift mixes as in convolution, MAC and DTW
// loops), scalar code, cache misses, hits and stores, register hazards,
// power-gated units woken on demand, ECG-style samples streamed from the
// sensor into the buffer (SS=1) or to memory (SS=0), memory-to-buffer
// transfers, graph prefetches gathered into buffer arrays and read back as
// vectors, loads held while the prefetcher is busy, an instruction fetch
// through the I-cache, and a cache line that expires after the retention
// time. Each mechanism is counted and must occur at least once.
module tb_dsa_top;
  import dsa_pkg::*;
  import dsa_ref_pkg::*;

  localparam int MAXS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- DUT ----------------
  logic         uop_valid, uop_ready;
  uop_t         uop;
  logic         if_req_valid, if_req_ready, if_resp_valid;
  logic [31:0]  if_req_addr;
  logic [127:0] if_resp_data;
  logic         im_req_valid, im_req_ready, im_resp_valid;
  logic [31:0]  im_req_addr;
  logic [511:0] im_resp_rdata;
  logic         dm_req_valid, dm_req_ready, dm_req_we, dm_resp_valid;
  logic [31:0]  dm_req_addr;
  logic [127:0] dm_req_wdata;
  logic [15:0]  dm_req_be;
  logic [511:0] dm_resp_rdata;
  logic         pm_req_valid, pm_req_ready, pm_resp_valid;
  logic [31:0]  pm_req_addr, pm_resp_data;
  logic         fill_valid, fill_ready;
  logic [12:0]  fill_idx;
  logic [15:0]  fill_data;
  logic         sensor_valid, sensor_ready, smem_valid, smem_ready;
  logic [15:0]  sensor_data, smem_data;
  logic [12:0]  sensor_wr_ptr;
  logic [2:0]   pwr_en;
  logic         wb_valid, wb_vec;
  logic [3:0]   wb_rd;
  logic [127:0] wb_data;
  logic         pf_done;
  logic [3:0]   pf_count;
  logic [9:0]   ev;

  dsa_top dut (.*);

  // ---------------- reference model and checking ----------------
  dsa_model model = new();
  wb_t      expq [$];

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) if (rst_n && wb_valid) begin
    wb_t e;
    if (expq.size() == 0) expect_true(0, "unexpected write-back");
    else begin
      e = expq.pop_front();
      checks++;
      if (wb_vec !== e.vec || int'(wb_rd) != e.rd || wb_data !== e.data) begin
        failures++;
        if (failures < 20)
          $display("FAIL write-back: got vec=%0d r%0d %h, expected vec=%0d r%0d %h (cycle %0d)",
                   wb_vec, wb_rd, wb_data, e.vec, e.rd, e.data, cycle);
      end
    end
  end

  // ---------------- main memory model ----------------
  logic [7:0] sysmem [int unsigned];
  function automatic logic [7:0] m8(int unsigned a);
    if (sysmem.exists(a)) return sysmem[a];
    return 8'(a * 37 + (a >> 8) * 11 + 5);
  endfunction
  function automatic void put32(int unsigned a, logic [31:0] d);
    for (int b = 0; b < 4; b++) begin
      sysmem[a + 32'(b)] = d[8*b +: 8];
      model.mem[a + 32'(b)] = d[8*b +: 8];
    end
  endfunction

  // D-cache and I-cache channels: line reads after a random latency
  logic dpend = 0, ipend = 0, ppend = 0;
  int   dlat, ilat, plat;
  logic [31:0] daddr, iaddr, paddr;
  always @(posedge clk) begin
    dm_resp_valid <= 0; im_resp_valid <= 0; pm_resp_valid <= 0;
    if (dm_req_valid && dm_req_ready) begin
      if (dm_req_we) begin
        for (int b = 0; b < 16; b++)
          if (dm_req_be[b]) sysmem[dm_req_addr + 32'(b)] = dm_req_wdata[8*b +: 8];
      end else begin dpend <= 1; daddr <= dm_req_addr; dlat <= $urandom_range(2, 8); end
    end
    if (dpend) begin
      if (dlat <= 1) begin
        dpend <= 0; dm_resp_valid <= 1;
        for (int b = 0; b < 64; b++) dm_resp_rdata[8*b +: 8] <= m8(daddr + 32'(b));
      end else dlat <= dlat - 1;
    end
    if (im_req_valid && im_req_ready) begin ipend <= 1; iaddr <= im_req_addr; ilat <= $urandom_range(2, 8); end
    if (ipend) begin
      if (ilat <= 1) begin
        ipend <= 0; im_resp_valid <= 1;
        for (int b = 0; b < 64; b++) im_resp_rdata[8*b +: 8] <= m8(iaddr + 32'(b));
      end else ilat <= ilat - 1;
    end
    if (pm_req_valid && pm_req_ready) begin ppend <= 1; paddr <= pm_req_addr; plat <= $urandom_range(1, 6); end
    if (ppend) begin
      if (plat <= 1) begin
        ppend <= 0; pm_resp_valid <= 1;
        pm_resp_data <= {m8(paddr + 3), m8(paddr + 2), m8(paddr + 1), m8(paddr)};
      end else plat <= plat - 1;
    end
    dm_req_ready <= $urandom_range(0, 3) != 0;
    im_req_ready <= $urandom_range(0, 3) != 0;
    pm_req_ready <= ($urandom_range(0, 3) != 0);
  end

  // ---------------- mechanism counters ----------------
  int n_retire, n_hz, n_memst, n_wake_st, n_pf_st, n_simd, n_hit, n_miss, n_exp, n_wake;
  int n_sens_buf, n_sens_mem, n_fill, n_pf_done, n_ifetch;
  always @(posedge clk) if (rst_n) begin
    n_retire  += int'(ev[0]); n_hz    += int'(ev[1]); n_memst += int'(ev[2]);
    n_wake_st += int'(ev[3]); n_pf_st += int'(ev[4]); n_simd  += int'(ev[5]);
    n_hit     += int'(ev[6]); n_miss  += int'(ev[7]); n_exp   += int'(ev[8]);
    n_wake    += int'(ev[9]);
    n_pf_done += int'(pf_done);
    if (sensor_valid && sensor_ready && !smem_valid) n_sens_buf++;
    if (smem_valid && smem_ready) n_sens_mem++;
    if (fill_valid && fill_ready) n_fill++;
  end

  // ---------------- front end ----------------
  task automatic issue(uop_t u);
    wb_t r;
    @(negedge clk);
    uop_valid = 1; uop = u;
    #1;
    while (!uop_ready) begin @(negedge clk); #1; end
    r = model.exec(u, MAXS);
    if (r.valid) expq.push_back(r);
  endtask

  task automatic drain();
    @(negedge clk);
    uop_valid = 0;
    uop = mk(U_NOP, OP_ADD, 0, 0, 0);
    while (expq.size() != 0 || dut.u_dp.ex_q.valid || dut.u_dp.mem_q.valid) @(negedge clk);
  endtask

  // memory-to-buffer transfer of n samples from sample index first
  task automatic fill(int first, int n, int seed);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      fill_valid = 1; fill_idx = 13'(first + i); fill_data = 16'(i * 1000 + seed);
      #1;
      while (!fill_ready) begin @(negedge clk); #1; end
      model.bufm[first + i] = fill_data;
    end
    @(negedge clk) fill_valid = 0;
  endtask

  task automatic cfg(logic [3:0] v);
    issue(mk(U_CFG, OP_ADD, 0, 0, 0, 0, 32'(v)));
  endtask

  // random ALU operation on vector or scalar registers
  function automatic uop_t rand_alu(bit vec);
    alu_op_e o;
    o = alu_op_e'($urandom_range(0, int'(OP_MOVB)));
    if (vec) return mk(U_VALU, o, $urandom_range(1, 15), $urandom_range(0, 15),
                       $urandom_range(0, 15), $urandom_range(0, 15));
    return mk(U_SALU, o, $urandom_range(2, 15), $urandom_range(0, 15), $urandom_range(0, 15),
              $urandom_range(0, 15), 32'($urandom_range(0, 40)), 0, T_CACHE, $urandom_range(0, 1));
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    uop_valid = 0; uop = '0;
    if_req_valid = 0; if_req_addr = 0;
    fill_valid = 0; fill_idx = 0; fill_data = 0;
    sensor_valid = 0; sensor_data = 0; smem_ready = 1;
    dm_resp_rdata = '0; im_resp_rdata = '0; pm_resp_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- scalar set-up and vector loads through the data cache ----
    issue(li(1, 32'h0000_2000));
    issue(li(2, 32'h0000_3000));
    for (int k = 1; k <= 6; k++)
      issue(mk(U_LOAD, OP_ADD, k, 1, 0, 0, 32'(16 * k), 1));          // v1..v6 (miss, then hits)
    // SIMD unit is off after reset: this waits for the wake-up
    issue(mk(U_VALU, OP_ADD,  7, 1, 2));                              // v7 = v1 + v2
    issue(mk(U_VALU, OP_MADD, 8, 3, 4, 7));                           // v8 = v3*v4 + v7 (hazard)
    issue(mk(U_VALU, OP_GT,   9, 8, 5));
    issue(mk(U_VALU, OP_SRA, 10, 8, 6));
    issue(mk(U_STORE, OP_ADD, 0, 2, 8, 0, 32'h0, 1));                // store v8 to 0x3000
    issue(mk(U_LOAD,  OP_ADD, 11, 2, 0, 0, 32'h0, 1));               // read it back
    issue(mk(U_STORE, OP_ADD, 0, 2, 1, 0, 32'h24, 0));               // scalar store r1 to 0x3024
    issue(mk(U_LOAD,  OP_ADD, 3, 2, 0, 0, 32'h24, 0));                // r3 = mem[0x3024]
    drain();

    // ---- ALU latency and throughput ----
    issue(li(4, 32'd5));
    drain();
    for (int k = 0; k < 8; k++) begin
      issue(mk(U_SALU, OP_ADD, 5 + k, 4, 0, 0, 32'(k), 0, T_CACHE, 1)); // independent
      if (k == 0) t0 = cycle;
    end
    expect_true(cycle - t0 == 7, $sformatf("eight independent ALU ops issue back to back (%0d)", cycle - t0));
    drain();

    // ---- random mix: scalar and SIMD ALU, cache loads and stores ----
    for (int n = 0; n < 600; n++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 4)       issue(rand_alu(1));
      else if (r < 7)  issue(rand_alu(0));
      else if (r < 9)  issue(mk(U_LOAD, OP_ADD, $urandom_range(2, 15), 1, 0, 0,
                                32'($urandom_range(0, 255) * 16 + $urandom_range(0, 3) * 4), $urandom_range(0, 1)));
      else             issue(mk(U_STORE, OP_ADD, 0, 1, $urandom_range(0, 15), 0,
                                32'($urandom_range(0, 255) * 16), $urandom_range(0, 1)));
      if (n % 100 == 99) issue(li(1, 32'h0000_2000 + 32'($urandom_range(0, 64)) * 32'h400));
    end
    drain();

    // ---- ECG-style samples: sensors into the buffer (SS = 1) ----
    cfg(4'b1011);                                    // SIMD + buffer on, SS = 1
    drain();
    repeat (6) @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      sensor_valid = 1; sensor_data = 16'(i * 13 - 700);
      #1;
      while (!sensor_ready) begin @(negedge clk); #1; end
      model.bufm[i] = sensor_data;
    end
    @(negedge clk) sensor_valid = 0;
    expect_true(sensor_wr_ptr == 13'd256, "sensor ring pointer");
    // memory-to-buffer transfer of 32 samples at sample 4096
    fill(4096, 32, 1);
    // peak-detection style kernel: vector loads from the buffer, SIMD compare/max
    issue(li(1, 32'h0));
    for (int r = 0; r < 32; r++) begin
      issue(mk(U_LOAD, OP_ADD, 1, 1, 0, 0, 32'(16 * r), 1, T_BUFFER));
      issue(mk(U_VALU, OP_SUB, 2, 1, 3));
      issue(mk(U_VALU, OP_GTZ, 3, 2, 0));
      issue(mk(U_VALU, OP_AND, 4, 3, 1));
    end
    for (int k = 0; k < 20; k++)
      issue(mk(U_LOAD, OP_ADD, 6, 1, 0, 0, 32'($urandom_range(0, 255) * 2), 0, T_BUFFER));
    issue(mk(U_LOAD, OP_ADD, 5, 1, 0, 0, 32'(8192), 1, T_BUFFER));  // transferred samples
    issue(mk(U_LOAD, OP_ADD, 6, 1, 0, 0, 32'(8192 + 32), 1, T_BUFFER));
    drain();

    // ---- sensor samples to main memory (SS = 0) ----
    cfg(4'b0011);
    drain();
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      sensor_valid = 1; sensor_data = 16'(i);
      smem_ready = $urandom_range(0, 1);
      #1;
      while (!sensor_ready) begin @(negedge clk); smem_ready = 1; #1; end
    end
    @(negedge clk) sensor_valid = 0;
    expect_true(sensor_wr_ptr == 13'd256, "SS = 0 leaves the buffer alone");

    // ---- graph prefetch (A*-style successor gathering) ----
    // nodes at 0x10000 + 0x80*n: count at +0, pointers at +4, distance at +0x40,
    // cost at +0x44
    for (int n = 0; n < 32; n++) begin
      int ns;
      ns = (n == 7) ? 12 : $urandom_range(1, 8);
      put32(32'h0001_0000 + 32'(n) * 32'h80, 32'(ns));
      for (int s = 0; s < ns; s++)
        put32(32'h0001_0000 + 32'(n) * 32'h80 + 32'(4 + 4 * s),
              32'h0001_0000 + 32'($urandom_range(0, 31)) * 32'h80);
      put32(32'h0001_0000 + 32'(n) * 32'h80 + 32'h40, {16'(n * 7), 16'(1000 - n)});
      put32(32'h0001_0000 + 32'(n) * 32'h80 + 32'h44, 32'(n * 32'h0003_0001));
    end
    // prefetch init (the prefetcher is off: the first command wakes it)
    issue(li(2, 32'h0));    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd0));
    issue(li(2, 32'h4));    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd1));
    issue(li(2, 32'd2));    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd2));
    issue(li(2, 32'h40));   issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd4));
    issue(li(2, 32'h0001_0800)); issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd5));  // 1 sample -> 2048
    issue(li(2, 32'h44));   issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd6));
    issue(li(2, 32'h0002_0A00)); issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd7));  // 2 samples -> 2560
    cfg(4'b0111);
    drain();
    fill(2048, 8, 2);     // rows read back below: defined contents beyond the gathered samples
    fill(2560, 24, 3);
    for (int t = 0; t < 12; t++) begin
      int n;
      n = (t == 0) ? 7 : $urandom_range(0, 31);
      issue(li(3, 32'h0001_0000 + 32'(n) * 32'h80));
      issue(mk(U_PF_GO, OP_ADD, 0, 3, 0, 0, 32'h0));
      // the kernel reads the gathered arrays right away: held while busy
      issue(mk(U_LOAD, OP_ADD, 7, 0, 0, 0, 32'(2048 * 2), 1, T_BUFFER));
      issue(mk(U_LOAD, OP_ADD, 8, 0, 0, 0, 32'(2560 * 2), 1, T_BUFFER));
      issue(mk(U_LOAD, OP_ADD, 9, 0, 0, 0, 32'(2560 * 2 + 16), 1, T_BUFFER));
      issue(mk(U_VALU, OP_ADD, 10, 7, 8));            // f = g + h style update
      issue(mk(U_VALU, OP_LT, 11, 10, 9));
      drain();
      if (t == 0) expect_true(int'(pf_count) == MAXS, "successor count clamped to eight");
    end

    // ---- instruction fetch through the I-cache ----
    for (int k = 0; k < 6; k++) begin
      logic [127:0] exp;
      @(negedge clk);
      if_req_valid = 1; if_req_addr = 32'h0000_8000 + 32'((k % 3) * 16);
      #1;
      while (!if_req_ready) begin @(negedge clk); #1; end
      @(negedge clk); if_req_valid = 0;
      while (!if_resp_valid) @(negedge clk);
      for (int b = 0; b < 16; b++) exp[8*b +: 8] = m8(if_req_addr + 32'(b));
      expect_true(if_resp_data == exp, "instruction fetch data");
      n_ifetch++;
    end

    // ---- retention: a data line untouched for 75 us has expired ----
    issue(li(1, 32'h0000_5000));
    issue(mk(U_LOAD, OP_ADD, 2, 1, 0, 0, 32'h0));
    issue(mk(U_LOAD, OP_ADD, 3, 1, 0, 0, 32'h4));
    drain();
    begin
      int e0;
      e0 = n_exp;
      repeat (75000) @(negedge clk);
      issue(mk(U_LOAD, OP_ADD, 4, 1, 0, 0, 32'h8));
      drain();
      expect_true(n_exp == e0 + 1, "expired line misses after the retention time");
    end

    // ---- every mechanism happened ----
    $display("retired=%0d hazard-stalls=%0d mem-stalls=%0d wake-stalls=%0d pf-stalls=%0d simd-ops=%0d",
             n_retire, n_hz, n_memst, n_wake_st, n_pf_st, n_simd);
    $display("dcache hits=%0d misses=%0d expired=%0d wake-ups=%0d", n_hit, n_miss, n_exp, n_wake);
    $display("sensor->buffer=%0d sensor->memory=%0d fills=%0d prefetches=%0d fetches=%0d",
             n_sens_buf, n_sens_mem, n_fill, n_pf_done, n_ifetch);
    expect_true(n_retire > 0,  "retirement");
    expect_true(n_hz > 0,      "hazard stall");
    expect_true(n_memst > 0,   "memory stall");
    expect_true(n_wake_st > 0, "wake stall");
    expect_true(n_pf_st > 0,   "prefetch-busy stall");
    expect_true(n_simd > 0,    "SIMD operation");
    expect_true(n_hit > 0,     "cache hit");
    expect_true(n_miss > 0,    "cache miss");
    expect_true(n_exp > 0,     "retention expiry");
    expect_true(n_wake > 0,    "power-gate wake-up");
    expect_true(n_sens_buf > 0, "sensor to buffer");
    expect_true(n_sens_mem > 0, "sensor to memory");
    expect_true(n_fill > 0,    "memory to buffer transfer");
    expect_true(n_pf_done > 0, "prefetch");
    expect_true(n_ifetch > 0,  "instruction fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
