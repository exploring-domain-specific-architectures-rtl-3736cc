// Evaluated wearable kernels, run on the whole core at default sizes and at
// the input sizes of the evaluation:
//  * ECG authentication: 7500 16-bit samples streamed from the sensor into
//    the buffer (SS = 1), then a SIMD pass over the whole recording (row
//    loads from the buffer, difference to a template, threshold compare,
//    masking and accumulation);
//  * multiply-accumulate on a 300*300 input (90,000 16-bit elements): vector
//    loads through the data cache and SIMD multiply-add, eight per operation;
//  * 2D convolution on a 300*300 image: the three vertical taps of a 3x3
//    kernel (the SIMD unit has no cross-element moves, so horizontal taps
//    would need shifted copies of the image and are left out);
//  * AES-style rounds (xor with a key, rotates, shifts) on a 20-byte block;
//  * Haar transform on the 300*300 image: the vertical step (sums and
//    differences of row pairs, eight columns per operation);
//  * histogram of the 300*300 image into 256 bins, in scalar code;
//  * A* successor expansion on a 3770-node graph in main memory: the
//    prefetcher gathers each expanded node's successor distances and costs
//    into buffer arrays, which the kernel reads as vectors.
// The same models as the system test surround the core, and every register
// write-back is compared with the reference model. The test also checks that
// the whole ECG recording is held in the buffer (no ring wrap-around) and
// reports the cycles each kernel took.
module tb_dsa_workloads;
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
    #400000000;
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

    // ---------------- ECG: 7500 samples into the buffer ----------------
    cfg(4'b1011);                               // SIMD + buffer on, SS = 1
    drain();
    repeat (6) @(negedge clk);
    t0 = cycle;
    for (int i = 0; i < 7500; i++) begin
      @(negedge clk);
      sensor_valid = 1;
      sensor_data  = 16'((i % 250) * 37 - 4000 + (i / 250) * 3);   // periodic "beats"
      #1;
      while (!sensor_ready) begin @(negedge clk); #1; end
      model.bufm[i] = sensor_data;
    end
    @(negedge clk) sensor_valid = 0;
    expect_true(sensor_wr_ptr == 13'd7500, "whole ECG recording stored without wrap-around");
    fill(7500, 4, 9);                           // pad the last row
    // template in v1, threshold 0 compare, accumulate matches in v5
    issue(li(1, 32'h0000_6000));
    issue(mk(U_LOAD, OP_ADD, 1, 1, 0, 0, 32'h0, 1));
    issue(mk(U_VALU, OP_XOR, 5, 5, 5));
    issue(li(2, 32'h0));
    for (int r = 0; r < 938; r++) begin
      issue(mk(U_LOAD, OP_ADD, 2, 2, 0, 0, 32'(16 * r), 1, T_BUFFER));
      issue(mk(U_VALU, OP_SUB, 3, 2, 1));
      issue(mk(U_VALU, OP_GTZ, 4, 3, 0));
      issue(mk(U_VALU, OP_AND, 4, 4, 3));
      issue(mk(U_VALU, OP_ADD, 5, 5, 4));
    end
    drain();
    $display("ecg: %0d cycles for 7500 samples", cycle - t0);

    // ---------------- MAC over 300*300 16-bit elements ----------------
    cfg(4'b0001);                               // buffer off: not needed here
    drain();
    t0 = cycle;
    issue(li(1, 32'h0010_0000));                // input A
    issue(li(2, 32'h0014_0000));                // input B
    issue(mk(U_VALU, OP_XOR, 7, 7, 7));         // accumulator
    for (int n = 0; n < 90000 / 8; n++) begin
      issue(mk(U_LOAD, OP_ADD, 3, 1, 0, 0, 32'(16 * n), 1));
      issue(mk(U_LOAD, OP_ADD, 4, 2, 0, 0, 32'(16 * n), 1));
      issue(mk(U_VALU, OP_MADD, 7, 3, 4, 7));
    end
    drain();
    $display("mac: %0d cycles for 90000 multiply-adds", cycle - t0);

    // ------- 2D convolution, 300*300: the three vertical taps of a 3x3 kernel -------
    // rows of 300 16-bit pixels at a pitch of 608 bytes (38 aligned vectors);
    // out[r] = w0*in[r-1] + w1*in[r] + w2*in[r+1], eight columns at a time
    t0 = cycle;
    issue(li(1, 32'h0030_0000));                // input image
    issue(li(2, 32'h0040_0000));                // output image
    issue(mk(U_LOAD, OP_ADD, 13, 2, 0, 0, 32'h0, 1));   // weights from memory
    issue(mk(U_VALU, OP_SRA, 13, 13, 14));      // keep them small: w >> v14 (zero)
    for (int r = 1; r < 299; r++)
      for (int c = 0; c < 38; c++) begin
        issue(mk(U_LOAD, OP_ADD, 3, 1, 0, 0, 32'((r - 1) * 608 + 16 * c), 1));
        issue(mk(U_LOAD, OP_ADD, 4, 1, 0, 0, 32'(r * 608 + 16 * c), 1));
        issue(mk(U_LOAD, OP_ADD, 5, 1, 0, 0, 32'((r + 1) * 608 + 16 * c), 1));
        issue(mk(U_VALU, OP_MUL, 6, 3, 13));
        issue(mk(U_VALU, OP_MADD, 6, 4, 13, 6));
        issue(mk(U_VALU, OP_MADD, 6, 5, 13, 6));
        issue(mk(U_STORE, OP_ADD, 0, 2, 6, 0, 32'(r * 608 + 16 * c), 1));
      end
    // read back a few output vectors
    for (int k = 0; k < 16; k++)
      issue(mk(U_LOAD, OP_ADD, 7, 2, 0, 0, 32'($urandom_range(1, 298) * 608 + 16 * $urandom_range(0, 37)), 1));
    drain();
    $display("2dconv: %0d cycles for 298 x 300 outputs (three taps)", cycle - t0);

    // ---------------- AES-style rounds on a 20-byte block ----------------
    // the 20 bytes occupy two vectors; each round xors a key and rotates
    issue(li(1, 32'h0050_0000));
    issue(mk(U_LOAD, OP_ADD, 1, 1, 0, 0, 32'h00, 1));   // block bytes 0..15
    issue(mk(U_LOAD, OP_ADD, 2, 1, 0, 0, 32'h10, 1));   // bytes 16..19 (+ padding)
    issue(mk(U_LOAD, OP_ADD, 3, 1, 0, 0, 32'h20, 1));   // round key
    issue(mk(U_LOAD, OP_ADD, 4, 1, 0, 0, 32'h30, 1));   // rotate amounts
    for (int rnd = 0; rnd < 10; rnd++) begin
      issue(mk(U_VALU, OP_XOR, 1, 1, 3));
      issue(mk(U_VALU, OP_XOR, 2, 2, 3));
      issue(mk(U_VALU, OP_ROL, 1, 1, 4));
      issue(mk(U_VALU, OP_ROR, 2, 2, 4));
      issue(mk(U_VALU, OP_SLL, 5, 3, 4));
      issue(mk(U_VALU, OP_XOR, 3, 3, 5));
    end
    issue(mk(U_STORE, OP_ADD, 0, 1, 1, 0, 32'h40, 1));
    issue(mk(U_STORE, OP_ADD, 0, 1, 2, 0, 32'h50, 1));
    issue(mk(U_LOAD,  OP_ADD, 6, 1, 0, 0, 32'h40, 1));
    issue(mk(U_LOAD,  OP_ADD, 7, 1, 0, 0, 32'h50, 1));
    drain();

    // -------- Haar transform, 300*300: the vertical (row-pair) step --------
    // sums and differences of row pairs of the convolution's input image
    t0 = cycle;
    issue(li(1, 32'h0030_0000));
    issue(li(2, 32'h0060_0000));
    for (int r = 0; r < 300; r += 2)
      for (int c = 0; c < 38; c++) begin
        issue(mk(U_LOAD, OP_ADD, 3, 1, 0, 0, 32'(r * 608 + 16 * c), 1));
        issue(mk(U_LOAD, OP_ADD, 4, 1, 0, 0, 32'((r + 1) * 608 + 16 * c), 1));
        issue(mk(U_VALU, OP_ADD, 5, 3, 4));
        issue(mk(U_VALU, OP_SUB, 6, 3, 4));
        issue(mk(U_STORE, OP_ADD, 0, 2, 5, 0, 32'((r / 2) * 608 + 16 * c), 1));
        issue(mk(U_STORE, OP_ADD, 0, 2, 6, 0, 32'((150 + r / 2) * 608 + 16 * c), 1));
      end
    for (int k = 0; k < 16; k++)
      issue(mk(U_LOAD, OP_ADD, 7, 2, 0, 0, 32'($urandom_range(0, 299) * 608 + 16 * $urandom_range(0, 37)), 1));
    drain();
    $display("haar: %0d cycles for the row-pair step of 300 x 300", cycle - t0);

    // -------- histogram, 300*300: 256 bins of the pixels' low bytes --------
    // scalar code: bins are 32-bit counters in memory, read, incremented and
    // written back per pixel; each 32-bit load holds two pixels
    t0 = cycle;
    issue(li(1, 32'h0030_0000));
    issue(li(2, 32'h0070_0000));                // bin array
    issue(li(9, 32'h0));
    for (int i = 0; i < 256; i++) issue(mk(U_STORE, OP_ADD, 0, 2, 9, 0, 32'(4 * i)));
    for (int r = 0; r < 300; r++)
      for (int w = 0; w < 150; w++) begin
        issue(mk(U_LOAD, OP_ADD, 3, 1, 0, 0, 32'(r * 608 + 4 * w)));
        for (int h = 0; h < 2; h++) begin
          if (h == 1) issue(mk(U_SALU, OP_SRL, 3, 3, 0, 0, 32'd16, 0, T_CACHE, 1));
          issue(mk(U_SALU, OP_AND, 4, 3, 0, 0, 32'hFF, 0, T_CACHE, 1));
          issue(mk(U_SALU, OP_SLL, 4, 4, 0, 0, 32'd2, 0, T_CACHE, 1));
          issue(mk(U_SALU, OP_ADD, 4, 4, 2));
          issue(mk(U_LOAD, OP_ADD, 5, 4, 0, 0, 32'h0));
          issue(mk(U_SALU, OP_ADD, 5, 5, 0, 0, 32'd1, 0, T_CACHE, 1));
          issue(mk(U_STORE, OP_ADD, 0, 4, 5, 0, 32'h0));
        end
      end
    for (int i = 0; i < 256; i++) issue(mk(U_LOAD, OP_ADD, 6, 2, 0, 0, 32'(4 * i)));
    drain();
    $display("histogram: %0d cycles for 90000 pixels", cycle - t0);
    begin
      longint unsigned tot, ref_tot;
      tot = 0; ref_tot = 0;
      for (int i = 0; i < 256; i++) tot += model.rd32(32'h0070_0000 + 32'(4 * i));
      expect_true(tot == 90000, "histogram bins add up to the pixel count");
      // independent count of one bin straight from the image contents
      for (int r = 0; r < 300; r++)
        for (int p = 0; p < 300; p++)
          ref_tot += longint'(m8(32'h0030_0000 + 32'(r * 608 + 2 * p)) == 8'h2A);
      expect_true(model.rd32(32'h0070_0000 + 4 * 32'h2A) == 32'(ref_tot), "histogram bin 0x2A");
    end

    // ---------------- A*: successor expansion on 3770 nodes ----------------
    // node n at 0x0020_0000 + 0x40*n: successor count, four successor
    // pointers, distance (16 bits) at +0x20, cost (32 bits) at +0x24
    for (int n = 0; n < 3770; n++) begin
      int ns;
      logic [31:0] na;
      na = 32'h0020_0000 + 32'(n) * 32'h40;
      ns = $urandom_range(1, 4);
      put32(na, 32'(ns));
      for (int s = 0; s < ns; s++)
        put32(na + 32'(4 + 4 * s), 32'h0020_0000 + 32'($urandom_range(0, 3769)) * 32'h40);
      put32(na + 32'h20, {16'(n % 977), 16'(n)});
      put32(na + 32'h24, 32'(n * 13 + 5));
    end
    issue(li(2, 32'h0));    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd0));
    issue(li(2, 32'h4));    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd1));
    issue(li(2, 32'd2));    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd2));
    issue(li(2, 32'h22));   issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd4));
    issue(li(2, 32'h0001_0000)); issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd5));  // distances -> 0
    issue(li(2, 32'h24));   issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd6));
    issue(li(2, 32'h0002_0010)); issue(mk(U_PF_CFG, OP_ADD, 0, 0, 2, 0, 32'd7));  // costs -> 16
    cfg(4'b0111);
    drain();
    fill(0, 32, 4);                             // defined contents beyond the gathered samples
    t0 = cycle;
    issue(li(3, 32'h0020_0000));
    for (int t = 0; t < 400; t++) begin
      int n;
      n = (t * 1777 + 11) % 3770;
      issue(li(3, 32'h0020_0000 + 32'(n) * 32'h40));
      issue(mk(U_PF_GO, OP_ADD, 0, 3, 0, 0, 32'h0));
      issue(mk(U_LOAD, OP_ADD, 8, 0, 0, 0, 32'h0, 1, T_BUFFER));     // distances
      issue(mk(U_LOAD, OP_ADD, 9, 0, 0, 0, 32'h20, 1, T_BUFFER));    // costs
      issue(mk(U_VALU, OP_ADD, 10, 8, 9));                         // f = g + h
      issue(mk(U_VALU, OP_LT, 11, 10, 12));
      issue(mk(U_VALU, OP_MOVB, 12, 0, 10));
    end
    drain();
    $display("astar: %0d cycles for 400 node expansions", cycle - t0);

    $display("retired=%0d hazard-stalls=%0d mem-stalls=%0d wake-stalls=%0d pf-stalls=%0d simd-ops=%0d",
             n_retire, n_hz, n_memst, n_wake_st, n_pf_st, n_simd);
    $display("dcache hits=%0d misses=%0d prefetches=%0d", n_hit, n_miss, n_pf_done);
    expect_true(n_simd >= 938 * 4 + 11250 + 298 * 38 * 3 + 60 + 150 * 38 * 2, "all SIMD operations executed");
    expect_true(n_pf_done == 400, "all prefetches completed");
    expect_true(n_hit > 0 && n_miss > 0, "the MAC streams through the cache");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
