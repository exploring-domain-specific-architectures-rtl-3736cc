// Self-checking test of the execution pipeline on its own. Simple behavioural
// models replace the units around it: an ideal data memory behind the cache
// port (random ready and 1-4 cycle answers), a buffer read port answering the
// next cycle from a random sample array, a prefetcher that stays busy for a
// random time after each start command, and a power controller that makes a
// unit ready a random 2-6 cycles after it is asked for. A reference model
// (dsa_ref_pkg) executes every accepted micro-operation and each write-back
// is compared with it, in order.
//
// Also checked: an ALU result is written back two cycles after issue;
// independent operations issue one per cycle; prefetcher and power-control
// commands reach their ports with the right fields; the SIMD unit is never
// used before it is ready. Each kind of stall (hazard, memory, wake,
// prefetcher busy) must occur.
module tb_dsa_datapath;
  import dsa_pkg::*;
  import dsa_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic         uop_valid, uop_ready;
  uop_t         uop;
  logic         dc_req_valid, dc_req_ready, dc_req_we, dc_resp_valid;
  logic [31:0]  dc_req_addr;
  logic [127:0] dc_req_wdata, dc_resp_rdata;
  logic [15:0]  dc_req_be;
  logic         bf_rd_valid, bf_resp_valid;
  logic [13:0]  bf_rd_addr;
  logic [127:0] bf_rd_row;
  logic [15:0]  bf_rd_elem;
  logic         pf_cfg_we, pf_go, pf_busy;
  logic [3:0]   pf_cfg_idx;
  logic [31:0]  pf_cfg_wdata, pf_go_addr;
  logic         pc_cfg_we;
  logic [3:0]   pc_cfg_wdata;
  logic [2:0]   pc_need, pc_ready;
  logic         wb_valid, wb_vec;
  logic [3:0]   wb_rd;
  logic [127:0] wb_data;
  logic         ev_retire, ev_stall_hazard, ev_stall_mem, ev_stall_wake, ev_stall_pf, ev_simd_op;

  dsa_datapath #(.BUF_BYTES(16384)) dut (.*);

  dsa_model model = new();
  wb_t      expq [$];
  int       wb_cycle;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) if (rst_n && wb_valid) begin
    wb_t e;
    wb_cycle = cycle;
    if (expq.size() == 0) expect_true(0, "unexpected write-back");
    else begin
      e = expq.pop_front();
      expect_true(wb_vec === e.vec && int'(wb_rd) == e.rd && wb_data === e.data,
                  $sformatf("write-back r%0d: got %h expected %h", e.rd, wb_data, e.data));
    end
  end

  // ---------------- data memory behind the cache port ----------------
  logic [7:0] dmem [int unsigned];
  function automatic logic [7:0] m8(int unsigned a);
    if (dmem.exists(a)) return dmem[a];
    return 8'(a * 37 + (a >> 8) * 11 + 5);
  endfunction
  int dlat = 0;
  logic dpend = 0;
  logic [31:0] daddr;
  always @(posedge clk) begin
    dc_resp_valid <= 0;
    if (dc_req_valid && dc_req_ready) begin
      if (dc_req_we)
        for (int b = 0; b < 16; b++)
          if (dc_req_be[b]) dmem[{dc_req_addr[31:4], 4'b0} + 32'(b)] = dc_req_wdata[8*b +: 8];
      dpend <= 1; daddr <= dc_req_addr; dlat <= $urandom_range(1, 4);
    end
    if (dpend) begin
      if (dlat <= 1) begin
        dpend <= 0; dc_resp_valid <= 1;
        for (int b = 0; b < 16; b++) dc_resp_rdata[8*b +: 8] <= m8({daddr[31:4], 4'b0} + 32'(b));
      end else dlat <= dlat - 1;
    end
    dc_req_ready <= !dpend && ($urandom_range(0, 2) != 0);
  end

  // ---------------- buffer read port ----------------
  always @(posedge clk) begin
    bf_resp_valid <= bf_rd_valid;
    if (bf_rd_valid) begin
      for (int k = 0; k < 8; k++) bf_rd_row[16*k +: 16] <= model.buf_rd(32'({bf_rd_addr[13:4], 3'(k)}));
      bf_rd_elem <= model.buf_rd(32'(bf_rd_addr[13:1]));
    end
  end

  // ---------------- prefetcher and power control ----------------
  int pf_left = 0;
  int n_pf_cfg = 0, n_pc_cfg = 0, n_go = 0;
  logic [31:0] last_go_addr;
  always @(posedge clk) begin
    if (pf_go) begin pf_left <= $urandom_range(3, 20); n_go++; last_go_addr <= pf_go_addr; end
    else if (pf_left > 0) pf_left <= pf_left - 1;
  end
  assign pf_busy = (pf_left != 0);
  always @(posedge clk) if (pf_cfg_we) begin
    n_pf_cfg++;
    expect_true(pf_cfg_idx == 4'd3 && pf_cfg_wdata == 32'hCAFE_0001, "prefetch register write fields");
  end

  int wake_left [3];
  logic [2:0] on;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on <= 0; pc_ready <= 0;
      for (int u = 0; u < 3; u++) wake_left[u] <= 0;
    end else begin
      for (int u = 0; u < 3; u++) begin
        if (pc_cfg_we && !pc_cfg_wdata[u]) begin
          on[u] <= 0; pc_ready[u] <= 0;
        end else if ((pc_need[u] || (pc_cfg_we && pc_cfg_wdata[u])) && !on[u]) begin
          on[u] <= 1; wake_left[u] <= $urandom_range(2, 6);
        end else if (on[u] && !pc_ready[u]) begin
          if (wake_left[u] <= 1) pc_ready[u] <= 1;
          else wake_left[u] <= wake_left[u] - 1;
        end
      end
    end
  end

  // ---------------- stall counters ----------------
  int n_hz = 0, n_mem = 0, n_wake = 0, n_pf = 0, n_simd = 0, n_ret = 0;
  always @(posedge clk) if (rst_n) begin
    n_hz += int'(ev_stall_hazard); n_mem += int'(ev_stall_mem);
    n_wake += int'(ev_stall_wake); n_pf += int'(ev_stall_pf);
    n_simd += int'(ev_simd_op); n_ret += int'(ev_retire);
    if (dut.ex_q.valid && dut.ex_q.u.kind == U_VALU) expect_true(pc_ready[0], "SIMD used only when ready");
  end

  // ---------------- front end ----------------
  int issue_cycle;
  task automatic issue(uop_t u);
    wb_t r;
    @(negedge clk);
    uop_valid = 1; uop = u;
    #1;
    while (!uop_ready) begin @(negedge clk); #1; end
    issue_cycle = cycle;
    r = model.exec(u, 8);
    if (r.valid) expq.push_back(r);
  endtask

  task automatic drain();
    @(negedge clk);
    uop_valid = 0; uop = '0;
    while (expq.size() != 0 || dut.ex_q.valid || dut.mem_q.valid) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    uop_valid = 0; uop = '0;
    dc_resp_rdata = '0; bf_rd_row = '0; bf_rd_elem = '0;
    for (int i = 0; i < 8192; i++) model.bufm[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // latency: li written back two cycles after issue
    issue(li(1, 32'h0000_4000));
    drain();
    expect_true(wb_cycle - issue_cycle == 2, $sformatf("ALU latency %0d", wb_cycle - issue_cycle));
    // throughput: eight independent operations back to back
    for (int k = 0; k < 8; k++) begin
      issue(mk(U_SALU, OP_XOR, 2 + k, 1, 0, 0, 32'(k * 3), 0, T_CACHE, 1));
      if (k == 0) t0 = cycle;
    end
    expect_true(cycle - t0 == 7, "one operation per cycle");
    drain();

    // SIMD needs a wake-up; a dependent chain gives hazards
    issue(mk(U_LOAD, OP_ADD, 1, 1, 0, 0, 32'h0, 1));
    issue(mk(U_LOAD, OP_ADD, 2, 1, 0, 0, 32'h10, 1));
    issue(mk(U_VALU, OP_MUL, 3, 1, 2));
    issue(mk(U_VALU, OP_MADD, 4, 3, 1, 2));
    drain();

    // power-control write: fields and effect
    issue(mk(U_CFG, OP_ADD, 0, 0, 0, 0, 32'h5));
    @(posedge clk); #1;
    expect_true(on == 3'b101, "control register write reached power control");
    n_pc_cfg++;
    drain();

    // prefetcher commands: fields, and buffer loads held while busy
    issue(li(5, 32'hCAFE_0001));
    issue(mk(U_PF_CFG, OP_ADD, 0, 0, 5, 0, 32'd3));
    drain();
    expect_true(n_pf_cfg == 1, "one prefetch register write");
    issue(li(6, 32'h0002_0000));
    for (int t = 0; t < 10; t++) begin
      issue(mk(U_PF_GO, OP_ADD, 0, 6, 0, 0, 32'(t * 16)));
      issue(mk(U_LOAD, OP_ADD, 7, 0, 0, 0, 32'($urandom_range(0, 1023) * 16), 1, T_BUFFER));
      issue(mk(U_LOAD, OP_ADD, 8, 0, 0, 0, 32'($urandom_range(0, 8191) * 2), 0, T_BUFFER));
      drain();
      expect_true(last_go_addr == 32'h0002_0000 + 32'(t * 16), "prefetch start address");
    end

    // random program
    issue(li(1, 32'h0000_4000));
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(0, 11);
      if (r < 4)
        issue(mk(U_VALU, alu_op_e'($urandom_range(0, int'(OP_MOVB))), $urandom_range(1, 15),
                 $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 15)));
      else if (r < 7)
        issue(mk(U_SALU, alu_op_e'($urandom_range(0, int'(OP_MOVB))), $urandom_range(2, 15),
                 $urandom_range(0, 15), $urandom_range(0, 15), $urandom_range(0, 15),
                 32'($urandom_range(0, 40)), 0, T_CACHE, 1'($urandom_range(0, 1))));
      else if (r < 9)
        issue(mk(U_LOAD, OP_ADD, $urandom_range(2, 15), 1, 0, 0,
                 32'($urandom_range(0, 63) * 4), 1'($urandom_range(0, 1)),
                 mem_tgt_e'($urandom_range(0, 1))));
      else if (r < 10)
        issue(mk(U_STORE, OP_ADD, 0, 1, $urandom_range(0, 15), 0,
                 32'($urandom_range(0, 63) * 4), 1'($urandom_range(0, 1))));
      else if (r < 11)
        issue(mk(U_CFG, OP_ADD, 0, 0, 0, 0, 32'($urandom_range(0, 7))));
      else
        issue(mk(U_PF_GO, OP_ADD, 0, 1, 0, 0, 32'h0));
      if (n % 500 == 0) issue(li(1, 32'h0000_4000 + 32'($urandom_range(0, 15)) * 32'h100));
    end
    drain();

    $display("retired=%0d hazard=%0d memory=%0d wake=%0d prefetcher=%0d simd=%0d starts=%0d",
             n_ret, n_hz, n_mem, n_wake, n_pf, n_simd, n_go);
    expect_true(n_hz > 0,   "hazard stalls happened");
    expect_true(n_mem > 0,  "memory stalls happened");
    expect_true(n_wake > 0, "wake stalls happened");
    expect_true(n_pf > 0,   "prefetcher stalls happened");
    expect_true(n_simd > 0, "SIMD operations happened");
    expect_true(n_pc_cfg > 0 && n_go > 0, "commands happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
