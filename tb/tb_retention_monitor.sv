// Self-checking test of retention_monitor with a short retention time
// (RET_CYCLES = 40, a tick every 10 cycles). It checks that all blocks are
// stale after reset, that a refreshed block stays usable for at least half
// and at most three quarters of the retention time, that blocks refreshed at
// different times expire independently, and that a refresh restarts the
// count.
module tb_retention_monitor;
  localparam int RET = 40;
  localparam int N   = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         refresh;
  logic [2:0]   idx;
  logic [N-1:0] stale;
  logic         tick;

  retention_monitor #(.NBLOCKS(N), .RET_CYCLES(RET)) dut (
    .clk, .rst_n, .refresh, .refresh_idx(idx), .stale, .tick
  );

  task automatic expect_true(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refresh = 0; idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_true(stale == '1, "all stale after reset");
    // a refresh makes every block usable again
    for (int b = 0; b < N; b++) begin
      @(negedge clk);
      refresh = 1; idx = 3'(b);
      @(negedge clk);
      refresh = 0;
      expect_true(!stale[b], "fresh after refresh");
    end
    // precise lifetime measurement, one block at a time
    for (int trial = 0; trial < 12; trial++) begin
      int b, life;
      b = trial % N;
      life = 0;
      repeat ($urandom_range(0, 13)) @(negedge clk);   // random tick phase
      refresh = 1; idx = 3'(b);
      @(negedge clk);
      refresh = 0;
      while (!stale[b] && life < 4 * RET) begin
        @(negedge clk);
        life++;
      end
      expect_true(life >= RET / 2 - 1, $sformatf("block %0d kept at least half retention (%0d)", b, life));
      expect_true(life <= 3 * RET / 4, $sformatf("block %0d expired before 3/4 retention (%0d)", b, life));
    end
    // refresh restarts the count: refreshing every RET/4 cycles keeps it alive
    @(negedge clk); refresh = 1; idx = 3'd5;
    @(negedge clk); refresh = 0;
    for (int k = 0; k < 8; k++) begin
      repeat (RET / 4 - 1) @(negedge clk);
      expect_true(!stale[5], "kept alive by refresh");
      refresh = 1; idx = 3'd5;
      @(negedge clk); refresh = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
