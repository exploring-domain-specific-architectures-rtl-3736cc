// Self-checking test of power_ctrl with WAKE_CYCLES = 4: after reset all
// units are off; a control register write switches units on and sets SS; a
// unit becomes ready exactly WAKE_CYCLES cycles after it is switched on; a
// demand (need) wakes an off unit by itself; switching off drops ready at
// once; wake pulses once per off-to-on transition. A cycle-accurate model in
// the testbench gives the expected outputs every cycle under random stimulus.
module tb_power_ctrl;
  localparam int WAKE = 4;
  int checks = 0, failures = 0, n_wake = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_we, ss;
  logic [3:0] cfg_wdata;
  logic [2:0] need, pwr_en, ready, wake;

  power_ctrl #(.WAKE_CYCLES(WAKE)) dut (.*);

  // model
  logic [2:0] m_on;
  int         m_cnt [3];
  logic       m_ss;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] nxt;
    cfg_we = 0; cfg_wdata = 0; need = 0;
    m_on = 0; m_ss = 0;
    for (int u = 0; u < 3; u++) m_cnt[u] = 0;
    #12 rst_n = 1;
    // directed: switch SIMD on, count cycles to ready
    @(negedge clk); cfg_we = 1; cfg_wdata = 4'b1001;
    @(negedge clk); cfg_we = 0;
    expect_eq(int'(pwr_en), 1, "SIMD powered");
    expect_eq(int'(ss), 1, "SS set");
    for (int k = 1; k < WAKE; k++) begin
      expect_eq(int'(ready[0]), 0, "not ready while waking");
      @(negedge clk);
    end
    expect_eq(int'(ready[0]), 0, "not ready one cycle before wake-up ends");
    @(negedge clk);
    expect_eq(int'(ready[0]), 1, "ready after WAKE_CYCLES");
    @(negedge clk); cfg_we = 1; cfg_wdata = 4'b0000;
    @(negedge clk); cfg_we = 0;
    expect_eq(int'(ready), 0, "all off");
    m_on = 0; m_ss = 0;
    // random, against the model
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cfg_we    = ($urandom_range(0, 15) == 0);
      cfg_wdata = 4'($urandom);
      need      = ($urandom_range(0, 7) == 0) ? 3'($urandom) : 3'b0;
      #1;
      nxt = (cfg_we ? cfg_wdata[2:0] : m_on) | need;
      for (int u = 0; u < 3; u++)
        expect_eq(int'(wake[u]), int'(nxt[u] && !m_on[u]), "wake pulse");
      if (|wake) n_wake++;
      @(posedge clk); #1;
      for (int u = 0; u < 3; u++) begin
        if (!nxt[u] || !m_on[u]) m_cnt[u] = 0;
        else if (m_cnt[u] != WAKE) m_cnt[u]++;
      end
      m_on = nxt;
      if (cfg_we) m_ss = cfg_wdata[3];
      expect_eq(int'(pwr_en), int'(m_on), "pwr_en");
      expect_eq(int'(ss), int'(m_ss), "ss");
      for (int u = 0; u < 3; u++)
        expect_eq(int'(ready[u]), int'(m_on[u] && m_cnt[u] == WAKE), "ready");
    end
    expect_eq(int'(n_wake > 10), 1, "wake-ups happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
