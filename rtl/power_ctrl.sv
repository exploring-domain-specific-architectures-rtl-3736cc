// Power-gating control of the energy-oriented configuration.
//
// In the energy-oriented configuration the optional units (SIMD ALU, STT-RAM
// buffer, prefetcher) are switched on only when a program needs them and are
// otherwise power-gated. Software sets the wanted state with a control
// register write (cfg_we/cfg_wdata): bit 0 SIMD, bit 1 buffer, bit 2
// prefetcher on, and bit 3 the sensor select SS (1: sensor samples to the
// buffer). If an instruction needs a unit that is off, the pipeline raises
// the matching bit of need; the unit is switched on by hardware and the
// instruction waits until it is usable.
//
// Timing: a unit switched on at a clock edge becomes usable (ready)
// WAKE_CYCLES edges later, the time its supply takes to settle; until then the
// datapath keeps its inputs isolated. Switching a unit off drops ready at the
// same edge. pwr_en drives the power switches, which are outside this logic;
// wake pulses once per off-to-on transition, for counting wake-ups.
// Power-gating of the units a program does not use follows the design; the
// register layout, wake-on-demand and the 4-cycle wake latency are this
// design's choices.
module power_ctrl #(
  parameter int unsigned WAKE_CYCLES = 4,
  parameter logic [2:0]  RESET_ON    = 3'b000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic [3:0] cfg_wdata,
  input  logic [2:0] need,      // {prefetcher, buffer, simd}
  output logic [2:0] pwr_en,
  output logic [2:0] ready,
  output logic [2:0] wake,
  output logic       ss
);

  localparam int unsigned WW = $clog2(WAKE_CYCLES + 1);

  logic [2:0]  on_q;
  logic [2:0]  on_d;
  logic        ss_q;
  logic [WW-1:0] cnt_q [3];

  always_comb begin
    on_d = on_q;
    if (cfg_we) on_d = cfg_wdata[2:0];
    on_d = on_d | need;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_q <= RESET_ON;
      ss_q <= 1'b0;
      for (int u = 0; u < 3; u++) cnt_q[u] <= RESET_ON[u] ? WW'(WAKE_CYCLES) : '0;
    end else begin
      on_q <= on_d;
      if (cfg_we) ss_q <= cfg_wdata[3];
      for (int u = 0; u < 3; u++) begin
        if (!on_d[u] || !on_q[u])              cnt_q[u] <= '0;
        else if (cnt_q[u] != WW'(WAKE_CYCLES)) cnt_q[u] <= cnt_q[u] + 1'b1;
      end
    end
  end

  always_comb
    for (int u = 0; u < 3; u++) begin
      ready[u] = on_q[u] && (cnt_q[u] == WW'(WAKE_CYCLES));
      wake[u]  = on_d[u] && !on_q[u];
    end

  assign pwr_en = on_q;
  assign ss     = ss_q;

endmodule
