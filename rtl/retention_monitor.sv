// Retention monitor for relaxed-retention STT-RAM blocks.
//
// Relaxed-retention STT-RAM keeps data only for a limited time (75 us here).
// Instead of refreshing blocks, the design lets them expire: every block has
// a 2-bit monitor counter, and a block whose counter has saturated is treated
// as invalid before its retention time runs out. A global prescaler produces
// a tick every RET_CYCLES/4 cycles; at each tick all counters below 3 count
// up. Writing a block (fill or store) clears its counter. A block therefore
// turns stale between 2 and 3 tick periods after its last write, that is
// after at least RET_CYCLES/2 and at most 3*RET_CYCLES/4 cycles, always
// before the data could decay.
//
// Interface: refresh/refresh_idx clear one counter at the rising edge; stale
// is one bit per block, a registered state, high while that block must be
// ignored. RET_CYCLES = 75000 is 75 us at the 1 GHz clock of the design.
// The 2-bit counter and 75 us retention follow the design; the tick period of
// a quarter retention time is this design's choice.
module retention_monitor #(
  parameter int unsigned NBLOCKS    = 512,
  parameter int unsigned RET_CYCLES = 75000,
  localparam int unsigned IW        = $clog2(NBLOCKS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               refresh,
  input  logic [IW-1:0]      refresh_idx,
  output logic [NBLOCKS-1:0] stale,
  output logic               tick
);

  localparam int unsigned TICK_CYCLES = RET_CYCLES / 4;
  localparam int unsigned PW = $clog2(TICK_CYCLES + 1);

  logic [PW-1:0]        presc_q;
  logic [NBLOCKS-1:0][1:0] cnt_q;

  assign tick = (presc_q == PW'(TICK_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    presc_q <= '0;
    else if (tick) presc_q <= '0;
    else           presc_q <= presc_q + 1'b1;

  // Counters start saturated: after reset nothing is valid anyway.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '1;
    end else begin
      for (int i = 0; i < NBLOCKS; i++) begin
        if (refresh && refresh_idx == IW'(i))
          cnt_q[i] <= 2'd0;
        else if (tick && cnt_q[i] != 2'd3)
          cnt_q[i] <= cnt_q[i] + 2'd1;
      end
    end
  end

  always_comb
    for (int i = 0; i < NBLOCKS; i++) stale[i] = (cnt_q[i] == 2'd3);

  initial assert (TICK_CYCLES >= 1) else $error("retention_monitor: RET_CYCLES too small");

endmodule
