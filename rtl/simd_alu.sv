// SIMD ALU: eight 16-bit operations per clock on four physical 16-bit ALUs.
//
// A 128-bit vector holds eight 16-bit elements. Because a 16-bit lane needs
// well under half of the clock period that the 32-bit scalar ALU sets, the
// unit runs each lane twice per cycle. The input selector S1 feeds elements
// 0..3 to the four lanes in the first (high) half of the clock and elements
// 4..7 in the second (low) half. The output selector S2 is a bank of
// negative-edge flip-flops that keeps the four results of the first half; the
// results of the second half come straight from the lanes. The full 128-bit
// result y is therefore valid just before the next rising edge, so the unit
// has the same one-cycle latency as the scalar ALU and the pipeline register
// after the execution stage captures it.
//
// The half-cycle select is made from flip-flops, not from the clock net: p
// toggles at every rising edge and n copies p at every falling edge, so p^n is
// 1 in the high phase and 0 in the low phase. Both selectors hold across
// stalls; a stalled operation is simply recomputed.
//
// Interface: operands a, b, c and op must be stable from a rising edge (they
// come from the decode/execute pipeline register); y is sampled at the next
// rising edge. The two-phase scheme and the four-lane/eight-element shape
// follow the design; the flip-flop phase detector is this design's own.
module simd_alu
  import dsa_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  alu_op_e               op,
  input  logic [VLEN-1:0][ELEM_W-1:0] a,
  input  logic [VLEN-1:0][ELEM_W-1:0] b,
  input  logic [VLEN-1:0][ELEM_W-1:0] c,
  output logic [VLEN-1:0][ELEM_W-1:0] y
);

  localparam int unsigned HALF = VLEN / LANES;  // 2 passes per clock

  logic p_q, n_q, first_half;
  logic [LANES-1:0][ELEM_W-1:0] la, lb, lc, ly;
  logic [LANES-1:0][ELEM_W-1:0] s2_q;

  // Phase detector (flip-flop based dual-edge selector control).
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p_q <= 1'b0;
    else        p_q <= ~p_q;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) n_q <= 1'b0;
    else        n_q <= p_q;

  assign first_half = p_q ^ n_q;

  // S1: choose the lower or upper four elements.
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      la[l] = first_half ? a[l] : a[l+LANES];
      lb[l] = first_half ? b[l] : b[l+LANES];
      lc[l] = first_half ? c[l] : c[l+LANES];
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    dsa_alu #(.WIDTH(ELEM_W)) u_lane (
      .op (op),
      .a  (la[l]),
      .b  (lb[l]),
      .c  (lc[l]),
      .y  (ly[l])
    );
  end

  // S2: capture the first-half results at the falling edge.
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) s2_q <= '0;
    else        s2_q <= ly;

  assign y = {ly, s2_q};

  initial assert (HALF == 2) else $error("simd_alu: VLEN must be twice LANES");

endmodule
