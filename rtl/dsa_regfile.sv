// Register file of the decode stage.
//
// The design keeps two register files side by side: 128-bit vector registers
// that each hold eight 16-bit elements for the SIMD ALU, and 32-bit scalar
// registers for the scalar ALU. This module is either one (WIDTH=128 or 32).
// It has three combinational read ports, since multiply-add needs three
// operands, and one write port that takes effect at the rising edge. All
// registers reset to zero. A read of the register being written in the same
// cycle returns the old value; the pipeline's interlock keeps that from
// mattering. The register count (16, as in the ARM core the design extends)
// and the port count are this design's choices.
module dsa_regfile #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra0,
  input  logic [AW-1:0]    ra1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd0,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd0 = regs[ra0];
  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

endmodule
