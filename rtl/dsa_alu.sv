// One combinational ALU of the wearable DSA.
//
// It implements the D4 operation set chosen for wearable kernels: add, sub,
// mul, div (D1), xor, shifts and rotates (D2), compares (D3) and multiply-add
// (D4), plus AND/OR for dynamic time warping and a move of operand b. The same
// module is instantiated as a 16-bit SIMD lane (WIDTH=16) and as the 32-bit
// scalar ALU (WIDTH=32), the two widths the design uses.
//
// Interface: operands a, b, c (c only feeds multiply-add), operation op;
// result y is purely combinational, ready in the same cycle.
// Design choices not fixed by the operation list: arithmetic is two's
// complement and signed, products and sums wrap to WIDTH bits, compares
// return all ones for true and zero for false (a SIMD mask), division by zero
// returns all ones, and shift/rotate amounts are b modulo WIDTH.
module dsa_alu
  import dsa_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);

  localparam int unsigned SW = $clog2(WIDTH);

  logic signed [WIDTH-1:0] sa, sb;
  logic [SW-1:0]           sh;
  logic [WIDTH-1:0]        prod;
  logic [WIDTH-1:0]        quot;

  assign sa   = $signed(a);
  assign sb   = $signed(b);
  assign sh   = b[SW-1:0];
  assign prod = a * b;

  always_comb begin
    if (b == '0)
      quot = '1;
    else if (a == {1'b1, {(WIDTH-1){1'b0}}} && b == '1)
      quot = a;                       // most negative / -1 overflows to itself
    else
      quot = WIDTH'(sa / sb);
  end

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = prod;
      OP_DIV:  y = quot;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << sh;
      OP_SRL:  y = a >> sh;
      OP_SRA:  y = WIDTH'(sa >>> sh);
      OP_ROL:  y = (a << sh) | (a >> (WIDTH - 1 - int'(sh)) >> 1);
      OP_ROR:  y = (a >> sh) | (a << (WIDTH - 1 - int'(sh)) << 1);
      OP_GT:   y = (sa > sb) ? '1 : '0;
      OP_LT:   y = (sa < sb) ? '1 : '0;
      OP_EQ:   y = (a == b) ? '1 : '0;
      OP_GTZ:  y = (sa > 0) ? '1 : '0;
      OP_LTZ:  y = (sa < 0) ? '1 : '0;
      OP_MADD: y = prod + c;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_MOVB: y = b;
      default: y = '0;
    endcase
  end

endmodule
