// Shared definitions of the wearable domain-specific processor.
//
// The ALU operation set is the "D4" set: add, subtract, multiply and divide
// (D1), plus xor, shift and rotate (D2), plus the compare operations (D3),
// plus multiply-add (D4). AND and OR are included because the pattern
// matching kernel (dynamic time warping) needs them. The SIMD datapath works on
// 16-bit elements, eight of them to a 128-bit vector register; the scalar
// datapath is 32 bits wide. Those widths follow the design; the encodings,
// the micro-operation format and the register counts are this design's own.
package dsa_pkg;

  localparam int unsigned SCALAR_W = 32;   // scalar ALU and scalar registers
  localparam int unsigned ELEM_W   = 16;   // SIMD element
  localparam int unsigned VLEN     = 8;    // elements per 128-bit vector
  localparam int unsigned VEC_W    = ELEM_W * VLEN;
  localparam int unsigned LANES    = 4;    // physical 16-bit SIMD ALUs
  localparam int unsigned NREGS    = 16;   // registers per register file
  localparam int unsigned REG_AW   = $clog2(NREGS);

  // ALU operations (D4 set plus AND/OR).
  typedef enum logic [4:0] {
    OP_ADD  = 5'd0,
    OP_SUB  = 5'd1,
    OP_MUL  = 5'd2,
    OP_DIV  = 5'd3,   // signed; x/0 = -1, MIN/-1 = MIN
    OP_XOR  = 5'd4,
    OP_SLL  = 5'd5,
    OP_SRL  = 5'd6,
    OP_SRA  = 5'd7,
    OP_ROL  = 5'd8,
    OP_ROR  = 5'd9,
    OP_GT   = 5'd10,  // signed a > b  -> all ones, else zero
    OP_LT   = 5'd11,  // signed a < b
    OP_EQ   = 5'd12,
    OP_GTZ  = 5'd13,  // a > 0
    OP_LTZ  = 5'd14,  // a < 0
    OP_MADD = 5'd15,  // a * b + c
    OP_AND  = 5'd16,
    OP_OR   = 5'd17,
    OP_MOVB = 5'd18   // pass b (register move / load immediate)
  } alu_op_e;

  // What a micro-operation does.
  typedef enum logic [2:0] {
    U_NOP    = 3'd0,
    U_SALU   = 3'd1,  // scalar ALU:  sreg[rd] = sreg[rs1] op (imm or sreg[rs2]), c = sreg[rs3]
    U_VALU   = 3'd2,  // SIMD ALU:    vreg[rd] = vreg[rs1] op vreg[rs2], c = vreg[rs3]
    U_LOAD   = 3'd3,  // load from cache or buffer, address sreg[rs1] + imm
    U_STORE  = 3'd4,  // store to the cache (the buffer takes no CPU stores)
    U_PF_CFG = 3'd5,  // write prefetch register imm[3:0] with sreg[rs2]
    U_PF_GO  = 3'd6,  // prefetch the successors of node sreg[rs1] + imm
    U_CFG    = 3'd7   // write the power/select control register with imm
  } uop_kind_e;

  // Where a load goes: the select CS between L1 cache and buffer.
  typedef enum logic {
    T_CACHE  = 1'b0,
    T_BUFFER = 1'b1
  } mem_tgt_e;

  typedef struct packed {
    uop_kind_e         kind;
    alu_op_e           op;
    logic              vec;      // load/store moves a 128-bit vector
    mem_tgt_e          tgt;      // CS for loads
    logic              use_imm;  // scalar ALU takes imm as operand b
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs1;
    logic [REG_AW-1:0] rs2;
    logic [REG_AW-1:0] rs3;
    logic [31:0]       imm;
  } uop_t;

  // Control register bits written by U_CFG: one power-on bit per optional
  // unit (these indices also number the units in the power-control vectors),
  // and bit 3 is the sensor select SS (1: sensor samples go to the buffer).
  localparam int unsigned CFG_SIMD_ON = 0;
  localparam int unsigned CFG_BUF_ON  = 1;
  localparam int unsigned CFG_PF_ON   = 2;

endpackage
