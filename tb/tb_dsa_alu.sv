// Self-checking test of dsa_alu at both widths used in the design (16-bit
// SIMD lane, 32-bit scalar ALU). Every operation is driven with directed
// corner cases and random operands; the expected value comes from a reference
// model written with 64-bit integer arithmetic.
module tb_dsa_alu;
  import dsa_pkg::*;

  int checks = 0, failures = 0;

  alu_op_e     op;
  logic [15:0] a16, b16, c16, y16;
  logic [31:0] a32, b32, c32, y32;

  dsa_alu #(.WIDTH(16)) dut16 (.op, .a(a16), .b(b16), .c(c16), .y(y16));
  dsa_alu #(.WIDTH(32)) dut32 (.op, .a(a32), .b(b32), .c(c32), .y(y32));

  // reference: w-bit two's complement semantics computed in 64 bits
  function automatic longint unsigned ref_alu(alu_op_e o, longint unsigned a,
      longint unsigned b, longint unsigned c, int w);
    longint unsigned mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    longint sa = (a & (64'd1 << (w-1))) ? longint'(a | ~mask) : longint'(a);
    longint sb = (b & (64'd1 << (w-1))) ? longint'(b | ~mask) : longint'(b);
    int s = int'(b % w);
    longint unsigned r;
    case (o)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_MUL:  r = a * b;
      OP_DIV:  r = (sb == 0) ? mask : longint'(sa / sb);
      OP_XOR:  r = a ^ b;
      OP_SLL:  r = a << s;
      OP_SRL:  r = a >> s;
      OP_SRA:  r = longint'(sa >>> s);
      OP_ROL:  r = (s == 0) ? a : ((a << s) | (a >> (w - s)));
      OP_ROR:  r = (s == 0) ? a : ((a >> s) | (a << (w - s)));
      OP_GT:   r = (sa > sb) ? mask : 0;
      OP_LT:   r = (sa < sb) ? mask : 0;
      OP_EQ:   r = (a == b) ? mask : 0;
      OP_GTZ:  r = (sa > 0) ? mask : 0;
      OP_LTZ:  r = (sa < 0) ? mask : 0;
      OP_MADD: r = a * b + c;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_MOVB: r = b;
      default: r = 0;
    endcase
    return r & mask;
  endfunction

  task automatic check(alu_op_e o, logic [31:0] a, logic [31:0] b, logic [31:0] c);
    longint unsigned e16, e32;
    op = o; a16 = a[15:0]; b16 = b[15:0]; c16 = c[15:0];
    a32 = a; b32 = b; c32 = c;
    #1;
    e16 = ref_alu(o, 64'(a[15:0]), 64'(b[15:0]), 64'(c[15:0]), 16);
    e32 = ref_alu(o, 64'(a), 64'(b), 64'(c), 32);
    checks += 2;
    if (64'(y16) != e16) begin
      failures++;
      $display("FAIL w16 %s a=%h b=%h c=%h y=%h exp=%h", o.name(), a[15:0], b[15:0], c[15:0], y16, e16);
    end
    if (64'(y32) != e32) begin
      failures++;
      $display("FAIL w32 %s a=%h b=%h c=%h y=%h exp=%h", o.name(), a, b, c, y32, e32);
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
    alu_op_e o;
    // directed corners
    for (int k = 0; k <= int'(OP_MOVB); k++) begin
      o = alu_op_e'(k);
      check(o, 32'h0000_0000, 32'h0000_0000, 32'h0);
      check(o, 32'hFFFF_FFFF, 32'h0000_0001, 32'h5);
      check(o, 32'h8000_8000, 32'hFFFF_FFFF, 32'h1);
      check(o, 32'h0000_7FFF, 32'h0000_0003, 32'h7);
      check(o, 32'h1234_5678, 32'h0000_0000, 32'h9);
      check(o, 32'hDEAD_BEEF, 32'h0000_001F, 32'h3);
    end
    // random
    for (int n = 0; n < 4000; n++) begin
      o = alu_op_e'($urandom_range(0, int'(OP_MOVB)));
      check(o, $urandom, (n % 3 == 0) ? $urandom_range(0, 40) : $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
