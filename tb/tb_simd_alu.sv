// Self-checking test of simd_alu. Operands are applied just after a rising
// edge and the 128-bit result is compared at the next rising edge with eight
// independent element-wise results, which checks that the four lanes really
// cover all eight elements within one clock (one-cycle latency) and that the
// half-cycle selectors put each result in the right element.
module tb_simd_alu;
  import dsa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  alu_op_e op;
  logic [VLEN-1:0][ELEM_W-1:0] a, b, c, y;

  simd_alu dut (.clk, .rst_n, .op, .a, .b, .c, .y);

  function automatic logic [15:0] ref16(alu_op_e o, logic [15:0] x, logic [15:0] z,
                                       logic [15:0] w);
    int sx = int'($signed(x)), sz = int'($signed(z));
    int sh = int'(z[3:0]);
    logic [31:0] rr;
    case (o)
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_MUL:  return 16'(int'(x) * int'(z));
      OP_DIV:  return (z == 0) ? 16'hFFFF : 16'(sx / sz);
      OP_XOR:  return x ^ z;
      OP_SLL:  return x << sh;
      OP_SRL:  return x >> sh;
      OP_SRA:  return 16'(sx >>> sh);
      OP_ROL:  begin rr = {x, x} << sh; return rr[31:16]; end
      OP_ROR:  begin rr = {x, x} >> sh; return rr[15:0]; end
      OP_GT:   return (sx > sz) ? 16'hFFFF : 16'h0;
      OP_LT:   return (sx < sz) ? 16'hFFFF : 16'h0;
      OP_EQ:   return (x == z) ? 16'hFFFF : 16'h0;
      OP_GTZ:  return (sx > 0) ? 16'hFFFF : 16'h0;
      OP_LTZ:  return (sx < 0) ? 16'hFFFF : 16'h0;
      OP_MADD: return 16'(int'(x) * int'(z) + int'(w));
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_MOVB: return z;
      default: return 16'h0;
    endcase
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e;
    op = OP_ADD; a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      #1;
      op = alu_op_e'($urandom_range(0, int'(OP_MOVB)));
      for (int i = 0; i < VLEN; i++) begin
        a[i] = 16'($urandom);
        b[i] = (n % 4 == 0) ? 16'($urandom_range(0, 20)) : 16'($urandom);
        c[i] = 16'($urandom);
      end
      @(negedge clk);
      #4;                       // just before the next rising edge
      for (int i = 0; i < VLEN; i++) begin
        e = ref16(op, a[i], b[i], c[i]);
        checks++;
        if (y[i] !== e) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s elem %0d a=%h b=%h c=%h y=%h exp=%h", op.name(), i, a[i], b[i], c[i], y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
