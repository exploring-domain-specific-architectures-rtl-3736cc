// Reference model used by the datapath and system testbenches.
//
// It executes micro-operations one at a time, in program order, on its own
// copy of the architectural state (scalar and vector registers, byte-wide
// main memory, the buffer's samples and the prefetch registers) and returns
// the register write-back each one must produce. It is written independently
// of the RTL: ALU results come from 64-bit integer arithmetic, and a
// prefetch is modelled by walking the graph in memory directly.
package dsa_ref_pkg;
  import dsa_pkg::*;

  typedef struct {
    bit           valid;
    bit           vec;
    int           rd;
    logic [127:0] data;
  } wb_t;

  function automatic longint unsigned ref_alu(alu_op_e o, longint unsigned a,
      longint unsigned b, longint unsigned c, int w);
    longint unsigned mask;
    longint sa, sb;
    int s;
    longint unsigned r;
    mask = (64'd1 << w) - 1;
    sa = a[w-1] ? longint'(a | ~mask) : longint'(a);
    sb = b[w-1] ? longint'(b | ~mask) : longint'(b);
    s  = int'(b % 64'(w));
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

  class dsa_model;
    logic [31:0]  sreg [16];
    logic [127:0] vreg [16];
    logic [7:0]   mem  [int unsigned];
    logic [15:0]  bufm [int unsigned];
    logic [31:0]  pfr  [16];

    function new();
      foreach (sreg[i]) sreg[i] = '0;
      foreach (vreg[i]) vreg[i] = '0;
      foreach (pfr[i])  pfr[i]  = '0;
      pfr[5] = 32'h0001_0000; pfr[7] = 32'h0001_0000;
      pfr[9] = 32'h0001_0000; pfr[11] = 32'h0001_0000;
    endfunction

    // initial memory contents: a fixed function of the address
    function automatic logic [7:0] rd8(int unsigned a);
      if (mem.exists(a)) return mem[a];
      return 8'(a * 37 + (a >> 8) * 11 + 5);
    endfunction
    function automatic logic [31:0] rd32(int unsigned a);
      return {rd8(a + 3), rd8(a + 2), rd8(a + 1), rd8(a)};
    endfunction
    function automatic void wr32(int unsigned a, logic [31:0] d);
      for (int b = 0; b < 4; b++) mem[a + 32'(b)] = d[8*b +: 8];
    endfunction
    function automatic logic [15:0] buf_rd(int unsigned i);
      return bufm.exists(i) ? bufm[i] : 16'h0;
    endfunction

    // gather successor parameters into the buffer, as the prefetcher must
    function automatic void prefetch(int unsigned node, int max_succ);
      int n, np;
      logic [31:0] succ [$];
      n  = int'(rd32((node + pfr[0]) & ~32'h3));
      if (n > max_succ) n = max_succ;
      np = (pfr[2] > 4) ? 4 : int'(pfr[2]);
      for (int i = 0; i < n; i++) succ.push_back(rd32((node + pfr[1] + 32'(4 * i)) & ~32'h3));
      for (int p = 0; p < np; p++) begin
        int sz, dst;
        logic [31:0] off;
        off = pfr[4 + 2 * p];
        sz  = (pfr[5 + 2 * p][17:16] == 2'd2) ? 2 : 1;
        dst = int'(pfr[5 + 2 * p][15:0]);
        for (int i = 0; i < n; i++) begin
          logic [31:0] a, w;
          a = succ[i] + off;
          w = rd32(a & ~32'h3);
          if (sz == 2) begin
            bufm[(dst + 2 * i) % 8192]     = w[15:0];
            bufm[(dst + 2 * i + 1) % 8192] = w[31:16];
          end else begin
            bufm[(dst + i) % 8192] = a[1] ? w[31:16] : w[15:0];
          end
        end
      end
    endfunction

    function automatic wb_t exec(uop_t u, int max_succ);
      wb_t r;
      logic [31:0] a, b, c, addr;
      r.valid = 0; r.vec = 0; r.rd = int'(u.rd); r.data = '0;
      a = sreg[u.rs1];
      b = u.use_imm ? u.imm : sreg[u.rs2];
      c = sreg[u.rs3];
      addr = sreg[u.rs1] + u.imm;
      case (u.kind)
        U_SALU: begin
          r.valid = 1;
          r.data  = 128'(ref_alu(u.op, 64'(a), 64'(b), 64'(c), 32));
        end
        U_VALU: begin
          r.valid = 1; r.vec = 1;
          for (int e = 0; e < 8; e++)
            r.data[16*e +: 16] = 16'(ref_alu(u.op, 64'(vreg[u.rs1][16*e +: 16]),
                                              64'(vreg[u.rs2][16*e +: 16]),
                                              64'(vreg[u.rs3][16*e +: 16]), 16));
        end
        U_LOAD: begin
          r.valid = 1; r.vec = u.vec;
          if (u.tgt == T_CACHE) begin
            if (u.vec) for (int k = 0; k < 4; k++)
                         r.data[32*k +: 32] = rd32((addr & ~32'hF) + 32'(4 * k));
            else r.data = 128'(rd32(addr & ~32'h3));
          end else begin
            int unsigned base;
            base = ((addr % 16384) & ~32'hF) / 2;
            if (u.vec) for (int k = 0; k < 8; k++) r.data[16*k +: 16] = buf_rd(base + 32'(k));
            else begin
              logic [15:0] s;
              s = buf_rd((addr % 16384) / 2);
              r.data = 128'({{16{s[15]}}, s});
            end
          end
        end
        U_STORE: begin
          if (u.vec) for (int k = 0; k < 4; k++)
                       wr32((addr & ~32'hF) + 32'(4 * k), vreg[u.rs2][32*k +: 32]);
          else wr32(addr & ~32'h3, sreg[u.rs2]);
        end
        U_PF_CFG: pfr[u.imm[3:0]] = sreg[u.rs2];
        U_PF_GO:  prefetch(addr, max_succ);
        default: ;
      endcase
      if (r.valid) begin
        if (r.vec) vreg[u.rd] = r.data;
        else       sreg[u.rd] = r.data[31:0];
      end
      return r;
    endfunction
  endclass

  // micro-operation builders
  function automatic uop_t mk(uop_kind_e k, alu_op_e op, int rd, int rs1, int rs2,
                              int rs3 = 0, logic [31:0] imm = 0, bit vec = 0,
                              mem_tgt_e tgt = T_CACHE, bit use_imm = 0);
    uop_t u;
    u.kind = k; u.op = op; u.vec = vec; u.tgt = tgt; u.use_imm = use_imm;
    u.rd = 4'(rd); u.rs1 = 4'(rs1); u.rs2 = 4'(rs2); u.rs3 = 4'(rs3); u.imm = imm;
    return u;
  endfunction

  function automatic uop_t li(int rd, logic [31:0] v);
    return mk(U_SALU, OP_MOVB, rd, 0, 0, 0, v, 0, T_CACHE, 1);
  endfunction

endpackage
