// Execution pipeline of the wearable DSA core.
//
// Decoded micro-operations from the host core's front end enter at the decode
// stage, where the 32-bit scalar and the 128-bit vector register files are
// read. The execution stage holds the scalar ALU and, beside it, the SIMD ALU
// that does eight 16-bit operations per cycle on four lanes. The memory stage
// routes each access by its kind (the "Sel" switch): cache loads and stores to
// the L1 data cache, buffer loads to the STT-RAM buffer (the select CS is the
// tgt field of a load), prefetcher set-up and start commands to the
// prefetcher. Results are written back to the register files at the end of
// the memory stage.
//
// Hazards are resolved by interlock: a micro-operation is not accepted while
// an older one in the execution or memory stage still has to write a register
// it reads. Other stalls: the memory stage holds the pipeline until the cache
// or buffer answers; an operation that needs a power-gated unit raises need
// and waits until power_ctrl reports the unit ready (wake stall); buffer loads
// and prefetcher commands wait while the prefetcher is busy, so a load never
// sees a half-gathered array; a control register write waits for an empty
// pipeline so no unit is switched off under an operation in flight. The
// buffer accepts no CPU stores.
//
// Timing: an ALU operation issued in cycle t is written back at the end of
// t+2; a load or store spends at least two cycles in the memory stage
// (request, then response). Issue uses a valid/ready handshake. Scalar loads
// and stores move the 32-bit word at addr[3:2] of the 16-byte chunk; vector
// ones move the whole aligned 16-byte chunk. A scalar load from the buffer
// returns the 16-bit sample sign-extended. The wb_* outputs show every write-
// back; the ev_* outputs pulse for each kind of stall and each retirement.
// The units, their widths, CS, Sel and the load-only buffer follow the design;
// the micro-operation format, the three-stage pipeline and the interlocks are
// this design's own.
module dsa_datapath
  import dsa_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 16384,
  localparam int unsigned BA_W = $clog2(BUF_BYTES)
) (
  input  logic         clk,
  input  logic         rst_n,
  // micro-operations from the front end
  input  logic         uop_valid,
  input  uop_t         uop,
  output logic         uop_ready,
  // L1 data cache
  output logic         dc_req_valid,
  input  logic         dc_req_ready,
  output logic         dc_req_we,
  output logic [31:0]  dc_req_addr,
  output logic [127:0] dc_req_wdata,
  output logic [15:0]  dc_req_be,
  input  logic         dc_resp_valid,
  input  logic [127:0] dc_resp_rdata,
  // STT-RAM buffer read port
  output logic         bf_rd_valid,
  output logic [BA_W-1:0] bf_rd_addr,
  input  logic         bf_resp_valid,
  input  logic [127:0] bf_rd_row,
  input  logic [15:0]  bf_rd_elem,
  // prefetcher
  output logic         pf_cfg_we,
  output logic [3:0]   pf_cfg_idx,
  output logic [31:0]  pf_cfg_wdata,
  output logic         pf_go,
  output logic [31:0]  pf_go_addr,
  input  logic         pf_busy,
  // power control
  output logic         pc_cfg_we,
  output logic [3:0]   pc_cfg_wdata,
  output logic [2:0]   pc_need,
  input  logic [2:0]   pc_ready,
  // write-back observation
  output logic         wb_valid,
  output logic         wb_vec,
  output logic [REG_AW-1:0] wb_rd,
  output logic [127:0] wb_data,
  // events
  output logic         ev_retire,
  output logic         ev_stall_hazard,
  output logic         ev_stall_mem,
  output logic         ev_stall_wake,
  output logic         ev_stall_pf,
  output logic         ev_simd_op
);

  localparam int unsigned U_SIMD = CFG_SIMD_ON, U_BUF = CFG_BUF_ON, U_PF = CFG_PF_ON;

  // ---------------- stage registers ----------------
  typedef struct packed {
    logic        valid;
    uop_t        u;
    logic [31:0] sa, sb, sc;        // scalar operands
    logic [127:0] va, vb, vc;       // vector operands
  } ex_t;

  typedef struct packed {
    logic         valid;
    uop_t         u;
    logic [31:0]  addr;
    logic [127:0] res;              // ALU result, or store data
  } mem_t;

  ex_t  ex_q;
  mem_t mem_q;
  logic mem_sent_q;

  // ---------------- register files ----------------
  logic [31:0]  s_rd0, s_rd1, s_rd2;
  logic [127:0] v_rd0, v_rd1, v_rd2;
  logic         s_we, v_we;
  logic [127:0] wb_val;

  dsa_regfile #(.WIDTH(SCALAR_W), .DEPTH(NREGS)) u_sregs (
    .clk, .rst_n,
    .ra0 (uop.rs1), .ra1 (uop.rs2), .ra2 (uop.rs3),
    .rd0 (s_rd0), .rd1 (s_rd1), .rd2 (s_rd2),
    .we  (s_we), .wa (mem_q.u.rd), .wd (wb_val[31:0])
  );

  dsa_regfile #(.WIDTH(VEC_W), .DEPTH(NREGS)) u_vregs (
    .clk, .rst_n,
    .ra0 (uop.rs1), .ra1 (uop.rs2), .ra2 (uop.rs3),
    .rd0 (v_rd0), .rd1 (v_rd1), .rd2 (v_rd2),
    .we  (v_we), .wa (mem_q.u.rd), .wd (wb_val)
  );

  // ---------------- decode: what a micro-op reads and writes ----------------
  function automatic logic writes_s(uop_t u);
    return (u.kind == U_SALU) || (u.kind == U_LOAD && !u.vec);
  endfunction
  function automatic logic writes_v(uop_t u);
    return (u.kind == U_VALU) || (u.kind == U_LOAD && u.vec);
  endfunction

  logic [2:0] rd_s, rd_v;   // source use per rs1/rs2/rs3
  always_comb begin
    rd_s = '0; rd_v = '0;
    unique case (uop.kind)
      U_SALU:   rd_s = {uop.op == OP_MADD, !uop.use_imm, 1'b1};
      U_VALU:   rd_v = {uop.op == OP_MADD, 1'b1, 1'b1};
      U_LOAD:   rd_s = 3'b001;
      U_STORE:  begin rd_s = {1'b0, !uop.vec, 1'b1}; rd_v = {1'b0, uop.vec, 1'b0}; end
      U_PF_CFG: rd_s = 3'b010;
      U_PF_GO:  rd_s = 3'b001;
      default:  ;
    endcase
  end

  function automatic logic conflict(logic vld, uop_t older, logic [2:0] use_s,
                                    logic [2:0] use_v, uop_t u);
    logic c;
    logic [REG_AW-1:0] src [3];
    src[0] = u.rs1; src[1] = u.rs2; src[2] = u.rs3;
    c = 1'b0;
    for (int k = 0; k < 3; k++) begin
      if (vld && writes_s(older) && use_s[k] && older.rd == src[k]) c = 1'b1;
      if (vld && writes_v(older) && use_v[k] && older.rd == src[k]) c = 1'b1;
    end
    return c;
  endfunction

  logic hazard, pf_inflight, pf_block, pipe_empty, cfg_wait;
  logic [2:0] need;
  logic mem_done, mem_adv, ex_adv, issue;

  assign hazard = conflict(ex_q.valid, ex_q.u, rd_s, rd_v, uop) ||
                  conflict(mem_q.valid, mem_q.u, rd_s, rd_v, uop);

  assign pf_inflight = (ex_q.valid  && ex_q.u.kind  inside {U_PF_GO, U_PF_CFG}) ||
                       (mem_q.valid && mem_q.u.kind inside {U_PF_GO, U_PF_CFG});
  assign pf_block = (uop.kind inside {U_PF_GO, U_PF_CFG} ||
                     (uop.kind == U_LOAD && uop.tgt == T_BUFFER)) &&
                    (pf_busy || pf_inflight);

  assign pipe_empty = !ex_q.valid && !mem_q.valid;
  assign cfg_wait   = (uop.kind == U_CFG) && !pipe_empty;

  always_comb begin
    need = '0;
    if (uop_valid) begin
      need[U_SIMD] = (uop.kind == U_VALU);
      need[U_BUF]  = (uop.kind == U_LOAD && uop.tgt == T_BUFFER);
      need[U_PF]   = (uop.kind inside {U_PF_GO, U_PF_CFG});
    end
  end
  assign pc_need = need & ~pc_ready;

  // ---------------- pipeline control ----------------
  assign mem_adv = !mem_q.valid || mem_done;
  assign ex_adv  = mem_adv;                       // EX always finishes in one cycle
  assign uop_ready = ex_adv && !hazard && !pf_block && !cfg_wait && (pc_need == '0);
  assign issue     = uop_valid && uop_ready;

  // control register writes act at issue, with the pipeline empty
  assign pc_cfg_we    = issue && (uop.kind == U_CFG);
  assign pc_cfg_wdata = uop.imm[3:0];

  // ---------------- execution stage ----------------
  logic [31:0]  s_y;
  logic [127:0] v_y;
  logic [127:0] va_iso, vb_iso, vc_iso;
  logic [31:0]  ex_addr;

  dsa_alu #(.WIDTH(SCALAR_W)) u_scalar_alu (
    .op (ex_q.u.op), .a (ex_q.sa), .b (ex_q.sb), .c (ex_q.sc), .y (s_y)
  );

  // isolation of the SIMD unit while it is power-gated
  assign va_iso = pc_ready[U_SIMD] ? ex_q.va : '0;
  assign vb_iso = pc_ready[U_SIMD] ? ex_q.vb : '0;
  assign vc_iso = pc_ready[U_SIMD] ? ex_q.vc : '0;

  simd_alu u_simd (
    .clk, .rst_n,
    .op (ex_q.u.op), .a (va_iso), .b (vb_iso), .c (vc_iso), .y (v_y)
  );

  assign ex_addr = ex_q.sa + ex_q.u.imm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q  <= '0;
      mem_q <= '0;
    end else begin
      if (ex_adv) begin
        ex_q.valid <= issue && (uop.kind != U_CFG) && (uop.kind != U_NOP);
        if (issue) begin
          ex_q.u  <= uop;
          ex_q.sa <= s_rd0;
          ex_q.sb <= uop.use_imm ? uop.imm : s_rd1;
          ex_q.sc <= s_rd2;
          ex_q.va <= v_rd0;
          ex_q.vb <= v_rd1;
          ex_q.vc <= v_rd2;
        end
      end
      if (mem_adv) begin
        mem_q.valid <= ex_q.valid;
        mem_q.u     <= ex_q.u;
        mem_q.addr  <= ex_addr;
        unique case (ex_q.u.kind)
          U_SALU:   mem_q.res <= {96'b0, s_y};
          U_VALU:   mem_q.res <= v_y;
          U_STORE:  mem_q.res <= ex_q.u.vec ? ex_q.vb : {4{ex_q.sb}};
          U_PF_CFG: mem_q.res <= {96'b0, ex_q.sb};
          default:  mem_q.res <= '0;
        endcase
      end
    end
  end

  // ---------------- memory stage ----------------
  logic is_dc, is_bf;
  assign is_dc = mem_q.valid && ((mem_q.u.kind == U_LOAD && mem_q.u.tgt == T_CACHE) ||
                                 mem_q.u.kind == U_STORE);
  assign is_bf = mem_q.valid && (mem_q.u.kind == U_LOAD && mem_q.u.tgt == T_BUFFER);

  assign dc_req_valid = is_dc && !mem_sent_q;
  assign dc_req_we    = (mem_q.u.kind == U_STORE);
  assign dc_req_addr  = mem_q.addr;
  assign dc_req_wdata = mem_q.res;
  assign dc_req_be    = mem_q.u.vec ? 16'hFFFF : (16'h000F << {mem_q.addr[3:2], 2'b00});

  assign bf_rd_valid  = is_bf && !mem_sent_q;
  assign bf_rd_addr   = mem_q.addr[BA_W-1:0];

  assign pf_cfg_we    = mem_q.valid && mem_q.u.kind == U_PF_CFG;
  assign pf_cfg_idx   = mem_q.u.imm[3:0];
  assign pf_cfg_wdata = mem_q.res[31:0];
  assign pf_go        = mem_q.valid && mem_q.u.kind == U_PF_GO;
  assign pf_go_addr   = mem_q.addr;

  always_comb begin
    if (is_dc)      mem_done = mem_sent_q && dc_resp_valid;
    else if (is_bf) mem_done = mem_sent_q && bf_resp_valid;
    else            mem_done = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                                 mem_sent_q <= 1'b0;
    else if (mem_adv)                           mem_sent_q <= 1'b0;
    else if (dc_req_valid && dc_req_ready)      mem_sent_q <= 1'b1;
    else if (bf_rd_valid)                       mem_sent_q <= 1'b1;

  // write-back value
  always_comb begin
    wb_val = mem_q.res;
    if (mem_q.u.kind == U_LOAD) begin
      if (mem_q.u.tgt == T_CACHE)
        wb_val = mem_q.u.vec ? dc_resp_rdata
                             : {96'b0, dc_resp_rdata[32*int'(mem_q.addr[3:2]) +: 32]};
      else
        wb_val = mem_q.u.vec ? bf_rd_row : {96'b0, {16{bf_rd_elem[15]}}, bf_rd_elem};
    end
  end

  assign s_we = mem_q.valid && mem_done && writes_s(mem_q.u);
  assign v_we = mem_q.valid && mem_done && writes_v(mem_q.u);

  assign wb_valid = s_we || v_we;
  assign wb_vec   = v_we;
  assign wb_rd    = mem_q.u.rd;
  assign wb_data  = v_we ? wb_val : {96'b0, wb_val[31:0]};

  // ---------------- events ----------------
  assign ev_retire       = mem_q.valid && mem_done;
  assign ev_stall_hazard = uop_valid && hazard;
  assign ev_stall_mem    = mem_q.valid && !mem_done;
  assign ev_stall_wake   = uop_valid && (pc_need != '0);
  assign ev_stall_pf     = uop_valid && pf_block;
  assign ev_simd_op      = ex_q.valid && ex_q.u.kind == U_VALU && mem_adv;

  // ---------------- rules ----------------
  // the buffer is load-only for the CPU: stores always go to the cache
  assert property (@(posedge clk) disable iff (!rst_n)
                   dc_req_valid && dc_req_we |-> mem_q.u.kind == U_STORE);
  // a SIMD operation only executes on a powered, settled SIMD unit
  assert property (@(posedge clk) disable iff (!rst_n)
                   ex_q.valid && ex_q.u.kind == U_VALU |-> pc_ready[U_SIMD]);

endmodule
