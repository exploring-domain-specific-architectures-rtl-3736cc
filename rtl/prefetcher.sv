// Graph prefetcher: gathers the parameters of a node's successors into
// contiguous arrays in the STT-RAM buffer.
//
// Graph kernels such as A* path finding touch node data that are scattered
// in memory but laid out in a fixed way, so they cannot be vectorised
// directly. Given the address of the current node, this unit reads how many
// successors it has, reads the successors' addresses, and then copies a chosen
// set of fields ("parameters", e.g. the distance to the destination) of every
// successor into one array per parameter in the buffer. The CPU can then load
// each array as one SIMD vector. The unit works beside the cache and reads
// main memory directly, because graph traversal reuses little.
//
// It has the three parts of the design:
//  * prefetch registers, written once per graph by software (cfg_*):
//      0: byte offset of the successor count inside a node
//      1: byte offset of the successor pointer array (32-bit pointers)
//      2: number of parameters to gather (1..MAX_PARAMS)
//      4+2p: byte offset of parameter p inside a node
//      5+2p: [17:16] size of parameter p in 16-bit samples (1 or 2),
//            [15:0]  first buffer sample of the array for parameter p
//  * the address generator: a control FSM whose node-size computation reads
//    the successor count (clamped to MAX_SUCC), then the successor addresses,
//    then each parameter address = successor address + offset;
//  * the gather logic: it keeps the successor count ("node size") and the
//    parameter size ("feature size") and writes sample k of successor i of
//    parameter p to buffer index dest[p] + i*size[p] + k.
// go/go_addr start a prefetch (busy high until done pulses); count gives the
// number of successors handled. The memory port is a word read channel with
// one request outstanding; buffer writes use a valid/ready handshake.
// Register numbers, the clamp to MAX_SUCC (eight successors, one SIMD
// vector), little-endian sample order and the port shapes are this design's
// choices; the three-part structure and the flow follow the design.
module prefetcher #(
  parameter int unsigned MAX_SUCC   = 8,
  parameter int unsigned MAX_PARAMS = 4,
  parameter int unsigned SI_W       = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  // prefetch register write (prefetch init)
  input  logic            cfg_we,
  input  logic [3:0]      cfg_idx,
  input  logic [31:0]     cfg_wdata,
  // start (prefetch successors)
  input  logic            go,
  input  logic [31:0]     go_addr,
  output logic            busy,
  output logic            done,
  output logic [$clog2(MAX_SUCC+1)-1:0] count,
  // main memory word reads
  output logic            mem_req_valid,
  output logic [31:0]     mem_req_addr,
  input  logic            mem_req_ready,
  input  logic            mem_resp_valid,
  input  logic [31:0]     mem_resp_data,
  // buffer writes
  output logic            buf_valid,
  output logic [SI_W-1:0] buf_idx,
  output logic [15:0]     buf_data,
  input  logic            buf_ready
);

  localparam int unsigned CW = $clog2(MAX_SUCC+1);
  localparam int unsigned IW = (MAX_SUCC > 1) ? $clog2(MAX_SUCC) : 1;
  localparam int unsigned PW = (MAX_PARAMS > 1) ? $clog2(MAX_PARAMS) : 1;

  // ---------------- prefetch registers ----------------
  logic [31:0] nsucc_off_q, succ_off_q;
  logic [PW:0] nparam_q;
  logic [31:0] poff_q  [MAX_PARAMS];
  logic [1:0]  psize_q [MAX_PARAMS];
  logic [15:0] pdest_q [MAX_PARAMS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nsucc_off_q <= '0;
      succ_off_q  <= '0;
      nparam_q    <= '0;
      for (int p = 0; p < MAX_PARAMS; p++) begin
        poff_q[p]  <= '0;
        psize_q[p] <= 2'd1;
        pdest_q[p] <= '0;
      end
    end else if (cfg_we) begin
      if (cfg_idx == 4'd0) nsucc_off_q <= cfg_wdata;
      if (cfg_idx == 4'd1) succ_off_q  <= cfg_wdata;
      if (cfg_idx == 4'd2) nparam_q    <= (cfg_wdata > MAX_PARAMS) ? (PW+1)'(MAX_PARAMS)
                                                                   : (PW+1)'(cfg_wdata);
      for (int p = 0; p < MAX_PARAMS; p++) begin
        if (int'(cfg_idx) == 4 + 2*p) poff_q[p] <= cfg_wdata;
        if (int'(cfg_idx) == 5 + 2*p) begin
          psize_q[p] <= (cfg_wdata[17:16] == 2'd2) ? 2'd2 : 2'd1;
          pdest_q[p] <= cfg_wdata[15:0];
        end
      end
    end
  end

  // ---------------- address generator ----------------
  typedef enum logic [2:0] {
    A_IDLE, A_RD_COUNT, A_RD_SUCC, A_RD_PARAM, A_WR, A_DONE
  } astate_e;

  astate_e     st_q;
  logic        waiting_q;            // request sent, response pending
  logic [31:0] node_q;
  logic [CW-1:0] nsucc_q;            // node size
  logic [31:0] succ_q [MAX_SUCC];
  logic [IW-1:0] i_q;                // successor
  logic [PW-1:0] p_q;                // parameter
  logic [31:0] word_q;               // fetched parameter word
  logic        k_q;                  // sample within a 2-sample parameter

  logic [31:0] req_addr, param_addr;
  assign param_addr = succ_q[i_q] + poff_q[p_q];
  always_comb begin
    unique case (st_q)
      A_RD_COUNT: req_addr = node_q + nsucc_off_q;
      A_RD_SUCC:  req_addr = node_q + succ_off_q + 32'({i_q, 2'b00});
      A_RD_PARAM: req_addr = param_addr;
      default:    req_addr = '0;
    endcase
  end

  logic reading;
  assign reading       = (st_q == A_RD_COUNT || st_q == A_RD_SUCC || st_q == A_RD_PARAM);
  assign mem_req_valid = reading && !waiting_q;
  assign mem_req_addr  = {req_addr[31:2], 2'b00};

  logic [31:0] cnt_word;
  assign cnt_word = mem_resp_data;

  logic last_succ, last_param;
  assign last_succ  = (CW'(i_q) + 1'b1 == nsucc_q);
  assign last_param = ((PW+1)'(p_q) + 1'b1 == nparam_q);

  // ---------------- gather logic ----------------
  logic [15:0] sample;
  logic [15:0] dest_idx;
  always_comb begin
    if (psize_q[p_q] == 2'd2)
      sample = k_q ? word_q[31:16] : word_q[15:0];
    else
      sample = param_addr[1] ? word_q[31:16] : word_q[15:0];
    dest_idx = pdest_q[p_q] + 16'(i_q) * 16'(psize_q[p_q]) + 16'(k_q);
  end

  assign buf_valid = (st_q == A_WR);
  assign buf_idx   = dest_idx[SI_W-1:0];
  assign buf_data  = sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= A_IDLE;
      waiting_q <= 1'b0;
      node_q    <= '0;
      nsucc_q   <= '0;
      i_q       <= '0;
      p_q       <= '0;
      word_q    <= '0;
      k_q       <= 1'b0;
      for (int s = 0; s < MAX_SUCC; s++) succ_q[s] <= '0;
    end else if (!en) begin
      st_q      <= A_IDLE;
      waiting_q <= 1'b0;
    end else begin
      if (mem_req_valid && mem_req_ready) waiting_q <= 1'b1;
      unique case (st_q)
        A_IDLE: if (go) begin
          node_q <= go_addr;
          i_q    <= '0;
          p_q    <= '0;
          k_q    <= 1'b0;
          st_q   <= A_RD_COUNT;
        end
        A_RD_COUNT: if (waiting_q && mem_resp_valid) begin
          waiting_q <= 1'b0;
          // node size computation
          nsucc_q <= (cnt_word > MAX_SUCC) ? CW'(MAX_SUCC) : CW'(cnt_word);
          st_q    <= (cnt_word == 0 || nparam_q == 0) ? A_DONE : A_RD_SUCC;
          if (cnt_word == 0) nsucc_q <= '0;
        end
        A_RD_SUCC: if (waiting_q && mem_resp_valid) begin
          waiting_q    <= 1'b0;
          succ_q[i_q]  <= mem_resp_data;
          if (last_succ) begin
            i_q  <= '0;
            st_q <= A_RD_PARAM;
          end else begin
            i_q  <= i_q + 1'b1;
          end
        end
        A_RD_PARAM: if (waiting_q && mem_resp_valid) begin
          waiting_q <= 1'b0;
          word_q    <= mem_resp_data;
          k_q       <= 1'b0;
          st_q      <= A_WR;
        end
        A_WR: if (buf_ready) begin
          if (psize_q[p_q] == 2'd2 && !k_q) begin
            k_q <= 1'b1;
          end else begin
            k_q <= 1'b0;
            if (!last_succ) begin
              i_q  <= i_q + 1'b1;
              st_q <= A_RD_PARAM;
            end else if (!last_param) begin
              i_q  <= '0;
              p_q  <= p_q + 1'b1;
              st_q <= A_RD_PARAM;
            end else begin
              st_q <= A_DONE;
            end
          end
        end
        A_DONE: st_q <= A_IDLE;
        default: st_q <= A_IDLE;
      endcase
    end
  end

  assign busy  = (st_q != A_IDLE);
  assign done  = (st_q == A_DONE);
  assign count = nsucc_q;

  // a response only arrives for an outstanding request
  assert property (@(posedge clk) disable iff (!rst_n) mem_resp_valid |-> waiting_q);

endmodule
