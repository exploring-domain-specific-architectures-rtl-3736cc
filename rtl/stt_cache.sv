// Relaxed-retention STT-RAM L1 cache.
//
// Both L1 caches of the design (instruction and data) are 32 KB, 4-way set
// associative with 64-byte lines, built from STT-RAM whose retention is
// relaxed to 75 us. STT-RAM reads are cheap and writes are slow, which suits
// the read-dominated wearable kernels. Blocks are never refreshed: a
// retention_monitor with one 2-bit counter per block marks a block stale
// before its data could decay, and a stale block is treated as a miss.
//
// This cache is write-through with no write allocation, so an expiring block
// never holds the only copy of data and can be dropped silently. A read miss
// refills a whole line; the victim is an invalid or stale way if there is one,
// otherwise a per-set round-robin pointer chooses it.
//
// CPU side: a request (req_valid, req_we, req_addr, 128-bit req_wdata with
// byte enables req_be) is accepted when req_ready is high. The array is read
// synchronously, so a read hit answers with resp_valid and the aligned
// 16-byte chunk one cycle after acceptance. A store answers with resp_valid
// once memory has taken the write-through. Memory side: one request channel
// (mem_req_*: line-address reads and 16-byte writes, handshake with
// mem_req_ready) and a response channel returning a 64-byte line with
// mem_resp_valid. At the 1 GHz clock both the 0.445 ns hit and the 0.981 ns
// write fit in one cycle, so a hit costs one cycle either way.
// Geometry and retention follow the design; the write policy, replacement
// and the bus shapes are this design's choices. The ev_* outputs pulse for
// hits, misses and misses caused by an expired block.
module stt_cache #(
  parameter int unsigned SIZE_BYTES = 32768,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned RET_CYCLES = 75000
) (
  input  logic         clk,
  input  logic         rst_n,
  // CPU side
  input  logic         req_valid,
  output logic         req_ready,
  input  logic         req_we,
  input  logic [31:0]  req_addr,
  input  logic [127:0] req_wdata,
  input  logic [15:0]  req_be,
  output logic         resp_valid,
  output logic [127:0] resp_rdata,
  // memory side
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output logic         mem_req_we,
  output logic [31:0]  mem_req_addr,
  output logic [127:0] mem_req_wdata,
  output logic [15:0]  mem_req_be,
  input  logic         mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0] mem_resp_rdata,
  // events
  output logic         ev_hit,
  output logic         ev_miss,
  output logic         ev_expired
);

  localparam int unsigned SETS    = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES);
  localparam int unsigned SET_W   = $clog2(SETS);
  localparam int unsigned TAG_W   = 32 - OFF_W - SET_W;
  localparam int unsigned CHUNKS  = LINE_BYTES / 16;
  localparam int unsigned CH_W    = $clog2(CHUNKS);
  localparam int unsigned WAY_W   = $clog2(WAYS);
  localparam int unsigned NBLK    = WAYS * SETS;
  localparam int unsigned LINE_W  = LINE_BYTES * 8;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WT, S_REFILL_REQ, S_REFILL_WAIT} state_e;

  state_e state_q;

  logic [WAYS-1:0]   valid_q [SETS];
  logic [WAY_W-1:0]  rr_q   [SETS];

  // registered request
  logic         we_q;
  logic [31:0]  addr_q;
  logic [127:0] wdata_q;
  logic [15:0]  be_q;
  logic [LINE_W-1:0] rline_q [WAYS];   // line read from each way
  logic [TAG_W-1:0]  rtag_q  [WAYS];   // tag read from each way
  logic [WAY_W-1:0]  victim_q;

  logic [SET_W-1:0] set_q;
  logic [TAG_W-1:0] tag_in;
  logic [CH_W-1:0]  chunk_q;
  assign set_q   = addr_q[OFF_W +: SET_W];
  assign tag_in  = addr_q[31 -: TAG_W];
  assign chunk_q = addr_q[4 +: CH_W];

  // retention monitor
  logic [NBLK-1:0] stale;
  logic            mon_refresh;
  logic [$clog2(NBLK)-1:0] mon_idx;
  logic            mon_tick;

  retention_monitor #(.NBLOCKS(NBLK), .RET_CYCLES(RET_CYCLES)) u_mon (
    .clk, .rst_n,
    .refresh     (mon_refresh),
    .refresh_idx (mon_idx),
    .stale       (stale),
    .tick        (mon_tick)
  );

  // tag compare
  logic [WAYS-1:0] match, present;
  logic            hit, any_expired;
  logic [WAY_W-1:0] hit_way, free_way;
  logic            free_found;

  always_comb begin
    hit = 1'b0; hit_way = '0; any_expired = 1'b0;
    free_found = 1'b0; free_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      match[w]   = valid_q[set_q][w] && (rtag_q[w] == tag_in);
      present[w] = valid_q[set_q][w] && !stale[w*SETS + int'(set_q)];
      if (match[w] && present[w]) begin
        hit = 1'b1; hit_way = WAY_W'(w);
      end
      if (match[w] && !present[w]) any_expired = 1'b1;
    end
    for (int w = WAYS-1; w >= 0; w--)
      if (!present[w]) begin
        free_found = 1'b1; free_way = WAY_W'(w);
      end
  end

  // merged line for a store hit
  logic [LINE_W-1:0] merged;
  always_comb begin
    merged = rline_q[hit_way];
    for (int b = 0; b < 16; b++)
      if (be_q[b]) merged[int'(chunk_q)*128 + b*8 +: 8] = wdata_q[b*8 +: 8];
  end

  assign req_ready = (state_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      we_q     <= 1'b0;
      addr_q   <= '0;
      wdata_q  <= '0;
      be_q     <= '0;
      victim_q <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          we_q    <= req_we;
          addr_q  <= req_addr;
          wdata_q <= req_wdata;
          be_q    <= req_be;
          state_q <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (we_q)                state_q <= S_WT;
          else if (hit)            state_q <= S_IDLE;
          else begin
            victim_q <= free_found ? free_way : rr_q[set_q];
            state_q  <= S_REFILL_REQ;
          end
        end
        S_WT:          if (mem_req_ready) state_q <= S_IDLE;
        S_REFILL_REQ:  if (mem_req_ready) state_q <= S_REFILL_WAIT;
        S_REFILL_WAIT: if (mem_resp_valid) begin
          valid_q[set_q][victim_q] <= 1'b1;
          rr_q[set_q]              <= rr_q[set_q] + 1'b1;
          state_q                  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Data and tag arrays: one single-port memory per way, read at request
  // acceptance, written by a store hit or a refill. No reset: valid bits
  // guard them.
  logic             accept;
  logic [SET_W-1:0] req_set;
  assign accept  = (state_q == S_IDLE) && req_valid;
  assign req_set = req_addr[OFF_W +: SET_W];

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [LINE_W-1:0] data_mem [SETS];
    logic [TAG_W-1:0]  tag_mem  [SETS];
    logic [LINE_W-1:0] rline;
    logic [TAG_W-1:0]  rtag;
    logic              store_wr, refill_wr;

    assign store_wr  = (state_q == S_LOOKUP) && we_q && hit && (hit_way == WAY_W'(w));
    assign refill_wr = (state_q == S_REFILL_WAIT) && mem_resp_valid && (victim_q == WAY_W'(w));

    always_ff @(posedge clk) begin
      if (store_wr)       data_mem[set_q] <= merged;
      else if (refill_wr) data_mem[set_q] <= mem_resp_rdata;
      if (refill_wr)      tag_mem[set_q]  <= tag_in;
      if (accept) begin
        rline <= data_mem[req_set];
        rtag  <= tag_mem[req_set];
      end
    end

    assign rline_q[w] = rline;
    assign rtag_q[w]  = rtag;
  end

  always_comb begin
    mon_refresh = 1'b0;
    mon_idx     = '0;
    if (state_q == S_LOOKUP && we_q && hit) begin
      mon_refresh = 1'b1;
      mon_idx     = $bits(mon_idx)'(int'(hit_way) * SETS + int'(set_q));
    end else if (state_q == S_REFILL_WAIT && mem_resp_valid) begin
      mon_refresh = 1'b1;
      mon_idx     = $bits(mon_idx)'(int'(victim_q) * SETS + int'(set_q));
    end
  end

  // responses
  always_comb begin
    resp_valid = 1'b0;
    resp_rdata = '0;
    if (state_q == S_LOOKUP && !we_q && hit) begin
      resp_valid = 1'b1;
      resp_rdata = rline_q[hit_way][int'(chunk_q)*128 +: 128];
    end else if (state_q == S_WT && mem_req_ready) begin
      resp_valid = 1'b1;
    end else if (state_q == S_REFILL_WAIT && mem_resp_valid) begin
      resp_valid = 1'b1;
      resp_rdata = mem_resp_rdata[int'(chunk_q)*128 +: 128];
    end
  end

  assign mem_req_valid = (state_q == S_WT) || (state_q == S_REFILL_REQ);
  assign mem_req_we    = (state_q == S_WT);
  assign mem_req_addr  = (state_q == S_WT) ? {addr_q[31:4], 4'b0}
                                           : {addr_q[31:OFF_W], {OFF_W{1'b0}}};
  assign mem_req_wdata = wdata_q;
  assign mem_req_be    = (state_q == S_WT) ? be_q : '0;

  assign ev_hit     = (state_q == S_LOOKUP) && hit;
  assign ev_miss    = (state_q == S_LOOKUP) && !hit;
  assign ev_expired = (state_q == S_LOOKUP) && !hit && any_expired;

  // The monitor tick is only observed through the stale bits.
  logic unused_tick;
  assign unused_tick = mon_tick;

endmodule
