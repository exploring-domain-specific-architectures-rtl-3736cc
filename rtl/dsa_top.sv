// Single-core domain-specific architecture for wearable devices, in its
// energy-oriented configuration.
//
// The core extends an in-order ARM-class pipeline with three additions aimed
// at wearable kernels: a SIMD ALU that does eight 16-bit operations per cycle
// on four lanes, a 16 KB tightly coupled STT-RAM buffer for raw sensor
// signals, and a graph prefetcher that gathers successor-node data into
// contiguous buffer arrays. Both L1 caches are relaxed-retention STT-RAM with
// 2-bit retention monitors. Power control switches the SIMD unit, the buffer
// and the prefetcher off when a program does not use them.
//
// This module wires the execution pipeline (register files, scalar and SIMD
// ALUs, memory-stage routing), the instruction and data caches, the buffer,
// the sensor demultiplexer with the buffer's write arbitration, the
// prefetcher and the power controller. What lies outside is brought out as
// ports: the host core's fetch/decode front end (micro-operations in,
// instruction fetch through the I-cache port), main memory (three request/
// response channels: I-cache refills, D-cache refills and write-through
// stores, prefetcher word reads; plus a port through which memory copies
// samples into the buffer), the wearable sensors, and the power switches
// (pwr_en: bit 0 SIMD, 1 buffer, 2 prefetcher).
//
// All channels use valid/ready handshakes; see the submodules for timing.
// ev is a bundle of one-cycle event pulses for monitoring.
module dsa_top
  import dsa_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned CACHE_WAYS  = 4,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned RET_CYCLES  = 75000,
  parameter int unsigned BUF_BYTES   = 16384,
  parameter int unsigned MAX_SUCC    = 8,
  parameter int unsigned MAX_PARAMS  = 4,
  parameter int unsigned WAKE_CYCLES = 4,
  localparam int unsigned SI_W  = $clog2(BUF_BYTES / 2),
  localparam int unsigned LINE_W = LINE_BYTES * 8
) (
  input  logic         clk,
  input  logic         rst_n,
  // micro-operations from the host front end
  input  logic         uop_valid,
  input  uop_t         uop,
  output logic         uop_ready,
  // instruction fetch
  input  logic         if_req_valid,
  output logic         if_req_ready,
  input  logic [31:0]  if_req_addr,
  output logic         if_resp_valid,
  output logic [127:0] if_resp_data,
  // main memory: I-cache channel
  output logic         im_req_valid,
  input  logic         im_req_ready,
  output logic [31:0]  im_req_addr,
  input  logic         im_resp_valid,
  input  logic [LINE_W-1:0] im_resp_rdata,
  // main memory: D-cache channel
  output logic         dm_req_valid,
  input  logic         dm_req_ready,
  output logic         dm_req_we,
  output logic [31:0]  dm_req_addr,
  output logic [127:0] dm_req_wdata,
  output logic [15:0]  dm_req_be,
  input  logic         dm_resp_valid,
  input  logic [LINE_W-1:0] dm_resp_rdata,
  // main memory: prefetcher channel
  output logic         pm_req_valid,
  output logic [31:0]  pm_req_addr,
  input  logic         pm_req_ready,
  input  logic         pm_resp_valid,
  input  logic [31:0]  pm_resp_data,
  // main memory to buffer transfers
  input  logic         fill_valid,
  input  logic [SI_W-1:0] fill_idx,
  input  logic [15:0]  fill_data,
  output logic         fill_ready,
  // wearable sensors
  input  logic         sensor_valid,
  input  logic [15:0]  sensor_data,
  output logic         sensor_ready,
  output logic         smem_valid,
  output logic [15:0]  smem_data,
  input  logic         smem_ready,
  output logic [SI_W-1:0] sensor_wr_ptr,
  // power switches
  output logic [2:0]   pwr_en,
  // write-back observation and status
  output logic         wb_valid,
  output logic         wb_vec,
  output logic [REG_AW-1:0] wb_rd,
  output logic [127:0] wb_data,
  output logic         pf_done,
  output logic [$clog2(MAX_SUCC+1)-1:0] pf_count,
  // events: {wake, dc_expired, dc_miss, dc_hit, simd_op, stall_pf,
  //          stall_wake, stall_mem, stall_hazard, retire}
  output logic [9:0]   ev
);

  localparam int unsigned BA_W = $clog2(BUF_BYTES);

  // datapath <-> D-cache
  logic         dc_req_valid, dc_req_ready, dc_req_we, dc_resp_valid;
  logic [31:0]  dc_req_addr;
  logic [127:0] dc_req_wdata, dc_resp_rdata;
  logic [15:0]  dc_req_be;
  // datapath <-> buffer
  logic         bf_rd_valid, bf_resp_valid;
  logic [BA_W-1:0] bf_rd_addr;
  logic [127:0] bf_rd_row;
  logic [15:0]  bf_rd_elem;
  // datapath <-> prefetcher
  logic         pf_cfg_we, pf_go, pf_busy;
  logic [3:0]   pf_cfg_idx;
  logic [31:0]  pf_cfg_wdata, pf_go_addr;
  // power
  logic         pc_cfg_we, ss;
  logic [3:0]   pc_cfg_wdata;
  logic [2:0]   pc_need, pc_ready, pc_wake;
  // buffer write path
  logic         pfw_valid, pfw_ready, bw_valid;
  logic [SI_W-1:0] pfw_idx, bw_idx;
  logic [15:0]  pfw_data, bw_data;
  // events
  logic ev_retire, ev_hz, ev_mem, ev_wake, ev_pf, ev_simd;
  logic dc_hit, dc_miss, dc_exp;

  dsa_datapath #(.BUF_BYTES(BUF_BYTES)) u_dp (
    .clk, .rst_n,
    .uop_valid, .uop, .uop_ready,
    .dc_req_valid, .dc_req_ready, .dc_req_we, .dc_req_addr, .dc_req_wdata, .dc_req_be,
    .dc_resp_valid, .dc_resp_rdata,
    .bf_rd_valid, .bf_rd_addr, .bf_resp_valid, .bf_rd_row, .bf_rd_elem,
    .pf_cfg_we, .pf_cfg_idx, .pf_cfg_wdata, .pf_go, .pf_go_addr, .pf_busy,
    .pc_cfg_we, .pc_cfg_wdata, .pc_need, .pc_ready,
    .wb_valid, .wb_vec, .wb_rd, .wb_data,
    .ev_retire, .ev_stall_hazard (ev_hz), .ev_stall_mem (ev_mem),
    .ev_stall_wake (ev_wake), .ev_stall_pf (ev_pf), .ev_simd_op (ev_simd)
  );

  stt_cache #(
    .SIZE_BYTES (CACHE_BYTES), .WAYS (CACHE_WAYS),
    .LINE_BYTES (LINE_BYTES), .RET_CYCLES (RET_CYCLES)
  ) u_dcache (
    .clk, .rst_n,
    .req_valid (dc_req_valid), .req_ready (dc_req_ready), .req_we (dc_req_we),
    .req_addr (dc_req_addr), .req_wdata (dc_req_wdata), .req_be (dc_req_be),
    .resp_valid (dc_resp_valid), .resp_rdata (dc_resp_rdata),
    .mem_req_valid (dm_req_valid), .mem_req_ready (dm_req_ready), .mem_req_we (dm_req_we),
    .mem_req_addr (dm_req_addr), .mem_req_wdata (dm_req_wdata), .mem_req_be (dm_req_be),
    .mem_resp_valid (dm_resp_valid), .mem_resp_rdata (dm_resp_rdata),
    .ev_hit (dc_hit), .ev_miss (dc_miss), .ev_expired (dc_exp)
  );

  // Instruction cache: same design, read only.
  logic         im_we_unused;
  logic [127:0] im_wdata_unused;
  logic [15:0]  im_be_unused;
  logic         ic_hit_unused, ic_miss_unused, ic_exp_unused;

  stt_cache #(
    .SIZE_BYTES (CACHE_BYTES), .WAYS (CACHE_WAYS),
    .LINE_BYTES (LINE_BYTES), .RET_CYCLES (RET_CYCLES)
  ) u_icache (
    .clk, .rst_n,
    .req_valid (if_req_valid), .req_ready (if_req_ready), .req_we (1'b0),
    .req_addr (if_req_addr), .req_wdata ('0), .req_be ('0),
    .resp_valid (if_resp_valid), .resp_rdata (if_resp_data),
    .mem_req_valid (im_req_valid), .mem_req_ready (im_req_ready), .mem_req_we (im_we_unused),
    .mem_req_addr (im_req_addr), .mem_req_wdata (im_wdata_unused), .mem_req_be (im_be_unused),
    .mem_resp_valid (im_resp_valid), .mem_resp_rdata (im_resp_rdata),
    .ev_hit (ic_hit_unused), .ev_miss (ic_miss_unused), .ev_expired (ic_exp_unused)
  );

  stt_buffer #(.SIZE_BYTES(BUF_BYTES)) u_buffer (
    .clk, .rst_n,
    .en (pc_ready[1]),
    .rd_valid (bf_rd_valid), .rd_addr (bf_rd_addr),
    .rd_resp_valid (bf_resp_valid), .rd_row (bf_rd_row), .rd_elem (bf_rd_elem),
    .wr_valid (bw_valid), .wr_idx (bw_idx), .wr_data (bw_data)
  );

  sensor_demux #(.SIZE_BYTES(BUF_BYTES)) u_sdemux (
    .clk, .rst_n,
    .ss, .buf_on (pc_ready[1]),
    .sensor_valid, .sensor_data, .sensor_ready,
    .smem_valid, .smem_data, .smem_ready,
    .fill_valid, .fill_idx, .fill_data, .fill_ready,
    .pf_valid (pfw_valid), .pf_idx (pfw_idx), .pf_data (pfw_data), .pf_ready (pfw_ready),
    .buf_wr_valid (bw_valid), .buf_wr_idx (bw_idx), .buf_wr_data (bw_data),
    .wr_ptr (sensor_wr_ptr)
  );

  prefetcher #(.MAX_SUCC(MAX_SUCC), .MAX_PARAMS(MAX_PARAMS), .SI_W(SI_W)) u_pf (
    .clk, .rst_n,
    .en (pc_ready[2]),
    .cfg_we (pf_cfg_we), .cfg_idx (pf_cfg_idx), .cfg_wdata (pf_cfg_wdata),
    .go (pf_go), .go_addr (pf_go_addr),
    .busy (pf_busy), .done (pf_done), .count (pf_count),
    .mem_req_valid (pm_req_valid), .mem_req_addr (pm_req_addr), .mem_req_ready (pm_req_ready),
    .mem_resp_valid (pm_resp_valid), .mem_resp_data (pm_resp_data),
    .buf_valid (pfw_valid), .buf_idx (pfw_idx), .buf_data (pfw_data), .buf_ready (pfw_ready)
  );

  power_ctrl #(.WAKE_CYCLES(WAKE_CYCLES)) u_pwr (
    .clk, .rst_n,
    .cfg_we (pc_cfg_we), .cfg_wdata (pc_cfg_wdata),
    .need (pc_need), .pwr_en, .ready (pc_ready), .wake (pc_wake), .ss
  );

  assign ev = {|pc_wake, dc_exp, dc_miss, dc_hit, ev_simd, ev_pf, ev_wake, ev_mem, ev_hz, ev_retire};

endmodule
