// Tightly coupled STT-RAM sample buffer.
//
// A 16 KB buffer next to the L1 cache holds raw 16-bit signal samples (for
// example a whole ECG recording of 7500 samples) so that a kernel can read
// them directly, with a fixed latency and without the cache's misses. The CPU
// may only load from it; data arrive from main memory, straight from the
// wearable sensors, or from the prefetcher's gather logic, all through the
// single write port (see sensor_demux for the arbitration). Because almost
// all accesses are reads, the array is STT-RAM; it is not a cache, so it has
// no retention monitor and software keeps its contents short-lived.
//
// Organisation: SIZE_BYTES/16 rows of eight 16-bit samples. A read addresses a
// byte in the buffer and returns, one cycle later (rd_resp_valid), the aligned
// 16-byte row (a full SIMD vector) and the sample at that address. A write
// stores one 16-bit sample at a sample index. When the unit is power-gated
// (en low) writes are ignored and reads return zero.
// The 16 KB size and the load-only rule follow the design; the row layout,
// port shapes and the one-cycle read latency are this design's choices.
module stt_buffer #(
  parameter int unsigned SIZE_BYTES = 16384,
  localparam int unsigned ROWS  = SIZE_BYTES / 16,
  localparam int unsigned BA_W  = $clog2(SIZE_BYTES),      // byte address
  localparam int unsigned SI_W  = $clog2(SIZE_BYTES / 2)   // sample index
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  // CPU read port
  input  logic             rd_valid,
  input  logic [BA_W-1:0]  rd_addr,
  output logic             rd_resp_valid,
  output logic [127:0]     rd_row,
  output logic [15:0]      rd_elem,
  // fill port
  input  logic             wr_valid,
  input  logic [SI_W-1:0]  wr_idx,
  input  logic [15:0]      wr_data
);

  localparam int unsigned RW = $clog2(ROWS);

  logic [7:0][15:0] mem_q [ROWS];
  logic [7:0][15:0] row_q;
  logic [2:0]       sel_q;
  logic             rv_q;

  always_ff @(posedge clk) begin
    if (en && wr_valid)
      mem_q[wr_idx[SI_W-1:3]][wr_idx[2:0]] <= wr_data;
    if (en && rd_valid)
      row_q <= mem_q[rd_addr[BA_W-1:4]];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rv_q  <= 1'b0;
      sel_q <= '0;
    end else begin
      rv_q  <= rd_valid;
      if (rd_valid) sel_q <= rd_addr[3:1];
    end

  assign rd_resp_valid = rv_q;
  assign rd_row  = en ? row_q : '0;
  assign rd_elem = en ? row_q[sel_q] : '0;

  logic unused_lsb;
  assign unused_lsb = rd_addr[0];

  initial assert (RW + 4 == BA_W) else $error("stt_buffer: size must be a power of two");

endmodule
