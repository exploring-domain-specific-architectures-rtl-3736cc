// Sensor demultiplexer and buffer write-port arbiter.
//
// Samples from the wearable sensors go either into the STT-RAM buffer or on
// to main memory; the processor chooses with the select signal SS (1: buffer,
// 0: memory). Sensor samples written to the buffer fill it as a ring, from
// sample 0 upwards, wrapping at the end, so the newest SIZE_BYTES/2 samples
// are always present; wr_ptr tells software where the next sample will go.
//
// The buffer has one write port but three writers: the sensor path, block
// transfers from main memory, and the prefetcher's gather logic. Sensor data
// cannot be held back for long, so it has the highest priority, then memory
// transfers, then the prefetcher. Every writer uses a valid/ready handshake;
// a write is accepted in the cycle where both are high. While the buffer is
// power-gated (buf_on low) no writer to it is accepted.
// The SS demultiplexer follows the design; the ring pointer, the priorities
// and the handshakes are this design's choices.
module sensor_demux #(
  parameter int unsigned SIZE_BYTES = 16384,
  localparam int unsigned SI_W = $clog2(SIZE_BYTES / 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ss,
  input  logic            buf_on,
  // sensors
  input  logic            sensor_valid,
  input  logic [15:0]     sensor_data,
  output logic            sensor_ready,
  // sensor stream to main memory
  output logic            smem_valid,
  output logic [15:0]     smem_data,
  input  logic            smem_ready,
  // block transfer from main memory
  input  logic            fill_valid,
  input  logic [SI_W-1:0] fill_idx,
  input  logic [15:0]     fill_data,
  output logic            fill_ready,
  // prefetcher gather logic
  input  logic            pf_valid,
  input  logic [SI_W-1:0] pf_idx,
  input  logic [15:0]     pf_data,
  output logic            pf_ready,
  // buffer write port
  output logic            buf_wr_valid,
  output logic [SI_W-1:0] buf_wr_idx,
  output logic [15:0]     buf_wr_data,
  output logic [SI_W-1:0] wr_ptr
);

  logic [SI_W-1:0] ptr_q;
  logic            s_to_buf;

  assign s_to_buf   = ss && sensor_valid;

  // SS demultiplexer
  assign smem_valid   = !ss && sensor_valid;
  assign smem_data    = sensor_data;
  assign sensor_ready = ss ? buf_on : smem_ready;

  // fixed-priority arbitration of the buffer's write port
  always_comb begin
    buf_wr_valid = 1'b0;
    buf_wr_idx   = '0;
    buf_wr_data  = '0;
    fill_ready   = 1'b0;
    pf_ready     = 1'b0;
    if (buf_on) begin
      if (s_to_buf) begin
        buf_wr_valid = 1'b1;
        buf_wr_idx   = ptr_q;
        buf_wr_data  = sensor_data;
      end else if (fill_valid) begin
        buf_wr_valid = 1'b1;
        buf_wr_idx   = fill_idx;
        buf_wr_data  = fill_data;
        fill_ready   = 1'b1;
      end else if (pf_valid) begin
        buf_wr_valid = 1'b1;
        buf_wr_idx   = pf_idx;
        buf_wr_data  = pf_data;
        pf_ready     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                   ptr_q <= '0;
    else if (buf_on && s_to_buf)  ptr_q <= ptr_q + 1'b1;

  assign wr_ptr = ptr_q;

  // at most one writer is granted per cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(fill_ready && pf_ready));

endmodule
