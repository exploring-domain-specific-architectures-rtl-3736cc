// Self-checking test of sensor_demux: with SS=0 sensor samples must reach the
// memory stream and never the buffer; with SS=1 they must be written to the
// buffer at consecutive ring positions (wrapping at the end), ahead of memory
// transfers and prefetcher writes; memory transfers must win over the
// prefetcher; and nothing may be written while the buffer is power-gated.
// Every buffer write is checked against a model of the priority rules.
module tb_sensor_demux;
  localparam int BYTES = 64;          // 32 samples, so the ring wraps quickly
  int checks = 0, failures = 0;
  int n_sens_buf = 0, n_fill = 0, n_pf = 0, n_smem = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ss, buf_on;
  logic        sensor_valid, sensor_ready, smem_valid, smem_ready;
  logic [15:0] sensor_data, smem_data, fill_data, pf_data, buf_wr_data;
  logic        fill_valid, fill_ready, pf_valid, pf_ready, buf_wr_valid;
  logic [4:0]  fill_idx, pf_idx, buf_wr_idx, wr_ptr;

  sensor_demux #(.SIZE_BYTES(BYTES)) dut (.*);

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ptr_model = 0;

  initial begin
    ss = 0; buf_on = 1; sensor_valid = 0; sensor_data = 0; smem_ready = 1;
    fill_valid = 0; fill_idx = 0; fill_data = 0; pf_valid = 0; pf_idx = 0; pf_data = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) ss = ~ss;
      buf_on       = (n % 300) > 20;
      sensor_valid = $urandom_range(0, 1);
      sensor_data  = 16'($urandom);
      smem_ready   = $urandom_range(0, 3) != 0;
      fill_valid   = $urandom_range(0, 1);
      fill_idx     = 5'($urandom); fill_data = 16'($urandom);
      pf_valid     = $urandom_range(0, 1);
      pf_idx       = 5'($urandom); pf_data = 16'($urandom);
      #1;
      // demultiplexer
      expect_true(smem_valid == (!ss && sensor_valid), "smem_valid follows SS");
      expect_true(smem_data == sensor_data, "smem_data");
      expect_true(sensor_ready == (ss ? buf_on : smem_ready), "sensor_ready");
      // write port model
      if (!buf_on) begin
        expect_true(!buf_wr_valid && !fill_ready && !pf_ready, "no write while gated");
      end else if (ss && sensor_valid) begin
        expect_true(buf_wr_valid && buf_wr_idx == 5'(ptr_model) && buf_wr_data == sensor_data,
                    "sensor sample to ring position");
        expect_true(!fill_ready && !pf_ready, "sensor has priority");
        ptr_model = (ptr_model + 1) % 32;
        n_sens_buf++;
      end else if (fill_valid) begin
        expect_true(buf_wr_valid && fill_ready && !pf_ready && buf_wr_idx == fill_idx &&
                    buf_wr_data == fill_data, "memory transfer granted");
        n_fill++;
      end else if (pf_valid) begin
        expect_true(buf_wr_valid && pf_ready && buf_wr_idx == pf_idx && buf_wr_data == pf_data,
                    "prefetcher granted");
        n_pf++;
      end else begin
        expect_true(!buf_wr_valid, "idle write port");
      end
      if (smem_valid && smem_ready) n_smem++;
      @(posedge clk); #1;
      expect_true(wr_ptr == 5'(ptr_model), "ring pointer");
    end
    $display("sensor->buffer %0d, fills %0d, prefetch writes %0d, sensor->memory %0d",
             n_sens_buf, n_fill, n_pf, n_smem);
    expect_true(n_sens_buf > 40 && n_fill > 0 && n_pf > 0 && n_smem > 0, "all paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
