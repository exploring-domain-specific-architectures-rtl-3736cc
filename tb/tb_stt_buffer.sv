// Self-checking test of stt_buffer at its full 16 KB size: random sample
// writes and row/sample reads compared with a shadow array, a check of the
// one-cycle read latency, and a check that a power-gated buffer ignores
// writes and reads as zero.
module tb_stt_buffer;
  localparam int BYTES = 16384;
  localparam int NS    = BYTES / 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         en, rd_valid, rd_resp_valid, wr_valid;
  logic [13:0]  rd_addr;
  logic [127:0] rd_row;
  logic [15:0]  rd_elem, wr_data;
  logic [12:0]  wr_idx;
  logic [15:0]  shadow [NS];

  stt_buffer dut (.*);

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic write(int idx, logic [15:0] d);
    @(negedge clk);
    wr_valid = 1; wr_idx = 13'(idx); wr_data = d;
    @(negedge clk);
    wr_valid = 0;
    if (en) shadow[idx] = d;
  endtask

  task automatic read_check(int byte_addr);
    logic [127:0] exp;
    @(negedge clk);
    rd_valid = 1; rd_addr = 14'(byte_addr);
    @(negedge clk);
    rd_valid = 0;
    checks++;
    if (!rd_resp_valid) begin failures++; $display("FAIL read latency"); end
    for (int k = 0; k < 8; k++) exp[k*16 +: 16] = en ? shadow[(byte_addr & ~15) / 2 + k] : 16'h0;
    expect_eq(rd_row, exp, "row");
    expect_eq(128'(rd_elem), en ? 128'(shadow[byte_addr / 2]) : 128'h0, "sample");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; rd_valid = 0; rd_addr = 0; wr_valid = 0; wr_idx = 0; wr_data = 0;
    #12 rst_n = 1;
    // fill the whole buffer with a known pattern, as a full ECG record would
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      wr_valid = 1; wr_idx = 13'(i); wr_data = 16'(i * 7 + 3);
      shadow[i] = 16'(i * 7 + 3);
    end
    @(negedge clk) wr_valid = 0;
    for (int r = 0; r < BYTES / 16; r += 37) read_check(r * 16 + 2 * (r % 8));
    read_check(BYTES - 2);
    // random mix
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 1)) write($urandom_range(0, NS - 1), 16'($urandom));
      else read_check($urandom_range(0, BYTES - 1) & ~1);
    end
    // power-gated: writes ignored, reads zero
    en = 0;
    write(5, 16'hBEEF);
    read_check(10);
    en = 1;
    read_check(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
