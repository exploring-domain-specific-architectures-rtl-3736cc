// Self-checking test of dsa_regfile (128-bit vector configuration): reset to
// zero, random writes, and reads on all three ports compared with a shadow
// copy kept by the testbench, including a read of the register written in the
// same cycle (which must still return the old value).
module tb_dsa_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]   ra0, ra1, ra2, wa;
  logic [127:0] rd0, rd1, rd2, wd;
  logic         we;
  logic [127:0] shadow [16];

  dsa_regfile #(.WIDTH(128), .DEPTH(16)) dut (
    .clk, .rst_n, .ra0, .ra1, .ra2, .rd0, .rd1, .rd2, .we, .wa, .wd
  );

  task automatic cmp(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = '0; ra0 = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra0 = 4'(i); #1;
      cmp(rd0, '0, "reset");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 3) != 0);
      wa  = 4'($urandom);
      wd  = {$urandom, $urandom, $urandom, $urandom};
      ra0 = 4'($urandom); ra1 = 4'($urandom); ra2 = (n % 5 == 0) ? wa : 4'($urandom);
      #1;
      cmp(rd0, shadow[ra0], "port0");
      cmp(rd1, shadow[ra1], "port1");
      cmp(rd2, shadow[ra2], "port2");
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
