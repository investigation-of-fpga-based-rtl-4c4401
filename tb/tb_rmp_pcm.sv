// tb_rmp_pcm: self-checking testbench for the PCM coder.
// Every sample number 0..255 is applied; the expected code is
// 128 + round(127 * sin(2*pi*n/256)) computed in the testbench. A few values
// are also checked as literals: n = 0 gives 128, n = 64 gives 255, n = 192
// gives 1.
module tb_rmp_pcm;
  logic       clk = 1'b0;
  logic [7:0] sample_no, code;
  int checks = 0, failures = 0;

  rmp_pcm dut (.sample_no, .code);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_code(int n, int exp);
    sample_no = 8'(n);
    #1;
    checks++;
    if (int'(code) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d code=%0d exp=%0d", n, code, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 256; n++) begin
      real s;
      int  q;
      s = 127.0 * $sin(6.283185307179586 * n / 256.0);
      q = (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
      expect_code(n, 128 + q);
    end
    expect_code(0, 128);
    expect_code(64, 255);
    expect_code(128, 128);
    expect_code(192, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
