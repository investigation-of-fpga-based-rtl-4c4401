// tb_rmp_qam: self-checking testbench for the 64-QAM mapper.
// All 64 symbols are mapped; the expected real and imaginary parts come from
// the level list -448, -320, -192, -64, 64, 192, 320, 448 indexed by the
// three MSBs (real) and three LSBs (imaginary).
module tb_rmp_qam;
  logic              clk = 1'b0;
  logic [5:0]        symbol;
  logic signed [9:0] re, im;
  int checks = 0, failures = 0;

  rmp_qam dut (.symbol, .re, .im);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LEVELS[8] = '{-448, -320, -192, -64, 64, 192, 320, 448};

  initial begin
    for (int s = 0; s < 64; s++) begin
      symbol = 6'(s);
      #1;
      checks++;
      if (int'(re) != LEVELS[s / 8] || int'(im) != LEVELS[s % 8]) begin
        failures++;
        $display("FAIL symbol=%0d re=%0d im=%0d", s, re, im);
      end
    end
    // 10-bit patterns: symbol 6'b011_010 -> re = -64 = 11_1100_0000, im = -192 = 11_0100_0000
    symbol = 6'b011_010; #1;
    checks++;
    if (re !== 10'b11_1100_0000 || im !== 10'b11_0100_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
