// tb_rmp_rotate_unit: self-checking testbench for the barrel rotator.
// Every input byte, every distance 0..7 and both directions are applied; the
// expected value is built bit by bit in the testbench.
module tb_rmp_rotate_unit;
  logic       clk = 1'b0;
  logic [7:0] din, dout;
  logic [2:0] amount;
  logic       dir;
  int checks = 0, failures = 0;

  rmp_rotate_unit dut (.din, .amount, .dir, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model(logic [7:0] x, int n, logic left);
    logic [7:0] y;
    for (int i = 0; i < 8; i++)
      if (left) y[(i + n) % 8] = x[i];
      else      y[i] = x[(i + n) % 8];
    return y;
  endfunction

  initial begin
    for (int x = 0; x < 256; x++)
      for (int n = 0; n < 8; n++)
        for (int d = 0; d < 2; d++) begin
          din = 8'(x); amount = 3'(n); dir = 1'(d);
          #1;
          checks++;
          if (dout !== model(din, n, dir)) begin
            failures++;
            if (failures < 10)
              $display("FAIL din=%b n=%0d dir=%0d got %b exp %b", din, n, dir, dout, model(din, n, dir));
          end
        end
    // a worked example: 1011_0001 rotated left by 3 is 1000_1101
    din = 8'b1011_0001; amount = 3'd3; dir = 1'b1; #1;
    checks++;
    if (dout !== 8'b1000_1101) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
