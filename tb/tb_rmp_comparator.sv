// tb_rmp_comparator: self-checking testbench for the 8-bit comparator.
// All 65536 operand pairs are compared under each of the three opcodes.
module tb_rmp_comparator;
  import rmp_pkg::*;

  logic       clk = 1'b0;
  opcode_e    op;
  logic [7:0] a, b;
  logic       eq, gt, lt, flag;
  int checks = 0, failures = 0;

  rmp_comparator dut (.op, .a, .b, .eq, .gt, .lt, .flag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    // operands printed in the comparator figure: 1001_1001 against itself is EQUAL
    op = OP_EQ; a = 8'b1001_1001; b = 8'b1001_1001; #1;
    checks++; if (flag !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int k = 0; k < 3; k++) begin
          logic exp;
          a = 8'(x); b = 8'(y);
          op = (k == 0) ? OP_EQ : (k == 1) ? OP_GT : OP_LT;
          exp = (k == 0) ? (x == y) : (k == 1) ? (x > y) : (x < y);
          #1;
          checks++;
          if (flag !== exp || eq !== (x == y) || gt !== (x > y) || lt !== (x < y)) begin
            failures++;
            if (failures < 10) $display("FAIL %s a=%0d b=%0d flag=%b", op.name(), a, b, flag);
          end
        end
    // operands printed in the comparator figure: 1001_1001 against itself is EQUAL
    op = OP_EQ; a = 8'b1001_1001; b = 8'b1001_1001; #1;
    checks++; if (flag !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
