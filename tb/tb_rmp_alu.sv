// tb_rmp_alu: self-checking testbench for the RMP ALU.
// Drives every ALU opcode with random and corner operands and compares the
// result with integer arithmetic done in the testbench, then checks the
// operand / result pairs of the published ALU simulation.
module tb_rmp_alu;
  import rmp_pkg::*;

  logic        clk = 1'b0;
  opcode_e     op;
  logic [7:0]  a, b;
  logic [4:0]  divisor;
  logic [14:0] result;
  int checks = 0, failures = 0;

  rmp_alu dut (.op, .a, .b, .divisor, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    // operands of the published ALU simulation: 0111_0001 and 1000_1000 give
    // sum 1111_1001, difference 1110_1001, XNOR 0000_0110, and both NOT
    // operations 1000_1110
    op = OP_ADD;  a = 8'b0111_0001; b = 8'b1000_1000; #1; checks++; if (result !== 15'b1111_1001) failures++;
    op = OP_SUB;  #1; checks++; if (result !== 15'b1110_1001) failures++;
    op = OP_XNOR; #1; checks++; if (result !== 15'b0000_0110) failures++;
    a = 8'b0111_0001; b = 8'b1000_1000;
    op = OP_NOTA; #1; checks++; if (result !== 15'b1000_1110) failures++;
    op = OP_NOTB; #1; checks++; if (result !== 15'b1000_1110) failures++;
    op = OP_AND;  #1; checks++; if (result !== 15'b0000_0000) failures++;
    op = OP_OR;   #1; checks++; if (result !== 15'b1111_1001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(opcode_e o, int x, int y, int d);
    case (o)
      OP_ADD:  return (x + y) % 256;
      OP_SUB:  return (x - y + 256) % 256;
      OP_MUL:  return (x * x) % 32768;
      OP_DIV:  return (d == 0) ? 255 : x / d;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_NAND: return 255 - (x & y);
      OP_NOR:  return 255 - (x | y);
      OP_XOR:  return x ^ y;
      OP_XNOR: return 255 - (x ^ y);
      OP_NOTA, OP_NOTB: return 255 - x;
      OP_INC:  return (x + 1) % 256;
      OP_DEC:  return (x + 255) % 256;
      default: return 0;
    endcase
  endfunction

  localparam opcode_e OPS[14] = '{OP_ADD, OP_SUB, OP_MUL, OP_DIV, OP_AND, OP_OR, OP_NAND,
                                  OP_NOR, OP_XOR, OP_XNOR, OP_NOTA, OP_NOTB, OP_INC, OP_DEC};

  initial begin
    for (int k = 0; k < 14; k++) begin
      for (int n = 0; n < 200; n++) begin
        op = OPS[k];
        case (n)
          0: begin a = 8'd0;   b = 8'd0;   divisor = 5'd0;  end
          1: begin a = 8'd255; b = 8'd255; divisor = 5'd31; end
          2: begin a = 8'd181; b = 8'd1;   divisor = 5'd1;  end
          3: begin a = 8'd200; b = 8'd100; divisor = 5'd7;  end
          default: begin a = 8'($urandom); b = 8'($urandom); divisor = 5'($urandom); end
        endcase
        #1;
        checks++;
        if (int'(result) != expected(op, int'(a), int'(b), int'(divisor))) begin
          failures++;
          $display("FAIL %s a=%0d b=%0d d=%0d got %0d exp %0d", op.name(), a, b, divisor,
                   result, expected(op, int'(a), int'(b), int'(divisor)));
        end
      end
    end
    // operands of the published ALU simulation: 0111_0001 and 1000_1000 give
    // sum 1111_1001, difference 1110_1001, XNOR 0000_0110, and both NOT
    // operations 1000_1110
    op = OP_ADD;  a = 8'b0111_0001; b = 8'b1000_1000; #1; checks++; if (result !== 15'b1111_1001) failures++;
    op = OP_SUB;  #1; checks++; if (result !== 15'b1110_1001) failures++;
    op = OP_XNOR; #1; checks++; if (result !== 15'b0000_0110) failures++;
    a = 8'b0111_0001; b = 8'b1000_1000;
    op = OP_NOTA; #1; checks++; if (result !== 15'b1000_1110) failures++;
    op = OP_NOTB; #1; checks++; if (result !== 15'b1000_1110) failures++;
    op = OP_AND;  #1; checks++; if (result !== 15'b0000_0000) failures++;
    op = OP_OR;   #1; checks++; if (result !== 15'b1111_1001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
