// rmp_alu: 8-bit arithmetic and logic unit of the RMP.
//
// Purely combinational. From the opcode and the two 8-bit immediates it computes
// addition, subtraction, squaring, division, the seven logic operations and
// increment / decrement. Operand and result widths follow the document:
//   * ADD, SUB, logic ops: 8-bit result, ADD/SUB wrap modulo 256.
//   * MUL multiplies the first input by itself (the document multiplies only a
//     number with itself) and keeps a 15-bit product; for inputs above 181 the
//     16th product bit is lost, as the 15-bit output field implies.
//   * DIV divides the 8-bit first input by the 5-bit divisor. Division by zero
//     returning all ones is this design's choice.
//   * NOT A and NOT B both invert the first input, as the instruction format
//     assigns both to bits 12..5.
//   * INC / DEC add / subtract one to the 8-bit first input, modulo 256.
// result holds the value right-aligned; ALU results are 8 bits except MUL (15).
module rmp_alu
  import rmp_pkg::*;
(
  input  opcode_e     op,
  input  logic [7:0]  a,        // first input, instruction bits 12..5
  input  logic [7:0]  b,        // second input, instruction bits 20..13
  input  logic [4:0]  divisor,  // DIV divisor, instruction bits 25..21
  output logic [14:0] result
);
  logic [15:0] square;
  assign square = 16'(a) * 16'(a);

  always_comb begin
    result = '0;
    unique case (op)
      OP_ADD:  result = 15'(8'(a + b));
      OP_SUB:  result = 15'(8'(a - b));
      OP_MUL:  result = square[14:0];
      OP_DIV:  result = (divisor == 5'd0) ? 15'h00ff : 15'(a / 8'(divisor));
      OP_AND:  result = 15'(8'(a & b));
      OP_OR:   result = 15'(8'(a | b));
      OP_NAND: result = 15'(8'(~(a & b)));
      OP_NOR:  result = 15'(8'(~(a | b)));
      OP_XOR:  result = 15'(8'(a ^ b));
      OP_XNOR: result = 15'(8'(~(a ^ b)));
      OP_NOTA: result = 15'(8'(~a));
      OP_NOTB: result = 15'(8'(~a));
      OP_INC:  result = 15'(8'(a + 8'd1));
      OP_DEC:  result = 15'(8'(a - 8'd1));
      default: result = '0;
    endcase
  end
endmodule
