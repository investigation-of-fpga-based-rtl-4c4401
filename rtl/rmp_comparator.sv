// rmp_comparator: 8-bit magnitude comparator of the RMP.
//
// Combinational. Compares the unsigned first input a (bits 12..5) with the
// second input b (bits 20..13) and reports the flag the opcode asks for:
// EQUAL (a == b), GREATER (a > b) or LESSER (a < b). All three flags are also
// brought out. Unsigned comparison and "first against second" as the order are
// this design's choices; the document names only the three conditions.
module rmp_comparator
  import rmp_pkg::*;
(
  input  opcode_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic       eq,
  output logic       gt,
  output logic       lt,
  output logic       flag   // the flag selected by op
);
  assign eq = (a == b);
  assign gt = (a > b);
  assign lt = (a < b);

  always_comb begin
    unique case (op)
      OP_EQ:   flag = eq;
      OP_GT:   flag = gt;
      OP_LT:   flag = lt;
      default: flag = 1'b0;
    endcase
  end
endmodule
