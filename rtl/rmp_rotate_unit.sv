// rmp_rotate_unit: 8-bit barrel rotator of the RMP.
//
// Rotates the 8-bit input by 0..7 places, left when dir = 1 and right when
// dir = 0, in one combinational pass through three mux stages (by 1, 2 and 4
// places) as a barrel shifter does. The instruction set uses distances 1..5,
// carried by the opcodes ROT1..ROT5; the direction bit is instruction bit 14.
// The document gives rotation by barrel shifting, the 1-bit direction and the
// 3-bit distance; which direction value means left is this design's choice.
module rmp_rotate_unit (
  input  logic [7:0] din,
  input  logic [2:0] amount,  // places to rotate
  input  logic       dir,     // 1 = left, 0 = right
  output logic [7:0] dout
);
  logic [7:0] s1, s2, s4;

  // A right rotation by n is a left rotation by 8 - n; build the left-rotation
  // barrel and feed it the equivalent distance.
  logic [2:0] left_n;
  assign left_n = dir ? amount : 3'(4'd8 - 4'(amount));

  assign s1   = left_n[0] ? {din[6:0], din[7]}   : din;
  assign s2   = left_n[1] ? {s1[5:0],  s1[7:6]}  : s1;
  assign s4   = left_n[2] ? {s2[3:0],  s2[7:4]}  : s2;
  assign dout = s4;
endmodule
