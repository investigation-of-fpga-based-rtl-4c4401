// rmp_decode: instruction decode (ID) of the RMP.
//
// Combinational. Splits a 32-bit instruction into the fields of the
// instruction formats: opcode in bits 4..0, the read / write flag in bit 31,
// the first input in 12..5, the second input in 20..13, the DIV divisor in
// 25..21, the serial / 1-bit input in bit 5, the PISO load enable in bit 16,
// the rotation direction in bit 14, the PPM enable in bit 20, the QAM symbol
// in 10..5 and the sine / cosine amplitude in 9..5. Fields overlap; the
// opcode decides which are meaningful. The unit is derived from the opcode,
// and the rotation distance 1..5 from the opcodes ROT1..ROT5. All bit
// positions follow the document's instruction formats; extracting every field
// for every opcode into one struct is this design's choice.
module rmp_decode
  import rmp_pkg::*;
(
  input  logic [31:0] instr,
  output decoded_t    dec
);
  opcode_e op;
  assign op = opcode_e'(instr[4:0]);

  always_comb begin
    dec.rw      = instr[31];
    dec.op      = op;
    dec.unit    = unit_of(op);
    dec.a       = instr[12:5];
    dec.b       = instr[20:13];
    dec.divisor = instr[25:21];
    dec.ser_in  = instr[5];
    dec.load_en = instr[16];
    dec.dir     = instr[14];
    dec.rot_n   = (dec.unit == UNIT_RU) ? 3'(instr[4:0] - 5'b10010) : 3'd0;
    dec.ppm_en  = instr[20];
    dec.symbol  = instr[10:5];
    dec.amp     = instr[9:5];
    dec.word    = instr;
  end
endmodule
