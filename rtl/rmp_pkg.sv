// rmp_pkg: types and constants shared by the RISC-Modulation Processor (RMP).
//
// The RMP executes 32 operations, one per 5-bit opcode. Every instruction is a
// 32-bit word whose bits [4:0] are the opcode and whose bit 31 selects whether
// the result is written to (1) or the previous result read from (0) the result
// memory. The remaining fields are immediate operands and an output field whose
// position depends on the operation. The opcode table and all field positions
// follow the document; the unit grouping enum and the decoded-instruction struct
// are this design's own.
package rmp_pkg;


  // Opcode map (opcode bits [4:0]).
  typedef enum logic [4:0] {
    OP_ADD  = 5'b00000, OP_SUB  = 5'b00001, OP_MUL  = 5'b00010, OP_DIV  = 5'b00011,
    OP_AND  = 5'b00100, OP_OR   = 5'b00101, OP_NAND = 5'b00110, OP_NOR  = 5'b00111,
    OP_XOR  = 5'b01000, OP_XNOR = 5'b01001, OP_NOTA = 5'b01010, OP_NOTB = 5'b01011,
    OP_SISO = 5'b01100, OP_SIPO = 5'b01101, OP_PISO = 5'b01110, OP_PIPO = 5'b01111,
    OP_EQ   = 5'b10000, OP_GT   = 5'b10001, OP_LT   = 5'b10010, OP_ROT1 = 5'b10011,
    OP_ROT2 = 5'b10100, OP_ROT3 = 5'b10101, OP_ROT4 = 5'b10110, OP_ROT5 = 5'b10111,
    OP_INC  = 5'b11000, OP_DEC  = 5'b11001, OP_PWM  = 5'b11010, OP_PCM  = 5'b11011,
    OP_QAM  = 5'b11100, OP_PPM  = 5'b11101, OP_COS  = 5'b11110, OP_SIN  = 5'b11111
  } opcode_e;

  // Execution unit that carries out an opcode.
  typedef enum logic [2:0] {
    UNIT_ALU = 3'd0,  // arithmetic and logic unit
    UNIT_SU  = 3'd1,  // shift register unit
    UNIT_RU  = 3'd2,  // rotation unit
    UNIT_CU  = 3'd3,  // comparator unit
    UNIT_MU  = 3'd4   // modulation unit
  } unit_e;

  // Instruction after decode: every operand field the tables define, extracted
  // from its fixed bit position. Which of them an operation uses depends on op.
  typedef struct packed {
    logic        rw;       // [31]    1 = write result, 0 = read previous result
    opcode_e     op;       // [4:0]
    unit_e       unit;     // derived from op
    logic [7:0]  a;        // [12:5]  first input
    logic [7:0]  b;        // [20:13] second input
    logic [4:0]  divisor;  // [25:21] divisor of DIV
    logic        ser_in;   // [5]     serial input of SISO / SIPO, 1-bit input of INC / DEC
    logic        load_en;  // [16]    load enable of PISO
    logic        dir;      // [14]    rotation direction, 1 = left
    logic [2:0]  rot_n;    // rotation distance 1..5, from the opcode
    logic        ppm_en;   // [20]    PPM enable
    logic [5:0]  symbol;   // [10:5]  QAM symbol
    logic [4:0]  amp;      // [9:5]   sine / cosine amplitude
    logic [31:0] word;     // the raw instruction word
  } decoded_t;

  // Unit that executes a given opcode.
  function automatic unit_e unit_of(opcode_e op);
    unique case (op)
      OP_SISO, OP_SIPO, OP_PISO, OP_PIPO:               return UNIT_SU;
      OP_EQ, OP_GT, OP_LT:                              return UNIT_CU;
      OP_ROT1, OP_ROT2, OP_ROT3, OP_ROT4, OP_ROT5:      return UNIT_RU;
      OP_PWM, OP_PCM, OP_QAM, OP_PPM, OP_COS, OP_SIN:   return UNIT_MU;
      default:                                          return UNIT_ALU;
    endcase
  endfunction

  // Signed 8-bit sine table entry: round(127 * sin(2*pi*i/256)).
  function automatic logic signed [7:0] sine_entry(int unsigned i);
    real v;
    v = 127.0 * $sin(2.0 * 3.14159265358979323846 * real'(i) / 256.0);
    return 8'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

endpackage
