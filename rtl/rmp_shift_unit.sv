// rmp_shift_unit: universal 8-bit shift register of the RMP.
//
// One 8-bit register serves all four shift-register operations, chosen by the
// opcode; it changes only on a clock edge where en is high (an SU instruction
// in the execute stage), so each instruction is one shift or load step:
//   SISO  shift left, ser_in enters at bit 0; serial out = new bit 7
//   SIPO  shift left, ser_in enters at bit 0; parallel out = new register
//   PISO  load_en = 1 loads pin, load_en = 0 shifts left filling 0;
//         serial out = new bit 7, so pin leaves MSB first
//   PIPO  load pin; parallel out = new register
// sout and pout show the register value the step produces (combinational from
// the current register and the inputs), so the execute stage can capture them
// in the same cycle. The document gives the four modes, the shared hardware,
// the 1-bit / 8-bit inputs and the PISO load enable; shift direction, MSB-first
// order and the reset value 0 are this design's choices.
module rmp_shift_unit
  import rmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,       // perform one step this cycle
  input  opcode_e    op,
  input  logic       ser_in,   // instruction bit 5
  input  logic [7:0] pin,      // instruction bits 12..5
  input  logic       load_en,  // instruction bit 16 (PISO)
  output logic       sout,
  output logic [7:0] pout,
  output logic [7:0] state     // register contents before this step
);
  logic [7:0] sr_q, sr_d;

  always_comb begin
    sr_d = sr_q;
    unique case (op)
      OP_SISO, OP_SIPO: sr_d = {sr_q[6:0], ser_in};
      OP_PISO:          sr_d = load_en ? pin : {sr_q[6:0], 1'b0};
      OP_PIPO:          sr_d = pin;
      default:          sr_d = sr_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sr_q <= '0;
    else if (en) sr_q <= sr_d;
  end

  assign sout  = sr_d[7];
  assign pout  = sr_d;
  assign state = sr_q;
endmodule
