// rmp_qam: 64-QAM constellation mapper of the RMP modulation unit.
//
// Maps a 6-bit symbol to a constellation point in rectangular form. The three
// most significant bits choose the level of the cosine (in-phase, real) carrier
// and the three least significant bits that of the sine (quadrature,
// imaginary) carrier. Each 3-bit value k gives the level (2k - 7), one of
// -7,-5,-3,-1,1,3,5,7, scaled by 64 into a 10-bit two's-complement number
// (-448..448). Combinational. The document gives the 6-bit input, the MSB/LSB
// split between cosine and sine and the 10-bit real and imaginary outputs; the
// natural-binary level order and the scale of 64 are this design's choices.
module rmp_qam (
  input  logic [5:0]        symbol,
  output logic signed [9:0] re,
  output logic signed [9:0] im
);
  function automatic logic signed [9:0] level(logic [2:0] k);
    return 10'((2 * int'(k) - 7) * 64);
  endfunction

  assign re = level(symbol[5:3]);
  assign im = level(symbol[2:0]);
endmodule
