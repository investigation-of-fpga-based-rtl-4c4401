// rmp_sine_lut: 256-entry sine table, 8-bit signed samples.
//
// Entry i holds round(127 * sin(2*pi*i/256)), so one period is 256 phase steps
// and the amplitude spans -127..127, the signed range the document gives for its
// 2^8-resolution waves. The table is computed at elaboration from that formula
// (rmp_pkg::sine_entry) and read combinationally: idx in, sample out in the same
// cycle. A 256-step period is this design's choice; the document gives only the
// 8-bit resolution.
module rmp_sine_lut (
  input  logic [7:0]        idx,     // phase, 0..255 = one period
  output logic signed [7:0] sample   // sine value, -127..127
);
  import rmp_pkg::*;

  function automatic logic [255:0][7:0] build_table();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = sine_entry(i);
    return t;
  endfunction

  localparam logic [255:0][7:0] TABLE = build_table();

  assign sample = signed'(TABLE[idx]);
endmodule
