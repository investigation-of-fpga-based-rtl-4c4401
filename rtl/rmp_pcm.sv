// rmp_pcm: pulse code modulator of the RMP modulation unit.
//
// Samples a sine wave and quantizes it to an 8-bit code. The 8-bit input is the
// sample number along the time axis (256 samples per period); the output is the
// sine value at that point quantized to 8 bits and coded offset-binary,
// code = 128 + round(127 * sin(2*pi*n/256)), range 1..255. Combinational; the
// sine comes from the shared sine table (rmp_sine_lut). The document gives
// 8-bit sampling and 8-bit quantization of a sine wave produced by the sine
// generator; treating the input as the sample number and the offset-binary
// code are this design's choices.
module rmp_pcm (
  input  logic [7:0] sample_no,
  output logic [7:0] code
);
  logic signed [7:0] s;

  rmp_sine_lut u_lut (.idx(sample_no), .sample(s));

  assign code = 8'(s) + 8'd128;
endmodule
