// rmp_modulation: modulation unit (MU) of the RMP.
//
// Groups the six modulation techniques, each with its own inputs (the unit has
// no shared operand): PWM, PPM, PCM, 64-QAM and sine and cosine generation.
// Besides the PCM instruction path it runs a serial PCM transmitter of the
// sine (rmp_pcm_stream).
// When en is high (an MU instruction in the execute stage) the opcode picks the
// technique whose setting the instruction loads: PWM takes the duty from a,
// PPM the sample from a and the enable from ppm_en, SINE / COSINE the
// amplitude from amp. PCM and QAM are combinational on a and symbol. The
// PWM, PPM and wave generators run continuously, so their outputs are
// waveforms on the unit's ports as well as values an instruction samples.
// Interface timing: all outputs are valid in the cycle en is high, already
// reflecting that instruction's setting. The grouping and the separation of
// settings follow the document; the load-on-opcode scheme is this design's.
module rmp_modulation
  import rmp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  opcode_e           op,
  input  logic [7:0]        a,        // bits 12..5: PWM duty, PPM sample, PCM sample number
  input  logic              ppm_en,   // bit 20
  input  logic [5:0]        symbol,   // bits 10..5: QAM symbol
  input  logic [4:0]        amp,      // bits 9..5: sine / cosine amplitude
  output logic              pwm1,
  output logic              pwm2,
  output logic              ppm,
  output logic [7:0]        pcm,
  output logic signed [9:0] qam_re,
  output logic signed [9:0] qam_im,
  output logic signed [7:0] sin_s,
  output logic signed [7:0] cos_s,
  output logic [7:0]        sin_u,    // unsigned forms of sin_s / cos_s
  output logic [7:0]        cos_u,
  output logic              pcm_bit,  // serial PCM stream of the sine
  output logic              pcm_frame // high with the MSB of each PCM code
);
  logic [7:0] pwm_carrier, ppm_ramp, sin_phase, cos_phase;

  rmp_pwm u_pwm (
    .clk, .rst_n, .load(en && op == OP_PWM), .duty_in(a),
    .carrier(pwm_carrier), .pwm1, .pwm2
  );

  rmp_ppm u_ppm (
    .clk, .rst_n, .load(en && op == OP_PPM), .en_in(ppm_en), .pos_in(a),
    .ramp(ppm_ramp), .ppm
  );

  rmp_pcm u_pcm (.sample_no(a), .code(pcm));

  logic [7:0] pcm_code;
  rmp_pcm_stream u_pcm_stream (.clk, .rst_n, .pcm_bit, .frame(pcm_frame), .code(pcm_code));

  rmp_qam u_qam (.symbol, .re(qam_re), .im(qam_im));

  rmp_wavegen #(.PHASE(8'd0)) u_sin (
    .clk, .rst_n, .load(en && op == OP_SIN), .amp_in(amp),
    .phase(sin_phase), .sample(sin_s), .sample_u(sin_u)
  );

  rmp_wavegen #(.PHASE(8'd64)) u_cos (
    .clk, .rst_n, .load(en && op == OP_COS), .amp_in(amp),
    .phase(cos_phase), .sample(cos_s), .sample_u(cos_u)
  );
endmodule
