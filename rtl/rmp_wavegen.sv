// rmp_wavegen: sine or cosine wave generator of the RMP modulation unit.
//
// A free-running 8-bit phase counter advances one step per clock (256 clocks
// per period) and addresses the shared sine table. PHASE adds a fixed offset:
// 0 gives a sine that starts at 0 after reset, 64 (a quarter period, 90
// degrees) gives the cosine. The table value is scaled by a 5-bit amplitude
// 0..31: sample = trunc(table * amp / 31), so amplitude 31 gives the full
// -127..127 signed range; sample_u = sample + 128 is the unsigned form. A
// SINE / COSINE instruction loads the amplitude (load high one cycle), which
// applies from that cycle on. The document gives 8-bit resolution, the 5-bit
// amplitude input, both signed and unsigned ranges, and the 90-degree relation
// of the cosine to the sine; the step rate and the scaling formula are this
// design's choices.
module rmp_wavegen #(
  parameter logic [7:0] PHASE = 8'd0   // phase offset in 1/256 periods
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [4:0]        amp_in,
  output logic [7:0]        phase,     // current phase before the offset
  output logic signed [7:0] sample,    // signed sample
  output logic [7:0]        sample_u   // unsigned sample
);
  logic [7:0]         phase_q;
  logic [4:0]         amp_q, amp_eff;
  logic signed [7:0]  s;
  logic signed [13:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      amp_q   <= 5'd31;
    end else begin
      phase_q <= phase_q + 8'd1;
      if (load) amp_q <= amp_in;
    end
  end

  rmp_sine_lut u_lut (.idx(8'(phase_q + PHASE)), .sample(s));

  assign amp_eff  = load ? amp_in : amp_q;
  assign prod     = 14'(s) * signed'({9'd0, amp_eff});
  assign sample   = 8'(prod / 14'sd31);
  assign sample_u = 8'(sample) + 8'd128;
  assign phase    = phase_q;
endmodule
