// rmp_ppm: pulse position modulator of the RMP modulation unit.
//
// A free-running 8-bit ramp counts 0..255 (256 clocks per frame). While enabled,
// the modulator emits a one-clock pulse in every frame at the clock where the
// ramp equals the 8-bit modulating sample, so the pulse position within the
// frame follows the sample: a low sample gives an early pulse, a high one a
// late pulse. A PPM instruction loads the sample (instruction bits 12..5) and
// the enable (bit 20) with load high for one cycle; they apply from that cycle
// on. The document gives the 8-bit resolution, the enable and a position set by
// the modulating level; the ramp carrier and one-clock pulses are this design's
// choices.
module rmp_ppm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       en_in,
  input  logic [7:0] pos_in,   // modulating sample
  output logic [7:0] ramp,
  output logic       ppm
);
  logic [7:0] ramp_q, pos_q, pos_eff;
  logic       en_q, en_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp_q <= '0;
      pos_q  <= '0;
      en_q   <= 1'b0;
    end else begin
      ramp_q <= ramp_q + 8'd1;
      if (load) begin
        pos_q <= pos_in;
        en_q  <= en_in;
      end
    end
  end

  assign pos_eff = load ? pos_in : pos_q;
  assign en_eff  = load ? en_in  : en_q;
  assign ramp    = ramp_q;
  assign ppm     = en_eff && (ramp_q == pos_eff);
endmodule
