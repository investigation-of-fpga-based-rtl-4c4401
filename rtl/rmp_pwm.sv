// rmp_pwm: pulse width modulator of the RMP modulation unit.
//
// A free-running 9-bit counter forms an 8-bit triangle carrier that rises
// 0..255 and falls 255..0 (512 clocks per period, every level held twice). The
// 8-bit duty value is compared with the carrier: pwm1 = (duty > carrier), and
// pwm2 is its complement. A duty of d therefore gives a high time of 2*d clocks
// per 512, a duty cycle of d/256. A PWM instruction loads a new duty (load
// high for one cycle); the outputs use the new value in that same cycle and
// hold it afterwards. The document gives the triangle carrier with peak 255,
// the comparison with the duty value and the two outputs PWM1 / PWM2; the
// period, the "greater than" test and pwm2 as the complement are this
// design's choices.
module rmp_pwm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,      // take duty_in
  input  logic [7:0] duty_in,
  output logic [7:0] carrier,   // triangle carrier, 0..255
  output logic       pwm1,
  output logic       pwm2
);
  logic [8:0] cnt_q;
  logic [7:0] duty_q, duty_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      duty_q <= '0;
    end else begin
      cnt_q <= cnt_q + 9'd1;
      if (load) duty_q <= duty_in;
    end
  end

  assign carrier  = cnt_q[8] ? ~cnt_q[7:0] : cnt_q[7:0];
  assign duty_eff = load ? duty_in : duty_q;
  assign pwm1     = (duty_eff > carrier);
  assign pwm2     = ~pwm1;
endmodule
