// tb_rmp_modulation: self-checking testbench for the modulation unit.
// Checks that each opcode reaches its own technique and no other: a PWM
// instruction sets the duty (high time over a carrier period), a PPM
// instruction sets pulse position and enable, SINE and COSINE set only their
// own amplitude, and PCM and QAM follow a and symbol. Expected values are
// worked out in the testbench.
module tb_rmp_modulation;
  import rmp_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0, en = 1'b0, ppm_en = 1'b0;
  opcode_e           op = OP_ADD;
  logic [7:0]        a = '0, pcm, sin_u, cos_u;
  logic [5:0]        symbol = '0;
  logic [4:0]        amp = '0;
  logic              pwm1, pwm2, ppm, pcm_bit, pcm_frame;
  logic signed [9:0] qam_re, qam_im;
  logic signed [7:0] sin_s, cos_s;
  int checks = 0, failures = 0;
  int cyc = 0;   // clock edges since reset release = PPM ramp value mod 256
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  rmp_modulation dut (.clk, .rst_n, .en, .op, .a, .ppm_en, .symbol, .amp, .pwm1, .pwm2, .ppm,
                      .pcm, .qam_re, .qam_im, .sin_s, .cos_s, .sin_u, .cos_u,
                      .pcm_bit, .pcm_frame);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic issue(opcode_e o, logic [7:0] av, logic pe, logic [5:0] sym, logic [4:0] am);
    op = o; a = av; ppm_en = pe; symbol = sym; amp = am; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0; a = 8'($urandom); amp = 5'($urandom); ppm_en = 1'($urandom);
  endtask

  initial begin
    int high, pulses, first;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // after reset: no PWM duty, PPM disabled
    high = 0; pulses = 0;
    for (int n = 0; n < 512; n++) begin
      high += int'(pwm1); pulses += int'(ppm); @(posedge clk); #1;
    end
    check("pwm high before load", high, 0);
    check("ppm pulses before load", pulses, 0);

    // PWM duty 100 -> 200 high clocks per 512; opcode with en low must not load
    issue(OP_PWM, 8'd100, 1'b0, 6'd0, 5'd0);
    op = OP_PWM; a = 8'd5; en = 1'b0;
    high = 0;
    for (int n = 0; n < 512; n++) begin high += int'(pwm1); @(posedge clk); #1; end
    check("pwm high", high, 200);
    check("pwm2 is not pwm1", int'(pwm2 ^ pwm1), 1);

    // PPM at position 40, enabled: 2 pulses in 512 clocks, 256 apart
    issue(OP_PPM, 8'd40, 1'b1, 6'd0, 5'd0);
    pulses = 0; first = -1;
    for (int n = 0; n < 512; n++) begin
      if (ppm) begin pulses++; if (first < 0) first = cyc % 256; end
      @(posedge clk); #1;
    end
    check("ppm pulses", pulses, 2);
    check("ppm position", first, 40);

    // a SINE instruction with amplitude 0 silences the sine only
    issue(OP_SIN, 8'd0, 1'b0, 6'd0, 5'd0);
    high = 0; pulses = 0;
    for (int n = 0; n < 256; n++) begin
      if (sin_s != 0) high++;
      if (cos_s == 8'sd127) pulses++;
      @(posedge clk); #1;
    end
    check("sine silent", high, 0);
    check("cosine peaks still at 127", pulses > 0 ? 1 : 0, 1);
    // COSINE amplitude 0; SINE back to 31
    issue(OP_COS, 8'd0, 1'b0, 6'd0, 5'd0);
    issue(OP_SIN, 8'd0, 1'b0, 6'd0, 5'd31);
    high = 0; pulses = 0;
    for (int n = 0; n < 256; n++) begin
      if (cos_s != 0) high++;
      if (sin_s == 8'sd127) pulses++;
      @(posedge clk); #1;
    end
    check("cosine silent", high, 0);
    check("sine reaches 127", pulses > 0 ? 1 : 0, 1);

    // PCM and QAM are combinational on the operand fields
    op = OP_PCM; a = 8'd64; #1;
    check("pcm quarter period", int'(pcm), 255);
    op = OP_QAM; symbol = 6'b111_000; #1;
    check("qam re", int'(qam_re), 448);
    check("qam im", int'(qam_im), -448);

    // the serial PCM stream runs: a frame marker every 8 clocks
    high = 0;
    for (int n = 0; n < 64; n++) begin high += int'(pcm_frame); @(posedge clk); #1; end
    check("pcm frames in 64 clocks", high, 8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
