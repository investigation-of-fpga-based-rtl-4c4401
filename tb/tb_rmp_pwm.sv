// tb_rmp_pwm: self-checking testbench for the PWM generator.
// Checks the triangle carrier cycle by cycle against 0..255..0 with a 512-clock
// period, pwm2 = not pwm1, and the high time over one period (2 * duty clocks)
// for several duty values, including 0 and 255.
module tb_rmp_pwm;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [7:0] duty_in = '0, carrier;
  logic       pwm1, pwm2;
  int checks = 0, failures = 0;
  int cyc = 0;   // clocks since reset release

  rmp_pwm dut (.clk, .rst_n, .load, .duty_in, .carrier, .pwm1, .pwm2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_model(int n);
    int m = n % 512;
    return (m < 256) ? m : 511 - m;
  endfunction

  localparam int DUTIES[6] = '{0, 1, 64, 128, 200, 255};

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      int high;
      high = 0;
      // load on the clock at which carrier restarts from 0
      while (cyc % 512 != 511) begin @(posedge clk); #1 cyc++; end
      load = 1'b1; duty_in = 8'(DUTIES[k]);
      @(posedge clk); #1 cyc++;
      load = 1'b0; duty_in = 8'($urandom);   // must be ignored now
      for (int n = 0; n < 512; n++) begin
        checks++;
        if (int'(carrier) != tri_model(cyc) || pwm2 !== ~pwm1) begin
          failures++;
          if (failures < 10) $display("FAIL cyc=%0d carrier=%0d", cyc, carrier);
        end
        high += int'(pwm1);
        @(posedge clk); #1 cyc++;
      end
      checks++;
      if (high != 2 * DUTIES[k]) begin
        failures++;
        $display("FAIL duty=%0d high=%0d", DUTIES[k], high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
