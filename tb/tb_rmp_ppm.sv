// tb_rmp_ppm: self-checking testbench for the PPM generator.
// For several samples, checks that exactly one pulse falls in each 256-clock
// frame, at the clock where the ramp equals the sample, that the spacing of
// pulses is one frame, and that no pulse appears while disabled.
module tb_rmp_ppm;
  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0, en_in = 1'b0;
  logic [7:0] pos_in = '0, ramp;
  logic       ppm;
  int checks = 0, failures = 0;
  int cyc = 0;

  rmp_ppm dut (.clk, .rst_n, .load, .en_in, .pos_in, .ramp, .ppm);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int POS[5] = '{0, 17, 100, 200, 255};

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      int pulses, first, last, p;
      logic enable;
      pulses = 0; first = -1; last = -1;
      enable = (k < 5);
      p = (k < 5) ? POS[k] : 50;
      while (cyc % 256 != 255) begin @(posedge clk); #1 cyc++; end
      load = 1'b1; en_in = enable; pos_in = 8'(p);
      @(posedge clk); #1 cyc++;
      load = 1'b0; pos_in = 8'($urandom); en_in = 1'($urandom);
      for (int n = 0; n < 512; n++) begin
        checks++;
        if (int'(ramp) != cyc % 256) failures++;
        if (ppm) begin
          pulses++;
          if (first < 0) first = n;
          last = n;
        end
        @(posedge clk); #1 cyc++;
      end
      checks++;
      if (enable ? (pulses != 2 || first != p || last - first != 256) : (pulses != 0)) begin
        failures++;
        $display("FAIL pos=%0d en=%0d pulses=%0d first=%0d last=%0d", p, enable, pulses, first, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
