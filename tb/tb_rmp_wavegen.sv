// tb_rmp_wavegen: self-checking testbench for the sine / cosine generator.
// Two instances, sine (phase 0) and cosine (phase 64), are checked cycle by
// cycle against trunc(round(127*sin(2*pi*(n+offset)/256)) * amp / 31) computed
// in the testbench, at the reset amplitude 31 and after loading amplitudes 16
// and 0. It also checks that the sine starts at 0 and the cosine at 127, and
// the unsigned output (signed + 128).
module tb_rmp_wavegen;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              load_s = 1'b0, load_c = 1'b0;
  logic [4:0]        amp_s = '0, amp_c = '0;
  logic [7:0]        ph_s, ph_c, u_s, u_c;
  logic signed [7:0] s_s, s_c;
  int checks = 0, failures = 0;
  int cyc = 0;
  int amp_sine = 31, amp_cos = 31;

  rmp_wavegen #(.PHASE(8'd0))  u_sin (.clk, .rst_n, .load(load_s), .amp_in(amp_s),
                                      .phase(ph_s), .sample(s_s), .sample_u(u_s));
  rmp_wavegen #(.PHASE(8'd64)) u_cos (.clk, .rst_n, .load(load_c), .amp_in(amp_c),
                                      .phase(ph_c), .sample(s_c), .sample_u(u_c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int n, int amp);
    real v;
    int  q, p;
    v = 127.0 * $sin(6.283185307179586 * (n % 256) / 256.0);
    q = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    p = q * amp;
    return (p >= 0) ? p / 31 : -((-p) / 31);
  endfunction

  task automatic check_now();
    checks++;
    if (int'(s_s) != model(cyc, amp_sine) || int'(s_c) != model(cyc + 64, amp_cos) ||
        int'(u_s) != int'(s_s) + 128 || int'(u_c) != int'(s_c) + 128 ||
        int'(ph_s) != cyc % 256) begin
      failures++;
      if (failures < 10)
        $display("FAIL cyc=%0d sin=%0d exp %0d cos=%0d exp %0d", cyc, s_s, model(cyc, amp_sine),
                 s_c, model(cyc + 64, amp_cos));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (s_s !== 8'sd0 || s_c !== 8'sd127) failures++;
    for (int n = 0; n < 300; n++) begin check_now(); @(posedge clk); #1 cyc++; end
    // load amplitude 16 on the sine, 0 on the cosine; the loading cycle already uses it
    load_s = 1'b1; amp_s = 5'd16; load_c = 1'b1; amp_c = 5'd0;
    amp_sine = 16; amp_cos = 0;
    #1 check_now();
    @(posedge clk); #1 cyc++;
    load_s = 1'b0; load_c = 1'b0; amp_s = 5'd3; amp_c = 5'd9;   // ignored
    for (int n = 0; n < 300; n++) begin check_now(); @(posedge clk); #1 cyc++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
