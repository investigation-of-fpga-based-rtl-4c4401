// tb_rmp_pcm_stream: self-checking testbench for the serial PCM transmitter.
// Collects 300 frames from pcm_bit, MSB first, starting at each frame marker,
// and checks that frame k carries 128 + round(127*sin(2*pi*k/256)), that the
// marker comes every 8 clocks, and that the parallel code output agrees.
module tb_rmp_pcm_stream;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       pcm_bit, frame;
  logic [7:0] code;
  int checks = 0, failures = 0;

  rmp_pcm_stream dut (.clk, .rst_n, .pcm_bit, .frame, .code);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int code_model(int n);
    real v;
    v = 127.0 * $sin(6.283185307179586 * (n % 256) / 256.0);
    return 128 + ((v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5)));
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      logic [7:0] got;
      checks++;
      if (!frame) begin failures++; $display("FAIL no frame marker at frame %0d", k); end
      for (int i = 7; i >= 0; i--) begin
        got[i] = pcm_bit;
        if (i != 7 && frame) begin failures++; $display("FAIL extra frame marker"); end
        if (code !== 8'(code_model(k))) failures++;
        @(posedge clk); #1;
      end
      checks++;
      if (int'(got) != code_model(k)) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d got %0d exp %0d", k, got, code_model(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
