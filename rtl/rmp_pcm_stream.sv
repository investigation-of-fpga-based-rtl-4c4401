// rmp_pcm_stream: serial PCM transmitter of the RMP modulation unit.
//
// Turns the sine wave into a continuous PCM bit stream. A sample counter n
// advances once per 8-clock frame; at the first clock of each frame the sine
// at n is sampled and quantized to the 8-bit offset-binary code
// 128 + round(127 * sin(2*pi*n/256)) (the same code as rmp_pcm), and the code
// is sent MSB first, one bit per clock, on pcm_bit. frame is high on the clock
// that carries the MSB. One sine period therefore takes 256 frames = 2048
// clocks. The document describes sampling and quantizing a sine wave to
// "generate the stream of bits" at 8-bit resolution; frame length, bit order
// and the frame marker are this design's choices.
module rmp_pcm_stream (
  input  logic       clk,
  input  logic       rst_n,
  output logic       pcm_bit,
  output logic       frame,     // high with the MSB of each code
  output logic [7:0] code       // code being sent
);
  logic [7:0] n_q;        // sample number
  logic [2:0] bit_q;      // bit position in the frame, 0 = MSB
  logic [7:0] shift_q, code_q, next_code;

  rmp_pcm u_pcm (.sample_no(n_q), .code(next_code));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q     <= '0;
      bit_q   <= '0;
      shift_q <= '0;
      code_q  <= '0;
    end else begin
      bit_q <= bit_q + 3'd1;
      if (bit_q == 3'd7) n_q <= n_q + 8'd1;
      if (bit_q == 3'd0) begin
        code_q  <= next_code;
        shift_q <= {next_code[6:0], 1'b0};
      end else begin
        shift_q <= {shift_q[6:0], 1'b0};
      end
    end
  end

  // the MSB goes out in the sampling clock itself, the others from shift_q
  assign pcm_bit = (bit_q == 3'd0) ? next_code[7] : shift_q[7];
  assign frame   = (bit_q == 3'd0);
  assign code    = (bit_q == 3'd0) ? next_code : code_q;
endmodule
