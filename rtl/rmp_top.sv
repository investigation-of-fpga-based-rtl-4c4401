// rmp_top: RISC-Modulation Processor (RMP).
//
// A 32-bit-instruction RISC processor whose execute stage holds, next to an
// 8-bit ALU, a universal shift register, a barrel rotator and a comparator, a
// modulation unit (PWM, PPM, PCM, 64-QAM, sine and cosine generation). Each of
// the 32 opcodes is one operation. Operands are immediates in the instruction;
// the result is written into the operation's output field of the instruction
// word, and bit 31 of the instruction chooses whether that result word is
// stored in the result memory (1) or the word stored by the last write of the
// same opcode is read back (0).
//
// Pipeline (one instruction per clock, no stalls):
//   IF  control unit presents the PC to the instruction memory, PC += 1
//   ID  the fetched word is decoded into a decoded_t and registered
//   EX  the unit for the opcode computes; the result word is registered
//   RW  the write / read request for the result memory is formed and registered
//   MA  the result memory is written or read
// Results of an instruction fetched in cycle t appear on ret_* in cycle t+5
// with ret_valid high: ret_word is the instruction word with its output field
// filled in, ret_value the unit's full result right-aligned, ret_rdata the
// word the memory access wrote or read.
//
// Program loading: write words through imem_we / imem_waddr / imem_wdata while
// idle, then pulse start with prog_len set; busy falls once the last
// instruction has left the MA stage. The continuously running modulation
// waveforms are on pwm1, pwm2, ppm, sin_wave and cos_wave, and a serial PCM
// stream of the sine on pcm_bit / pcm_frame.
//
// The units, opcode map, field positions and stage names follow the document;
// the result-word packing, the per-opcode result memory, ret_value and the
// program-loading handshake are this design's choices.
module rmp_top
  import rmp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned AW         = $clog2(IMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load port
  input  logic              imem_we,
  input  logic [AW-1:0]     imem_waddr,
  input  logic [31:0]       imem_wdata,
  // run control
  input  logic              start,
  input  logic [AW:0]       prog_len,
  output logic              busy,
  // retired instruction
  output logic              ret_valid,
  output logic [4:0]        ret_op,
  output logic              ret_rw,
  output logic [31:0]       ret_word,
  output logic [31:0]       ret_value,
  output logic [31:0]       ret_rdata,
  // modulation waveforms
  output logic              pwm1,
  output logic              pwm2,
  output logic              ppm,
  output logic signed [7:0] sin_wave,
  output logic signed [7:0] cos_wave,
  output logic [7:0]        sin_wave_u,   // unsigned (offset-binary) forms
  output logic [7:0]        cos_wave_u,
  output logic              pcm_bit,      // serial PCM stream of the sine
  output logic              pcm_frame     // high with the MSB of each PCM code
);
  // ---------------------------------------------------------------- control
  logic          fetch, v_id, v_ex, v_rw, v_ma, v_ret;
  logic [AW-1:0] pc;

  rmp_control #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .start, .prog_len, .fetch, .pc,
    .v_id, .v_ex, .v_rw, .v_ma, .v_ret, .busy
  );

  // --------------------------------------------------------------------- IF
  logic [31:0] instr;

  rmp_instr_mem #(.DEPTH(IMEM_DEPTH), .AW(AW)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .re(fetch), .raddr(pc), .rdata(instr)
  );

  // --------------------------------------------------------------------- ID
  decoded_t dec, ex_q;

  rmp_decode u_dec (.instr, .dec);

  always_ff @(posedge clk) begin
    if (v_id) ex_q <= dec;
  end

  // --------------------------------------------------------------------- EX
  logic [14:0]       alu_res;
  logic              su_sout;
  logic [7:0]        su_pout, su_state, ru_out;
  logic              cu_eq, cu_gt, cu_lt, cu_flag;
  logic              mu_pwm1, mu_pwm2, mu_ppm;
  logic [7:0]        mu_pcm;
  logic signed [9:0] mu_qre, mu_qim;
  logic signed [7:0] mu_sin, mu_cos;

  rmp_alu u_alu (.op(ex_q.op), .a(ex_q.a), .b(ex_q.b), .divisor(ex_q.divisor), .result(alu_res));

  rmp_shift_unit u_su (
    .clk, .rst_n, .en(v_ex && ex_q.unit == UNIT_SU), .op(ex_q.op),
    .ser_in(ex_q.ser_in), .pin(ex_q.a), .load_en(ex_q.load_en),
    .sout(su_sout), .pout(su_pout), .state(su_state)
  );

  rmp_rotate_unit u_ru (.din(ex_q.a), .amount(ex_q.rot_n), .dir(ex_q.dir), .dout(ru_out));

  rmp_comparator u_cu (
    .op(ex_q.op), .a(ex_q.a), .b(ex_q.b), .eq(cu_eq), .gt(cu_gt), .lt(cu_lt), .flag(cu_flag)
  );

  rmp_modulation u_mu (
    .clk, .rst_n, .en(v_ex && ex_q.unit == UNIT_MU), .op(ex_q.op),
    .a(ex_q.a), .ppm_en(ex_q.ppm_en), .symbol(ex_q.symbol), .amp(ex_q.amp),
    .pwm1(mu_pwm1), .pwm2(mu_pwm2), .ppm(mu_ppm), .pcm(mu_pcm),
    .qam_re(mu_qre), .qam_im(mu_qim), .sin_s(mu_sin), .cos_s(mu_cos),
    .sin_u(sin_wave_u), .cos_u(cos_wave_u),
    .pcm_bit, .pcm_frame
  );

  // Result word: the instruction with the operation's output field filled in.
  // ex_value: the unit's result right-aligned.
  logic [31:0] ex_word, ex_value;

  always_comb begin
    ex_word  = ex_q.word;
    ex_value = '0;
    unique case (ex_q.op)
      OP_MUL: begin ex_word[27:13] = alu_res;      ex_value = 32'(alu_res);      end
      OP_DIV: begin ex_word[28:26] = alu_res[2:0]; ex_value = 32'(alu_res[7:0]); end
      OP_INC, OP_DEC:
              begin ex_word[7]     = alu_res[0];   ex_value = 32'(alu_res[7:0]); end
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR, OP_XNOR, OP_NOTA, OP_NOTB:
              begin ex_word[28:21] = alu_res[7:0]; ex_value = 32'(alu_res[7:0]); end
      OP_SISO: begin ex_word[6]     = su_sout; ex_value = 32'(su_sout); end
      OP_SIPO: begin ex_word[13:6]  = su_pout; ex_value = 32'(su_pout); end
      OP_PISO: begin ex_word[15]    = su_sout; ex_value = 32'(su_sout); end
      OP_PIPO: begin ex_word[22:15] = su_pout; ex_value = 32'(su_pout); end
      OP_EQ, OP_GT, OP_LT:
               begin ex_word[28]    = cu_flag; ex_value = 32'(cu_flag); end
      OP_ROT1, OP_ROT2, OP_ROT3, OP_ROT4, OP_ROT5:
               begin ex_word[28:21] = ru_out;  ex_value = 32'(ru_out);  end
      OP_PWM:  begin ex_word[27] = mu_pwm1; ex_word[26] = mu_pwm2;
                     ex_value = {30'd0, mu_pwm1, mu_pwm2}; end
      OP_PPM:  begin ex_word[27]    = mu_ppm; ex_value = 32'(mu_ppm); end
      OP_PCM:  begin ex_word[27:20] = mu_pcm; ex_value = 32'(mu_pcm); end
      OP_QAM:  begin ex_word[27:18] = mu_qre; ex_word[17:8] = mu_qim;
                     ex_value = {12'd0, mu_qre, mu_qim}; end
      OP_COS:  begin ex_word[17:10] = mu_cos; ex_value = 32'(unsigned'(mu_cos)); end
      OP_SIN:  begin ex_word[17:10] = mu_sin; ex_value = 32'(unsigned'(mu_sin)); end
      default: ;
    endcase
  end

  typedef struct packed {
    logic        rw;
    opcode_e     op;
    logic [31:0] word;
    logic [31:0] value;
  } stage_t;

  stage_t rw_q, ma_q;

  always_ff @(posedge clk) begin
    if (v_ex) rw_q <= '{rw: ex_q.rw, op: ex_q.op, word: ex_word, value: ex_value};
  end

  // --------------------------------------------------------------------- RW
  // The read / write flag becomes the memory request of the MA stage.
  always_ff @(posedge clk) begin
    if (v_rw) ma_q <= rw_q;
  end

  // --------------------------------------------------------------------- MA
  rmp_result_mem u_rmem (
    .clk, .rst_n, .req(v_ma), .we(ma_q.rw), .addr(ma_q.op), .wdata(ma_q.word),
    .rdata(ret_rdata)
  );

  stage_t ret_q;
  always_ff @(posedge clk) begin
    if (v_ma) ret_q <= ma_q;
  end

  assign ret_valid = v_ret;
  assign ret_op    = ret_q.op;
  assign ret_rw    = ret_q.rw;
  assign ret_word  = ret_q.word;
  assign ret_value = ret_q.value;

  assign pwm1     = mu_pwm1;
  assign pwm2     = mu_pwm2;
  assign ppm      = mu_ppm;
  assign sin_wave = mu_sin;
  assign cos_wave = mu_cos;
endmodule
