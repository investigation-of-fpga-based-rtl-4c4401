// tb_rmp_top: end-to-end testbench for the RISC-Modulation Processor.
//
// Loads programs into the instruction memory, runs them and checks every
// retired instruction against a model kept in the testbench: the result word
// (instruction with its output field filled in), the unit's full result, the
// word the result memory wrote or read back, and the retire cycle (first
// result 5 clocks after the first fetch, then one per clock). The model keeps
// its own shift register, result memory, and the free-running PWM, PPM and
// sine / cosine counters, which it derives from the cycle count since reset.
//
// Three programs run at the default parameters: 256 random instructions that
// use all 32 opcodes, a program that reads back earlier results, and a short
// program with the PWM / PPM instructions timed so that their sampled outputs
// are both 0 and 1. Mechanisms counted, each of which must occur: every
// opcode, write and read, a read returning an earlier non-zero result, PISO
// load and shift, left and right rotation, comparator true and false, PWM
// output 1 and 0, a PPM pulse, a serial PCM frame (the stream is checked bit by
// bit throughout), and a full pipeline (five instructions in flight, seen as an on-time
// retirement with four instructions behind it).
module tb_rmp_top;
  import rmp_pkg::*;

  localparam int DEPTH = 256;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              imem_we = 1'b0, start = 1'b0;
  logic [7:0]        imem_waddr = '0;
  logic [31:0]       imem_wdata = '0;
  logic [8:0]        prog_len = '0;
  logic              busy, ret_valid, ret_rw, pwm1, pwm2, ppm, pcm_bit, pcm_frame;
  logic [4:0]        ret_op;
  logic [31:0]       ret_word, ret_value, ret_rdata;
  logic signed [7:0] sin_wave, cos_wave;
  logic [7:0]        sin_wave_u, cos_wave_u;

  rmp_top dut (
    .clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata, .start, .prog_len, .busy,
    .ret_valid, .ret_op, .ret_rw, .ret_word, .ret_value, .ret_rdata,
    .pwm1, .pwm2, .ppm, .sin_wave, .cos_wave, .sin_wave_u, .cos_wave_u, .pcm_bit, .pcm_frame
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;                       // clock edges since reset release
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ model
  logic [31:0] prog [DEPTH];
  logic [31:0] mem_model [32];
  logic [7:0]  sr_model;
  logic [7:0]  duty_model, ppm_pos_model;
  logic        ppm_en_model;
  int          amp_sin_model, amp_cos_model;

  // mechanism counters
  int op_seen [32];
  int n_write, n_read, n_read_nonzero, n_piso_load, n_piso_shift, n_rot_left, n_rot_right;
  int n_cmp_true, n_cmp_false, n_pwm_hi, n_pwm_lo, n_ppm_pulse, n_pipe_full;
  int n_pcm_frames = 0;

  function automatic int sine_model(int n);
    real v;
    v = 127.0 * $sin(6.283185307179586 * (n % 256) / 256.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int scaled(int s, int amp);
    int p = s * amp;
    return (p >= 0) ? p / 31 : -((-p) / 31);
  endfunction

  function automatic int tri_model(int n);
    int m = n % 512;
    return (m < 256) ? m : 511 - m;
  endfunction

  function automatic logic [7:0] rot_model(logic [7:0] x, int n, logic left);
    logic [7:0] y;
    for (int i = 0; i < 8; i++)
      if (left) y[(i + n) % 8] = x[i];
      else      y[i] = x[(i + n) % 8];
    return y;
  endfunction

  // Expected result word and value of instruction w executed at cycle c.
  // Updates the model state the instruction changes.
  task automatic model_exec(input logic [31:0] w, input int c,
                            output logic [31:0] word, output logic [31:0] value);
    int op = int'(w[4:0]);
    int a = int'(w[12:5]), b = int'(w[20:13]), d = int'(w[25:21]);
    int r;
    logic bitv;
    word = w;
    value = '0;
    case (op)
      0, 1, 4, 5, 6, 7, 8, 9, 10, 11: begin
        case (op)
          0: r = (a + b) % 256;      1: r = (a - b + 256) % 256;
          4: r = a & b;              5: r = a | b;
          6: r = 255 - (a & b);      7: r = 255 - (a | b);
          8: r = a ^ b;              9: r = 255 - (a ^ b);
          default: r = 255 - a;
        endcase
        word[28:21] = 8'(r); value = 32'(r);
      end
      2: begin r = (a * a) % 32768; word[27:13] = 15'(r); value = 32'(r); end
      3: begin r = (d == 0) ? 255 : a / d; word[28:26] = 3'(r); value = 32'(r); end
      24, 25: begin
        r = (op == 24) ? (a + 1) % 256 : (a + 255) % 256;
        word[7] = 1'(r); value = 32'(r);
      end
      12, 13: begin
        sr_model = {sr_model[6:0], w[5]};
        if (op == 12) begin word[6] = sr_model[7]; value = 32'(sr_model[7]); end
        else          begin word[13:6] = sr_model; value = 32'(sr_model); end
      end
      14: begin
        if (w[16]) begin sr_model = w[12:5]; n_piso_load++; end
        else       begin sr_model = {sr_model[6:0], 1'b0}; n_piso_shift++; end
        word[15] = sr_model[7]; value = 32'(sr_model[7]);
      end
      15: begin sr_model = w[12:5]; word[22:15] = sr_model; value = 32'(sr_model); end
      16, 17, 18: begin
        bitv = (op == 16) ? (a == b) : (op == 17) ? (a > b) : (a < b);
        if (bitv) n_cmp_true++; else n_cmp_false++;
        word[28] = bitv; value = 32'(bitv);
      end
      19, 20, 21, 22, 23: begin
        r = int'(rot_model(w[12:5], op - 18, w[14]));
        if (w[14]) n_rot_left++; else n_rot_right++;
        word[28:21] = 8'(r); value = 32'(r);
      end
      26: begin  // PWM
        duty_model = w[12:5];
        bitv = (int'(duty_model) > tri_model(c));
        if (bitv) n_pwm_hi++; else n_pwm_lo++;
        word[27] = bitv; word[26] = ~bitv; value = {30'd0, bitv, ~bitv};
      end
      27: begin  // PCM
        r = 128 + sine_model(a);
        word[27:20] = 8'(r); value = 32'(r);
      end
      28: begin  // QAM
        int re = (2 * int'(w[10:8]) - 7) * 64, im = (2 * int'(w[7:5]) - 7) * 64;
        word[27:18] = 10'(re); word[17:8] = 10'(im); value = {12'd0, 10'(re), 10'(im)};
      end
      29: begin  // PPM
        ppm_pos_model = w[12:5]; ppm_en_model = w[20];
        bitv = ppm_en_model && (c % 256 == int'(ppm_pos_model));
        if (bitv) n_ppm_pulse++;
        word[27] = bitv; value = 32'(bitv);
      end
      30: begin amp_cos_model = int'(w[9:5]);
        r = scaled(sine_model(c + 64), amp_cos_model);
        word[17:10] = 8'(r); value = {24'd0, 8'(r)}; end
      31: begin amp_sin_model = int'(w[9:5]);
        r = scaled(sine_model(c), amp_sin_model);
        word[17:10] = 8'(r); value = {24'd0, 8'(r)}; end
      default: ;
    endcase
  endtask

  // The serial PCM stream: in the clock after c edges it carries bit 7 - c%8
  // of the code for sample c/8. Checked every clock while the programs run.
  initial begin : pcm_stream_monitor
    logic [7:0] exp_code;
    @(posedge rst_n);
    forever begin
      #1;
      exp_code = 8'(128 + sine_model(cyc / 8));
      checks++;
      if (pcm_bit !== exp_code[7 - cyc % 8] || pcm_frame !== (cyc % 8 == 0)) begin
        failures++;
        if (failures < 20) $display("FAIL pcm stream at cyc %0d", cyc);
      end
      if (pcm_frame) n_pcm_frames++;
      @(posedge clk);
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h @cyc %0d", what, got, exp, cyc);
    end
  endtask

  // Load prog[0..len-1], run it, check every retired instruction.
  // pwm_ppm_at: if >= 0, instructions flagged 29 (PPM) get their position set
  // to the ramp value of their own execute cycle.
  task automatic run_program(int len);
    int c0, retired;
    logic [31:0] exp_word, exp_value, exp_rdata;
    for (int i = 0; i < len; i++) begin
      imem_we = 1'b1; imem_waddr = 8'(i); imem_wdata = prog[i];
      @(posedge clk); #1;
    end
    imem_we = 1'b0;
    prog_len = 9'(len);
    start = 1'b1;
    c0 = cyc;
    @(posedge clk); #1;
    start = 1'b0;
    retired = 0;
    // instruction i executes at cycle c0 + 3 + i and retires at c0 + 6 + i
    while (retired < len) begin
      if (ret_valid) begin
        check("retire cycle", 32'(cyc), 32'(c0 + 6 + retired));
        // retiring on time with four more instructions behind it means all
        // five stages are occupied in this cycle
        if (cyc == c0 + 6 + retired && retired + 4 < len) n_pipe_full++;
        model_exec(prog[retired], c0 + 3 + retired, exp_word, exp_value);
        op_seen[prog[retired][4:0]]++;
        if (prog[retired][31]) begin
          mem_model[prog[retired][4:0]] = exp_word;
          exp_rdata = exp_word;
          n_write++;
        end else begin
          exp_rdata = mem_model[prog[retired][4:0]];
          n_read++;
          if (exp_rdata != 0) n_read_nonzero++;
        end
        check("ret_op", 32'(ret_op), 32'(prog[retired][4:0]));
        check("ret_rw", 32'(ret_rw), 32'(prog[retired][31]));
        check("ret_word", ret_word, exp_word);
        check("ret_value", ret_value, exp_value);
        check("ret_rdata", ret_rdata, exp_rdata);
        retired++;
      end
      if (cyc > c0 + len + 20) begin
        failures++;
        $display("FAIL program did not complete");
        break;
      end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    check("idle after program", 32'(busy), 32'(0));
  endtask

  function automatic logic [31:0] rand_instr(int op);
    logic [31:0] w = $urandom;
    w[4:0] = 5'(op);
    return w;
  endfunction

  initial begin
    int c_ex;
    for (int i = 0; i < 32; i++) begin mem_model[i] = '0; op_seen[i] = 0; end
    sr_model = '0; duty_model = '0; ppm_pos_model = '0; ppm_en_model = 1'b0;
    amp_sin_model = 31; amp_cos_model = 31;
    {n_write, n_read, n_read_nonzero, n_piso_load, n_piso_shift, n_rot_left, n_rot_right} = '0;
    {n_cmp_true, n_cmp_false, n_pwm_hi, n_pwm_lo, n_ppm_pulse, n_pipe_full} = '0;

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // program 1: 256 random instructions, every opcode at least 8 times,
    // comparator operands equal now and then
    for (int i = 0; i < DEPTH; i++) begin
      prog[i] = rand_instr(i % 32);
      if (i % 7 == 0) prog[i][20:13] = prog[i][12:5];
    end
    run_program(DEPTH);

    // program 2: read back every opcode's last written result
    for (int i = 0; i < 32; i++) begin
      prog[i] = rand_instr(i);
      prog[i][31] = 1'b0;
    end
    run_program(32);

    // program 3: PWM / PPM samples timed against the carriers.
    // Instruction i executes at cycle c_ex + i, where c_ex is known before start.
    c_ex = cyc + 4 + 3;   // 4 load cycles, then start + 3 cycles to EX
    for (int i = 0; i < 4; i++) begin
      int ce;
      ce = c_ex + i;
      prog[i] = rand_instr((i % 2 == 0) ? 26 : 29);
      prog[i][31] = 1'b1;
      if (i == 0) prog[i][12:5] = 8'(tri_model(ce) + 1 > 255 ? 255 : tri_model(ce) + 1);  // PWM high
      if (i == 2) prog[i][12:5] = 8'(tri_model(ce));                                      // PWM low
      if (i == 1 || i == 3) begin prog[i][12:5] = 8'(ce % 256); prog[i][20] = 1'b1; end  // PPM pulse
    end
    run_program(4);

    // mechanism report
    begin
      int missing = 0;
      for (int i = 0; i < 32; i++) if (op_seen[i] == 0) begin
        missing++; $display("FAIL opcode %0d never executed", i);
      end
      $display("COUNT write=%0d read=%0d read_nonzero=%0d piso_load=%0d piso_shift=%0d",
               n_write, n_read, n_read_nonzero, n_piso_load, n_piso_shift);
      $display("COUNT rot_left=%0d rot_right=%0d cmp_true=%0d cmp_false=%0d",
               n_rot_left, n_rot_right, n_cmp_true, n_cmp_false);
      $display("COUNT pwm_hi=%0d pwm_lo=%0d ppm_pulse=%0d pipeline_full=%0d pcm_frames=%0d",
               n_pwm_hi, n_pwm_lo, n_ppm_pulse, n_pipe_full, n_pcm_frames);
      checks++;
      if (missing > 0 || n_write == 0 || n_read == 0 || n_read_nonzero == 0 ||
          n_piso_load == 0 || n_piso_shift == 0 || n_rot_left == 0 || n_rot_right == 0 ||
          n_cmp_true == 0 || n_cmp_false == 0 || n_pwm_hi == 0 || n_pwm_lo == 0 ||
          n_ppm_pulse == 0 || n_pipe_full == 0 || n_pcm_frames == 0) begin
        failures++;
        $display("FAIL a mechanism never occurred");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
