// tb_rmp_decode: self-checking testbench for the instruction decoder.
// Random 32-bit words are decoded and every field is compared with bits picked
// out of the word one by one in the testbench; the unit and rotation distance
// are checked against the opcode table.
module tb_rmp_decode;
  import rmp_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] instr;
  decoded_t    dec;
  int checks = 0, failures = 0;

  rmp_decode dut (.instr, .dec);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bits(logic [31:0] w, int hi, int lo);
    int v = 0;
    for (int i = hi; i >= lo; i--) v = v * 2 + int'(w[i]);
    return v;
  endfunction

  function automatic int unit_model(int op);
    if (op >= 12 && op <= 15) return 1;   // SU
    if (op >= 16 && op <= 18) return 3;   // CU
    if (op >= 19 && op <= 23) return 2;   // RU
    if (op >= 26)             return 4;   // MU
    return 0;                             // ALU (incl. INC / DEC)
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s word=%h got %0d exp %0d", what, instr, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      instr = (n < 32) ? {$urandom} & 32'hffff_ffe0 | 32'(n) : $urandom;
      #1;
      check("rw", int'(dec.rw), bits(instr, 31, 31));
      check("op", int'(dec.op), bits(instr, 4, 0));
      check("a", int'(dec.a), bits(instr, 12, 5));
      check("b", int'(dec.b), bits(instr, 20, 13));
      check("divisor", int'(dec.divisor), bits(instr, 25, 21));
      check("ser_in", int'(dec.ser_in), bits(instr, 5, 5));
      check("load_en", int'(dec.load_en), bits(instr, 16, 16));
      check("dir", int'(dec.dir), bits(instr, 14, 14));
      check("ppm_en", int'(dec.ppm_en), bits(instr, 20, 20));
      check("symbol", int'(dec.symbol), bits(instr, 10, 5));
      check("amp", int'(dec.amp), bits(instr, 9, 5));
      check("unit", int'(dec.unit), unit_model(bits(instr, 4, 0)));
      check("rot_n", int'(dec.rot_n), (unit_model(bits(instr, 4, 0)) == 2) ? bits(instr, 4, 0) - 18 : 0);
      check("word", int'(dec.word == instr), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
