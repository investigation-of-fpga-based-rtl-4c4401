// tb_rmp_shift_unit: self-checking testbench for the universal shift register.
// A directed part serialises a byte through PISO (MSB first), assembles one
// through SIPO and passes a bit stream through SISO; a random part mixes all
// four modes and idle cycles against a register model kept in the testbench.
module tb_rmp_shift_unit;
  import rmp_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en = 1'b0, ser_in = 1'b0, load_en = 1'b0;
  opcode_e    op = OP_PIPO;
  logic [7:0] pin = '0, pout, state;
  logic       sout;
  logic [7:0] model = '0;
  int checks = 0, failures = 0;

  rmp_shift_unit dut (.clk, .rst_n, .en, .op, .ser_in, .pin, .load_en, .sout, .pout, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  // One instruction step: apply inputs, check the combinational outputs
  // against the model, then clock.
  task automatic step(opcode_e o, logic s, logic [7:0] p, logic le, logic e);
    logic [7:0] nxt;
    op = o; ser_in = s; pin = p; load_en = le; en = e;
    case (o)
      OP_SISO, OP_SIPO: nxt = {model[6:0], s};
      OP_PISO:          nxt = le ? p : {model[6:0], 1'b0};
      default:          nxt = p;
    endcase
    #1;
    check("state", state, model);
    if (o == OP_SISO || o == OP_PISO) check("sout", 8'(sout), 8'(nxt[7]));
    else                              check("pout", pout, nxt);
    @(posedge clk);
    if (e) model = nxt;
    #1;
  endtask

  initial begin
    logic [7:0] got;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check("reset", state, 8'h00);

    // PISO: load 1011_0010, then 7 shifts; serial output is MSB first
    got = '0;
    step(OP_PISO, 1'b0, 8'b1011_0010, 1'b1, 1'b1);
    got[7] = dut.sout;
    for (int i = 6; i >= 0; i--) begin
      op = OP_PISO; load_en = 1'b0; en = 1'b1; #1;
      got[i] = sout;
      @(posedge clk); #1;
    end
    model = '0;
    check("PISO stream", got, 8'b1011_0010);

    // SIPO: shift in 1,1,0,0,1,0,1,0 (first bit ends in bit 7)
    for (int i = 7; i >= 0; i--) begin
      op = OP_SIPO; ser_in = 1'(8'b1100_1010 >> i); en = 1'b1; #1;
      @(posedge clk); #1;
    end
    check("SIPO word", state, 8'b1100_1010);
    model = 8'b1100_1010;

    // SISO: a bit entered appears on sout 7 steps later
    step(OP_PIPO, 1'b0, 8'h00, 1'b0, 1'b1);
    step(OP_SISO, 1'b1, 8'h00, 1'b0, 1'b1);
    for (int i = 0; i < 6; i++) step(OP_SISO, 1'b0, 8'h00, 1'b0, 1'b1);
    op = OP_SISO; ser_in = 1'b0; en = 1'b1; #1;
    check("SISO delay", 8'(sout), 8'd1);
    @(posedge clk); #1;
    model = 8'b1000_0000;

    // values of the published shift-register simulation: eight SIPO steps
    // with serial input 1 give 1111_1111; PIPO of 1111_0001 gives 1111_0001
    for (int i = 0; i < 8; i++) step(OP_SIPO, 1'b1, 8'h00, 1'b0, 1'b1);
    check("SIPO ones", state, 8'b1111_1111);
    step(OP_PIPO, 1'b0, 8'b1111_0001, 1'b0, 1'b1);
    check("PIPO word", state, 8'b1111_0001);

    // random mix, including cycles with en low (register must hold)
    for (int n = 0; n < 2000; n++) begin
      opcode_e o;
      case ($urandom_range(3))
        0: o = OP_SISO; 1: o = OP_SIPO; 2: o = OP_PISO; default: o = OP_PIPO;
      endcase
      step(o, 1'($urandom), 8'($urandom), 1'($urandom), ($urandom_range(3) != 0));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
