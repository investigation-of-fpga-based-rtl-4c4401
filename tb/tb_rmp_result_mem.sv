// tb_rmp_result_mem: self-checking testbench for the result memory.
// Random writes and reads over the 32 per-opcode registers are compared with a
// model array; it checks the reset value, that a read returns the last word
// written to that opcode, that a write echoes its data on rdata and that
// rdata holds while req is low.
module tb_rmp_result_mem;
  logic        clk = 1'b0, rst_n = 1'b0, req = 1'b0, we = 1'b0;
  logic [4:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [32];
  logic [31:0] last;
  int checks = 0, failures = 0;

  rmp_result_mem dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    last = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      req = ($urandom_range(4) != 0); we = 1'($urandom); addr = 5'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      if (req) begin
        if (we) begin model[addr] = wdata; last = wdata; end
        else    last = model[addr];
      end
      checks++;
      if (rdata !== last) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d addr=%0d got %h exp %h", n, addr, rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
