// tb_rmp_instr_mem: self-checking testbench for the instruction memory.
// Fills all words with pseudo-random data, reads them back in a scrambled
// order and checks the one-cycle read latency and that rdata holds while re is
// low.
module tb_rmp_instr_mem;
  localparam int DEPTH = 256;
  logic        clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  rmp_instr_mem #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      we = 1'b1; waddr = 8'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      int adr;
      adr = (i * 37 + 11) % DEPTH;
      re = 1'b1; raddr = 8'(adr);
      @(posedge clk); #1;
      re = 1'b0; raddr = 8'($urandom);
      checks++;
      if (rdata !== model[adr]) begin failures++; $display("FAIL addr %0d", adr); end
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[adr]) begin failures++; $display("FAIL hold %0d", adr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
