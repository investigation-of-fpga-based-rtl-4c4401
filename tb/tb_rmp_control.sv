// tb_rmp_control: self-checking testbench for the control unit.
// Runs programs of several lengths (including 0 and the full 256 words) and
// checks that the PC steps 0,1,2,... one per clock, that fetch is high for
// exactly prog_len clocks, that each stage valid bit is the fetch signal
// delayed by 1..5 clocks, and that busy stays high until the last instruction
// has left the MA stage.
module tb_rmp_control;
  localparam int AW = 8;
  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW:0]   prog_len = '0;
  logic          fetch, v_id, v_ex, v_rw, v_ma, v_ret, busy;
  logic [AW-1:0] pc;
  logic [5:0]    hist;   // fetch delayed by 1..5 clocks (hist[k] = fetch k clocks ago)
  int checks = 0, failures = 0;

  rmp_control #(.AW(AW)) dut (.clk, .rst_n, .start, .prog_len, .fetch, .pc,
                              .v_id, .v_ex, .v_rw, .v_ma, .v_ret, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) hist <= {hist[4:0], fetch};

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d @%0t", what, got, exp, $time);
    end
  endtask

  localparam int LENS[5] = '{5, 1, 0, 17, 256};

  initial begin
    hist = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("idle", int'(busy), 0);
    for (int k = 0; k < 5; k++) begin
      int fetched, retired, cycles, last_ret;
      fetched = 0; retired = 0; cycles = 0; last_ret = -1;
      prog_len = (AW + 1)'(LENS[k]);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      #1;
      while (cycles < 300) begin
        if (fetch) begin
          check("pc", int'(pc), fetched);
          fetched++;
        end
        check("v_id", int'(v_id), int'(hist[0]));
        check("v_ex", int'(v_ex), int'(hist[1]));
        check("v_rw", int'(v_rw), int'(hist[2]));
        check("v_ma", int'(v_ma), int'(hist[3]));
        check("v_ret", int'(v_ret), int'(hist[4]));
        if (v_ret) begin retired++; last_ret = cycles; end
        if (!busy && fetched == LENS[k] && !v_ret) break;
        @(posedge clk); #1;
        cycles++;
      end
      check("fetched", fetched, LENS[k]);
      check("retired", retired, LENS[k]);
      // one per clock: the last result retires 5 clocks after the last fetch
      if (LENS[k] > 0) check("throughput", last_ret, LENS[k] - 1 + 5);
      repeat (3) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
