// rmp_control: control unit of the RMP.
//
// Holds the program counter and sequences the five pipeline stages, instruction
// fetch (IF), decode (ID), execute (EX), read/write (RW) and memory access (MA).
// A start pulse clears the PC and starts fetching; every cycle one instruction
// is fetched and the PC is incremented by 1 until prog_len instructions have
// been fetched. A valid bit per stage follows each instruction down the
// pipeline, one stage per clock, so up to five instructions are in flight and
// one completes per clock. The operands are immediates and each result goes to
// a register of its own opcode, so no instruction waits for another and there
// are no stalls. Timing: an instruction fetched in cycle t is in ID at t+1, EX
// at t+2, RW at t+3, MA at t+4, and its results are valid (v_ret) at t+5.
// The document gives the five stages, the PC incremented by 1 and that the
// control unit governs pipelining, read/write and memory access; the start /
// program-length handshake is this design's choice.
module rmp_control #(
  parameter int unsigned AW = 8   // program counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,     // pulse: run the program from address 0
  input  logic [AW:0]   prog_len,  // number of instructions, held while busy
  output logic          fetch,     // IF: read the instruction memory at pc
  output logic [AW-1:0] pc,
  output logic          v_id,
  output logic          v_ex,
  output logic          v_rw,
  output logic          v_ma,
  output logic          v_ret,
  output logic          busy
);
  logic          running_q;
  logic [AW-1:0] pc_q;

  assign fetch = running_q && ({1'b0, pc_q} < prog_len) && !start;
  assign pc    = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      pc_q      <= '0;
    end else if (start) begin
      running_q <= 1'b1;
      pc_q      <= '0;
    end else if (fetch) begin
      pc_q <= pc_q + 1'b1;
      if ({1'b0, pc_q} + 1'b1 >= prog_len) running_q <= 1'b0;
    end else begin
      running_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v_id, v_ex, v_rw, v_ma, v_ret} <= '0;
    end else begin
      v_id  <= fetch;
      v_ex  <= v_id;
      v_rw  <= v_ex;
      v_ma  <= v_rw;
      v_ret <= v_ma;
    end
  end

  assign busy = running_q | v_id | v_ex | v_rw | v_ma;
endmodule
