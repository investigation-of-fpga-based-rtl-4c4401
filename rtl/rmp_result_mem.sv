// rmp_result_mem: result memory ("memory register") of the RMP.
//
// One 32-bit register per opcode, 32 in all. In the memory-access stage an
// instruction with the write flag set stores its result word in the register
// of its opcode; one with the flag clear reads back the word the last write of
// that opcode stored, so a program can retrieve an earlier output. Access
// happens on the clock edge with req high; rdata then shows, from the next
// cycle, the word read (for a read) or the word just written (for a write).
// All registers reset to 0. The document gives the write / read choice by bit
// 31 and that results are stored or retrieved; one register per opcode is this
// design's choice.
module rmp_result_mem (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [4:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] regs_q [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs_q[i] <= '0;
      rdata <= '0;
    end else if (req) begin
      if (we) begin
        regs_q[addr] <= wdata;
        rdata        <= wdata;
      end else begin
        rdata <= regs_q[addr];
      end
    end
  end
endmodule
