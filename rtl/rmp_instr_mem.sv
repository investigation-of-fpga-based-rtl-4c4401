// rmp_instr_mem: instruction memory of the RMP.
//
// DEPTH words of 32 bits, written by a load port (to place a program) and read
// by the fetch stage through a synchronous read port: the word at raddr
// appears on rdata one clock after re is high. The document stores the
// instructions as 32-bit words in an array addressed by the program counter;
// the depth, the separate load port and the synchronous read are this
// design's choices. Contents are not reset.
module rmp_instr_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
