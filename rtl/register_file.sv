// register_file - the private register file of one core.
//
// Every thread owns NUM_REGS registers of W bits. A core runs one thread of each of
// the NUM_WARPS warps of its block, so its register file holds NUM_WARPS sets of
// NUM_REGS registers (8 x 32 x 32 bit by default; 32 cores x 8 SMs of these give the
// 65536 registers of the whole GPU). The entry is selected by {warp, register}.
//
// Two asynchronous read ports (selr1, selr2) feed the core's ALU operands; one
// synchronous write port (selrin, rin) stores a result at the rising clock edge. Both
// read ports use the same warp number, since one instruction of one warp is read per
// cycle. A read of the register being written in the same cycle returns the old
// value. The array is not reset, like an SRAM: software writes a register before
// reading it.
module register_file
  import gpu_pkg::*;
#(
  parameter int unsigned W         = WORD_W,
  parameter int unsigned NREGS     = NUM_REGS,
  parameter int unsigned NUM_WARPS = MAX_WARPS
) (
  input  logic                         clk,
  // read side
  input  logic [$clog2(NUM_WARPS)-1:0] rd_warp,
  input  logic [$clog2(NREGS)-1:0]     selr1,
  input  logic [$clog2(NREGS)-1:0]     selr2,
  output logic [W-1:0]                 r1,
  output logic [W-1:0]                 r2,
  // write side
  input  logic                         we,
  input  logic [$clog2(NUM_WARPS)-1:0] wr_warp,
  input  logic [$clog2(NREGS)-1:0]     selrin,
  input  logic [W-1:0]                 rin
);

  logic [W-1:0] regs [NUM_WARPS][NREGS];

  always_ff @(posedge clk) begin
    if (we) regs[wr_warp][selrin] <= rin;
  end

  assign r1 = regs[rd_warp][selr1];
  assign r2 = regs[rd_warp][selr2];

endmodule
