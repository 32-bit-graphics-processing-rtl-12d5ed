// icache - instruction cache of a streaming multiprocessor.
//
// Holds the kernel's 20-bit instruction words. It is a plain register array, as in
// the design, with DEPTH words; the 16-bit program counter indexes it modulo DEPTH.
// The fetch port is asynchronous: the word at pc appears on instruction_mem in the
// same cycle, so the warp scheduler can select a warp and issue its instruction in one
// clock. A synchronous write port lets the host place the kernel before a launch; the
// depth (1024 words) and this loading port are this design's choices, the design
// states neither.
module icache
  import gpu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned IW    = INSTR_W
) (
  input  logic               clk,
  // fetch
  input  logic [IADDR_W-1:0] pc,
  output logic [IW-1:0]      instruction_mem,
  // host load port
  input  logic               wr_en,
  input  logic [IADDR_W-1:0] wr_addr,
  input  logic [IW-1:0]      wr_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW-1:0]] <= wr_data;
  end

  assign instruction_mem = mem[pc[AW-1:0]];

endmodule
