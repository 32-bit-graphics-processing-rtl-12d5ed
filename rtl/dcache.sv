// dcache - data cache of a streaming multiprocessor (dataMemory).
//
// A register array of DEPTH 32-bit words (1024 by default: room for a 256-element
// array A, a 256-element array B and the results, reached by the 10-bit address of
// LOAD/STORE). Port A belongs to the load/store unit: dM_address selects a word,
// the word appears on temp_dM_read in the same cycle (asynchronous read) and, with
// MemWrite high, dM_write is stored at the rising clock edge. Port B is a second
// read/write port with the same timing through which the host fills the operands and
// collects the results; it is this design's own addition, since the design does not
// say how data reaches the cache. If both ports write the same word in one cycle,
// port A wins.
module dcache
  import gpu_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = WORD_W
) (
  input  logic                     clk,
  // port A: load/store unit
  input  logic [$clog2(DEPTH)-1:0] dm_address,
  input  logic                     mem_write,
  input  logic [W-1:0]             dm_write,
  output logic [W-1:0]             temp_dm_read,
  // port B: host
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic                     host_we,
  input  logic [W-1:0]             host_wdata,
  output logic [W-1:0]             host_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we)   mem[host_addr]  <= host_wdata;
    if (mem_write) mem[dm_address] <= dm_write;
  end

  assign temp_dm_read = mem[dm_address];
  assign host_rdata   = mem[host_addr];

endmodule
