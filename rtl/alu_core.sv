// alu_core - one ALU core of a streaming multiprocessor.
//
// Each SM has WARP_SIZE of these, all driven by the same operation code, so one
// instruction is applied to the registers of every thread of a warp in the same
// cycle (SIMD / SIMT execution). The core is purely combinational: operands come from
// the core's own register file read ports and the result goes straight back to that
// register file's write port, so an arithmetic instruction completes in one clock.
//
// Operations follow the instruction list: ADD, SUB, bitwise AND, bitwise OR and
// register increment (INC adds one to operand a). Two's-complement wrap-around on
// overflow is this design's choice; no flags are produced.
module alu_core
  import gpu_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  alu_op_e      func,    // operation (ALUControl)
  input  logic [W-1:0] a,       // source register 1 (r1)
  input  logic [W-1:0] b,       // source register 2 (r2)
  output logic [W-1:0] result   // result_1
);

  always_comb begin
    unique case (func)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_INC: result = a + W'(1);
      default: result = '0;
    endcase
  end

endmodule
