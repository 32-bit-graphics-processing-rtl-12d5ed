// control_logic - instruction decoder of a streaming multiprocessor.
//
// Turns the 4-bit opcode of the fetched instruction into the control word: which
// functional unit executes it, the cores' operation (ALUControl), RegWrite, MemtoReg,
// the D-cache read and write enables (DM_Read, MemWrite), PCWrite and Done.
// Purely combinational.
//
// PCWrite is set for the single-cycle instructions (the four ALU operations and INC),
// whose warp moves to its next instruction as soon as they issue. LOAD, STORE and
// SQRT leave PCWrite clear: the warp's program counter advances only when the
// load/store unit or the special function unit reports the whole warp finished, as
// the design asks for loads. HALT raises Done. Opcode values, SQRT and HALT are this
// design's own encoding; an undefined opcode is executed as a no-operation that only
// advances the PC.
module control_logic
  import gpu_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl             = '0;
    ctrl.unit        = FU_ALU;
    ctrl.alu_control = ALU_ADD;
    ctrl.valid_op    = 1'b1;
    unique case (opcode)
      OP_ADD:   begin ctrl.alu_control = ALU_ADD; ctrl.reg_write = 1'b1; ctrl.pc_write = 1'b1; end
      OP_SUB:   begin ctrl.alu_control = ALU_SUB; ctrl.reg_write = 1'b1; ctrl.pc_write = 1'b1; end
      OP_AND:   begin ctrl.alu_control = ALU_AND; ctrl.reg_write = 1'b1; ctrl.pc_write = 1'b1; end
      OP_OR:    begin ctrl.alu_control = ALU_OR;  ctrl.reg_write = 1'b1; ctrl.pc_write = 1'b1; end
      OP_INC:   begin ctrl.alu_control = ALU_INC; ctrl.reg_write = 1'b1; ctrl.pc_write = 1'b1; end
      OP_LOAD:  begin ctrl.unit = FU_LSU; ctrl.reg_write = 1'b1; ctrl.mem_to_reg = 1'b1;
                      ctrl.mem_read = 1'b1; end
      OP_STORE: begin ctrl.unit = FU_LSU; ctrl.mem_write = 1'b1; end
      OP_SQRT:  begin ctrl.unit = FU_SFU; ctrl.reg_write = 1'b1; end
      OP_HALT:  begin ctrl.unit = FU_NONE; ctrl.done = 1'b1; end
      default:  begin ctrl.unit = FU_NONE; ctrl.pc_write = 1'b1; ctrl.valid_op = 1'b0; end
    endcase
  end

endmodule
