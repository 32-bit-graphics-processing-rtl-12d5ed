// tb_control_logic - self-checking test of the opcode decoder.
// Checks the control word of all 16 opcodes against an expected table written out
// here from the instruction set.
module tb_control_logic;
  import gpu_pkg::*;
  logic [3:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control_logic dut (.opcode(opcode), .ctrl(ctrl));

  task automatic expect_ctrl(fu_e unit, alu_op_e alu, bit rw, bit m2r, bit mr, bit mw, bit pcw, bit dn, bit vop);
    bit bad;
    bad = (ctrl.unit != unit) || (ctrl.reg_write != rw) || (ctrl.mem_to_reg != m2r) ||
          (ctrl.mem_read != mr) || (ctrl.mem_write != mw) || (ctrl.pc_write != pcw) ||
          (ctrl.done != dn) || (ctrl.valid_op != vop) || (unit == FU_ALU && ctrl.alu_control != alu);
    checks++;
    if (bad) begin
      failures++;
      $display("opcode %0d: ctrl %b", opcode, ctrl);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++) begin
      opcode = 4'(op); #1;
      case (op)
        0: expect_ctrl(FU_ALU, ALU_ADD, 1, 0, 0, 0, 1, 0, 1);
        1: expect_ctrl(FU_ALU, ALU_SUB, 1, 0, 0, 0, 1, 0, 1);
        2: expect_ctrl(FU_ALU, ALU_AND, 1, 0, 0, 0, 1, 0, 1);
        3: expect_ctrl(FU_ALU, ALU_OR,  1, 0, 0, 0, 1, 0, 1);
        4: expect_ctrl(FU_ALU, ALU_INC, 1, 0, 0, 0, 1, 0, 1);
        5: expect_ctrl(FU_LSU, ALU_ADD, 1, 1, 1, 0, 0, 0, 1);
        6: expect_ctrl(FU_LSU, ALU_ADD, 0, 0, 0, 1, 0, 0, 1);
        7: expect_ctrl(FU_SFU, ALU_ADD, 1, 0, 0, 0, 0, 0, 1);
        15: expect_ctrl(FU_NONE, ALU_ADD, 0, 0, 0, 0, 0, 1, 1);
        default: expect_ctrl(FU_NONE, ALU_ADD, 0, 0, 0, 0, 1, 0, 0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
