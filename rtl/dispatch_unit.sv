// dispatch_unit - decodes the offered warp's instruction and issues it if it can go.
//
// The warp scheduler offers one warp per cycle; its instruction comes from the I-cache.
// The dispatch unit decodes it (through control_logic), picks the register-file read
// and write selects out of the word, and issues it only when its functional unit is
// free, since a warp needs both its data and its unit to be available:
//   ALU ops - need the register write port, which a pending LOAD or SQRT writeback
//             takes first (wb_stall otherwise);
//   LOAD/STORE - need the load/store unit idle; SQRT - needs the special function unit
//             idle (unit_stall otherwise);
//   HALT and undefined opcodes - always issue.
// It also arbitrates the single register write port between the two multi-cycle
// units: the load/store unit first, then the special function unit.
//
// Register selects: selr1 is bits [8:4], except for INC and STORE, whose register sits
// in bits [18:14]; selr2 is bits [13:9]; selrin is bits [18:14]. All combinational.
module dispatch_unit
  import gpu_pkg::*;
(
  input  logic               sel_valid,
  input  logic [INSTR_W-1:0] instruction,
  // unit status
  input  logic               lsu_busy,
  input  logic               sfu_busy,
  input  logic               lsu_wb_req,
  input  logic               sfu_wb_req,
  // decoded instruction
  output ctrl_t              ctrl,
  output logic [REG_AW-1:0]  selr1,
  output logic [REG_AW-1:0]  selr2,
  output logic [REG_AW-1:0]  selrin,
  output logic [DADDR_W-1:0] mem_addr,
  // issue decisions
  output logic               issue,
  output logic               alu_issue,
  output logic               lsu_issue,
  output logic               sfu_issue,
  output logic               halt_issue,
  output logic               unit_stall,
  output logic               wb_stall,
  // write-port arbitration
  output logic               lsu_wb_grant,
  output logic               sfu_wb_grant
);

  instr_r_t ir;
  instr_m_t im;
  logic     wb_busy;

  assign ir = instr_r_t'(instruction);
  assign im = instr_m_t'(instruction);

  control_logic u_ctrl (
    .opcode (ir.opcode),
    .ctrl   (ctrl)
  );

  assign selr1    = (ir.opcode == OP_INC || ir.opcode == OP_STORE) ? ir.rd : ir.rs1;
  assign selr2    = ir.rs2;
  assign selrin   = ir.rd;
  assign mem_addr = im.addr;

  assign lsu_wb_grant = lsu_wb_req;
  assign sfu_wb_grant = sfu_wb_req && !lsu_wb_req;
  assign wb_busy      = lsu_wb_req || sfu_wb_req;

  always_comb begin
    alu_issue  = 1'b0;
    lsu_issue  = 1'b0;
    sfu_issue  = 1'b0;
    halt_issue = 1'b0;
    unit_stall = 1'b0;
    wb_stall   = 1'b0;
    issue      = 1'b0;
    if (sel_valid) begin
      unique case (ctrl.unit)
        FU_ALU: begin alu_issue = !wb_busy;  wb_stall   = wb_busy;  end
        FU_LSU: begin lsu_issue = !lsu_busy; unit_stall = lsu_busy; end
        FU_SFU: begin sfu_issue = !sfu_busy; unit_stall = sfu_busy; end
        default: halt_issue = ctrl.done;
      endcase
      issue = alu_issue || lsu_issue || sfu_issue || (ctrl.unit == FU_NONE);
    end
  end

endmodule
