// tb_dispatch_unit - self-checking test of the dispatch unit.
// Applies every instruction class under every combination of unit-busy and
// writeback-request inputs and checks issue, stall reasons, register selects,
// the memory address field and the write-port grants against rules written here.
module tb_dispatch_unit;
  import gpu_pkg::*;
  logic        sel_valid, lsu_busy, sfu_busy, lsu_wb_req, sfu_wb_req;
  logic [19:0] instruction;
  ctrl_t       ctrl;
  logic [4:0]  selr1, selr2, selrin;
  logic [9:0]  mem_addr;
  logic issue, alu_issue, lsu_issue, sfu_issue, halt_issue, unit_stall, wb_stall, lsu_wb_grant, sfu_wb_grant;
  int checks = 0, failures = 0;

  dispatch_unit dut (.*);

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("instr %h v%0d lb%0d sb%0d lw%0d sw%0d %s: got %0d want %0d",
        instruction, sel_valid, lsu_busy, sfu_busy, lsu_wb_req, sfu_wb_req, what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ops[9] = '{0, 1, 2, 3, 4, 5, 6, 7, 15};
    for (int k = 0; k < 9; k++)
      for (int c = 0; c < 32; c++)
        for (int rep = 0; rep < 3; rep++) begin
          logic [4:0] rd, rs1, rs2;
          bit is_alu, is_lsu, is_sfu, is_halt, wbb, e_alu, e_lsu, e_sfu;
          rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
          instruction = {1'($urandom), rd, rs2, rs1, 4'(ops[k])};
          {sel_valid, lsu_busy, sfu_busy, lsu_wb_req, sfu_wb_req} = 5'(c);
          #1;
          is_alu = ops[k] <= 4; is_lsu = ops[k] == 5 || ops[k] == 6;
          is_sfu = ops[k] == 7; is_halt = ops[k] == 15;
          wbb = lsu_wb_req | sfu_wb_req;
          e_alu = sel_valid & is_alu & !wbb;
          e_lsu = sel_valid & is_lsu & !lsu_busy;
          e_sfu = sel_valid & is_sfu & !sfu_busy;
          chk(alu_issue, e_alu, "alu_issue");
          chk(lsu_issue, e_lsu, "lsu_issue");
          chk(sfu_issue, e_sfu, "sfu_issue");
          chk(halt_issue, sel_valid & is_halt, "halt_issue");
          chk(issue, e_alu | e_lsu | e_sfu | (sel_valid & is_halt), "issue");
          chk(wb_stall, sel_valid & is_alu & wbb, "wb_stall");
          chk(unit_stall, sel_valid & ((is_lsu & lsu_busy) | (is_sfu & sfu_busy)), "unit_stall");
          chk(lsu_wb_grant, lsu_wb_req, "lsu grant");
          chk(sfu_wb_grant, sfu_wb_req & !lsu_wb_req, "sfu grant");
          chk(selr1, (ops[k] == 4 || ops[k] == 6) ? rd : rs1, "selr1");
          chk(selr2, rs2, "selr2");
          chk(selrin, rd, "selrin");
          chk(mem_addr, {rs2, rs1}, "mem_addr");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
