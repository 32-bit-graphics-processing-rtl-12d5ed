// tb_alu_core - self-checking test of one ALU core.
// Drives random and corner operands through every operation and compares the result
// with a reference computed here with the SystemVerilog operators.
module tb_alu_core;
  import gpu_pkg::*;

  alu_op_e     func;
  logic [31:0] a, b, result, expect_v;
  int checks = 0, failures = 0;

  alu_core dut (.func(func), .a(a), .b(b), .result(result));

  function automatic logic [31:0] ref_op(alu_op_e f, logic [31:0] x, logic [31:0] y);
    case (f)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_INC: return x + 1;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_INC};
    // the figure's example: 1 + 2 = 3
    func = ALU_ADD; a = 1; b = 2; #1;
    checks++; if (result !== 32'd3) begin failures++; $display("1+2 gave %0d", result); end
    // corners
    func = ALU_ADD; a = 32'hFFFF_FFFF; b = 1; #1;
    checks++; if (result !== 0) failures++;
    func = ALU_SUB; a = 0; b = 1; #1;
    checks++; if (result !== 32'hFFFF_FFFF) failures++;
    func = ALU_INC; a = 32'h7FFF_FFFF; b = 5; #1;
    checks++; if (result !== 32'h8000_0000) failures++;
    for (int i = 0; i < 2000; i++) begin
      func = ops[i % 5];
      a = $urandom; b = $urandom;
      #1;
      expect_v = ref_op(func, a, b);
      checks++;
      if (result !== expect_v) begin
        failures++;
        if (failures < 10) $display("func=%0d a=%h b=%h got %h want %h", func, a, b, result, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
