// tb_icache - self-checking test of the instruction cache.
// Writes a random program through the host port and fetches it back, including the
// wrap of a 16-bit PC onto the array, and checks the fetch is asynchronous.
module tb_icache;
  localparam int DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [15:0] pc, wr_addr;
  logic [19:0] instruction_mem, wr_data;
  logic        wr_en;
  logic [19:0] model [DEPTH];
  int checks = 0, failures = 0;

  icache #(.DEPTH(DEPTH)) dut (.clk(clk), .pc(pc), .instruction_mem(instruction_mem),
                               .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; pc = 0; wr_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_addr = 16'(i); wr_data = 20'($urandom); model[i] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 300; i++) begin
      pc = 16'($urandom); #1;
      checks++;
      if (instruction_mem !== model[pc % DEPTH]) begin
        failures++;
        if (failures < 10) $display("pc %h got %h want %h", pc, instruction_mem, model[pc % DEPTH]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
