// tb_dcache - self-checking test of the data cache.
// Writes through both ports, reads through both, checks same-cycle read returns the
// old word, and that port A wins a write collision.
module tb_dcache;
  localparam int DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0]  dm_address, host_addr;
  logic        mem_write, host_we;
  logic [31:0] dm_write, temp_dm_read, host_wdata, host_rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  dcache #(.DEPTH(DEPTH)) dut (.clk(clk), .dm_address(dm_address), .mem_write(mem_write),
    .dm_write(dm_write), .temp_dm_read(temp_dm_read), .host_addr(host_addr), .host_we(host_we),
    .host_wdata(host_wdata), .host_rdata(host_rdata));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_write = 0; host_we = 0; dm_address = 0; host_addr = 0; dm_write = 0; host_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i += 2) begin      // even words by host, odd by port A
      host_we = 1; host_addr = 10'(i); host_wdata = $urandom; model[i] = host_wdata;
      mem_write = 1; dm_address = 10'(i + 1); dm_write = $urandom; model[i+1] = dm_write;
      @(negedge clk);
    end
    host_we = 0; mem_write = 0;
    for (int i = 0; i < DEPTH; i++) begin
      dm_address = 10'(i); host_addr = 10'(DEPTH - 1 - i); #1;
      chk(temp_dm_read, model[i], "port A read");
      chk(host_rdata, model[DEPTH-1-i], "port B read");
    end
    // read during write returns the old word
    dm_address = 10'd100; mem_write = 1; dm_write = 32'h1234_5678; #1;
    chk(temp_dm_read, model[100], "old word");
    @(negedge clk); mem_write = 0;
    chk(temp_dm_read, 32'h1234_5678, "new word");
    // collision
    dm_address = 10'd200; host_addr = 10'd200; mem_write = 1; host_we = 1;
    dm_write = 32'hAAAA_0001; host_wdata = 32'hBBBB_0002;
    @(negedge clk); mem_write = 0; host_we = 0;
    chk(host_rdata, 32'hAAAA_0001, "collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
