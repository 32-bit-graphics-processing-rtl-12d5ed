// tb_register_file - self-checking test of a core register file.
// Fills every {warp, register} entry with a distinct random value, reads all entries
// back on both read ports, and checks that a write is visible only after the clock
// edge and only in the warp and register it addressed.
module tb_register_file;
  localparam int NW = 8, NR = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0]  rd_warp, wr_warp;
  logic [4:0]  selr1, selr2, selrin;
  logic [31:0] r1, r2, rin;
  logic        we;
  logic [31:0] model [NW][NR];
  int checks = 0, failures = 0;

  register_file #(.W(32), .NREGS(NR), .NUM_WARPS(NW)) dut (
    .clk(clk), .rd_warp(rd_warp), .selr1(selr1), .selr2(selr2), .r1(r1), .r2(r2),
    .we(we), .wr_warp(wr_warp), .selrin(selrin), .rin(rin));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("%s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd_warp = 0; wr_warp = 0; selr1 = 0; selr2 = 0; selrin = 0; rin = 0;
    @(negedge clk);
    for (int w = 0; w < NW; w++)
      for (int r = 0; r < NR; r++) begin
        we = 1; wr_warp = 3'(w); selrin = 5'(r); rin = $urandom; model[w][r] = rin;
        @(negedge clk);
      end
    we = 0;
    for (int w = 0; w < NW; w++)
      for (int r = 0; r < NR; r++) begin
        rd_warp = 3'(w); selr1 = 5'(r); selr2 = 5'(NR - 1 - r); #1;
        chk(r1, model[w][r], "port1");
        chk(r2, model[w][NR-1-r], "port2");
      end
    // write timing: old value before the edge, new value after
    rd_warp = 5; selr1 = 7; wr_warp = 5; selrin = 7; rin = 32'hCAFE_F00D; we = 1; #1;
    chk(r1, model[5][7], "before edge");
    @(posedge clk); #1; we = 0;
    chk(r1, 32'hCAFE_F00D, "after edge");
    model[5][7] = 32'hCAFE_F00D;
    // neighbours untouched
    rd_warp = 4; #1; chk(r1, model[4][7], "other warp");
    rd_warp = 5; selr1 = 6; #1; chk(r1, model[5][6], "other register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
