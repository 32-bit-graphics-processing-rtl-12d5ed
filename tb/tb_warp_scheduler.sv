// tb_warp_scheduler - self-checking test of the warp scheduler.
// Launches 3 of 8 warps and checks: the round-robin offer order, PC advance on
// single-cycle issue, that a waiting warp is skipped while the others are offered,
// that a completion releases it with PC+1, that a halted warp is never offered again
// and that all_done rises only after every warp halted.
module tb_warp_scheduler;
  localparam int NW = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n, start, sel_valid, issue, adv, wait_, halt, all_done, any_waiting;
  logic [15:0] start_pc, sel_pc;
  logic [3:0]  num_warps;
  logic [2:0]  sel_warp;
  logic [1:0]  cpl_valid;
  logic [2:0]  cpl_warp [2];
  int checks = 0, failures = 0;

  warp_scheduler #(.NUM_WARPS(NW), .NCPL(2)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .start_pc(start_pc), .num_warps(num_warps),
    .sel_valid(sel_valid), .sel_warp(sel_warp), .sel_pc(sel_pc), .issue(issue), .adv(adv),
    .wait_(wait_), .halt(halt), .cpl_valid(cpl_valid), .cpl_warp(cpl_warp),
    .all_done(all_done), .any_waiting(any_waiting));

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  // one cycle: check the offer, then apply an outcome
  task automatic step(int want_warp, int want_pc, bit i, bit a, bit w, bit h);
    #1;
    chk(sel_valid, 1, "valid");
    chk(sel_warp, want_warp, "warp");
    chk(sel_pc, want_pc, "pc");
    issue = i; adv = a; wait_ = w; halt = h;
    @(negedge clk);
    issue = 0; adv = 0; wait_ = 0; halt = 0; cpl_valid = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; issue = 0; adv = 0; wait_ = 0; halt = 0; cpl_valid = 0;
    cpl_warp[0] = 0; cpl_warp[1] = 0; start_pc = 0; num_warps = 0;
    #12 rst_n = 1;
    @(negedge clk);
    chk(all_done, 1, "done after reset");
    start = 1; start_pc = 16'd40; num_warps = 3;
    @(negedge clk); start = 0;
    chk(all_done, 0, "running");
    step(0, 40, 1, 1, 0, 0);   // w0 ALU -> pc 41
    step(1, 40, 1, 0, 1, 0);   // w1 LOAD -> waits
    #1 chk(any_waiting, 1, "waiting");
    step(2, 40, 1, 1, 0, 0);   // w2 ALU
    step(0, 41, 1, 1, 0, 0);   // w1 skipped
    step(2, 41, 0, 0, 0, 0);   // w2 blocked: not issued, pc kept
    step(0, 42, 1, 1, 0, 0);
    cpl_valid = 2'b01; cpl_warp[0] = 1;   // w1 finishes during this offer
    step(2, 41, 1, 1, 0, 0);
    step(0, 43, 1, 0, 0, 1);   // w0 halts
    step(1, 41, 1, 1, 0, 0);   // w1 back at pc+1
    step(2, 42, 1, 0, 0, 1);   // w2 halts
    step(1, 42, 1, 0, 1, 0);   // w1 waits on SFU
    #1 chk(sel_valid, 0, "nothing ready");
    chk(all_done, 0, "not done while waiting");
    @(negedge clk);
    cpl_valid = 2'b10; cpl_warp[1] = 1;
    @(negedge clk); cpl_valid = 0;
    step(1, 43, 1, 0, 0, 1);   // w1 halts
    #1 chk(all_done, 1, "all done");
    chk(sel_valid, 0, "no offer when done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
