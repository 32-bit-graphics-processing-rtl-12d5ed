// tb_workload_vector_add - the vector-addition workloads, run on the full-size GPU.
//   a) 32 threads with r1 = 1 and r2 = 2 in every thread: ADD r3 = r1 + r2 must give
//      3 in register 3 of all 32 cores (checked in memory after a STORE).
//   b) one block of 256 elements: arrays A (words 0..255) and B (256..511) are
//      loaded, added and the result array stored at 512..767 on SM 0.
//   c) the 50-element example: 2 warps, the second with 18 threads; words 512+50
//      and beyond must keep their old contents.
// Kernel: LOAD r1,[0]; LOAD r2,[256]; ADD r3 = r1 + r2; STORE r3,[512]; HALT.
module tb_workload_vector_add;
  import gpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, data_in_valid, busy, done, launch_overflow, ic_we, dc_we;
  logic [31:0] data_in, dc_wdata, dc_rdata;
  logic [15:0] elements_num, ic_addr;
  logic [16:0] blocks_num, warps_num;
  logic [19:0] ic_wdata;
  logic [2:0]  dc_sm;
  logic [9:0]  dc_addr;
  sm_events_t [NUM_SM-1:0] events;
  int checks = 0, failures = 0;

  gpu_top dut (.*);

  task automatic chk(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask
  task automatic ic_write(int a, logic [19:0] w);
    ic_we = 1; ic_addr = 16'(a); ic_wdata = w; @(negedge clk); ic_we = 0;
  endtask
  task automatic dc_write(int a, logic [31:0] w);
    dc_we = 1; dc_sm = 0; dc_addr = 10'(a); dc_wdata = w; @(negedge clk); dc_we = 0;
  endtask
  task automatic dc_read(int a, output logic [31:0] w);
    dc_sm = 0; dc_addr = 10'(a); #1; w = dc_rdata;
  endtask
  task automatic launch(int n);
    data_in_valid = 1; data_in = {16'(n), 16'h0000};
    @(negedge clk); data_in_valid = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] A [256], B [256], w;
  initial begin
    rst_n = 0; data_in_valid = 0; data_in = 0; ic_we = 0; dc_we = 0;
    ic_addr = 0; ic_wdata = 0; dc_sm = 0; dc_addr = 0; dc_wdata = 0;
    #12 rst_n = 1;
    @(negedge clk);
    ic_write(0, {1'b0, 5'd1, 10'd0,   OP_LOAD});
    ic_write(1, {1'b0, 5'd2, 10'd256, OP_LOAD});
    ic_write(2, {1'b0, 5'd3, 5'd2, 5'd1, OP_ADD});
    ic_write(3, {1'b0, 5'd3, 10'd512, OP_STORE});
    ic_write(4, {1'b0, 15'd0, OP_HALT});
    // a) 1 + 2 = 3 on 32 cores
    for (int i = 0; i < 32; i++) begin dc_write(i, 1); dc_write(256 + i, 2); dc_write(512 + i, 0); end
    launch(32);
    for (int i = 0; i < 32; i++) begin dc_read(512 + i, w); chk(w, 3, $sformatf("core %0d: r3", i)); end
    // b) 256-element arrays
    for (int i = 0; i < 256; i++) begin
      A[i] = $urandom; B[i] = $urandom;
      dc_write(i, A[i]); dc_write(256 + i, B[i]); dc_write(512 + i, 32'hFFFF_0000 + i);
    end
    launch(256);
    chk(blocks_num, 1, "one block"); chk(warps_num, 8, "eight warps");
    for (int i = 0; i < 256; i++) begin dc_read(512 + i, w); chk(w, 32'(A[i] + B[i]), "C = A + B"); end
    // c) 50 elements
    for (int i = 0; i < 256; i++) dc_write(512 + i, 32'hFFFF_0000 + i);
    launch(50);
    chk(warps_num, 2, "50 elements give 2 warps");
    for (int i = 0; i < 256; i++) begin
      dc_read(512 + i, w);
      chk(w, i < 50 ? 32'(A[i] + B[i]) : 32'hFFFF_0000 + i, "C = A + B, 50 elements");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
