// tb_gpu_top - end-to-end test of the whole GPU at its full size (8 SMs x 32 cores).
// The kernels are placed in the I-caches once. Four launches follow:
//   1) n = 32, one warp on SM 0: the latency from the launch word to done must be
//      2 cycles of launch overhead plus LOAD 34 + LOAD 34 + ADD 1 + STORE 33 + HALT 1.
//   2) n = 1948: all 8 SMs, the last one with 156 elements (a partial warp). A kernel
//      using every instruction; every result word of every SM is checked, and words
//      past the element count must be untouched.
//   3) n = 2100: needs 9 blocks, so launch_overflow must rise and the 8 SMs run full
//      blocks; results of all 2048 elements are checked.
//   4) n = 50 with the first kernel again: a switch of kernel address; 2 warps on SM 0.
//   5) n = 64, a kernel of one LOAD and forty INCs: warp 0 is still issuing INCs when
//      warp 1's LOAD writes back, so the writeback must hold the ALUs off once.
// Each mechanism of the design is counted over the whole run and must occur: ALU,
// LOAD/STORE and SQRT issue, HALT, stall on a busy unit, writeback holding off the
// ALUs, issue while another warp waits (latency hiding), masked store threads and the
// launch overflow.
module tb_gpu_top;
  import gpu_pkg::*;
  localparam int NSM = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, data_in_valid, busy, done, launch_overflow, ic_we, dc_we;
  logic [31:0] data_in, dc_wdata, dc_rdata;
  logic [15:0] elements_num, ic_addr;
  logic [16:0] blocks_num, warps_num;
  logic [19:0] ic_wdata;
  logic [2:0]  dc_sm;
  logic [9:0]  dc_addr;
  sm_events_t [NSM-1:0] events;
  int checks = 0, failures = 0;
  int n_alu, n_lsu, n_sfu, n_halt, n_ustall, n_wbstall, n_hide, n_masked, n_overflow;

  gpu_top dut (.*);

  function automatic logic [19:0] enc_r(opcode_e op, int rd, int rs1, int rs2);
    return {1'b0, 5'(rd), 5'(rs2), 5'(rs1), op};
  endfunction
  function automatic logic [19:0] enc_m(opcode_e op, int r, int addr);
    return {1'b0, 5'(r), 10'(addr), op};
  endfunction
  function automatic logic [31:0] isqrt(logic [31:0] x);
    longint lo = 0, hi = 65536, mid;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      if (mid * mid <= longint'(x)) lo = mid; else hi = mid;
    end
    return 32'(lo);
  endfunction

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
  task automatic dc_write(int sm, int a, logic [31:0] w);
    dc_we = 1; dc_sm = 3'(sm); dc_addr = 10'(a); dc_wdata = w; @(negedge clk); dc_we = 0;
  endtask
  task automatic dc_read(int sm, int a, output logic [31:0] w);
    dc_sm = 3'(sm); dc_addr = 10'(a); #1; w = dc_rdata;
  endtask

  task automatic launch(int pc, int n, output int cycles);
    data_in_valid = 1; data_in = {16'(n), 16'(pc)};
    @(negedge clk); data_in_valid = 0; data_in = $urandom;
    cycles = 0;
    chk(busy, 1, "busy after launch");
    while (!done) begin @(negedge clk); cycles++; end
    chk(elements_num, n, "elements_num");
    chk(blocks_num, (n + 255) / 256, "blocks_num");
    chk(warps_num, (n >= 256) ? 8 : (n + 31) / 32, "warps_num");
  endtask

  always @(posedge clk) begin
    if (rst_n) for (int b = 0; b < NSM; b++) begin
      n_alu     += int'(events[b].alu_issue);
      n_lsu     += int'(events[b].lsu_issue);
      n_sfu     += int'(events[b].sfu_issue);
      n_halt    += int'(events[b].halt_issue);
      n_ustall  += int'(events[b].unit_stall);
      n_wbstall += int'(events[b].wb_stall);
      n_hide    += int'(events[b].hide_issue);
      n_masked  += int'(events[b].lane_masked);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] A [NSM][256], B [NSM][256], w;
  int cycles;

  // clear the result areas and check all SMs after a launch of n elements
  task automatic clear_results();
    for (int b = 0; b < NSM; b++)
      for (int i = 0; i < 256; i++) begin
        dc_write(b, 512 + i, 32'hDEAD_0000 + i);
        dc_write(b, 768 + i, 32'hBEEF_0000 + i);
      end
  endtask

  task automatic check_kernel2(int n);
    for (int b = 0; b < NSM; b++)
      for (int i = 0; i < 256; i++) begin
        logic [31:0] e8, e9, a, bb;
        bit live;
        a = A[b][i]; bb = B[b][i];
        live = (b * 256 + i) < n;
        e8 = (a - bb) + (a & bb);
        e9 = (a | bb) + isqrt(a) + (a + bb + 1);
        dc_read(b, 512 + i, w); chk(w, live ? e8 : 32'hDEAD_0000 + i, $sformatf("SM%0d r8[%0d]", b, i));
        dc_read(b, 768 + i, w); chk(w, live ? e9 : 32'hBEEF_0000 + i, $sformatf("SM%0d r9[%0d]", b, i));
      end
  endtask

  initial begin
    n_alu = 0; n_lsu = 0; n_sfu = 0; n_halt = 0; n_ustall = 0; n_wbstall = 0; n_hide = 0;
    n_masked = 0; n_overflow = 0;
    rst_n = 0; data_in_valid = 0; data_in = 0; ic_we = 0; dc_we = 0;
    ic_addr = 0; ic_wdata = 0; dc_sm = 0; dc_addr = 0; dc_wdata = 0;
    #12 rst_n = 1;
    @(negedge clk);
    chk(done, 1, "done after reset");
    // kernel 1 at 0x300: C = A + B
    ic_write(16'h300, enc_m(OP_LOAD, 1, 0));
    ic_write(16'h301, enc_m(OP_LOAD, 2, 256));
    ic_write(16'h302, enc_r(OP_ADD, 3, 1, 2));
    ic_write(16'h303, enc_m(OP_STORE, 3, 512));
    ic_write(16'h304, enc_r(OP_HALT, 0, 0, 0));
    // kernel 3 at 0x200: D = A + 40, forty INCs after one LOAD
    ic_write(16'h200, enc_m(OP_LOAD, 1, 0));
    for (int k = 1; k <= 40; k++) ic_write(16'h200 + k, enc_r(OP_INC, 1, 0, 0));
    ic_write(16'h229, enc_m(OP_STORE, 1, 512));
    ic_write(16'h22A, enc_r(OP_HALT, 0, 0, 0));
    // kernel 2 at 0x20: every instruction
    ic_write(16'h20, enc_m(OP_LOAD, 1, 0));
    ic_write(16'h21, enc_m(OP_LOAD, 2, 256));
    ic_write(16'h22, enc_r(OP_ADD, 3, 1, 2));
    ic_write(16'h23, enc_r(OP_INC, 3, 0, 0));
    ic_write(16'h24, enc_r(OP_SUB, 4, 1, 2));
    ic_write(16'h25, enc_r(OP_AND, 5, 1, 2));
    ic_write(16'h26, enc_r(OP_OR, 6, 1, 2));
    ic_write(16'h27, enc_r(OP_ADD, 8, 4, 5));
    ic_write(16'h28, enc_m(OP_STORE, 8, 512));
    ic_write(16'h29, enc_r(OP_SQRT, 7, 1, 0));
    ic_write(16'h2A, enc_r(OP_ADD, 9, 6, 7));
    ic_write(16'h2B, enc_r(OP_ADD, 9, 9, 3));
    ic_write(16'h2C, enc_m(OP_STORE, 9, 768));
    ic_write(16'h2D, enc_r(OP_HALT, 0, 0, 0));
    for (int b = 0; b < NSM; b++)
      for (int i = 0; i < 256; i++) begin
        A[b][i] = $urandom; B[b][i] = $urandom;
        dc_write(b, i, A[b][i]); dc_write(b, 256 + i, B[b][i]);
      end
    clear_results();

    // ---- 1) one warp, latency
    launch(16'h300, 32, cycles);
    chk(cycles, 2 + 34 + 34 + 1 + 33 + 1, "one-warp launch latency");
    chk(launch_overflow, 0, "no overflow");
    for (int i = 0; i < 32; i++) begin dc_read(0, 512 + i, w); chk(w, 32'(A[0][i] + B[0][i]), "kernel 1 sum"); end
    for (int b = 1; b < NSM; b++) begin dc_read(b, 512, w); chk(w, 32'hDEAD_0000, "idle SM untouched"); end
    clear_results();

    // ---- 2) 1948 elements
    launch(16'h20, 1948, cycles);
    $display("1948 elements: %0d cycles", cycles);
    chk(launch_overflow, 0, "no overflow");
    check_kernel2(1948);
    clear_results();

    // ---- 3) 2100 elements: overflow
    launch(16'h20, 2100, cycles);
    $display("2100 elements: %0d cycles", cycles);
    chk(launch_overflow, 1, "overflow flagged");
    n_overflow += int'(launch_overflow);
    check_kernel2(2048);
    clear_results();

    // ---- 4) kernel 1 again, 50 elements
    launch(16'h300, 50, cycles);
    for (int i = 0; i < 256; i++) begin
      dc_read(0, 512 + i, w);
      chk(w, i < 50 ? 32'(A[0][i] + B[0][i]) : 32'hDEAD_0000 + i, "kernel 1 on 50 elements");
    end
    clear_results();

    // ---- 5) kernel 3, 64 elements: warp 0 runs INCs while warp 1's LOAD writes back
    launch(16'h200, 64, cycles);
    for (int i = 0; i < 256; i++) begin
      dc_read(0, 512 + i, w);
      chk(w, i < 64 ? 32'(A[0][i] + 40) : 32'hDEAD_0000 + i, "kernel 3 on 64 elements");
    end

    $display("events: alu %0d lsu %0d sfu %0d halt %0d unit_stall %0d wb_stall %0d hide %0d masked %0d overflow %0d",
             n_alu, n_lsu, n_sfu, n_halt, n_ustall, n_wbstall, n_hide, n_masked, n_overflow);
    chk(n_alu > 0, 1, "ALU issue happened");
    chk(n_lsu > 0, 1, "LOAD/STORE issue happened");
    chk(n_sfu > 0, 1, "SQRT issue happened");
    chk(n_halt, 1 + 61 + 64 + 2 + 2, "HALT count = warps launched");
    chk(n_ustall > 0, 1, "busy-unit stall happened");
    chk(n_wbstall > 0, 1, "writeback stall happened");
    chk(n_hide > 0, 1, "latency hiding happened");
    chk(n_masked, 2 * 4 + 14, "masked store threads");
    chk(n_overflow, 1, "overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
