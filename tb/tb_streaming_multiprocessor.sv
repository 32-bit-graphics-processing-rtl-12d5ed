// tb_streaming_multiprocessor - self-checking test of one streaming multiprocessor.
// 1) A single warp runs LOAD, LOAD, ADD, HALT; the cycle count is checked against
//    34 cycles per LOAD (issue, 32 transfers, writeback), 1 per ADD and 1 per HALT.
// 2) A block of 200 elements (7 warps, the last one with 8 threads) runs a kernel
//    using every instruction: two loads, ADD, INC, SUB, AND, OR, SQRT and two stores.
//    Results are compared with values computed here, words past the block's 200
//    elements must stay untouched, and each scheduling mechanism (stall on a busy
//    unit, writeback holding off ALU issue, issue while another warp waits, masked
//    store threads) must have happened.
module tb_streaming_multiprocessor;
  import gpu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, start, done, ic_we, dc_we;
  logic [15:0] start_pc, ic_addr;
  logic [8:0]  num_elems;
  logic [19:0] ic_wdata;
  logic [9:0]  dc_addr;
  logic [31:0] dc_wdata, dc_rdata;
  sm_events_t  events;
  int checks = 0, failures = 0;
  int n_alu, n_lsu, n_sfu, n_halt, n_ustall, n_wbstall, n_hide, n_masked;

  streaming_multiprocessor dut (.*);

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
  task automatic dc_write(int a, logic [31:0] w);
    dc_we = 1; dc_addr = 10'(a); dc_wdata = w; @(negedge clk); dc_we = 0;
  endtask
  task automatic dc_read(int a, output logic [31:0] w);
    dc_addr = 10'(a); #1; w = dc_rdata;
  endtask

  task automatic run(int pc, int n, output int cycles);
    start = 1; start_pc = 16'(pc); num_elems = 9'(n);
    @(negedge clk); start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_alu     += int'(events.alu_issue);
    n_lsu     += int'(events.lsu_issue);
    n_sfu     += int'(events.sfu_issue);
    n_halt    += int'(events.halt_issue);
    n_ustall  += int'(events.unit_stall);
    n_wbstall += int'(events.wb_stall);
    n_hide    += int'(events.hide_issue);
    n_masked  += int'(events.lane_masked);
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] A [256], B [256], w;
  int cycles;
  initial begin
    n_alu = 0; n_lsu = 0; n_sfu = 0; n_halt = 0; n_ustall = 0; n_wbstall = 0; n_hide = 0; n_masked = 0;
    rst_n = 0; start = 0; ic_we = 0; dc_we = 0; start_pc = 0; num_elems = 0;
    ic_addr = 0; ic_wdata = 0; dc_addr = 0; dc_wdata = 0;
    #12 rst_n = 1;
    @(negedge clk);
    // kernel 1 at 0x100 (wraps into the 1024-word cache as index 256)
    ic_write(16'h100, enc_m(OP_LOAD, 1, 0));
    ic_write(16'h101, enc_m(OP_LOAD, 2, 256));
    ic_write(16'h102, enc_r(OP_ADD, 3, 1, 2));
    ic_write(16'h103, enc_m(OP_STORE, 3, 512));
    ic_write(16'h104, enc_r(OP_HALT, 0, 0, 0));
    // kernel 2 at 0x10
    ic_write(16'h10, enc_m(OP_LOAD, 1, 0));
    ic_write(16'h11, enc_m(OP_LOAD, 2, 256));
    ic_write(16'h12, enc_r(OP_ADD, 3, 1, 2));
    ic_write(16'h13, enc_r(OP_INC, 3, 0, 0));
    ic_write(16'h14, enc_r(OP_SUB, 4, 1, 2));
    ic_write(16'h15, enc_r(OP_AND, 5, 1, 2));
    ic_write(16'h16, enc_r(OP_OR, 6, 1, 2));
    ic_write(16'h17, enc_r(OP_ADD, 8, 4, 5));   // (A-B) + (A&B)
    ic_write(16'h18, enc_m(OP_STORE, 8, 512));
    ic_write(16'h19, enc_r(OP_SQRT, 7, 1, 0));
    ic_write(16'h1A, enc_r(OP_ADD, 9, 6, 7));   // (A|B) + sqrt(A)
    ic_write(16'h1B, enc_r(OP_ADD, 9, 9, 3));   // + (A+B+1)
    ic_write(16'h1C, enc_m(OP_STORE, 9, 768));
    ic_write(16'h1D, enc_r(OP_HALT, 0, 0, 0));
    for (int i = 0; i < 256; i++) begin
      A[i] = $urandom; B[i] = $urandom;
      dc_write(i, A[i]); dc_write(256 + i, B[i]);
      dc_write(512 + i, 32'hDEAD_0000 + i); dc_write(768 + i, 32'hBEEF_0000 + i);
    end
    // ---- 1) one warp, cycle count
    run(16'h100, 32, cycles);
    chk(cycles, 34 + 34 + 1 + 33 + 1, "single-warp cycles");
    for (int i = 0; i < 32; i++) begin dc_read(512 + i, w); chk(w, 32'(A[i] + B[i]), "kernel 1 sum"); end
    dc_read(512 + 32, w); chk(w, 32'hDEAD_0000 + 32, "kernel 1 leaves warp 1 data alone");
    for (int i = 0; i < 32; i++) dc_write(512 + i, 32'hDEAD_0000 + i);
    // ---- 2) 200 elements
    run(16'h10, 200, cycles);
    $display("200-element kernel took %0d cycles", cycles);
    for (int i = 0; i < 256; i++) begin
      logic [31:0] e8, e9;
      e8 = (A[i] - B[i]) + (A[i] & B[i]);
      e9 = (A[i] | B[i]) + isqrt(A[i]) + (A[i] + B[i] + 1);
      dc_read(512 + i, w); chk(w, i < 200 ? e8 : 32'hDEAD_0000 + i, $sformatf("r8 of element %0d", i));
      dc_read(768 + i, w); chk(w, i < 200 ? e9 : 32'hBEEF_0000 + i, $sformatf("r9 of element %0d", i));
    end
    $display("events: alu %0d lsu %0d sfu %0d halt %0d unit_stall %0d wb_stall %0d hide %0d masked %0d",
             n_alu, n_lsu, n_sfu, n_halt, n_ustall, n_wbstall, n_hide, n_masked);
    chk(n_alu, 1 + 7 * 8, "ALU issues");
    chk(n_lsu, 3 + 7 * 4, "LSU issues");
    chk(n_sfu, 7, "SFU issues");
    chk(n_halt, 8, "halts");
    chk(n_masked, 2 * 24, "masked store threads");
    chk(n_ustall > 0, 1, "unit stall seen");
    chk(n_wbstall > 0, 1, "writeback stall seen");
    chk(n_hide > 0, 1, "latency hiding seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
