// tb_sfu - self-checking test of the special function unit (integer square root).
// Issues two warps of operands (random, perfect squares, 0, 1 and 2^32-1), checks
// every root against floor(sqrt(x)) found here by a binary search, checks that the
// writeback request comes after 32*16 compute cycles and waits for its grant, and
// that the warp number and register are carried through.
module tb_sfu;
  localparam int L = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n, start, busy, wb_req, wb_grant, done_valid;
  logic [31:0] src [L];
  logic [31:0] result [L];
  logic [2:0]  warp_id, wb_warp, done_warp;
  logic [4:0]  rd, wb_rd;
  int checks = 0, failures = 0;

  sfu #(.LANES(L), .W(32), .NUM_WARPS(8)) dut (.*);

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

  task automatic run(int w, int r, int grant_delay);
    logic [31:0] x [L];
    int cycles;
    for (int i = 0; i < L; i++) begin
      case (i % 4)
        0: x[i] = $urandom;
        1: begin int unsigned q = $urandom_range(0, 65535); x[i] = q * q; end
        2: begin int unsigned q = $urandom_range(1, 65535); x[i] = q * q - 1; end
        default: x[i] = $urandom_range(0, 1000);
      endcase
    end
    x[0] = 0; x[1] = 1; x[2] = 32'hFFFF_FFFF;
    src = x; warp_id = 3'(w); rd = 5'(r); start = 1;
    @(negedge clk); start = 0;
    foreach (src[i]) src[i] = $urandom;
    cycles = 1;
    while (!wb_req && cycles < 2000) begin
      chk(busy, 1, "busy");
      @(negedge clk); cycles++;
    end
    chk(cycles, 1 + L * 16, "cycles to writeback request");
    repeat (grant_delay) begin @(negedge clk); chk(wb_req, 1, "request held"); end
    wb_grant = 1; #1;
    chk(done_valid, 1, "done on grant");
    chk(wb_warp, w, "wb_warp"); chk(wb_rd, r, "wb_rd"); chk(done_warp, w, "done_warp");
    for (int i = 0; i < L; i++) chk(result[i], isqrt(x[i]), $sformatf("sqrt(%0d)", x[i]));
    @(negedge clk); wb_grant = 0;
    chk(busy, 0, "idle");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; wb_grant = 0; warp_id = 0; rd = 0;
    foreach (src[i]) src[i] = 0;
    #12 rst_n = 1;
    @(negedge clk);
    run(5, 17, 0);
    run(2, 30, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
