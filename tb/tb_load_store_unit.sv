// tb_load_store_unit - self-checking test of the load/store unit.
// A small memory model stands in for the D-cache. Checks a LOAD (address sequence
// base + warp*32 + t, one per clock, gathered words, writeback request after 32
// transfers, waiting for a delayed grant, release), a STORE with a partly filled warp
// (only active threads written, address wrap-around, release on the 32nd cycle) and
// the cycle counts of both.
module tb_load_store_unit;
  localparam int L = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, start_load, start_store, busy, mem_write, wb_req, wb_grant, done_valid, lane_masked;
  logic [9:0]  base_addr, dm_address;
  logic [2:0]  warp_id, wb_warp, done_warp;
  logic [4:0]  rd, wb_rd;
  logic [5:0]  active_lanes;
  logic [31:0] store_data [L];
  logic [31:0] dm_read [L];
  logic [31:0] dm_write, temp_dm_read;
  logic [31:0] mem [1024];
  logic [31:0] golden [1024];
  int checks = 0, failures = 0;

  load_store_unit #(.LANES(L), .W(32), .AW(10), .NUM_WARPS(8)) dut (.*);

  assign temp_dm_read = mem[dm_address];
  always_ff @(posedge clk) if (mem_write) mem[dm_address] <= dm_write;

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, masked;
    for (int i = 0; i < 1024; i++) begin mem[i] = $urandom; golden[i] = mem[i]; end
    rst_n = 0; start_load = 0; start_store = 0; wb_grant = 0; base_addr = 0; warp_id = 0;
    rd = 0; active_lanes = 0;
    foreach (store_data[i]) store_data[i] = 0;
    #12 rst_n = 1;
    @(negedge clk);
    chk(busy, 0, "idle");
    // ---------------- LOAD, warp 2, base 100
    start_load = 1; base_addr = 100; warp_id = 2; rd = 9; active_lanes = 32;
    @(negedge clk); start_load = 0; base_addr = $urandom; warp_id = $urandom; rd = $urandom;
    cycles = 1;
    for (int t = 0; t < L; t++) begin
      chk(busy, 1, "busy during load");
      chk(dm_address, 100 + 64 + t, "load address");
      chk(mem_write, 0, "no write on load");
      chk(wb_req, 0, "no early wb_req");
      @(negedge clk); cycles++;
    end
    chk(wb_req, 1, "wb_req after 32 transfers");
    chk(cycles, L + 1, "load transfer cycles");
    chk(wb_warp, 2, "wb_warp"); chk(wb_rd, 9, "wb_rd");
    chk(done_valid, 0, "not done before grant");
    @(negedge clk);      // grant held off one cycle
    chk(wb_req, 1, "wb_req held");
    wb_grant = 1; #1;
    chk(done_valid, 1, "done on grant"); chk(done_warp, 2, "done_warp");
    for (int t = 0; t < L; t++) chk(dm_read[t], golden[164 + t], "gathered word");
    @(negedge clk); wb_grant = 0;
    chk(busy, 0, "idle after load");
    // ---------------- STORE, warp 7, base 1000, 20 active threads
    foreach (store_data[i]) store_data[i] = $urandom;
    start_store = 1; base_addr = 1000; warp_id = 7; rd = 3; active_lanes = 20;
    for (int t = 0; t < L; t++) if (t < 20) golden[(1000 + 224 + t) % 1024] = store_data[t];
    @(negedge clk); start_store = 0;
    foreach (store_data[i]) store_data[i] = $urandom;   // captured at issue, so changes do nothing
    masked = 0; cycles = 1;
    for (int t = 0; t < L; t++) begin
      chk(dm_address, (1000 + 224 + t) % 1024, "store address");
      chk(mem_write, t < 20, "store enable");
      if (lane_masked) masked++;
      chk(done_valid, t == L - 1, "store done timing");
      @(negedge clk); cycles++;
    end
    chk(masked, 12, "masked threads");
    chk(busy, 0, "idle after store");
    chk(cycles, L + 1, "store cycles");
    for (int i = 0; i < 1024; i++) chk(mem[i], golden[i], "memory after store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
