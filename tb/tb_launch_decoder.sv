// tb_launch_decoder - self-checking test of the launch-word decoder.
// Applies launch words with element counts that fill part of a warp, exactly one
// block, several blocks and more blocks than SMs, and compares every decoded field
// with values computed here; also checks the one-cycle launch pulse.
module tb_launch_decoder;
  localparam int NSM = 8, BS = 256, WS = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst_n, data_in_valid, launch, overflow;
  logic [31:0] data_in;
  logic [15:0] i_address, elements_num;
  logic [16:0] blocks_num, warps_num;
  logic [8:0]  sm_elems [NSM];
  int checks = 0, failures = 0;

  launch_decoder #(.NSM(NSM), .BSIZE(BS), .WSIZE(WS)) dut (
    .clk(clk), .rst_n(rst_n), .data_in_valid(data_in_valid), .data_in(data_in),
    .launch(launch), .i_address(i_address), .elements_num(elements_num),
    .blocks_num(blocks_num), .warps_num(warps_num), .sm_elems(sm_elems), .overflow(overflow));

  task automatic chk(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic run(int n, int addr);
    int blocks, warps, e;
    @(negedge clk);
    data_in = {16'(n), 16'(addr)}; data_in_valid = 1;
    #1; chk(launch, 0, "no pulse before edge");
    @(negedge clk); data_in_valid = 0; data_in = $urandom;
    blocks = (n + BS - 1) / BS;
    warps  = (n + WS - 1) / WS; if (warps > BS / WS) warps = BS / WS;
    chk(launch, 1, "launch pulse");
    chk(i_address, addr, "i_address");
    chk(elements_num, n, "elements_num");
    chk(blocks_num, blocks, "blocks_num");
    chk(warps_num, warps, "warps_num");
    chk(overflow, blocks > NSM, "overflow");
    for (int b = 0; b < NSM; b++) begin
      e = n - b * BS; if (e < 0) e = 0; if (e > BS) e = BS;
      chk(sm_elems[b], e, $sformatf("sm_elems[%0d]", b));
    end
    @(negedge clk);
    chk(launch, 0, "pulse is one cycle");
    chk(blocks_num, blocks, "fields held");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; data_in_valid = 0; data_in = 0;
    #12 rst_n = 1;
    run(50, 16'h0010);     // the example: 50 elements -> 2 warps
    run(256, 0);
    run(300, 16'h1234);
    run(2048, 7);
    run(3000, 16'hFFFF);   // more blocks than SMs
    run(0, 3);
    run(1, 9);
    for (int i = 0; i < 20; i++) run($urandom_range(0, 65535), $urandom_range(0, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
