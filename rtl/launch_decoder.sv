// launch_decoder - decodes the host's 32-bit launch word and splits the work.
//
// The host starts a kernel with one word, data_IN: the lower 16 bits are the I-cache
// address of the kernel's first instruction (i_address), the upper 16 bits the number
// of data elements n (elements_num). From n the decoder derives
//   blocks_num = ceil(n / BLOCK_SIZE)              thread blocks, one per SM
//   warps_num  = min(ceil(n / WARP_SIZE), WPB)     warps in a (full) block, WPB = 8
//   sm_elems[b] = clamp(n - b*BLOCK_SIZE, 0, BLOCK_SIZE)   elements handed to SM b
// Block b is launched on SM b. A launch needing more blocks than there are SMs sets
// overflow; the blocks beyond the last SM are then not run (this design's choice,
// the design does not say what happens then).
//
// Timing: data_IN is captured at the clock edge where data_in_valid is high; the
// decoded fields are valid from the next cycle on, together with a one-cycle launch
// pulse that starts the SMs. Reset clears all fields.
module launch_decoder
  import gpu_pkg::*;
#(
  parameter int unsigned NSM   = NUM_SM,
  parameter int unsigned BSIZE = BLOCK_SIZE,
  parameter int unsigned WSIZE = WARP_SIZE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     data_in_valid,
  input  logic [31:0]              data_in,
  output logic                     launch,
  output logic [IADDR_W-1:0]       i_address,
  output logic [15:0]              elements_num,
  output logic [16:0]              blocks_num,
  output logic [16:0]              warps_num,
  output logic [$clog2(BSIZE):0]   sm_elems [NSM],
  output logic                     overflow
);

  localparam int unsigned WPB = BSIZE / WSIZE;
  localparam int unsigned EW  = $clog2(BSIZE) + 1;

  logic [15:0] n;
  logic [16:0] blocks_c, warps_all_c, warps_c;
  logic [EW-1:0] sm_elems_c [NSM];

  assign n = data_in[31:16];

  always_comb begin
    blocks_c    = (17'(n) + 17'(BSIZE - 1)) / 17'(BSIZE);
    warps_all_c = (17'(n) + 17'(WSIZE - 1)) / 17'(WSIZE);
    warps_c     = (warps_all_c > 17'(WPB)) ? 17'(WPB) : warps_all_c;
    for (int b = 0; b < NSM; b++) begin
      if (32'(n) <= b * BSIZE)             sm_elems_c[b] = '0;
      else if (32'(n) - b * BSIZE >= BSIZE) sm_elems_c[b] = EW'(BSIZE);
      else                                 sm_elems_c[b] = EW'(32'(n) - b * BSIZE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch       <= 1'b0;
      i_address    <= '0;
      elements_num <= '0;
      blocks_num   <= '0;
      warps_num    <= '0;
      overflow     <= 1'b0;
      for (int b = 0; b < NSM; b++) sm_elems[b] <= '0;
    end else begin
      launch <= data_in_valid;
      if (data_in_valid) begin
        i_address    <= data_in[15:0];
        elements_num <= n;
        blocks_num   <= blocks_c;
        warps_num    <= warps_c;
        overflow     <= blocks_c > 17'(NSM);
        for (int b = 0; b < NSM; b++) sm_elems[b] <= sm_elems_c[b];
      end
    end
  end

endmodule
