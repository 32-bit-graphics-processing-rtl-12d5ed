// gpu_top - 32-bit SIMT graphics processing unit: NSM streaming multiprocessors.
//
// The host places a kernel in the instruction caches (the ic_* port writes the same
// word into every SM's I-cache, since all SMs run the same kernel), fills each SM's
// D-cache with its block of operands (dc_* port, SM chosen by dc_sm), and then starts
// the kernel with one 32-bit word on data_in: the lower 16 bits are the I-cache
// address of the first instruction, the upper 16 bits the number of elements n.
// The launch decoder splits n into blocks of BLOCK_SIZE (256) elements; block b runs
// on SM b, where it is cut into warps of WARP_SIZE (32) threads. A launch needing
// more blocks than SMs raises launch_overflow and runs only the first NSM blocks.
//
// busy rises in the cycle after data_in_valid and falls when every SM has executed
// HALT on all its warps; done is its inverse. The host then reads the results through
// the dc_* port. The D-cache host port stands in for the external DRAM path, which is
// not part of this design. events gives each SM's per-cycle event pulses.
module gpu_top
  import gpu_pkg::*;
#(
  parameter int unsigned NSM       = NUM_SM,
  parameter int unsigned LANES     = WARP_SIZE,
  parameter int unsigned NUM_WARPS = MAX_WARPS,
  parameter int unsigned IC_DEPTH  = 1024,
  parameter int unsigned DC_DEPTH  = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // kernel launch (data_IN)
  input  logic                        data_in_valid,
  input  logic [31:0]                 data_in,
  output logic                        busy,
  output logic                        done,
  output logic                        launch_overflow,
  output logic [15:0]                 elements_num,
  output logic [16:0]                 blocks_num,
  output logic [16:0]                 warps_num,
  // host access to the caches
  input  logic                        ic_we,
  input  logic [IADDR_W-1:0]          ic_addr,
  input  logic [INSTR_W-1:0]          ic_wdata,
  input  logic                        dc_we,
  input  logic [$clog2(NSM)-1:0]      dc_sm,
  input  logic [$clog2(DC_DEPTH)-1:0] dc_addr,
  input  logic [WORD_W-1:0]           dc_wdata,
  output logic [WORD_W-1:0]           dc_rdata,
  // per-SM event pulses
  output sm_events_t [NSM-1:0]        events
);

  localparam int unsigned BSIZE = LANES * NUM_WARPS;
  localparam int unsigned EB    = $clog2(BSIZE) + 1;

  logic                 launch;
  logic [IADDR_W-1:0]   i_address;
  logic [EB-1:0]        sm_elems [NSM];
  logic [NSM-1:0]       sm_done;
  logic [WORD_W-1:0]    sm_rdata [NSM];
  logic                 launch_d, running;

  launch_decoder #(.NSM(NSM), .BSIZE(BSIZE), .WSIZE(LANES)) u_launch (
    .clk           (clk),
    .rst_n         (rst_n),
    .data_in_valid (data_in_valid),
    .data_in       (data_in),
    .launch        (launch),
    .i_address     (i_address),
    .elements_num  (elements_num),
    .blocks_num    (blocks_num),
    .warps_num     (warps_num),
    .sm_elems      (sm_elems),
    .overflow      (launch_overflow)
  );

  for (genvar b = 0; b < NSM; b++) begin : g_sm
    streaming_multiprocessor #(
      .LANES     (LANES),
      .NUM_WARPS (NUM_WARPS),
      .IC_DEPTH  (IC_DEPTH),
      .DC_DEPTH  (DC_DEPTH)
    ) u_sm (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (launch && (sm_elems[b] != '0)),
      .start_pc  (i_address),
      .num_elems (sm_elems[b]),
      .done      (sm_done[b]),
      .ic_we     (ic_we),
      .ic_addr   (ic_addr),
      .ic_wdata  (ic_wdata),
      .dc_we     (dc_we && (32'(dc_sm) == b)),
      .dc_addr   (dc_addr),
      .dc_wdata  (dc_wdata),
      .dc_rdata  (sm_rdata[b]),
      .events    (events[b])
    );
  end

  assign dc_rdata = sm_rdata[dc_sm];

  // Kernel in flight from data_in_valid until every SM reports all warps halted. The
  // SMs' status is ignored for two cycles after the launch pulse, until it reflects
  // the new launch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch_d <= 1'b0;
      running  <= 1'b0;
    end else begin
      launch_d <= launch;
      if (data_in_valid)                           running <= 1'b1;
      else if (!launch && !launch_d && &sm_done)   running <= 1'b0;
    end
  end

  assign busy = running;
  assign done = !running;

endmodule
