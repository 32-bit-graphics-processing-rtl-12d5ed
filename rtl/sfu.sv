// sfu - special function unit of a streaming multiprocessor: integer square root.
//
// One per SM, beside the cores. It computes floor(sqrt(x)) of an unsigned W-bit source
// register for every thread of a warp. Square root is the example the design gives of
// a special function; the digit-by-digit algorithm, the integer format and the serial
// lane order are this design's choices.
//
// At issue the source register of all LANES threads is captured. The unit then works
// on one thread at a time, producing one root bit per clock (W/2 clocks per thread):
//   rem  = (rem << 2) | next two bits of x;  trial = (root << 2) | 1
//   if rem >= trial: rem -= trial, root = 2*root + 1   else root = 2*root
// Each finished root replaces its operand in the buffer. After the last thread the
// unit requests the register write port (wb_req) and, when granted, writes the roots
// of all threads into register rd of the warp in one cycle and releases the warp.
// Timing: issue in cycle 0, LANES*W/2 compute cycles, writeback at the earliest in the
// following cycle. Because it has its own buffer, the cores keep executing other warps
// meanwhile.
module sfu
  import gpu_pkg::*;
#(
  parameter int unsigned LANES     = WARP_SIZE,
  parameter int unsigned W         = WORD_W,
  parameter int unsigned NUM_WARPS = MAX_WARPS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [W-1:0]                 src [LANES],
  input  logic [$clog2(NUM_WARPS)-1:0] warp_id,
  input  logic [REG_AW-1:0]            rd,
  output logic                         busy,
  output logic                         wb_req,
  input  logic                         wb_grant,
  output logic [$clog2(NUM_WARPS)-1:0] wb_warp,
  output logic [REG_AW-1:0]            wb_rd,
  output logic [W-1:0]                 result [LANES],
  output logic                         done_valid,
  output logic [$clog2(NUM_WARPS)-1:0] done_warp
);

  localparam int unsigned CW    = $clog2(LANES);
  localparam int unsigned STEPS = W / 2;
  localparam int unsigned IW    = $clog2(STEPS);
  localparam int unsigned RW    = W / 2 + 2;     // remainder width

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WB} sfu_state_e;

  sfu_state_e                   state;
  logic [CW-1:0]                lane;
  logic [IW-1:0]                iter;
  logic [W-1:0]                 x;
  logic [RW-1:0]                rem;
  logic [W/2-1:0]               root;
  logic [$clog2(NUM_WARPS)-1:0] warp_q;
  logic [REG_AW-1:0]            rd_q;
  logic [W-1:0]                 buf_q [LANES];

  // One digit step.
  logic [W-1:0]   x_in;
  logic [RW-1:0]  rem_in, rem_sh, trial, rem_nx;
  logic [W/2-1:0] root_in, root_nx;

  always_comb begin
    x_in    = (iter == '0) ? buf_q[lane] : x;
    rem_in  = (iter == '0) ? '0 : rem;
    root_in = (iter == '0) ? '0 : root;
    rem_sh  = {rem_in[RW-3:0], x_in[W-1:W-2]};
    trial   = {root_in, 2'b01};
    if (rem_sh >= trial) begin
      rem_nx  = rem_sh - trial;
      root_nx = {root_in[W/2-2:0], 1'b1};
    end else begin
      rem_nx  = rem_sh;
      root_nx = {root_in[W/2-2:0], 1'b0};
    end
  end

  assign busy       = (state != S_IDLE);
  assign wb_req     = (state == S_WB);
  assign wb_warp    = warp_q;
  assign wb_rd      = rd_q;
  assign result     = buf_q;
  assign done_valid = (state == S_WB) && wb_grant;
  assign done_warp  = warp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      lane   <= '0;
      iter   <= '0;
      x      <= '0;
      rem    <= '0;
      root   <= '0;
      warp_q <= '0;
      rd_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          lane <= '0;
          iter <= '0;
          if (start) begin
            warp_q <= warp_id;
            rd_q   <= rd;
            state  <= S_RUN;
          end
        end
        S_RUN: begin
          x    <= {x_in[W-3:0], 2'b00};
          rem  <= rem_nx;
          root <= root_nx;
          if (iter == IW'(STEPS - 1)) begin
            iter <= '0;
            lane <= lane + 1'b1;
            if (lane == CW'(LANES - 1)) state <= S_WB;
          end else begin
            iter <= iter + 1'b1;
          end
        end
        S_WB: if (wb_grant) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Issue rules: a new warp only when idle; a grant only when requested.
  a_issue_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_grant_only_on_request: assert property (@(posedge clk) disable iff (!rst_n)
    wb_grant |-> wb_req);

  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) buf_q <= src;
    else if (state == S_RUN && iter == IW'(STEPS - 1)) buf_q[lane] <= W'(root_nx);
  end

endmodule
