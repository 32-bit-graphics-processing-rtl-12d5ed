// warp_scheduler - keeps the warps of one block and picks the next one to issue.
//
// Each warp has its own program counter and a state: READY (may issue), WAIT (its
// LOAD, STORE or SQRT is still running in the load/store unit or the special function
// unit) or DONE (it executed HALT, or is not part of the block). A launch (start)
// makes warps 0..num_warps-1 READY at start_pc and the rest DONE.
//
// Every cycle the scheduler offers one READY warp, searching round-robin from the warp
// after the one offered last: consecutive instructions of a warp are interleaved with
// those of the other warps, and a warp that waits on a busy unit cannot hold the
// issue slot. When a warp stalls on a long operation the next READY warp issues in
// its place, which hides the memory latency. The round-robin order is this design's
// choice; the design leaves the priority open.
//
// Interface, all decisions made by the dispatch unit in the same cycle:
//   issue  & adv   - the offered warp issued a single-cycle instruction: PC+1
//   issue  & wait_ - the offered warp issued to LSU/SFU: it waits, PC unchanged
//   issue  & halt  - the offered warp is finished
//   cpl_valid[i]/cpl_warp[i] - a unit finished a warp's instruction: PC+1, READY
// all_done is high when no warp is READY or WAIT.
module warp_scheduler
  import gpu_pkg::*;
#(
  parameter int unsigned NUM_WARPS = MAX_WARPS,
  parameter int unsigned NCPL      = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [IADDR_W-1:0]           start_pc,
  input  logic [$clog2(NUM_WARPS):0]   num_warps,
  // offer
  output logic                         sel_valid,
  output logic [$clog2(NUM_WARPS)-1:0] sel_warp,
  output logic [IADDR_W-1:0]           sel_pc,
  // outcome of the offer
  input  logic                         issue,
  input  logic                         adv,
  input  logic                         wait_,
  input  logic                         halt,
  // completions
  input  logic [NCPL-1:0]              cpl_valid,
  input  logic [$clog2(NUM_WARPS)-1:0] cpl_warp [NCPL],
  // status
  output logic                         all_done,
  output logic                         any_waiting
);

  localparam int unsigned WB = $clog2(NUM_WARPS);

  typedef enum logic [1:0] {W_DONE, W_READY, W_WAIT} wstate_e;

  wstate_e            state [NUM_WARPS];
  logic [IADDR_W-1:0] pc    [NUM_WARPS];
  logic [WB-1:0]      rr;     // first warp to consider this cycle

  // Round-robin search for a READY warp starting at rr.
  always_comb begin
    sel_valid = 1'b0;
    sel_warp  = rr;
    for (int k = NUM_WARPS - 1; k >= 0; k--) begin
      if (state[WB'(32'(rr) + k)] == W_READY) begin
        sel_valid = 1'b1;
        sel_warp  = WB'(32'(rr) + k);
      end
    end
  end

  assign sel_pc = pc[sel_warp];

  always_comb begin
    all_done    = 1'b1;
    any_waiting = 1'b0;
    for (int w = 0; w < NUM_WARPS; w++) begin
      if (state[w] != W_DONE) all_done = 1'b0;
      if (state[w] == W_WAIT) any_waiting = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int w = 0; w < NUM_WARPS; w++) begin
        state[w] <= W_DONE;
        pc[w]    <= '0;
      end
    end else if (start) begin
      rr <= '0;
      for (int w = 0; w < NUM_WARPS; w++) begin
        state[w] <= (w < 32'(num_warps)) ? W_READY : W_DONE;
        pc[w]    <= start_pc;
      end
    end else begin
      if (sel_valid) rr <= WB'(32'(sel_warp) + 1);
      if (sel_valid && issue) begin
        if (halt)       state[sel_warp] <= W_DONE;
        else if (wait_) state[sel_warp] <= W_WAIT;
        else if (adv)   pc[sel_warp]    <= sel_pc + 1'b1;
      end
      for (int i = 0; i < NCPL; i++) begin
        if (cpl_valid[i]) begin
          state[cpl_warp[i]] <= W_READY;
          pc[cpl_warp[i]]    <= pc[cpl_warp[i]] + 1'b1;
        end
      end
    end
  end

  // A unit can only complete a warp that is waiting for it.
  for (genvar i = 0; i < NCPL; i++) begin : g_cpl_check
    a_cpl_waiting: assert property (@(posedge clk) disable iff (!rst_n || start)
      cpl_valid[i] |-> state[cpl_warp[i]] == W_WAIT);
  end

endmodule
