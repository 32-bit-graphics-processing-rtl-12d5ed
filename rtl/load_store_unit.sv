// load_store_unit - moves a warp's operands between the D-cache and the registers.
//
// One per SM. The elements of an array sit in consecutive D-cache words, so the unit
// needs only the first address, taken from bits [13:4] of the LOAD or STORE word. A
// count register then steps the address by one per clock: thread t of warp w uses
//   dM_address = base + w*LANES + t          (t = 0 .. LANES-1, modulo the cache size)
// The warp term, which places the warps of a block one after another, is this
// design's reading of how warp and thread IDs locate an element.
//
// LOAD : the word read in each cycle lands in entry t of the dM_read buffer. After
//        the LANES-th word the unit asks for the register write port (wb_req); when
//        granted all LANES cores write their own entry into register rd of warp w in
//        one cycle (the MemtoReg path) and the warp is released (done_valid).
// STORE: the source register of every thread is captured in dM_write at issue; each
//        cycle one entry is written to the D-cache (MemWrite). Threads at or beyond
//        active_lanes, which hold no element, are skipped. The warp is released with
//        the last write.
// Timing: issue in cycle 0, transfers in cycles 1..LANES, a LOAD writes back in cycle
// LANES+1 at the earliest. busy is high from the cycle after issue until release.
module load_store_unit
  import gpu_pkg::*;
#(
  parameter int unsigned LANES     = WARP_SIZE,
  parameter int unsigned W         = WORD_W,
  parameter int unsigned AW        = DADDR_W,
  parameter int unsigned NUM_WARPS = MAX_WARPS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // issue
  input  logic                         start_load,
  input  logic                         start_store,
  input  logic [AW-1:0]                base_addr,
  input  logic [$clog2(NUM_WARPS)-1:0] warp_id,
  input  logic [REG_AW-1:0]            rd,
  input  logic [$clog2(LANES):0]       active_lanes,
  input  logic [W-1:0]                 store_data [LANES],
  output logic                         busy,
  // D-cache port
  output logic [AW-1:0]                dm_address,
  output logic                         mem_write,
  output logic [W-1:0]                 dm_write,
  input  logic [W-1:0]                 temp_dm_read,
  // register writeback
  output logic                         wb_req,
  input  logic                         wb_grant,
  output logic [$clog2(NUM_WARPS)-1:0] wb_warp,
  output logic [REG_AW-1:0]            wb_rd,
  output logic [W-1:0]                 dm_read [LANES],
  // completion
  output logic                         done_valid,
  output logic [$clog2(NUM_WARPS)-1:0] done_warp,
  output logic                         lane_masked
);

  localparam int unsigned CW = $clog2(LANES);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STORE, S_WB} lsu_state_e;

  lsu_state_e                   state;
  logic [CW-1:0]                cnt;
  logic [AW-1:0]                load_address;
  logic [$clog2(NUM_WARPS)-1:0] warp_q;
  logic [REG_AW-1:0]            rd_q;
  logic [$clog2(LANES):0]       active_q;
  logic [W-1:0]                 wbuf [LANES];
  logic                         last;

  assign busy       = (state != S_IDLE);
  assign last       = (cnt == CW'(LANES - 1));
  assign dm_address = load_address + AW'(32'(warp_q) * LANES) + AW'(cnt);
  assign dm_write   = wbuf[cnt];
  assign mem_write  = (state == S_STORE) && ({1'b0, cnt} < active_q);
  assign lane_masked = (state == S_STORE) && !({1'b0, cnt} < active_q);
  assign wb_req     = (state == S_WB);
  assign wb_warp    = warp_q;
  assign wb_rd      = rd_q;
  assign done_valid = (state == S_WB && wb_grant) || (state == S_STORE && last);
  assign done_warp  = warp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      load_address <= '0;
      warp_q       <= '0;
      rd_q         <= '0;
      active_q     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (start_load || start_store) begin
            load_address <= base_addr;
            warp_q       <= warp_id;
            rd_q         <= rd;
            active_q     <= active_lanes;
            state        <= start_load ? S_LOAD : S_STORE;
          end
        end
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (last) state <= S_WB;
        end
        S_STORE: begin
          cnt <= cnt + 1'b1;
          if (last) state <= S_IDLE;
        end
        S_WB: if (wb_grant) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Issue rules: one operation at a time, and never a load and a store together.
  a_issue_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (start_load || start_store) |-> !busy);
  a_one_kind: assert property (@(posedge clk) disable iff (!rst_n)
    !(start_load && start_store));
  a_grant_only_on_request: assert property (@(posedge clk) disable iff (!rst_n)
    wb_grant |-> wb_req);

  // Data buffers (not reset: every entry is written before it is used).
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start_store) wbuf <= store_data;
    if (state == S_LOAD) dm_read[cnt] <= temp_dm_read;
  end

endmodule
