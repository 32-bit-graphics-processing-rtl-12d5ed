// streaming_multiprocessor - one SM: runs one thread block of the kernel.
//
// Contents: an I-cache, a warp scheduler, a dispatch unit (with the control logic),
// LANES ALU cores each with its own register file, one load/store unit, one special
// function unit (square root) and a D-cache. The cores and register files are
// generated in a loop, one pair per thread of a warp.
//
// A launch (start) gives the kernel's first instruction address and the number of
// elements of this block (num_elems, at most LANES*NUM_WARPS). The block is cut into
// ceil(num_elems/LANES) warps; the last warp may be partly filled, and its threads
// beyond the element count are not stored to memory.
//
// Each cycle the scheduler offers one ready warp and the I-cache returns its
// instruction at once. The dispatch unit issues it when its unit is free:
//  * ADD/SUB/AND/OR/INC - all cores read their two operands of that warp, compute,
//    and write the destination register at the clock edge: one cycle for the whole
//    warp. The warp's PC advances.
//  * LOAD/STORE - handed to the load/store unit, which moves one element per cycle.
//    The warp waits; other warps keep issuing ALU work meanwhile (latency hiding).
//  * SQRT - handed to the special function unit, which works for LANES*16 cycles.
//  * HALT - the warp is finished. done rises when every warp has finished.
// The register files have one write port, shared by the ALU results and the
// writebacks of LOAD (the MemtoReg path) and SQRT; a pending writeback holds ALU
// issue off for that cycle.
//
// The host ports load the I-cache and read or write the D-cache; use them only while
// the SM is idle. events pulses one bit per cycle for each mechanism above.
module streaming_multiprocessor
  import gpu_pkg::*;
#(
  parameter int unsigned LANES     = WARP_SIZE,
  parameter int unsigned NUM_WARPS = MAX_WARPS,
  parameter int unsigned NREGS     = NUM_REGS,
  parameter int unsigned IC_DEPTH  = 1024,
  parameter int unsigned DC_DEPTH  = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // launch
  input  logic                          start,
  input  logic [IADDR_W-1:0]            start_pc,
  input  logic [$clog2(LANES*NUM_WARPS):0] num_elems,
  output logic                          done,
  // host access
  input  logic                          ic_we,
  input  logic [IADDR_W-1:0]            ic_addr,
  input  logic [INSTR_W-1:0]            ic_wdata,
  input  logic                          dc_we,
  input  logic [$clog2(DC_DEPTH)-1:0]   dc_addr,
  input  logic [WORD_W-1:0]             dc_wdata,
  output logic [WORD_W-1:0]             dc_rdata,
  // performance events
  output sm_events_t                    events
);

  localparam int unsigned WB  = $clog2(NUM_WARPS);
  localparam int unsigned LB  = $clog2(LANES);
  localparam int unsigned EB  = $clog2(LANES*NUM_WARPS) + 1;
  localparam int unsigned DAW = $clog2(DC_DEPTH);

  // ---------------------------------------------------------------- launch
  logic [EB-1:0]  elems_q;
  logic [WB:0]    num_warps;

  assign num_warps = (WB+1)'((32'(num_elems) + LANES - 1) / LANES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     elems_q <= '0;
    else if (start) elems_q <= num_elems;
  end

  // ---------------------------------------------------------------- scheduling
  logic               sel_valid;
  logic [WB-1:0]      sel_warp;
  logic [IADDR_W-1:0] sel_pc;
  logic [INSTR_W-1:0] instruction;
  logic               any_waiting;
  logic [1:0]         cpl_valid;
  logic [WB-1:0]      cpl_warp [2];

  ctrl_t              ctrl;
  logic [REG_AW-1:0]  selr1, selr2, selrin;
  logic [DADDR_W-1:0] mem_addr;
  logic               issue, alu_issue, lsu_issue, sfu_issue, halt_issue;
  logic               unit_stall, wb_stall;
  logic               lsu_busy, sfu_busy, lsu_wb_req, sfu_wb_req, lsu_wb_grant, sfu_wb_grant;

  icache #(.DEPTH(IC_DEPTH)) u_icache (
    .clk             (clk),
    .pc              (sel_pc),
    .instruction_mem (instruction),
    .wr_en           (ic_we),
    .wr_addr         (ic_addr),
    .wr_data         (ic_wdata)
  );

  warp_scheduler #(.NUM_WARPS(NUM_WARPS), .NCPL(2)) u_sched (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .start_pc    (start_pc),
    .num_warps   (num_warps),
    .sel_valid   (sel_valid),
    .sel_warp    (sel_warp),
    .sel_pc      (sel_pc),
    .issue       (issue),
    .adv         (ctrl.pc_write),
    .wait_       (lsu_issue || sfu_issue),
    .halt        (halt_issue),
    .cpl_valid   (cpl_valid),
    .cpl_warp    (cpl_warp),
    .all_done    (done),
    .any_waiting (any_waiting)
  );

  dispatch_unit u_dispatch (
    .sel_valid    (sel_valid),
    .instruction  (instruction),
    .lsu_busy     (lsu_busy),
    .sfu_busy     (sfu_busy),
    .lsu_wb_req   (lsu_wb_req),
    .sfu_wb_req   (sfu_wb_req),
    .ctrl         (ctrl),
    .selr1        (selr1),
    .selr2        (selr2),
    .selrin       (selrin),
    .mem_addr     (mem_addr),
    .issue        (issue),
    .alu_issue    (alu_issue),
    .lsu_issue    (lsu_issue),
    .sfu_issue    (sfu_issue),
    .halt_issue   (halt_issue),
    .unit_stall   (unit_stall),
    .wb_stall     (wb_stall),
    .lsu_wb_grant (lsu_wb_grant),
    .sfu_wb_grant (sfu_wb_grant)
  );

  // ---------------------------------------------------------------- cores
  logic [WORD_W-1:0] r1 [LANES];
  logic [WORD_W-1:0] r2 [LANES];
  logic [WORD_W-1:0] result_1 [LANES];
  logic [WORD_W-1:0] dm_read [LANES];
  logic [WORD_W-1:0] sfu_result [LANES];

  logic              rf_we;
  logic [WB-1:0]     rf_wr_warp;
  logic [REG_AW-1:0] rf_selrin;
  logic [WB-1:0]     lsu_wb_warp, sfu_wb_warp;
  logic [REG_AW-1:0] lsu_wb_rd, sfu_wb_rd;

  // Write-port selection: LOAD writeback (MemtoReg), then SQRT writeback, then ALU.
  always_comb begin
    rf_we      = alu_issue && ctrl.reg_write;
    rf_wr_warp = sel_warp;
    rf_selrin  = selrin;
    if (lsu_wb_grant) begin
      rf_we = 1'b1; rf_wr_warp = lsu_wb_warp; rf_selrin = lsu_wb_rd;
    end else if (sfu_wb_grant) begin
      rf_we = 1'b1; rf_wr_warp = sfu_wb_warp; rf_selrin = sfu_wb_rd;
    end
  end

  for (genvar core_id = 0; core_id < LANES; core_id++) begin : g_core
    logic [WORD_W-1:0] rin;

    always_comb begin
      if (lsu_wb_grant)      rin = dm_read[core_id];
      else if (sfu_wb_grant) rin = sfu_result[core_id];
      else                   rin = result_1[core_id];
    end

    register_file #(.W(WORD_W), .NREGS(NREGS), .NUM_WARPS(NUM_WARPS)) u_rf (
      .clk     (clk),
      .rd_warp (sel_warp),
      .selr1   (selr1[$clog2(NREGS)-1:0]),
      .selr2   (selr2[$clog2(NREGS)-1:0]),
      .r1      (r1[core_id]),
      .r2      (r2[core_id]),
      .we      (rf_we),
      .wr_warp (rf_wr_warp),
      .selrin  (rf_selrin[$clog2(NREGS)-1:0]),
      .rin     (rin)
    );

    alu_core #(.W(WORD_W)) u_core (
      .func   (ctrl.alu_control),
      .a      (r1[core_id]),
      .b      (r2[core_id]),
      .result (result_1[core_id])
    );
  end

  // ---------------------------------------------------------------- load/store
  logic [DAW-1:0]    dm_address;
  logic              mem_write;
  logic [WORD_W-1:0] dm_write, temp_dm_read;
  logic [LB:0]       active_lanes;
  logic              lsu_done, lsu_masked;
  logic [WB-1:0]     lsu_done_warp;

  // Threads of the offered warp that hold an element.
  always_comb begin
    int unsigned first;
    first = 32'(sel_warp) * LANES;
    if (32'(elems_q) >= first + LANES) active_lanes = (LB+1)'(LANES);
    else if (32'(elems_q) > first)     active_lanes = (LB+1)'(32'(elems_q) - first);
    else                               active_lanes = '0;
  end

  load_store_unit #(.LANES(LANES), .W(WORD_W), .AW(DAW), .NUM_WARPS(NUM_WARPS)) u_lsu (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_load   (lsu_issue && ctrl.mem_read),
    .start_store  (lsu_issue && ctrl.mem_write),
    .base_addr    (DAW'(mem_addr)),
    .warp_id      (sel_warp),
    .rd           (selrin),
    .active_lanes (active_lanes),
    .store_data   (r1),
    .busy         (lsu_busy),
    .dm_address   (dm_address),
    .mem_write    (mem_write),
    .dm_write     (dm_write),
    .temp_dm_read (temp_dm_read),
    .wb_req       (lsu_wb_req),
    .wb_grant     (lsu_wb_grant),
    .wb_warp      (lsu_wb_warp),
    .wb_rd        (lsu_wb_rd),
    .dm_read      (dm_read),
    .done_valid   (lsu_done),
    .done_warp    (lsu_done_warp),
    .lane_masked  (lsu_masked)
  );

  dcache #(.DEPTH(DC_DEPTH), .W(WORD_W)) u_dcache (
    .clk          (clk),
    .dm_address   (dm_address),
    .mem_write    (mem_write),
    .dm_write     (dm_write),
    .temp_dm_read (temp_dm_read),
    .host_addr    (dc_addr),
    .host_we      (dc_we),
    .host_wdata   (dc_wdata),
    .host_rdata   (dc_rdata)
  );

  // ---------------------------------------------------------------- special function
  logic          sfu_done;
  logic [WB-1:0] sfu_done_warp;

  sfu #(.LANES(LANES), .W(WORD_W), .NUM_WARPS(NUM_WARPS)) u_sfu (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (sfu_issue),
    .src        (r1),
    .warp_id    (sel_warp),
    .rd         (selrin),
    .busy       (sfu_busy),
    .wb_req     (sfu_wb_req),
    .wb_grant   (sfu_wb_grant),
    .wb_warp    (sfu_wb_warp),
    .wb_rd      (sfu_wb_rd),
    .result     (sfu_result),
    .done_valid (sfu_done),
    .done_warp  (sfu_done_warp)
  );

  // The register write port has one writer per clock.
  a_one_rf_writer: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({alu_issue && ctrl.reg_write, lsu_wb_grant, sfu_wb_grant}));

  assign cpl_valid   = {sfu_done, lsu_done};
  assign cpl_warp[0] = lsu_done_warp;
  assign cpl_warp[1] = sfu_done_warp;

  // ---------------------------------------------------------------- events
  always_comb begin
    events             = '0;
    events.alu_issue   = alu_issue;
    events.lsu_issue   = lsu_issue;
    events.sfu_issue   = sfu_issue;
    events.halt_issue  = halt_issue;
    events.unit_stall  = unit_stall;
    events.wb_stall    = wb_stall;
    events.hide_issue  = issue && any_waiting;
    events.lane_masked = lsu_masked;
  end

endmodule
