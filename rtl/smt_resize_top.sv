// smt_resize_top: the dynamically resized window resources of a two-thread
// simultaneous multi-threaded core.
//
// Per thread (replicated): a reorder buffer and a load/store queue, both
// circular FIFOs resized by resizable_queue.  Shared by all threads: the
// issue queue and the integer and floating-point physical register files,
// out-of-order buffers resized by resizable_buffer.  Each of these seven
// structures has its own controller that turns its last partition off when
// the average occupancy of a sampling period fits in one partition fewer, and
// turns the next partition on when allocation stalls reach the upsize
// threshold.  The core pipeline that dispatches into, issues from and retires
// out of these structures is outside this module: its requests come in on the
// ports below, and dispatch arbitration between the threads for the shared
// buffers is its job.
//
// Default sizes: 8-wide machine, 96-entry ROB and 48-entry LSQ per thread,
// 64-entry IQ, 192-entry INT and FP register files, 4 partitions each,
// 32K-cycle sampling period, 32K-stall upsize threshold, 300-cycle partition
// switching.  Payload widths are this design's placeholders.
// All ports follow the timing of partitioned_queue / partitioned_buffer;
// reset is synchronous, active low, and leaves every partition on.
module smt_resize_top
  import resize_pkg::*;
#(
  parameter int unsigned NTHREADS    = DEF_NTHREADS,
  parameter int unsigned W           = DEF_MACHINE_W,
  parameter int unsigned NPART       = DEF_NPART,
  parameter int unsigned ROB_ENTRIES = DEF_ROB_ENTRIES,
  parameter int unsigned LSQ_ENTRIES = DEF_LSQ_ENTRIES,
  parameter int unsigned IQ_ENTRIES  = DEF_IQ_ENTRIES,
  parameter int unsigned PRF_ENTRIES = DEF_PRF_ENTRIES,
  parameter int unsigned ROB_DW      = 32,
  parameter int unsigned LSQ_DW      = 64,
  parameter int unsigned IQ_DW       = 64,
  parameter int unsigned PRF_DW      = 64,
  parameter int unsigned PERIOD_LOG2 = DEF_SAMPLE_PERIOD_LOG2,
  parameter int unsigned THRESHOLD   = DEF_UPSIZE_THRESHOLD,
  parameter int unsigned DELAY       = DEF_POWER_DELAY,
  localparam int unsigned CNT_W    = $clog2(W + 1),
  localparam int unsigned PART_W   = $clog2(NPART + 1),
  localparam int unsigned ROB_IW   = $clog2(ROB_ENTRIES),
  localparam int unsigned ROB_OW   = $clog2(ROB_ENTRIES + 1),
  localparam int unsigned LSQ_IW   = $clog2(LSQ_ENTRIES),
  localparam int unsigned LSQ_OW   = $clog2(LSQ_ENTRIES + 1),
  localparam int unsigned IQ_IW    = $clog2(IQ_ENTRIES),
  localparam int unsigned IQ_OW    = $clog2(IQ_ENTRIES + 1),
  localparam int unsigned PRF_IW   = $clog2(PRF_ENTRIES),
  localparam int unsigned PRF_OW   = $clog2(PRF_ENTRIES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---- reorder buffers, one per thread
  input  logic [CNT_W-1:0]   rob_alloc_cnt   [NTHREADS],
  input  logic [ROB_DW-1:0]  rob_alloc_data  [NTHREADS][W],
  output logic [CNT_W-1:0]   rob_alloc_grant [NTHREADS],
  output logic [ROB_IW-1:0]  rob_tail_idx    [NTHREADS],
  output logic [NTHREADS-1:0] rob_stall,
  input  logic [CNT_W-1:0]   rob_commit_cnt  [NTHREADS],
  output logic [ROB_DW-1:0]  rob_head_data   [NTHREADS][W],
  output logic [ROB_OW-1:0]  rob_occupancy   [NTHREADS],
  output logic [PART_W-1:0]  rob_parts       [NTHREADS],
  output logic [NPART-1:0]   rob_pwr_en      [NTHREADS],
  // ---- load/store queues, one per thread
  input  logic [CNT_W-1:0]   lsq_alloc_cnt   [NTHREADS],
  input  logic [LSQ_DW-1:0]  lsq_alloc_data  [NTHREADS][W],
  output logic [CNT_W-1:0]   lsq_alloc_grant [NTHREADS],
  output logic [LSQ_IW-1:0]  lsq_tail_idx    [NTHREADS],
  output logic [NTHREADS-1:0] lsq_stall,
  input  logic [CNT_W-1:0]   lsq_commit_cnt  [NTHREADS],
  output logic [LSQ_DW-1:0]  lsq_head_data   [NTHREADS][W],
  output logic [LSQ_OW-1:0]  lsq_occupancy   [NTHREADS],
  output logic [PART_W-1:0]  lsq_parts       [NTHREADS],
  output logic [NPART-1:0]   lsq_pwr_en      [NTHREADS],
  // ---- issue queue, shared
  input  logic [CNT_W-1:0]   iq_alloc_cnt,
  output logic [CNT_W-1:0]   iq_alloc_grant,
  output logic [IQ_IW-1:0]   iq_alloc_idx [W],
  output logic               iq_stall,
  input  logic [W-1:0]       iq_rel_valid,
  input  logic [IQ_IW-1:0]   iq_rel_idx   [W],
  input  logic [W-1:0]       iq_wr_en,
  input  logic [IQ_IW-1:0]   iq_wr_idx    [W],
  input  logic [IQ_DW-1:0]   iq_wr_data   [W],
  input  logic [IQ_IW-1:0]   iq_rd_idx    [W],
  output logic [IQ_DW-1:0]   iq_rd_data   [W],
  output logic [IQ_OW-1:0]   iq_occupancy,
  output logic [PART_W-1:0]  iq_parts,
  output logic [NPART-1:0]   iq_pwr_en,
  // ---- integer and floating-point physical register files, shared
  //      (index 0: INT-PRF, index 1: FP-PRF)
  input  logic [CNT_W-1:0]   prf_alloc_cnt   [2],
  output logic [CNT_W-1:0]   prf_alloc_grant [2],
  output logic [PRF_IW-1:0]  prf_alloc_idx   [2][W],
  output logic [1:0]         prf_stall,
  input  logic [W-1:0]       prf_rel_valid   [2],
  input  logic [PRF_IW-1:0]  prf_rel_idx     [2][W],
  input  logic [W-1:0]       prf_wr_en       [2],
  input  logic [PRF_IW-1:0]  prf_wr_idx      [2][W],
  input  logic [PRF_DW-1:0]  prf_wr_data     [2][W],
  input  logic [PRF_IW-1:0]  prf_rd_idx      [2][W],
  output logic [PRF_DW-1:0]  prf_rd_data     [2][W],
  output logic [PRF_OW-1:0]  prf_occupancy   [2],
  output logic [PART_W-1:0]  prf_parts       [2],
  output logic [NPART-1:0]   prf_pwr_en      [2]
);

  for (genvar t = 0; t < NTHREADS; t++) begin : g_thread
    resizable_queue #(
      .ENTRIES(ROB_ENTRIES), .NPART(NPART), .W(W), .DW(ROB_DW),
      .PERIOD_LOG2(PERIOD_LOG2), .THRESHOLD(THRESHOLD), .DELAY(DELAY)
    ) u_rob (
      .clk, .rst_n,
      .alloc_cnt(rob_alloc_cnt[t]), .alloc_data(rob_alloc_data[t]),
      .alloc_grant(rob_alloc_grant[t]), .tail_idx(rob_tail_idx[t]),
      .stall(rob_stall[t]), .commit_cnt(rob_commit_cnt[t]),
      .head_data(rob_head_data[t]), .occupancy(rob_occupancy[t]), .head_idx(),
      .active_parts(rob_parts[t]), .pwr_en(rob_pwr_en[t]),
      .avg_occ(), .stall_count(), .up_dec(), .down_dec(), .resize(), .state()
    );

    resizable_queue #(
      .ENTRIES(LSQ_ENTRIES), .NPART(NPART), .W(W), .DW(LSQ_DW),
      .PERIOD_LOG2(PERIOD_LOG2), .THRESHOLD(THRESHOLD), .DELAY(DELAY)
    ) u_lsq (
      .clk, .rst_n,
      .alloc_cnt(lsq_alloc_cnt[t]), .alloc_data(lsq_alloc_data[t]),
      .alloc_grant(lsq_alloc_grant[t]), .tail_idx(lsq_tail_idx[t]),
      .stall(lsq_stall[t]), .commit_cnt(lsq_commit_cnt[t]),
      .head_data(lsq_head_data[t]), .occupancy(lsq_occupancy[t]), .head_idx(),
      .active_parts(lsq_parts[t]), .pwr_en(lsq_pwr_en[t]),
      .avg_occ(), .stall_count(), .up_dec(), .down_dec(), .resize(), .state()
    );
  end

  resizable_buffer #(
    .ENTRIES(IQ_ENTRIES), .NPART(NPART), .W(W), .DW(IQ_DW),
    .PERIOD_LOG2(PERIOD_LOG2), .THRESHOLD(THRESHOLD), .DELAY(DELAY)
  ) u_iq (
    .clk, .rst_n,
    .alloc_cnt(iq_alloc_cnt), .alloc_grant(iq_alloc_grant), .alloc_idx(iq_alloc_idx),
    .stall(iq_stall), .rel_valid(iq_rel_valid), .rel_idx(iq_rel_idx),
    .wr_en(iq_wr_en), .wr_idx(iq_wr_idx), .wr_data(iq_wr_data),
    .rd_idx(iq_rd_idx), .rd_data(iq_rd_data), .occupancy(iq_occupancy),
    .active_parts(iq_parts), .alloc_parts(), .pwr_en(iq_pwr_en),
    .avg_occ(), .stall_count(), .up_dec(), .down_dec(), .state()
  );

  for (genvar f = 0; f < 2; f++) begin : g_prf
    resizable_buffer #(
      .ENTRIES(PRF_ENTRIES), .NPART(NPART), .W(W), .DW(PRF_DW),
      .PERIOD_LOG2(PERIOD_LOG2), .THRESHOLD(THRESHOLD), .DELAY(DELAY)
    ) u_prf (
      .clk, .rst_n,
      .alloc_cnt(prf_alloc_cnt[f]), .alloc_grant(prf_alloc_grant[f]),
      .alloc_idx(prf_alloc_idx[f]), .stall(prf_stall[f]),
      .rel_valid(prf_rel_valid[f]), .rel_idx(prf_rel_idx[f]),
      .wr_en(prf_wr_en[f]), .wr_idx(prf_wr_idx[f]), .wr_data(prf_wr_data[f]),
      .rd_idx(prf_rd_idx[f]), .rd_data(prf_rd_data[f]), .occupancy(prf_occupancy[f]),
      .active_parts(prf_parts[f]), .alloc_parts(), .pwr_en(prf_pwr_en[f]),
      .avg_occ(), .stall_count(), .up_dec(), .down_dec(), .state()
    );
  end
endmodule
