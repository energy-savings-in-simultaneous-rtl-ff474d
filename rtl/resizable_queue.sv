// resizable_queue: one dynamically resized circular-FIFO resource, i.e. the
// reorder buffer or the load/store queue of one hardware thread.
//
// Four parts, each with its own job:
//   partitioned_queue   the FIFO itself, wrapping at the active size;
//   occupancy_sampler   averages the occupancy over each sampling period and
//                       takes the downsize decision at the period's end;
//   stall_counter       counts allocation stalls and takes the upsize
//                       decision when they reach the threshold;
//   queue_resize_fsm    waits for head/tail positions that allow the change
//                       and applies it, one partition at a time, with upsize
//                       taking priority;
//   partition_power_seq switches the partition supplies over POWER_DELAY
//                       cycles.
// Every resource has its own controller: there is no central one.
//
// The pipeline side is the queue's: up to W allocations at the tail and up to
// W commits at the head per cycle (see partitioned_queue for the timing).
// After reset all partitions are active and powered.
module resizable_queue
  import resize_pkg::*;
#(
  parameter int unsigned ENTRIES     = DEF_ROB_ENTRIES,
  parameter int unsigned NPART       = DEF_NPART,
  parameter int unsigned W           = DEF_MACHINE_W,
  parameter int unsigned DW          = 32,
  parameter int unsigned PERIOD_LOG2 = DEF_SAMPLE_PERIOD_LOG2,
  parameter int unsigned THRESHOLD   = DEF_UPSIZE_THRESHOLD,
  parameter int unsigned DELAY       = DEF_POWER_DELAY,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned OCC_W  = $clog2(ENTRIES + 1),
  localparam int unsigned PART_W = $clog2(NPART + 1),
  localparam int unsigned CNT_W  = $clog2(W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // allocation (dispatch) and commit
  input  logic [CNT_W-1:0]  alloc_cnt,
  input  logic [DW-1:0]     alloc_data [W],
  output logic [CNT_W-1:0]  alloc_grant,
  output logic [IDX_W-1:0]  tail_idx,
  output logic              stall,
  input  logic [CNT_W-1:0]  commit_cnt,
  output logic [DW-1:0]     head_data [W],
  output logic [OCC_W-1:0]  occupancy,
  output logic [IDX_W-1:0]  head_idx,
  // resizing status
  output logic [PART_W-1:0] active_parts,
  output logic [NPART-1:0]  pwr_en,
  output logic [OCC_W-1:0]  avg_occ,
  output logic [$clog2(THRESHOLD+1)-1:0] stall_count,
  output logic              up_dec,
  output logic              down_dec,
  output logic              resize,
  output qstate_e           state
);
  localparam int unsigned IX_W = (NPART > 1) ? $clog2(NPART) : 1;

  logic             can_grow, can_shrink;
  logic             pwr_start, pwr_busy, pwr_done;
  pwr_dir_e         pwr_dir;
  logic [IX_W-1:0]  pwr_idx;
  logic [OCC_W-1:0] limit;
  logic             period_end;

  partitioned_queue #(.ENTRIES(ENTRIES), .NPART(NPART), .W(W), .DW(DW)) u_queue (
    .clk, .rst_n, .active_parts, .resize,
    .alloc_cnt, .alloc_data, .alloc_grant, .tail_idx, .stall,
    .commit_cnt, .head_data, .head_idx, .occupancy, .limit,
    .can_grow, .can_shrink
  );

  occupancy_sampler #(.ENTRIES(ENTRIES), .NPART(NPART), .PERIOD_LOG2(PERIOD_LOG2)) u_sampler (
    .clk, .rst_n, .occupancy, .active_parts, .period_end, .avg_occ, .down_dec
  );

  stall_counter #(.THRESHOLD(THRESHOLD)) u_stalls (
    .clk, .rst_n, .stall, .count(stall_count), .up_dec
  );

  queue_resize_fsm #(.NPART(NPART)) u_fsm (
    .clk, .rst_n, .up_dec, .down_dec, .can_grow, .can_shrink,
    .pwr_busy, .pwr_done, .active_parts, .resize,
    .pwr_start, .pwr_dir, .pwr_idx, .state
  );

  partition_power_seq #(.NPART(NPART), .DELAY(DELAY)) u_power (
    .clk, .rst_n, .start(pwr_start), .dir(pwr_dir), .idx(pwr_idx),
    .busy(pwr_busy), .done(pwr_done), .pwr_en
  );

  // A partition in use is always powered.
  a_used_powered: assert property (@(posedge clk) disable iff (!rst_n)
    (pwr_en & NPART'((1 << active_parts) - 1)) == NPART'((1 << active_parts) - 1));
endmodule
