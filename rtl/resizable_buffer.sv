// resizable_buffer: one dynamically resized out-of-order buffer shared by
// all threads, i.e. the issue queue or a physical register file.
//
// Built like resizable_queue, but around a partitioned_buffer and the simpler
// buffer_resize_fsm: an upsize only waits for the partition to power up, and
// a downsize first stops allocation in the last partition, waits until all
// its entries are released, then detaches and powers it down.  The occupancy
// averaged and the stalls counted are those of all threads together.
//
// The pipeline side is the buffer's: up to W allocations per cycle (indices
// returned in alloc_idx), W release, W write and W read ports by index.
// After reset all partitions are active and powered.
module resizable_buffer
  import resize_pkg::*;
#(
  parameter int unsigned ENTRIES     = DEF_IQ_ENTRIES,
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
  input  logic [CNT_W-1:0]  alloc_cnt,
  output logic [CNT_W-1:0]  alloc_grant,
  output logic [IDX_W-1:0]  alloc_idx [W],
  output logic              stall,
  input  logic [W-1:0]      rel_valid,
  input  logic [IDX_W-1:0]  rel_idx [W],
  input  logic [W-1:0]      wr_en,
  input  logic [IDX_W-1:0]  wr_idx [W],
  input  logic [DW-1:0]     wr_data [W],
  input  logic [IDX_W-1:0]  rd_idx [W],
  output logic [DW-1:0]     rd_data [W],
  output logic [OCC_W-1:0]  occupancy,
  output logic [PART_W-1:0] active_parts,
  output logic [PART_W-1:0] alloc_parts,
  output logic [NPART-1:0]  pwr_en,
  output logic [OCC_W-1:0]  avg_occ,
  output logic [$clog2(THRESHOLD+1)-1:0] stall_count,
  output logic              up_dec,
  output logic              down_dec,
  output bstate_e           state
);
  localparam int unsigned IX_W = (NPART > 1) ? $clog2(NPART) : 1;

  logic [NPART-1:0] part_empty;
  logic             pwr_start, pwr_busy, pwr_done;
  pwr_dir_e         pwr_dir;
  logic [IX_W-1:0]  pwr_idx;
  logic             period_end;

  partitioned_buffer #(.ENTRIES(ENTRIES), .NPART(NPART), .W(W), .DW(DW)) u_buffer (
    .clk, .rst_n, .alloc_parts, .alloc_cnt, .alloc_grant, .alloc_idx, .stall,
    .rel_valid, .rel_idx, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data,
    .occupancy, .part_empty
  );

  occupancy_sampler #(.ENTRIES(ENTRIES), .NPART(NPART), .PERIOD_LOG2(PERIOD_LOG2)) u_sampler (
    .clk, .rst_n, .occupancy, .active_parts, .period_end, .avg_occ, .down_dec
  );

  stall_counter #(.THRESHOLD(THRESHOLD)) u_stalls (
    .clk, .rst_n, .stall, .count(stall_count), .up_dec
  );

  buffer_resize_fsm #(.NPART(NPART)) u_fsm (
    .clk, .rst_n, .up_dec, .down_dec, .part_empty, .pwr_busy, .pwr_done,
    .active_parts, .alloc_parts, .pwr_start, .pwr_dir, .pwr_idx, .state
  );

  partition_power_seq #(.NPART(NPART), .DELAY(DELAY)) u_power (
    .clk, .rst_n, .start(pwr_start), .dir(pwr_dir), .idx(pwr_idx),
    .busy(pwr_busy), .done(pwr_done), .pwr_en
  );

  a_used_powered: assert property (@(posedge clk) disable iff (!rst_n)
    (pwr_en & NPART'((1 << active_parts) - 1)) == NPART'((1 << active_parts) - 1));
  a_alloc_in_use: assert property (@(posedge clk) disable iff (!rst_n) alloc_parts <= active_parts);
endmodule
