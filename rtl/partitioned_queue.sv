// partitioned_queue: circular FIFO (ROB or LSQ of one thread) split into
// NPART equal partitions, of which only the first active_parts are in use.
//
// Entries are kept in program order between the head (oldest) and the tail
// (next free slot).  The queue wraps at limit = active_parts * PSIZE, not at
// ENTRIES, so the partitions beyond the limit hold nothing and can be powered
// off.  The queue stores head and count; the tail is derived as
// (head + count) mod limit, so a change of limit never needs a tail fix-up.
// An empty queue always has its head at entry 0.
//
// Resizing status for the controller (from registered state):
//   can_grow   live entries do not wrap past the end (head + count <= limit):
//              a partition can be attached after the last one without
//              breaking program order;
//   can_shrink also head + count <= limit - PSIZE: nothing lives in the last
//              partition and nothing wraps, so it can be detached.
// In a cycle with resize high the queue accepts no allocation (one-cycle
// bubble) so that the new tail is always computed under a single limit.
//
// Per cycle up to W entries are allocated at the tail (alloc_grant of the
// alloc_cnt requested; all that fit are taken, in order) and commit_cnt
// entries are retired at the head.  stall is high when the request does not
// fit in the active partitions.  The head W entries are readable at head_data.
module partitioned_queue #(
  parameter int unsigned ENTRIES = 96,
  parameter int unsigned NPART   = 4,
  parameter int unsigned W       = 8,
  parameter int unsigned DW      = 32,
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned OCC_W  = $clog2(ENTRIES + 1),
  localparam int unsigned PART_W = $clog2(NPART + 1),
  localparam int unsigned CNT_W  = $clog2(W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PART_W-1:0] active_parts,
  input  logic              resize,
  input  logic [CNT_W-1:0]  alloc_cnt,
  input  logic [DW-1:0]     alloc_data [W],
  output logic [CNT_W-1:0]  alloc_grant,
  output logic [IDX_W-1:0]  tail_idx,      // slot of the first allocated entry
  output logic              stall,
  input  logic [CNT_W-1:0]  commit_cnt,
  output logic [DW-1:0]     head_data [W],
  output logic [IDX_W-1:0]  head_idx,
  output logic [OCC_W-1:0]  occupancy,
  output logic [OCC_W-1:0]  limit,
  output logic              can_grow,
  output logic              can_shrink
);
  localparam int unsigned PSIZE = ENTRIES / NPART;

  logic [DW-1:0]    mem [ENTRIES];
  logic [IDX_W-1:0] head;
  logic [OCC_W-1:0] count;
  logic [OCC_W-1:0] free_cnt;
  logic [OCC_W:0]   head_end;     // head + count, not wrapped

  function automatic logic [IDX_W-1:0] wrap(input logic [OCC_W:0] pos, input logic [OCC_W-1:0] lim);
    return (pos >= {1'b0, lim}) ? IDX_W'(pos - {1'b0, lim}) : IDX_W'(pos);
  endfunction

  assign limit      = OCC_W'(active_parts) * OCC_W'(PSIZE);
  assign head_end   = {1'b0, OCC_W'(head)} + {1'b0, count};
  assign tail_idx   = wrap(head_end, limit);
  assign free_cnt   = (limit > count) ? limit - count : '0;
  assign occupancy  = count;
  assign head_idx   = head;
  assign can_grow   = head_end <= {1'b0, limit};
  assign can_shrink = (active_parts > PART_W'(1)) &&
                      (head_end <= {1'b0, limit - OCC_W'(PSIZE)});

  always_comb begin
    if (resize)
      alloc_grant = '0;
    else if ({{(OCC_W-CNT_W){1'b0}}, alloc_cnt} > free_cnt)
      alloc_grant = CNT_W'(free_cnt);
    else
      alloc_grant = alloc_cnt;
    stall = {{(OCC_W-CNT_W){1'b0}}, alloc_cnt} > free_cnt;
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      head_data[i] = mem[wrap({1'b0, OCC_W'(head)} + (OCC_W+1)'(i), limit)];
  end

  logic [OCC_W-1:0] count_next;
  assign count_next = count + OCC_W'(alloc_grant) - OCC_W'(commit_cnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
    end else begin
      count <= count_next;
      head  <= (count_next == '0) ? '0
             : wrap({1'b0, OCC_W'(head)} + (OCC_W+1)'(commit_cnt), limit);
    end
  end

  // Payload storage (not reset: nothing is read before it is written).
  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++)
      if (CNT_W'(i) < alloc_grant)
        mem[wrap(head_end + (OCC_W+1)'(i), limit)] <= alloc_data[i];
  end

  a_commit_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                OCC_W'(commit_cnt) <= count);
  a_in_limit:  assert property (@(posedge clk) disable iff (!rst_n) count <= limit);
  initial begin
    assert (ENTRIES % NPART == 0) else $error("ENTRIES must divide into NPART partitions");
    assert (W <= PSIZE) else $error("port width must not exceed a partition");
  end
endmodule
