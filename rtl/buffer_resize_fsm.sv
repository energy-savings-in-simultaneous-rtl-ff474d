// buffer_resize_fsm: resizing controller of an out-of-order buffer (IQ, PRF).
//
// Entries of a buffer can sit anywhere, so an upsize needs no waiting phase:
// the next partition is powered up and attached as soon as it is usable.
// A downsize still needs a phase: new allocations are kept out of the last
// partition (alloc_parts = K-1) until its entries have all been released,
// then it is detached and powered down.
//
//   B_STABLE     up_dec and K<NPART : power up partition K -> B_UP_POWER
//                down_dec and K>1   : -> B_DOWN_PHASE
//   B_UP_POWER   power sequencer done: K <= K+1 -> B_STABLE
//   B_DOWN_PHASE up_dec: downsize abandoned, the partition is given back to
//                allocation (upsize has priority) -> B_STABLE
//                last_empty: K <= K-1, power off partition K-1 -> B_DOWN_POWER
//   B_DOWN_POWER power sequencer done -> B_STABLE (or straight into an
//                upsize when an upsize decision arrived meanwhile)
//
// Timing: pwr_start/pwr_dir/pwr_idx are combinational; active_parts and
// alloc_parts are registered state.
module buffer_resize_fsm
  import resize_pkg::*;
#(
  parameter int unsigned NPART = DEF_NPART,
  localparam int unsigned PART_W = $clog2(NPART + 1),
  localparam int unsigned IDX_W  = (NPART > 1) ? $clog2(NPART) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              up_dec,
  input  logic              down_dec,
  input  logic [NPART-1:0]  part_empty,   // per partition: holds no entry
  input  logic              pwr_busy,
  input  logic              pwr_done,
  output logic [PART_W-1:0] active_parts, // partitions powered and attached
  output logic [PART_W-1:0] alloc_parts,  // partitions open for allocation
  output logic              pwr_start,
  output pwr_dir_e          pwr_dir,
  output logic [IDX_W-1:0]  pwr_idx,
  output bstate_e           state
);
  bstate_e state_q, state_d;
  logic [PART_W-1:0] parts_d;
  logic pending_up_q, pending_up_d;
  logic can_add, last_empty;

  assign can_add    = active_parts < PART_W'(NPART);
  assign last_empty = part_empty[IDX_W'(active_parts - PART_W'(1))];

  always_comb begin
    state_d      = state_q;
    parts_d      = active_parts;
    pending_up_d = pending_up_q;
    pwr_start    = 1'b0;
    pwr_dir      = PWR_ON;
    pwr_idx      = IDX_W'(active_parts);
    unique case (state_q)
      B_STABLE: begin
        if ((up_dec || pending_up_q) && can_add && !pwr_busy) begin
          pwr_start    = 1'b1;
          pending_up_d = 1'b0;
          state_d      = B_UP_POWER;
        end else if (down_dec && active_parts > PART_W'(1)) begin
          state_d = B_DOWN_PHASE;
        end else if (pending_up_q && !can_add) begin
          pending_up_d = 1'b0;
        end
      end
      B_UP_POWER: begin
        if (pwr_done) begin
          parts_d = active_parts + PART_W'(1);
          state_d = B_STABLE;
        end
      end
      B_DOWN_PHASE: begin
        if (up_dec) begin
          state_d = B_STABLE;
        end else if (last_empty && !pwr_busy) begin
          parts_d   = active_parts - PART_W'(1);
          pwr_start = 1'b1;
          pwr_dir   = PWR_OFF;
          pwr_idx   = IDX_W'(active_parts - PART_W'(1));
          state_d   = B_DOWN_POWER;
        end
      end
      B_DOWN_POWER: begin
        if (up_dec) pending_up_d = 1'b1;
        if (pwr_done) state_d = B_STABLE;
      end
      default: state_d = B_STABLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= B_STABLE;
      active_parts <= PART_W'(NPART);
      pending_up_q <= 1'b0;
    end else begin
      state_q      <= state_d;
      active_parts <= parts_d;
      pending_up_q <= pending_up_d;
    end
  end

  assign state       = state_q;
  assign alloc_parts = (state_q == B_DOWN_PHASE) ? active_parts - PART_W'(1) : active_parts;

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) pwr_start |-> !pwr_busy);
  a_parts_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  active_parts >= PART_W'(1) && active_parts <= PART_W'(NPART));
endmodule
