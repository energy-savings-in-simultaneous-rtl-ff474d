// queue_resize_fsm: resizing controller of a circular-FIFO resource (ROB, LSQ).
//
// Owns the number of partitions in use, active_parts (K).  A queue can only
// grow or shrink at its last partition, and only when the live entries do not
// wrap around the end of the queue: otherwise a partition added or removed at
// the end would land in the middle of the program-ordered entries.  The FSM
// therefore has phases that wait for the queue to report can_grow /
// can_shrink.
//
//   Q_STABLE     up_dec and K<NPART : power up partition K  -> Q_UP_POWER
//                down_dec and K>1   : -> Q_DOWN_PHASE
//   Q_UP_POWER   power sequencer done -> Q_UP_PHASE
//   Q_UP_PHASE   can_grow: K <= K+1, resize pulse -> Q_STABLE
//   Q_DOWN_PHASE up_dec: the downsize is abandoned (upsize has priority) and,
//                if K<NPART, partition K is powered up -> Q_UP_POWER
//                can_shrink: K <= K-1, resize pulse, power off partition K-1
//                -> Q_DOWN_POWER
//   Q_DOWN_POWER power sequencer done -> Q_STABLE (or straight into an upsize
//                when an upsize decision arrived meanwhile)
//
// One partition changes at a time.  A downsize decision is ignored outside
// Q_STABLE; an upsize decision arriving while an upsize is already under way
// is dropped, since that upsize answers the same shortage.  The order power-up
// first, attach second for an upsize is this design's choice: it lets the
// 300-cycle turn-on overlap the wait for a suitable head/tail position.
//
// Timing: resize, pwr_start, pwr_dir and pwr_idx are combinational from the
// state and the queue's status; active_parts changes at the clock edge that
// ends the resize cycle.  The queue takes no allocation in a resize cycle.
module queue_resize_fsm
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
  input  logic              can_grow,    // queue does not wrap: may attach
  input  logic              can_shrink,  // entries fit in K-1 partitions
  input  logic              pwr_busy,
  input  logic              pwr_done,
  output logic [PART_W-1:0] active_parts,
  output logic              resize,      // K changes at the end of this cycle
  output logic              pwr_start,
  output pwr_dir_e          pwr_dir,
  output logic [IDX_W-1:0]  pwr_idx,
  output qstate_e           state
);
  qstate_e state_q, state_d;
  logic [PART_W-1:0] parts_d;
  logic pending_up_q, pending_up_d;
  logic can_add;

  assign can_add = active_parts < PART_W'(NPART);

  always_comb begin
    state_d      = state_q;
    parts_d      = active_parts;
    pending_up_d = pending_up_q;
    resize       = 1'b0;
    pwr_start    = 1'b0;
    pwr_dir      = PWR_ON;
    pwr_idx      = IDX_W'(active_parts);
    unique case (state_q)
      Q_STABLE: begin
        if ((up_dec || pending_up_q) && can_add && !pwr_busy) begin
          pwr_start    = 1'b1;
          pending_up_d = 1'b0;
          state_d      = Q_UP_POWER;
        end else if (down_dec && active_parts > PART_W'(1)) begin
          state_d = Q_DOWN_PHASE;
        end else if (pending_up_q && !can_add) begin
          pending_up_d = 1'b0;
        end
      end
      Q_UP_POWER: begin
        if (pwr_done) state_d = Q_UP_PHASE;
      end
      Q_UP_PHASE: begin
        if (can_grow) begin
          resize  = 1'b1;
          parts_d = active_parts + PART_W'(1);
          state_d = Q_STABLE;
        end
      end
      Q_DOWN_PHASE: begin
        if (up_dec) begin
          if (can_add && !pwr_busy) begin
            pwr_start = 1'b1;
            state_d   = Q_UP_POWER;
          end else begin
            state_d = Q_STABLE;
          end
        end else if (can_shrink) begin
          resize    = 1'b1;
          parts_d   = active_parts - PART_W'(1);
          pwr_start = 1'b1;
          pwr_dir   = PWR_OFF;
          pwr_idx   = IDX_W'(active_parts - PART_W'(1));
          state_d   = Q_DOWN_POWER;
        end
      end
      Q_DOWN_POWER: begin
        if (up_dec) pending_up_d = 1'b1;
        if (pwr_done) state_d = Q_STABLE;
      end
      default: state_d = Q_STABLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= Q_STABLE;
      active_parts <= PART_W'(NPART);
      pending_up_q <= 1'b0;
    end else begin
      state_q      <= state_d;
      active_parts <= parts_d;
      pending_up_q <= pending_up_d;
    end
  end

  assign state = state_q;

  // The controller never asks for a power transition while one is running.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) pwr_start |-> !pwr_busy);
  a_parts_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  active_parts >= PART_W'(1) && active_parts <= PART_W'(NPART));
endmodule
