// occupancy_sampler: average occupancy over a sampling period and the
// Resource Downsize Decision.
//
// Every cycle the current number of occupied entries of one resource is added
// to an accumulator.  The period is 2**PERIOD_LOG2 cycles (32K by default, as
// the resizing scheme prescribes).  In the last cycle of a period the total is
// compared with the capacity of one partition fewer than are active now: if
// total <= (active_parts-1) * PSIZE * 2**PERIOD_LOG2, the average occupancy fits
// in the smaller structure and a downsize decision is taken.  Comparing the
// totals avoids a divide and treats a fractional average exactly; the
// floor of the average is also output for observation.  No decision is taken
// when only one partition is active.
//
// Timing: down_dec and period_end are one-cycle pulses, registered, in the
// first cycle after the period's last cycle; avg_occ changes at the same time.
// Reset clears the accumulator and starts a new period.
module occupancy_sampler #(
  parameter int unsigned ENTRIES     = 96,
  parameter int unsigned NPART       = 4,
  parameter int unsigned PERIOD_LOG2 = 15,
  localparam int unsigned OCC_W  = $clog2(ENTRIES + 1),
  localparam int unsigned PART_W = $clog2(NPART + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [OCC_W-1:0]  occupancy,     // occupied entries this cycle
  input  logic [PART_W-1:0] active_parts,  // partitions currently in use
  output logic              period_end,    // pulse: a period has just closed
  output logic [OCC_W-1:0]  avg_occ,       // floor of the last period's average
  output logic              down_dec       // pulse: Resource Downsize Decision
);
  localparam int unsigned PSIZE = ENTRIES / NPART;
  localparam int unsigned SUM_W = OCC_W + PERIOD_LOG2;

  logic [PERIOD_LOG2-1:0] cyc;
  logic [SUM_W-1:0]       acc;
  logic [SUM_W-1:0]       total;
  logic [SUM_W:0]         smaller_cap;
  logic                   last_cycle;

  assign last_cycle  = &cyc;
  assign total       = acc + SUM_W'(occupancy);
  // Capacity of active_parts-1 partitions, scaled to a whole period.
  assign smaller_cap = (SUM_W+1)'(active_parts - PART_W'(1)) * (SUM_W+1)'(PSIZE) << PERIOD_LOG2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc        <= '0;
      acc        <= '0;
      period_end <= 1'b0;
      down_dec   <= 1'b0;
      avg_occ    <= '0;
    end else begin
      cyc        <= cyc + 1'b1;
      period_end <= last_cycle;
      down_dec   <= 1'b0;
      if (last_cycle) begin
        acc      <= '0;
        avg_occ  <= OCC_W'(total >> PERIOD_LOG2);
        down_dec <= (active_parts > PART_W'(1)) && ({1'b0, total} <= smaller_cap);
      end else begin
        acc <= total;
      end
    end
  end

  initial begin
    assert (ENTRIES % NPART == 0) else $error("ENTRIES must divide into NPART partitions");
  end
endmodule
