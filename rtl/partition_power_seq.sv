// partition_power_seq: power switching of the resource partitions.
//
// Holds one power-enable bit per partition (to the partition's sleep
// transistors) and times a transition.  Switching a partition on or off is
// spread over DELAY cycles (300 by default) to keep di/dt low, and only one
// partition changes at a time.  For a turn-on the enable rises at once and the
// partition may be used only after done; for a turn-off the enable falls at
// once (the partition has already been taken out of use) and done says the
// partition has fully discharged and may be switched again.
//
// Interface: start (with dir, idx) is accepted only while busy is low.
// done is a one-cycle pulse exactly DELAY cycles after the accepting cycle.
// After reset all partitions are on, as in the full-size baseline machine.
module partition_power_seq
  import resize_pkg::*;
#(
  parameter int unsigned NPART = DEF_NPART,
  parameter int unsigned DELAY = DEF_POWER_DELAY,
  localparam int unsigned IDX_W = (NPART > 1) ? $clog2(NPART) : 1,
  localparam int unsigned CNT_W = $clog2(DELAY + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  pwr_dir_e         dir,
  input  logic [IDX_W-1:0] idx,
  output logic             busy,
  output logic             done,
  output logic [NPART-1:0] pwr_en
);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      pwr_en <= '1;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (cnt == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end else if (start) begin
        busy        <= 1'b1;
        cnt         <= CNT_W'(DELAY - 1);
        pwr_en[idx] <= (dir == PWR_ON);
      end
    end
  end

  initial begin
    assert (DELAY >= 1) else $error("DELAY must be at least one cycle");
  end
endmodule
