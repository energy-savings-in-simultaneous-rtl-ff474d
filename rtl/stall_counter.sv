// stall_counter: Resource Upsize Decision.
//
// Counts the cycles in which an allocation into the resource was refused
// because every active partition was full.  When the count reaches THRESHOLD
// (32K stalls by default) an upsize decision is taken and the counter is
// cleared at once.  Unlike the downsize decision this one is not tied to the
// sampling period: it can fire in any cycle.  The counter is not cleared at
// period boundaries (an own choice; only the decision clears it).
//
// Timing: up_dec is a registered one-cycle pulse in the cycle after the stall
// that made the count reach THRESHOLD.
module stall_counter #(
  parameter int unsigned THRESHOLD = 32768,
  localparam int unsigned CNT_W = $clog2(THRESHOLD + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stall,    // allocation refused this cycle
  output logic [CNT_W-1:0] count,    // stalls since the last decision
  output logic             up_dec    // pulse: Resource Upsize Decision
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      up_dec <= 1'b0;
    end else begin
      up_dec <= 1'b0;
      if (stall) begin
        if (count == CNT_W'(THRESHOLD - 1)) begin
          count  <= '0;
          up_dec <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end
endmodule
