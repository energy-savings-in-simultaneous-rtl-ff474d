// Testbench for occupancy_sampler: random occupancy traces, one activity
// level per 16-cycle period, checked against a sum kept by the testbench.
// Checks the period_end pulse position, the average and the downsize decision
// (average fits in one partition fewer, never with one partition active).
module tb_occupancy_sampler;
  localparam int ENTRIES = 16, NPART = 4, PLOG = 4, PERIOD = 1 << PLOG, PSIZE = ENTRIES / NPART;
  logic clk = 0, rst_n = 0;
  logic [4:0] occupancy = '0;
  logic [2:0] active_parts = 3'd4;
  logic period_end, down_dec;
  logic [4:0] avg_occ;
  int checks = 0, failures = 0, n_down = 0, n_keep = 0;

  occupancy_sampler #(.ENTRIES(ENTRIES), .NPART(NPART), .PERIOD_LOG2(PLOG)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, level, act, v;
    bit exp_down;
    int exp_avg;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_down = 0; exp_avg = 0;
    for (int p = 0; p < 60; p++) begin
      level = $urandom_range(0, ENTRIES);
      act   = $urandom_range(1, NPART);
      sum   = 0;
      for (int c = 0; c < PERIOD; c++) begin
        if (c > 0) @(negedge clk);
        if (c == 0 && p > 0) begin
          check(period_end == 1'b1, "period_end at period start");
          check(down_dec == exp_down, "downsize decision");
          check(int'(avg_occ) == exp_avg, "average occupancy");
        end else begin
          check(period_end == 1'b0 && down_dec == 1'b0, "no pulse inside period");
        end
        v = level + $urandom_range(0, 4) - 2;
        if (v < 0) v = 0;
        if (v > ENTRIES) v = ENTRIES;
        occupancy    = 5'(v);
        active_parts = 3'(act);
        sum += v;
      end
      exp_down = (act > 1) && (sum <= (act - 1) * PSIZE * PERIOD);
      exp_avg  = sum / PERIOD;
      if (exp_down) n_down++; else n_keep++;
      @(negedge clk);
    end
    check(n_down > 0 && n_keep > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
