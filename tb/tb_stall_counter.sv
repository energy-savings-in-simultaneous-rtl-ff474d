// Testbench for stall_counter: random stall patterns with a threshold of 20.
// A testbench-side count predicts the cycle of each upsize decision (one cycle
// after the 20th stall since the previous decision) and the running count.
module tb_stall_counter;
  localparam int THRESHOLD = 20;
  logic clk = 0, rst_n = 0, stall = 0;
  logic [4:0] count;
  logic up_dec;
  int checks = 0, failures = 0, n_dec = 0;

  stall_counter #(.THRESHOLD(THRESHOLD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int model = 0;
    automatic bit exp_dec = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      check(up_dec == exp_dec, "upsize decision timing");
      check(int'(count) == model, "stall count");
      // bursts of stalls and quiet stretches
      stall = ((c / 50) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 9) == 0);
      exp_dec = 0;
      if (stall) begin
        model++;
        if (model == THRESHOLD) begin model = 0; exp_dec = 1; n_dec++; end
      end
      @(negedge clk);
    end
    check(n_dec >= 10, "several decisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
