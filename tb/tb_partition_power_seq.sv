// Testbench for partition_power_seq with DELAY = 7: random on/off requests.
// Checks that a request is accepted only when idle, that the enable of the
// addressed partition changes in the accepting cycle, that done comes exactly
// DELAY cycles after acceptance, and that other enables never move.
module tb_partition_power_seq;
  import resize_pkg::*;
  localparam int NPART = 4, DELAY = 7;
  logic clk = 0, rst_n = 0, start = 0;
  pwr_dir_e dir = PWR_OFF;
  logic [1:0] idx = '0;
  logic busy, done;
  logic [NPART-1:0] pwr_en;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  partition_power_seq #(.NPART(NPART), .DELAY(DELAY)) dut (.*);

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
    automatic logic [NPART-1:0] m_en = '1;
    automatic int remaining = -1;      // cycles until done, -1 when idle
    automatic bit exp_done = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(pwr_en == '1, "all partitions on after reset");
    for (int c = 0; c < 1500; c++) begin
      check(busy == (remaining >= 0), "busy");
      check(done == exp_done, "done timing");
      check(pwr_en == m_en, "power enables");
      start = ($urandom_range(0, 3) == 0);
      dir   = pwr_dir_e'($urandom_range(0, 1));
      idx   = 2'($urandom_range(0, NPART - 1));
      // model the clock edge
      exp_done = 0;
      if (remaining >= 0) begin
        if (remaining == 0) exp_done = 1;
        remaining--;
      end else if (start) begin
        remaining = DELAY - 1;
        m_en[idx] = (dir == PWR_ON);
        if (dir == PWR_ON) n_on++; else n_off++;
      end
      @(negedge clk);
    end
    check(n_on > 10 && n_off > 10, "both directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
