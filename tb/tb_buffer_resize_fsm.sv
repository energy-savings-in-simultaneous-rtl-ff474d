// Testbench for buffer_resize_fsm.  The testbench plays the buffer
// (part_empty) and a 5-cycle power sequencer.  Directed scenarios: downsize
// that closes allocation to the last partition and waits for it to drain,
// upsize attached as soon as powered, limits at 1 and NPART, an upsize
// decision overriding a downsize phase, and an upsize held over a power-down.
module tb_buffer_resize_fsm;
  import resize_pkg::*;
  localparam int NPART = 4, PDELAY = 5;
  logic clk = 0, rst_n = 0;
  logic up_dec = 0, down_dec = 0;
  logic [NPART-1:0] part_empty = '0;
  logic pwr_busy = 0, pwr_done = 0;
  logic [2:0] active_parts, alloc_parts;
  logic pwr_start;
  pwr_dir_e pwr_dir;
  logic [1:0] pwr_idx;
  bstate_e state;
  int checks = 0, failures = 0;
  int n_start_on = 0, n_start_off = 0;
  logic [1:0] last_idx;
  pwr_dir_e last_dir;

  buffer_resize_fsm #(.NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  int pcnt = 0;
  always @(posedge clk) begin
    pwr_done <= 1'b0;
    if (pwr_busy) begin
      if (pcnt == 1) begin pwr_busy <= 1'b0; pwr_done <= 1'b1; end
      pcnt <= pcnt - 1;
    end else if (pwr_start) begin
      pwr_busy <= 1'b1; pcnt <= PDELAY;
      last_idx <= pwr_idx; last_dir <= pwr_dir;
      if (pwr_dir == PWR_ON) n_start_on++; else n_start_off++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (state %s parts %0d)", what, $time, state.name(), active_parts); end
  endtask

  task automatic pulse_up();   @(negedge clk) up_dec = 1;   @(negedge clk) up_dec = 0;   endtask
  task automatic pulse_down(); @(negedge clk) down_dec = 1; @(negedge clk) down_dec = 0; endtask
  task automatic wait_cycles(int n); repeat (n) @(negedge clk); endtask

  task automatic do_downsize(int from);
    pulse_down();
    check(state == B_DOWN_PHASE, "enter downsize phase");
    check(alloc_parts == 3'(from - 1) && active_parts == 3'(from), "allocation closed to last partition");
    wait_cycles(4);
    check(active_parts == 3'(from), "waits while last partition holds entries");
    part_empty[from - 1] = 1'b1;
    #1 check(pwr_start && pwr_dir == PWR_OFF && pwr_idx == 2'(from - 1), "power off the drained partition");
    @(negedge clk);
    check(active_parts == 3'(from - 1) && alloc_parts == 3'(from - 1) && state == B_DOWN_POWER, "detached");
    wait_cycles(PDELAY + 1);
    check(state == B_STABLE, "stable after power-down");
  endtask

  task automatic do_upsize(int from);
    int t;
    pulse_up();
    check(state == B_UP_POWER && last_idx == 2'(from) && last_dir == PWR_ON, "power up next partition");
    t = 0;
    while (active_parts == 3'(from) && t < 50) begin @(negedge clk); t++; end
    check(t == PDELAY + 1, "attached as soon as powered");
    check(active_parts == 3'(from + 1) && alloc_parts == 3'(from + 1) && state == B_STABLE, "one partition more");
    part_empty[from] = 1'b0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(active_parts == 3'd4 && alloc_parts == 3'd4 && state == B_STABLE, "reset: all partitions");
    pulse_up();
    check(state == B_STABLE && !pwr_busy, "no upsize beyond NPART");
    do_downsize(4);
    do_downsize(3);
    do_downsize(2);
    pulse_down();
    check(state == B_STABLE && active_parts == 3'd1, "never below one partition");
    do_upsize(1);
    do_upsize(2);
    // upsize priority: a downsize phase is abandoned
    pulse_down();
    check(alloc_parts == 3'd2, "downsize phase closes allocation");
    pulse_up();
    check(state == B_STABLE && alloc_parts == 3'd3 && active_parts == 3'd3, "upsize wins: partition reopened");
    // held upsize over a power-down
    pulse_down();
    part_empty[2] = 1'b1;
    @(negedge clk);
    check(state == B_DOWN_POWER && active_parts == 3'd2, "powering down");
    pulse_up();
    wait_cycles(PDELAY);
    check(state == B_UP_POWER, "held upsize started after power-down");
    part_empty[2] = 1'b0;
    wait_cycles(PDELAY + 2);
    check(active_parts == 3'd3, "back to three");
    check(n_start_off == 4 && n_start_on == 3, "power requests counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
