// Testbench for queue_resize_fsm.  The testbench plays the queue (can_grow,
// can_shrink) and a 5-cycle power sequencer.  Directed scenarios: downsize
// waiting for head/tail, upsize with power-up then waiting for head/tail,
// limits at 1 and NPART partitions, an upsize decision overriding a downsize
// phase, an upsize decision held over a power-down, and a downsize decision
// ignored during an upsize.
module tb_queue_resize_fsm;
  import resize_pkg::*;
  localparam int NPART = 4, PDELAY = 5;
  logic clk = 0, rst_n = 0;
  logic up_dec = 0, down_dec = 0, can_grow = 0, can_shrink = 0;
  logic pwr_busy = 0, pwr_done = 0;
  logic [2:0] active_parts;
  logic resize, pwr_start;
  pwr_dir_e pwr_dir;
  logic [1:0] pwr_idx;
  qstate_e state;
  int checks = 0, failures = 0;
  int n_start_on = 0, n_start_off = 0;
  logic [1:0] last_idx;
  pwr_dir_e last_dir;

  queue_resize_fsm #(.NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  // Power sequencer stand-in: busy for PDELAY cycles, then a done pulse.
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

  // Downsize from the current size, with the queue refusing for a while.
  task automatic do_downsize(int from);
    pulse_down();
    check(state == Q_DOWN_PHASE, "enter downsize phase");
    wait_cycles(4);
    check(state == Q_DOWN_PHASE && active_parts == 3'(from), "downsize waits for head/tail");
    can_shrink = 1;
    #1 check(resize && pwr_start && pwr_dir == PWR_OFF && pwr_idx == 2'(from - 1), "detach and power off last");
    @(negedge clk) can_shrink = 0;
    check(active_parts == 3'(from - 1) && state == Q_DOWN_POWER, "one partition fewer");
    wait_cycles(PDELAY + 1);
    check(state == Q_STABLE, "back to stable after power-down");
  endtask

  task automatic do_upsize(int from);
    int t;
    pulse_up();
    check(state == Q_UP_POWER && active_parts == 3'(from), "power up first");
    check(last_idx == 2'(from) && last_dir == PWR_ON, "power-up of next partition");
    t = 0;
    while (state == Q_UP_POWER && t < 50) begin @(negedge clk); t++; end
    check(t == PDELAY + 1, "power-up lasts until the sequencer is done");
    check(state == Q_UP_PHASE, "wait for head/tail");
    wait_cycles(3);
    check(active_parts == 3'(from), "no attach while queue wraps");
    can_grow = 1;
    #1 check(resize, "attach pulse");
    @(negedge clk) can_grow = 0;
    check(active_parts == 3'(from + 1) && state == Q_STABLE, "one partition more");
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
    check(active_parts == 3'd4 && state == Q_STABLE, "reset: all partitions");
    pulse_up();
    check(state == Q_STABLE && !pwr_busy, "no upsize beyond NPART");
    do_downsize(4);
    do_downsize(3);
    do_downsize(2);
    pulse_down();
    check(state == Q_STABLE && active_parts == 3'd1, "never below one partition");
    do_upsize(1);
    // downsize decision during an upsize is ignored
    pulse_up();
    pulse_down();
    check(state == Q_UP_POWER, "downsize ignored while upsizing");
    wait_cycles(PDELAY + 2);
    can_grow = 1;
    @(negedge clk) can_grow = 0;
    check(active_parts == 3'd3 && state == Q_STABLE, "upsize completed");
    // upsize priority: a downsize phase is abandoned for an upsize
    pulse_down();
    check(state == Q_DOWN_PHASE, "downsize phase");
    pulse_up();
    check(state == Q_UP_POWER && active_parts == 3'd3, "upsize wins over downsize");
    wait_cycles(PDELAY + 2);
    can_grow = 1;
    @(negedge clk) can_grow = 0;
    check(active_parts == 3'd4, "grew to four");
    // at full size an upsize decision ends the downsize phase
    pulse_down();
    pulse_up();
    check(state == Q_STABLE && active_parts == 3'd4, "downsize cancelled at full size");
    // upsize decision held over a power-down
    pulse_down();
    can_shrink = 1;
    @(negedge clk) can_shrink = 0;
    check(state == Q_DOWN_POWER && active_parts == 3'd3, "powering down");
    pulse_up();
    check(state == Q_DOWN_POWER, "still powering down");
    wait_cycles(PDELAY + 1);
    check(state == Q_UP_POWER, "held upsize started after power-down");
    wait_cycles(PDELAY + 2);
    can_grow = 1;
    @(negedge clk) can_grow = 0;
    check(active_parts == 3'd4, "back to four");
    check(n_start_off == 4 && n_start_on == 4, "power requests counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
