// Testbench for resizable_queue (16 entries, 4 partitions, 2 ports, 64-cycle
// sampling period, 8-stall threshold, 10-cycle power switching).
// A light phase must shrink the queue to one partition, one partition per
// downsize decision; a heavy, wrapping phase must grow it back to four.
// Independent monitors recompute each period's occupancy sum (downsize
// decision) and the stall count (upsize decision), check the power-up time
// before an attach, that detached partitions are powered off, and that the
// entries leave the queue in the order they came in.
module tb_resizable_queue;
  import resize_pkg::*;
  localparam int ENTRIES = 16, NPART = 4, W = 2, DW = 16, PSIZE = ENTRIES / NPART;
  localparam int PLOG = 6, PERIOD = 1 << PLOG, THRESH = 8, DELAY = 10;
  logic clk = 0, rst_n = 0;
  logic [1:0] alloc_cnt = '0, commit_cnt = '0, alloc_grant;
  logic [DW-1:0] alloc_data [W], head_data [W];
  logic [3:0] tail_idx, head_idx;
  logic stall, up_dec, down_dec, resize;
  logic [4:0] occupancy, avg_occ;
  logic [3:0] stall_count;
  logic [2:0] active_parts;
  logic [NPART-1:0] pwr_en;
  qstate_e state;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_up_wait = 0, n_stall = 0;

  resizable_queue #(.ENTRIES(ENTRIES), .NPART(NPART), .W(W), .DW(DW), .PERIOD_LOG2(PLOG),
                    .THRESHOLD(THRESH), .DELAY(DELAY)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- decision monitors, sampled at the clock edge
  int cyc = 0, sum = 0, stalls = 0;
  bit exp_down = 0, exp_up = 0;
  int up_time = -1, prev_parts = NPART;
  always @(posedge clk) if (rst_n) begin
    check(down_dec == exp_down, "downsize decision");
    check(up_dec == exp_up, "upsize decision");
    exp_down = 0;
    exp_up   = 0;
    sum += int'(occupancy);
    if (cyc == PERIOD - 1) begin
      exp_down = (active_parts > 1) && (sum <= (int'(active_parts) - 1) * PSIZE * PERIOD);
      sum = 0;
      cyc = 0;
    end else cyc++;
    if (stall) begin
      n_stall++;
      stalls++;
      if (stalls == THRESH) begin stalls = 0; exp_up = 1; end
    end
    // resizing steps
    if (dut.pwr_start && dut.pwr_dir == PWR_ON) up_time = 0;
    else if (up_time >= 0) up_time++;
    if (state == Q_UP_PHASE && !dut.can_grow) n_up_wait++;
    if (active_parts != 3'(prev_parts)) begin
      check(active_parts == 3'(prev_parts + 1) || active_parts == 3'(prev_parts - 1), "one partition at a time");
      if (active_parts > 3'(prev_parts)) begin
        n_up++;
        check(up_time >= DELAY + 2, "attach only after the power-up time");
        up_time = -1;
      end else n_down++;
      prev_parts = int'(active_parts);
    end
    for (int p = 0; p < NPART; p++)
      if (p < active_parts) check(pwr_en[p], "partitions in use are powered");
      else if (state == Q_STABLE) check(!pwr_en[p], "partitions not in use are off");
  end

  // ---- traffic and FIFO order
  int q[$];
  int next_val = 1;
  initial begin
    int want, cmt, phase;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 24000; c++) begin
      phase = (c < 8000) ? 0 : (c < 16000) ? 1 : 2;
      if (phase == 0) begin       // light load: at most a couple of entries live
        want = $urandom_range(0, 1);
        cmt  = q.size();
      end else if (phase == 1) begin  // heavy load, slow retirement: stalls and wrapping
        want = W;
        cmt  = $urandom_range(0, 3) == 0 ? 1 : 0;
      end else begin
        want = $urandom_range(0, W);
        cmt  = $urandom_range(0, W);
      end
      if (cmt > q.size()) cmt = q.size();
      if (cmt > W) cmt = W;
      alloc_cnt  = 2'(want);
      commit_cnt = 2'(cmt);
      for (int i = 0; i < W; i++) alloc_data[i] = DW'(next_val + i);
      #1;
      for (int i = 0; i < W; i++) if (i < q.size()) check(int'(head_data[i]) == q[i], "FIFO order");
      check(int'(occupancy) == q.size(), "occupancy");
      for (int i = 0; i < cmt; i++) void'(q.pop_front());
      for (int i = 0; i < alloc_grant; i++) q.push_back(next_val + i);
      next_val += W;
      if (c == 7999) check(active_parts == 3'd1, "light phase shrinks to one partition");
      if (c == 15999) check(active_parts == 3'd4, "heavy phase grows to four partitions");
      @(negedge clk);
    end
    check(n_down >= 3 && n_up >= 3 && n_up_wait > 0 && n_stall > 0, "mechanisms exercised");
    $display("downsizes %0d upsizes %0d upsize waits %0d stalls %0d", n_down, n_up, n_up_wait, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
