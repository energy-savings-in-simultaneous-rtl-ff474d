// Testbench for resizable_buffer (16 entries, 4 partitions, 2 ports, 64-cycle
// sampling period, 8-stall threshold, 10-cycle power switching).
// A light phase must shrink the buffer to one partition, a heavy phase grow it
// back to four, and a mixed phase exercise both.  Monitors recompute the
// downsize and upsize decisions, check that no entry is handed out beyond
// the partitions open for allocation, that a downsize waits for the last
// partition to drain, the power-up time before an attach, and the payload.
module tb_resizable_buffer;
  import resize_pkg::*;
  localparam int ENTRIES = 16, NPART = 4, W = 2, DW = 16, PSIZE = ENTRIES / NPART;
  localparam int PLOG = 6, PERIOD = 1 << PLOG, THRESH = 8, DELAY = 10;
  logic clk = 0, rst_n = 0;
  logic [1:0] alloc_cnt = '0, alloc_grant;
  logic [3:0] alloc_idx [W];
  logic stall, up_dec, down_dec;
  logic [W-1:0] rel_valid = '0, wr_en = '0;
  logic [3:0] rel_idx [W], wr_idx [W], rd_idx [W];
  logic [DW-1:0] wr_data [W], rd_data [W];
  logic [4:0] occupancy, avg_occ;
  logic [3:0] stall_count;
  logic [2:0] active_parts, alloc_parts;
  logic [NPART-1:0] pwr_en;
  bstate_e state;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_drain_wait = 0, n_stall = 0;

  resizable_buffer #(.ENTRIES(ENTRIES), .NPART(NPART), .W(W), .DW(DW), .PERIOD_LOG2(PLOG),
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
    for (int i = 0; i < W; i++)
      if (i < alloc_grant) check(int'(alloc_idx[i]) < alloc_parts * PSIZE, "allocation inside open partitions");
    if (dut.pwr_start && dut.pwr_dir == PWR_ON) up_time = 0;
    else if (up_time >= 0) up_time++;
    if (state == B_DOWN_PHASE && !dut.part_empty[active_parts - 1]) n_drain_wait++;
    if (active_parts != 3'(prev_parts)) begin
      check(active_parts == 3'(prev_parts + 1) || active_parts == 3'(prev_parts - 1), "one partition at a time");
      if (active_parts > 3'(prev_parts)) begin
        n_up++;
        
        check(up_time == DELAY + 2, "attach right after the power-up time");
        up_time = -1;
      end else begin
        n_down++;
        check(dut.part_empty[prev_parts - 1], "detached partition was empty");
      end
      prev_parts = int'(active_parts);
    end
    for (int p = 0; p < NPART; p++)
      if (p < active_parts) check(pwr_en[p], "partitions in use are powered");
      else if (state == B_STABLE) check(!pwr_en[p], "partitions not in use are off");
  end

  initial begin
    int live[$], mdata[ENTRIES];
    int want, nrel, phase;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 24000; c++) begin
      phase = (c < 8000) ? 0 : (c < 16000) ? 1 : 2;
      want  = (phase == 0) ? $urandom_range(0, 1) : (phase == 1) ? W : $urandom_range(0, W);
      nrel  = (phase == 0) ? W : (phase == 1) ? int'($urandom_range(0, 3) == 0) : $urandom_range(0, W);
      live.shuffle();
      rel_valid = '0;
      for (int i = 0; i < W; i++) begin
        rel_idx[i] = '0;
        if (i < nrel && i < live.size()) begin rel_valid[i] = 1; rel_idx[i] = 4'(live[i]); end
        rd_idx[i] = (live.size() > 0) ? 4'(live[$urandom_range(0, live.size() - 1)]) : '0;
      end
      alloc_cnt = 2'(want);
      #1;
      for (int i = 0; i < W; i++) if (live.size() > 0) check(int'(rd_data[i]) == mdata[rd_idx[i]], "payload");
      check(int'(occupancy) == live.size(), "occupancy");
      for (int i = 0; i < W; i++) begin
        wr_en[i] = (i < alloc_grant); wr_idx[i] = alloc_idx[i]; wr_data[i] = DW'($urandom);
      end
      for (int i = W - 1; i >= 0; i--) if (rel_valid[i]) live.delete(i);
      for (int i = 0; i < alloc_grant; i++) begin live.push_back(int'(alloc_idx[i])); mdata[alloc_idx[i]] = int'(wr_data[i]); end
      if (c == 7999) check(active_parts == 3'd1, "light phase shrinks to one partition");
      if (c == 15999) check(active_parts == 3'd4, "heavy phase grows to four partitions");
      @(negedge clk);
      wr_en = '0;
    end
    check(n_down >= 3 && n_up >= 3 && n_drain_wait > 0 && n_stall > 0, "mechanisms exercised");
    $display("downsizes %0d upsizes %0d drain waits %0d stalls %0d", n_down, n_up, n_drain_wait, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
