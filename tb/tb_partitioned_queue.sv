// Testbench for partitioned_queue: 16 entries in 4 partitions, 3 ports.
// Random allocation and commit traffic against a reference FIFO, with the
// active size moved up and down whenever the queue reports it may be.
// Checks grants, stalls, FIFO order of the head entries, occupancy, that the
// tail stays inside the active partitions, and can_grow / can_shrink against
// positions tracked by the testbench.
module tb_partitioned_queue;
  localparam int ENTRIES = 16, NPART = 4, W = 3, DW = 16, PSIZE = ENTRIES / NPART;
  logic clk = 0, rst_n = 0;
  logic [2:0] active_parts = 3'd4;
  logic resize = 0;
  logic [1:0] alloc_cnt = '0, commit_cnt = '0, alloc_grant;
  logic [DW-1:0] alloc_data [W];
  logic [DW-1:0] head_data [W];
  logic [3:0] tail_idx, head_idx;
  logic stall, can_grow, can_shrink;
  logic [4:0] occupancy, limit;
  int checks = 0, failures = 0;
  int n_grow = 0, n_shrink = 0, n_stall = 0, n_wrapped = 0, n_block = 0;

  partitioned_queue #(.ENTRIES(ENTRIES), .NPART(NPART), .W(W), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q[$];
    automatic int mhead = 0, k = NPART, lim, fre, g, cmt, next_val = 1, want, bias;
    bit grow, shrink;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 12000; c++) begin
      lim  = k * PSIZE;
      bias = (c / 500) % 3;   // phases: filling, draining, balanced
      want = (bias == 0) ? $urandom_range(1, W) : (bias == 1) ? $urandom_range(0, 1) : $urandom_range(0, W);
      cmt  = (bias == 0) ? $urandom_range(0, 1) : (bias == 1) ? $urandom_range(0, W) : $urandom_range(0, W);
      if (cmt > q.size()) cmt = q.size();
      grow   = 0;
      shrink = 0;
      // resize only when the queue says it may; the model predicts that
      if ($urandom_range(0, 19) == 0) begin
        if (k < NPART && mhead + q.size() <= lim) grow = 1;
        else if (k > 1 && mhead + q.size() <= lim - PSIZE) shrink = 1;
      end
      alloc_cnt  = 2'(want);
      commit_cnt = 2'(cmt);
      resize     = grow | shrink;
      for (int i = 0; i < W; i++) alloc_data[i] = DW'(next_val + i);
      #1;
      fre = lim - q.size();
      g = (want > fre) ? fre : want;
      if (resize) g = 0;
      check(int'(alloc_grant) == g, "grant");
      check(stall == (want > fre), "stall");
      check(int'(occupancy) == q.size(), "occupancy");
      check(int'(head_idx) == mhead, "head position");
      check(int'(tail_idx) == (mhead + q.size()) % lim, "tail position");
      check(can_grow == (mhead + q.size() <= lim), "can_grow");
      check(can_shrink == (k > 1 && mhead + q.size() <= lim - PSIZE), "can_shrink");
      for (int i = 0; i < W; i++)
        if (i < q.size()) check(int'(head_data[i]) == q[i], "head data in order");
      if (stall) n_stall++;
      if (mhead + q.size() > lim) n_wrapped++;
      if (resize && want > 0) n_block++;
      // model the clock edge
      for (int i = 0; i < cmt; i++) void'(q.pop_front());
      for (int i = 0; i < g; i++) q.push_back(next_val + i);
      next_val += W;
      if (q.size() == 0) mhead = 0; else mhead = (mhead + cmt) % lim;
      if (grow) begin k++; n_grow++; end
      if (shrink) begin k--; n_shrink++; end
      @(negedge clk);
      active_parts = 3'(k);
      resize = 0;
    end
    check(n_grow > 5 && n_shrink > 5 && n_stall > 50 && n_wrapped > 50 && n_block > 0, "coverage");
    $display("grow %0d shrink %0d stall %0d wrapped %0d", n_grow, n_shrink, n_stall, n_wrapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
