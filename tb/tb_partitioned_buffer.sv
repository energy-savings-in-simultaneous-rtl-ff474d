// Testbench for partitioned_buffer: 16 entries in 4 partitions, 3 ports.
// A reference valid map predicts which entries are allocated (lowest free ones
// below the allocation limit) and a reference array the payload.  Allocated
// entries are written through the write ports in the same cycle, later read
// back through the read ports, and released at random.
module tb_partitioned_buffer;
  localparam int ENTRIES = 16, NPART = 4, W = 3, DW = 16, PSIZE = ENTRIES / NPART;
  logic clk = 0, rst_n = 0;
  logic [2:0] alloc_parts = 3'd4;
  logic [1:0] alloc_cnt = '0, alloc_grant;
  logic [3:0] alloc_idx [W];
  logic stall;
  logic [W-1:0] rel_valid = '0, wr_en = '0;
  logic [3:0] rel_idx [W], wr_idx [W], rd_idx [W];
  logic [DW-1:0] wr_data [W], rd_data [W];
  logic [4:0] occupancy;
  logic [NPART-1:0] part_empty;
  int checks = 0, failures = 0, n_stall = 0, n_alloc = 0, n_rel = 0, n_limited = 0;

  partitioned_buffer #(.ENTRIES(ENTRIES), .NPART(NPART), .W(W), .DW(DW)) dut (.*);

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
    bit mvalid [ENTRIES];
    int mdata [ENTRIES];
    int exp_idx[$], rels[$], live[$];
    int lim, want, occ, parts, bias;
    bit empty;
    for (int e = 0; e < ENTRIES; e++) mvalid[e] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    parts = NPART;
    for (int c = 0; c < 10000; c++) begin
      if ($urandom_range(0, 49) == 0) parts = $urandom_range(1, NPART);
      lim  = parts * PSIZE;
      bias = (c / 400) % 2;
      want = (bias != 0) ? $urandom_range(0, W) : $urandom_range(0, 1);
      alloc_parts = 3'(parts);
      alloc_cnt   = 2'(want);
      // releases: distinct live entries
      live.delete();
      for (int e = 0; e < ENTRIES; e++) if (mvalid[e]) live.push_back(e);
      live.shuffle();
      rels.delete();
      for (int i = 0; i < W; i++) begin
        rel_valid[i] = 0;
        rel_idx[i]   = '0;
        if (i < live.size() && $urandom_range(0, 2) < ((bias != 0) ? 1 : 2)) begin
          rel_valid[i] = 1; rel_idx[i] = 4'(live[i]); rels.push_back(live[i]);
        end
      end
      // reads of live entries
      for (int i = 0; i < W; i++) rd_idx[i] = (live.size() > 0) ? 4'(live[$urandom_range(0, live.size() - 1)]) : '0;
      // expected allocation
      exp_idx.delete();
      for (int e = 0; e < lim && exp_idx.size() < want; e++) if (!mvalid[e]) exp_idx.push_back(e);
      #1;
      check(int'(alloc_grant) == exp_idx.size(), "grant");
      check(stall == (exp_idx.size() < want), "stall");
      for (int i = 0; i < exp_idx.size(); i++) check(int'(alloc_idx[i]) == exp_idx[i], "allocated index");
      for (int i = 0; i < W; i++) if (live.size() > 0) check(int'(rd_data[i]) == mdata[rd_idx[i]], "read data");
      occ = 0;
      for (int e = 0; e < ENTRIES; e++) occ += mvalid[e];
      check(int'(occupancy) == occ, "occupancy");
      for (int p = 0; p < NPART; p++) begin
        empty = 1;
        for (int e = p * PSIZE; e < (p + 1) * PSIZE; e++) if (mvalid[e]) empty = 0;
        check(part_empty[p] == empty, "partition empty flags");
      end
      // write the newly allocated entries through the write ports
      for (int i = 0; i < W; i++) begin
        wr_en[i]   = (i < int'(alloc_grant));
        wr_idx[i]  = alloc_idx[i];
        wr_data[i] = DW'($urandom);
      end
      if (stall) n_stall++;
      if (stall && occ < ENTRIES - W) n_limited++;
      // model the edge
      foreach (rels[i]) begin mvalid[rels[i]] = 0; n_rel++; end
      foreach (exp_idx[i]) begin mvalid[exp_idx[i]] = 1; mdata[exp_idx[i]] = int'(wr_data[i]); n_alloc++; end
      @(negedge clk);
      wr_en = '0;
    end
    check(n_stall > 50 && n_limited > 20 && n_alloc > 1000 && n_rel > 1000, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
