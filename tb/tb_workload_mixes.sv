// Workload testbench: the twelve two-thread application mixes (twolf-art,
// equake-parser, mgrid-mcf, ... mcf-wupwise), each reduced to the average
// occupancy its threads keep in the ROB and LSQ and the mix keeps in the
// shared IQ and the INT and FP register files.  For every mix the design is reset to full size,
// each structure is held at its occupancy for eight sampling periods, and the
// number of partitions it settles at is checked against
// max(1, ceil(occupancy / partition size)): the smallest size the average
// fits in.  The share of partitions left switched off is printed per
// structure.  The sampling period is shortened to 1K cycles and the upsize
// threshold to 256 stalls to keep the run short; sizes are the defaults.
// An IQ figure is used for seven of the mixes (1, 3, 5, 7, 8, 9, 10); in the
// other five the IQ is left empty and must shrink to one partition.
module tb_workload_mixes;
  import resize_pkg::*;
  localparam int NT = 2, W = 8, NPART = 4;
  localparam int ROBN = 96, LSQN = 48, IQN = 64, PRFN = 192;
  localparam int PLOG = 10, RUN = 8 << PLOG;

  localparam int NS = 7;
  // Average occupancy in percent: ROB t0, ROB t1, LSQ t0, LSQ t1, INT-PRF, FP-PRF, IQ
  localparam real MIX [12][NS] = '{
    '{72.92, 77.08, 52.08, 54.17, 82.29, 60.94, 70.31},
    '{86.46, 59.38, 83.33, 39.58, 74.48, 68.75,  0.00},
    '{18.75, 98.96, 16.67, 56.25, 79.17, 42.71, 98.44},
    '{34.38, 23.96, 20.83, 16.67, 61.98, 33.33,  0.00},
    '{35.42, 37.50, 31.25, 33.33, 60.42, 43.75, 25.00},
    '{44.79, 44.79, 35.42, 29.17, 63.02, 51.56,  0.00},
    '{68.75, 28.13, 50.00, 18.75, 76.56, 39.06, 60.94},
    '{81.25, 63.54, 66.67, 45.83, 77.60, 58.85, 56.25},
    '{92.71, 31.25, 87.50, 29.17, 59.38, 78.13, 78.13},
    '{65.63, 30.21, 39.58, 25.00, 70.31, 40.63, 50.00},
    '{76.04, 41.67, 62.50, 33.33, 55.21, 71.88,  0.00},
    '{98.96, 19.79, 56.25, 10.42, 83.33, 40.10,  0.00}
  };
  localparam int SIZE [NS] = '{ROBN, ROBN, LSQN, LSQN, PRFN, PRFN, IQN};

  logic clk = 0, rst_n = 0;
  logic [3:0]  rob_alloc_cnt [NT], rob_alloc_grant [NT], rob_commit_cnt [NT];
  logic [31:0] rob_alloc_data [NT][W], rob_head_data [NT][W];
  logic [6:0]  rob_tail_idx [NT], rob_occupancy [NT];
  logic [NT-1:0] rob_stall, lsq_stall;
  logic [2:0]  rob_parts [NT], lsq_parts [NT], iq_parts, prf_parts [2];
  logic [3:0]  rob_pwr_en [NT], lsq_pwr_en [NT], iq_pwr_en, prf_pwr_en [2];
  logic [3:0]  lsq_alloc_cnt [NT], lsq_alloc_grant [NT], lsq_commit_cnt [NT];
  logic [63:0] lsq_alloc_data [NT][W], lsq_head_data [NT][W];
  logic [5:0]  lsq_tail_idx [NT], lsq_occupancy [NT];
  logic [3:0]  iq_alloc_cnt, iq_alloc_grant;
  logic [5:0]  iq_alloc_idx [W], iq_rel_idx [W], iq_wr_idx [W], iq_rd_idx [W];
  logic        iq_stall;
  logic [W-1:0] iq_rel_valid, iq_wr_en;
  logic [63:0] iq_wr_data [W], iq_rd_data [W];
  logic [6:0]  iq_occupancy;
  logic [3:0]  prf_alloc_cnt [2], prf_alloc_grant [2];
  logic [7:0]  prf_alloc_idx [2][W], prf_rel_idx [2][W], prf_wr_idx [2][W], prf_rd_idx [2][W];
  logic [1:0]  prf_stall;
  logic [W-1:0] prf_rel_valid [2], prf_wr_en [2];
  logic [63:0] prf_wr_data [2][W], prf_rd_data [2][W];
  logic [7:0]  prf_occupancy [2];

  smt_resize_top #(.PERIOD_LOG2(PLOG), .THRESHOLD(256)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (12 * (RUN + 20) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    int target [NS], expect_k [NS], cnt, cmt, want, nrel [3], off_sum [NS];
    int live [3][$];
    int iq_off;
    logic [2:0] k_now [NS];
    foreach (off_sum[s]) off_sum[s] = 0;
    iq_wr_en = '0; iq_off = 0;
    for (int i = 0; i < W; i++) begin iq_rel_idx[i] = '0; iq_wr_idx[i] = '0; iq_rd_idx[i] = '0; iq_wr_data[i] = '0; end
    for (int m = 0; m < 12; m++) begin
      rst_n = 0;
      for (int t = 0; t < NT; t++) begin
        rob_alloc_cnt[t] = '0; rob_commit_cnt[t] = '0; lsq_alloc_cnt[t] = '0; lsq_commit_cnt[t] = '0;
        for (int i = 0; i < W; i++) begin rob_alloc_data[t][i] = 32'(i); lsq_alloc_data[t][i] = 64'(i); end
      end
      for (int f = 0; f < 2; f++) begin
        prf_alloc_cnt[f] = '0; prf_rel_valid[f] = '0; prf_wr_en[f] = '0; live[f].delete();
        for (int i = 0; i < W; i++) begin prf_rel_idx[f][i] = '0; prf_wr_idx[f][i] = '0; prf_rd_idx[f][i] = '0; prf_wr_data[f][i] = '0; end
      end
      iq_alloc_cnt = '0; iq_rel_valid = '0; live[2].delete();
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int s = 0; s < NS; s++) begin
        target[s]   = int'(MIX[m][s] * SIZE[s] / 100.0);  // nearest whole entry
        expect_k[s] = clip((target[s] + SIZE[s] / NPART - 1) / (SIZE[s] / NPART), 1, NPART);
      end
      for (int c = 0; c < RUN; c++) begin
        // queues: keep the count at the target, retiring one and refilling
        for (int t = 0; t < NT; t++) begin
          cnt = int'(rob_occupancy[t]);
          cmt = (cnt >= target[t] && cnt > 0) ? 1 : 0;
          want = clip(target[t] - (cnt - cmt), 0, W);
          rob_commit_cnt[t] = 4'(cmt); rob_alloc_cnt[t] = 4'(want);
          cnt = int'(lsq_occupancy[t]);
          cmt = (cnt >= target[2 + t] && cnt > 0) ? 1 : 0;
          want = clip(target[2 + t] - (cnt - cmt), 0, W);
          lsq_commit_cnt[t] = 4'(cmt); lsq_alloc_cnt[t] = 4'(want);
        end
        // register files: keep the live count at the target
        for (int f = 0; f < 2; f++) begin
          live[f].shuffle();
          nrel[f] = (live[f].size() >= target[4 + f] && live[f].size() > 0) ? 1 : 0;
          prf_rel_valid[f] = '0;
          if (nrel[f] != 0) begin prf_rel_valid[f][0] = 1'b1; prf_rel_idx[f][0] = 8'(live[f][0]); end
          prf_alloc_cnt[f] = 4'(clip(target[4 + f] - (live[f].size() - nrel[f]), 0, W));
        end
        // issue queue: the same, one issue per cycle when at the target
        live[2].shuffle();
        nrel[2] = (live[2].size() >= target[6] && live[2].size() > 0) ? 1 : 0;
        iq_rel_valid = '0;
        if (nrel[2] != 0) begin iq_rel_valid[0] = 1'b1; iq_rel_idx[0] = 6'(live[2][0]); end
        iq_alloc_cnt = 4'(clip(target[6] - (live[2].size() - nrel[2]), 0, W));
        #1;
        for (int f = 0; f < 2; f++) begin
          if (prf_rel_valid[f][0]) live[f].delete(0);
          for (int i = 0; i < prf_alloc_grant[f]; i++) live[f].push_back(int'(prf_alloc_idx[f][i]));
        end
        if (iq_rel_valid[0]) live[2].delete(0);
        for (int i = 0; i < iq_alloc_grant; i++) live[2].push_back(int'(iq_alloc_idx[i]));
        @(negedge clk);
      end
      k_now = '{rob_parts[0], rob_parts[1], lsq_parts[0], lsq_parts[1], prf_parts[0], prf_parts[1], iq_parts};
      for (int s = 0; s < NS; s++) begin
        // an average exactly filling K partitions leaves no room for the
        // entry allocated in the cycle another retires: it may settle at K+1
        check(int'(k_now[s]) == expect_k[s] ||
              (target[s] % (SIZE[s] / NPART) == 0 && int'(k_now[s]) == expect_k[s] + 1), "settled size");
        off_sum[s] += NPART - int'(k_now[s]);
      end
      if (target[6] > 0) iq_off += NPART - int'(k_now[6]);
      $display("mix%0d: ROB %0d/%0d LSQ %0d/%0d INT-PRF %0d FP-PRF %0d IQ %0d partitions on (expected %0d/%0d %0d/%0d %0d %0d %0d)",
               m + 1, k_now[0], k_now[1], k_now[2], k_now[3], k_now[4], k_now[5], k_now[6],
               expect_k[0], expect_k[1], expect_k[2], expect_k[3], expect_k[4], expect_k[5], expect_k[6]);
    end
    $display("partitions off on average: ROB %0d%%, LSQ %0d%%, INT-PRF %0d%%, FP-PRF %0d%%, IQ %0d%% (7 mixes with a figure)",
             (off_sum[0] + off_sum[1]) * 100 / (24 * NPART), (off_sum[2] + off_sum[3]) * 100 / (24 * NPART),
             off_sum[4] * 100 / (12 * NPART), off_sum[5] * 100 / (12 * NPART), iq_off * 100 / (7 * NPART));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
