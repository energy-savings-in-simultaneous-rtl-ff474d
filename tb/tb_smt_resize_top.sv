// End-to-end testbench for smt_resize_top at its default sizes: two threads,
// 8-wide ports, 96-entry ROBs, 48-entry LSQs, 64-entry IQ, 192-entry INT and
// FP register files, 32K-cycle sampling period, 32K-stall upsize threshold,
// 300-cycle partition switching.  About 300K cycles.
//
// Schedule (cycle numbers from reset):
//   up to 170K  light traffic on every structure: each must shrink to one
//               partition.  In the first two periods thread 1's ROB and the
//               IQ are set up so that a downsize decision meets a structure
//               that cannot give up its last partition (ROB head parked in the
//               last partition; an IQ entry pinned there) and heavy traffic
//               then makes the upsize decision override the downsize phase.
//   170K-290K   heavy traffic with slow retirement: stalls must grow every
//               structure back to four partitions.
//   290K-300K   random traffic.
// Throughout, ROB and LSQ contents must leave in program order (reference
// FIFOs) and IQ/PRF payloads must read back as written.  Each mechanism is
// counted and must occur: downsize and upsize decisions, downsize phases
// waiting for head/tail or for a partition to drain, upsize phases waiting
// for head/tail, upsize priority over a pending downsize, partition power-up
// and power-down, allocation stalls.
module tb_smt_resize_top;
  import resize_pkg::*;
  localparam int NT = 2, W = 8, NPART = 4;
  localparam int ROBN = 96, LSQN = 48, IQN = 64, PRFN = 192;
  localparam int P = 1 << DEF_SAMPLE_PERIOD_LOG2;
  localparam int END_LIGHT = 170000, END_HEAVY = 290000, END_ALL = 300000;

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

  smt_resize_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, $time / 10);
    end
  endtask

  initial begin
    repeat (END_ALL + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ monitors
  // Structure numbering: 0/1 ROB of thread 0/1, 2/3 LSQ of thread 0/1,
  // 4 IQ, 5 INT-PRF, 6 FP-PRF.
  int n_down_dec[7], n_up_dec[7], n_shrink[7], n_grow[7], n_stall[7];
  int n_q_down_wait = 0, n_q_up_wait = 0, n_b_drain_wait = 0;
  int n_q_priority = 0, n_b_priority = 0, n_pwr_on = 0, n_pwr_off = 0;
  int prev_parts[7];
  logic [2:0] parts_now [7];
  logic       dn [7], up [7];

  always_comb begin
    parts_now[0] = rob_parts[0]; parts_now[1] = rob_parts[1];
    parts_now[2] = lsq_parts[0]; parts_now[3] = lsq_parts[1];
    parts_now[4] = iq_parts; parts_now[5] = prf_parts[0]; parts_now[6] = prf_parts[1];
    dn[0] = dut.g_thread[0].u_rob.down_dec; up[0] = dut.g_thread[0].u_rob.up_dec;
    dn[1] = dut.g_thread[1].u_rob.down_dec; up[1] = dut.g_thread[1].u_rob.up_dec;
    dn[2] = dut.g_thread[0].u_lsq.down_dec; up[2] = dut.g_thread[0].u_lsq.up_dec;
    dn[3] = dut.g_thread[1].u_lsq.down_dec; up[3] = dut.g_thread[1].u_lsq.up_dec;
    dn[4] = dut.u_iq.down_dec; up[4] = dut.u_iq.up_dec;
    dn[5] = dut.g_prf[0].u_prf.down_dec; up[5] = dut.g_prf[0].u_prf.up_dec;
    dn[6] = dut.g_prf[1].u_prf.down_dec; up[6] = dut.g_prf[1].u_prf.up_dec;
  end

  initial for (int s = 0; s < 7; s++) prev_parts[s] = NPART;

  always @(posedge clk) if (rst_n) begin
    logic [NPART-1:0] en [7];
    en[0] = rob_pwr_en[0]; en[1] = rob_pwr_en[1]; en[2] = lsq_pwr_en[0]; en[3] = lsq_pwr_en[1];
    en[4] = iq_pwr_en; en[5] = prf_pwr_en[0]; en[6] = prf_pwr_en[1];
    for (int s = 0; s < 7; s++) begin
      if (dn[s]) n_down_dec[s]++;
      if (up[s]) n_up_dec[s]++;
      if (int'(parts_now[s]) != prev_parts[s]) begin
        check(int'(parts_now[s]) == prev_parts[s] + 1 || int'(parts_now[s]) == prev_parts[s] - 1,
              "one partition at a time");
        if (int'(parts_now[s]) > prev_parts[s]) n_grow[s]++; else n_shrink[s]++;
        prev_parts[s] = int'(parts_now[s]);
      end
      for (int p = 0; p < NPART; p++)
        if (p < parts_now[s]) check(en[s][p], "partitions in use are powered");
    end
    n_stall[0] += rob_stall[0]; n_stall[1] += rob_stall[1];
    n_stall[2] += lsq_stall[0]; n_stall[3] += lsq_stall[1];
    n_stall[4] += iq_stall; n_stall[5] += prf_stall[0]; n_stall[6] += prf_stall[1];
    if (dut.g_thread[1].u_rob.state == Q_DOWN_PHASE && !dut.g_thread[1].u_rob.u_queue.can_shrink) n_q_down_wait++;
    if (dut.g_thread[0].u_rob.state == Q_UP_PHASE && !dut.g_thread[0].u_rob.u_queue.can_grow) n_q_up_wait++;
    if (dut.u_iq.state == B_DOWN_PHASE && !dut.u_iq.part_empty[iq_parts - 1]) n_b_drain_wait++;
    if (dut.g_thread[1].u_rob.state == Q_DOWN_PHASE && up[1]) n_q_priority++;
    if (dut.u_iq.state == B_DOWN_PHASE && up[4]) n_b_priority++;
    if (dut.g_thread[0].u_rob.u_power.start && !dut.g_thread[0].u_rob.u_power.busy) begin
      if (dut.g_thread[0].u_rob.u_power.dir == PWR_ON) n_pwr_on++; else n_pwr_off++;
    end
  end

  // ------------------------------------------------------------------ traffic
  typedef enum int {LIGHT, HEAVY, FREEZE, FILL_NO_RETIRE, RANDOM, PARK} mode_e;

  int rob_q [NT][$];
  longint lsq_q [NT][$];
  int iq_live[$], prf_live[2][$];
  longint iq_mem [IQN], prf_mem [2][PRFN];
  int seq = 1;
  bit rob1_parked = 0, iq_pinned = 0, rob1_released = 0, iq_released = 0;
  int pin_idx = -1;

  function automatic void queue_traffic(input mode_e m, input int size, output int want, output int cmt);
    case (m)
      LIGHT:          begin want = $urandom_range(0, 1); cmt = size; end
      HEAVY:          begin want = W; cmt = ($urandom_range(0, 3) == 0) ? 1 : 0; end
      FREEZE:         begin want = 0; cmt = 0; end
      FILL_NO_RETIRE: begin want = W; cmt = 0; end
      PARK:           begin want = 1; cmt = size; end
      default:        begin want = $urandom_range(0, W); cmt = $urandom_range(0, W); end
    endcase
    if (cmt > size) cmt = size;
    if (cmt > W) cmt = W;
  endfunction

  function automatic int buf_releases(input mode_e m);
    case (m)
      LIGHT:          return W;
      HEAVY:          return ($urandom_range(0, 3) == 0) ? 1 : 0;
      FILL_NO_RETIRE: return 0;
      FREEZE:         return 0;
      default:        return $urandom_range(0, W);
    endcase
  endfunction

  initial begin
    mode_e qm [4], bm [3];
    int want, cmt, nrel, c;
    for (int t = 0; t < NT; t++) begin
      rob_alloc_cnt[t] = '0; rob_commit_cnt[t] = '0; lsq_alloc_cnt[t] = '0; lsq_commit_cnt[t] = '0;
    end
    iq_alloc_cnt = '0; iq_rel_valid = '0; iq_wr_en = '0;
    for (int f = 0; f < 2; f++) begin prf_alloc_cnt[f] = '0; prf_rel_valid[f] = '0; prf_wr_en[f] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (c = 0; c < END_ALL; c++) begin
      // ---- choose the traffic of each structure
      for (int s = 0; s < 4; s++) qm[s] = (c < END_LIGHT) ? LIGHT : (c < END_HEAVY) ? HEAVY : RANDOM;
      for (int s = 0; s < 3; s++) bm[s] = (c < END_LIGHT) ? LIGHT : (c < END_HEAVY) ? HEAVY : RANDOM;
      // thread 1 ROB: park the head in the last partition before the first
      // period ends, then fill without retiring until the upsize decision
      if (!rob1_released) begin
        if (c < P) begin
          if (!rob1_parked && rob_q[1].size() == 1 && dut.g_thread[1].u_rob.head_idx >= 7'(3 * ROBN / 4))
            rob1_parked = 1;
          qm[1] = rob1_parked ? FREEZE : PARK;
        end else if (c < P + 64) qm[1] = FREEZE;
        else qm[1] = FILL_NO_RETIRE;
        if (c >= P + 64 && n_up_dec[1] > 0) rob1_released = 1;
      end
      // IQ: pin an entry in the last partition, then fill without releasing
      if (!iq_released) begin
        if (c < 8) bm[0] = FREEZE;          // fill the IQ once, releasing nothing
        if (c >= P + 64) bm[0] = FILL_NO_RETIRE;
        if (c >= P + 64 && n_up_dec[4] > 0) iq_released = 1;
      end

      // ---- ROB and LSQ of each thread
      for (int t = 0; t < NT; t++) begin
        queue_traffic(qm[t], rob_q[t].size(), want, cmt);
        rob_alloc_cnt[t] = 4'(want); rob_commit_cnt[t] = 4'(cmt);
        for (int i = 0; i < W; i++) rob_alloc_data[t][i] = 32'(seq + i);
        queue_traffic(qm[2 + t], lsq_q[t].size(), want, cmt);
        lsq_alloc_cnt[t] = 4'(want); lsq_commit_cnt[t] = 4'(cmt);
        for (int i = 0; i < W; i++) lsq_alloc_data[t][i] = {32'(t), 32'(seq + 100 + i)};
      end

      // ---- IQ
      iq_live.shuffle();
      if (iq_released && pin_idx >= 0) begin iq_live.push_front(pin_idx); pin_idx = -1; end
      nrel = buf_releases(bm[0]);
      iq_rel_valid = '0;
      for (int i = 0; i < W; i++) begin
        iq_rel_idx[i] = '0;
        if (i < nrel && i < iq_live.size()) begin iq_rel_valid[i] = 1; iq_rel_idx[i] = 6'(iq_live[i]); end
        iq_rd_idx[i] = (iq_live.size() > 0) ? 6'(iq_live[$urandom_range(0, iq_live.size() - 1)]) : '0;
      end
      iq_alloc_cnt = (!iq_pinned && c < 8) ? 4'(W) : 4'($urandom_range(0, 1));
      if (bm[0] != LIGHT) iq_alloc_cnt = (bm[0] == RANDOM) ? 4'($urandom_range(0, W)) : 4'(W);

      // ---- register files
      for (int f = 0; f < 2; f++) begin
        prf_live[f].shuffle();
        nrel = buf_releases(bm[1 + f]);
        prf_rel_valid[f] = '0;
        for (int i = 0; i < W; i++) begin
          prf_rel_idx[f][i] = '0;
          if (i < nrel && i < prf_live[f].size()) begin prf_rel_valid[f][i] = 1; prf_rel_idx[f][i] = 8'(prf_live[f][i]); end
          prf_rd_idx[f][i] = (prf_live[f].size() > 0) ? 8'(prf_live[f][$urandom_range(0, prf_live[f].size() - 1)]) : '0;
        end
        prf_alloc_cnt[f] = (bm[1 + f] == LIGHT) ? 4'($urandom_range(0, 1)) :
                           (bm[1 + f] == HEAVY) ? 4'(W) : 4'($urandom_range(0, W));
      end

      #1;
      // ---- check outputs against the references
      for (int t = 0; t < NT; t++) begin
        for (int i = 0; i < W; i++) begin
          if (i < rob_q[t].size()) check(int'(rob_head_data[t][i]) == rob_q[t][i], "ROB program order");
          if (i < lsq_q[t].size()) check(lsq_head_data[t][i] == 64'(lsq_q[t][i]), "LSQ program order");
        end
        check(int'(rob_occupancy[t]) == rob_q[t].size(), "ROB occupancy");
        check(int'(lsq_occupancy[t]) == lsq_q[t].size(), "LSQ occupancy");
      end
      for (int i = 0; i < W; i++) if (iq_live.size() > 0) check(iq_rd_data[i] == 64'(iq_mem[iq_rd_idx[i]]), "IQ payload");
      for (int f = 0; f < 2; f++)
        for (int i = 0; i < W; i++) if (prf_live[f].size() > 0) check(prf_rd_data[f][i] == 64'(prf_mem[f][prf_rd_idx[f][i]]), "PRF payload");
      check(int'(iq_occupancy) == iq_live.size() + (pin_idx >= 0), "IQ occupancy");

      // ---- payload writes for the granted buffer entries
      for (int i = 0; i < W; i++) begin
        iq_wr_en[i] = (i < iq_alloc_grant); iq_wr_idx[i] = iq_alloc_idx[i]; iq_wr_data[i] = {32'(c), 32'(i)};
        for (int f = 0; f < 2; f++) begin
          prf_wr_en[f][i] = (i < prf_alloc_grant[f]); prf_wr_idx[f][i] = prf_alloc_idx[f][i];
          prf_wr_data[f][i] = {32'(c), 16'(f), 16'(i)};
        end
      end

      // ---- update the references for this clock edge
      for (int t = 0; t < NT; t++) begin
        for (int i = 0; i < rob_commit_cnt[t]; i++) void'(rob_q[t].pop_front());
        for (int i = 0; i < rob_alloc_grant[t]; i++) rob_q[t].push_back(seq + i);
        for (int i = 0; i < lsq_commit_cnt[t]; i++) void'(lsq_q[t].pop_front());
        for (int i = 0; i < lsq_alloc_grant[t]; i++) lsq_q[t].push_back({32'(t), 32'(seq + 100 + i)});
      end
      seq += 1000;
      for (int i = W - 1; i >= 0; i--) if (iq_rel_valid[i]) iq_live.delete(i);
      for (int i = 0; i < iq_alloc_grant; i++) begin
        iq_live.push_back(int'(iq_alloc_idx[i])); iq_mem[iq_alloc_idx[i]] = {32'(c), 32'(i)};
      end
      if (!iq_pinned && c >= 8) begin
        // keep entry IQN-1 (last partition) out of the release pool
        foreach (iq_live[k]) if (iq_live[k] == IQN - 1) begin pin_idx = IQN - 1; iq_live.delete(k); break; end
        iq_pinned = (pin_idx >= 0);
      end
      for (int f = 0; f < 2; f++) begin
        for (int i = W - 1; i >= 0; i--) if (prf_rel_valid[f][i]) prf_live[f].delete(i);
        for (int i = 0; i < prf_alloc_grant[f]; i++) begin
          prf_live[f].push_back(int'(prf_alloc_idx[f][i])); prf_mem[f][prf_alloc_idx[f][i]] = {32'(c), 16'(f), 16'(i)};
        end
      end

      if (c == END_LIGHT - 1)
        for (int s = 0; s < 7; s++) check(parts_now[s] == 3'd1, "light traffic leaves one partition");
      if (c == END_HEAVY - 1)
        for (int s = 0; s < 7; s++) check(parts_now[s] == 3'd4, "heavy traffic restores four partitions");
      @(negedge clk);
    end

    for (int s = 0; s < 7; s++) begin
      check(n_down_dec[s] >= 3 && n_up_dec[s] >= 3, "decisions taken");
      check(n_shrink[s] >= 3 && n_grow[s] >= 3, "partitions switched");
      check(n_stall[s] > 0, "stalls");
      $display("structure %0d: down decisions %0d, up decisions %0d, shrinks %0d, grows %0d, stall cycles %0d",
               s, n_down_dec[s], n_up_dec[s], n_shrink[s], n_grow[s], n_stall[s]);
    end
    check(n_q_down_wait > 0, "queue downsize phase waited for head/tail");
    check(n_q_up_wait > 0, "queue upsize phase waited for head/tail");
    check(n_b_drain_wait > 0, "buffer downsize phase waited for drain");
    check(n_q_priority > 0 && n_b_priority > 0, "upsize priority over downsize");
    check(n_pwr_on >= 3 && n_pwr_off >= 3, "partition power transitions");
    $display("queue down waits %0d, queue up waits %0d, buffer drain waits %0d, priority overrides %0d/%0d, power on/off %0d/%0d",
             n_q_down_wait, n_q_up_wait, n_b_drain_wait, n_q_priority, n_b_priority, n_pwr_on, n_pwr_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
