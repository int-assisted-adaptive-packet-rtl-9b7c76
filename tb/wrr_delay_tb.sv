// wrr_delay_tb: queuing delay against queue length on one WRR port (traffic_manager at
// its default sizes).
//
// Part A, delay against length: all three queues of port 0 are held at a target length
// (100, 300, 600 and then 1050 cells) with 19-cell packets (a 1500-byte frame in 80-byte
// cells). For every packet the queue length Q_i it joined is recorded. The measured
// queue time must lie in [k*Q_i, MathUnit_i*Q_i + one WRR round], with k = 64 ns per
// cell. While all queues stay backlogged, the mean delay must grow by MathUnit_i ns per
// cell of queue length (within 5 %), and from 300 cells up the mean of
// measured/estimated delay must be within 10 % of 1: the linear estimate that the
// scheduler relies on. (At short lengths the packet already on the wire and the
// round position add a near-constant offset, so the ratio is not checked there.)
//
// Part B, no starvation: queue 3 (weight 5) is kept full by a flood while queue 1
// (weight 2) receives 1000 packets at a fixed rate, first 2.5 Gb/s (below its WRR
// share of 2/7 of 10 Gb/s) and then 4.1 Gb/s (above it). Every accepted queue-1 packet
// must leave, within MathUnit_1*Q_1 plus one round; below the share the queue must stay
// short, above it queue 1 must still be served at no less than its 2/7 share.
// The port model sends one cell per 64-ns cycle, i.e. 10 Gb/s.
module wrr_delay_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, tail_drop, out_valid;
  pkt_desc_t in_desc;
  eg_desc_t  out_desc;
  qlen_vec_t qlen_cells [NUM_PORTS];

  traffic_manager dut (.*);

  localparam int L     = 19;
  localparam int SUMW  = 10;
  localparam int SLACK = K_NS_PER_CELL * (SUMW + 1) * L;   // one WRR round plus one packet
  localparam int NT    = 4;
  localparam int TARGETS [NT] = '{100, 300, 600, 1050};

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  // per-tag bookkeeping
  int unsigned t_enq   [int];
  int          t_q     [int];
  int          t_qlen  [int];
  int          t_group [int];   // -1: no ratio statistics; 0..NT-1: part A target index

  real   ratio_sum [NT][NUM_QUEUES];
  real   meas_sum  [NT][NUM_QUEUES];
  real   qlen_sum  [NT][NUM_QUEUES];
  int    ratio_n   [NT][NUM_QUEUES];
  int    q1_out = 0, q1_cells_out = 0, q1_max_ns = 0;
  int    tag = 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int t, q, ql, est, meas;
      t = int'(out_desc.d.tag);
      check(t_enq.exists(t), "departing packet was sent");
      if (t_enq.exists(t)) begin
        q    = t_q[t];
        ql   = t_qlen[t];
        est  = int'(DEF_MATH_UNITS[q]) * ql;
        meas = int'(out_desc.qtime);
        check(q == int'(out_desc.d.qid), "queue id kept");
        check(meas >= K_NS_PER_CELL * ql,
              $sformatf("q%0d delay %0d below k*Q = %0d", q + 1, meas, K_NS_PER_CELL * ql));
        check(meas <= est + SLACK,
              $sformatf("q%0d delay %0d above MathUnit*Q = %0d plus a round", q + 1, meas, est));
        if (t_group[t] >= 0 && ql > 0) begin
          ratio_sum[t_group[t]][q] += real'(meas) / real'(est);
          meas_sum[t_group[t]][q]  += real'(meas);
          qlen_sum[t_group[t]][q]  += real'(ql);
          ratio_n[t_group[t]][q]++;
        end
        if (q == 0 && t_group[t] < 0) begin
          q1_out++;
          q1_cells_out += L;
          if (meas > q1_max_ns) q1_max_ns = meas;
        end
        t_enq.delete(t); t_q.delete(t); t_qlen.delete(t); t_group.delete(t);
      end
    end
  end

  // Offer one packet this cycle; returns 1 when it was accepted.
  task automatic offer(int q, int group, output bit accepted);
    int t;
    t = tag;
    tag = (tag == 65535) ? 1 : tag + 1;
    in_desc = '0;
    in_desc.eg_port = '0; in_desc.qid = QID_W'(q);
    in_desc.len_cells = LEN_W'(L); in_desc.tag = TAG_W'(t); in_desc.ptype = PT_CONSTRAINED;
    in_valid = 1;
    #1;
    accepted = !tail_drop;
    if (accepted) begin
      t_enq[t] = cyc; t_q[t] = q; t_qlen[t] = int'(qlen_cells[0][q]); t_group[t] = group;
    end
  endtask

  task automatic idle_cycle();
    in_valid = 0;
    @(posedge clk); #1;
  endtask

  // Part A: hold every queue at `target` cells for `cycles`; packets that join in the
  // first `window` cycles after the queues reach the target feed the statistics.
  task automatic hold_all(int ti, int cycles, int window);
    int target, start, rr;
    bit acc;
    target = TARGETS[ti];
    start = -1;
    rr = 0;
    for (int c = 0; c < cycles; c++) begin
      int pick;
      bit full;
      pick = -1;
      full = 1;
      for (int i = 0; i < NUM_QUEUES; i++) begin
        int q;
        q = (rr + i) % NUM_QUEUES;
        if (int'(qlen_cells[0][q]) + L <= target) begin
          full = 0;
          if (pick < 0) pick = q;
        end
      end
      if (start < 0 && full) start = c;
      if (pick >= 0) begin
        offer(pick, (start >= 0 && c - start < window) ? ti : -1, acc);
        check(acc, "no tail drop below the queue limit");
        rr = pick + 1;
        @(posedge clk); #1;
        in_valid = 0;
      end else
        idle_cycle();
    end
  endtask

  // Part B: queue 3 flooded, queue 1 fed one packet every `period` cycles.
  task automatic starve_test(int period, int npkts, bit below_share);
    int sent1, acc1, drops1, base_out, base_cells, c0, max_q1;
    bit acc;
    sent1 = 0; acc1 = 0; drops1 = 0; max_q1 = 0;
    q1_out = 0; q1_cells_out = 0; q1_max_ns = 0;
    c0 = int'(cyc);
    base_out = 0;
    base_cells = 0;
    for (int c = 0; sent1 < npkts; c++) begin
      if (int'(qlen_cells[0][0]) > max_q1) max_q1 = int'(qlen_cells[0][0]);
      if (c % period == 0) begin
        offer(0, -1, acc);
        sent1++;
        if (acc) acc1++; else drops1++;
        @(posedge clk); #1;
        in_valid = 0;
      end else if (int'(qlen_cells[0][2]) + L <= 2000) begin
        offer(2, -1, acc);
        @(posedge clk); #1;
        in_valid = 0;
      end else
        idle_cycle();
      if (c == 20000) begin base_out = q1_cells_out; base_cells = c; end
    end
    // queue-1 service rate while both queues were backlogged (after the first 20000 cycles)
    if (!below_share) begin
      int span;
      span = int'(cyc) - c0 - base_cells;
      check((q1_cells_out - base_out) * 7 >= 2 * span - 7 * L,
            $sformatf("queue 1 served at no less than 2/7: %0d cells in %0d cycles",
                      q1_cells_out - base_out, span));
      check(drops1 > 0, "queue 1 overflows above its share");
    end else begin
      check(drops1 == 0, "no queue-1 loss below its share");
      check(max_q1 <= 2 * L, $sformatf("queue 1 stays short below its share: %0d cells", max_q1));
    end
    // let queue 3 drain, then every accepted queue-1 packet must have left
    for (int c = 0; c < 2000 * 8; c++) idle_cycle();
    check(q1_out == acc1, $sformatf("every accepted queue-1 packet left: %0d of %0d", q1_out, acc1));
    $display("queue 1 at 1 packet / %0d cycles: %0d sent, %0d dropped, max queue %0d cells, max delay %0d ns",
             period, sent1, drops1, max_q1, q1_max_ns);
  endtask

  initial begin
    in_valid = 0; in_desc = '0;
    for (int i = 0; i < NT; i++)
      for (int q = 0; q < NUM_QUEUES; q++) begin
        ratio_sum[i][q] = 0.0; meas_sum[i][q] = 0.0; qlen_sum[i][q] = 0.0; ratio_n[i][q] = 0;
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // Part A: ascending targets keep every queue backlogged between phases.
    for (int ti = 0; ti < NT; ti++) begin
      int t1;
      t1 = 5 * TARGETS[ti];            // queue-1 drain time at its 2/10 share, cycles
      hold_all(ti, 4 * t1 + 400, 2 * t1);
    end
    for (int c = 0; c < 12000; c++) idle_cycle();
    check(t_enq.size() == 0, "part A drained");
    for (int ti = 0; ti < NT; ti++)
      for (int q = 0; q < NUM_QUEUES; q++) begin
        real m;
        m = (ratio_n[ti][q] > 0) ? ratio_sum[ti][q] / real'(ratio_n[ti][q]) : 0.0;
        $display("target %4d cells, queue %0d (MathUnit %0d): measured/estimated %0.3f over %0d packets",
                 TARGETS[ti], q + 1, DEF_MATH_UNITS[q], m, ratio_n[ti][q]);
        check(ratio_n[ti][q] >= 10, "enough samples");
        if (TARGETS[ti] >= 300)
          check(m > 0.9 && m < 1.1, $sformatf("linear estimate within 10 %%: %0.3f", m));
      end
    // slope of mean delay against mean length, smallest to largest target
    for (int q = 0; q < NUM_QUEUES; q++) begin
      real slope;
      slope = (meas_sum[NT-1][q] / real'(ratio_n[NT-1][q]) - meas_sum[0][q] / real'(ratio_n[0][q])) /
              (qlen_sum[NT-1][q] / real'(ratio_n[NT-1][q]) - qlen_sum[0][q] / real'(ratio_n[0][q]));
      $display("queue %0d: slope %0.1f ns per cell, MathUnit %0d", q + 1, slope, DEF_MATH_UNITS[q]);
      check(slope > 0.95 * real'(DEF_MATH_UNITS[q]) && slope < 1.05 * real'(DEF_MATH_UNITS[q]),
            "delay grows by MathUnit per cell");
    end

    // Part B
    starve_test(76, 1000, 1);   // 19 cells / 76 cycles = 2.5 Gb/s
    starve_test(46, 1000, 0);   // 19 cells / 46 cycles = 4.1 Gb/s
    check(t_enq.size() == 0, "everything drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
