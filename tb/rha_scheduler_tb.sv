// rha_scheduler_tb: self-checking test of the RHA queue selection.
//
// Drives constrained packets with random tau, spent queue time, remaining hops and
// queue lengths, plus directed cases (a 5..8-hop packet, an expired packet, a packet
// that only fits after relaxation, pass-through of other types). The expected queue,
// round and drop decision come from a reference model written directly from the
// algorithm with MathUnits 320, 214, 128 (k = 64 ns, weights 2, 3, 5). Checks the
// one-cycle latency as well.
module rha_scheduler_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid;
  pkt_desc_t  in_desc;
  qlen_vec_t  in_qlen;
  logic       out_valid, out_drop;
  pkt_desc_t  out_desc;
  logic [3:0] out_round;

  rha_scheduler dut (.*);

  int checks = 0, failures = 0;
  int relaxed_seen = 0, drop_seen = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic void model(longint unsigned tau, longint unsigned t, int h, int q[3],
                                output bit found, output int sel, output int rnd);
    longint unsigned mu[3] = '{320, 214, 128};
    longint unsigned rem, tt;
    int hh;
    found = 0; sel = 0; rnd = 0;
    if (t > tau) return;
    rem = tau - t;
    hh = 0;
    while ((1 << hh) < h) hh++;
    tt = rem >> hh;
    for (int c = 0; c <= hh; c++)
      for (int k = 0; k < 3; k++)
        if (!found && mu[k] * longint'(q[k]) <= (tt << c)) begin
          found = 1; sel = k; rnd = c;
        end
  endfunction

  task automatic run_one(pkt_type_e pt, longint unsigned tau, longint unsigned t, bit iv,
                         int h, int q[3], logic [QID_W-1:0] qid_in);
    bit found; int sel, rnd;
    in_desc = '0;
    in_desc.ptype = pt;
    in_desc.tau = TIME_W'(tau);
    in_desc.int_valid = iv;
    in_desc.inth.total_qtime = TIME_W'(t);
    in_desc.rem_hops = HOP_W'(h);
    in_desc.qid = qid_in;
    in_desc.tag = TAG_W'($urandom);
    for (int k = 0; k < 3; k++) in_qlen[k] = QLEN_W'(q[k]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    if (pt != PT_CONSTRAINED) begin
      check(out_valid && !out_drop && out_desc.qid == qid_in && out_desc.tag == in_desc.tag,
            "pass-through of non-constrained packet");
      return;
    end
    model(tau, iv ? t : 0, h, q, found, sel, rnd);
    check(out_valid == found && out_drop == !found,
          $sformatf("decision tau=%0d t=%0d h=%0d q=%0d/%0d/%0d exp found=%0d", tau, t, h,
                    q[0], q[1], q[2], found));
    if (found) begin
      check(int'(out_desc.qid) == sel && int'(out_round) == rnd,
            $sformatf("queue %0d round %0d, expected %0d round %0d", out_desc.qid, out_round, sel, rnd));
      if (rnd > 0) relaxed_seen++;
    end else drop_seen++;
    @(posedge clk); #1;
    check(!out_valid && !out_drop, "output lasts one cycle");
  endtask

  initial begin
    int q[3];
    in_valid = 0; in_desc = '0; in_qlen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 6 hops -> hh = 3; T = 80000, TT = 10000: q1 320*40=12800 > 10000, q2 214*40=8560 fits
    q = '{40, 40, 40};
    run_one(PT_CONSTRAINED, 100000, 20000, 1, 6, q, 0);
    check(out_desc.qid == 1 && out_round == 0, "6-hop example picks q2 in round 0");
    // only fits after doubling twice: TT = 10000, U = 320*100=32000,214*150=32100,128*300=38400
    q = '{100, 150, 300};
    run_one(PT_CONSTRAINED, 80000, 0, 0, 8, q, 0);
    check(out_desc.qid == 0 && out_round == 2, "relaxed to round 2, queue q1");
    // expired
    q = '{0, 0, 0};
    run_one(PT_CONSTRAINED, 1000, 1001, 1, 1, q, 0);
    check(drop_seen == 1, "expired packet dropped");
    // nothing fits even with the full budget
    q = '{1000, 1000, 1000};
    run_one(PT_CONSTRAINED, 50000, 0, 0, 2, q, 0);
    // other types pass untouched
    run_one(PT_INSENSITIVE, 0, 0, 0, 0, q, 2);
    run_one(PT_PROBE, 0, 0, 0, 0, q, 1);

    for (int n = 0; n < 3000; n++) begin
      longint unsigned tau, t;
      tau = 1000 + $urandom_range(0, 300000);
      t = $urandom_range(0, int'(tau + tau / 5));
      for (int k = 0; k < 3; k++) q[k] = $urandom_range(0, ($urandom_range(0, 3) == 0) ? 2000 : 300);
      run_one(PT_CONSTRAINED, tau, t, $urandom_range(0, 1), $urandom_range(0, 12), q, 0);
    end
    check(relaxed_seen > 0, "relaxation occurred");
    check(drop_seen > 1, "drops occurred");
    $display("relaxed=%0d dropped=%0d", relaxed_seen, drop_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
