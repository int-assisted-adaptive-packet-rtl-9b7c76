// qlm_encoder_tb: loads the QLM match-action table with range entries (including
// overlapping ones), sends probes with random queue lengths and compares the encoded
// lengths with a reference: first valid entry whose ranges all match adds its
// constants (saturating at 0xffff), otherwise the lengths pass unchanged.
module qlm_encoder_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cfg_we, cfg_valid;
  logic [1:0] cfg_addr;
  qlen_vec_t  cfg_lo, cfg_hi, cfg_add;
  logic       in_valid, out_valid, out_hit;
  pkt_desc_t  in_desc, out_desc;
  qlen_vec_t  in_qlen;
  logic [1:0] out_entry;

  qlm_encoder dut (.*);

  int checks = 0, failures = 0, hits = 0, misses = 0;
  bit        ev [4];
  qlen_vec_t elo [4], ehi [4], eadd [4];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load(int e, bit v, int lo, int hi, int a0, int a1, int a2);
    ev[e] = v;
    for (int q = 0; q < NUM_QUEUES; q++) begin
      elo[e][q] = QLEN_W'(lo); ehi[e][q] = QLEN_W'(hi);
    end
    eadd[e] = {QLEN_W'(a2), QLEN_W'(a1), QLEN_W'(a0)};
    cfg_we = 1; cfg_addr = 2'(e); cfg_valid = v; cfg_lo = elo[e]; cfg_hi = ehi[e]; cfg_add = eadd[e];
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_addr = 0; cfg_lo = '0; cfg_hi = '0; cfg_add = '0;
    in_valid = 0; in_desc = '0; in_qlen = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // growing increments for longer queues, as the scheme prescribes
    load(0, 1, 0, 99, 2, 3, 4);
    load(1, 1, 100, 499, 10, 12, 16);
    load(2, 1, 500, 65535, 40, 50, 65000);
    load(3, 1, 0, 65535, 1, 1, 1);        // catch-all, lower priority
    for (int n = 0; n < 3000; n++) begin
      qlen_vec_t ql, expq;
      bit hit; int he;
      if (n == 1000) load(3, 0, 0, 65535, 1, 1, 1);   // remove the catch-all
      for (int q = 0; q < NUM_QUEUES; q++)
        ql[q] = QLEN_W'(($urandom_range(0, 1)) ? $urandom_range(0, 120) : $urandom_range(0, 65535));
      hit = 0; he = 0;
      for (int e = 0; e < 4; e++) begin
        bit m;
        m = ev[e];
        for (int q = 0; q < NUM_QUEUES; q++) m = m && ql[q] >= elo[e][q] && ql[q] <= ehi[e][q];
        if (m && !hit) begin hit = 1; he = e; end
      end
      expq = ql;
      if (hit)
        for (int q = 0; q < NUM_QUEUES; q++) begin
          int s;
          s = int'(ql[q]) + int'(eadd[he][q]);
          expq[q] = (s > 65535) ? 16'hffff : QLEN_W'(s);
        end
      in_desc = '0; in_desc.ptype = PT_PROBE; in_desc.probe_port = PORT_W'(n % NUM_PORTS);
      in_desc.tag = TAG_W'(n);
      in_qlen = ql; in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid && out_desc.tag == TAG_W'(n) && out_desc.probe_port == PORT_W'(n % NUM_PORTS),
            "probe passes with one-cycle latency");
      check(out_hit == hit && (!hit || int'(out_entry) == he), $sformatf("match for %p", ql));
      check(out_desc.probe_qlen == expq, $sformatf("encoded lengths %p vs %p", out_desc.probe_qlen, expq));
      if (hit) hits++; else misses++;
    end
    check(hits > 0 && misses > 0, "both matching and default action exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
