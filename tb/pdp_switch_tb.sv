// pdp_switch_tb: end-to-end test of the switch at its default parameters.
//
// Control plane setup: routes for hosts 2 and 3, six E2E-latency-constrained flows
// (E2E tolerable queuing delays of 16, 20 and 24 us and three looser ones, 1 to 8
// remaining hops), three delay-insensitive background flows (one per queue of port 0),
// one flood flow to port 1, probe flows, and a two-entry QLM table.
// Traffic: a congestion phase where background traffic builds queues on port 0 while
// constrained packets and probes keep arriving, a flood that overflows a port-1 queue,
// a relief phase, then a drain.
//
// Checks:
//  * every RHA decision (queue, or drop) against a reference computed here from the
//    packet and the ingress queue lengths it was scheduled with;
//  * every probe's encoded lengths against the egress lengths plus the QLM constants,
//    and that the recirculated probe writes exactly those into the ingress registers;
//  * INT header, protocol rewrite, new INT field and last-hop report of every
//    constrained packet; the reported queue time equals the cycles waited x 64 ns
//    (latency minus 4 cycles: the queue time includes the enqueue cycle);
//  * delay-insensitive packets leave unchanged, on the routed port;
//  * every packet is accounted for (delivered, or dropped with a reason, or a
//    probe consumed at ingress);
//  * each mechanism happened at least once: route-miss drop, RHA enqueue, RHA
//    relaxation, RHA drop, tail drop, probe encoding, QLM hit and default action,
//    ingress queue-length update, INT first and last hop, all three WRR queues
//    served on port 0, ingress stall for a recirculated probe.
module pdp_switch_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DEVID_W-1:0] device_id;
  logic route_we, route_valid, flow_we, qlm_we, qlm_valid;
  logic [7:0] route_addr, flow_addr;
  logic [PORT_W-1:0] route_port;
  flow_entry_t flow_entry;
  logic [1:0] qlm_addr;
  qlen_vec_t qlm_lo, qlm_hi, qlm_add;
  logic in_valid, in_ready, out_valid, out_field_valid, out_report_valid;
  pkt_desc_t in_desc, out_desc;
  int_field_t out_field;
  int_hdr_t out_report;
  qlen_vec_t tm_qlen [NUM_PORTS];
  sw_events_t events;

  pdp_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------- reference helpers ----------------
  function automatic logic [15:0] crc16(five_tuple_t t);
    logic [103:0] b;
    logic [15:0] c;
    logic fb;
    b = t; c = 16'hffff;
    for (int i = 103; i >= 0; i--) begin
      fb = c[15] ^ b[i];
      c = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  function automatic void rha_ref(pkt_desc_t d, qlen_vec_t q, output bit found, output int sel,
                                  output int rnd);
    longint unsigned mu[3] = '{320, 214, 128};
    longint unsigned t, rem, tt;
    int hh;
    found = 0; sel = 0; rnd = 0;
    t = d.int_valid ? d.inth.total_qtime : 0;
    if (t > d.tau) return;
    rem = d.tau - t;
    hh = 0;
    while ((1 << hh) < int'(d.rem_hops)) hh++;
    tt = rem >> hh;
    for (int c = 0; c <= hh; c++)
      for (int k = 0; k < 3; k++)
        if (!found && mu[k] * longint'(q[k]) <= (tt << c)) begin
          found = 1; sel = k; rnd = c;
        end
  endfunction

  // QLM table shadow: entry 0 = all queues below 100 cells, entry 1 = all at 100 or more
  int qlm_lo_s [2] = '{0, 100};
  int qlm_hi_s [2] = '{99, 65535};
  int qlm_add_s [2][3] = '{'{2, 3, 4}, '{40, 30, 20}};

  function automatic qlen_vec_t qlm_ref(qlen_vec_t q, output bit hit);
    qlen_vec_t r;
    r = q; hit = 0;
    for (int e = 0; e < 2 && !hit; e++) begin
      bit m;
      m = 1;
      for (int i = 0; i < 3; i++) m = m && int'(q[i]) >= qlm_lo_s[e] && int'(q[i]) <= qlm_hi_s[e];
      if (m) begin
        hit = 1;
        for (int i = 0; i < 3; i++) r[i] = QLEN_W'(int'(q[i]) + qlm_add_s[e][i]);
      end
    end
    return r;
  endfunction

  // ---------------- flows ----------------
  typedef struct {
    five_tuple_t ft;
    pkt_type_e   pt;
    int          tau;
    int          hops;
    int          qid;
  } flow_t;
  flow_t flows [$];
  int c_flows [$], bg_flows [$];
  int probe_flow, flood_flow, nroute_flow;

  function automatic int add_flow(logic [31:0] dst, logic [7:0] proto, pkt_type_e pt, int tau,
                                  int hops, int qid);
    flow_t f;
    bit clash;
    f.ft = '{32'h0a00_0001, dst, 16'd1000 + 16'(flows.size()), 16'd5000, proto};
    do begin
      clash = 0;
      foreach (flows[i]) if (crc16(flows[i].ft)[7:0] == crc16(f.ft)[7:0]) clash = 1;
      if (clash) f.ft.src_port++;
    end while (clash);
    f.pt = pt; f.tau = tau; f.hops = hops; f.qid = qid;
    flows.push_back(f);
    return flows.size() - 1;
  endfunction

  // ---------------- scoreboards ----------------
  int unsigned ncyc = 0;
  always @(negedge clk) ncyc <= ncyc + 1;

  pkt_desc_t   sent_desc [int];
  int unsigned sent_cyc  [int];
  bit          exp_found [int];
  int          exp_sel   [int];
  qlen_vec_t   exp_probe [int];
  bit          exp_hit   [int];
  int n_sent = 0, n_out = 0, n_route_drop = 0, n_rha_drop = 0, n_tail = 0, n_consumed = 0;
  int n_enq = 0, n_relax = 0, n_probe_enc = 0, n_qlm_hit = 0, n_qlm_default = 0;
  int n_ig_upd = 0, n_first = 0, n_last = 0, n_stall = 0;
  int p0_q [3] = '{0, 0, 0};

  always @(negedge clk) if (rst_n) begin
    // RHA decision reference, at the scheduling stage input
    if (dut.cl_valid && dut.cl_desc.ptype == PT_CONSTRAINED) begin
      bit f; int s, r;
      rha_ref(dut.cl_desc, dut.ig_qlen, f, s, r);
      exp_found[int'(dut.cl_desc.tag)] = f;
      exp_sel[int'(dut.cl_desc.tag)] = s;
    end
    if (events.rha_drop) begin
      n_rha_drop++;
      check(exp_found.exists(int'(dut.rs_desc.tag)) && !exp_found[int'(dut.rs_desc.tag)],
            $sformatf("RHA drop of packet %0d", dut.rs_desc.tag));
    end
    if (events.rha_enqueue) begin
      n_enq++;
      check(exp_found[int'(dut.rs_desc.tag)] && int'(dut.rs_desc.qid) == exp_sel[int'(dut.rs_desc.tag)],
            $sformatf("RHA queue of packet %0d: %0d, expected %0d", dut.rs_desc.tag, dut.rs_desc.qid,
                      exp_sel[int'(dut.rs_desc.tag)]));
    end
    if (events.rha_relaxed) n_relax++;
    if (events.route_miss_drop) n_route_drop++;
    if (events.tm_tail_drop) n_tail++;
    // probes: QLM encoding
    if (dut.eg_probe) begin
      bit h;
      exp_probe[int'(dut.tm_desc.d.tag)] = qlm_ref(dut.eg_qlen, h);
      exp_hit[int'(dut.tm_desc.d.tag)] = h;
    end
    if (events.probe_encoded) begin
      int tg;
      tg = int'(dut.qlm_od.tag);
      n_probe_enc++;
      if (events.qlm_hit) n_qlm_hit++; else n_qlm_default++;
      check(exp_probe.exists(tg) && dut.qlm_od.probe_qlen == exp_probe[tg] && events.qlm_hit == exp_hit[tg],
            $sformatf("QLM encoding of probe %0d", tg));
    end
    if (events.ig_qlen_update) begin
      int tg;
      tg = int'(dut.cl_desc.tag);
      n_ig_upd++;
      n_consumed++;
      check(exp_probe.exists(tg) && dut.cl_desc.probe_qlen == exp_probe[tg],
            $sformatf("recirculated probe %0d carries its encoded lengths", tg));
      sent_desc.delete(tg);
    end
    if (events.int_first_hop) n_first++;
    if (events.int_last_hop) n_last++;
    if (in_valid && !in_ready) n_stall++;
    // delivered packets
    if (out_valid) begin
      int tg;
      pkt_desc_t s;
      tg = int'(out_desc.tag);
      n_out++;
      check(sent_desc.exists(tg), $sformatf("delivered packet %0d was sent", tg));
      if (sent_desc.exists(tg)) begin
        s = sent_desc[tg];
        check(out_desc.ft.dst_ip == s.ft.dst_ip && out_desc.eg_port == ((s.ft.dst_ip[7:0] == 8'd2) ? 0 : 1),
              "routed to the right port");
        if (out_desc.eg_port == 0) p0_q[out_desc.qid]++;
        if (out_desc.ptype == PT_CONSTRAINED) begin
          int wait_cyc;
          bit first, last;
          logic [7:0] base;
          first = !s.int_valid;
          last  = out_desc.rem_hops <= 1;
          wait_cyc = int'(ncyc - sent_cyc[tg]) - 4;
          base = (s.ft.proto == PROTO_TCP || s.ft.proto == PROTO_INT_TCP) ? PROTO_TCP : PROTO_UDP;
          check(out_field_valid && out_field.device_id == device_id, "INT field emitted");
          check(out_field.queue_time == QTIME_W'(wait_cyc * 64),
                $sformatf("queue time %0d for %0d cycles waited", out_field.queue_time, wait_cyc));
          check(out_desc.inth.hop_count == (first ? 8'd1 : s.inth.hop_count + 8'd1), "hop count");
          check(out_desc.inth.total_qtime == (first ? 48'd0 : s.inth.total_qtime) + TIME_W'(out_field.queue_time),
                "total queue time");
          if (last) begin
            check(out_desc.ft.proto == base && !out_desc.int_valid && out_report_valid
                  && out_report == out_desc.inth, "INT removed and reported at the last hop");
          end else begin
            check(out_desc.int_valid && !out_report_valid
                  && out_desc.ft.proto == ((base == PROTO_TCP) ? PROTO_INT_TCP : PROTO_INT_UDP),
                  "INT protocol marking");
          end
        end else begin
          check(!out_field_valid && out_desc.ft == s.ft && out_desc.inth == s.inth,
                "delay-insensitive packet unchanged");
        end
        sent_desc.delete(tg);
      end
    end
  end

  // ---------------- stimulus ----------------
  int next_tag = 1;

  task automatic send_flow(int fi, int len, int probe_port = 0);
    pkt_desc_t d;
    flow_t f;
    f = flows[fi];
    d = '0;
    d.tag = TAG_W'(next_tag++);
    d.len_cells = LEN_W'(len);
    d.in_port = PORT_W'($urandom_range(0, NUM_PORTS - 1));
    d.ft = f.ft;
    if (f.pt == PT_CONSTRAINED && $urandom_range(0, 1)) begin
      d.int_valid = 1;
      d.ft.proto = (f.ft.proto == PROTO_TCP) ? PROTO_INT_TCP : PROTO_INT_UDP;
      d.inth.hop_count = HOP_W'($urandom_range(1, 4));
      d.inth.total_qtime = TIME_W'($urandom_range(0, f.tau / 2));
    end
    d.probe_port = PORT_W'(probe_port);
    in_desc = d;
    in_valid = 1;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    sent_desc[int'(d.tag)] = d;
    sent_cyc[int'(d.tag)] = ncyc;
    n_sent++;
    #1;
    in_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic setup();
    int e;
    // routes: host 2 -> port 0, host 3 -> port 1
    route_we = 1;
    route_addr = 8'd2; route_valid = 1; route_port = 0; @(posedge clk); #1;
    route_addr = 8'd3; route_valid = 1; route_port = 1; @(posedge clk); #1;
    route_we = 0;
    foreach (flows[i]) begin
      flow_we = 1;
      flow_addr = crc16(flows[i].ft)[7:0];
      flow_entry = '{valid: 1'b1, ptype: flows[i].pt, tau: TIME_W'(flows[i].tau),
                     rem_hops: HOP_W'(flows[i].hops), qid: QID_W'(flows[i].qid)};
      @(posedge clk); #1;
    end
    flow_we = 0;
    for (e = 0; e < 2; e++) begin
      qlm_we = 1; qlm_addr = 2'(e); qlm_valid = 1;
      for (int i = 0; i < 3; i++) begin
        qlm_lo[i] = QLEN_W'(qlm_lo_s[e]); qlm_hi[i] = QLEN_W'(qlm_hi_s[e]);
        qlm_add[i] = QLEN_W'(qlm_add_s[e][i]);
      end
      @(posedge clk); #1;
    end
    qlm_we = 0;
  endtask

  task automatic mixed(int cycles, int bg_pct, int c_pct);
    for (int n = 0; n < cycles; n++) begin
      int r;
      r = $urandom_range(0, 99);
      if (n % 40 == 0) send_flow(probe_flow, 1, 0);
      else if (n % 40 == 20) send_flow(probe_flow, 1, 1);
      else if (r < bg_pct) send_flow(bg_flows[$urandom_range(0, 2)], 19);
      else if (r < bg_pct + c_pct) send_flow(c_flows[$urandom_range(0, c_flows.size() - 1)],
                                             $urandom_range(1, 4));
      else if (r < bg_pct + c_pct + 1) send_flow(nroute_flow, 2);
      else idle(1);
    end
  endtask

  initial begin
    route_we = 0; route_valid = 0; route_addr = 0; route_port = 0;
    flow_we = 0; flow_addr = 0; flow_entry = '0;
    qlm_we = 0; qlm_addr = 0; qlm_valid = 0; qlm_lo = '0; qlm_hi = '0; qlm_add = '0;
    in_valid = 0; in_desc = '0; device_id = 32'h0000_0101;

    c_flows.push_back(add_flow(32'h0a00_0002, PROTO_UDP, PT_CONSTRAINED, 16000, 1, 0));
    c_flows.push_back(add_flow(32'h0a00_0002, PROTO_TCP, PT_CONSTRAINED, 20000, 2, 0));
    c_flows.push_back(add_flow(32'h0a00_0002, PROTO_UDP, PT_CONSTRAINED, 24000, 3, 0));
    c_flows.push_back(add_flow(32'h0a00_0002, PROTO_TCP, PT_CONSTRAINED, 200000, 4, 0));
    c_flows.push_back(add_flow(32'h0a00_0002, PROTO_UDP, PT_CONSTRAINED, 400000, 6, 0));
    c_flows.push_back(add_flow(32'h0a00_0002, PROTO_UDP, PT_CONSTRAINED, 800000, 8, 0));
    for (int q = 0; q < 3; q++) bg_flows.push_back(add_flow(32'h0a00_0002, PROTO_TCP, PT_INSENSITIVE, 0, 0, q));
    flood_flow  = add_flow(32'h0a00_0003, PROTO_TCP, PT_INSENSITIVE, 0, 0, 0);
    probe_flow  = add_flow(32'h0a00_00fe, PROTO_UDP, PT_PROBE, 0, 0, 0);
    nroute_flow = add_flow(32'h0a00_0009, PROTO_TCP, PT_INSENSITIVE, 0, 0, 0);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    setup();

    mixed(300, 0, 40);      // idle network: constrained packets and probes only
    mixed(600, 45, 25);     // congestion builds on port 0
    for (int i = 0; i < 150; i++) send_flow(flood_flow, 19);   // overflow a port-1 queue
    mixed(2500, 3, 30);     // relief: queues drain while probes keep the view fresh
    idle(6000);             // drain

    check(n_sent == n_out + n_route_drop + n_rha_drop + n_tail + n_consumed,
          $sformatf("accounting: sent %0d, out %0d, route %0d, rha %0d, tail %0d, probes %0d",
                    n_sent, n_out, n_route_drop, n_rha_drop, n_tail, n_consumed));
    check(sent_desc.size() == n_route_drop + n_rha_drop + n_tail, "nothing left in flight");
    $display("events: route_drop=%0d rha_enq=%0d relaxed=%0d rha_drop=%0d tail=%0d probe_enc=%0d qlm_hit=%0d qlm_default=%0d ig_upd=%0d first=%0d last=%0d stall=%0d p0q=%0d/%0d/%0d",
             n_route_drop, n_enq, n_relax, n_rha_drop, n_tail, n_probe_enc, n_qlm_hit, n_qlm_default,
             n_ig_upd, n_first, n_last, n_stall, p0_q[0], p0_q[1], p0_q[2]);
    check(n_route_drop > 0, "route-miss drop happened");
    check(n_enq > 0, "RHA enqueue happened");
    check(n_relax > 0, "RHA relaxation happened");
    check(n_rha_drop > 0, "RHA drop happened");
    check(n_tail > 0, "tail drop happened");
    check(n_probe_enc > 0 && n_ig_upd == n_probe_enc, "probes encoded and all came back");
    check(n_qlm_hit > 0, "QLM entry hit happened");
    check(n_qlm_default > 0, "QLM default action happened");
    check(n_first > 0 && n_last > 0, "INT first and last hop happened");
    check(p0_q[0] > 0 && p0_q[1] > 0 && p0_q[2] > 0, "all WRR queues served");
    check(n_stall > 0, "ingress stalled for a recirculated probe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
