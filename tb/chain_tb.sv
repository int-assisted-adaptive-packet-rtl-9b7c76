// chain_tb: four switches in a line, Host A -> SW1 -> SW2 -> SW3 -> SW4 -> Host C, all at
// their default parameters.
//
// Host A sends E2E-latency-constrained packets whose E2E tolerable queuing delay is
// picked at random from {16, 20, 24} us. Every switch is programmed with the
// remaining hops of these flows from its place on the path (4 at SW1 down to 1 at
// SW4), with its own probe flow sampling the path port, and with a two-entry QLM table.
// Each switch also receives local cross traffic (delay-insensitive, spread over the
// three queues of the path port). Each run has 10 periods of 4800 cycles; each switch
// is congested (cross load 0.85 of the port rate) in a random 20, 50 or 80 % of them
// and idle in the rest, so congestion moves along the path. Cross
// traffic leaves the path after the switch it loads (it is not forwarded). A packet
// leaving SWn on the path port is handed to SWn+1 through a link queue that absorbs
// the ingress stalls caused by recirculated probes.
//
// Checks, per path packet and hop: an INT field with that switch's DeviceID, Hop Count
// equal to the hop number, Total Queue Time equal to the sum of the fields so far,
// the INT protocol marking on the way and its removal plus the telemetry report at
// SW4; a packet that reaches a switch with its tolerable delay already used up must be
// dropped there by the scheduler; every path packet is delivered or dropped (by the
// scheduler or by a full queue). Counted and required at least once: deliveries, RHA
// drops, relaxed decisions. Printed per run: the loss ratio per tolerance value and
// where the SW1 queuing delay falls: (0, tau/4], (tau/4, tau/2], (tau/2, tau] or over
// (possible, since the ingress copy of the queue lengths lags). Checked: loss grows
// with the congestion probability, and the 16-us packets lose at least as often as the 24-us
// ones. The share of delivered packets over their tolerance must stay under 25 %.
module chain_tb;
  import rha_pkg::*;

  localparam int NSW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                route_we [NSW];
  logic                flow_we  [NSW];
  logic                qlm_we   [NSW];
  logic [7:0]          route_addr, flow_addr;
  logic                route_valid, qlm_valid;
  logic [PORT_W-1:0]   route_port;
  flow_entry_t         flow_entry;
  logic [1:0]          qlm_addr;
  qlen_vec_t           qlm_lo, qlm_hi, qlm_add;
  logic                in_valid [NSW];
  logic                in_ready [NSW];
  pkt_desc_t           in_desc  [NSW];
  logic                out_valid [NSW];
  pkt_desc_t           out_desc  [NSW];
  logic                out_field_valid [NSW];
  int_field_t          out_field [NSW];
  logic                out_report_valid [NSW];
  int_hdr_t            out_report [NSW];
  qlen_vec_t           tm_qlen [NSW][NUM_PORTS];
  sw_events_t          events [NSW];

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------- path packet scoreboard ----------------
  int          p_tau   [int];   // tolerable queuing delay, ns
  longint      p_sum   [int];   // sum of the INT queue times so far
  int          p_hops  [int];   // switches passed
  bit          p_late  [int];   // already over its tolerance when it left the last switch
  int          p_sc    [int];   // scenario it was sent in
  pkt_desc_t   link_q  [NSW][$];

  int n_path_sent = 0, n_delivered = 0, n_expired = 0;
  int n_rha_drop [NSW], n_tail [NSW], n_relax [NSW], n_enq [NSW], n_late_drop = 0;
  int d_by_tau [3], e_by_tau [3];
  // per scenario (congestion probability): sent and lost per tolerance, SW1 delay ranges
  localparam int NSC = 3;
  localparam int CONG_PCT [NSC] = '{20, 50, 80};
  int sc = 0;
  bit plan [NSW][10];
  int sent_sc [NSC][3], lost_sc [NSC][3], rng_sc [NSC][4];

  function automatic void forget(int tg, bit lost);
    if (lost) lost_sc[p_sc[tg]][tau_index(p_tau[tg])]++;
    p_tau.delete(tg); p_sum.delete(tg); p_hops.delete(tg); p_late.delete(tg); p_sc.delete(tg);
  endfunction

  function automatic int tau_index(int tau);
    return (tau == 16000) ? 0 : (tau == 20000) ? 1 : 2;
  endfunction

  for (genvar n = 0; n < NSW; n++) begin : g_sw
    pdp_switch u_sw (
      .clk, .rst_n,
      .device_id       (32'h0000_0a01 + 32'(n)),
      .route_we        (route_we[n]),
      .route_addr, .route_valid, .route_port,
      .flow_we         (flow_we[n]),
      .flow_addr, .flow_entry,
      .qlm_we          (qlm_we[n]),
      .qlm_addr, .qlm_valid, .qlm_lo, .qlm_hi, .qlm_add,
      .in_valid        (in_valid[n]),
      .in_ready        (in_ready[n]),
      .in_desc         (in_desc[n]),
      .out_valid       (out_valid[n]),
      .out_desc        (out_desc[n]),
      .out_field_valid (out_field_valid[n]),
      .out_field       (out_field[n]),
      .out_report_valid(out_report_valid[n]),
      .out_report      (out_report[n]),
      .tm_qlen         (tm_qlen[n]),
      .events          (events[n])
    );

    always @(negedge clk) if (rst_n) begin
      if (events[n].rha_enqueue) n_enq[n]++;
      if (events[n].rha_relaxed) n_relax[n]++;
      if (events[n].rha_drop) begin
        int tg;
        tg = int'(u_sw.rs_desc.tag);
        check(p_tau.exists(tg), "only path packets are constrained");
        if (p_tau.exists(tg)) begin
          n_rha_drop[n]++;
          if (p_late[tg]) n_late_drop++;
          forget(tg, 1'b1);
        end
      end
      if (events[n].tm_tail_drop) begin
        int tg;
        tg = int'(u_sw.rs_desc.tag);
        if (p_tau.exists(tg)) begin
          n_tail[n]++;
          forget(tg, 1'b1);
        end
      end
      if (out_valid[n] && p_tau.exists(int'(out_desc[n].tag))) begin
        int tg;
        pkt_desc_t d;
        tg = int'(out_desc[n].tag);
        d  = out_desc[n];
        check(!p_late[tg], $sformatf("packet %0d over its tolerance was forwarded by SW%0d", tg, n + 1));
        check(p_hops[tg] == n, "path order");
        check(d.eg_port == 0, "path port");
        check(out_field_valid[n] && out_field[n].device_id == 32'h0000_0a01 + 32'(n),
              "INT field with this switch's DeviceID");
        p_sum[tg] += longint'(out_field[n].queue_time);
        if (n == 0) begin
          longint qt, tau;
          qt = longint'(out_field[n].queue_time);
          tau = longint'(p_tau[tg]);
          rng_sc[p_sc[tg]][(qt <= tau / 4) ? 0 : (qt <= tau / 2) ? 1 : (qt <= tau) ? 2 : 3]++;
        end
        p_hops[tg]++;
        check(int'(d.inth.hop_count) == n + 1, $sformatf("hop count %0d at SW%0d", d.inth.hop_count, n + 1));
        check(longint'(d.inth.total_qtime) == p_sum[tg], "total queue time is the sum of the fields");
        if (n < NSW - 1) begin
          check(d.int_valid && d.ft.proto == PROTO_INT_UDP && !out_report_valid[n],
                "INT header carried between switches");
          p_late[tg] = p_sum[tg] > longint'(p_tau[tg]);
          // next switch parses the packet afresh
          d.route_hit = 0; d.ptype = PT_INSENSITIVE; d.eg_port = '0; d.qid = '0;
          d.rem_hops = '0; d.tau = '0; d.in_port = '0;
          link_q[n + 1].push_back(d);
        end else begin
          int ti;
          check(!d.int_valid && d.ft.proto == PROTO_UDP, "INT removed at the last hop");
          check(out_report_valid[n] && int'(out_report[n].hop_count) == NSW
                && longint'(out_report[n].total_qtime) == p_sum[tg], "telemetry report at the last hop");
          ti = tau_index(p_tau[tg]);
          n_delivered++;
          d_by_tau[ti]++;
          if (p_sum[tg] > longint'(p_tau[tg])) begin n_expired++; e_by_tau[ti]++; end
          forget(tg, 1'b0);
        end
      end
    end
  end

  // ---------------- flows ----------------
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

  typedef struct {
    five_tuple_t ft;
    pkt_type_e   pt;
    int          tau;
    int          qid;
  } flow_t;
  flow_t flows [$];
  int path_flows [$], cross_flows [$];
  int probe_flow;

  function automatic int add_flow(logic [31:0] dst, pkt_type_e pt, int tau, int qid);
    flow_t f;
    bit clash;
    f.ft = '{32'h0a00_0001, dst, 16'd2000 + 16'(flows.size()), 16'd6000, PROTO_UDP};
    do begin
      clash = 0;
      foreach (flows[i]) if (crc16(flows[i].ft)[7:0] == crc16(f.ft)[7:0]) clash = 1;
      if (clash) f.ft.src_port++;
    end while (clash);
    f.pt = pt; f.tau = tau; f.qid = qid;
    flows.push_back(f);
    return flows.size() - 1;
  endfunction

  task automatic setup();
    for (int n = 0; n < NSW; n++) begin
      route_we[n] = 1;
      route_addr = 8'd3; route_valid = 1; route_port = 0; @(posedge clk); #1;   // Host C
      route_addr = 8'd5; @(posedge clk); #1;                                    // cross sink
      route_we[n] = 0;
      foreach (flows[i]) begin
        flow_we[n] = 1;
        flow_addr = crc16(flows[i].ft)[7:0];
        flow_entry = '{valid: 1'b1, ptype: flows[i].pt, tau: TIME_W'(flows[i].tau),
                       rem_hops: HOP_W'(NSW - n), qid: QID_W'(flows[i].qid)};
        @(posedge clk); #1;
      end
      flow_we[n] = 0;
      for (int e = 0; e < 2; e++) begin
        qlm_we[n] = 1; qlm_addr = 2'(e); qlm_valid = 1;
        for (int i = 0; i < 3; i++) begin
          qlm_lo[i]  = (e == 0) ? 16'd0 : 16'd100;
          qlm_hi[i]  = (e == 0) ? 16'd99 : 16'hffff;
          qlm_add[i] = (e == 0) ? QLEN_W'(2 + i) : QLEN_W'(40 - 10 * i);
        end
        @(posedge clk); #1;
      end
      qlm_we[n] = 0;
    end
  endtask

  // ---------------- stimulus ----------------
  int next_tag = 1;
  int cross_load [NSW];      // per mille of the port rate
  bit from_link [NSW];
  bit rdy_seen [NSW];     // in_ready while the offer stood, i.e. at the clock edge
  bit is_path [NSW];
  int pend_tau [NSW];

  function automatic pkt_desc_t make(int fi, int len, int n);
    pkt_desc_t d;
    d = '0;
    d.tag = TAG_W'(next_tag);
    next_tag = (next_tag == 65535) ? 1 : next_tag + 1;
    d.len_cells = LEN_W'(len);
    d.in_port = PORT_W'(1 + (n % 3));
    d.ft = flows[fi].ft;
    return d;
  endfunction

  // one cycle of every switch's input: link first, then probes, cross traffic, Host A
  task automatic drive(int cyc, bit host_on);
    for (int n = 0; n < NSW; n++) begin
      // what was offered in the last cycle went in if the switch was ready
      if (in_valid[n] && rdy_seen[n]) begin
        if (from_link[n]) void'(link_q[n].pop_front());
        else if (is_path[n]) begin
          int tg;
          tg = int'(in_desc[n].tag);
          p_tau[tg] = pend_tau[n]; p_sum[tg] = 0; p_hops[tg] = 0; p_late[tg] = 0; p_sc[tg] = sc;
          sent_sc[sc][tau_index(pend_tau[n])]++;
          n_path_sent++;
        end
      end
      in_valid[n] = 0; from_link[n] = 0; is_path[n] = 0;
      if (link_q[n].size() > 0) begin
        in_desc[n] = link_q[n][0]; in_valid[n] = 1; from_link[n] = 1;
      end else if (cyc % 40 == 7 * n) begin
        in_desc[n] = make(probe_flow, 1, n); in_valid[n] = 1;
      end else if ($urandom_range(0, 19 * 1000 - 1) < cross_load[n]) begin
        in_desc[n] = make(cross_flows[$urandom_range(0, 2)], 19, n); in_valid[n] = 1;
      end else if (n == 0 && host_on && $urandom_range(0, 99) < 3) begin
        int fi;
        fi = path_flows[$urandom_range(0, 2)];
        in_desc[n] = make(fi, $urandom_range(2, 19), n); in_valid[n] = 1;
        is_path[n] = 1; pend_tau[n] = flows[fi].tau;
      end
      rdy_seen[n] = in_ready[n];
    end
  endtask

  initial begin
    int cyc;
    route_addr = 0; route_valid = 0; route_port = 0;
    flow_addr = 0; flow_entry = '0;
    qlm_addr = 0; qlm_valid = 0; qlm_lo = '0; qlm_hi = '0; qlm_add = '0;
    for (int n = 0; n < NSW; n++) begin
      route_we[n] = 0; flow_we[n] = 0; qlm_we[n] = 0; in_valid[n] = 0; in_desc[n] = '0;
      n_rha_drop[n] = 0; n_tail[n] = 0; n_relax[n] = 0; n_enq[n] = 0; cross_load[n] = 0;
      from_link[n] = 0; is_path[n] = 0; pend_tau[n] = 0; rdy_seen[n] = 0;
    end
    for (int i = 0; i < 3; i++) begin d_by_tau[i] = 0; e_by_tau[i] = 0; end
    for (int k = 0; k < NSC; k++) begin
      for (int i = 0; i < 3; i++) begin sent_sc[k][i] = 0; lost_sc[k][i] = 0; end
      for (int i = 0; i < 4; i++) rng_sc[k][i] = 0;
    end

    path_flows.push_back(add_flow(32'h0a00_0003, PT_CONSTRAINED, 16000, 0));
    path_flows.push_back(add_flow(32'h0a00_0003, PT_CONSTRAINED, 20000, 0));
    path_flows.push_back(add_flow(32'h0a00_0003, PT_CONSTRAINED, 24000, 0));
    for (int q = 0; q < 3; q++) cross_flows.push_back(add_flow(32'h0a00_0005, PT_INSENSITIVE, 0, q));
    probe_flow = add_flow(32'h0a00_00fe, PT_PROBE, 0, 0);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    setup();

    @(negedge clk); #1;
    cyc = 0;
    for (sc = 0; sc < NSC; sc++) begin
      // each switch is congested in exactly CONG_PCT/10 of the 10 periods, in random order
      for (int n = 0; n < NSW; n++) begin
        for (int k = 0; k < 10; k++) plan[n][k] = (k < CONG_PCT[sc] / 10);
        for (int k = 9; k > 0; k--) begin
          int j;
          bit b;
          j = $urandom_range(0, k);
          b = plan[n][k]; plan[n][k] = plan[n][j]; plan[n][j] = b;
        end
      end
      for (int c = 0; c < 48000; c++) begin
        if (c % 4800 == 0)
          for (int n = 0; n < NSW; n++)
            cross_load[n] = plan[n][c / 4800] ? 850 : 0;
        drive(cyc++, 1'b1);
        @(negedge clk); #1;
      end
      for (int n = 0; n < NSW; n++) cross_load[n] = 0;
      for (int c = 0; c < 15000; c++) begin
        drive(cyc++, 1'b0);
        @(negedge clk); #1;
      end
    end
    sc = NSC - 1;

    begin
      int drops, tails, relax;
      drops = 0; tails = 0; relax = 0;
      for (int n = 0; n < NSW; n++) begin
        $display("SW%0d: RHA enqueued %0d (relaxed %0d), RHA dropped %0d, tail dropped %0d",
                 n + 1, n_enq[n], n_relax[n], n_rha_drop[n], n_tail[n]);
        drops += n_rha_drop[n]; tails += n_tail[n]; relax += n_relax[n];
      end
      for (int i = 0; i < 3; i++)
        $display("E2E-TQD %0d us: %0d delivered, %0d over their tolerance", 16 + 4 * i, d_by_tau[i], e_by_tau[i]);
      $display("path packets: %0d sent, %0d delivered, %0d dropped by RHA (%0d of them already late), %0d tail-dropped",
               n_path_sent, n_delivered, drops, n_late_drop, tails);
      check(p_tau.size() == 0, $sformatf("no path packet left in flight: %0d", p_tau.size()));
      check(n_path_sent == n_delivered + drops + tails, "every path packet delivered or dropped");
      check(n_delivered > 0, "deliveries happened");
      check(drops > 0, "RHA drops happened");
      check(relax > 0, "relaxed decisions happened");
      check(n_expired * 4 <= n_delivered, "at most a quarter of deliveries over tolerance");
      for (int k = 0; k < NSC; k++) begin
        $display("congestion probability %0d %%: loss 16 us %0d/%0d, 20 us %0d/%0d, 24 us %0d/%0d; SW1 delay in ranges 1/2/3/over: %0d/%0d/%0d/%0d",
                 CONG_PCT[k], lost_sc[k][0], sent_sc[k][0], lost_sc[k][1], sent_sc[k][1],
                 lost_sc[k][2], sent_sc[k][2], rng_sc[k][0], rng_sc[k][1], rng_sc[k][2], rng_sc[k][3]);
      end
      begin
        int l [NSC], t [NSC], l16, t16, l24, t24;
        l16 = 0; t16 = 0; l24 = 0; t24 = 0;
        for (int k = 0; k < NSC; k++) begin
          l[k] = lost_sc[k][0] + lost_sc[k][1] + lost_sc[k][2];
          t[k] = sent_sc[k][0] + sent_sc[k][1] + sent_sc[k][2];
          l16 += lost_sc[k][0]; t16 += sent_sc[k][0]; l24 += lost_sc[k][2]; t24 += sent_sc[k][2];
        end
        for (int k = 1; k < NSC; k++)
          check(longint'(l[k]) * t[k-1] >= longint'(l[k-1]) * t[k], "loss grows with congestion probability");
        check(longint'(l16) * t24 >= longint'(l24) * t16, "stricter tolerance, more loss");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (260000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
