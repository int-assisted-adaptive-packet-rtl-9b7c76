// qlm_tb: effect of queue length modification (QLM) on packets that arrive later than
// their tolerance, one hop from sender to receiver.
//
// Four switches receive the same packet sequence: recirculation latency 8 (the
// default) or 64 cycles, each with a filled QLM table or an empty one (every probe
// then takes the default no-action path). All data packets are E2E-latency-constrained,
// one hop from their receiver, with a tolerable queuing delay picked at random from
// {16, 20, 24} us, and go to port 0. The offered load steps through 0.7, 0.9, 1.0 and
// 1.2 of the port rate. Probes sample port 0 every 40 cycles.
//
// With one hop left the scheduler must find a queue whose estimate MathUnit * Q fits
// the whole budget, so any error in the ingress copy of the queue lengths (stale by
// the recirculation delay and the probe spacing) shows up as delivered packets whose
// measured queue time exceeds their tolerance. The QLM table adds a few cells per
// queue when queues are short and more when they are long, so the ingress copy
// errs towards longer queues.
//
// Checks: every packet is delivered or dropped (scheduler or tail) in every switch;
// QLM entries hit only where the table is filled; at each recirculation latency the
// switch with QLM delivers no larger share of late packets than the one without.
// The shares are printed per load step.
module qlm_tb;
  import rha_pkg::*;

  localparam int NI = 4;
  localparam int NL = 4;
  localparam int LOADS [NL] = '{700, 900, 1000, 1200};   // per mille of the port rate
  localparam int STEP = 30000;                           // cycles per load step
  localparam int AVG_LEN = 11;                           // lengths 4..18 cells

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              route_we, flow_we;
  logic              qlm_we [NI];
  logic [7:0]        route_addr, flow_addr;
  logic              route_valid, qlm_valid;
  logic [PORT_W-1:0] route_port;
  flow_entry_t       flow_entry;
  logic [1:0]        qlm_addr;
  qlen_vec_t         qlm_lo, qlm_hi, qlm_add;
  logic              in_valid [NI];
  logic              in_ready [NI];
  pkt_desc_t         in_desc  [NI];
  logic              out_valid [NI];
  pkt_desc_t         out_desc  [NI];
  logic              out_field_valid [NI];
  int_field_t        out_field [NI];
  logic              out_report_valid [NI];
  int_hdr_t          out_report [NI];
  qlen_vec_t         tm_qlen [NI][NUM_PORTS];
  sw_events_t        events [NI];

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------- stimulus, shared by all switches ----------------
  typedef struct {
    bit        valid;
    pkt_desc_t d;
  } item_t;
  item_t stim [$];
  int    tau_of  [int];
  int    step_of [int];

  int n_sent [NI], n_deliv [NI], n_late [NI], n_rha [NI], n_tail [NI], n_hit [NI], n_enc [NI];
  int s_deliv [NI][NL], s_late [NI][NL];

  localparam int LATS [NI] = '{8, 8, 64, 64};
  localparam bit USE_QLM [NI] = '{1'b0, 1'b1, 1'b0, 1'b1};

  for (genvar i = 0; i < NI; i++) begin : g_sw
    pdp_switch #(.RECIRC_LAT(LATS[i])) u_sw (
      .clk, .rst_n,
      .device_id       (32'h0000_0b01 + 32'(i)),
      .route_we, .route_addr, .route_valid, .route_port,
      .flow_we, .flow_addr, .flow_entry,
      .qlm_we          (qlm_we[i]),
      .qlm_addr, .qlm_valid, .qlm_lo, .qlm_hi, .qlm_add,
      .in_valid        (in_valid[i]),
      .in_ready        (in_ready[i]),
      .in_desc         (in_desc[i]),
      .out_valid       (out_valid[i]),
      .out_desc        (out_desc[i]),
      .out_field_valid (out_field_valid[i]),
      .out_field       (out_field[i]),
      .out_report_valid(out_report_valid[i]),
      .out_report      (out_report[i]),
      .tm_qlen         (tm_qlen[i]),
      .events          (events[i])
    );

    always @(negedge clk) if (rst_n) begin
      if (events[i].rha_drop) n_rha[i]++;
      if (events[i].tm_tail_drop) n_tail[i]++;
      if (events[i].probe_encoded) n_enc[i]++;
      if (events[i].qlm_hit) n_hit[i]++;
      if (out_valid[i]) begin
        int tg;
        tg = int'(out_desc[i].tag);
        check(tau_of.exists(tg) && out_field_valid[i] && out_report_valid[i],
              "delivered packet was sent, with its INT field and report");
        if (tau_of.exists(tg)) begin
          n_deliv[i]++;
          s_deliv[i][step_of[tg]]++;
          if (int'(out_field[i].queue_time) > tau_of[tg]) begin
            n_late[i]++;
            s_late[i][step_of[tg]]++;
          end
        end
      end
    end
  end

  // each switch walks the shared sequence at its own pace (probes can stall it)
  int  ptr [NI];
  bit  rdy_seen [NI];

  task automatic drive();
    for (int i = 0; i < NI; i++) begin
      if (ptr[i] < stim.size()) begin
        if (!stim[ptr[i]].valid || rdy_seen[i]) begin
          if (stim[ptr[i]].valid && stim[ptr[i]].d.ptype == PT_CONSTRAINED) n_sent[i]++;
          ptr[i]++;
        end
      end
      in_valid[i] = 0;
      if (ptr[i] < stim.size() && stim[ptr[i]].valid) begin
        in_valid[i] = 1;
        in_desc[i] = stim[ptr[i]].d;
      end
      rdy_seen[i] = in_ready[i];
    end
  endtask

  function automatic logic [15:0] crc16(five_tuple_t t);
    logic [103:0] b;
    logic [15:0] c;
    logic fb;
    b = t; c = 16'hffff;
    for (int k = 103; k >= 0; k--) begin
      fb = c[15] ^ b[k];
      c = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  five_tuple_t fts [4];
  int          taus [3] = '{16000, 20000, 24000};

  initial begin
    int tag;
    route_we = 0; flow_we = 0; route_addr = 0; route_valid = 0; route_port = 0;
    flow_addr = 0; flow_entry = '0;
    qlm_addr = 0; qlm_valid = 0; qlm_lo = '0; qlm_hi = '0; qlm_add = '0;
    for (int i = 0; i < NI; i++) begin
      qlm_we[i] = 0; in_valid[i] = 0; in_desc[i] = '0; ptr[i] = 0; rdy_seen[i] = 0;
      n_sent[i] = 0; n_deliv[i] = 0; n_late[i] = 0; n_rha[i] = 0; n_tail[i] = 0;
      n_hit[i] = 0; n_enc[i] = 0;
      for (int s = 0; s < NL; s++) begin s_deliv[i][s] = 0; s_late[i][s] = 0; end
    end

    // three constrained flows (one per tolerance) and a probe flow, distinct hash slots
    for (int f = 0; f < 4; f++) begin
      bit clash;
      fts[f] = '{32'h0a00_0001, (f == 3) ? 32'h0a00_00fe : 32'h0a00_0002,
                 16'd3000 + 16'(f), 16'd7000, PROTO_UDP};
      do begin
        clash = 0;
        for (int g = 0; g < f; g++) if (crc16(fts[g])[7:0] == crc16(fts[f])[7:0]) clash = 1;
        if (clash) fts[f].src_port++;
      end while (clash);
    end

    // the packet sequence
    tag = 1;
    for (int s = 0; s < NL; s++)
      for (int c = 0; c < STEP; c++) begin
        item_t it;
        it.valid = 0; it.d = '0;
        if (c % 40 == 0) begin
          it.valid = 1; it.d.ft = fts[3]; it.d.len_cells = 8'd1; it.d.tag = TAG_W'(tag++);
          it.d.ptype = PT_PROBE;          // marks probes for counting only; the switch classifies
        end else if ($urandom_range(0, AVG_LEN * 1000 - 1) < LOADS[s]) begin
          int f;
          f = $urandom_range(0, 2);
          it.valid = 1; it.d.ft = fts[f]; it.d.len_cells = LEN_W'($urandom_range(4, 18));
          it.d.tag = TAG_W'(tag); it.d.ptype = PT_CONSTRAINED;
          tau_of[tag] = taus[f]; step_of[tag] = s;
          tag++;
        end
        it.d.in_port = 3'd1;
        stim.push_back(it);
      end
    check(tag < 65536, "tags unique");

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    route_we = 1; route_addr = 8'd2; route_valid = 1; route_port = 0; @(posedge clk); #1;
    route_we = 0;
    for (int f = 0; f < 4; f++) begin
      flow_we = 1;
      flow_addr = crc16(fts[f])[7:0];
      flow_entry = '{valid: 1'b1, ptype: (f == 3) ? PT_PROBE : PT_CONSTRAINED,
                     tau: TIME_W'((f == 3) ? 0 : taus[f]), rem_hops: 8'd1, qid: '0};
      @(posedge clk); #1;
    end
    flow_we = 0;
    // QLM: + {4, 6, 8} cells below 50 cells, + {16, 24, 32} from 50 cells up
    for (int i = 0; i < NI; i++) if (USE_QLM[i]) begin
      for (int e = 0; e < 2; e++) begin
        qlm_we[i] = 1; qlm_addr = 2'(e); qlm_valid = 1;
        for (int q = 0; q < 3; q++) begin
          qlm_lo[q]  = (e == 0) ? 16'd0 : 16'd50;
          qlm_hi[q]  = (e == 0) ? 16'd49 : 16'hffff;
          qlm_add[q] = (e == 0) ? QLEN_W'(4 + 2 * q) : QLEN_W'(16 + 8 * q);
        end
        @(posedge clk); #1;
      end
      qlm_we[i] = 0;
    end

    @(negedge clk); #1;
    while (ptr[0] < stim.size() || ptr[1] < stim.size() || ptr[2] < stim.size() || ptr[3] < stim.size()) begin
      drive();
      @(negedge clk); #1;
    end
    for (int i = 0; i < NI; i++) in_valid[i] = 0;
    repeat (8000) @(negedge clk);

    for (int i = 0; i < NI; i++) begin
      $display("recirculation %0d cycles, QLM %s: sent %0d, delivered %0d, late %0d, RHA drops %0d, tail drops %0d, QLM hits %0d of %0d probes",
               LATS[i], USE_QLM[i] ? "on " : "off", n_sent[i], n_deliv[i], n_late[i], n_rha[i], n_tail[i],
               n_hit[i], n_enc[i]);
      for (int s = 0; s < NL; s++)
        $display("    load %0d/1000: %0d delivered, %0d late (%0.2f %%)", LOADS[s], s_deliv[i][s], s_late[i][s],
                 (s_deliv[i][s] > 0) ? 100.0 * real'(s_late[i][s]) / real'(s_deliv[i][s]) : 0.0);
      check(n_sent[i] == n_deliv[i] + n_rha[i] + n_tail[i], "every packet delivered or dropped");
      check(n_enc[i] > 0, "probes encoded");
      check(USE_QLM[i] ? (n_hit[i] > 0) : (n_hit[i] == 0), "QLM hits only with a filled table");
    end
    for (int i = 0; i < NI; i += 2)
      check(longint'(n_late[i + 1]) * n_deliv[i] <= longint'(n_late[i]) * n_deliv[i + 1],
            $sformatf("QLM does not raise the late share at recirculation %0d", LATS[i]));
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
