// pkt_classifier_tb: writes flow entries at the CRC-16 hash of chosen 5-tuples
// (hash computed bit-serially here) and checks type, tau, hops, queue, the
// recirculation port for probes, recirculated-probe detection, the miss default,
// that 0xfe/0xff hash like TCP/UDP, and the drop of unrouted data packets; then 2000
// mixed packets (all types, arrival ports, route outcomes, known and unknown flows)
// against a shadow copy of the flow table.
module pkt_classifier_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we;
  logic [7:0]  cfg_addr;
  flow_entry_t cfg_entry;
  logic        in_valid, out_valid, out_drop;
  pkt_desc_t   in_desc, out_desc;

  pkt_classifier dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] ref_hash(five_tuple_t t);
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

  task automatic prog_flow(five_tuple_t t, pkt_type_e pt, int tau, int hops, int qid);
    cfg_we = 1;
    cfg_addr = ref_hash(t)[7:0];
    cfg_entry = '{valid: 1'b1, ptype: pt, tau: TIME_W'(tau), rem_hops: HOP_W'(hops), qid: QID_W'(qid)};
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  task automatic send(five_tuple_t t, logic [PORT_W-1:0] inp, logic hit);
    in_desc = '0; in_desc.ft = t; in_desc.in_port = inp; in_desc.route_hit = hit;
    in_desc.eg_port = 3'd2;
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    five_tuple_t fc, fi, fp, fu, fx;
    cfg_we = 0; cfg_addr = 0; cfg_entry = '0; in_valid = 0; in_desc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    fc = '{32'h0a000001, 32'h0a000002, 16'd1000, 16'd2000, PROTO_UDP};
    fi = '{32'h0a000003, 32'h0a000002, 16'd1001, 16'd80,   PROTO_TCP};
    fp = '{32'h0a0000fe, 32'h0a0000ff, 16'd7,    16'd7,    PROTO_UDP};
    fu = '{32'h0b000001, 32'h0b000002, 16'd5,    16'd6,    PROTO_TCP};
    fx = '{32'h0c000001, 32'h0c000002, 16'd9,    16'd9,    PROTO_TCP};
    // make sure the chosen tuples do not collide in the 256-entry table
    check(ref_hash(fc)[7:0] != ref_hash(fi)[7:0] && ref_hash(fc)[7:0] != ref_hash(fp)[7:0]
          && ref_hash(fi)[7:0] != ref_hash(fp)[7:0] && ref_hash(fu)[7:0] != ref_hash(fc)[7:0]
          && ref_hash(fu)[7:0] != ref_hash(fi)[7:0] && ref_hash(fu)[7:0] != ref_hash(fp)[7:0],
          "test tuples distinct");
    prog_flow(fc, PT_CONSTRAINED, 20000, 3, 0);
    prog_flow(fi, PT_INSENSITIVE, 0, 0, 2);
    prog_flow(fp, PT_PROBE, 0, 0, 0);

    send(fc, 0, 1);
    check(out_valid && !out_drop && out_desc.ptype == PT_CONSTRAINED && out_desc.tau == 20000
          && out_desc.rem_hops == 3 && out_desc.eg_port == 2, "constrained flow");
    fc.proto = PROTO_INT_UDP;
    send(fc, 1, 1);
    check(out_valid && out_desc.ptype == PT_CONSTRAINED && out_desc.ft.proto == PROTO_INT_UDP,
          "INT-marked packet of the same flow");
    send(fi, 0, 1);
    check(out_valid && out_desc.ptype == PT_INSENSITIVE && out_desc.qid == 2, "insensitive flow queue");
    send(fp, 0, 0);
    check(out_valid && out_desc.ptype == PT_PROBE && out_desc.eg_port == PORT_W'(RECIRC_PORT),
          "probe sent to the recirculation port");
    send(fp, PORT_W'(RECIRC_PORT), 0);
    check(out_valid && out_desc.ptype == PT_RECIRC_PROBE, "recirculated probe");
    send(fu, 0, 1);
    check(out_valid && out_desc.ptype == PT_INSENSITIVE && out_desc.qid == 0, "unknown flow default");
    send(fx, 0, 0);
    check(!out_valid && out_drop, "unrouted data packet dropped");
    @(posedge clk); #1;
    check(!out_valid && !out_drop, "strobes last one cycle");
    // random flows: program then look up
    for (int n = 0; n < 300; n++) begin
      five_tuple_t r;
      int tau, hops;
      r = '{$urandom, $urandom, 16'($urandom), 16'($urandom), ($urandom_range(0, 1) ? PROTO_TCP : PROTO_UDP)};
      tau = $urandom_range(1, 1000000); hops = $urandom_range(1, 8);
      prog_flow(r, PT_CONSTRAINED, tau, hops, 0);
      send(r, 0, 1);
      check(out_valid && out_desc.ptype == PT_CONSTRAINED && out_desc.tau == TIME_W'(tau)
            && out_desc.rem_hops == HOP_W'(hops), "random flow lookup");
    end
    // mixed traffic against a shadow of the table: every type, arrival port and route
    // outcome, known and unknown flows, INT-marked or not
    begin
      flow_entry_t shadow [256];
      five_tuple_t known [$];
      for (int i = 0; i < 256; i++) begin
        shadow[i] = '0;
        cfg_we = 1; cfg_addr = 8'(i); cfg_entry = '0;   // start from an empty table
        @(posedge clk); #1;
      end
      cfg_we = 0;
      for (int n = 0; n < 40; n++) begin
        five_tuple_t r;
        pkt_type_e pt;
        r = '{$urandom, $urandom, 16'($urandom), 16'($urandom), ($urandom_range(0, 1) ? PROTO_TCP : PROTO_UDP)};
        pt = ($urandom_range(0, 2) == 0) ? PT_PROBE : ($urandom_range(0, 1) ? PT_CONSTRAINED : PT_INSENSITIVE);
        prog_flow(r, pt, $urandom_range(1, 100000), $urandom_range(1, 8), $urandom_range(0, 2));
        shadow[ref_hash(r)[7:0]] = cfg_entry;
        known.push_back(r);
      end
      for (int n = 0; n < 2000; n++) begin
        five_tuple_t r;
        flow_entry_t e;
        logic [PORT_W-1:0] inp, egp;
        logic hit, xdrop;
        pkt_type_e xt;
        logic [PORT_W-1:0] xport;
        if ($urandom_range(0, 3) != 0) r = known[$urandom_range(0, known.size() - 1)];
        else r = '{$urandom, $urandom, 16'($urandom), 16'($urandom), PROTO_TCP};
        e = shadow[ref_hash(r)[7:0]];
        if ($urandom_range(0, 1)) r.proto = (r.proto == PROTO_TCP) ? PROTO_INT_TCP : PROTO_INT_UDP;
        inp = PORT_W'($urandom_range(0, RECIRC_PORT));
        egp = PORT_W'($urandom_range(0, NUM_PORTS - 1));
        hit = 1'($urandom_range(0, 3) != 0);
        if (!e.valid) begin e = '0; e.ptype = PT_INSENSITIVE; end
        xport = egp; xdrop = 0;
        if (e.ptype == PT_PROBE) begin
          xt = (inp == PORT_W'(RECIRC_PORT)) ? PT_RECIRC_PROBE : PT_PROBE;
          xport = PORT_W'(RECIRC_PORT);
        end else begin
          xt = e.ptype;
          xdrop = !hit;
        end
        in_desc = '0; in_desc.ft = r; in_desc.in_port = inp; in_desc.route_hit = hit;
        in_desc.eg_port = egp; in_desc.tag = TAG_W'(n);
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        if (xdrop) check(!out_valid && out_drop, "unrouted data packet dropped (mixed)");
        else check(out_valid && !out_drop && out_desc.ptype == xt && out_desc.eg_port == xport
                   && out_desc.tau == e.tau && out_desc.rem_hops == e.rem_hops && out_desc.qid == e.qid
                   && out_desc.ft == r && out_desc.tag == TAG_W'(n),
                   $sformatf("mixed lookup %0d: type %0d port %0d, expected %0d %0d", n, out_desc.ptype,
                             out_desc.eg_port, xt, xport));
      end
    end
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
