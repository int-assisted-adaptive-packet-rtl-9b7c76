// int_module_tb: random constrained packets at first, middle and last hops, and
// packets of other types; the expected INT header, protocol, new INT field and
// last-hop report are computed here from the field rules and compared.
module int_module_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DEVID_W-1:0] device_id;
  logic       in_valid, out_valid, out_field_valid, out_report_valid, out_first_hop, out_last_hop;
  eg_desc_t   in_desc;
  pkt_desc_t  out_desc;
  int_field_t out_field;
  int_hdr_t   out_report;

  int_module dut (.*);

  int checks = 0, failures = 0, firsts = 0, lasts = 0, mids = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_valid = 0; in_desc = '0; device_id = 32'h5357_0001;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      pkt_type_e pt;
      logic [7:0] proto, exp_proto;
      bit iv, tcpudp, act, first, last;
      longint unsigned tot, q, exp_tot;
      int hops, exp_hops;
      pt = pkt_type_e'($urandom_range(0, 3) == 0 ? 0 : 1);
      case ($urandom_range(0, 4))
        0: proto = PROTO_TCP; 1: proto = PROTO_UDP; 2: proto = PROTO_INT_TCP;
        3: proto = PROTO_INT_UDP; default: proto = 8'd1;
      endcase
      iv = (proto == PROTO_INT_TCP || proto == PROTO_INT_UDP);
      tot = iv ? $urandom_range(0, 1000000) : 0;
      q = $urandom;
      hops = iv ? $urandom_range(0, 10) : 0;
      in_desc = '0;
      in_desc.d.ptype = pt; in_desc.d.ft.proto = proto; in_desc.d.int_valid = iv;
      in_desc.d.inth.hop_count = HOP_W'(hops); in_desc.d.inth.total_qtime = TIME_W'(tot);
      in_desc.d.rem_hops = HOP_W'($urandom_range(0, 4)); in_desc.qtime = QTIME_W'(q);
      in_desc.d.tag = TAG_W'(n);
      tcpudp = proto inside {PROTO_TCP, PROTO_UDP, PROTO_INT_TCP, PROTO_INT_UDP};
      act = (pt == PT_CONSTRAINED) && tcpudp;
      first = act && !iv;
      last = act && in_desc.d.rem_hops <= 1;
      exp_hops = act ? hops + 1 : hops;
      exp_tot = act ? tot + q : tot;
      exp_proto = proto;
      if (act) begin
        if (proto == PROTO_TCP || proto == PROTO_INT_TCP) exp_proto = last ? PROTO_TCP : PROTO_INT_TCP;
        else exp_proto = last ? PROTO_UDP : PROTO_INT_UDP;
      end
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid && out_desc.tag == TAG_W'(n), "one-cycle latency");
      check(out_desc.ft.proto == exp_proto, $sformatf("protocol %h expected %h", out_desc.ft.proto, exp_proto));
      check(out_field_valid == act && out_first_hop == first && out_last_hop == last
            && out_report_valid == last, "strobes");
      if (act) begin
        check(int'(out_desc.inth.hop_count) == exp_hops && out_desc.inth.total_qtime == TIME_W'(exp_tot),
              "hop count and total queue time");
        check(out_field.device_id == device_id && out_field.queue_time == QTIME_W'(q), "new INT field");
        check(out_desc.int_valid == !last, "INT header kept until the last hop");
        if (last) check(out_report.hop_count == HOP_W'(exp_hops)
                        && out_report.total_qtime == TIME_W'(exp_tot), "last-hop report");
        if (first) firsts++; else if (last) lasts++; else mids++;
      end else begin
        check(out_desc == in_desc.d, "other packets unchanged");
      end
    end
    check(firsts > 0 && lasts > 0 && mids > 0, "first, middle and last hops exercised");
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
