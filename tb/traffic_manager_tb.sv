// traffic_manager_tb: queues and WRR scheduling.
//  1. Port 0: 60 packets of 8 cells into each of its three queues. While all three
//     stay backlogged, every 10 consecutive departures must hold 2, 3 and 5 packets of
//     queues 1, 2, 3 (weights 2, 3, 5); each queue must stay in FIFO order; departures
//     must be 8 cycles apart (one cell per cycle); queue time must equal the cycles
//     spent in the queue times 64 ns; once nothing more arrives, the reported depth
//     must equal the cells left behind.
//  2. Port 1: 200-cell packets overflow the 1024-cell queue limit: tail drops.
//  3. Probes through the recirculation queue, and ports 2 and 3 active together.
// Every packet sent must come out exactly once or be counted as dropped.
module traffic_manager_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, tail_drop, out_valid;
  pkt_desc_t in_desc;
  eg_desc_t  out_desc;
  qlen_vec_t qlen_cells [NUM_PORTS];

  traffic_manager #(.DEPTH(64), .QCAP_CELLS(1024), .RECIRC_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned enq_cyc [int];
  int sent = 0, drops = 0, received = 0;
  int p0_seq [$];
  int unsigned p0_out_cyc [$];
  int last_tag [NUM_PORTS+1][NUM_QUEUES];
  int cells_left [NUM_QUEUES];
  bit phase2 = 0;
  int depth_checks = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // monitor
  always @(posedge clk) begin
    if (rst_n && tail_drop) drops++;
    if (rst_n && out_valid) begin
      int tag, p, q;
      received++;
      tag = int'(out_desc.d.tag);
      p = int'(out_desc.d.eg_port);
      q = (p == RECIRC_PORT) ? 0 : int'(out_desc.d.qid);
      check(enq_cyc.exists(tag), $sformatf("departing packet %0d was sent (port %0d)", tag, p));
      if (enq_cyc.exists(tag)) begin
        check(out_desc.qtime == QTIME_W'((cyc - 1 - enq_cyc[tag]) * 64),
              $sformatf("queue time of %0d: %0d vs %0d cycles", tag, out_desc.qtime, cyc - 1 - enq_cyc[tag]));
        enq_cyc.delete(tag);
      end
      check(tag > last_tag[p][q], "FIFO order within a queue");
      last_tag[p][q] = tag;
      if (p == 0) begin
        p0_seq.push_back(q);
        p0_out_cyc.push_back(cyc);
        cells_left[q] -= 8;
        if (phase2) begin
          check(int'(out_desc.deq_qdepth) == cells_left[q], "depth left behind");
          depth_checks++;
        end
      end
    end
  end

  task automatic send(int port, int qid, int len, int tag, pkt_type_e pt = PT_CONSTRAINED);
    in_desc = '0;
    in_desc.eg_port = PORT_W'(port); in_desc.qid = QID_W'(qid);
    in_desc.len_cells = LEN_W'(len); in_desc.tag = TAG_W'(tag); in_desc.ptype = pt;
    in_valid = 1;
    enq_cyc[tag] = cyc;
    sent++;
    #1;
    if (tail_drop) enq_cyc.delete(tag);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    int tag = 1;
    in_valid = 0; in_desc = '0;
    for (int p = 0; p <= NUM_PORTS; p++) for (int q = 0; q < NUM_QUEUES; q++) last_tag[p][q] = 0;
    for (int q = 0; q < NUM_QUEUES; q++) cells_left[q] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 60; i++)
      for (int q = 0; q < NUM_QUEUES; q++) begin
        cells_left[q] += 8;
        send(0, q, 8, tag++);
      end
    phase2 = 1;
    check(drops == 0, "no drops while within limits");
    for (int i = 0; i < 10; i++) send(1, 0, 200, tag++);
    check(drops > 0, "tail drop when a queue exceeds its cell limit");
    for (int i = 0; i < 3; i++) send(RECIRC_PORT, 0, 1, tag++, PT_PROBE);
    for (int i = 0; i < 6; i++) send(2 + (i % 2), i % 3, 2, tag++);
    // drain
    repeat (3000) @(posedge clk);
    check(received + drops == sent, $sformatf("all packets accounted: %0d + %0d vs %0d", received, drops, sent));
    check(enq_cyc.size() == 0, "every accepted packet left");
    // WRR shares over windows of 10 while all three queues were backlogged
    for (int s = 20; s + 10 <= 110; s++) begin
      int c [3];
      c = '{0, 0, 0};
      for (int i = s; i < s + 10; i++) c[p0_seq[i]]++;
      check(c[0] == 2 && c[1] == 3 && c[2] == 5, $sformatf("WRR window at %0d: %0d/%0d/%0d", s, c[0], c[1], c[2]));
    end
    for (int i = 1; i < 100; i++)
      check(p0_out_cyc[i] - p0_out_cyc[i-1] == 8, "one cell per cycle on the port");
    check(depth_checks > 50, "depth checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
