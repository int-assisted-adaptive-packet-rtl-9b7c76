// ig_qlen_regs_tb: recirculated probes for random ports write queue-length vectors;
// every port is read back and compared with a shadow copy. Checks reset to zero,
// that a write shows the cycle after, and that an out-of-range port writes nothing.
module ig_qlen_regs_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              wr_valid;
  pkt_desc_t         wr_desc;
  logic [PORT_W-1:0] rd_port;
  qlen_vec_t         rd_qlen;

  ig_qlen_regs dut (.*);

  int checks = 0, failures = 0;
  qlen_vec_t shadow [NUM_PORTS];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic check_all();
    for (int p = 0; p < NUM_PORTS; p++) begin
      rd_port = PORT_W'(p); #1;
      check(rd_qlen == shadow[p], $sformatf("port %0d contents", p));
    end
  endtask

  initial begin
    wr_valid = 0; wr_desc = '0; rd_port = 0;
    for (int p = 0; p < NUM_PORTS; p++) shadow[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check_all();
    for (int n = 0; n < 500; n++) begin
      int p;
      p = $urandom_range(0, NUM_PORTS);   // NUM_PORTS = recirculation port: ignored
      wr_desc = '0;
      wr_desc.ptype = PT_RECIRC_PROBE;
      wr_desc.probe_port = PORT_W'(p);
      for (int q = 0; q < NUM_QUEUES; q++) wr_desc.probe_qlen[q] = QLEN_W'($urandom);
      wr_valid = 1;
      rd_port = PORT_W'(p % NUM_PORTS); #1;
      check(p >= NUM_PORTS || rd_qlen == shadow[p], "old value before the clock edge");
      @(posedge clk); #1;
      wr_valid = 0;
      if (p < NUM_PORTS) shadow[p] = wr_desc.probe_qlen;
      check_all();
    end
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
