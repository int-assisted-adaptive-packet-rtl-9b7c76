// eg_qlen_regs_tb: data packets report (port, queue, depth); the per-port vectors
// read back must match a shadow copy, only the written queue changes, and writes to
// the recirculation port or an out-of-range queue are ignored.
module eg_qlen_regs_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              wr_valid;
  logic [PORT_W-1:0] wr_port, rd_port;
  logic [QID_W-1:0]  wr_qid;
  logic [QLEN_W-1:0] wr_qdepth;
  qlen_vec_t         rd_qlen;

  eg_qlen_regs dut (.*);

  int checks = 0, failures = 0;
  qlen_vec_t shadow [NUM_PORTS];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_valid = 0; wr_port = 0; wr_qid = 0; wr_qdepth = 0; rd_port = 0;
    for (int p = 0; p < NUM_PORTS; p++) shadow[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 1000; n++) begin
      int p, q;
      p = $urandom_range(0, NUM_PORTS);
      q = $urandom_range(0, 3);
      wr_port = PORT_W'(p); wr_qid = QID_W'(q); wr_qdepth = QLEN_W'($urandom);
      wr_valid = 1;
      @(posedge clk); #1;
      wr_valid = 0;
      if (p < NUM_PORTS && q < NUM_QUEUES) shadow[p][q] = wr_qdepth;
      for (int r = 0; r < NUM_PORTS; r++) begin
        rd_port = PORT_W'(r); #1;
        check(rd_qlen == shadow[r], $sformatf("port %0d after write to %0d/%0d", r, p, q));
      end
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
