// route_table_tb: programs random routes, then looks up random destinations and
// compares egress port and hit flag with a shadow table, one cycle after the request.
module route_table_tb;
  import rha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              cfg_we, cfg_valid;
  logic [7:0]        cfg_addr;
  logic [PORT_W-1:0] cfg_port;
  logic              in_valid, out_valid;
  pkt_desc_t         in_desc, out_desc;

  route_table dut (.*);

  int checks = 0, failures = 0;
  bit       sv [256];
  int       sp [256];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_addr = 0; cfg_port = 0; in_valid = 0; in_desc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // after reset every lookup misses
    in_valid = 1; in_desc.ft.dst_ip = 32'h0a00_0005;
    @(posedge clk); #1; in_valid = 0;
    check(out_valid && !out_desc.route_hit, "miss after reset");
    for (int i = 0; i < 256; i++) begin
      sv[i] = ($urandom_range(0, 3) != 0);
      sp[i] = $urandom_range(0, NUM_PORTS - 1);
      cfg_we = 1; cfg_addr = 8'(i); cfg_valid = sv[i]; cfg_port = PORT_W'(sp[i]);
      @(posedge clk); #1;
    end
    cfg_we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] ip;
      ip = $urandom;
      in_valid = 1; in_desc = '0; in_desc.ft.dst_ip = ip; in_desc.tag = TAG_W'(n);
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid && out_desc.tag == TAG_W'(n), "one-cycle latency");
      check(out_desc.route_hit == sv[ip[7:0]], $sformatf("hit flag for %h", ip));
      if (sv[ip[7:0]]) check(int'(out_desc.eg_port) == sp[ip[7:0]], $sformatf("port for %h", ip));
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
