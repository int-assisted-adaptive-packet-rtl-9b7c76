// ig_qlen_regs: queue length extraction and the ingress register set.
//
// A recirculated probe carries the (modified) lengths of all queues of one egress
// port. When one arrives (wr_valid), its probe_port and probe_qlen fields are stored
// in the register of that port; the probe itself is consumed here. The RHA scheduler
// reads the registers of the port a packet is routed to through the combinational
// rd_port / rd_qlen port. Registers reset to 0 (all queues taken as empty until the
// first probe returns).
//
// The description gives the function (extract, store, drop the probe); register
// layout and reset value are this design's.
//
// Timing: a write is visible on rd_qlen in the cycle after wr_valid.
module ig_qlen_regs
  import rha_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  pkt_desc_t         wr_desc,
  input  logic [PORT_W-1:0] rd_port,
  output qlen_vec_t         rd_qlen
);
  localparam int PI_W = $clog2(NUM_PORTS);
  qlen_vec_t regs [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) regs[p] <= '0;
    end else if (wr_valid && (int'(wr_desc.probe_port) < NUM_PORTS)) begin
      regs[wr_desc.probe_port[PI_W-1:0]] <= wr_desc.probe_qlen;
    end
  end

  assign rd_qlen = (int'(rd_port) < NUM_PORTS) ? regs[rd_port[PI_W-1:0]] : '0;
endmodule
