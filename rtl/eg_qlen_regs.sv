// eg_qlen_regs: queue length update and the egress register set.
//
// Every delay-insensitive or E2E-latency-constrained packet leaving the traffic
// manager reports the depth (in cells) of the queue it has just left; that value is
// written into the register of its (egress port, queue). The queue length encoding
// stage reads all queues of one port at once through rd_port / rd_qlen when a probe
// passes. Registers reset to 0.
//
// The description gives the function; the depth taken (cells left behind at dequeue)
// and the register layout are this design's.
//
// Timing: a write is visible on rd_qlen in the cycle after wr_valid.
module eg_qlen_regs
  import rha_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic [PORT_W-1:0] wr_port,
  input  logic [QID_W-1:0]  wr_qid,
  input  logic [QLEN_W-1:0] wr_qdepth,
  input  logic [PORT_W-1:0] rd_port,
  output qlen_vec_t         rd_qlen
);
  localparam int PI_W = $clog2(NUM_PORTS);
  qlen_vec_t regs [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) regs[p] <= '0;
    end else if (wr_valid && (int'(wr_port) < NUM_PORTS) && (int'(wr_qid) < NUM_QUEUES)) begin
      regs[wr_port[PI_W-1:0]][wr_qid] <= wr_qdepth;
    end
  end

  assign rd_qlen = (int'(rd_port) < NUM_PORTS) ? regs[rd_port[PI_W-1:0]] : '0;
endmodule
