// traffic_manager: the queues between the ingress and the egress pipeline.
//
// Each of the NUM_PORTS front-panel ports has NUM_QUEUES FIFO queues scheduled by
// weighted round robin (wrr_port). The recirculation port has one queue of its own
// that only probes use, so probes never share a queue with data packets.
// A packet from the ingress pipeline is written to queue in_desc.qid of port
// in_desc.eg_port (the recirculation port ignores qid); a packet that does not fit is
// tail-dropped (tail_drop strobe). Ports whose transmitter is idle request the single
// egress pipeline; a round-robin arbiter grants one per cycle, and the granted packet
// appears on out_* one cycle later with its queue time and the depth left in its queue.
// qlen_cells shows the live length of every data queue.
//
// The port/queue organisation follows the description; buffer sizes, the one-cell-
// per-cycle port model and the shared egress arbitration are this design's choices.
module traffic_manager
  import rha_pkg::*;
#(
  parameter weight_vec_t  WEIGHTS      = DEF_WEIGHTS,
  parameter int unsigned  DEPTH        = 1024,
  parameter int unsigned  QCAP_CELLS   = 2048,
  parameter int unsigned  RECIRC_DEPTH = 64,
  parameter int unsigned  NS_PER_CYCLE = K_NS_PER_CELL
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pkt_desc_t  in_desc,
  output logic       tail_drop,
  output logic       out_valid,
  output eg_desc_t   out_desc,
  output qlen_vec_t  qlen_cells [NUM_PORTS]
);
  localparam int NP = NUM_PORTS + 1;

  logic [31:0]        now;
  logic [NP-1:0]      req, grant, drop;
  pkt_desc_t          dd   [NP];
  logic [QTIME_W-1:0] dqt  [NP];
  logic [QLEN_W-1:0]  dqd  [NP];
  logic [$clog2(NP)-1:0] rr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 32'd1;
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    wrr_port #(
      .NQ(NUM_QUEUES), .WEIGHTS(WEIGHTS), .DEPTH(DEPTH),
      .QCAP_CELLS(QCAP_CELLS), .NS_PER_CYCLE(NS_PER_CYCLE)
    ) u_port (
      .clk, .rst_n, .now,
      .enq_valid (in_valid && (int'(in_desc.eg_port) == p)),
      .enq_qid   (in_desc.qid),
      .enq_desc  (in_desc),
      .enq_drop  (drop[p]),
      .req       (req[p]),
      .grant     (grant[p]),
      .deq_desc  (dd[p]),
      .deq_qtime (dqt[p]),
      .deq_qdepth(dqd[p]),
      .qlen_cells(qlen_cells[p])
    );
  end

  logic [0:0][QLEN_W-1:0] rc_qlen;
  wrr_port #(
    .NQ(1), .WEIGHTS(8'd1), .DEPTH(RECIRC_DEPTH),
    .QCAP_CELLS(RECIRC_DEPTH), .NS_PER_CYCLE(NS_PER_CYCLE)
  ) u_recirc (
    .clk, .rst_n, .now,
    .enq_valid (in_valid && (int'(in_desc.eg_port) == RECIRC_PORT)),
    .enq_qid   ('0),
    .enq_desc  (in_desc),
    .enq_drop  (drop[RECIRC_PORT]),
    .req       (req[RECIRC_PORT]),
    .grant     (grant[RECIRC_PORT]),
    .deq_desc  (dd[RECIRC_PORT]),
    .deq_qtime (dqt[RECIRC_PORT]),
    .deq_qdepth(dqd[RECIRC_PORT]),
    .qlen_cells(rc_qlen)
  );

  // round-robin grant, starting after the last winner
  logic [$clog2(NP)-1:0] win;
  always_comb begin
    grant = '0;
    win   = rr;
    for (int i = NP; i >= 1; i--) begin
      if (req[(int'(rr) + i) % NP]) win = $clog2(NP)'((int'(rr) + i) % NP);
    end
    if (req != '0) grant[win] = 1'b1;
  end

  assign tail_drop = |drop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      out_valid <= 1'b0;
      out_desc  <= '0;
    end else begin
      out_valid <= (req != '0);
      if (req != '0) begin
        rr                  <= win;
        out_desc.d          <= dd[win];
        out_desc.qtime      <= dqt[win];
        out_desc.deq_qdepth <= dqd[win];
      end
    end
  end

  // assertions are off while rst_n is low: the state is undefined before the first edge
  // (lint notes rst_n as both asynchronous reset and synchronous signal because of this
  // disable clause; it builds no logic)
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("traffic_manager: more than one grant");
endmodule
