// pdp_switch: a programmable switch that schedules E2E-latency-constrained packets with
// remaining-hop-aware (RHA) queue selection over weighted round-robin queues.
//
// Ingress pipeline  (one packet per cycle, 3 registered stages)
//   merge     recirculated probes have priority over new packets (in_ready = 0 then)
//   routing   route_table: egress port from the destination address
//   classify  pkt_classifier: type, tau, remaining hops from the hashed 5-tuple;
//             probes are sent to the recirculation port
//   schedule  rha_scheduler picks the queue of a constrained packet (or drops it)
//             from the ingress copy of the queue lengths; a recirculated probe instead
//             writes its queue lengths into that copy (ig_qlen_regs) and is consumed
// Traffic management
//   traffic_manager: NUM_QUEUES WRR queues per port plus the probe-only recirculation
//   queue; one packet per cycle to the egress pipeline
// Egress pipeline  (1 registered stage)
//   data packets  eg_qlen_regs records the depth of the queue they left; int_module
//                 updates/creates/strips their INT header and emits the new INT field
//   probes        qlm_encoder reads the egress queue lengths of the sampled port, adds
//                 the QLM constants and encodes them; the probe then goes round the
//                 recirculation path (RECIRC_LAT cycles) back to the ingress merge
//
// Interface: packets enter as parsed descriptors (in_*), leave on out_* with their
// egress port in out_desc.eg_port; out_field is the INT field to insert, out_report
// the telemetry handed to the control plane at a flow's last hop. cfg_* ports are the
// control plane's table writes. events pulses once per occurrence of each mechanism.
//
// The block structure and packet paths follow the system overview of the design;
// the descriptor interface, stage timing and recirculation latency are this design's.
module pdp_switch
  import rha_pkg::*;
#(
  parameter int unsigned ROUTE_ENTRIES = 256,
  parameter int unsigned FLOW_ENTRIES  = 256,
  parameter int unsigned QLM_ENTRIES   = 4,
  parameter weight_vec_t WEIGHTS       = DEF_WEIGHTS,
  parameter mu_vec_t     MATH_UNITS    = math_units(WEIGHTS, K_NS_PER_CELL),
  parameter int unsigned QDEPTH        = 1024,
  parameter int unsigned QCAP_CELLS    = 2048,
  parameter int unsigned RECIRC_DEPTH  = 64,
  parameter int unsigned RECIRC_LAT    = 8,
  parameter int unsigned NS_PER_CYCLE  = K_NS_PER_CELL
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [DEVID_W-1:0]               device_id,
  // control plane
  input  logic                             route_we,
  input  logic [$clog2(ROUTE_ENTRIES)-1:0] route_addr,
  input  logic                             route_valid,
  input  logic [PORT_W-1:0]                route_port,
  input  logic                             flow_we,
  input  logic [$clog2(FLOW_ENTRIES)-1:0]  flow_addr,
  input  flow_entry_t                      flow_entry,
  input  logic                             qlm_we,
  input  logic [$clog2(QLM_ENTRIES)-1:0]   qlm_addr,
  input  logic                             qlm_valid,
  input  qlen_vec_t                        qlm_lo,
  input  qlen_vec_t                        qlm_hi,
  input  qlen_vec_t                        qlm_add,
  // packets in
  input  logic                             in_valid,
  output logic                             in_ready,
  input  pkt_desc_t                        in_desc,
  // packets out
  output logic                             out_valid,
  output pkt_desc_t                        out_desc,
  output logic                             out_field_valid,
  output int_field_t                       out_field,
  output logic                             out_report_valid,
  output int_hdr_t                         out_report,
  // observation
  output qlen_vec_t                        tm_qlen [NUM_PORTS],
  output sw_events_t                       events
);
  // ---------------- recirculation path ----------------
  logic      rc_valid [RECIRC_LAT];
  pkt_desc_t rc_desc  [RECIRC_LAT];
  logic      qlm_ov;
  pkt_desc_t qlm_od;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RECIRC_LAT); i++) rc_valid[i] <= 1'b0;
    end else begin
      rc_valid[0] <= qlm_ov;
      for (int i = 1; i < int'(RECIRC_LAT); i++) rc_valid[i] <= rc_valid[i-1];
    end
  end
  always_ff @(posedge clk) begin
    rc_desc[0] <= qlm_od;
    for (int i = 1; i < int'(RECIRC_LAT); i++) rc_desc[i] <= rc_desc[i-1];
  end

  // ---------------- ingress ----------------
  logic      mg_valid;
  pkt_desc_t mg_desc;
  assign in_ready = !rc_valid[RECIRC_LAT-1];
  always_comb begin
    mg_valid = rc_valid[RECIRC_LAT-1] || in_valid;
    mg_desc  = in_desc;
    if (rc_valid[RECIRC_LAT-1]) begin
      mg_desc         = rc_desc[RECIRC_LAT-1];
      mg_desc.in_port = PORT_W'(RECIRC_PORT);
    end
  end

  logic      rt_valid;
  pkt_desc_t rt_desc;
  route_table #(.ENTRIES(ROUTE_ENTRIES)) u_route (
    .clk, .rst_n,
    .cfg_we(route_we), .cfg_addr(route_addr), .cfg_valid(route_valid), .cfg_port(route_port),
    .in_valid(mg_valid), .in_desc(mg_desc), .out_valid(rt_valid), .out_desc(rt_desc)
  );

  logic      cl_valid, cl_drop;
  pkt_desc_t cl_desc;
  pkt_classifier #(.ENTRIES(FLOW_ENTRIES)) u_class (
    .clk, .rst_n,
    .cfg_we(flow_we), .cfg_addr(flow_addr), .cfg_entry(flow_entry),
    .in_valid(rt_valid), .in_desc(rt_desc),
    .out_valid(cl_valid), .out_desc(cl_desc), .out_drop(cl_drop)
  );

  logic      is_rprobe;
  qlen_vec_t ig_qlen;
  assign is_rprobe = cl_valid && (cl_desc.ptype == PT_RECIRC_PROBE);

  ig_qlen_regs u_igq (
    .clk, .rst_n,
    .wr_valid(is_rprobe), .wr_desc(cl_desc),
    .rd_port(cl_desc.eg_port), .rd_qlen(ig_qlen)
  );

  logic      rs_valid, rs_drop;
  pkt_desc_t rs_desc;
  logic [3:0] rs_round;
  rha_scheduler #(.MATH_UNITS(MATH_UNITS)) u_rha (
    .clk, .rst_n,
    .in_valid(cl_valid && !is_rprobe), .in_desc(cl_desc), .in_qlen(ig_qlen),
    .out_valid(rs_valid), .out_desc(rs_desc), .out_drop(rs_drop), .out_round(rs_round)
  );

  // ---------------- traffic management ----------------
  logic     tm_drop, tm_valid;
  eg_desc_t tm_desc;
  traffic_manager #(
    .WEIGHTS(WEIGHTS), .DEPTH(QDEPTH), .QCAP_CELLS(QCAP_CELLS),
    .RECIRC_DEPTH(RECIRC_DEPTH), .NS_PER_CYCLE(NS_PER_CYCLE)
  ) u_tm (
    .clk, .rst_n,
    .in_valid(rs_valid), .in_desc(rs_desc), .tail_drop(tm_drop),
    .out_valid(tm_valid), .out_desc(tm_desc), .qlen_cells(tm_qlen)
  );

  // ---------------- egress ----------------
  logic      eg_probe, eg_data;
  qlen_vec_t eg_qlen;
  assign eg_probe = tm_valid && (tm_desc.d.ptype == PT_PROBE);
  assign eg_data  = tm_valid && (tm_desc.d.ptype != PT_PROBE);

  eg_qlen_regs u_egq (
    .clk, .rst_n,
    .wr_valid(eg_data), .wr_port(tm_desc.d.eg_port), .wr_qid(tm_desc.d.qid),
    .wr_qdepth(tm_desc.deq_qdepth),
    .rd_port(tm_desc.d.probe_port), .rd_qlen(eg_qlen)
  );

  logic qlm_hit;
  qlm_encoder #(.ENTRIES(QLM_ENTRIES)) u_qlm (
    .clk, .rst_n,
    .cfg_we(qlm_we), .cfg_addr(qlm_addr), .cfg_valid(qlm_valid),
    .cfg_lo(qlm_lo), .cfg_hi(qlm_hi), .cfg_add(qlm_add),
    .in_valid(eg_probe), .in_desc(tm_desc.d), .in_qlen(eg_qlen),
    .out_valid(qlm_ov), .out_desc(qlm_od), .out_hit(qlm_hit), .out_entry()
  );

  logic first_hop, last_hop;
  int_module u_int (
    .clk, .rst_n, .device_id,
    .in_valid(eg_data), .in_desc(tm_desc),
    .out_valid(out_valid), .out_desc(out_desc),
    .out_field_valid(out_field_valid), .out_field(out_field),
    .out_report_valid(out_report_valid), .out_report(out_report),
    .out_first_hop(first_hop), .out_last_hop(last_hop)
  );

  // ---------------- event strobes ----------------
  always_comb begin
    events                 = '0;
    events.route_miss_drop = cl_drop;
    events.rha_enqueue     = rs_valid && (rs_desc.ptype == PT_CONSTRAINED);
    events.rha_relaxed     = events.rha_enqueue && (rs_round != '0);
    events.rha_drop        = rs_drop;
    events.tm_tail_drop    = tm_drop;
    events.probe_encoded   = qlm_ov;
    events.qlm_hit         = qlm_hit;
    events.ig_qlen_update  = is_rprobe;
    events.int_first_hop   = first_hop;
    events.int_last_hop    = last_hop;
  end

  // the scheduler either forwards or drops a packet, never both
  // assertions are off while rst_n is low: the state is undefined before the first edge
  // (lint notes rst_n as both asynchronous reset and synchronous signal because of this
  // disable clause; it builds no logic)
  a_queue_or_drop: assert property (@(posedge clk) disable iff (!rst_n) !(rs_valid && rs_drop))
    else $error("pdp_switch: packet both queued and dropped");
endmodule
