// rha_pkg: types and constants shared by the remaining-hop-aware (RHA) switch.
//
// The switch works on packet descriptors: the parsed header fields a match-action
// pipeline sees (5-tuple, the INT header, the probe payload) plus the metadata the
// pipeline attaches on the way (packet type, egress port, queue, remaining hops,
// E2E tolerable queuing delay). The packet body itself stays in a packet buffer and is
// referred to by an opaque tag.
//
// Taken from the design description: three queues per egress port with WRR weights
// 2, 3 and 5; k = 64 ns per 80-byte cell at the port rate; a one-byte Hop Count, a
// six-byte Total Queue Time, four-byte DeviceID and Queue Time INT subfields; IP
// protocol 0xfe/0xff marking INT-carrying TCP/UDP packets. The MathUnit of queue i is
// ceil(R/R_i * k) = ceil(k * sum(w) / w_i), computed here at elaboration.
// Own choices: four front-panel ports plus one recirculation port, 16-bit queue
// lengths in cells, time in nanoseconds, 8-bit packet length in cells.
package rha_pkg;

  localparam int NUM_QUEUES   = 3;             // queues per egress port
  localparam int NUM_PORTS    = 4;             // front-panel egress ports
  localparam int RECIRC_PORT  = NUM_PORTS;     // dedicated recirculation port
  localparam int PORT_W       = 3;             // holds 0 .. RECIRC_PORT
  localparam int QID_W        = 2;
  localparam int QLEN_W       = 16;            // queue length in 80-byte cells
  localparam int TIME_W       = 48;            // Total Queue Time, 6 bytes, ns
  localparam int QTIME_W      = 32;            // per-hop Queue Time, 4 bytes, ns
  localparam int DEVID_W      = 32;            // DeviceID, 4 bytes
  localparam int HOP_W        = 8;             // Hop Count, 1 byte
  localparam int LEN_W        = 8;             // packet length in cells
  localparam int TAG_W        = 16;            // packet-buffer handle
  localparam int W_W          = 8;             // WRR weight width
  localparam int MU_W         = 16;            // MathUnit width
  localparam int K_NS_PER_CELL = 64;           // k of Eq. (3)

  localparam logic [7:0] PROTO_TCP     = 8'd6;
  localparam logic [7:0] PROTO_UDP     = 8'd17;
  localparam logic [7:0] PROTO_INT_TCP = 8'hfe;
  localparam logic [7:0] PROTO_INT_UDP = 8'hff;

  typedef logic [NUM_QUEUES-1:0][W_W-1:0]    weight_vec_t;   // index 0 = q1
  typedef logic [NUM_QUEUES-1:0][MU_W-1:0]   mu_vec_t;
  typedef logic [NUM_QUEUES-1:0][QLEN_W-1:0] qlen_vec_t;

  // w1 < w2 < w3 as the scheduling algorithm requires
  localparam weight_vec_t DEF_WEIGHTS = {8'd5, 8'd3, 8'd2};

  // MathUnit_i = ceil(k * sum_j(w_j) / w_i)
  function automatic mu_vec_t math_units(weight_vec_t w, int k);
    int unsigned sum;
    mu_vec_t mu;
    sum = 0;
    for (int i = 0; i < NUM_QUEUES; i++) sum += int'(w[i]);
    for (int i = 0; i < NUM_QUEUES; i++)
      mu[i] = MU_W'((sum * k + int'(w[i]) - 1) / int'(w[i]));
    return mu;
  endfunction

  localparam mu_vec_t DEF_MATH_UNITS = math_units(DEF_WEIGHTS, K_NS_PER_CELL);

  typedef enum logic [1:0] {
    PT_INSENSITIVE  = 2'd0,
    PT_CONSTRAINED  = 2'd1,
    PT_PROBE        = 2'd2,
    PT_RECIRC_PROBE = 2'd3
  } pkt_type_e;

  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } five_tuple_t;

  typedef struct packed {
    logic [HOP_W-1:0]  hop_count;
    logic [TIME_W-1:0] total_qtime;
  } int_hdr_t;

  typedef struct packed {
    logic [DEVID_W-1:0] device_id;
    logic [QTIME_W-1:0] queue_time;
  } int_field_t;

  // Flow entry written by the control plane, indexed by the 5-tuple hash.
  typedef struct packed {
    logic              valid;
    pkt_type_e         ptype;     // PT_INSENSITIVE, PT_CONSTRAINED or PT_PROBE
    logic [TIME_W-1:0] tau;       // total E2E tolerable queuing delay, ns
    logic [HOP_W-1:0]  rem_hops;  // hops left including this switch
    logic [QID_W-1:0]  qid;       // queue of a delay-insensitive flow
  } flow_entry_t;

  typedef struct packed {
    // packet as received
    logic [TAG_W-1:0]  tag;
    logic [LEN_W-1:0]  len_cells;
    logic [PORT_W-1:0] in_port;
    five_tuple_t       ft;
    logic              int_valid;   // INT header present (protocol 0xfe / 0xff)
    int_hdr_t          inth;
    logic [PORT_W-1:0] probe_port;  // probe: egress port whose queues it samples
    qlen_vec_t         probe_qlen;  // probe: queue lengths it carries
    // pipeline metadata
    logic              route_hit;
    pkt_type_e         ptype;
    logic [PORT_W-1:0] eg_port;
    logic [QID_W-1:0]  qid;
    logic [HOP_W-1:0]  rem_hops;
    logic [TIME_W-1:0] tau;
  } pkt_desc_t;

  // What the traffic manager hands to the egress pipeline.
  typedef struct packed {
    pkt_desc_t          d;
    logic [QTIME_W-1:0] qtime;       // time spent in the queue, ns
    logic [QLEN_W-1:0]  deq_qdepth;  // cells left in that queue after dequeue
  } eg_desc_t;

  // One-cycle event strobes of the whole switch, for counters.
  typedef struct packed {
    logic route_miss_drop;
    logic rha_enqueue;
    logic rha_relaxed;      // queue found after doubling the TQD at least once
    logic rha_drop;
    logic tm_tail_drop;
    logic probe_encoded;
    logic qlm_hit;
    logic ig_qlen_update;
    logic int_first_hop;
    logic int_last_hop;
  } sw_events_t;

endpackage
