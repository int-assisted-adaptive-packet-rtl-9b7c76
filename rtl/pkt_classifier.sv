// pkt_classifier: the packet classification stage of the ingress pipeline.
//
// Hashes the 5-tuple with CRC-16/CCITT (polynomial 0x1021, initial value 0xffff, the
// 104 tuple bits fed MSB first) and uses the low bits of the hash to read the flow
// table written by the control plane. The entry gives the packet type, the total E2E
// tolerable queuing delay (tau), the remaining hops and, for delay-insensitive
// flows, the queue. Before hashing, protocol 0xfe/0xff is mapped back to TCP/UDP so
// that a flow hashes alike before and after the first switch marks it as INT-carrying.
//
//   probe entry, arriving on a front-panel port  -> PT_PROBE, egress = recirculation port
//   probe entry, arriving on the recirculation port -> PT_RECIRC_PROBE
//   constrained entry                               -> PT_CONSTRAINED
//   delay-insensitive entry or no valid entry       -> PT_INSENSITIVE, queue from entry
//                                                      (DEFAULT_QID on a miss)
// A data packet without a route is dropped here (drop strobe, no output).
//
// The description gives the types and says they are found from the hashed 5-tuple;
// the hash function, the direct-indexed table, the miss rule and the use of the
// arrival port to tell a recirculated probe apart are this design's choices.
//
// Timing: one registered stage; flow-table writes apply from the next cycle.
module pkt_classifier
  import rha_pkg::*;
#(
  parameter int unsigned      ENTRIES     = 256,
  parameter logic [QID_W-1:0] DEFAULT_QID = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_addr,
  input  flow_entry_t                cfg_entry,
  input  logic                       in_valid,
  input  pkt_desc_t                  in_desc,
  output logic                       out_valid,
  output pkt_desc_t                  out_desc,
  output logic                       out_drop
);
  localparam int IDX_W = $clog2(ENTRIES);

  function automatic logic [15:0] crc16(five_tuple_t t);
    logic [103:0] bits;
    logic [15:0]  c;
    bits = t;
    c    = 16'hffff;
    for (int i = 103; i >= 0; i--) begin
      if (c[15] ^ bits[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  five_tuple_t  key;
  logic [15:0]  hash;
  flow_entry_t  ent;
  flow_entry_t  table_q [ENTRIES];
  logic         ent_ok  [ENTRIES];

  always_comb begin
    key = in_desc.ft;
    if (key.proto == PROTO_INT_TCP) key.proto = PROTO_TCP;
    if (key.proto == PROTO_INT_UDP) key.proto = PROTO_UDP;
  end
  assign hash = crc16(key);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ent_ok[i] <= 1'b0;
    end else if (cfg_we) begin
      ent_ok[cfg_addr] <= cfg_entry.valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we) table_q[cfg_addr] <= cfg_entry;
  end

  always_comb begin
    ent = table_q[hash[IDX_W-1:0]];
    if (!ent_ok[hash[IDX_W-1:0]]) begin
      ent       = '0;
      ent.ptype = PT_INSENSITIVE;
      ent.qid   = DEFAULT_QID;
    end
  end

  pkt_desc_t d;
  logic      drop;
  always_comb begin
    d          = in_desc;
    d.tau      = ent.tau;
    d.rem_hops = ent.rem_hops;
    d.qid      = ent.qid;
    drop       = 1'b0;
    unique case (ent.ptype)
      PT_PROBE, PT_RECIRC_PROBE: begin
        d.ptype   = (in_desc.in_port == PORT_W'(RECIRC_PORT)) ? PT_RECIRC_PROBE : PT_PROBE;
        d.eg_port = PORT_W'(RECIRC_PORT);
      end
      PT_CONSTRAINED: begin
        d.ptype = PT_CONSTRAINED;
        drop    = !in_desc.route_hit;
      end
      default: begin
        d.ptype = PT_INSENSITIVE;
        drop    = !in_desc.route_hit;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_drop  <= 1'b0;
      out_desc  <= '0;
    end else begin
      out_valid <= in_valid && !drop;
      out_drop  <= in_valid && drop;
      if (in_valid) out_desc <= d;
    end
  end
endmodule
