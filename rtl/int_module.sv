// int_module: in-band network telemetry at the end of the egress pipeline.
//
// For an E2E-latency-constrained TCP or UDP packet:
//  * if it carries no INT header yet (this switch is its first hop), the header is
//    created with Hop Count = 0 and Total Queue Time = 0, and the IP protocol is
//    rewritten to 0xfe (TCP) or 0xff (UDP);
//  * Hop Count is incremented and the queue time of this hop is added to Total
//    Queue Time;
//  * a new INT field {DeviceID, Queue Time} is produced (out_field) for the deparser
//    to place after the existing INT fields;
//  * at the last hop (remaining hops <= 1) the protocol is restored, the INT header is
//    marked removed (int_valid = 0) and the final Hop Count / Total Queue Time are
//    reported to the control plane (out_report).
// All other packets pass unchanged.
//
// Field sizes, the protocol values and the update rules follow the description;
// limiting INT to constrained packets, the report port and handling the strip
// inside this stage are this design's choices.
//
// Timing: one registered stage.
module int_module
  import rha_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DEVID_W-1:0] device_id,
  input  logic               in_valid,
  input  eg_desc_t           in_desc,
  output logic               out_valid,
  output pkt_desc_t          out_desc,
  output logic               out_field_valid,
  output int_field_t         out_field,
  output logic               out_report_valid,
  output int_hdr_t           out_report,
  output logic               out_first_hop,
  output logic               out_last_hop
);
  pkt_desc_t  d;
  int_field_t f;
  logic       act, first, last;

  always_comb begin
    logic is_tcp, is_udp;
    d      = in_desc.d;
    is_tcp = (d.ft.proto == PROTO_TCP) || (d.ft.proto == PROTO_INT_TCP);
    is_udp = (d.ft.proto == PROTO_UDP) || (d.ft.proto == PROTO_INT_UDP);
    act    = (d.ptype == PT_CONSTRAINED) && (is_tcp || is_udp);
    first  = act && !d.int_valid;
    last   = act && (d.rem_hops <= HOP_W'(1));
    f.device_id  = device_id;
    f.queue_time = in_desc.qtime;
    if (act) begin
      if (first) begin
        d.int_valid = 1'b1;
        d.inth      = '0;
      end
      d.ft.proto         = is_tcp ? PROTO_INT_TCP : PROTO_INT_UDP;
      d.inth.hop_count   = d.inth.hop_count + HOP_W'(1);
      d.inth.total_qtime = d.inth.total_qtime + TIME_W'(in_desc.qtime);
      if (last) begin
        d.ft.proto  = is_tcp ? PROTO_TCP : PROTO_UDP;
        d.int_valid = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid        <= 1'b0;
      out_field_valid  <= 1'b0;
      out_report_valid <= 1'b0;
      out_first_hop    <= 1'b0;
      out_last_hop     <= 1'b0;
      out_desc         <= '0;
      out_field        <= '0;
      out_report       <= '0;
    end else begin
      out_valid        <= in_valid;
      out_field_valid  <= in_valid && act;
      out_report_valid <= in_valid && last;
      out_first_hop    <= in_valid && first;
      out_last_hop     <= in_valid && last;
      if (in_valid) begin
        out_desc   <= d;
        out_field  <= f;
        out_report <= d.inth;
      end
    end
  end
endmodule
