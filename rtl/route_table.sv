// route_table: the routing stage of the ingress pipeline.
//
// Looks up the egress port of a packet from its destination address. The table is
// direct-indexed by the low IDX_W bits of the destination IPv4 address (host number in
// the test network) and written by the control plane through the cfg_* port. A packet
// whose entry is invalid leaves with route_hit = 0; the classification stage decides
// what to do with it (data packets are dropped, probes do not need a route).
//
// The description only says that routing determines the egress port; the indexing,
// table size and miss handling are this design's choices.
//
// Timing: one registered stage, out_* follow in_* by one cycle, one packet per cycle.
// A table write takes effect for lookups in the following cycle.
module route_table
  import rha_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // control plane
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_addr,
  input  logic                       cfg_valid,
  input  logic [PORT_W-1:0]          cfg_port,
  // packet stream
  input  logic                       in_valid,
  input  pkt_desc_t                  in_desc,
  output logic                       out_valid,
  output pkt_desc_t                  out_desc
);
  localparam int IDX_W = $clog2(ENTRIES);

  logic              ent_valid [ENTRIES];
  logic [PORT_W-1:0] ent_port  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ent_valid[i] <= 1'b0;
    end else if (cfg_we) begin
      ent_valid[cfg_addr] <= cfg_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we) ent_port[cfg_addr] <= cfg_port;
  end

  logic [IDX_W-1:0] idx;
  assign idx = in_desc.ft.dst_ip[IDX_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_desc  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_desc           <= in_desc;
        out_desc.route_hit <= ent_valid[idx];
        out_desc.eg_port   <= ent_valid[idx] ? ent_port[idx] : '0;
      end
    end
  end
endmodule
