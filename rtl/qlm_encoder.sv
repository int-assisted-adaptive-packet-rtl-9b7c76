// qlm_encoder: queue length modification (QLM) and encoding into probe packets
// (egress pipeline).
//
// A probe reaching the egress pipeline picks up the lengths of all queues of the port
// it samples (in_qlen, read from the egress register set). Because the probe needs a
// recirculation to bring them to the ingress pipeline, where the queues will have
// grown meanwhile, each length is raised by a constant before it is encoded. The
// constants come from a match-action table with ENTRIES entries: entry e matches when
// every queue i has lo[e][i] <= Q_i <= hi[e][i]; its action adds c[e][i] to Q_i
// (saturating). The lowest-numbered matching entry wins; with no match the default
// action leaves the lengths unchanged. Entries are written by the control plane.
//
// The table shape (a range per queue, one constant per queue, default no action)
// follows the description. Table size, priority by index, saturation and the
// cfg_* write port are this design's choices.
//
// Timing: one registered stage. out_hit / out_entry report the matching entry.
module qlm_encoder
  import rha_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_addr,
  input  logic                       cfg_valid,
  input  qlen_vec_t                  cfg_lo,
  input  qlen_vec_t                  cfg_hi,
  input  qlen_vec_t                  cfg_add,
  input  logic                       in_valid,
  input  pkt_desc_t                  in_desc,
  input  qlen_vec_t                  in_qlen,
  output logic                       out_valid,
  output pkt_desc_t                  out_desc,
  output logic                       out_hit,
  output logic [$clog2(ENTRIES)-1:0] out_entry
);
  localparam int IDX_W = $clog2(ENTRIES);

  logic      ent_valid [ENTRIES];
  qlen_vec_t ent_lo    [ENTRIES];
  qlen_vec_t ent_hi    [ENTRIES];
  qlen_vec_t ent_add   [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) ent_valid[e] <= 1'b0;
    end else if (cfg_we) begin
      ent_valid[cfg_addr] <= cfg_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      ent_lo[cfg_addr]  <= cfg_lo;
      ent_hi[cfg_addr]  <= cfg_hi;
      ent_add[cfg_addr] <= cfg_add;
    end
  end

  logic             hit;
  logic [IDX_W-1:0] hit_idx;
  qlen_vec_t        modq;

  always_comb begin
    logic m;
    logic [QLEN_W:0] s;
    hit     = 1'b0;
    hit_idx = '0;
    s       = '0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      m = ent_valid[e];
      for (int i = 0; i < NUM_QUEUES; i++)
        m = m && (in_qlen[i] >= ent_lo[e][i]) && (in_qlen[i] <= ent_hi[e][i]);
      if (m && !hit) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(e);
      end
    end
    modq = in_qlen;
    if (hit) begin
      for (int i = 0; i < NUM_QUEUES; i++) begin
        s       = {1'b0, in_qlen[i]} + {1'b0, ent_add[hit_idx][i]};
        modq[i] = s[QLEN_W] ? '1 : s[QLEN_W-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_entry <= '0;
      out_desc  <= '0;
    end else begin
      out_valid <= in_valid;
      out_hit   <= in_valid && hit;
      if (in_valid) begin
        out_entry           <= hit_idx;
        out_desc            <= in_desc;
        out_desc.probe_qlen <= modq;
      end
    end
  end
endmodule
