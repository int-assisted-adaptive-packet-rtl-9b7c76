// rha_scheduler: remaining-hop-aware queue selection for E2E-latency-constrained
// packets (ingress pipeline).
//
// For a constrained packet:
//   t   = Total Queue Time from its INT header (0 if it carries none yet)
//   T   = tau - t                         remaining E2E tolerable queuing delay
//   hh  = ceil(log2(h))                   h = remaining hops (h = 0 is taken as 1)
//   TT  = T >> hh                         per-hop share, about floor(T / h)
//   U_j = MathUnit_j * Q_j                queuing-delay upper bound of queue j, where
//                                         Q_j is the modified length from the ingress
//                                         register set and MathUnit_j = ceil(R/R_j*k)
// Then for count = 0 .. hh the budget TT << count is tried against the queues in
// order q1, q2, ... (ascending weight); the first queue with U_j <= budget is chosen.
// If no queue fits in any round, or the packet has already used more than tau
// (t > tau), it is dropped. The rounds are unrolled into one combinational search.
// Packets of other types pass through unchanged.
//
// The algorithm, the MathUnit definition and the loop bound follow the description.
// The inclusive bound (count <= hh, so hh+1 rounds, the last one at about T) and
// treating t > tau as an immediate drop are read from the algorithm listing; widths
// are this design's.
//
// Timing: one registered stage. out_round is the round (count) at which the queue
// was found, valid with out_valid for a constrained packet.
module rha_scheduler
  import rha_pkg::*;
#(
  parameter mu_vec_t MATH_UNITS = DEF_MATH_UNITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pkt_desc_t            in_desc,
  input  qlen_vec_t            in_qlen,     // ingress copy of the queue lengths of in_desc.eg_port
  output logic                 out_valid,
  output pkt_desc_t            out_desc,
  output logic                 out_drop,
  output logic [3:0]           out_round
);
  localparam int MAX_ROUNDS = HOP_W + 1;   // hh <= ceil(log2(255)) = 8
  localparam int UB_W       = MU_W + QLEN_W;

  logic [TIME_W-1:0] t_spent, t_rem, budget0;
  logic              expired;
  logic [3:0]        hh;
  logic [UB_W-1:0]   ub [NUM_QUEUES];
  logic              found;
  logic [QID_W-1:0]  sel;
  logic [3:0]        round;

  function automatic logic [3:0] clog2_hops(logic [HOP_W-1:0] h);
    logic [3:0] r;
    r = 4'd0;
    for (int b = 1; b <= HOP_W; b++)
      if (int'(h) > (1 << (b - 1))) r = 4'(b);
    return r;
  endfunction

  always_comb begin
    t_spent = in_desc.int_valid ? in_desc.inth.total_qtime : '0;
    expired = t_spent > in_desc.tau;
    t_rem   = in_desc.tau - t_spent;
    hh      = clog2_hops(in_desc.rem_hops);
    budget0 = t_rem >> hh;
    for (int j = 0; j < NUM_QUEUES; j++)
      ub[j] = UB_W'(MATH_UNITS[j]) * UB_W'(in_qlen[j]);

    found = 1'b0;
    sel   = '0;
    round = '0;
    for (int c = 0; c < MAX_ROUNDS; c++) begin
      if (!found && !expired && (c <= int'(hh))) begin
        for (int k = 0; k < NUM_QUEUES; k++) begin
          if (!found && (TIME_W'(ub[k]) <= (budget0 << c))) begin
            found = 1'b1;
            sel   = QID_W'(k);
            round = 4'(c);
          end
        end
      end
    end
  end

  logic is_c;
  assign is_c = (in_desc.ptype == PT_CONSTRAINED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_drop  <= 1'b0;
      out_round <= '0;
      out_desc  <= '0;
    end else begin
      out_valid <= in_valid && (!is_c || found);
      out_drop  <= in_valid && is_c && !found;
      if (in_valid) begin
        out_desc  <= in_desc;
        out_round <= round;
        if (is_c) out_desc.qid <= sel;
      end
    end
  end
endmodule
