// wrr_port: the queues of one egress port and their weighted round-robin scheduler.
//
// NQ FIFO queues (desc_fifo) hold packet descriptors with their enqueue cycle. Each
// queue also keeps its length in cells; a packet is tail-dropped when its queue has
// no descriptor slot left or would exceed QCAP_CELLS cells.
//
// The port sends one cell per cycle, so after a packet of L cells starts it stays busy
// for L cycles. When idle with a packet waiting it raises req; the packet leaves in
// the cycle grant is given (the traffic manager arbitrates between ports for the
// single egress pipeline). The WRR scheduler stays on its current queue for up to
// WEIGHTS[q] packets per visit, then moves to the next non-empty queue in cyclic
// order; an empty queue is skipped at once, so the scheduler is work-conserving and
// queue q gets at least WEIGHTS[q] / sum(WEIGHTS) of the packets when all are busy.
//
// With the departing packet the port gives its queue time (cycles in the queue times
// NS_PER_CYCLE, saturating at 32 bits) and the cells left in its queue.
//
// The description gives WRR over FIFO queues and the rate bound of Eq. (1); packet
// (not byte) weights, the cell-per-cycle port and the buffer limits are this
// design's choices.
module wrr_port
  import rha_pkg::*;
#(
  parameter int unsigned               NQ           = NUM_QUEUES,
  parameter logic [NQ-1:0][W_W-1:0]    WEIGHTS      = DEF_WEIGHTS,
  parameter int unsigned               DEPTH        = 1024,
  parameter int unsigned               QCAP_CELLS   = 2048,
  parameter int unsigned               NS_PER_CYCLE = K_NS_PER_CELL
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [31:0]            now,
  input  logic                   enq_valid,
  input  logic [QID_W-1:0]       enq_qid,
  input  pkt_desc_t              enq_desc,
  output logic                   enq_drop,
  output logic                   req,
  input  logic                   grant,
  output pkt_desc_t              deq_desc,
  output logic [QTIME_W-1:0]     deq_qtime,
  output logic [QLEN_W-1:0]      deq_qdepth,
  output logic [NQ-1:0][QLEN_W-1:0] qlen_cells
);
  localparam int AW = $clog2(DEPTH);
  localparam int SW = (NQ > 1) ? $clog2(NQ) : 1;

  pkt_desc_t       head [NQ];
  logic [31:0]     hts  [NQ];
  logic [AW:0]     cnt  [NQ];
  logic [QLEN_W:0] cells [NQ];
  logic [NQ-1:0]   nonempty;

  logic [SW-1:0]   cur, sel;
  logic [W_W-1:0]  credit;
  logic [LEN_W-1:0] busy;

  // enqueue acceptance
  logic            enq_ok;
  logic [SW-1:0]   eq;
  logic [LEN_W-1:0] in_len;
  assign eq     = (int'(enq_qid) < int'(NQ)) ? SW'(enq_qid) : '0;
  assign in_len = (enq_desc.len_cells == '0) ? LEN_W'(1) : enq_desc.len_cells;
  assign enq_ok = enq_valid && (cnt[eq] < (AW+1)'(DEPTH))
                  && ((cells[eq] + (QLEN_W+1)'(in_len)) <= (QLEN_W+1)'(QCAP_CELLS));
  assign enq_drop = enq_valid && !enq_ok;

  always_comb begin
    for (int q = 0; q < int'(NQ); q++) begin
      nonempty[q]   = (cnt[q] != '0);
      qlen_cells[q] = cells[q][QLEN_W] ? '1 : cells[q][QLEN_W-1:0];
    end
  end

  // WRR selection
  logic stay;
  always_comb begin
    stay = nonempty[cur] && (credit != '0);
    sel  = cur;
    if (!stay) begin
      for (int i = int'(NQ); i >= 1; i--) begin
        if (nonempty[(int'(cur) + i) % int'(NQ)]) sel = SW'((int'(cur) + i) % int'(NQ));
      end
    end
  end

  assign req = (busy == '0) && (nonempty != '0);
  logic deq;
  assign deq = req && grant;

  logic [LEN_W-1:0] out_len;
  logic [39:0]      wait_ns;
  always_comb begin
    deq_desc   = head[sel];
    out_len    = (deq_desc.len_cells == '0) ? LEN_W'(1) : deq_desc.len_cells;
    wait_ns    = 40'(now - hts[sel]) * 40'(NS_PER_CYCLE);
    deq_qtime  = (wait_ns > 40'({QTIME_W{1'b1}})) ? '1 : wait_ns[QTIME_W-1:0];
    deq_qdepth = QLEN_W'(cells[sel] - (QLEN_W+1)'(out_len));
  end

  for (genvar q = 0; q < int'(NQ); q++) begin : g_q
    desc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push     (enq_ok && (int'(eq) == q)),
      .push_desc(enq_desc),
      .push_ts  (now),
      .pop      (deq && (int'(sel) == q)),
      .head_desc(head[q]),
      .head_ts  (hts[q]),
      .count    (cnt[q])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < int'(NQ); q++) begin
        cells[q] <= '0;
      end
      cur    <= '0;
      credit <= '0;
      busy   <= '0;
    end else begin
      for (int q = 0; q < int'(NQ); q++) begin
        logic inc, dec;
        inc = enq_ok && (int'(eq) == q);
        dec = deq && (int'(sel) == q);
        cells[q] <= cells[q] + (inc ? (QLEN_W+1)'(in_len) : '0)
                             - (dec ? (QLEN_W+1)'(out_len) : '0);
      end
      if (deq) begin
        busy <= out_len - LEN_W'(1);
        if (stay) begin
          credit <= credit - W_W'(1);
        end else begin
          cur    <= sel;
          credit <= WEIGHTS[sel] - W_W'(1);
        end
      end else if (busy != '0) begin
        busy <= busy - LEN_W'(1);
      end
    end
  end
endmodule
