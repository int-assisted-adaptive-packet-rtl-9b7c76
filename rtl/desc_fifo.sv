// desc_fifo: one FIFO queue of packet descriptors with their enqueue cycle.
//
// A DEPTH-entry circular buffer (memory array, written on push, read asynchronously
// at the head) with a packet count. push and pop may happen in the same cycle; the
// caller must not push when full or pop when empty. head_* show the oldest entry.
module desc_fifo
  import rha_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push,
  input  pkt_desc_t                 push_desc,
  input  logic [31:0]               push_ts,
  input  logic                      pop,
  output pkt_desc_t                 head_desc,
  output logic [31:0]               head_ts,
  output logic [$clog2(DEPTH):0]    count
);
  localparam int AW = $clog2(DEPTH);

  pkt_desc_t     mem [DEPTH];
  logic [31:0]   tsm [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (push) begin
      mem[wp] <= push_desc;
      tsm[wp] <= push_ts;
    end
  end

  assign head_desc = mem[rp];
  assign head_ts   = tsm[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // assertions are off while rst_n is low: the state is undefined before the first edge
  // (lint notes rst_n as both asynchronous reset and synchronous signal because of this
  // disable clause; it builds no logic)
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && !pop && count == (AW+1)'(DEPTH)))
    else $error("desc_fifo: push when full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && count == '0))
    else $error("desc_fifo: pop when empty");
endmodule
