// msg_queue: first-in first-out store for network messages.
//
// The tile keeps messages that arrive from the routers (and messages looped
// back inside the tile) in a queue so that the network is freed while the
// depacketizers are busy; this lowers the chance of request/response
// deadlock. Both sides use the valid/ready handshake. DEPTH entries of one
// packet each; a message written in one cycle can be read in the next. A
// full queue refuses new messages even while one leaves, so no
// combinational path runs from out_ready to in_ready. The depth is this
// design's choice.
module msg_queue
  import wsp_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pkt_t in_pkt,
  output logic in_ready,
  output logic out_valid,
  output pkt_t out_pkt,
  input  logic out_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pkt_t          mem [DEPTH];
  logic [AW-1:0] wr_q, rd_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic          push, pop;

  assign out_valid = (cnt_q != 0);
  assign out_pkt   = mem[rd_q];
  assign in_ready  = 32'(cnt_q) < DEPTH;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign level     = cnt_q;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= incr(wr_q);
      if (pop)  rd_q <= incr(rd_q);
      cnt_q <= cnt_q + $bits(cnt_q)'(push) - $bits(cnt_q)'(pop);
    end
  end

endmodule
