// msg_steer: chooses where a message generated on the tile goes.
//
// A message whose destination is this tile is looped back inside the tile
// (output LOCAL) instead of entering a router. Any other message goes to the
// router of the network named by its network bit: XY for 0, YX for 1.
// Combinational; the selected output's ready is returned to the source.
module msg_steer
  import wsp_pkg::*;
(
  input  logic [COORD_W-1:0] tile_x,
  input  logic [COORD_W-1:0] tile_y,
  input  logic in_valid,
  input  pkt_t in_pkt,
  output logic in_ready,
  // index 0 = local loopback, 1 = XY router, 2 = YX router
  output logic out_valid [3],
  output pkt_t out_pkt   [3],
  input  logic out_ready [3]
);

  logic [1:0] dst;

  always_comb begin
    if (in_pkt.dest_x == tile_x && in_pkt.dest_y == tile_y) dst = 2'd0;
    else if (in_pkt.ntwk)                                   dst = 2'd2;
    else                                                    dst = 2'd1;
  end

  for (genvar i = 0; i < 3; i++) begin : g_out
    assign out_valid[i] = in_valid && (dst == 2'(i));
    assign out_pkt[i]   = in_pkt;
  end
  assign in_ready = out_ready[dst];

endmodule
