// net_if: network interface of one tile.
//
// Joins the three message engines of the tile to its two routers (XY and YX
// dimension-order meshes) and to each other:
//
//   packetizer ----+--> steer --+--> local arbiter --> local queue --> sort -+
//   depacketizer2 -+            +--> XY arbiter  --> XY router               |
//   (responses)                 +--> YX arbiter  --> YX router               |
//   XY router --+                                                            |
//   YX router --+--> receive arbiter --> network queue --> sort --+          |
//                                                                 v          v
//                          depacketizer arbiter  <-- writes/responses of both sorts
//                          depacketizer2 arbiter <-- reads/CAS of both sorts
//
// A message addressed to this tile never enters a router: it is looped back
// through the local queue. Messages from the routers are parked in the
// network queue so the network drains even while depacketizer2 is blocked
// on a full network, which makes request/response deadlock less likely.
// Less likely is not impossible. Queues are first-in first-out, so a request
// at the head of a queue blocks the responses behind it. One cycle stays
// inside a single tile: depacketizer2 waits to loop a response back into a
// full local queue, and that queue holds only requests that wait for
// depacketizer2. Software avoids it by keeping fewer requests to its own tile
// in flight than the local queue holds (Q_DEPTH). The same kind of cycle
// through the routers needs the network queues of all tiles on a loop to be
// full of requests at once.
// Every merge point is a msg_arbiter configured by the tile configuration
// registers. All links use valid/ready with single-flit 99-bit messages.
// The structure follows the published network interface diagram; queue
// depth and the input numbering of each arbiter are this design's choices
// (input 0 of the depacketizer arbiters is the network side, input 0 of the
// transmit arbiters is the packetizer, input 0 of the receive arbiter is the
// XY router).
module net_if
  import wsp_pkg::*;
#(
  parameter int unsigned NCORE   = N_CORES,
  parameter int unsigned Q_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] tile_x,
  input  logic [COORD_W-1:0] tile_y,
  input  arb_cfg_t           arb_cfg [N_ARB],
  // packetizer AHB slave port
  input  logic               pk_hsel,
  input  ahb_req_t           pk_req,
  input  logic               pk_hready,
  output ahb_rsp_t           pk_rsp,
  // depacketizer and depacketizer2 AHB master ports
  output ahb_req_t           dp_req,
  input  ahb_rsp_t           dp_rsp,
  output ahb_req_t           d2_req,
  input  ahb_rsp_t           d2_rsp,
  // router local ports: [0] = XY network, [1] = YX network
  output logic               rt_out_valid [2],
  output pkt_t               rt_out_pkt   [2],
  input  logic               rt_out_ready [2],
  input  logic               rt_in_valid  [2],
  input  pkt_t               rt_in_pkt    [2],
  output logic               rt_in_ready  [2],
  // arbitration conflicts seen by each arbiter this cycle
  output logic [N_ARB-1:0]   arb_conflict
);

  // ---- sources of outgoing messages
  logic pk_valid, pk_ready;  pkt_t pk_pkt;
  logic d2o_valid, d2o_ready; pkt_t d2o_pkt;
  logic d2i_valid, d2i_ready; pkt_t d2i_pkt;
  logic dpi_valid, dpi_ready; pkt_t dpi_pkt;

  packetizer #(.NCORE(NCORE)) u_packetizer (
    .clk, .rst_n, .tile_x, .tile_y,
    .hsel(pk_hsel), .s_req(pk_req), .hready_in(pk_hready), .s_rsp(pk_rsp),
    .out_valid(pk_valid), .out_pkt(pk_pkt), .out_ready(pk_ready)
  );

  depacketizer u_depacketizer (
    .clk, .rst_n,
    .in_valid(dpi_valid), .in_pkt(dpi_pkt), .in_ready(dpi_ready),
    .m_req(dp_req), .m_rsp(dp_rsp)
  );

  depacketizer2 u_depacketizer2 (
    .clk, .rst_n,
    .in_valid(d2i_valid), .in_pkt(d2i_pkt), .in_ready(d2i_ready),
    .m_req(d2_req), .m_rsp(d2_rsp),
    .out_valid(d2o_valid), .out_pkt(d2o_pkt), .out_ready(d2o_ready)
  );

  // ---- steering: index 0 local, 1 XY, 2 YX
  logic pk_st_valid [3];
  pkt_t pk_st_pkt   [3];
  logic pk_st_ready [3];
  logic d2_st_valid [3];
  pkt_t d2_st_pkt   [3];
  logic d2_st_ready [3];

  msg_steer u_steer_pk (
    .tile_x, .tile_y,
    .in_valid(pk_valid), .in_pkt(pk_pkt), .in_ready(pk_ready),
    .out_valid(pk_st_valid), .out_pkt(pk_st_pkt), .out_ready(pk_st_ready)
  );

  msg_steer u_steer_d2 (
    .tile_x, .tile_y,
    .in_valid(d2o_valid), .in_pkt(d2o_pkt), .in_ready(d2o_ready),
    .out_valid(d2_st_valid), .out_pkt(d2_st_pkt), .out_ready(d2_st_ready)
  );

  // ---- transmit arbiters: local loopback (2), XY (3), YX (4)
  logic tx_valid [3];
  pkt_t tx_pkt   [3];
  logic tx_ready [3];

  for (genvar d = 0; d < 3; d++) begin : g_tx
    logic a_valid [2];
    pkt_t a_pkt   [2];
    logic a_ready [2];
    assign a_valid[0]     = pk_st_valid[d];
    assign a_valid[1]     = d2_st_valid[d];
    assign a_pkt[0]       = pk_st_pkt[d];
    assign a_pkt[1]       = d2_st_pkt[d];
    assign pk_st_ready[d] = a_ready[0];
    assign d2_st_ready[d] = a_ready[1];
    msg_arbiter u_arb (
      .clk, .rst_n, .cfg(arb_cfg[2+d]),
      .in_valid(a_valid), .in_pkt(a_pkt), .in_ready(a_ready),
      .out_valid(tx_valid[d]), .out_pkt(tx_pkt[d]), .out_ready(tx_ready[d]),
      .conflict(arb_conflict[2+d])
    );
  end

  assign rt_out_valid[0] = tx_valid[1];
  assign rt_out_pkt[0]   = tx_pkt[1];
  assign tx_ready[1]     = rt_out_ready[0];
  assign rt_out_valid[1] = tx_valid[2];
  assign rt_out_pkt[1]   = tx_pkt[2];
  assign tx_ready[2]     = rt_out_ready[1];

  // ---- receive side: network arbiter and the two queues
  logic rx_valid, rx_ready; pkt_t rx_pkt;

  msg_arbiter u_arb_rx (
    .clk, .rst_n, .cfg(arb_cfg[5]),
    .in_valid(rt_in_valid), .in_pkt(rt_in_pkt), .in_ready(rt_in_ready),
    .out_valid(rx_valid), .out_pkt(rx_pkt), .out_ready(rx_ready),
    .conflict(arb_conflict[5])
  );

  // [0] network queue, [1] local queue
  logic q_valid [2];
  pkt_t q_pkt   [2];
  logic q_ready [2];

  msg_queue #(.DEPTH(Q_DEPTH)) u_q_net (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_pkt(rx_pkt), .in_ready(rx_ready),
    .out_valid(q_valid[0]), .out_pkt(q_pkt[0]), .out_ready(q_ready[0]),
    .level()
  );

  msg_queue #(.DEPTH(Q_DEPTH)) u_q_loc (
    .clk, .rst_n,
    .in_valid(tx_valid[0]), .in_pkt(tx_pkt[0]), .in_ready(tx_ready[0]),
    .out_valid(q_valid[1]), .out_pkt(q_pkt[1]), .out_ready(q_ready[1]),
    .level()
  );

  // ---- sorts: [queue][0 depacketizer, 1 depacketizer2]
  logic so_valid [2][2];
  pkt_t so_pkt   [2][2];
  logic so_ready [2][2];

  for (genvar q = 0; q < 2; q++) begin : g_sort
    msg_sort u_sort (
      .in_valid(q_valid[q]), .in_pkt(q_pkt[q]), .in_ready(q_ready[q]),
      .out_valid(so_valid[q]), .out_pkt(so_pkt[q]), .out_ready(so_ready[q])
    );
  end

  // ---- depacketizer (0) and depacketizer2 (1) input arbiters
  for (genvar t = 0; t < 2; t++) begin : g_rx
    logic a_valid [2];
    pkt_t a_pkt   [2];
    logic a_ready [2];
    logic o_valid, o_ready;
    pkt_t o_pkt;
    assign a_valid[0]     = so_valid[0][t];
    assign a_valid[1]     = so_valid[1][t];
    assign a_pkt[0]       = so_pkt[0][t];
    assign a_pkt[1]       = so_pkt[1][t];
    assign so_ready[0][t] = a_ready[0];
    assign so_ready[1][t] = a_ready[1];
    msg_arbiter u_arb (
      .clk, .rst_n, .cfg(arb_cfg[t]),
      .in_valid(a_valid), .in_pkt(a_pkt), .in_ready(a_ready),
      .out_valid(o_valid), .out_pkt(o_pkt), .out_ready(o_ready),
      .conflict(arb_conflict[t])
    );
    if (t == 0) begin : g_dp
      assign dpi_valid = o_valid;
      assign dpi_pkt   = o_pkt;
      assign o_ready   = dpi_ready;
    end else begin : g_d2
      assign d2i_valid = o_valid;
      assign d2i_pkt   = o_pkt;
      assign o_ready   = d2i_ready;
    end
  end

endmodule
