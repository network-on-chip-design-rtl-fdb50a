// wsp_tile: one tile of the chiplet-based waferscale processor.
//
// A tile is a routing node of two 2-D meshes (X-then-Y and Y-then-X
// dimension-order routing). It holds 14 cores, each with a 64kB private
// memory, four 128kB shared banks that together form this tile's 512kB slice
// of the wafer-wide shared memory, a 128kB bookkeeping bank where answers to
// remote reads and CAS land, the tile configuration registers and the
// network interface (packetizer, depacketizer, depacketizer2, arbiters,
// queues). Everything on the tile meets on an AHB bus matrix with 16 masters
// (14 cores, depacketizer, depacketizer2) and 7 slaves.
//
// The cores, the bus matrix and the routers are existing IP and are not part
// of this RTL: their connections are ports of this module.
//   * Bus slave ports s_* (index): 0..3 shared banks (0x2000_0000 +
//     128kB*i), 4 bookkeeping bank (0x2008_0000), 5 configuration registers
//     (0x4000_0000), 6 packetizer (0x6000_0000 registers and 0x8000_0000-
//     0xBFFF_FFFF remote writes). The bus matrix decodes and drives them.
//   * Bus master ports m_*: 0 depacketizer, 1 depacketizer2.
//   * Private memory ports p_* (one per core), driven by the cores directly.
//   * Router local ports rt_*: 0 XY router, 1 YX router, 99-bit messages with
//     valid/ready.
// tile_x/tile_y give the tile's mesh coordinates (5 bits each, up to 32x32
// tiles). Timing: every port is synchronous to clk; rst_n is asynchronous,
// active low. Sizes are the published ones; the address of the
// configuration registers is this design's choice.
module wsp_tile
  import wsp_pkg::*;
#(
  parameter int unsigned NCORE        = N_CORES,
  parameter int unsigned SHARED_BYTES = 131072,
  parameter int unsigned BOOK_BYTES   = 131072,
  parameter int unsigned PRIV_BYTES   = 65536,
  parameter int unsigned Q_DEPTH      = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] tile_x,
  input  logic [COORD_W-1:0] tile_y,
  // bus matrix slave side
  input  logic               s_hsel   [7],
  input  ahb_req_t           s_req    [7],
  input  logic               s_hready [7],
  output ahb_rsp_t           s_rsp    [7],
  // bus matrix master side
  output ahb_req_t           m_req    [2],
  input  ahb_rsp_t           m_rsp    [2],
  // private memories, one per core
  input  logic               p_hsel   [NCORE],
  input  ahb_req_t           p_req    [NCORE],
  input  logic               p_hready [NCORE],
  output ahb_rsp_t           p_rsp    [NCORE],
  // router local ports
  output logic               rt_out_valid [2],
  output pkt_t               rt_out_pkt   [2],
  input  logic               rt_out_ready [2],
  input  logic               rt_in_valid  [2],
  input  pkt_t               rt_in_pkt    [2],
  output logic               rt_in_ready  [2],
  output logic [N_ARB-1:0]   arb_conflict
);

  arb_cfg_t arb_cfg [N_ARB];

  for (genvar b = 0; b < 4; b++) begin : g_shared
    ahb_sram #(.BYTES(SHARED_BYTES)) u_bank (
      .clk, .rst_n, .hsel(s_hsel[b]), .s_req(s_req[b]), .hready_in(s_hready[b]),
      .s_rsp(s_rsp[b])
    );
  end

  ahb_sram #(.BYTES(BOOK_BYTES)) u_book (
    .clk, .rst_n, .hsel(s_hsel[4]), .s_req(s_req[4]), .hready_in(s_hready[4]),
    .s_rsp(s_rsp[4])
  );

  config_regs u_cfg (
    .clk, .rst_n, .hsel(s_hsel[5]), .s_req(s_req[5]), .hready_in(s_hready[5]),
    .s_rsp(s_rsp[5]), .arb_cfg
  );

  for (genvar c = 0; c < int'(NCORE); c++) begin : g_priv
    ahb_sram #(.BYTES(PRIV_BYTES)) u_priv (
      .clk, .rst_n, .hsel(p_hsel[c]), .s_req(p_req[c]), .hready_in(p_hready[c]),
      .s_rsp(p_rsp[c])
    );
  end

  net_if #(.NCORE(NCORE), .Q_DEPTH(Q_DEPTH)) u_net_if (
    .clk, .rst_n, .tile_x, .tile_y, .arb_cfg,
    .pk_hsel(s_hsel[6]), .pk_req(s_req[6]), .pk_hready(s_hready[6]), .pk_rsp(s_rsp[6]),
    .dp_req(m_req[0]), .dp_rsp(m_rsp[0]),
    .d2_req(m_req[1]), .d2_rsp(m_rsp[1]),
    .rt_out_valid, .rt_out_pkt, .rt_out_ready,
    .rt_in_valid, .rt_in_pkt, .rt_in_ready,
    .arb_conflict
  );

endmodule
