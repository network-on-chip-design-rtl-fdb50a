// wsp_pkg: types and constants shared by the tile network interface.
//
// The tiles of the waferscale processor exchange single-flit 99-bit messages
// over two mesh networks (XY and YX dimension-order routing). This package
// holds the message layout, the AHB bundle used on the tile bus, and the
// address map of the tile as seen by the cores.
//
// Message layout (bit 98 down to 0):
//   [98:96] size in bytes of the AHB access
//   [95:64] CAS data: compare value [95:80], swap value [79:64]
//   [63:32] packet data: write data / request bucket / read data / CAS result
//   [31]    network the message travels on (0 = XY, 1 = YX)
//   [30:29] message type
//   [28:10] memory address inside the destination tile (19 bits)
//   [9:5]   destination Y, [4:0] destination X
// The field order and widths follow the published message format. The type
// encoding, the split of the CAS word into compare/swap halves and the
// contents of the packet-data word of requests are this design's choices.
package wsp_pkg;

  localparam int unsigned COORD_W   = 5;
  localparam int unsigned MADDR_W   = 19;
  localparam int unsigned PKT_W     = 99;
  localparam int unsigned N_CORES   = 14;
  localparam int unsigned CORE_W    = 4;
  localparam int unsigned BUCKET_W  = 10;

  typedef enum logic [1:0] {
    MSG_WRITE = 2'b00,
    MSG_READ  = 2'b01,
    MSG_CAS   = 2'b10,
    MSG_RESP  = 2'b11
  } msg_type_e;

  typedef struct packed {
    logic [2:0]         size;
    logic [15:0]        cas_cmp;
    logic [15:0]        cas_swp;
    logic [31:0]        data;
    logic               ntwk;
    msg_type_e          mtype;
    logic [MADDR_W-1:0] maddr;
    logic [COORD_W-1:0] dest_y;
    logic [COORD_W-1:0] dest_x;
  } pkt_t;

  // Packet-data word of a read or CAS request (this design's layout):
  //   [25:21] source Y, [20:16] source X, [13:10] core, [9:0] bucket
  function automatic logic [31:0] req_data(input logic [COORD_W-1:0] sy,
                                           input logic [COORD_W-1:0] sx,
                                           input logic [CORE_W-1:0]  core,
                                           input logic [BUCKET_W-1:0] bucket);
    return {6'd0, sy, sx, 2'd0, core, bucket};
  endfunction

  // Address map of the tile (Tables of the remote-write, bookkeeping and
  // packetizer register ranges). Shared memory and bookkeeping memory live in
  // the Cortex-M3 SRAM region.
  localparam logic [31:0] SHARED_BASE = 32'h2000_0000;  // 4 x 128kB
  localparam logic [31:0] BOOK_BASE   = 32'h2008_0000;  // 128kB
  localparam logic [31:0] PKTZ_BASE   = 32'h6000_0000;  // 512B of registers
  localparam logic [31:0] CFG_BASE    = 32'h4000_0000;  // configuration registers

  // Bookkeeping byte address of the data word (flag=0) or valid flag (flag=1)
  // of a bucket: {12'h200, 3'b100, core, bucket, flag, 2'b00}.
  function automatic logic [31:0] book_addr(input logic [CORE_W-1:0] core,
                                            input logic [BUCKET_W-1:0] bucket,
                                            input logic flag);
    return {12'h200, 3'b100, core, bucket, flag, 2'b00};
  endfunction

  // AHB-Lite bundle. hwdata belongs to the data phase, the rest to the
  // address phase, as in AMBA AHB.
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;

  typedef struct packed {
    logic [31:0] haddr;
    logic [1:0]  htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic        hmastlock;
    logic [31:0] hwdata;
  } ahb_req_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;   // HREADYOUT of a slave, HREADY seen by a master
    logic        hresp;
  } ahb_rsp_t;

  // Arbiter configuration: mode, preferred input, relaxed-priority count.
  typedef enum logic [1:0] {
    ARB_ALTERNATE = 2'b00,
    ARB_STRICT    = 2'b01,
    ARB_RELAXED   = 2'b10
  } arb_mode_e;

  typedef struct packed {
    arb_mode_e  mode;
    logic       pref;    // input that wins in strict/relaxed mode
    logic [7:0] count;   // relaxed mode: wins of pref before one yield
  } arb_cfg_t;

  localparam int unsigned N_ARB = 6;

endpackage
