// mesh_model: an NX x NY array of tiles for system-level tests.
//
// Not design IP: a simulation harness. Every tile is a wsp_tile at its
// default sizes, with a behavioural AHB bus matrix (its 14 core masters are
// the core_req/core_rsp ports of this model) and two behavioural
// dimension-order routers, one X-then-Y and one Y-then-X. Tile t sits at
// x = t % NX, y = t / NX. Router ports: 0 local, 1 +X, 2 -X, 3 +Y, 4 -Y;
// edge ports are tied off. 'stall' lets a test make a tile's routers refuse
// messages from the tile.
module mesh_model
  import wsp_pkg::*;
#(
  parameter int NX = 2,
  parameter int NY = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t core_req [NX*NY][N_CORES],
  output ahb_rsp_t core_rsp [NX*NY][N_CORES],
  input  logic     stall    [NX*NY][2]
);

  localparam int NT = NX * NY;
  localparam int NC = N_CORES;
  localparam int NM = NC + 2;

  // router links, index [tile*2 + network][port]
  logic r_iv [2*NT][5];
  pkt_t r_ip [2*NT][5];
  logic r_ir [2*NT][5];
  logic r_ov [2*NT][5];
  pkt_t r_op [2*NT][5];
  logic r_or [2*NT][5];

  for (genvar t = 0; t < NT; t++) begin : g_t
    localparam int TX = t % NX;
    localparam int TY = t / NX;
    ahb_req_t mm_req [NM];
    ahb_rsp_t mm_rsp [NM];
    logic     s_hsel [7];
    ahb_req_t s_req  [7];
    logic     s_hready [7];
    ahb_rsp_t s_rsp  [7];
    ahb_req_t m_req  [2];
    ahb_rsp_t m_rsp  [2];
    logic     p_hsel [NC];
    ahb_req_t p_req  [NC];
    logic     p_hready [NC];
    ahb_rsp_t p_rsp  [NC];
    logic     ov [2];
    pkt_t     op [2];
    logic     orr [2];
    logic     iv [2];
    pkt_t     ip [2];
    logic     ir [2];
    logic [N_ARB-1:0] conf;
    int       n_xfer, n_lk;

    for (genvar c = 0; c < NC; c++) begin : g_c
      assign mm_req[c]     = core_req[t][c];
      assign core_rsp[t][c] = mm_rsp[c];
      assign p_hsel[c]     = 1'b0;
      assign p_req[c]      = '0;
      assign p_hready[c]   = 1'b1;
    end
    assign mm_req[NC]   = m_req[0];
    assign mm_req[NC+1] = m_req[1];
    assign m_rsp[0]     = mm_rsp[NC];
    assign m_rsp[1]     = mm_rsp[NC+1];

    ahb_matrix_model #(.NM(NM), .NS(7)) u_mx (
      .clk, .rst_n, .m_req(mm_req), .m_rsp(mm_rsp),
      .s_hsel, .s_req, .s_hready, .s_rsp, .n_xfer, .n_locked(n_lk)
    );

    wsp_tile u_tile (
      .clk, .rst_n, .tile_x(5'(TX)), .tile_y(5'(TY)),
      .s_hsel, .s_req, .s_hready, .s_rsp,
      .m_req, .m_rsp,
      .p_hsel, .p_req, .p_hready, .p_rsp,
      .rt_out_valid(ov), .rt_out_pkt(op), .rt_out_ready(orr),
      .rt_in_valid(iv), .rt_in_pkt(ip), .rt_in_ready(ir),
      .arb_conflict(conf)
    );

    for (genvar n = 0; n < 2; n++) begin : g_n
      localparam int K = 2*t + n;
      assign r_iv[K][0] = ov[n];
      assign r_ip[K][0] = op[n];
      assign orr[n]     = r_ir[K][0];
      assign iv[n]      = r_ov[K][0];
      assign ip[n]      = r_op[K][0];
      assign r_or[K][0] = ir[n];
      // each router drives its own inputs and the ready of its own outputs
      if (TX < NX - 1) begin : g_e
        localparam int E = 2*(t+1) + n;
        assign r_iv[K][1] = r_ov[E][2];
        assign r_ip[K][1] = r_op[E][2];
        assign r_or[K][1] = r_ir[E][2];
      end else begin : g_ee
        assign r_iv[K][1] = 1'b0;
        assign r_ip[K][1] = '0;
        assign r_or[K][1] = 1'b0;
      end
      if (TX > 0) begin : g_w
        localparam int W = 2*(t-1) + n;
        assign r_iv[K][2] = r_ov[W][1];
        assign r_ip[K][2] = r_op[W][1];
        assign r_or[K][2] = r_ir[W][1];
      end else begin : g_we
        assign r_iv[K][2] = 1'b0;
        assign r_ip[K][2] = '0;
        assign r_or[K][2] = 1'b0;
      end
      if (TY < NY - 1) begin : g_n
        localparam int N = 2*(t+NX) + n;
        assign r_iv[K][3] = r_ov[N][4];
        assign r_ip[K][3] = r_op[N][4];
        assign r_or[K][3] = r_ir[N][4];
      end else begin : g_ne
        assign r_iv[K][3] = 1'b0;
        assign r_ip[K][3] = '0;
        assign r_or[K][3] = 1'b0;
      end
      if (TY > 0) begin : g_s
        localparam int S = 2*(t-NX) + n;
        assign r_iv[K][4] = r_ov[S][3];
        assign r_ip[K][4] = r_op[S][3];
        assign r_or[K][4] = r_ir[S][3];
      end else begin : g_se
        assign r_iv[K][4] = 1'b0;
        assign r_ip[K][4] = '0;
        assign r_or[K][4] = 1'b0;
      end
      dor_router_model #(.YX(n == 1)) u_rt (
        .clk, .rst_n, .my_x(5'(TX)), .my_y(5'(TY)), .stall(stall[t][n]),
        .in_valid(r_iv[K]), .in_pkt(r_ip[K]), .in_ready(r_ir[K]),
        .out_valid(r_ov[K]), .out_pkt(r_op[K]), .out_ready(r_or[K])
      );
    end
  end

endmodule
