// tb_wsp_tile: end-to-end test of the tile on a 2x2 mesh.
//
// Four wsp_tile instances at their default sizes (14 cores, 4 x 128kB shared,
// 128kB bookkeeping, 14 x 64kB private memory per tile) are joined by two
// behavioural meshes, one X-then-Y and one Y-then-X, and each tile's bus
// ports meet a behavioural AHB bus matrix. The testbench plays the cores: it
// issues AHB transfers on the core master ports.
//
// What it checks, against values computed here:
//   * remote writes over XY and YX, word, halfword and byte, and a write to
//     the issuing tile itself (looped back, never entering a router);
//   * remote reads and CAS (success and failure, both halves of a word) with
//     the answer arriving in the issuer's bookkeeping bucket;
//   * CAS really swaps memory on success and leaves it alone on failure;
//   * configuration-register readback and arbitration modes;
//   * private memory of a core;
//   * a stress phase where 16 cores on 4 tiles issue reads, CAS and writes to
//     random tiles while the routers randomly refuse messages from the tiles.
// It counts how often each mechanism happened (loopback, traffic on each
// network, arbiter conflicts, queueing, depacketizer2 waiting for a router,
// packetizer stalls, locked bus transfers, CAS success and failure) and
// counts a failure for any that never happened.
module tb_wsp_tile;
  import wsp_pkg::*;

  localparam int NT  = 4;          // tile t sits at x = t % 2, y = t / 2
  localparam int NC  = N_CORES;
  localparam int NM  = NC + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  ahb_req_t creq [NT][NC];
  ahb_rsp_t crsp [NT][NC];
  ahb_req_t preq [NT][NC];
  ahb_rsp_t prsp [NT][NC];
  logic     psel [NT][NC];
  logic     stall [NT][2];

  // router links, index [tile*2 + network][port]
  logic r_iv [2*NT][5];
  pkt_t r_ip [2*NT][5];
  logic r_ir [2*NT][5];
  logic r_ov [2*NT][5];
  pkt_t r_op [2*NT][5];
  logic r_or [2*NT][5];

  // mechanism counters
  int n_loop, n_xy, n_yx, n_conf, n_queue, n_rwait, n_pkstall, n_pkpend, n_locked;
  int n_cas_ok, n_cas_fail, n_resp;

  for (genvar t = 0; t < NT; t++) begin : g_t
    localparam int TX = t % 2;
    localparam int TY = t / 2;
    ahb_req_t mm_req [NM];
    ahb_rsp_t mm_rsp [NM];
    logic     s_hsel [7];
    ahb_req_t s_req  [7];
    logic     s_hready [7];
    ahb_rsp_t s_rsp  [7];
    ahb_req_t m_req  [2];
    ahb_rsp_t m_rsp  [2];
    logic     p_hready [NC];
    logic     ov [2];
    pkt_t     op [2];
    logic     orr [2];
    logic     iv [2];
    pkt_t     ip [2];
    logic     ir [2];
    logic [N_ARB-1:0] conf;
    int       n_xfer, n_lk;

    for (genvar c = 0; c < NC; c++) begin : g_c
      assign mm_req[c]   = creq[t][c];
      assign crsp[t][c]  = mm_rsp[c];
      assign p_hready[c] = 1'b1;
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
      .p_hsel(psel[t]), .p_req(preq[t]), .p_hready, .p_rsp(prsp[t]),
      .rt_out_valid(ov), .rt_out_pkt(op), .rt_out_ready(orr),
      .rt_in_valid(iv), .rt_in_pkt(ip), .rt_in_ready(ir),
      .arb_conflict(conf)
    );

    for (genvar n = 0; n < 2; n++) begin : g_n
      localparam int K = 2*t + n;
      // local port
      assign r_iv[K][0] = ov[n];
      assign r_ip[K][0] = op[n];
      assign orr[n]     = r_ir[K][0];
      assign iv[n]      = r_ov[K][0];
      assign ip[n]      = r_op[K][0];
      assign r_or[K][0] = ir[n];
      // +X (1) <-> -X (2) of the east neighbour
      if (TX == 0) begin : g_e
        localparam int E = 2*(t+1) + n;
        assign r_iv[K][1] = r_ov[E][2];
        assign r_ip[K][1] = r_op[E][2];
        assign r_or[E][2] = r_ir[K][1];
        assign r_iv[E][2] = r_ov[K][1];
        assign r_ip[E][2] = r_op[K][1];
        assign r_or[K][1] = r_ir[E][2];
        assign r_iv[K][2] = 1'b0;
        assign r_ip[K][2] = '0;
        assign r_or[K][2] = 1'b0;
      end else begin : g_w
        assign r_iv[K][1] = 1'b0;
        assign r_ip[K][1] = '0;
        assign r_or[K][1] = 1'b0;
      end
      // +Y (3) <-> -Y (4) of the north neighbour
      if (TY == 0) begin : g_nn
        localparam int N = 2*(t+2) + n;
        assign r_iv[K][3] = r_ov[N][4];
        assign r_ip[K][3] = r_op[N][4];
        assign r_or[N][4] = r_ir[K][3];
        assign r_iv[N][4] = r_ov[K][3];
        assign r_ip[N][4] = r_op[K][3];
        assign r_or[K][3] = r_ir[N][4];
        assign r_iv[K][4] = 1'b0;
        assign r_ip[K][4] = '0;
        assign r_or[K][4] = 1'b0;
      end else begin : g_s
        assign r_iv[K][3] = 1'b0;
        assign r_ip[K][3] = '0;
        assign r_or[K][3] = 1'b0;
      end
      dor_router_model #(.YX(n == 1)) u_rt (
        .clk, .rst_n, .my_x(5'(TX)), .my_y(5'(TY)), .stall(stall[t][n]),
        .in_valid(r_iv[K]), .in_pkt(r_ip[K]), .in_ready(r_ir[K]),
        .out_valid(r_ov[K]), .out_pkt(r_op[K]), .out_ready(r_or[K])
      );
    end
  end

  // ---- mechanism counters, sampled on every clock
  always @(posedge clk) if (rst_n) begin
    n_locked = g_t[0].n_lk + g_t[1].n_lk + g_t[2].n_lk + g_t[3].n_lk;
  end

  for (genvar t = 0; t < NT; t++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (g_t[t].u_tile.u_net_if.tx_valid[0] && g_t[t].u_tile.u_net_if.tx_ready[0]) n_loop++;
      if (g_t[t].ov[0] && g_t[t].orr[0]) n_xy++;
      if (g_t[t].ov[1] && g_t[t].orr[1]) n_yx++;
      if (g_t[t].conf != '0) n_conf++;
      if (g_t[t].u_tile.u_net_if.u_q_net.cnt_q >= 2 ||
          g_t[t].u_tile.u_net_if.u_q_loc.cnt_q >= 2) n_queue++;
      if (g_t[t].u_tile.u_net_if.u_depacketizer2.state_q == 3'd7) n_rwait++;
      if (g_t[t].u_tile.u_net_if.u_packetizer.state_q == 2'd1 &&
          !g_t[t].u_tile.u_net_if.u_packetizer.out_ready) n_pkstall++;
      if (g_t[t].u_tile.u_net_if.u_packetizer.state_q == 2'd3 &&
          g_t[t].u_tile.u_net_if.u_packetizer.dp_pend_q) n_pkpend++;
    end
  end

  // ---- helpers
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic wait_ready(input int t, input int c);
    #1;
    while (!crsp[t][c].hready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
  endtask

  task automatic bus_wr(input int t, input int c, input logic [31:0] a, input logic [31:0] d,
                        input logic [2:0] sz = 3'd2);
    @(negedge clk);
    creq[t][c].haddr  = a;
    creq[t][c].htrans = HTRANS_NONSEQ;
    creq[t][c].hwrite = 1'b1;
    creq[t][c].hsize  = sz;
    wait_ready(t, c);
    @(negedge clk);
    creq[t][c].htrans = HTRANS_IDLE;
    creq[t][c].hwdata = d;
    wait_ready(t, c);
  endtask

  task automatic bus_rd(input int t, input int c, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    creq[t][c].haddr  = a;
    creq[t][c].htrans = HTRANS_NONSEQ;
    creq[t][c].hwrite = 1'b0;
    creq[t][c].hsize  = 3'd2;
    wait_ready(t, c);
    @(negedge clk);
    creq[t][c].htrans = HTRANS_IDLE;
    #1;
    while (!crsp[t][c].hready) begin
      @(negedge clk);
      #1;
    end
    d = crsp[t][c].hrdata;
    @(posedge clk);
  endtask

  function automatic logic [31:0] wr_addr(input logic net, input int dt, input logic [18:0] ma);
    return {2'b10, net, 5'(dt % 2), 5'(dt / 2), ma};
  endfunction

  function automatic logic [31:0] pat(input int t, input int k);
    return 32'hA000_0000 | (t << 20) | (k * 32'h0001_0003);
  endfunction

  // issue a read (cas=0) or CAS (cas=1) from core c of tile t
  task automatic issue(input int t, input int c, input logic cas, input logic net, input int dt,
                       input logic [18:0] ma, input int bucket, input logic [31:0] cmpswp);
    if (cas) bus_wr(t, c, PKTZ_BASE | 32'(c << 2), cmpswp);
    bus_wr(t, c, PKTZ_BASE | 32'h040 | 32'(c << 2),
           {1'b0, cas, net, 5'(dt % 2), 5'(dt / 2), ma});
    bus_wr(t, c, PKTZ_BASE | 32'h180 | 32'(c << 2), 32'(bucket));
  endtask

  // wait for a bucket's valid flag, return its data and clear the flag
  task automatic collect(input int t, input int c, input int bucket, output logic [31:0] d);
    logic [31:0] f;
    int n;
    n = 0;
    f = 0;
    while (f != 32'd1 && n < 2000) begin
      bus_rd(t, c, book_addr(4'(c), 10'(bucket), 1'b1), f);
      n++;
    end
    check("bucket flag", f, 32'd1);
    bus_rd(t, c, book_addr(4'(c), 10'(bucket), 1'b0), d);
    bus_wr(t, c, book_addr(4'(c), 10'(bucket), 1'b1), 32'd0);
    n_resp++;
  endtask

  // poll a local shared-memory word until it matches
  task automatic expect_mem(input int t, input int c, input logic [18:0] ma, input logic [31:0] e,
                            input string what);
    logic [31:0] d;
    int n;
    n = 0;
    d = ~e;
    while (d != e && n < 500) begin
      bus_rd(t, c, SHARED_BASE | 32'(ma), d);
      n++;
    end
    check(what, d, e);
  endtask

  // ---- stimulus
  typedef struct {
    int          t;
    logic [18:0] a;
    logic [31:0] d;
  } wr_t;
  wr_t exp_q [$];
  int  n_done = 0;

  logic stress_on = 1'b0;
  always @(negedge clk) begin
    for (int t = 0; t < NT; t++)
      for (int n = 0; n < 2; n++)
        stall[t][n] <= stress_on && ($urandom_range(0, 99) < 40);
  end

  initial begin : main
    logic [31:0] d;
    for (int t = 0; t < NT; t++)
      for (int c = 0; c < NC; c++) begin
        creq[t][c] = '0;
        preq[t][c] = '0;
        psel[t][c] = 1'b0;
      end
    {n_loop, n_xy, n_yx, n_conf, n_queue, n_rwait, n_pkstall, n_pkpend} = '0;
    {n_cas_ok, n_cas_fail, n_resp, n_locked} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // initialise a pattern in every tile's shared memory and clear buckets
    for (int t = 0; t < NT; t++) begin
      for (int k = 0; k < 16; k++) bus_wr(t, 0, SHARED_BASE | 32'h400 | 32'(k * 4), pat(t, k));
      for (int c = 0; c < 4; c++)
        for (int b = 0; b < 8; b++) bus_wr(t, c, book_addr(4'(c), 10'(b), 1'b1), 32'd0);
    end
    for (int c = 0; c < 4; c++) bus_wr(1, c, book_addr(4'(c), 10'(0), 1'b1), 32'd0);

    // ---- remote writes
    bus_wr(0, 1, wr_addr(1'b0, 3, 19'h100), 32'h1111_2222);            // XY
    bus_wr(0, 1, wr_addr(1'b1, 3, 19'h104), 32'h3333_4444);            // YX
    bus_wr(0, 1, wr_addr(1'b0, 3, 19'h108), 32'h5566_7788);            // word first
    bus_wr(0, 1, wr_addr(1'b0, 3, 19'h10A), 32'hABCD_0000, 3'd1);      // upper half
    bus_wr(0, 1, wr_addr(1'b1, 3, 19'h108), 32'h0000_00EE, 3'd0);      // byte 0
    bus_wr(0, 1, wr_addr(1'b0, 0, 19'h10C), 32'h7777_8888);            // loopback
    expect_mem(3, 2, 19'h100, 32'h1111_2222, "remote write XY");
    expect_mem(3, 2, 19'h104, 32'h3333_4444, "remote write YX");
    expect_mem(3, 2, 19'h108, 32'hABCD_77EE, "remote halfword+byte write");
    expect_mem(0, 2, 19'h10C, 32'h7777_8888, "loopback write");

    // ---- remote reads
    issue(0, 3, 1'b0, 1'b0, 1, 19'h408, 5, 0);
    collect(0, 3, 5, d);
    check("remote read XY", d, pat(1, 2));
    issue(2, 4, 1'b0, 1'b1, 1, 19'h40C, 7, 0);
    collect(2, 4, 7, d);
    check("remote read YX", d, pat(1, 3));
    issue(1, 0, 1'b0, 1'b0, 1, 19'h400, 0, 0);
    collect(1, 0, 0, d);
    check("loopback read", d, pat(1, 0));

    // ---- CAS on tile 0, word 0x410 (pattern k = 4)
    begin
      logic [31:0] w;
      w = pat(0, 4);
      issue(3, 5, 1'b1, 1'b1, 0, 19'h410, 3, {w[15:0], 16'hBEEF});
      collect(3, 5, 3, d);
      check("CAS success flag", d, 32'd1);
      n_cas_ok++;
      expect_mem(0, 6, 19'h410, {w[31:16], 16'hBEEF}, "CAS swapped low half");
      issue(3, 5, 1'b1, 1'b0, 0, 19'h412, 4, {~w[31:16], 16'h1234});
      collect(3, 5, 4, d);
      check("CAS failure flag", d, 32'd0);
      n_cas_fail++;
      issue(3, 5, 1'b1, 1'b0, 0, 19'h412, 4, {w[31:16], 16'h5678});
      collect(3, 5, 4, d);
      check("CAS upper-half success", d, 32'd1);
      n_cas_ok++;
      expect_mem(0, 6, 19'h410, 32'h5678_BEEF, "CAS swapped upper half");
    end

    // ---- configuration registers: relaxed and strict arbitration
    bus_wr(0, 7, CFG_BASE | 32'h14, 32'h0000_0306);   // receive arbiter: relaxed, pref 1, count 3
    bus_rd(0, 7, CFG_BASE | 32'h14, d);
    check("config readback", d, 32'h0000_0306);
    bus_wr(1, 7, CFG_BASE | 32'h0C, 32'h0000_0005);   // XY transmit arbiter: strict, pref 1
    bus_rd(1, 7, CFG_BASE | 32'h0C, d);
    check("config readback strict", d, 32'h0000_0005);

    // ---- private memory of core 9 on tile 2
    @(negedge clk);
    psel[2][9]        = 1'b1;
    preq[2][9].haddr  = 32'h0000_1234 & ~32'h3;
    preq[2][9].htrans = HTRANS_NONSEQ;
    preq[2][9].hwrite = 1'b1;
    preq[2][9].hsize  = 3'd2;
    @(negedge clk);
    preq[2][9].hwrite = 1'b0;
    preq[2][9].hwdata = 32'hCAFE_F00D;
    @(negedge clk);
    preq[2][9].htrans = HTRANS_IDLE;
    psel[2][9]        = 1'b0;
    #1;
    check("private memory", prsp[2][9].hrdata, 32'hCAFE_F00D);

    // ---- stress: 4 cores per tile, random targets, routers refusing at random
    stress_on = 1'b1;
    for (int t = 0; t < NT; t++)
      for (int c = 8; c < 12; c++)
        fork
          automatic int tt = t;
          automatic int cc = c;
          begin
            logic [31:0] r;
            for (int i = 0; i < 6; i++) begin
              automatic int dt = $urandom_range(0, NT - 1);
              automatic int k  = $urandom_range(5, 15);
              automatic logic net = 1'($urandom_range(0, 1));
              automatic int op = $urandom_range(0, 2);
              if (op == 0) begin
                issue(tt, cc, 1'b0, net, dt, 19'(32'h400 + k * 4), i, 0);
                collect(tt, cc, i, r);
                check("stress read", r, pat(dt, k));
              end else if (op == 1) begin
                issue(tt, cc, 1'b1, net, dt, 19'(32'h400 + k * 4), i,
                      {pat(dt, k)[15:0], pat(dt, k)[15:0]});
                collect(tt, cc, i, r);
                check("stress CAS", r, 32'd1);
                n_cas_ok++;
              end else begin
                bus_wr(tt, cc, wr_addr(net, dt, 19'(32'h800 + ((tt * 16 + cc) * 8 + i) * 4)),
                       32'(tt * 256 + cc * 16 + i));
                exp_q.push_back('{dt, 19'(32'h800 + ((tt * 16 + cc) * 8 + i) * 4),
                                 32'(tt * 256 + cc * 16 + i)});
              end
            end
            n_done++;
          end
        join_none
    wait (n_done == NT * 4);
    stress_on = 1'b0;
    // every remote write of the stress phase must have landed
    repeat (200) @(posedge clk);
    foreach (exp_q[i]) expect_mem(exp_q[i].t, 13, exp_q[i].a, exp_q[i].d, "stress write");

    // mechanism coverage
    $display("mechanisms: loopback=%0d xy=%0d yx=%0d conflicts=%0d queueing=%0d router_wait=%0d",
             n_loop, n_xy, n_yx, n_conf, n_queue, n_rwait);
    $display("            pk_write_stall=%0d pk_pending=%0d locked=%0d cas_ok=%0d cas_fail=%0d responses=%0d",
             n_pkstall, n_pkpend, n_locked, n_cas_ok, n_cas_fail, n_resp);
    begin
      int m [12];
      m = '{n_loop, n_xy, n_yx, n_conf, n_queue, n_rwait, n_pkstall, n_pkpend, n_locked,
            n_cas_ok, n_cas_fail, n_resp};
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
