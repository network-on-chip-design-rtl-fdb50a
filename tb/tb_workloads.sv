// tb_workloads: the three system test programs, run on a 3x3 mesh of tiles.
//
// The testbench plays the cores of a 3x3 array of full-size tiles (see
// mesh_model) and runs, one after the other:
//   1. Mailbox. A core on tile (0,0) streams 48 words to a core on tile
//      (2,2) through an 8-slot circular queue that lives in the receiver's
//      shared memory. The receiver's tail index lives next to the queue, the
//      head index in the transmitter's shared memory. Each side reads its own
//      index locally and updates the other side's with a remote write. The
//      receiver checks that the exact sequence arrives.
//   2. Read/CAS traffic. Every tile fills 32 words of its shared memory with
//      a value made from its coordinates and the word address. Four cores per
//      tile then each keep four requests in flight (reads and CAS, the CAS
//      swap value equal to the compare value so memory stays unchanged, and
//      every fourth CAS given a wrong compare value so it must fail), first
//      to random tiles (uniform) and then all to the centre tile (hot spot),
//      with half and three quarters of the requests on the XY network. For
//      the hot spot every tile gives responses strict priority on both
//      transmit arbiters and runs its receive arbiter in relaxed mode. The
//      centre tile's own cores keep sending to random tiles during the hot
//      spot: requests a tile sends to itself share the loopback queue with
//      the answers to them, and more of them in flight than that queue holds
//      can lock the tile (see the deadlock notes of net_if).
//   3. Breadth-first search. A 45-vertex graph is stored as one level word
//      per vertex, spread over the shared memories of all tiles. Level by
//      level, one core per tile takes a share of the frontier and claims each
//      neighbour with a remote CAS (compare 0xFFFF, swap the next level);
//      only the winning core adds the vertex to the next frontier. At the end
//      every level is read back with remote reads and compared with a BFS
//      computed here, and each reached vertex must have been claimed once.
module tb_workloads;
  import wsp_pkg::*;

  localparam int NX = 3, NY = 3, NT = NX * NY, NC = N_CORES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  ahb_req_t creq [NT][NC];
  ahb_rsp_t crsp [NT][NC];
  logic     stall [NT][2];

  mesh_model #(.NX(NX), .NY(NY)) u_mesh (
    .clk, .rst_n, .core_req(creq), .core_rsp(crsp), .stall
  );

  always @(negedge clk)
    for (int t = 0; t < NT; t++)
      for (int n = 0; n < 2; n++) stall[t][n] <= ($urandom_range(0, 99) < 20);

  // ---- core-side bus helpers
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

  task automatic bus_wr(input int t, input int c, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    creq[t][c].haddr  = a;
    creq[t][c].htrans = HTRANS_NONSEQ;
    creq[t][c].hwrite = 1'b1;
    creq[t][c].hsize  = 3'd2;
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

  function automatic logic [31:0] remote(input logic net, input int dt, input logic [18:0] ma);
    return {2'b10, net, 5'(dt % NX), 5'(dt / NX), ma};
  endfunction

  task automatic issue(input int t, input int c, input logic cas, input logic net, input int dt,
                       input logic [18:0] ma, input int bucket, input logic [31:0] cmpswp);
    if (cas) bus_wr(t, c, PKTZ_BASE | 32'(c << 2), cmpswp);
    bus_wr(t, c, PKTZ_BASE | 32'h040 | 32'(c << 2), {1'b0, cas, net, 5'(dt % NX), 5'(dt / NX), ma});
    bus_wr(t, c, PKTZ_BASE | 32'h180 | 32'(c << 2), 32'(bucket));
  endtask

  task automatic collect(input int t, input int c, input int bucket, output logic [31:0] d);
    logic [31:0] f;
    int n;
    n = 0;
    f = 0;
    while (f != 32'd1 && n < 4000) begin
      bus_rd(t, c, book_addr(4'(c), 10'(bucket), 1'b1), f);
      n++;
    end
    check("bucket flag", f, 32'd1);
    bus_rd(t, c, book_addr(4'(c), 10'(bucket), 1'b0), d);
    bus_wr(t, c, book_addr(4'(c), 10'(bucket), 1'b1), 32'd0);
  endtask

  // ---- 1. mailbox
  localparam int MB_N = 48, MB_Q = 8;
  localparam logic [18:0] MB_DATA = 19'h0_3000, MB_TAIL = 19'h0_3040, MB_HEAD = 19'h0_3080;
  int mb_sent = 0, mb_got = 0, mb_full = 0;

  function automatic logic [31:0] mb_word(input int i);
    return 32'h4D00_0000 ^ (i * 32'h0101_0107);
  endfunction

  task automatic mb_tx(input int t, input int c, input int rt);
    logic [31:0] head;
    int tail;
    tail = 0;
    for (int i = 0; i < MB_N; i++) begin
      bus_rd(t, c, SHARED_BASE | 32'(MB_HEAD), head);
      while ((tail + 1) % MB_Q == int'(head)) begin
        mb_full++;
        bus_rd(t, c, SHARED_BASE | 32'(MB_HEAD), head);
      end
      bus_wr(t, c, remote(1'b0, rt, 19'(MB_DATA + 19'(tail * 4))), mb_word(i));
      tail = (tail + 1) % MB_Q;
      bus_wr(t, c, remote(1'b0, rt, MB_TAIL), 32'(tail));
      mb_sent++;
    end
  endtask

  task automatic mb_rx(input int t, input int c, input int tt);
    logic [31:0] tail, d;
    int head;
    head = 0;
    for (int i = 0; i < MB_N; i++) begin
      tail = 32'(head);
      while (int'(tail) == head) bus_rd(t, c, SHARED_BASE | 32'(MB_TAIL), tail);
      bus_rd(t, c, SHARED_BASE | 32'(MB_DATA + 19'(head * 4)), d);
      check("mailbox word", d, mb_word(i));
      if (i < 16) repeat (60) @(posedge clk);   // a slow reader early on fills the queue
      head = (head + 1) % MB_Q;
      bus_wr(t, c, remote(1'b1, tt, MB_HEAD), 32'(head));
      mb_got++;
    end
  endtask

  // ---- 2. read / CAS traffic
  function automatic logic [31:0] pat(input int t, input int k);
    return {8'(t % NX), 8'(t / NX), 8'h5A ^ 8'(k), 8'(k * 3)};
  endfunction
  localparam int NF = 4;   // requests each core keeps in flight
  int n_rd = 0, n_cas_ok = 0, n_cas_fail = 0, n_xy = 0, n_yx = 0;
  int n_done;

  typedef struct {
    int   dt;
    int   k;
    int   half;
    logic cas;
    logic bad;
  } rq_t;

  task automatic traffic(input int t, input int c, input int rounds, input int hot,
                         input int xy_pct, input int base_bucket);
    rq_t rq [NF];
    logic [31:0] r, w;
    for (int rd = 0; rd < rounds; rd++) begin
      for (int i = 0; i < NF; i++) begin
        logic net;
        rq[i].dt   = (hot >= 0) ? hot : int'($urandom_range(0, NT - 1));
        rq[i].k    = $urandom_range(0, 31);
        rq[i].half = $urandom_range(0, 1);
        rq[i].cas  = 1'($urandom_range(0, 1));
        rq[i].bad  = rq[i].cas && ($urandom_range(0, 3) == 0);
        net = ($urandom_range(0, 99) >= xy_pct);
        if (net) n_yx++;
        else     n_xy++;
        w = pat(rq[i].dt, rq[i].k);
        w = rq[i].half ? {16'd0, w[31:16]} : {16'd0, w[15:0]};
        if (rq[i].bad) w = w ^ 32'h0000_8001;
        issue(t, c, rq[i].cas, net, rq[i].dt, 19'(32'h1000 + rq[i].k * 4 + rq[i].half * 2),
              base_bucket + i, {w[15:0], w[15:0]});
      end
      for (int i = 0; i < NF; i++) begin
        collect(t, c, base_bucket + i, r);
        if (!rq[i].cas) begin
          check("read data", r, pat(rq[i].dt, rq[i].k));
          n_rd++;
        end else if (rq[i].bad) begin
          check("CAS must fail", r, 32'd0);
          n_cas_fail++;
        end else begin
          check("CAS must succeed", r, 32'd1);
          n_cas_ok++;
        end
      end
    end
  endtask

  // ---- 3. BFS
  localparam int NV = 45, DEG = 3;
  localparam logic [18:0] LV_BASE = 19'h0_5000;
  int adj [NV][DEG];
  int ref_lvl [NV];
  int frontier [$], next_f [$];
  int claims [NV];
  int n_claim_fail = 0;

  function automatic int owner(input int v);
    return v % NT;
  endfunction
  function automatic logic [18:0] lv_addr(input int v);
    return 19'(LV_BASE + (v / NT) * 4);
  endfunction

  task automatic bfs_worker(input int w, input int lvl, input int share []);
    logic [31:0] r;
    int b;
    b = 0;
    foreach (share[i])
      for (int e = 0; e < DEG; e++) begin
        automatic int u = adj[share[i]][e];
        issue(w, 1, 1'b1, 1'(b % 2), owner(u), lv_addr(u), b % 1024, {16'hFFFF, 16'(lvl + 1)});
        collect(w, 1, b % 1024, r);
        b++;
        if (r == 32'd1) begin
          claims[u]++;
          next_f.push_back(u);
        end else begin
          n_claim_fail++;
        end
      end
  endtask

  initial begin : main
    logic [31:0] d;
    for (int t = 0; t < NT; t++)
      for (int c = 0; c < NC; c++) creq[t][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- 1. mailbox between tile 0 and tile 8
    bus_wr(0, 0, SHARED_BASE | 32'(MB_HEAD), 32'd0);
    bus_wr(8, 0, SHARED_BASE | 32'(MB_TAIL), 32'd0);
    n_done = 0;
    fork
      begin mb_tx(0, 0, 8); n_done++; end
      begin mb_rx(8, 0, 0); n_done++; end
    join_none
    wait (n_done == 2);
    check("mailbox words sent", 32'(mb_sent), 32'(MB_N));
    check("mailbox words received", 32'(mb_got), 32'(MB_N));
    $display("mailbox: %0d words, transmitter found the queue full %0d times", mb_got, mb_full);

    // ---- 2. read/CAS traffic
    n_done = 0;
    for (int t = 0; t < NT; t++)
      fork
        automatic int tt = t;
        begin
          for (int k = 0; k < 32; k++) bus_wr(tt, 2, SHARED_BASE | 32'(32'h1000 + k * 4), pat(tt, k));
          for (int c = 4; c < 8; c++)
            for (int b = 0; b < 8; b++) bus_wr(tt, 2, book_addr(4'(c), 10'(b), 1'b1), 32'd0);
          n_done++;
        end
      join_none
    wait (n_done == NT);
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1)
        // hot spot: responses first on both transmit arbiters, relaxed receive
        for (int t = 0; t < NT; t++) begin
          bus_wr(t, 2, CFG_BASE | 32'h0C, 32'h0000_0005);
          bus_wr(t, 2, CFG_BASE | 32'h10, 32'h0000_0005);
          bus_wr(t, 2, CFG_BASE | 32'h14, 32'h0000_0302);
          bus_rd(t, 2, CFG_BASE | 32'h14, d);
          check("config readback", d, 32'h0000_0302);
        end
      n_done = 0;
      for (int t = 0; t < NT; t++)
        for (int c = 4; c < 8; c++)
          fork
            automatic int tt = t;
            automatic int cc = c;
            automatic int ph = phase;
            begin
              traffic(tt, cc, 2, (ph == 0 || tt == 4) ? -1 : 4, (ph == 0) ? 50 : 75, 4 * ph);
              n_done++;
            end
          join_none
      wait (n_done == NT * 4);
      $display("read/CAS %s: reads %0d, CAS ok %0d, CAS failed %0d, XY %0d, YX %0d",
               phase == 0 ? "uniform" : "hot spot", n_rd, n_cas_ok, n_cas_fail, n_xy, n_yx);
    end
    // CAS with swap = compare must have left memory unchanged
    for (int k = 0; k < 32; k += 5) begin
      bus_rd(4, 9, SHARED_BASE | 32'(32'h1000 + k * 4), d);
      check("memory unchanged by CAS", d, pat(4, k));
    end

    // ---- 3. BFS
    for (int v = 0; v < NV; v++) begin
      adj[v][0] = (v * 7 + 1) % NV;
      adj[v][1] = (v * 11 + 4) % NV;
      adj[v][2] = (v + 9) % NV;
      ref_lvl[v] = -1;
      claims[v] = 0;
    end
    ref_lvl[0] = 0;
    frontier = '{0};
    while (frontier.size() > 0) begin
      next_f = {};
      foreach (frontier[i])
        for (int e = 0; e < DEG; e++)
          if (ref_lvl[adj[frontier[i]][e]] < 0) begin
            ref_lvl[adj[frontier[i]][e]] = ref_lvl[frontier[i]] + 1;
            next_f.push_back(adj[frontier[i]][e]);
          end
      frontier = next_f;
    end
    for (int v = 0; v < NV; v++)
      bus_wr(owner(v), 1, SHARED_BASE | 32'(lv_addr(v)), (v == 0) ? 32'hFFFF_0000 : 32'hFFFF_FFFF);
    for (int t = 0; t < NT; t++)
      for (int b = 0; b < 64; b++) bus_wr(t, 1, book_addr(4'd1, 10'(b), 1'b1), 32'd0);
    frontier = '{0};
    claims[0] = 1;
    for (int lvl = 0; frontier.size() > 0; lvl++) begin
      next_f = {};
      n_done = 0;
      for (int w = 0; w < NT; w++)
        fork
          automatic int ww = w;
          automatic int ll = lvl;
          automatic int share [];
          begin
            for (int i = ww; i < frontier.size(); i += NT) begin
              share = new [share.size() + 1] (share);
              share[share.size() - 1] = frontier[i];
            end
            bfs_worker(ww, ll, share);
            n_done++;
          end
        join_none
      wait (n_done == NT);
      $display("BFS level %0d: frontier %0d, next %0d", lvl, frontier.size(), next_f.size());
      frontier = next_f;
    end
    bus_wr(0, 3, book_addr(4'd3, 10'd0, 1'b1), 32'd0);
    for (int v = 0; v < NV; v++) begin
      issue(0, 3, 1'b0, 1'(v % 2), owner(v), lv_addr(v), 0, 0);
      collect(0, 3, 0, d);
      check("BFS level", {16'd0, d[15:0]}, (ref_lvl[v] < 0) ? 32'h0000_FFFF : 32'(ref_lvl[v]));
      check("vertex claimed once", 32'(claims[v]), (ref_lvl[v] < 0) ? 32'd0 : 32'd1);
    end
    $display("BFS: %0d CAS claims lost to another core or already visited", n_claim_fail);

    checks++;
    if (n_rd == 0 || n_cas_ok == 0 || n_cas_fail == 0 || n_claim_fail == 0 || mb_full == 0) begin
      failures++;
      $display("FAIL a workload case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (600000) @(posedge clk);

    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
