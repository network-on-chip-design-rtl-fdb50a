// tb_packetizer: self-checking test of the packetizer.
//
// Plays a long pipelined AHB sequence into the packetizer (tile at x=3,
// y=7): remote writes of every size over both networks, request-register
// writes with and without the send bit for READ and CAS, register reads, and
// transfers that follow a send directly so they arrive while the request is
// still waiting for the router. The router side takes messages at random.
// Every message that leaves is compared, in order, with the message expected
// from a model of the per-core registers kept in the testbench; register
// reads are compared with that model too. A first directed transfer checks
// that a remote write is offered in the cycle after its address phase (the
// WRITE TRANSMIT state directly follows INIT).
module tb_packetizer;
  import wsp_pkg::*;

  localparam int NOPS = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic go, busy, hsel;
  ahb_req_t req;
  ahb_rsp_t rsp;
  logic out_valid, out_ready;
  pkt_t out_pkt;
  int   rdy_pct = 100;

  ahb_seq_master #(.N(NOPS)) u_m (
    .clk, .rst_n, .go, .busy, .hsel, .req, .hready(rsp.hready), .hrdata(rsp.hrdata)
  );
  packetizer dut (
    .clk, .rst_n, .tile_x(5'd3), .tile_y(5'd7),
    .hsel, .s_req(req), .hready_in(rsp.hready), .s_rsp(rsp),
    .out_valid, .out_pkt, .out_ready
  );

  always @(negedge clk) out_ready <= ($urandom_range(0, 99) < rdy_pct);

  pkt_t        exp_q [$];
  logic [31:0] regs  [16][3];
  logic        isrd  [NOPS];
  logic [31:0] rexp  [NOPS];
  int n = 0;
  int n_out = 0;
  int n_pend = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected message");
      end else begin
        if (out_pkt != exp_q[0]) begin
          failures++;
          $display("FAIL message %0d: %h expected %h", n_out, out_pkt, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    if (dut.state_q == 2'd3 && dut.dp_pend_q) n_pend++;
  end

  function automatic pkt_t wpkt(input logic [31:0] a, input logic [2:0] sz, input logic [31:0] d);
    pkt_t p;
    p = '0;
    p.size = 3'(1 << sz);
    p.data = d;
    p.ntwk = a[29];
    p.mtype = MSG_WRITE;
    p.maddr = a[18:0];
    p.dest_x = a[28:24];
    p.dest_y = a[23:19];
    return p;
  endfunction

  task automatic add(input logic w, input logic [31:0] a, input logic [2:0] sz, input logic [31:0] d);
    int c, r;
    u_m.op_a[n] = a;
    u_m.op_w[n] = w;
    u_m.op_sz[n] = sz;
    u_m.op_d[n] = d;
    isrd[n] = !w;
    c = int'(a[5:2]);
    r = int'(a[7:6]);
    if (a[31:30] == 2'b10) begin
      if (w) exp_q.push_back(wpkt(a, sz, d));
    end else if (w) begin
      if (c < 14 && r < 3) begin
        regs[c][r] = d;
        if (a[8]) begin
          pkt_t p;
          logic [31:0] ad;
          ad = regs[c][1];
          p = '0;
          p.size    = ad[30] ? 3'd2 : 3'd4;
          p.cas_cmp = ad[30] ? regs[c][0][31:16] : 16'd0;
          p.cas_swp = ad[30] ? regs[c][0][15:0] : 16'd0;
          p.data    = {6'd0, 5'd7, 5'd3, 2'd0, 4'(c), regs[c][2][9:0]};
          p.ntwk    = ad[29];
          p.mtype   = ad[30] ? MSG_CAS : MSG_READ;
          p.maddr   = ad[18:0];
          p.dest_x  = ad[28:24];
          p.dest_y  = ad[23:19];
          exp_q.push_back(p);
        end
      end
    end else begin
      rexp[n] = (c < 14 && r < 3) ? regs[c][r] : 32'd0;
    end
    n++;
  endtask

  task automatic run;
    u_m.op_first = 1;
    u_m.n_ops = n;
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    wait (!busy);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int t0;
    go = 1'b0;
    for (int c = 0; c < 16; c++) for (int r = 0; r < 3; r++) regs[c][r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // directed: one remote write, router always ready: message one cycle later
    add(1'b1, {2'b10, 1'b1, 5'd9, 5'd4, 19'h1_2344}, 3'd2, 32'hDEAD_BEEF);
    u_m.n_ops = n;
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    wait (req.htrans == HTRANS_NONSEQ);
    @(posedge clk);
    #1;
    t0 = 0;
    while (!out_valid) begin
      @(posedge clk);
      #1;
      t0++;
      if (t0 > 10) break;
    end
    chk("write offered one cycle after its address phase", t0 == 0);
    wait (!busy);
    repeat (2) @(posedge clk);

    // random pipelined sequence with back-pressure
    rdy_pct = 40;
    while (n < NOPS - 8) begin
      int k;
      logic [31:0] a;
      k = $urandom_range(0, 9);
      if (k < 3) begin
        logic [2:0] sz;
        sz = 3'($urandom_range(0, 2));
        a = {2'b10, 1'($urandom_range(0, 1)), 5'($urandom()), 5'($urandom()), 19'($urandom())};
        add(1'b1, a, sz, $urandom());
      end else if (k < 8) begin
        int c, r;
        logic s;
        c = $urandom_range(0, 15);
        r = $urandom_range(0, 3);
        s = (k >= 6);
        a = PKTZ_BASE | 32'(s << 8) | 32'(r << 6) | 32'(c << 2);
        if (r == 1) add(1'b1, a, 3'd2, {1'b0, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)),
                                        29'($urandom())});
        else        add(1'b1, a, 3'd2, $urandom());
        // follow a send with a transfer right away
        if (s) add(1'b1, {2'b10, 1'b0, 5'd1, 5'd2, 19'(n)}, 3'd2, 32'(n));
      end else if (k == 8) begin
        a = PKTZ_BASE | 32'($urandom_range(0, 2) << 6) | 32'($urandom_range(0, 13) << 2);
        add(1'b0, a, 3'd2, 0);
      end else begin
        u_m.op_idle[n] = 1'b1;
        add(1'b0, PKTZ_BASE, 3'd2, 0);
      end
    end
    run();
    for (int i = 1; i < n; i++)
      if (isrd[i] && !u_m.op_idle[i] && u_m.op_a[i][31:30] != 2'b10) begin
        checks++;
        if (u_m.rd[i] !== rexp[i]) begin
          failures++;
          $display("FAIL register read %0d: %08h expected %08h", i, u_m.rd[i], rexp[i]);
        end
      end
    chk("all expected messages sent", exp_q.size() == 0);
    chk("a transfer waited behind a request", n_pend > 0);
    $display("messages %0d, pending-transfer cycles %0d", n_out, n_pend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
