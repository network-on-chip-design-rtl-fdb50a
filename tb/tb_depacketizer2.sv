// tb_depacketizer2: self-checking test of the request server.
//
// A memory model holds known words. READ and CAS requests (CAS on either
// half of a word, with a compare value that matches or not) are fed in, with
// random wait states on the bus and a router side that refuses at random, so
// ROUTER WAIT is entered. Each response leaving is compared, in order, with
// the response computed here: returned word or success flag, opposite
// network, destination = requesting tile, bookkeeping offset of the bucket.
// The memory is compared with the model at the end (a successful CAS writes
// the swap value, a failed one writes nothing), and every bus transfer of a
// CAS must carry HMASTLOCK. A directed first request with no wait states
// checks the state-machine latency: response offered 2 cycles after the
// request is taken (READ ADDR, READ DATA).
module tb_depacketizer2;
  import wsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt, out_pkt;
  ahb_req_t m_req;
  ahb_rsp_t m_rsp;
  int wait_pct = 0;
  int rdy_pct = 100;

  depacketizer2 dut (.*);
  ahb_mem_model u_mem (.clk, .rst_n, .wait_pct, .s_req(m_req), .s_rsp(m_rsp));

  logic [31:0] model [64];
  pkt_t src_q [$];
  pkt_t exp_q [$];
  int   n_wait = 0, n_ok = 0, n_fail = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // build a request and the response it must produce
  task automatic make(input logic cas, input logic match);
    pkt_t p, r;
    int k;
    logic [15:0] cur;
    k = $urandom_range(0, 63);
    p = '0;
    p.mtype = cas ? MSG_CAS : MSG_READ;
    p.size = cas ? 3'd2 : 3'd4;
    p.ntwk = 1'($urandom_range(0, 1));
    p.maddr = 19'(k * 4) | (cas ? 19'($urandom_range(0, 1) * 2) : 19'd0);
    p.data = {6'd0, 5'($urandom()), 5'($urandom()), 2'd0, 4'($urandom_range(0, 13)), 10'($urandom())};
    p.dest_x = 5'd1;
    p.dest_y = 5'd2;
    cur = p.maddr[1] ? model[k][31:16] : model[k][15:0];
    p.cas_cmp = (cas && match) ? cur : (cur ^ 16'h0101);
    p.cas_swp = 16'($urandom());
    r = '0;
    r.size = 3'd4;
    r.ntwk = ~p.ntwk;
    r.mtype = MSG_RESP;
    r.maddr = 19'({p.data[13:0], 3'b000});
    r.dest_y = p.data[25:21];
    r.dest_x = p.data[20:16];
    if (!cas) r.data = model[k];
    else begin
      r.data = {31'd0, match};
      if (match) begin
        if (p.maddr[1]) model[k][31:16] = p.cas_swp;
        else            model[k][15:0]  = p.cas_swp;
        n_ok++;
      end else n_fail++;
    end
    src_q.push_back(p);
    exp_q.push_back(r);
  endtask

  always_comb in_pkt = (src_q.size() > 0) ? src_q[0] : '0;
  assign in_valid = src_q.size() > 0;
  always @(negedge clk) out_ready <= ($urandom_range(0, 99) < rdy_pct);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(src_q.pop_front());
    if (dut.state_q == 3'd7) n_wait++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_pkt != exp_q[0]) begin
        failures++;
        $display("FAIL response %h expected %h", out_pkt, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    int t0;
    for (int k = 0; k < 64; k++) begin
      model[k] = $urandom();
      u_mem.mem[int'((SHARED_BASE >> 2) + k)] = model[k];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // directed latency check
    @(negedge clk);
    make(1'b0, 1'b0);
    @(posedge clk);   // request taken at this edge
    #1;
    t0 = 1;
    while (!out_valid && t0 < 20) begin
      @(posedge clk);
      #1;
      t0++;
    end
    chk("read answered 2 cycles after it is taken", t0 == 2);
    repeat (3) @(posedge clk);

    // random mix with back-pressure on both sides
    wait_pct = 30;
    rdy_pct = 45;
    for (int i = 0; i < 300; i++) begin
      int k;
      k = $urandom_range(0, 2);
      make(k != 0, k == 1);
      if (i % 10 == 9) wait (src_q.size() == 0);
    end
    wait (src_q.size() == 0 && exp_q.size() == 0);
    repeat (5) @(posedge clk);
    chk("all responses seen", exp_q.size() == 0);
    for (int k = 0; k < 64; k++)
      chk($sformatf("memory word %0d", k), u_mem.mem[int'((SHARED_BASE >> 2) + k)] == model[k]);
    // every CAS transfer is locked: CAS reads are words, CAS writes halfwords
    foreach (u_mem.log_q[i]) begin
      if (u_mem.log_q[i].w) chk("CAS write locked", u_mem.log_q[i].lock && u_mem.log_q[i].sz == 3'd1);
      else if (u_mem.log_q[i].lock) checks++;
    end
    chk("ROUTER WAIT entered", n_wait > 0);
    chk("CAS success and failure seen", n_ok > 0 && n_fail > 0);
    $display("router-wait cycles %0d, CAS ok %0d fail %0d", n_wait, n_ok, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
