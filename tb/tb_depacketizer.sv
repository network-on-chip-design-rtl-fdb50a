// tb_depacketizer: self-checking test of the depacketizer.
//
// Feeds a random mix of WRITE messages (byte, halfword, word) and RESPONSE
// messages into the depacketizer, with gaps at the input and random wait
// states on the bus. The list of AHB transfers it performs is compared, in
// order, with the list expected: one write of the right size to the shared
// memory per WRITE; for each RESPONSE a word write of the data into the
// bucket's data word, then a write of 1 into its valid flag. A first
// directed run with no wait states and messages always waiting checks the
// rate the state machine gives: 2 cycles per WRITE and 3 per RESPONSE.
module tb_depacketizer;
  import wsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready;
  pkt_t in_pkt;
  ahb_req_t m_req;
  ahb_rsp_t m_rsp;
  int wait_pct = 0;
  int gap_pct  = 0;

  depacketizer dut (.*);
  ahb_mem_model u_mem (.clk, .rst_n, .wait_pct, .s_req(m_req), .s_rsp(m_rsp));

  typedef struct {
    logic [31:0] a;
    logic [2:0]  sz;
    logic [31:0] d;
  } exp_t;
  exp_t exp_q [$];
  pkt_t src_q [$];
  int   n_taken = 0;

  function automatic pkt_t rnd_msg();
    pkt_t p;
    p = '0;
    p.data = $urandom();
    if ($urandom_range(0, 1)) begin
      int s;
      s = $urandom_range(0, 2);
      p.mtype = MSG_WRITE;
      p.size  = 3'(1 << s);
      p.maddr = 19'($urandom()) & ~19'((1 << s) - 1);
      p.dest_x = 5'($urandom());
    end else begin
      p.mtype = MSG_RESP;
      p.size  = 3'd4;
      p.maddr = 19'({4'($urandom_range(0, 13)), 10'($urandom()), 3'b000});
    end
    return p;
  endfunction

  task automatic expect_of(input pkt_t p);
    if (p.mtype == MSG_WRITE) begin
      exp_q.push_back('{SHARED_BASE | 32'(p.maddr),
                        (p.size == 3'd1) ? 3'd0 : (p.size == 3'd2) ? 3'd1 : 3'd2, p.data});
    end else begin
      exp_q.push_back('{book_addr(p.maddr[16:13], p.maddr[12:3], 1'b0), 3'd2, p.data});
      exp_q.push_back('{book_addr(p.maddr[16:13], p.maddr[12:3], 1'b1), 3'd2, 32'd1});
    end
  endtask

  // source: present src_q[0], hold until taken
  always_comb in_pkt = (src_q.size() > 0) ? src_q[0] : '0;
  logic offer;
  always @(negedge clk) offer <= ($urandom_range(0, 99) >= gap_pct);
  assign in_valid = (src_q.size() > 0) && offer;
  always @(posedge clk) if (in_valid && in_ready) begin
    void'(src_q.pop_front());
    n_taken++;
  end

  task automatic compare_log;
    checks++;
    if (u_mem.log_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %0d transfers, expected %0d", u_mem.log_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < u_mem.log_q.size(); i++) begin
      checks++;
      if (!u_mem.log_q[i].w || u_mem.log_q[i].a != exp_q[i].a || u_mem.log_q[i].sz != exp_q[i].sz ||
          u_mem.log_q[i].d != exp_q[i].d) begin
        failures++;
        $display("FAIL transfer %0d: %08h sz %0d %08h, expected %08h sz %0d %08h", i,
                 u_mem.log_q[i].a, u_mem.log_q[i].sz, u_mem.log_q[i].d,
                 exp_q[i].a, exp_q[i].sz, exp_q[i].d);
      end
    end
    exp_q.delete();
    u_mem.log_q.delete();
  endtask

  initial begin
    int t0, nw, nr;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // directed: 8 writes then 8 responses, no gaps, no wait states
    nw = 0;
    nr = 0;
    for (int i = 0; i < 16; i++) begin
      pkt_t p;
      do p = rnd_msg(); while ((i < 8) != (p.mtype == MSG_WRITE));
      src_q.push_back(p);
      expect_of(p);
    end
    @(posedge clk);
    t0 = 0;
    while (u_mem.log_q.size() < 8 * 1 + 8 * 2) begin
      @(posedge clk);
      t0++;
    end
    repeat (2) @(posedge clk);
    checks++;
    if (t0 != 8 * 2 + 8 * 3) begin
      failures++;
      $display("FAIL 8 writes + 8 responses took %0d cycles, expected %0d", t0, 8 * 2 + 8 * 3);
    end
    compare_log();

    // random traffic with wait states and input gaps
    wait_pct = 35;
    gap_pct = 40;
    for (int i = 0; i < 300; i++) begin
      pkt_t p;
      p = rnd_msg();
      src_q.push_back(p);
      expect_of(p);
    end
    wait (src_q.size() == 0);
    repeat (20) @(posedge clk);
    compare_log();
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
