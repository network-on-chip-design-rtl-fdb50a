// tb_msg_arbiter: self-checking test of the two-input message arbiter.
//
// Phase 1 keeps both inputs always valid with the output always ready and
// checks the grant pattern of each mode against the expected sequence:
// alternate (0,1,0,1...), strict (always the preferred input) and relaxed
// with count 3 (pref x3, other x1, repeating). Phase 2 uses random valid and
// ready and checks, with a scoreboard, that every message of each input
// comes out exactly once and in order, and that an offered message is held
// until it is taken.
module tb_msg_arbiter;
  import wsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  arb_cfg_t cfg;
  logic in_valid [2];
  pkt_t in_pkt   [2];
  logic in_ready [2];
  logic out_valid, out_ready, conflict;
  pkt_t out_pkt;

  msg_arbiter dut (.*);

  int seq [2];        // next sequence number each source offers
  int exp_seq [2];    // next sequence number expected at the output
  logic rnd_mode = 1'b0;
  int   pv = 100;     // percent chance a source offers a message
  int   pr = 100;     // percent chance the output is ready
  pkt_t last_pkt;
  logic last_stall = 1'b0;

  for (genvar i = 0; i < 2; i++) begin : g_src
    always_comb begin
      in_pkt[i]       = '0;
      in_pkt[i].data  = 32'(seq[i]);
      in_pkt[i].dest_x = 5'(i);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // hold rule
      if (last_stall) begin
        checks++;
        if (!out_valid || out_pkt != last_pkt) begin
          failures++;
          $display("FAIL output changed while stalled");
        end
      end
      last_stall <= out_valid && !out_ready;
      last_pkt   <= out_pkt;
      if (out_valid && out_ready) begin
        checks++;
        if (int'(out_pkt.data) != exp_seq[out_pkt.dest_x[0]]) begin
          failures++;
          $display("FAIL input %0d out of order: %0d vs %0d", out_pkt.dest_x[0],
                   out_pkt.data, exp_seq[out_pkt.dest_x[0]]);
        end
        exp_seq[out_pkt.dest_x[0]] <= exp_seq[out_pkt.dest_x[0]] + 1;
      end
      for (int i = 0; i < 2; i++) if (in_valid[i] && in_ready[i]) seq[i] <= seq[i] + 1;
    end
  end

  // sources: once offered, a message stays valid until taken
  always @(negedge clk) begin
    for (int i = 0; i < 2; i++)
      if (!in_valid[i] || in_ready_q[i]) in_valid[i] <= ($urandom_range(0, 99) < pv);
    out_ready <= ($urandom_range(0, 99) < pr);
  end
  logic in_ready_q [2];
  always @(posedge clk) for (int i = 0; i < 2; i++) in_ready_q[i] <= in_valid[i] && in_ready[i];

  // record the winners of n consecutive transfers
  task automatic winners(input int n, output logic w [32]);
    int k;
    k = 0;
    while (k < n) begin
      @(posedge clk);
      #1;
      if (out_valid && out_ready) begin
        w[k] = out_pkt.dest_x[0];
        k++;
      end
    end
  endtask

  task automatic expect_pattern(input string what, input logic w [32], input logic e [32], input int n);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (w[i] !== e[i]) begin
        failures++;
        $display("FAIL %s: transfer %0d from input %0d, expected %0d", what, i, w[i], e[i]);
      end
    end
  endtask

  initial begin
    logic w [32], e [32];
    cfg = '{mode: ARB_ALTERNATE, pref: 1'b0, count: 8'd0};
    seq = '{0, 0};
    exp_seq = '{0, 0};
    in_valid = '{1'b0, 1'b0};
    out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // wait until both sources are valid and the pattern is steady
    repeat (4) @(posedge clk);
    winners(12, w);
    for (int i = 0; i < 12; i++) e[i] = (i % 2 == 0) ? w[0] : ~w[0];
    expect_pattern("alternate", w, e, 12);

    cfg = '{mode: ARB_STRICT, pref: 1'b1, count: 8'd0};
    winners(2, w);
    winners(10, w);
    for (int i = 0; i < 10; i++) e[i] = 1'b1;
    expect_pattern("strict", w, e, 10);

    cfg = '{mode: ARB_RELAXED, pref: 1'b0, count: 8'd3};
    // align on the yield of the other input
    do winners(1, w); while (w[0] != 1'b1);
    winners(16, w);
    for (int i = 0; i < 16; i++) e[i] = (i % 4 == 3);
    expect_pattern("relaxed", w, e, 16);
    checks++;
    if (!conflict) begin
      failures++;
      $display("FAIL conflict flag not raised with both inputs valid");
    end

    // random traffic in each mode
    pv = 50;
    pr = 60;
    for (int m = 0; m < 3; m++) begin
      cfg = '{mode: arb_mode_e'(m), pref: 1'($urandom_range(0, 1)), count: 8'd2};
      repeat (400) @(posedge clk);
    end
    checks++;
    if (exp_seq[0] < 50 || exp_seq[1] < 50) begin
      failures++;
      $display("FAIL too few transfers %0d %0d", exp_seq[0], exp_seq[1]);
    end
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
