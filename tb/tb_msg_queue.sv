// tb_msg_queue: self-checking test of the message queue.
//
// Fills the queue with the output blocked and checks that exactly DEPTH
// messages are accepted and the level counts them, then drains it and checks
// first-in first-out order. A random phase pushes and pops against a
// reference queue and checks every message that comes out.
module tb_msg_queue;
  import wsp_pkg::*;

  localparam int unsigned DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt, out_pkt;
  logic [$clog2(DEPTH+1)-1:0] level;

  msg_queue #(.DEPTH(DEPTH)) dut (.*);

  pkt_t model [$];
  int   seq = 0;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic pkt_t mk(input int n);
    pkt_t p;
    p = '0;
    p.data    = 32'(n * 7 + 1);
    p.cas_cmp = 16'(n);
    p.maddr   = 19'(n * 3);
    return p;
  endfunction

  // scoreboard on every clock
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      chk("pop from empty model", model.size() > 0);
      if (model.size() > 0) begin
        chk("FIFO order", out_pkt == model[0]);
        void'(model.pop_front());
      end
    end
    if (in_valid && in_ready) begin
      model.push_back(in_pkt);
      seq <= seq + 1;
    end
  end

  always_comb in_pkt = mk(seq);

  initial begin
    in_valid = 1'b0;
    out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // fill with output blocked
    @(negedge clk);
    in_valid = 1'b1;
    repeat (DEPTH + 4) @(negedge clk);
    chk("accepts exactly DEPTH", seq == DEPTH);
    chk("level is DEPTH", level == DEPTH);
    chk("full refuses", !in_ready);
    in_valid = 1'b0;
    out_ready = 1'b1;
    repeat (DEPTH + 2) @(negedge clk);
    chk("drained", !out_valid && level == 0);
    // random traffic
    repeat (2000) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < 55);
      out_ready = ($urandom_range(0, 99) < 50);
    end
    in_valid = 1'b0;
    out_ready = 1'b1;
    repeat (DEPTH + 2) @(negedge clk);
    chk("all delivered", model.size() == 0 && seq > 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
