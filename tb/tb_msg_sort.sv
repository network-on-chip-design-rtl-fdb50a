// tb_msg_sort: self-checking test of the message sorter.
//
// For every message type and every combination of valid and the two ready
// inputs, checks that writes and responses go to output 0 (depacketizer),
// reads and CAS to output 1 (depacketizer2), the packet passes unchanged and
// the input sees the ready of the output it was sent to.
module tb_msg_sort;
  import wsp_pkg::*;

  int checks = 0, failures = 0;
  logic in_valid, in_ready;
  pkt_t in_pkt;
  logic out_valid [2];
  pkt_t out_pkt [2];
  logic out_ready [2];

  msg_sort dut (.*);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 4; t++)
      for (int v = 0; v < 2; v++)
        for (int r = 0; r < 4; r++) begin
          int o;
          in_pkt       = '0;
          in_pkt.mtype = msg_type_e'(t);
          in_pkt.data  = $urandom();
          in_pkt.maddr = 19'($urandom());
          in_valid     = 1'(v);
          out_ready[0] = r[0];
          out_ready[1] = r[1];
          #1;
          o = (t == 1 || t == 2) ? 1 : 0;
          chk("valid to the right output", out_valid[o] == 1'(v) && out_valid[1-o] == 1'b0);
          chk("packet unchanged", out_pkt[o] == in_pkt);
          chk("ready from the chosen output", in_ready == out_ready[o]);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
