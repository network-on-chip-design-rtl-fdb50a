// tb_config_regs: self-checking test of the tile configuration registers.
//
// Checks the reset value (alternate mode everywhere), then writes a random
// mode, preferred input and count into each of the six arbiter registers with
// pipelined AHB writes, checks the decoded arb_cfg outputs and reads every
// register back.
module tb_config_regs;
  import wsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic go, busy, hsel;
  ahb_req_t req;
  ahb_rsp_t rsp;
  arb_cfg_t arb_cfg [N_ARB];

  ahb_seq_master #(.N(32)) u_m (
    .clk, .rst_n, .go, .busy, .hsel, .req, .hready(rsp.hready), .hrdata(rsp.hrdata)
  );
  config_regs dut (.clk, .rst_n, .hsel, .s_req(req), .hready_in(rsp.hready), .s_rsp(rsp), .arb_cfg);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [1:0] md [N_ARB];
    logic       pf [N_ARB];
    logic [7:0] ct [N_ARB];
    go = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(N_ARB); i++)
      chk("reset value", arb_cfg[i].mode == ARB_ALTERNATE && arb_cfg[i].pref == 1'b0 && arb_cfg[i].count == 8'd0);
    for (int i = 0; i < int'(N_ARB); i++) begin
      md[i] = 2'($urandom_range(0, 2));
      pf[i] = 1'($urandom_range(0, 1));
      ct[i] = 8'($urandom_range(1, 255));
      u_m.op_a[i] = CFG_BASE | 32'(i * 4);
      u_m.op_w[i] = 1'b1;
      u_m.op_d[i] = {16'd0, ct[i], 5'd0, pf[i], md[i]};
      u_m.op_a[N_ARB + i] = CFG_BASE | 32'(i * 4);
      u_m.op_w[N_ARB + i] = 1'b0;
    end
    u_m.n_ops = 2 * N_ARB;
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    wait (!busy);
    @(negedge clk);
    for (int i = 0; i < int'(N_ARB); i++) begin
      chk("decoded mode", arb_cfg[i].mode == arb_mode_e'(md[i]));
      chk("decoded pref", arb_cfg[i].pref == pf[i]);
      chk("decoded count", arb_cfg[i].count == ct[i]);
      chk("readback", u_m.rd[N_ARB + i] == {16'd0, ct[i], 5'd0, pf[i], md[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
