// tb_net_if: self-checking test of the tile network interface.
//
// The interface of a tile at (2,1) is placed on a behavioural AHB bus with a
// testbench core (master 0), its own depacketizer and depacketizer2 (masters
// 1 and 2), four shared banks, the bookkeeping bank and the packetizer. The
// testbench drives the two router local ports and collects what leaves them.
// Checked against values computed here:
//   * WRITE and RESPONSE messages arriving from either router land in
//     shared or bookkeeping memory;
//   * a READ and a CAS arriving from the network are answered with a
//     RESPONSE on the opposite network to the requesting tile;
//   * remote writes and requests from the core to other tiles leave on the
//     router of the network named in the address;
//   * a write, a read and a CAS from the core to its own tile are looped back
//     (nothing reaches a router) and the answers land in bookkeeping memory;
//   * messages arriving on both routers at once are all delivered and the
//     receive arbiter sees a conflict.
module tb_net_if;
  import wsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [4:0] MX = 5'd2, MY = 5'd1;

  arb_cfg_t arb_cfg [N_ARB];
  ahb_req_t mm_req [3];
  ahb_rsp_t mm_rsp [3];
  logic     s_hsel [7];
  ahb_req_t s_req [7];
  logic     s_hready [7];
  ahb_rsp_t s_rsp [7];
  logic     go, busy, c_hsel;
  int       n_xfer, n_lk;
  logic     rt_out_valid [2], rt_out_ready [2], rt_in_valid [2], rt_in_ready [2];
  pkt_t     rt_out_pkt [2], rt_in_pkt [2];
  logic [N_ARB-1:0] arb_conflict;

  ahb_seq_master #(.N(64)) u_core (
    .clk, .rst_n, .go, .busy, .hsel(c_hsel), .req(mm_req[0]),
    .hready(mm_rsp[0].hready), .hrdata(mm_rsp[0].hrdata)
  );

  ahb_matrix_model #(.NM(3), .NS(7)) u_mx (
    .clk, .rst_n, .m_req(mm_req), .m_rsp(mm_rsp),
    .s_hsel, .s_req, .s_hready, .s_rsp, .n_xfer, .n_locked(n_lk)
  );

  for (genvar b = 0; b < 5; b++) begin : g_bank
    ahb_sram u_bank (.clk, .rst_n, .hsel(s_hsel[b]), .s_req(s_req[b]), .hready_in(s_hready[b]),
                     .s_rsp(s_rsp[b]));
  end
  assign s_rsp[5] = '{hrdata: 32'd0, hready: 1'b1, hresp: 1'b0};

  net_if dut (
    .clk, .rst_n, .tile_x(MX), .tile_y(MY), .arb_cfg,
    .pk_hsel(s_hsel[6]), .pk_req(s_req[6]), .pk_hready(s_hready[6]), .pk_rsp(s_rsp[6]),
    .dp_req(mm_req[1]), .dp_rsp(mm_rsp[1]), .d2_req(mm_req[2]), .d2_rsp(mm_rsp[2]),
    .rt_out_valid, .rt_out_pkt, .rt_out_ready, .rt_in_valid, .rt_in_pkt, .rt_in_ready,
    .arb_conflict
  );

  // router side
  pkt_t in_q [2][$];
  pkt_t exp_out [2][$];
  int   n_conf = 0;
  for (genvar n = 0; n < 2; n++) begin : g_rt
    assign rt_in_valid[n] = in_q[n].size() > 0;
    assign rt_in_pkt[n]   = (in_q[n].size() > 0) ? in_q[n][0] : '0;
    always @(negedge clk) rt_out_ready[n] <= ($urandom_range(0, 99) < 60);
    always @(posedge clk) if (rst_n) begin
      if (rt_in_valid[n] && rt_in_ready[n]) void'(in_q[n].pop_front());
      if (rt_out_valid[n] && rt_out_ready[n]) begin
        checks++;
        if (exp_out[n].size() == 0 || rt_out_pkt[n] != exp_out[n][0]) begin
          failures++;
          $display("FAIL router %0d got %h expected %h", n, rt_out_pkt[n],
                   exp_out[n].size() ? exp_out[n][0] : '0);
        end
        if (exp_out[n].size() > 0) void'(exp_out[n].pop_front());
      end
    end
  end
  always @(posedge clk) if (arb_conflict[5]) n_conf++;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] shared_word(input logic [18:0] ma);
    case (ma[18:17])
      2'd0: return g_bank[0].u_bank.mem[ma[16:2]];
      2'd1: return g_bank[1].u_bank.mem[ma[16:2]];
      2'd2: return g_bank[2].u_bank.mem[ma[16:2]];
      default: return g_bank[3].u_bank.mem[ma[16:2]];
    endcase
  endfunction

  function automatic logic [31:0] book_word(input int core, input int bucket, input logic flag);
    return g_bank[4].u_bank.mem[{4'(core), 10'(bucket), flag}];
  endfunction

  function automatic pkt_t msg(input msg_type_e t, input logic net, input logic [18:0] ma,
                               input logic [31:0] d);
    pkt_t p;
    p = '0;
    p.mtype = t;
    p.ntwk = net;
    p.maddr = ma;
    p.data = d;
    p.size = (t == MSG_CAS) ? 3'd2 : 3'd4;
    p.dest_x = MX;
    p.dest_y = MY;
    return p;
  endfunction

  function automatic pkt_t resp_to(input pkt_t rq, input logic [31:0] d);
    pkt_t r;
    r = '0;
    r.size = 3'd4;
    r.ntwk = ~rq.ntwk;
    r.mtype = MSG_RESP;
    r.maddr = 19'({rq.data[13:0], 3'b000});
    r.dest_y = rq.data[25:21];
    r.dest_x = rq.data[20:16];
    r.data = d;
    return r;
  endfunction

  int no;
  task automatic op(input logic [31:0] a, input logic [31:0] d);
    u_core.op_a[no] = a;
    u_core.op_w[no] = 1'b1;
    u_core.op_d[no] = d;
    no++;
  endtask

  task automatic play;
    u_core.n_ops = no;
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    wait (!busy);
    u_core.op_first = no;
  endtask

  initial begin
    pkt_t p;
    logic [31:0] w0, w1;
    go = 1'b0;
    no = 0;
    for (int i = 0; i < int'(N_ARB); i++) arb_cfg[i] = '{mode: ARB_ALTERNATE, pref: 1'b0, count: 8'd0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin
      g_bank[1].u_bank.mem[k] = 32'h1000_0000 + 32'(k * 17);
      g_bank[4].u_bank.mem[{4'd3, 10'(k), 1'b1}] = 32'd0;
      g_bank[4].u_bank.mem[{4'd5, 10'(k), 1'b1}] = 32'd0;
    end

    // ---- from the routers: writes, a response, a read and a CAS
    in_q[0].push_back(msg(MSG_WRITE, 1'b0, 19'h0_0100, 32'hAAAA_0001));
    in_q[1].push_back(msg(MSG_WRITE, 1'b1, 19'h6_0104, 32'hBBBB_0002));
    in_q[0].push_back(msg(MSG_WRITE, 1'b0, 19'h2_0108, 32'hCCCC_0003));
    in_q[1].push_back(msg(MSG_RESP, 1'b1, 19'({4'd3, 10'd7, 3'b000}), 32'h5151_7272));
    p = msg(MSG_READ, 1'b1, 19'h2_0008, {6'd0, 5'd3, 5'd0, 2'd0, 4'd9, 10'd44});
    exp_out[0].push_back(resp_to(p, 32'h1000_0000 + 32'(2 * 17)));
    in_q[1].push_back(p);
    w1 = 32'h1000_0000 + 32'(5 * 17);
    p = msg(MSG_CAS, 1'b0, 19'h2_0014, {6'd0, 5'd0, 5'd4, 2'd0, 4'd2, 10'd9});
    p.cas_cmp = w1[15:0];
    p.cas_swp = 16'h9999;
    exp_out[1].push_back(resp_to(p, 32'd1));
    in_q[0].push_back(p);
    repeat (200) @(posedge clk);
    chk("write from XY router", shared_word(19'h0_0100) == 32'hAAAA_0001);
    chk("write from YX router", shared_word(19'h6_0104) == 32'hBBBB_0002);
    chk("write to bank 1", shared_word(19'h2_0108) == 32'hCCCC_0003);
    chk("response data in bookkeeping", book_word(3, 7, 1'b0) == 32'h5151_7272);
    chk("response flag in bookkeeping", book_word(3, 7, 1'b1) == 32'd1);
    chk("CAS swapped", shared_word(19'h2_0014) == {w1[31:16], 16'h9999});
    chk("both routers delivered, conflict seen", n_conf > 0);

    // ---- from the core: remote traffic to other tiles
    op({2'b10, 1'b1, 5'd0, 5'd0, 19'h0_0040}, 32'h0404_0404);
    p = '0;
    p.size = 3'd4; p.data = 32'h0404_0404; p.ntwk = 1'b1; p.mtype = MSG_WRITE;
    p.maddr = 19'h40; p.dest_x = 5'd0; p.dest_y = 5'd0;
    exp_out[1].push_back(p);
    op({2'b10, 1'b0, 5'd7, 5'd3, 19'h1_0000}, 32'h0707_0303);
    p.data = 32'h0707_0303; p.ntwk = 1'b0; p.maddr = 19'h1_0000; p.dest_x = 5'd7; p.dest_y = 5'd3;
    exp_out[0].push_back(p);
    op(PKTZ_BASE | 32'h040 | (5 << 2), {1'b0, 1'b0, 1'b0, 5'd4, 5'd6, 19'h0_0200});
    op(PKTZ_BASE | 32'h180 | (5 << 2), 32'd12);
    p = '0;
    p.size = 3'd4; p.mtype = MSG_READ; p.ntwk = 1'b0; p.maddr = 19'h200; p.dest_x = 5'd4;
    p.dest_y = 5'd6; p.data = {6'd0, MY, MX, 2'd0, 4'd5, 10'd12};
    exp_out[0].push_back(p);
    play();
    repeat (100) @(posedge clk);

    // ---- from the core to its own tile: looped back
    op({2'b10, 1'b0, MX, MY, 19'h0_0300}, 32'h3030_3030);
    op(PKTZ_BASE | 32'h040 | (3 << 2), {1'b0, 1'b0, 1'b1, MX, MY, 19'h2_0000});
    op(PKTZ_BASE | 32'h180 | (3 << 2), 32'd2);
    w0 = 32'h1000_0000 + 32'(3 * 17);
    op(PKTZ_BASE | 32'h000 | (5 << 2), {w0[15:0], 16'h4242});
    op(PKTZ_BASE | 32'h040 | (5 << 2), {1'b0, 1'b1, 1'b0, MX, MY, 19'h2_000C});
    op(PKTZ_BASE | 32'h180 | (5 << 2), 32'd3);
    play();
    repeat (200) @(posedge clk);
    chk("loopback write", shared_word(19'h0_0300) == 32'h3030_3030);
    chk("loopback read data", book_word(3, 2, 1'b0) == 32'h1000_0000);
    chk("loopback read flag", book_word(3, 2, 1'b1) == 32'd1);
    chk("loopback CAS result", book_word(5, 3, 1'b0) == 32'd1);
    chk("loopback CAS flag", book_word(5, 3, 1'b1) == 32'd1);
    chk("loopback CAS swapped", shared_word(19'h2_000C) == {w0[31:16], 16'h4242});
    chk("all expected router messages seen", exp_out[0].size() == 0 && exp_out[1].size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
