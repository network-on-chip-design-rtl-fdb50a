// config_regs: tile configuration registers (AHB slave).
//
// Holds the behaviour of the six message arbiters of the network interface.
// Register i (byte offset 4*i, i = 0..N_ARB-1) configures arbiter i:
//   [1:0]  mode: 0 alternate priority on every conflict (reset value),
//               1 strict priority, 2 relaxed priority
//   [2]    preferred input for the strict and relaxed modes
//   [15:8] relaxed mode: conflicts the preferred input wins before the
//          other input wins one
// Arbiter numbering: 0 depacketizer input, 1 depacketizer2 input, 2 local
// loopback, 3 XY router input, 4 YX router input, 5 network receive.
// The three modes are the published arbiter behaviour; the register layout,
// numbering and offsets are this design's choices. Zero wait states; reads
// return the register, writes take effect at the end of the data phase.
module config_regs
  import wsp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_req_t s_req,
  input  logic     hready_in,
  output ahb_rsp_t s_rsp,
  output arb_cfg_t arb_cfg [N_ARB]
);

  logic       dp_wr_q, dp_rd_q;
  logic [2:0] dp_idx_q;
  logic       dp_ok;

  assign dp_ok = 32'(dp_idx_q) < N_ARB;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_wr_q  <= 1'b0;
      dp_rd_q  <= 1'b0;
      dp_idx_q <= '0;
      for (int i = 0; i < int'(N_ARB); i++) arb_cfg[i] <= '{mode: ARB_ALTERNATE, pref: 1'b0, count: 8'd0};
    end else begin
      if (hready_in) begin
        dp_wr_q  <= hsel && s_req.htrans[1] &&  s_req.hwrite;
        dp_rd_q  <= hsel && s_req.htrans[1] && !s_req.hwrite;
        dp_idx_q <= s_req.haddr[4:2];
      end
      if (dp_wr_q && dp_ok) begin
        arb_cfg[dp_idx_q].mode  <= arb_mode_e'(s_req.hwdata[1:0]);
        arb_cfg[dp_idx_q].pref  <= s_req.hwdata[2];
        arb_cfg[dp_idx_q].count <= s_req.hwdata[15:8];
      end
    end
  end

  assign s_rsp.hready = 1'b1;
  assign s_rsp.hresp  = 1'b0;
  assign s_rsp.hrdata = (dp_rd_q && dp_ok)
                        ? {16'd0, arb_cfg[dp_idx_q].count, 5'd0, arb_cfg[dp_idx_q].pref,
                           arb_cfg[dp_idx_q].mode}
                        : 32'd0;

endmodule
