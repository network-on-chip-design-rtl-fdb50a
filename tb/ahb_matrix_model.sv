// ahb_matrix_model: behavioural stand-in for the tile's AHB bus matrix.
//
// Not synthesizable design IP: a simple single-layer AHB interconnect for
// simulation. NM masters share one address/data pipeline to NS slaves
// (plus an internal default slave for unmapped addresses that answers OKAY
// with zero data). Grant is round-robin among masters presenting NONSEQ;
// the master whose data phase is completing keeps the bus if it issues
// again, and a master that wins a transfer with HMASTLOCK keeps the bus
// until it drops HMASTLOCK. A master sees HREADY high only when its data
// phase (if any) completes and its new address phase (if any) is granted.
// Tile address map: 0x2000_0000 + 128kB*i shared bank i (0..3),
// 0x2008_0000 bookkeeping (4), 0x4000_0000 configuration (5),
// 0x6000_0000 and 0x8000_0000-0xBFFF_FFFF packetizer (6).
module ahb_matrix_model
  import wsp_pkg::*;
#(
  parameter int NM = 16,
  parameter int NS = 7
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t m_req    [NM],
  output ahb_rsp_t m_rsp    [NM],
  output logic     s_hsel   [NS],
  output ahb_req_t s_req    [NS],
  output logic     s_hready [NS],
  input  ahb_rsp_t s_rsp    [NS],
  output int       n_xfer,
  output int       n_locked
);

  function automatic int decode(input logic [31:0] a);
    if (a[31:19] == 13'h0400)      return int'(a[18:17]);
    if (a[31:17] == 15'h1004)      return 4;
    if (a[31:12] == 20'h40000)     return 5;
    if (a[31:12] == 20'h60000)     return 6;
    if (a[31:30] == 2'b10)         return 6;
    return NS;
  endfunction

  logic dp_valid;
  int   dp_m, dp_s, rr;
  logic lock_valid;
  int   lock_m;
  logic slave_ready;
  logic granted;
  int   gm;

  int m_rr;

  always_comb begin
    m_rr = 0;
    slave_ready = 1'b1;
    if (dp_valid && dp_s < NS) slave_ready = s_rsp[dp_s].hready;
    granted = 1'b0;
    gm = 0;
    if (slave_ready) begin
      if (lock_valid && m_req[lock_m].hmastlock) begin
        granted = m_req[lock_m].htrans[1];
        gm = lock_m;
      end else if (dp_valid && m_req[dp_m].htrans[1]) begin
        granted = 1'b1;
        gm = dp_m;
      end else begin
        for (int k = 0; k < NM; k++) begin
          m_rr = (rr + k) % NM;
          if (!granted && m_req[m_rr].htrans[1]) begin
            granted = 1'b1;
            gm = m_rr;
          end
        end
      end
    end
    for (int s = 0; s < NS; s++) begin
      s_req[s]        = m_req[gm];
      s_req[s].hwdata = m_req[dp_m].hwdata;
      s_hsel[s]       = granted && decode(m_req[gm].haddr) == s;
      s_hready[s]     = slave_ready;
    end
    for (int m = 0; m < NM; m++) begin
      m_rsp[m].hresp  = 1'b0;
      m_rsp[m].hrdata = (dp_valid && dp_s < NS) ? s_rsp[dp_s].hrdata : 32'd0;
      m_rsp[m].hready = ((dp_valid && dp_m == m) ? slave_ready : 1'b1) &&
                        (m_req[m].htrans[1] ? (granted && gm == m) : 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid   <= 1'b0;
      dp_m       <= 0;
      dp_s       <= NS;
      rr         <= 0;
      lock_valid <= 1'b0;
      lock_m     <= 0;
      n_xfer     <= 0;
      n_locked   <= 0;
    end else begin
      if (lock_valid && !m_req[lock_m].hmastlock) lock_valid <= 1'b0;
      if (slave_ready) begin
        dp_valid <= granted;
        if (granted) begin
          dp_m   <= gm;
          dp_s   <= decode(m_req[gm].haddr);
          rr     <= (gm + 1) % NM;
          n_xfer <= n_xfer + 1;
          if (m_req[gm].hmastlock) begin
            lock_valid <= 1'b1;
            lock_m     <= gm;
            n_locked   <= n_locked + 1;
          end
        end
      end
    end
  end

endmodule
