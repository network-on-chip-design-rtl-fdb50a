// depacketizer2: serves READ and CAS requests arriving from the network.
//
// It is an AHB master on the tile bus. A READ becomes one AHB read of the
// shared memory at SHARED_BASE + memory address; the word read is returned in
// a RESPONSE message. A CAS reads the 32-bit word holding the 16-bit target
// (address bit 1 picks the half), compares it with the compare value and, on
// a match, writes the swap value back as a halfword. HMASTLOCK is held from
// the read through the write so that no other master can slip in between.
// The RESPONSE carries 1 (success) or 0 (failure).
//
// A RESPONSE goes to the tile that issued the request (source coordinates
// from the request's packet-data word) on the opposite network, so it
// crosses the same tiles as the request. Its memory-address field holds the
// bookkeeping offset {core, bucket, 1'b0, 2'b00} of the issuer's bucket.
//
// Control follows the published eight-state machine: INIT, CAS ADDR, CAS
// COMPARE, CAS SWAP, CAS RETURN, READ ADDR, READ DATA, ROUTER WAIT. The
// response is offered (out_valid) in the cycle the bus completes the last
// transfer; if the router side is not ready it is registered and held in
// ROUTER WAIT. The next request is taken in the same cycle the response
// leaves. Output field encodings are this design's choices.
module depacketizer2
  import wsp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  pkt_t     in_pkt,
  output logic     in_ready,
  output ahb_req_t m_req,
  input  ahb_rsp_t m_rsp,
  output logic     out_valid,
  output pkt_t     out_pkt,
  input  logic     out_ready
);

  typedef enum logic [2:0] {
    S_INIT  = 3'd0,
    S_CADDR = 3'd1,
    S_CCMP  = 3'd2,
    S_CSWAP = 3'd3,
    S_CRET  = 3'd4,
    S_RADDR = 3'd5,
    S_RDATA = 3'd6,
    S_RWAIT = 3'd7
  } state_e;

  state_e state_q, state_d;
  pkt_t   msg_q;
  pkt_t   resp_q;
  pkt_t   resp;
  logic   swapped_q;      // a CAS write data phase is outstanding in CAS RETURN
  logic   success_q;
  logic   resp_now;       // the response is ready this cycle
  logic   take;
  logic [15:0] cur_half;

  assign cur_half = msg_q.maddr[1] ? m_rsp.hrdata[31:16] : m_rsp.hrdata[15:0];

  // response built from the request
  always_comb begin
    resp        = '0;
    resp.size   = 3'd4;
    resp.ntwk   = ~msg_q.ntwk;
    resp.mtype  = MSG_RESP;
    resp.maddr  = MADDR_W'({msg_q.data[13:0], 3'b000});
    resp.dest_y = msg_q.data[25:21];
    resp.dest_x = msg_q.data[20:16];
    resp.data   = (state_q == S_RDATA) ? m_rsp.hrdata : {31'd0, success_q};
  end

  always_comb begin
    resp_now = 1'b0;
    unique case (state_q)
      S_RDATA: resp_now = m_rsp.hready;
      S_CRET:  resp_now = !swapped_q || m_rsp.hready;
      default: ;
    endcase
    out_valid = resp_now || (state_q == S_RWAIT);
    out_pkt   = (state_q == S_RWAIT) ? resp_q : resp;
    in_ready  = (state_q == S_INIT) || (out_valid && out_ready);
  end

  assign take = in_valid && in_ready;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_CADDR: if (m_rsp.hready) state_d = S_CCMP;
      S_CCMP:  if (m_rsp.hready) state_d = (cur_half == msg_q.cas_cmp) ? S_CSWAP : S_CRET;
      S_CSWAP: if (m_rsp.hready) state_d = S_CRET;
      S_RADDR: if (m_rsp.hready) state_d = S_RDATA;
      S_RDATA, S_CRET: if (resp_now) state_d = out_ready ? S_INIT : S_RWAIT;
      S_RWAIT: if (out_ready) state_d = S_INIT;
      default: ;
    endcase
    if (take) state_d = (in_pkt.mtype == MSG_CAS) ? S_CADDR : S_RADDR;
  end

  always_comb begin
    m_req        = '0;
    m_req.htrans = HTRANS_IDLE;
    m_req.hsize  = 3'd2;
    unique case (state_q)
      S_RADDR: begin
        m_req.htrans = HTRANS_NONSEQ;
        m_req.haddr  = SHARED_BASE | 32'(msg_q.maddr);
      end
      S_CADDR: begin
        m_req.htrans    = HTRANS_NONSEQ;
        m_req.hmastlock = 1'b1;
        m_req.haddr     = SHARED_BASE | 32'({msg_q.maddr[MADDR_W-1:2], 2'b00});
      end
      S_CCMP: m_req.hmastlock = 1'b1;
      S_CSWAP: begin
        m_req.htrans    = HTRANS_NONSEQ;
        m_req.hmastlock = 1'b1;
        m_req.hwrite    = 1'b1;
        m_req.hsize     = 3'd1;
        m_req.haddr     = SHARED_BASE | 32'({msg_q.maddr[MADDR_W-1:1], 1'b0});
      end
      S_CRET: m_req.hwdata = {msg_q.cas_swp, msg_q.cas_swp};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_INIT;
      msg_q     <= '0;
      resp_q    <= '0;
      swapped_q <= 1'b0;
      success_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (take) msg_q <= in_pkt;
      if (resp_now && !out_ready) resp_q <= resp;
      if (state_q == S_CCMP && m_rsp.hready) begin
        success_q <= (cur_half == msg_q.cas_cmp);
        swapped_q <= 1'b0;
      end
      if (state_q == S_CSWAP && m_rsp.hready) swapped_q <= 1'b1;
    end
  end

  // An offered response is held unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_pkt));

endmodule
