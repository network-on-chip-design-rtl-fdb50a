// depacketizer: AHB master that stores incoming WRITE and RESPONSE messages.
//
// A WRITE message becomes one AHB write into the tile's shared memory at
// SHARED_BASE + memory address, with the size and byte lanes the sender
// used. A RESPONSE message (the answer to a read or CAS this tile issued)
// becomes two AHB word writes into the bookkeeping memory: the returned word
// into the bucket's data word, then 1 into the bucket's valid flag, so that a
// core polling the flag sees the data already in place.
//
// Control follows the published six-state machine: INIT, WRITE ADDRESS,
// WRITE DATA, RESP ADDR1, RESP DATA1/ADDR2 (data of the first write overlaps
// the address of the second), RESP DATA2. Each state waits for HREADY. A new
// message is taken (in_ready) in INIT or in the last data phase of the
// previous one, so back-to-back messages follow with no idle cycle.
// This design's choice: a RESPONSE carries the bookkeeping offset of its
// bucket, {core, bucket, 1'b0, 2'b00}, in its memory-address field.
module depacketizer
  import wsp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  pkt_t     in_pkt,
  output logic     in_ready,
  output ahb_req_t m_req,
  input  ahb_rsp_t m_rsp
);

  typedef enum logic [2:0] {
    S_INIT   = 3'd0,
    S_WADDR  = 3'd1,
    S_WDATA  = 3'd2,
    S_RADDR1 = 3'd3,
    S_RDATA1 = 3'd4,   // data of bucket word, address of valid flag
    S_RDATA2 = 3'd5
  } state_e;

  state_e state_q, state_d;
  pkt_t   msg_q;
  logic   take;
  logic [31:0] book_data_addr;

  assign in_ready = (state_q == S_INIT) ||
                    ((state_q == S_WDATA || state_q == S_RDATA2) && m_rsp.hready);
  assign take     = in_valid && in_ready;
  assign book_data_addr = BOOK_BASE | 32'(msg_q.maddr[16:0] & 17'h1fff8);

  function automatic logic [2:0] hsize_of(input logic [2:0] bytes);
    return (bytes == 3'd1) ? 3'd0 : (bytes == 3'd2) ? 3'd1 : 3'd2;
  endfunction

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_INIT:   ;
      S_WADDR:  if (m_rsp.hready) state_d = S_WDATA;
      S_WDATA:  if (m_rsp.hready) state_d = S_INIT;
      S_RADDR1: if (m_rsp.hready) state_d = S_RDATA1;
      S_RDATA1: if (m_rsp.hready) state_d = S_RDATA2;
      S_RDATA2: if (m_rsp.hready) state_d = S_INIT;
      default:  state_d = S_INIT;
    endcase
    if (take) state_d = (in_pkt.mtype == MSG_RESP) ? S_RADDR1 : S_WADDR;
  end

  always_comb begin
    m_req           = '0;
    m_req.htrans    = HTRANS_IDLE;
    m_req.hsize     = 3'd2;
    unique case (state_q)
      S_WADDR: begin
        m_req.htrans = HTRANS_NONSEQ;
        m_req.hwrite = 1'b1;
        m_req.haddr  = SHARED_BASE | 32'(msg_q.maddr);
        m_req.hsize  = hsize_of(msg_q.size);
      end
      S_WDATA: m_req.hwdata = msg_q.data;
      S_RADDR1: begin
        m_req.htrans = HTRANS_NONSEQ;
        m_req.hwrite = 1'b1;
        m_req.haddr  = book_data_addr;
      end
      S_RDATA1: begin
        m_req.htrans = HTRANS_NONSEQ;
        m_req.hwrite = 1'b1;
        m_req.haddr  = book_data_addr | 32'h4;
        m_req.hwdata = msg_q.data;
      end
      S_RDATA2: m_req.hwdata = 32'd1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      msg_q   <= '0;
    end else begin
      state_q <= state_d;
      if (take) msg_q <= in_pkt;
    end
  end

endmodule
