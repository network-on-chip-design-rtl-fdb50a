// packetizer: AHB slave that turns core stores into network messages.
//
// Two address regions reach it through the tile bus:
//   * remote writes, 0x8000_0000-0xBFFF_FFFF: {2'b10, network, dest x[4:0],
//     dest y[4:0], memory address[18:0]}. The data phase of the store becomes
//     a WRITE message carrying the store data as it appears on HWDATA.
//   * request registers, 0x6000_0000-0x6000_01FF: {20'h60000, 3'b000, send,
//     register[1:0], core[3:0], 2'b00}. Each core has a data register (CAS
//     compare value in [31:16], swap value in [15:0]), an address register
//     ({1'b0, CAS/read, network, dest x, dest y, memory address}) and a bucket
//     register (bucket index in [9:0]). A store with the send bit set also
//     issues a READ or CAS request from that core's registers.
// The control follows the published four-state machine (INIT, WRITE
// TRANSMIT, REGISTER STORE, REQUEST TRANSMIT). A message is offered on
// out_valid/out_pkt and held until out_ready. In WRITE TRANSMIT the AHB data
// phase is stretched (HREADYOUT low) until the message is taken. A bus
// transfer that arrives while a request is being transmitted has its data
// phase stretched until the request is taken.
//
// This design's choices: the encoding of READ (address bit 30 = 0) and CAS
// (bit 30 = 1); request messages carry {source y, source x, core, bucket} in
// their packet-data word so that the response can find its way back; the
// size field is 1 << HSIZE for writes, 4 for reads and 2 for CAS; register
// reads return the register value; the reserved register slot is ignored.
module packetizer
  import wsp_pkg::*;
#(
  parameter int unsigned NCORE = N_CORES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] tile_x,
  input  logic [COORD_W-1:0] tile_y,
  // AHB slave
  input  logic               hsel,
  input  ahb_req_t           s_req,
  input  logic               hready_in,
  output ahb_rsp_t           s_rsp,
  // outgoing message
  output logic               out_valid,
  output pkt_t               out_pkt,
  input  logic               out_ready
);

  typedef enum logic [1:0] {
    S_INIT     = 2'd0,
    S_WRITE    = 2'd1,
    S_REGSTORE = 2'd2,
    S_REQUEST  = 2'd3
  } state_e;

  state_e      state_q, state_d;
  logic [31:0] data_r   [NCORE];
  logic [31:0] addr_r   [NCORE];
  logic [31:0] bucket_r [NCORE];

  // captured address phase
  logic [31:0] dp_addr_q;
  logic        dp_write_q;
  logic [2:0]  dp_size_q;
  logic        dp_pend_q, dp_pend_d;   // address phase waiting during REQUEST
  logic [CORE_W-1:0] req_core_q;

  logic        capture;
  logic [CORE_W-1:0] dp_core;
  logic [1:0]  dp_reg;
  logic        dp_send;
  logic        core_ok;

  assign capture = hsel && s_req.htrans[1] && hready_in;
  assign dp_core = dp_addr_q[5:2];
  assign dp_reg  = dp_addr_q[7:6];
  assign dp_send = dp_addr_q[8];
  assign core_ok = 32'(dp_core) < NCORE;

  function automatic state_e region(input logic [31:0] a);
    return (a[31:30] == 2'b10) ? S_WRITE : S_REGSTORE;
  endfunction

  // next state
  always_comb begin
    state_d   = state_q;
    dp_pend_d = 1'b0;
    unique case (state_q)
      S_INIT:  if (capture) state_d = region(s_req.haddr);
      S_WRITE: if (out_ready) state_d = capture ? region(s_req.haddr) : S_INIT;
      S_REGSTORE: begin
        if (dp_write_q && dp_send && dp_reg != 2'b11 && core_ok) begin
          state_d   = S_REQUEST;
          dp_pend_d = capture;
        end else begin
          state_d = capture ? region(s_req.haddr) : S_INIT;
        end
      end
      S_REQUEST: begin
        if (out_ready) begin
          if (capture)        state_d = region(s_req.haddr);
          else if (dp_pend_q) state_d = region(dp_addr_q);
          else                state_d = S_INIT;
        end else begin
          dp_pend_d = dp_pend_q || capture;
        end
      end
      default: state_d = S_INIT;
    endcase
  end

  // outgoing message
  logic [31:0] ra;
  logic [31:0] rd;
  logic [31:0] rb;
  always_comb begin
    ra = (32'(req_core_q) < NCORE) ? addr_r[req_core_q]   : '0;
    rd = (32'(req_core_q) < NCORE) ? data_r[req_core_q]   : '0;
    rb = (32'(req_core_q) < NCORE) ? bucket_r[req_core_q] : '0;
    out_pkt = '0;
    if (state_q == S_WRITE) begin
      out_pkt.size   = 3'(1 << dp_size_q[1:0]);
      out_pkt.data   = s_req.hwdata;
      out_pkt.ntwk   = dp_addr_q[29];
      out_pkt.mtype  = MSG_WRITE;
      out_pkt.maddr  = dp_addr_q[18:0];
      out_pkt.dest_x = dp_addr_q[28:24];
      out_pkt.dest_y = dp_addr_q[23:19];
    end else begin
      out_pkt.size    = ra[30] ? 3'd2 : 3'd4;
      out_pkt.cas_cmp = ra[30] ? rd[31:16] : 16'd0;
      out_pkt.cas_swp = ra[30] ? rd[15:0]  : 16'd0;
      out_pkt.data    = req_data(tile_y, tile_x, req_core_q, rb[BUCKET_W-1:0]);
      out_pkt.ntwk    = ra[29];
      out_pkt.mtype   = ra[30] ? MSG_CAS : MSG_READ;
      out_pkt.maddr   = ra[18:0];
      out_pkt.dest_x  = ra[28:24];
      out_pkt.dest_y  = ra[23:19];
    end
    out_valid = (state_q == S_WRITE) || (state_q == S_REQUEST);
  end

  // AHB response
  always_comb begin
    s_rsp.hresp  = 1'b0;
    s_rsp.hrdata = '0;
    unique case (state_q)
      S_WRITE:   s_rsp.hready = out_ready;
      S_REQUEST: s_rsp.hready = 1'b0;
      default:   s_rsp.hready = 1'b1;
    endcase
    if (state_q == S_REGSTORE && !dp_write_q && core_ok) begin
      unique case (dp_reg)
        2'b00:   s_rsp.hrdata = data_r[dp_core];
        2'b01:   s_rsp.hrdata = addr_r[dp_core];
        2'b10:   s_rsp.hrdata = bucket_r[dp_core];
        default: s_rsp.hrdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      dp_addr_q  <= '0;
      dp_write_q <= 1'b0;
      dp_size_q  <= '0;
      dp_pend_q  <= 1'b0;
      req_core_q <= '0;
      for (int i = 0; i < int'(NCORE); i++) begin
        data_r[i]   <= '0;
        addr_r[i]   <= '0;
        bucket_r[i] <= '0;
      end
    end else begin
      state_q   <= state_d;
      dp_pend_q <= dp_pend_d;
      if (capture) begin
        dp_addr_q  <= s_req.haddr;
        dp_write_q <= s_req.hwrite;
        dp_size_q  <= s_req.hsize;
      end
      if (state_q == S_REGSTORE && dp_write_q && core_ok) begin
        unique case (dp_reg)
          2'b00:   data_r[dp_core]   <= s_req.hwdata;
          2'b01:   addr_r[dp_core]   <= s_req.hwdata;
          2'b10:   bucket_r[dp_core] <= s_req.hwdata;
          default: ;
        endcase
        if (state_d == S_REQUEST) req_core_q <= dp_core;
      end
    end
  end

  // A message on offer stays unchanged until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_pkt);
  endproperty
  a_hold: assert property (p_hold);

endmodule
