// msg_arbiter: two-input arbiter for single-flit network messages.
//
// Every message path of the tile network interface that merges two sources
// goes through one of these. Inputs and output use a valid/ready handshake:
// a source holds its message and valid until ready is seen. A message moves
// in the cycle where out_valid and out_ready are both high.
//
// Arbitration only matters on a conflict (both inputs valid). Three modes,
// selected by the tile configuration registers:
//   ARB_ALTERNATE  the input holding priority wins, and priority passes to
//                  the other input after every conflict (the default mode);
//   ARB_STRICT     cfg.pref always wins;
//   ARB_RELAXED    cfg.pref wins cfg.count conflicts, then the other input
//                  wins a single conflict, and the pattern repeats.
// The three modes are the published behaviour. This design adds a grant lock:
// once a message is offered and not taken, the same input stays selected
// until it is taken, so the output obeys the hold-until-ready rule. Output is
// combinational from the inputs (no added latency).
module msg_arbiter
  import wsp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  arb_cfg_t cfg,
  input  logic     in_valid [2],
  input  pkt_t     in_pkt   [2],
  output logic     in_ready [2],
  output logic     out_valid,
  output pkt_t     out_pkt,
  input  logic     out_ready,
  output logic     conflict      // both inputs valid this cycle (for counters)
);

  logic       prio_q;     // alternate mode: input with priority
  logic [7:0] cnt_q;      // relaxed mode: conflicts won by cfg.pref in a row
  logic       lock_q;     // a message was offered and not yet taken
  logic       lock_sel_q;
  logic       win;        // winner on conflict
  logic       sel;

  assign conflict = in_valid[0] && in_valid[1];

  always_comb begin
    unique case (cfg.mode)
      ARB_STRICT:  win = cfg.pref;
      ARB_RELAXED: win = (cnt_q < cfg.count) ? cfg.pref : ~cfg.pref;
      default:     win = prio_q;
    endcase
    if (lock_q)           sel = lock_sel_q;
    else if (conflict)    sel = win;
    else                  sel = in_valid[1];
  end

  assign out_valid   = in_valid[sel];
  assign out_pkt     = in_pkt[sel];
  assign in_ready[0] = out_ready && !sel;
  assign in_ready[1] = out_ready &&  sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_q     <= 1'b0;
      cnt_q      <= '0;
      lock_q     <= 1'b0;
      lock_sel_q <= 1'b0;
    end else begin
      lock_q     <= out_valid && !out_ready;
      lock_sel_q <= sel;
      // A conflict is resolved when the winner's message is taken.
      if (conflict && out_ready) begin
        prio_q <= ~sel;
        if (sel == cfg.pref) cnt_q <= cnt_q + 8'd1;
        else                 cnt_q <= '0;
      end
    end
  end

endmodule
