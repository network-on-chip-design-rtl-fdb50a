// dor_router_model: behavioural stand-in for a 5-port mesh router.
//
// Not design IP: a small simulation model of a dimension-order router with
// single-flit messages. Ports: 0 local tile, 1 +X, 2 -X, 3 +Y, 4 -Y. YX = 0
// routes X first then Y, YX = 1 routes Y first then X. Each input has a
// one-message buffer (ready while empty); each output picks round-robin among
// buffered messages routed to it and holds its choice until taken. The
// 'stall' input refuses new messages from the local tile, so tests can
// create back-pressure on the tile.
module dor_router_model
  import wsp_pkg::*;
#(
  parameter bit YX = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic               stall,
  input  logic               in_valid  [5],
  input  pkt_t               in_pkt    [5],
  output logic               in_ready  [5],
  output logic               out_valid [5],
  output pkt_t               out_pkt   [5],
  input  logic               out_ready [5]
);

  logic buf_v [5];
  pkt_t buf_p [5];
  int   rr    [5];
  int   sel   [5];
  logic hold  [5];
  int   hsel  [5];

  function automatic int route(input pkt_t p);
    int rx, ry;
    rx = (p.dest_x > my_x) ? 1 : (p.dest_x < my_x) ? 2 : 0;
    ry = (p.dest_y > my_y) ? 3 : (p.dest_y < my_y) ? 4 : 0;
    if (YX) return (ry != 0) ? ry : rx;
    return (rx != 0) ? rx : ry;
  endfunction

  int ci;

  always_comb begin
    ci = 0;
    for (int i = 0; i < 5; i++) in_ready[i] = !buf_v[i] && !(i == 0 && stall);
    for (int o = 0; o < 5; o++) begin
      sel[o] = -1;
      if (hold[o]) sel[o] = hsel[o];
      else
        for (int k = 0; k < 5; k++) begin
          ci = (rr[o] + k) % 5;
          if (sel[o] < 0 && buf_v[ci] && route(buf_p[ci]) == o) sel[o] = ci;
        end
      out_valid[o] = sel[o] >= 0;
      out_pkt[o]   = buf_p[(sel[o] >= 0) ? sel[o] : 0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        buf_v[i] <= 1'b0;
        buf_p[i] <= '0;
        rr[i]    <= 0;
        hold[i]  <= 1'b0;
        hsel[i]  <= 0;
      end
    end else begin
      for (int o = 0; o < 5; o++) begin
        hold[o] <= out_valid[o] && !out_ready[o];
        hsel[o] <= sel[o];
        if (out_valid[o] && out_ready[o]) begin
          buf_v[sel[o]] <= 1'b0;
          rr[o]         <= (sel[o] + 1) % 5;
        end
      end
      for (int i = 0; i < 5; i++)
        if (in_valid[i] && in_ready[i]) begin
          buf_v[i] <= 1'b1;
          buf_p[i] <= in_pkt[i];
        end
    end
  end

endmodule
