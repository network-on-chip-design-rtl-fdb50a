// msg_sort: splits one message stream by message type.
//
// Writes and responses go to output 0, toward the depacketizer, which writes
// them into memory. Read and CAS requests go to output 1, toward the
// depacketizer2, which serves them. Purely combinational; the handshake of
// the selected output is passed straight back to the input.
module msg_sort
  import wsp_pkg::*;
(
  input  logic in_valid,
  input  pkt_t in_pkt,
  output logic in_ready,
  output logic out_valid [2],
  output pkt_t out_pkt   [2],
  input  logic out_ready [2]
);

  logic to_d2;
  assign to_d2        = (in_pkt.mtype == MSG_READ) || (in_pkt.mtype == MSG_CAS);
  assign out_valid[0] = in_valid && !to_d2;
  assign out_valid[1] = in_valid &&  to_d2;
  assign out_pkt[0]   = in_pkt;
  assign out_pkt[1]   = in_pkt;
  assign in_ready     = to_d2 ? out_ready[1] : out_ready[0];

endmodule
