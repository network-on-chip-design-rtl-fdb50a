// ahb_sram: zero-wait-state AHB slave memory bank.
//
// Used for every memory of a tile: the four 128kB shared banks, the 128kB
// bookkeeping bank that receives the answers to remote reads and CAS, and
// the 64kB private instruction/data memory of each core. Only the sizes come
// from the design; the bank itself is this design's simplest form of an
// on-chip SRAM behind an AHB port.
//
// Timing: the address phase is registered; in the following data phase a
// read returns the addressed word and a write stores HWDATA on the byte
// lanes selected by HSIZE and the low address bits. HREADYOUT is always 1,
// so a read directly after a write to the same word sees the new data.
module ahb_sram
  import wsp_pkg::*;
#(
  parameter int unsigned BYTES = 131072
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_req_t s_req,
  input  logic     hready_in,
  output ahb_rsp_t s_rsp
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic          dp_wr_q, dp_rd_q;
  logic [AW-1:0] dp_word_q;
  logic [3:0]    dp_be_q;
  logic [3:0]    be;

  always_comb begin
    unique case (s_req.hsize)
      3'd0:    be = 4'b0001 << s_req.haddr[1:0];
      3'd1:    be = s_req.haddr[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_wr_q   <= 1'b0;
      dp_rd_q   <= 1'b0;
      dp_word_q <= '0;
      dp_be_q   <= '0;
    end else if (hready_in) begin
      dp_wr_q   <= hsel && s_req.htrans[1] &&  s_req.hwrite;
      dp_rd_q   <= hsel && s_req.htrans[1] && !s_req.hwrite;
      dp_word_q <= s_req.haddr[AW+1:2];
      dp_be_q   <= be;
    end
  end

  always_ff @(posedge clk) begin
    if (dp_wr_q) begin
      for (int b = 0; b < 4; b++)
        if (dp_be_q[b]) mem[dp_word_q][8*b +: 8] <= s_req.hwdata[8*b +: 8];
    end
  end

  assign s_rsp.hready = 1'b1;
  assign s_rsp.hresp  = 1'b0;
  assign s_rsp.hrdata = dp_rd_q ? mem[dp_word_q] : 32'd0;

endmodule
