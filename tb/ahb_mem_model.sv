// ahb_mem_model: testbench AHB slave memory with random wait states.
//
// Sparse word memory (unwritten words read as zero). Each data phase is
// stretched by a random number of wait states, chosen with probability
// wait_pct percent per cycle. Every completed transfer is appended to a log
// (address, write flag, size, data, HMASTLOCK) that the testbench inspects.
// Intended for a single master: its HREADY is this slave's HREADYOUT.
module ahb_mem_model
  import wsp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  int       wait_pct,
  input  ahb_req_t s_req,
  output ahb_rsp_t s_rsp
);

  typedef struct {
    logic [31:0] a;
    logic        w;
    logic [2:0]  sz;
    logic [31:0] d;
    logic        lock;
  } xfer_t;

  logic [31:0] mem [int];
  xfer_t       log_q [$];

  logic        dv;
  logic [31:0] da;
  logic        dw;
  logic [2:0]  dsz;
  logic        dlock;
  logic        stall;

  always_comb begin
    s_rsp.hresp  = 1'b0;
    s_rsp.hready = !(dv && stall);
    s_rsp.hrdata = (dv && !dw && mem.exists(int'(da >> 2))) ? mem[int'(da >> 2)] : 32'd0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv    <= 1'b0;
      stall <= 1'b0;
    end else begin
      if (s_rsp.hready) begin
        if (dv) begin
          logic [31:0] cur;
          cur = mem.exists(int'(da >> 2)) ? mem[int'(da >> 2)] : 32'd0;
          if (dw) begin
            for (int b = 0; b < 4; b++)
              if ((dsz == 3'd2) || (dsz == 3'd1 && (b / 2) == int'(da[1])) ||
                  (dsz == 3'd0 && b == int'(da[1:0])))
                cur[8*b +: 8] = s_req.hwdata[8*b +: 8];
            mem[int'(da >> 2)] = cur;
            log_q.push_back('{da, 1'b1, dsz, s_req.hwdata, dlock});
          end else begin
            log_q.push_back('{da, 1'b0, dsz, cur, dlock});
          end
        end
        dv    <= s_req.htrans[1];
        da    <= s_req.haddr;
        dw    <= s_req.hwrite;
        dsz   <= s_req.hsize;
        dlock <= s_req.hmastlock;
        stall <= s_req.htrans[1] && ($urandom_range(0, 99) < wait_pct);
      end else begin
        stall <= ($urandom_range(0, 99) < wait_pct);
      end
    end
  end

endmodule
