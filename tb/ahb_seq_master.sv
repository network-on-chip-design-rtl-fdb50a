// ahb_seq_master: testbench AHB master that plays a list of transfers.
//
// The testbench fills op_* (address, write flag, size, write data, idle
// slot) for transfers op_first..n_ops-1 and raises go. The transfers are issued fully
// pipelined: the address phase of one overlaps the data phase of the one
// before, and both wait while HREADY is low. An idle slot issues one IDLE
// cycle. Read data is stored in rd[] at the index of its transfer; busy falls
// when the last data phase has completed.
module ahb_seq_master
  import wsp_pkg::*;
#(
  parameter int N = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  output logic        busy,
  output logic        hsel,
  output ahb_req_t    req,
  input  logic        hready,
  input  logic [31:0] hrdata
);

  logic [31:0] op_a    [N];
  logic        op_w    [N];
  logic [2:0]  op_sz   [N];
  logic [31:0] op_d    [N];
  logic        op_idle [N];
  logic        op_lock [N];
  logic [31:0] rd      [N];
  int          n_ops;
  int          op_first;

  int   ai, di;
  logic av, dv, didle;

  initial begin
    for (int i = 0; i < N; i++) begin
      op_idle[i] = 1'b0;
      op_lock[i] = 1'b0;
      op_w[i]    = 1'b0;
      op_sz[i]   = 3'd2;
      op_a[i]    = '0;
      op_d[i]    = '0;
      rd[i]      = '0;
    end
    n_ops = 0;
    op_first = 0;
  end

  always_comb begin
    req           = '0;
    req.htrans    = (av && !op_idle[ai]) ? HTRANS_NONSEQ : HTRANS_IDLE;
    req.haddr     = op_a[ai];
    req.hwrite    = op_w[ai];
    req.hsize     = op_sz[ai];
    req.hmastlock = av && op_lock[ai];
    req.hwdata    = op_d[di];
    hsel          = av && !op_idle[ai];
    busy          = av || dv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ai <= 0;
      di <= 0;
      av <= 1'b0;
      dv <= 1'b0;
      didle <= 1'b1;
    end else if (go && !busy) begin
      ai <= op_first;
      av <= n_ops > op_first;
    end else if (hready) begin
      if (dv && !op_w[di] && !didle) rd[di] <= hrdata;
      dv    <= av;
      di    <= ai;
      didle <= op_idle[ai];
      if (av) begin
        ai <= ai + 1;
        av <= (ai + 1) < n_ops;
      end
    end
  end

endmodule
