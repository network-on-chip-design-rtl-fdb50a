// tb_ahb_sram: self-checking test of the AHB memory bank.
//
// Plays pipelined AHB transfers into a bank of the default 128kB size: word
// writes across the whole bank, then halfword and byte writes, each followed
// at once by a read of the same word (read-after-write through the pipeline),
// then reads of everything. Expected values come from a byte-lane model kept
// in the testbench.
module tb_ahb_sram;
  import wsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic go, busy, hsel;
  ahb_req_t req;
  ahb_rsp_t rsp;

  ahb_seq_master #(.N(512)) u_m (
    .clk, .rst_n, .go, .busy, .hsel, .req, .hready(rsp.hready), .hrdata(rsp.hrdata)
  );
  ahb_sram dut (.clk, .rst_n, .hsel, .s_req(req), .hready_in(rsp.hready), .s_rsp(rsp));

  logic [31:0] model [int];
  logic [31:0] expv  [512];
  logic        isrd  [512];
  int n;

  task automatic add(input logic w, input logic [31:0] a, input logic [2:0] sz, input logic [31:0] d);
    u_m.op_a[n]  = a;
    u_m.op_w[n]  = w;
    u_m.op_sz[n] = sz;
    u_m.op_d[n]  = d;
    isrd[n]      = !w;
    if (w) begin
      logic [31:0] cur;
      cur = model.exists(int'(a >> 2)) ? model[int'(a >> 2)] : 32'd0;
      for (int b = 0; b < 4; b++)
        if ((sz == 3'd2) || (sz == 3'd1 && (b / 2) == int'(a[1])) || (sz == 3'd0 && b == int'(a[1:0])))
          cur[8*b +: 8] = d[8*b +: 8];
      model[int'(a >> 2)] = cur;
    end else begin
      expv[n] = model[int'(a >> 2)];
    end
    n++;
  endtask

  initial begin
    logic [31:0] a;
    go = 1'b0;
    n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // word writes spread over the bank, including first and last word
    for (int i = 0; i < 64; i++) begin
      a = (i == 63) ? 32'h0001_FFFC : 32'(i * 2044) & 32'h1_FFFC;
      add(1'b1, a, 3'd2, $urandom());
    end
    // halfword and byte writes, each read back right away
    for (int i = 0; i < 40; i++) begin
      a = 32'(i * 2044) & 32'h1_FFFC;
      add(1'b1, a | 32'(i % 2 * 2), 3'd1, $urandom());
      add(1'b0, a, 3'd2, 0);
      add(1'b1, a | 32'(i % 4), 3'd0, $urandom());
      add(1'b0, a, 3'd2, 0);
    end
    for (int i = 0; i < 64; i++) begin
      a = (i == 63) ? 32'h0001_FFFC : 32'(i * 2044) & 32'h1_FFFC;
      if (i % 5 == 0) u_m.op_idle[n] = 1'b1;
      add(1'b0, a, 3'd2, 0);
    end
    u_m.n_ops = n;
    @(negedge clk);
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    wait (!busy);
    @(posedge clk);
    for (int i = 0; i < n; i++)
      if (isrd[i] && !u_m.op_idle[i]) begin
        checks++;
        if (u_m.rd[i] !== expv[i]) begin
          failures++;
          $display("FAIL read %0d at %08h: %08h expected %08h", i, u_m.op_a[i], u_m.rd[i], expv[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
