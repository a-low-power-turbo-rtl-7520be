// Self-checking testbench of lifo_rev: windows of DEPTH items come out
// reversed, one window later, with gaps between pushes.
`include "tb/tb_common.svh"
module tb_lifo_rev;
  localparam int D = 20, W = 8;
  logic clk = 0, rst = 1, push = 0, out_valid;
  logic [W-1:0] din, dout;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  lifo_rev #(.DEPTH(D), .W(W)) dut (.*);
  int sent = 0, got = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    int w, i;
    w = got / D; i = got % D;
    `CHECK(dout == W'(w * D + (D - 1 - i)), "reversed order")
    got++;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    while (sent < 10 * D) begin
      @(negedge clk);
      push = ($urandom % 3 != 0);
      din = W'(sent);
      if (push) sent++;
    end
    @(negedge clk); push = 0;
    repeat (5) @(posedge clk);
    `CHECK(got == 9 * D, "number of items popped")
    finish_tb();
  end
endmodule
