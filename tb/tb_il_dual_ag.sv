// Self-checking testbench of il_dual_ag: with two AGs one valid interleaved
// address is delivered every enabled cycle (no stall); the sequence must be
// the valid addresses of the counter sweep in order, and invalid ones must
// actually have occurred (second AG used). The natural order is checked too.
`include "tb/tb_common.svh"
module tb_il_dual_ag;
  localparam int N = 20730, NB = 10;
  logic clk = 0, rst = 1, en = 0, permute = 1;
  logic [14:0] addr;
  logic skipped;
  always #5 clk = !clk;
  `WATCHDOG(clk, 200000)
  il_dual_ag #(.N(N), .NB(NB)) dut (.*);
  int tab [32] = '{1, 349, 303, 721, 973, 703, 761, 327, 453, 95, 241, 187, 497, 909, 769, 349,
                   71, 557, 197, 499, 409, 259, 335, 253, 677, 717, 313, 757, 189, 15, 75, 163};
  int exp_q [$];
  int skips = 0;
  initial begin
    for (int c = 0; c < (1 << (NB + 5)); c++) begin
      int lo, hi, r, t;
      lo = c & 31; hi = c >> 5; r = 0;
      for (int i = 0; i < 5; i++) if (lo & (1 << i)) r |= 1 << (4 - i);
      t = (r << NB) | ((((hi + 1) % (1 << NB)) * tab[lo]) % (1 << NB));
      if (t < N) exp_q.push_back(t);
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      en = 1;
      `CHECK(int'(addr) == exp_q[k], "interleaved address sequence")
      if (skipped) skips++;
    end
    `CHECK(skips > 0, "second AG used for invalid addresses")
    @(negedge clk); en = 0; rst = 1; permute = 0;
    @(negedge clk); rst = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      en = 1;
      `CHECK(int'(addr) == k, "natural order")
    end
    $display("invalid addresses bridged: %0d", skips);
    finish_tb();
  end
endmodule
