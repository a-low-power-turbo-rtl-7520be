// Self-checking testbench of il_agen: every counter value against the
// 3GPP2 interleaver formula, and the accepted addresses of a full counter
// sweep must form a permutation of 0..N-1 (N = 20730, n = 10).
`include "tb/tb_common.svh"
module tb_il_agen;
  localparam int N = 20730, NB = 10;
  logic [NB+4:0] cnt;
  logic [14:0] addr;
  logic valid;
  logic clk = 0;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  il_agen #(.N(N), .NB(NB)) dut (.*);
  int tab [32] = '{1, 349, 303, 721, 973, 703, 761, 327, 453, 95, 241, 187, 497, 909, 769, 349,
                   71, 557, 197, 499, 409, 259, 335, 253, 677, 717, 313, 757, 189, 15, 75, 163};
  bit seen [N];
  int count = 0;
  initial begin
    for (int c = 0; c < (1 << (NB + 5)); c++) begin
      int lo, hi, r, t;
      cnt = (NB+5)'(c);
      #1;
      lo = c & 31; hi = c >> 5;
      r = 0;
      for (int i = 0; i < 5; i++) if (lo & (1 << i)) r |= 1 << (4 - i);
      t = (r << NB) | ((((hi + 1) % (1 << NB)) * tab[lo]) % (1 << NB));
      `CHECK(valid == (t < N), "valid flag")
      if (t < N) begin
        `CHECK(int'(addr) == t, "address")
        `CHECK(!seen[t], "address repeated")
        seen[t] = 1;
        count++;
      end
    end
    `CHECK(count == N, "N valid addresses")
    finish_tb();
  end
endmodule
