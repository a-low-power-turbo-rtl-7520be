// Self-checking testbench of llr_unit: LLR and extrinsic value against a
// direct enumeration of the 16 trellis branches.
`include "tb/tb_common.svh"
module tb_llr_unit;
  import tdvd_pkg::*;
  met_t alpha [8], beta [8], gamma [8], lsys, llr;
  lin_t lex;
  logic hard;
  logic clk = 0;
  always #5 clk = !clk;
  `WATCHDOG(clk, 10000)
  llr_unit dut (.*);
  function automatic void enc(input int s, input int u, output int ns, output int g);
    int r1, r2, r3, a;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    a = u ^ r2 ^ r3;
    ns = (a << 2) | (r1 << 1) | r2;
    g = (u << 2) | ((a ^ r1 ^ r3) << 1) | (a ^ r1 ^ r2 ^ r3);
  endfunction
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int m1, m0, ns, g, t, l, e;
      for (int s = 0; s < 8; s++) begin
        alpha[s] = met_t'($urandom); beta[s] = met_t'($urandom); gamma[s] = met_t'($urandom);
      end
      lsys = met_t'($urandom);
      #1;
      m1 = -100000; m0 = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          enc(s, u, ns, g);
          t = int'(alpha[s]) + int'(gamma[g]) + int'(beta[ns]);
          if (u == 1 && t > m1) m1 = t;
          if (u == 0 && t > m0) m0 = t;
        end
      l = m1 - m0;
      e = l - int'(lsys);
      `CHECK(int'(llr) == (l > 127 ? 127 : (l < -128 ? -128 : l)), "llr")
      `CHECK(int'(lex) == (e > 31 ? 31 : (e < -32 ? -32 : e)), "lex")
      `CHECK(hard == (l > 0), "hard decision")
    end
    finish_tb();
  end
endmodule
