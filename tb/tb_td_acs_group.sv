// Self-checking testbench of td_acs_group: forward and backward recursion
// steps against a reference built from an independent model of the
// constituent encoder (feedback 1+D^2+D^3, parities 1+D+D^3, 1+D+D^2+D^3).
`include "tb/tb_common.svh"
module tb_td_acs_group;
  import tdvd_pkg::*;
  logic clk = 0, rst = 1, en = 0, start = 0;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  met_t init [8], gamma [8], fprev [8], fmet [8], bprev [8], bmet [8];

  // the Viterbi side of the units is idle here (it is exercised in tb_td_siso)
  logic ext_en = 0;
  vpm_t ext_pm [8];
  met_t ext_bm [8];
  logic signed [W_VPM:0] fsum [8], bsum [8];
  logic [7:0] fdec, bdec;
  initial for (int i = 0; i < 8; i++) begin ext_pm[i] = '0; ext_bm[i] = '0; end

  td_acs_group #(.BACKWARD(1'b0)) dut_f (.clk, .rst, .en, .start, .init, .gamma, .prev(fprev), .metric(fmet),
    .ext_en, .ext_pm0(ext_pm), .ext_bm0(ext_bm), .ext_pm1(ext_pm), .ext_bm1(ext_bm), .ext_sum(fsum), .ext_dec(fdec));
  td_acs_group #(.BACKWARD(1'b1)) dut_b (.clk, .rst, .en, .start, .init, .gamma, .prev(bprev), .metric(bmet),
    .ext_en, .ext_pm0(ext_pm), .ext_bm0(ext_bm), .ext_pm1(ext_pm), .ext_bm1(ext_bm), .ext_sum(bsum), .ext_dec(bdec));

  // reference encoder: state {r1,r2,r3} = s[2],s[1],s[0]
  function automatic void enc(input int s, input int u, output int ns, output int g);
    int r1, r2, r3, a, y0, y1;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    a = u ^ r2 ^ r3;
    y0 = a ^ r1 ^ r3;
    y1 = a ^ r1 ^ r2 ^ r3;
    ns = (a << 2) | (r1 << 1) | r2;
    g = (u << 2) | (y0 << 1) | y1;
  endfunction
  function automatic int sat(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction

  int fr [8], br [8];
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 8; s++) begin fr[s] = 0; br[s] = 0; end
    for (int n = 0; n < 400; n++) begin
      int nf [8], nb [8], ns, g, m;
      start <= (n % 50 == 0);
      for (int s = 0; s < 8; s++) begin
        init[s]  <= met_t'($urandom_range(0, 60) - 30);
        gamma[s] <= met_t'($urandom_range(0, 100) - 50);
      end
      en <= 1;
      #1;
      if (start) for (int s = 0; s < 8; s++) begin fr[s] = int'(init[s]); br[s] = int'(init[s]); end
      for (int s = 0; s < 8; s++) begin nf[s] = -100000; nb[s] = -100000; end
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          enc(s, u, ns, g);
          m = fr[s] + int'(gamma[g]);
          if (m > nf[ns]) nf[ns] = m;
          m = br[ns] + int'(gamma[g]);
          if (m > nb[s]) nb[s] = m;
        end
      @(posedge clk); #1;
      for (int s = 0; s < 8; s++) begin
        fr[s] = sat(nf[s] - nf[0]);
        br[s] = sat(nb[s] - nb[0]);
      end
      for (int s = 0; s < 8; s++) begin
        `CHECK(int'(fmet[s]) == fr[s], "forward metric")
        `CHECK(int'(bmet[s]) == br[s], "backward metric")
      end
    end
    finish_tb();
  end
endmodule
