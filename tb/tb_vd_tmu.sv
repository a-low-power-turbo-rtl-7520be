// Self-checking testbench of vd_tmu: branch metrics of all 256 states and
// both predecessors, for all four rates, against an independent encoder model.
`include "tb/tb_common.svh"
module tb_vd_tmu;
  import tdvd_pkg::*;
  import tdvd_tb_pkg::*;
  vd_rate_e rate;
  vsym_t sym [VD_NMAX];
  logic [3:0] grp;
  vbm_t bm0 [VD_ACS], bm1 [VD_ACS];
  logic clk = 0;
  always #5 clk = !clk;
  `WATCHDOG(clk, 10000)
  vd_tmu dut (.*);
  initial begin
    for (int n = 0; n < 40; n++) begin
      rate = vd_rate_e'(n % 4);
      for (int i = 0; i < VD_NMAX; i++) sym[i] = vsym_t'($urandom);
      for (int g = 0; g < 16; g++) begin
        grp = 4'(g);
        #1;
        for (int i = 0; i < 16; i++) begin
          int ns, u, m [2];
          ns = g * 16 + i;
          u = ns >> 7;
          for (int b = 0; b < 2; b++) begin
            int sr;
            sr = ((ns & 127) << 1) | b;   // predecessor state, newest input in bit 7
            m[b] = 0;
            for (int c = 0; c < vd_n(int'(rate)); c++)
              m[b] += vd_bit(int'(rate), c, u, sr) ? int'(sym[c]) : -int'(sym[c]);
          end
          `CHECK(int'(bm0[i]) == m[0], "branch metric from predecessor 0")
          `CHECK(int'(bm1[i]) == m[1], "branch metric from predecessor 1")
        end
      end
    end
    finish_tb();
  end
endmodule
