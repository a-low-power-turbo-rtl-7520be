// Self-checking testbench of vd_pmu. Sixteen acs_unit instances stand in for
// the borrowed turbo ACS units. Random branch metrics drive many trellis
// steps; the decisions are compared with an unbounded integer reference of
// the same recursion for every state whose metric lies within 400 of the
// best (states further away may sit at the saturation floor).
`include "tb/tb_common.svh"
module tb_vd_pmu;
  import tdvd_pkg::*;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [3:0] grp;
  vbm_t bm0 [VD_ACS], bm1 [VD_ACS];
  vpm_t pm0 [VD_ACS], pm1 [VD_ACS];
  logic signed [W_VPM:0] sum [VD_ACS];
  logic [VD_ACS-1:0] dec;
  always #5 clk = !clk;
  `WATCHDOG(clk, 200000)
  vd_pmu dut (.*);
  for (genvar i = 0; i < VD_ACS; i++) begin : g_acs
    acs_unit #(.W(W_VPM), .WB(W_VBM)) u_acs (
      .pm0(pm0[i]), .bm0(bm0[i]), .pm1(pm1[i]), .bm1(bm1[i]),
      .pm_out(sum[i]), .dec(dec[i]));
  end
  int ref_pm [256], new_pm [256];
  int b0 [256], b1 [256];
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int s = 0; s < 256; s++) ref_pm[s] = (s == 0) ? 0 : -1000000;
    for (int step = 0; step < 300; step++) begin
      int best;
      for (int s = 0; s < 256; s++) begin b0[s] = $urandom_range(0, 96) - 48; b1[s] = $urandom_range(0, 96) - 48; end
      best = -2000000;
      for (int g = 0; g < 16; g++) begin
        @(negedge clk);
        en = 1; grp = 4'(g);
        for (int i = 0; i < 16; i++) begin bm0[i] = vbm_t'(b0[g*16+i]); bm1[i] = vbm_t'(b1[g*16+i]); end
        #1;
        for (int i = 0; i < 16; i++) begin
          int s, a, b;
          s = g * 16 + i;
          a = ref_pm[(s & 127) << 1] + b0[s];
          b = ref_pm[((s & 127) << 1) | 1] + b1[s];
          new_pm[s] = (b > a) ? b : a;
          if (a > -500000 && b > -500000 && (a > new_pm[s] - 400 || b > new_pm[s] - 400)
              && new_pm[s] > best - 400 && a != b && step > 0)
            `CHECK(dec[i] == (b > a), "ACS decision")
        end
      end
      @(negedge clk); en = 0;
      ref_pm = new_pm;
      foreach (ref_pm[s]) if (ref_pm[s] > best) best = ref_pm[s];
    end
    finish_tb();
  end
endmodule
