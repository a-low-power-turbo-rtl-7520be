// Self-checking testbench of td_tmu: branch metrics against the formula
// gamma = u*(rs/2 + Lin) + y0*r0/2 + y1*r1/2 (in 2-fraction-bit units).
`include "tb/tb_common.svh"
module tb_td_tmu;
  import tdvd_pkg::*;
  cw_t cw; logic first_half; met_t gamma [8]; met_t lsys;
  logic clk = 0;
  always #5 clk = !clk;
  `WATCHDOG(clk, 10000)
  td_tmu dut (.*);
  function automatic int sat(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s, p0, p1;
      cw = CW_W'({$urandom, $urandom});
      cw.pad = ($urandom % 8 == 0);
      first_half = ($urandom % 4 == 0);
      #1;
      s  = (int'(cw.rs) >>> 1) + (first_half ? 0 : int'(cw.lin));
      p0 = int'(cw.yp0) >>> 1;
      p1 = int'(cw.yp1) >>> 1;
      if (cw.pad) begin s = 0; p0 = 0; p1 = 0; end
      `CHECK(int'(lsys) == sat(s), "lsys")
      for (int i = 0; i < 8; i++)
        `CHECK(int'(gamma[i]) == sat((i & 4 ? s : 0) + (i & 2 ? p0 : 0) + (i & 1 ? p1 : 0)), "gamma")
    end
    finish_tb();
  end
endmodule
