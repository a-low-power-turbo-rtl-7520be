// End-to-end testbench of tdvd_top at its default parameters (block length
// 20730, 6 iterations, window 20, traceback depth 64).
//
// 1. Turbo mode: a full rate-1/5 turbo-coded block through a noisy channel;
//    all 20730 bits must come out once, error-free, in 12 half-iterations of
//    (NSB+3)*LSB datapath cycles.
// 2. Viterbi mode: one frame per code rate (1/2, 1/3, 1/4, 1/6), decoded
//    through the same SRAMs, at 19 cycles per bit.
// 3. Turbo mode again on a second block, after the mode switches.
// Mechanisms counted: invalid interleaver addresses bridged by the second
// AG, channel errors corrected in each mode, mode switches, rates used, and
// ACS cycles in which the turbo SISO's ACS-alpha/ACS-beta1 units worked for
// the Viterbi decoder (probed inside the top).
`include "tb/tb_common.svh"
module tb_tdvd_top;
  import tdvd_pkg::*;
  import tdvd_tb_pkg::*;
  localparam int N = N_BLOCK, NB = 10, LSB = L_SB, ITER = 6, NSB = (N + LSB - 1) / LSB;
  localparam int T = 64, B = T / 2, F = 300, FLUSH = 8 + 6 * B;
  localparam int SIGMA_TD = 14, SIGMA_VD = 3;

  logic clk = 0, rst = 1, mode = 0;
  logic td_start = 0, td_busy, td_done;
  logic [ADDR_W-1:0] cw_addr;
  logic cw_sel;
  sym_t cw_data [3];
  logic td_out_valid, td_out_bit, td_ag_skip;
  logic [ADDR_W-1:0] td_out_idx;
  met_t td_out_llr;
  logic vd_init = 0, vd_in_valid = 0, vd_in_ready, vd_out_valid, vd_out_bit;
  vd_rate_e vd_rate = R1_2;
  vsym_t vd_in_sym [VD_NMAX];

  always #5 clk = !clk;
  `WATCHDOG(clk, 2000000)

  tdvd_top dut (.*);

  int u [N], rs [N], y0 [N], y1 [N], z0 [N], z1 [N];
  int pi [];
  bit seen [N];
  int td_nout, td_errs, skips = 0, lent = 0, switches = 0, td_raw_total = 0, vd_raw_total = 0;
  int vu [F + FLUSH];
  int vd_nout, vd_errs, rates_ok = 0;

  always_comb begin
    int k;
    k = int'(cw_addr) < N ? int'(cw_addr) : 0;
    cw_data[0] = sym_t'(rs[k]);
    cw_data[1] = sym_t'(cw_sel ? z0[k] : y0[k]);
    cw_data[2] = sym_t'(cw_sel ? z1[k] : y1[k]);
  end

  always @(posedge clk) if (!rst) begin
    if (td_ag_skip) skips++;
    if (mode && dut.acs_en) lent++;
    if (td_out_valid && !mode) begin
      if (td_out_idx >= N || seen[td_out_idx]) td_errs++;
      else begin
        seen[td_out_idx] = 1;
        if (td_out_bit != u[td_out_idx]) td_errs++;
      end
      td_nout++;
    end
    if (vd_out_valid && mode) begin
      if (vd_nout < F && vd_out_bit != vu[vd_nout]) vd_errs++;
      vd_nout++;
    end
  end

  task automatic set_mode(logic m);
    @(negedge clk);
    if (mode != m) switches++;
    mode = m;
    repeat (2) @(negedge clk);
  endtask

  task automatic turbo_block();
    int s1, s2, a, b, t0, raw;
    s1 = 0; s2 = 0; raw = 0;
    for (int k = 0; k < N; k++) begin u[k] = rnd() & 1; seen[k] = 0; end
    for (int k = 0; k < N; k++) begin
      rsc_step(s1, u[k], a, b);
      rs[k] = chan6(u[k], SIGMA_TD); y0[k] = chan6(a, SIGMA_TD); y1[k] = chan6(b, SIGMA_TD);
      if ((rs[k] > 0) != (u[k] == 1)) raw++;
      rsc_step(s2, u[pi[k]], a, b);
      z0[k] = chan6(a, SIGMA_TD); z1[k] = chan6(b, SIGMA_TD);
    end
    td_nout = 0; td_errs = 0;
    td_raw_total += raw;
    set_mode(1'b0);
    td_start = 1; @(negedge clk); td_start = 0;
    t0 = 0;
    while (!td_done) begin @(posedge clk); t0++; end
    repeat (4) @(posedge clk);
    $display("turbo: %0d bits, %0d errors (%0d raw channel errors), %0d clocks = %0d datapath cycles",
             td_nout, td_errs, raw, t0, t0 / 2);
    `CHECK(td_nout == N, "turbo: every bit delivered")
    `CHECK(td_errs == 0, "turbo: decoded bits")
    `CHECK(t0 >= 2 * ITER * (NSB + 3) * LSB * 2 && t0 <= 2 * ITER * ((NSB + 3) * LSB + 3) * 2 + 2 * LSB + 8,
           "turbo: decoding time")
  endtask

  task automatic viterbi_frame(int r);
    int sr, raw, t_first, t_last;
    set_mode(1'b1);
    vd_rate = vd_rate_e'(r);
    @(negedge clk); vd_init = 1; @(negedge clk); vd_init = 0;
    vd_nout = 0; vd_errs = 0; raw = 0; sr = 0;
    for (int k = 0; k < F + FLUSH; k++) begin
      vu[k] = (k < F) ? int'(rnd() & 1) : 0;
      for (int c = 0; c < VD_NMAX; c++) begin
        int bb, v;
        bb = (c < vd_n(r)) ? vd_bit(r, c, vu[k], sr) : 0;
        v = (c < vd_n(r)) ? chan4(bb, SIGMA_VD) : 0;
        if (c < vd_n(r) && ((v > 0) != (bb == 1))) raw++;
        vd_in_sym[c] = vsym_t'(v);
      end
      sr = (vu[k] << 7) | (sr >> 1);
      vd_in_valid = 1;
      @(posedge clk);
      while (!vd_in_ready) @(posedge clk);
      if (k == 10) t_first = $time;
      if (k == 110) t_last = $time;
      @(negedge clk);
      vd_in_valid = 0;
    end
    repeat (40) @(posedge clk);
    vd_raw_total += raw;
    $display("viterbi rate %0d: %0d bits, %0d errors (%0d raw symbol errors), %0d cycles per bit",
             r, vd_nout, vd_errs, raw, (t_last - t_first) / 1000);
    `CHECK(vd_nout >= F, "viterbi: frame delivered")
    `CHECK(vd_errs == 0, "viterbi: decoded bits")
    `CHECK((t_last - t_first) / 1000 == 19, "viterbi: 19 cycles per bit")
    if (vd_nout >= F && vd_errs == 0) rates_ok++;
  endtask

  initial begin
    interleaver(N, NB, pi);
    repeat (3) @(posedge clk);
    rst <= 0;
    turbo_block();
    for (int r = 0; r < 4; r++) viterbi_frame(r);
    turbo_block();
    $display("mechanisms: AG skips %0d, lent ACS cycles %0d, mode switches %0d, raw errors corrected TD %0d / VD %0d, rates %0d",
             skips, lent, switches, td_raw_total, vd_raw_total, rates_ok);
    `CHECK(lent > 0, "turbo ACS units used by the Viterbi decoder")
    `CHECK(skips > 0, "invalid interleaver addresses bridged")
    `CHECK(switches >= 2, "mode switches")
    `CHECK(td_raw_total > 0, "turbo channel errors corrected")
    `CHECK(vd_raw_total > 0, "viterbi channel errors corrected")
    `CHECK(rates_ok == 4, "all four Viterbi rates")
    finish_tb();
  end
endmodule
