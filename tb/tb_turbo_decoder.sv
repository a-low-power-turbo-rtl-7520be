// Self-checking testbench of turbo_decoder: a rate-1/5 turbo-coded block of
// N = 378 bits (a 3GPP2 block size, n = 4) is sent through a noisy channel
// and decoded in 6 iterations. Every bit index must be delivered exactly once
// and the decoded bits must equal the transmitted ones; the raw channel
// decisions must contain errors, so the decoder demonstrably corrects them.
// The decoding time must be 2*ITER half-iterations of (NSB+3)*LSB datapath
// cycles plus the output flush.
`include "tb/tb_common.svh"
module tb_turbo_decoder;
  import tdvd_pkg::*;
  import tdvd_tb_pkg::*;
  localparam int N = 378, NB = 4, LSB = 20, ITER = 6, NSB = (N + LSB - 1) / LSB;
  localparam int SIGMA = 14;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [ADDR_W-1:0] cw_addr;
  logic cw_sel;
  sym_t cw_data [3];
  logic sys_we, ext_we;
  logic [14:0] sys_addr, ext_addr;
  logic [7:0] sys_d, sys_q, ext_d, ext_q;
  logic out_valid, out_bit, ag_skip;
  logic [ADDR_W-1:0] out_idx;
  met_t out_llr;
  logic vd_en = 0;   // the Viterbi side of the shared ACS units is idle here
  vpm_t vd_pm0 [16], vd_pm1 [16];
  vbm_t vd_bm0 [16], vd_bm1 [16];
  logic signed [W_VPM:0] vd_sum [16];
  logic [15:0] vd_dec;
  initial for (int i = 0; i < 16; i++) begin vd_pm0[i] = '0; vd_pm1[i] = '0; vd_bm0[i] = '0; vd_bm1[i] = '0; end
  always #5 clk = !clk;
  `WATCHDOG(clk, 200000)

  turbo_decoder #(.N(N), .LSB(LSB), .ITER(ITER), .NB(NB), .MW(8), .MAW(15)) dut (.*);
  sram_sp #(.DEPTH(N), .W(8), .AW(15)) u_sys (.clk, .en(1'b1), .we(sys_we), .addr(sys_addr), .d(sys_d), .q(sys_q));
  sram_sp #(.DEPTH(N), .W(8), .AW(15)) u_ext (.clk, .en(1'b1), .we(ext_we), .addr(ext_addr), .d(ext_d), .q(ext_q));

  int u [N], rs [N], y0 [N], y1 [N], z0 [N], z1 [N];
  int pi [];
  bit seen [N];
  int nout = 0, errs = 0, raw = 0, skips = 0;

  always_comb begin
    int k;
    k = int'(cw_addr) < N ? int'(cw_addr) : 0;
    cw_data[0] = sym_t'(rs[k]);
    cw_data[1] = sym_t'(cw_sel ? z0[k] : y0[k]);
    cw_data[2] = sym_t'(cw_sel ? z1[k] : y1[k]);
  end

  always @(posedge clk) begin
    if (!rst && ag_skip) skips++;
    if (!rst && out_valid) begin
      `CHECK(out_idx < N && !seen[out_idx], "each bit delivered once")
      if (out_idx < N) begin
        seen[out_idx] = 1;
        if (out_bit != u[out_idx]) errs++;
      end
      nout++;
    end
  end

  initial begin
    int s1, s2, a, b, t0;
    interleaver(N, NB, pi);
    s1 = 0; s2 = 0;
    for (int k = 0; k < N; k++) u[k] = rnd() & 1;
    for (int k = 0; k < N; k++) begin
      rsc_step(s1, u[k], a, b);
      rs[k] = chan6(u[k], SIGMA); y0[k] = chan6(a, SIGMA); y1[k] = chan6(b, SIGMA);
      if ((rs[k] > 0) != (u[k] == 1)) raw++;
      rsc_step(s2, u[pi[k]], a, b);
      z0[k] = chan6(a, SIGMA); z1[k] = chan6(b, SIGMA);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    repeat (4) @(posedge clk);
    $display("N=%0d: %0d bits out, %0d errors, %0d raw channel errors, %0d AG skips, %0d clocks",
             N, nout, errs, raw, skips, t0);
    `CHECK(nout == N, "number of decoded bits")
    `CHECK(errs == 0, "decoded bits")
    `CHECK(raw > 0, "channel produced errors")
    `CHECK(skips > 0, "dual AG bridged invalid addresses")
    `CHECK(t0 >= 2 * ITER * (NSB + 3) * LSB * 2 && t0 <= 2 * ITER * ((NSB + 3) * LSB + 3) * 2 + 2 * LSB + 8,
           "decoding time")
    finish_tb();
  end
endmodule
