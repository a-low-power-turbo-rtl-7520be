// Self-checking testbench of td_siso: one half-iteration on a noise-free and
// a noisy block of the first constituent code (no a-priori input). Every step
// must produce exactly one result with the right address, the hard decisions
// must equal the encoded bits, and a half-iteration must take (NSB+3)*LSB
// datapath cycles. A short block with a partial last window is used.
// Finally the units lent to the Viterbi decoder (vd_* ports) are checked with
// random 10-bit operands: each of the 16 must return max(pm0+bm0, pm1+bm1)
// and the matching decision, and lending them must not disturb the SISO's
// metric registers.
`include "tb/tb_common.svh"
module tb_td_siso;
  import tdvd_pkg::*;
  import tdvd_tb_pkg::*;
  localparam int N = 230, LSB = 20, NSB = (N + LSB - 1) / LSB;
  logic clk = 0, rst = 1, mphase = 0, start = 0, first_half = 1;
  logic fill_en, fill_pad, out_valid, out_pad, out_hard, busy, done;
  cw_t fill_word;
  logic [ADDR_W-1:0] out_addr;
  lin_t out_lex;
  met_t out_llr;
  logic vd_en = 0;
  vpm_t vd_pm0 [16], vd_pm1 [16];
  vbm_t vd_bm0 [16], vd_bm1 [16];
  logic signed [W_VPM:0] vd_sum [16];
  logic [15:0] vd_dec;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  td_siso #(.N(N), .LSB(LSB)) dut (.*);

  int u [N], rs [N], p0 [N], p1 [N];
  int k, nres, errs;
  bit seen [N];
  always @(posedge clk) mphase <= rst ? 1'b0 : !mphase;

  always_comb begin
    fill_word = '0;
    fill_word.pad  = fill_pad;
    fill_word.addr = ADDR_W'(k);
    if (k < N) begin
      fill_word.rs  = sym_t'(rs[k]);
      fill_word.yp0 = sym_t'(p0[k]);
      fill_word.yp1 = sym_t'(p1[k]);
      fill_word.lin = lin_t'($urandom);   // ignored in the first half
    end
  end

  always @(posedge clk) begin
    if (!mphase && fill_en && !fill_pad) k <= k + 1;
    if (out_valid && !out_pad) begin
      `CHECK(out_addr < N && !seen[out_addr], "each step once")
      if (out_addr < N) begin
        seen[out_addr] = 1;
        if (out_hard != u[out_addr]) errs++;
      end
      nres++;
    end
  end

  task automatic run_block(int sigma, int max_err);
    int st, y0, y1, t0, cyc;
    st = 0;
    for (int i = 0; i < N; i++) begin
      u[i] = rnd() & 1;
      rsc_step(st, u[i], y0, y1);
      rs[i] = chan6(u[i], sigma); p0[i] = chan6(y0, sigma); p1[i] = chan6(y1, sigma);
      seen[i] = 0;
    end
    k = 0; nres = 0; errs = 0;
    @(negedge clk);
    while (mphase) @(negedge clk);
    start = 1;
    @(negedge clk); @(negedge clk);
    start = 0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    cyc = (t0 + 1) / 2;
    repeat (2) @(posedge clk);
    $display("sigma=%0d: %0d results, %0d errors, %0d datapath cycles", sigma, nres, errs, cyc);
    `CHECK(nres == N, "number of results")
    `CHECK(errs <= max_err, "hard decisions")
    `CHECK(cyc >= (NSB + 3) * LSB && cyc <= (NSB + 3) * LSB + 3, "half-iteration latency")
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run_block(0, 0);
    run_block(8, N / 20);
    begin
      met_t a_keep [8];
      a_keep = dut.a_reg;
      @(negedge clk);
      vd_en = 1;
      for (int r = 0; r < 500; r++) begin
        for (int i = 0; i < 16; i++) begin
          vd_pm0[i] = vpm_t'($urandom); vd_pm1[i] = vpm_t'($urandom);
          vd_bm0[i] = vbm_t'($urandom_range(0, 96) - 48); vd_bm1[i] = vbm_t'($urandom_range(0, 96) - 48);
        end
        @(negedge clk);
        for (int i = 0; i < 16; i++) begin
          int a, b;
          a = int'(vd_pm0[i]) + int'(vd_bm0[i]);
          b = int'(vd_pm1[i]) + int'(vd_bm1[i]);
          `CHECK(int'(vd_sum[i]) == ((b > a) ? b : a) && vd_dec[i] == (b > a), "lent ACS unit")
        end
      end
      vd_en = 0;
      `CHECK(dut.a_reg == a_keep, "SISO metrics untouched while lent")
    end
    finish_tb();
  end
endmodule
