// Self-checking testbench of viterbi_decoder: for each of the four rates a
// frame of random bits, terminated with 8 zero tail bits and followed by zero
// flush steps, is convolutionally encoded, sent through a noisy channel and
// decoded. The decoded bits must equal the sent ones, the channel must have
// produced hard-decision errors, and back-to-back steps must take 19 cycles.
// Sixteen acs_unit instances stand in for the turbo ACS units the decoder
// borrows in the combined design.
`include "tb/tb_common.svh"
module tb_viterbi_decoder;
  import tdvd_pkg::*;
  import tdvd_tb_pkg::*;
  localparam int T = 64, B = T / 2, MAW = 12, F = 400, FLUSH = 8 + 6 * B, SIGMA = 3;
  logic clk = 0, rst = 1, init = 0, in_valid = 0, in_ready;
  vd_rate_e rate;
  vsym_t in_sym [VD_NMAX];
  logic mem_we;
  logic [MAW-1:0] mem_addr;
  logic [15:0] mem_d, mem_q;
  logic out_valid, out_bit;
  logic acs_en;
  vpm_t acs_pm0 [VD_ACS], acs_pm1 [VD_ACS];
  vbm_t acs_bm0 [VD_ACS], acs_bm1 [VD_ACS];
  logic signed [W_VPM:0] acs_sum [VD_ACS];
  logic [VD_ACS-1:0] acs_dec;
  for (genvar i = 0; i < VD_ACS; i++) begin : g_acs
    acs_unit #(.W(W_VPM), .WB(W_VBM)) u_acs (
      .pm0(acs_pm0[i]), .bm0(acs_bm0[i]), .pm1(acs_pm1[i]), .bm1(acs_bm1[i]),
      .pm_out(acs_sum[i]), .dec(acs_dec[i]));
  end
  always #5 clk = !clk;
  `WATCHDOG(clk, 400000)
  viterbi_decoder #(.T(T), .NBANK(8), .MAW(MAW)) dut (.*);
  sram_sp #(.DEPTH(1 << MAW), .W(16), .AW(MAW)) u_mem (.clk, .en(1'b1), .we(mem_we), .addr(mem_addr), .d(mem_d), .q(mem_q));

  int u [F + FLUSH];
  int nout, errs;
  always @(posedge clk) if (!rst && out_valid) begin
    if (nout < F && out_bit != u[nout]) errs++;
    nout++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 4; r++) begin
      int sr, raw, t_first, t_last;
      rate = vd_rate_e'(r);
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      nout = 0; errs = 0; raw = 0; sr = 0;
      for (int k = 0; k < F + FLUSH; k++) begin
        u[k] = (k < F) ? int'(rnd() & 1) : 0;
        for (int c = 0; c < VD_NMAX; c++) begin
          int b, v;
          b = (c < vd_n(r)) ? vd_bit(r, c, u[k], sr) : 0;
          v = (c < vd_n(r)) ? chan4(b, SIGMA) : 0;
          if (c < vd_n(r) && ((v > 0) != (b == 1))) raw++;
          in_sym[c] = vsym_t'(v);
        end
        sr = (u[k] << 7) | (sr >> 1);
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (k == 10) t_first = $time;
        if (k == 110) t_last = $time;
        @(negedge clk);
        in_valid = 0;
      end
      repeat (40) @(posedge clk);
      $display("rate %0d: %0d bits out, %0d errors, %0d raw symbol errors, %0d cycles per bit",
               r, nout, errs, raw, (t_last - t_first) / 1000);
      `CHECK(nout >= F, "all frame bits delivered")
      `CHECK(errs == 0, "decoded bits")
      `CHECK(raw > 0, "channel produced errors")
      `CHECK((t_last - t_first) / 1000 == 19, "19 cycles per decoded bit")
    end
    finish_tb();
  end
endmodule
