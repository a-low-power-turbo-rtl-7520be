// Self-checking testbench of vd_smu: decisions of a known state path are
// written step by step (most states point towards the true path, some at
// random) and the decoded bits that leave the traceback must be the path's
// input bits, bank by bank in descending order. Also checks the per-step
// schedule of 16 writes, 2 traceback reads and 1 decode read.
`include "tb/tb_common.svh"
module tb_vd_smu;
  import tdvd_pkg::*;
  import tdvd_tb_pkg::*;
  localparam int T = 64, NBANK = 8, B = T / 2, MAW = 12, STEPS = 1200;
  logic clk = 0, rst = 1, init = 0, active = 0, post = 0;
  logic [4:0] cyc = 0;
  logic [15:0] dec;
  logic mem_we;
  logic [MAW-1:0] mem_addr;
  logic [15:0] mem_d, mem_q;
  logic bit_valid, bit_ok, bit_out;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  vd_smu #(.T(T), .NBANK(NBANK), .MAW(MAW)) dut (.*);
  sram_sp #(.DEPTH(1 << MAW), .W(16), .AW(MAW)) u_mem (.clk, .en(1'b1), .we(mem_we), .addr(mem_addr), .d(mem_d), .q(mem_q));

  int u [STEPS];
  int nok = 0, nbits = 0, writes = 0, reads = 0;

  always @(posedge clk) if (!rst && active) begin
    if (mem_we) writes++; else if (cyc >= 16) reads++;
  end

  always @(posedge clk) if (!rst && bit_valid) begin
    nbits++;
    if (bit_ok) begin
      int g, i;
      g = nok / B; i = nok % B;
      `CHECK(bit_out == u[g * B + (B - 1 - i)], "decoded bit")
      nok++;
    end
  end

  initial begin
    int st, prev;
    st = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int t = 0; t < STEPS; t++) begin
      u[t] = rnd() & 1;
      prev = st;
      st = (u[t] << 7) | (prev >> 1);
      for (int c = 0; c < 19; c++) begin
        @(negedge clk);
        active = 1; cyc = 5'(c);
        post = (c == 0 && t > 0);
        for (int i = 0; i < 16; i++)
          dec[i] = (rnd() % 10 == 0) ? 1'(rnd()) : 1'(prev & 1);
        if (c == (st >> 4)) dec[st & 15] = 1'(prev & 1);   // the true path itself
      end
    end
    @(negedge clk); active = 0; post = 1;
    @(negedge clk); post = 0;
    repeat (3) @(posedge clk);
    $display("%0d bits decoded (%0d valid), %0d writes, %0d reads", nbits, nok, writes, reads);
    `CHECK(writes == 16 * STEPS, "16 decision writes per step")
    `CHECK(reads == 3 * STEPS, "two traceback reads and one decode read per step")
    `CHECK(nok >= STEPS - 5 * B, "decoded bits delivered")
    finish_tb();
  end
endmodule
