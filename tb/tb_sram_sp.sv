// Self-checking testbench of sram_sp: random writes and reads against an
// array model, including read latency and hold of q during writes.
`include "tb/tb_common.svh"
module tb_sram_sp;
  localparam int DEPTH = 20730, W = 8, AW = 15;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr;
  logic [W-1:0] d, q;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  sram_sp #(.DEPTH(DEPTH), .W(W), .AW(AW)) dut (.*);
  logic [W-1:0] model [int];
  initial begin
    for (int n = 0; n < 20000; n++) begin
      int a;
      logic [W-1:0] qold;
      a = (n < 300) ? n : $urandom_range(0, 299);
      @(negedge clk);
      en = 1;
      we = (n < 300) || ($urandom % 2);
      addr = AW'(a); d = W'($urandom);
      qold = q;
      @(posedge clk); #1;
      if (we) begin
        model[a] = d;
        `CHECK(q == qold, "q held during write")
      end else begin
        `CHECK(q == model[a], "read data")
      end
    end
    finish_tb();
  end
endmodule
