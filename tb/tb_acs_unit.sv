// Self-checking testbench of acs_unit: random metrics against max().
`include "tb/tb_common.svh"
module tb_acs_unit;
  logic signed [9:0] pm0, pm1;
  logic signed [7:0] bm0, bm1;
  logic signed [10:0] pm_out;
  logic dec;
  logic clk = 0;
  always #5 clk = !clk;
  `WATCHDOG(clk, 10000)
  acs_unit #(.W(10), .WB(8)) dut (.*);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      int a, b;
      pm0 = 10'($urandom); pm1 = 10'($urandom); bm0 = 8'($urandom); bm1 = 8'($urandom);
      #1;
      a = int'(pm0) + int'(bm0);
      b = int'(pm1) + int'(bm1);
      `CHECK(int'(pm_out) == ((b > a) ? b : a), "acs value")
      `CHECK(dec == (b > a), "acs decision")
    end
    finish_tb();
  end
endmodule
