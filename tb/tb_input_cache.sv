// Self-checking testbench of input_cache: random addresses held for one
// datapath cycle (two memory cycles); the three read ports and the combined
// beta2-read / input-write port are checked against an array model,
// including the read-before-write order on the shared port.
`include "tb/tb_common.svh"
module tb_input_cache;
  localparam int LSB = 20, W = 16, AW = 6;
  logic clk = 0, mphase = 1, we = 0;
  logic [AW-1:0] addr_a, addr_b1, addr_b2;
  logic [W-1:0] din, q_a, q_b1, q_b2;
  always #5 clk = !clk;
  `WATCHDOG(clk, 100000)
  input_cache #(.LSB(LSB), .W(W), .AW(AW)) dut (.*);
  logic [W-1:0] model [3*LSB];
  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] ea, eb2, eb1;
      @(negedge clk);
      mphase = 1;
      addr_a  = AW'($urandom_range(0, 3*LSB-1));
      addr_b1 = AW'($urandom_range(0, 3*LSB-1));
      addr_b2 = (n < 3*LSB) ? AW'(n) : AW'($urandom_range(0, 3*LSB-1));
      we  = (n < 3*LSB) || ($urandom % 2);
      din = W'($urandom);
      ea  = model[addr_a];
      eb2 = model[addr_b2];
      @(negedge clk);
      mphase = 0;
      eb1 = model[addr_b1];
      if (we) model[addr_b2] = din;
      @(posedge clk); #1;
      if (n >= 3*LSB) begin
        `CHECK(q_a == ea, "alpha port")
        `CHECK(q_b2 == eb2, "beta2 port reads before the write")
        `CHECK(q_b1 == eb1, "beta1 port")
      end
    end
    finish_tb();
  end
endmodule
