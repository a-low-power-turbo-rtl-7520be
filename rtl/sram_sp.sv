// Single-port SRAM with synchronous read and write.
//
// Models the embedded single-port macros (systematic/survivor, extrinsic/
// survivor, SRAM-alpha). One access per clock: a write when we is set,
// otherwise a read whose data appears on q after the clock edge. The design
// runs these memories at twice the datapath rate, so one read and one write
// fit in each datapath cycle by time-division multiplexing the address.
module sram_sp #(
  parameter int DEPTH = 20730,
  parameter int W     = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= d;
      else    q <= mem[addr];
    end
  end
endmodule
