// Input cache of the turbo SISO decoder: a quadruple-port buffer (one write,
// three reads per datapath cycle) built from a dual-port memory clocked at
// twice the datapath rate.
//
// The memory holds 3*LSB words, three windows (banks) of LSB trellis steps.
// Per datapath cycle (two memory cycles):
//   memory cycle 1 (mphase=1): port A reads the beta2 word, port B reads the
//                              alpha word into the holding register D;
//   memory cycle 2 (mphase=0): port A writes the new input word to the
//                              address beta2 has just read (read before write,
//                              so no write-after-read hazard), port B reads
//                              the beta1 word.
// Writing the incoming window into the locations the oldest window vacates is
// what lets 3*LSB words replace the 4*LSB of a four-bank cache. The caller
// keeps all addresses stable over both memory cycles; the three outputs are
// valid together after memory cycle 2.
module input_cache
  import tdvd_pkg::*;
#(
  parameter int LSB = L_SB,
  parameter int W   = CW_W,
  parameter int AW  = $clog2(3*LSB)
) (
  input  logic          clk,
  input  logic          mphase,   // 1: first memory cycle of the datapath cycle
  input  logic [AW-1:0] addr_a,   // alpha read
  input  logic [AW-1:0] addr_b1,  // beta1 read
  input  logic [AW-1:0] addr_b2,  // beta2 read, then input write
  input  logic          we,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  q_a,      // to TMU-alpha (through D)
  output logic [W-1:0]  q_b1,     // to TMU-beta1
  output logic [W-1:0]  q_b2      // to TMU-beta2
);
  logic [W-1:0] mem [3*LSB];

  // port A: beta2 read / input write
  always_ff @(posedge clk) begin
    if (mphase) q_b2 <= mem[addr_b2];
    else if (we) mem[addr_b2] <= din;
  end

  // port B: alpha read (held in D), beta1 read
  always_ff @(posedge clk) begin
    if (mphase) q_a  <= mem[addr_a];
    else        q_b1 <= mem[addr_b1];
  end
endmodule
