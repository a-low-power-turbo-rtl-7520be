// Add-compare-select unit: the basic element of all ACS groups.
//
// Adds a branch metric to each of two incoming state metrics and keeps the
// larger sum (maximum-metric convention, as used by the Max-Log-MAP turbo
// recursions; the Viterbi path uses the same convention with correlation
// metrics). dec is 1 when the second candidate wins. The sum is exact
// (one bit wider than the metrics); normalisation and saturation are done by
// the group that instantiates the unit. Purely combinational.
module acs_unit #(
  parameter int W  = 10,  // state / path metric width
  parameter int WB = 8    // branch metric width
) (
  input  logic signed [W-1:0]  pm0,
  input  logic signed [WB-1:0] bm0,
  input  logic signed [W-1:0]  pm1,
  input  logic signed [WB-1:0] bm1,
  output logic signed [W:0]    pm_out,
  output logic                 dec
);
  logic signed [W:0] s0, s1;
  always_comb begin
    s0 = (W+1)'(pm0) + (W+1)'(bm0);
    s1 = (W+1)'(pm1) + (W+1)'(bm1);
    dec    = (s1 > s0);
    pm_out = dec ? s1 : s0;
  end
endmodule
