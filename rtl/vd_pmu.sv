// Path metric unit (PMU) of the 256-state Viterbi decoder.
//
// The Viterbi decoder owns no ACS units: in every ACS cycle it borrows the
// sixteen units of the turbo SISO's ACS-alpha and ACS-beta1 groups. This
// unit supplies their path-metric operands and takes back their sums. One
// trellis step takes 16 cycles (grp = 0..15, target states 16*grp..16*grp+15).
// Target state s' has predecessors {s'[6:0],0} (operand pm0) and
// {s'[6:0],1} (operand pm1); the ACS unit returns max(pm0+bm0, pm1+bm1).
//
// The PMU keeps the 256 10-bit metrics twice (old and new, swapped after
// grp 15) because every old metric is read by two groups of the same step.
// To keep 10 bits sufficient, the largest metric of the previous step is
// subtracted from every new metric and the result saturates at the negative
// end; the best path thus stays near 0 and hopeless states sit at the floor.
// The normalisation scheme is this design's choice.
// init (at the start of a frame) sets state 0 to 0 and all others to the
// floor: the encoder starts in state 0.
//
// Timing: pm0/pm1 are combinational from grp; sum is sampled on the clock
// edge that ends the cycle when en is high.
module vd_pmu
  import tdvd_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       init,
  input  logic       en,      // one ACS cycle
  input  logic [3:0] grp,
  output vpm_t       pm0 [VD_ACS],              // to the borrowed ACS units
  output vpm_t       pm1 [VD_ACS],
  input  logic signed [W_VPM:0] sum [VD_ACS]    // from the borrowed ACS units
);
  localparam vpm_t FLOOR = vpm_t'(-(1 << (W_VPM-1)));

  vpm_t pm [2][VD_STATES];
  logic cur;
  vpm_t norm, run_max;
  vpm_t nv [VD_ACS];
  vpm_t grp_max;

  always_comb begin
    for (int i = 0; i < VD_ACS; i++) begin
      logic [7:0] ns;
      ns = {grp, 4'(i)};
      pm0[i] = pm[cur][{ns[6:0], 1'b0}];
      pm1[i] = pm[cur][{ns[6:0], 1'b1}];
    end
  end

  always_comb begin
    grp_max = (grp == '0) ? FLOOR : run_max;
    for (int i = 0; i < VD_ACS; i++) begin
      logic signed [W_VPM+1:0] d;
      d = (W_VPM+2)'(sum[i]) - (W_VPM+2)'(norm);
      if (d < (W_VPM+2)'(FLOOR))                      nv[i] = FLOOR;
      else if (d > (W_VPM+2)'((1 << (W_VPM-1)) - 1)) nv[i] = vpm_t'((1 << (W_VPM-1)) - 1);
      else                                            nv[i] = vpm_t'(d);
      if (nv[i] > grp_max) grp_max = nv[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      cur     <= 1'b0;
      norm    <= '0;
      run_max <= FLOOR;
      for (int s = 0; s < VD_STATES; s++) begin
        pm[0][s] <= (s == 0) ? '0 : FLOOR;
        pm[1][s] <= FLOOR;
      end
    end else if (en) begin
      for (int i = 0; i < VD_ACS; i++) pm[!cur][{grp, 4'(i)}] <= nv[i];
      run_max <= grp_max;
      if (grp == 4'd15) begin
        cur  <= !cur;
        norm <= grp_max;
      end
    end
  end
endmodule
