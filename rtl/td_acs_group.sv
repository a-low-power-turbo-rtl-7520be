// ACS group of the turbo SISO decoder: eight ACS units computing one step of
// the forward (alpha) or backward (beta) recursion of the 8-state constituent
// trellis.
//
// Forward:  alpha'(s') = max over the two branches s->s' of alpha(s)+gamma.
// Backward: beta(s)    = max over u of gamma(s,u) + beta'(next(s,u)).
// After the selection the metric of state 0 is subtracted from all states and
// the result saturated to 8 bits (6.2), which keeps the recursion bounded
// without changing any LLR. The group holds its metrics in a register that
// advances on en; on the first step of a recursion (start) the step starts
// from init instead of the register. prev is the metric the current step
// starts from (alpha_k for the forward group, written to SRAM-alpha).
//
// In Viterbi mode (ext_en) the eight ACS units are lent to the Viterbi
// decoder: their operands come from the ext_* inputs (10-bit path metrics,
// branch metrics) and their results leave on ext_sum / ext_dec, while the
// group's own register is left alone. The units are therefore 10 bits wide;
// turbo metrics are sign-extended into them.
module td_acs_group
  import tdvd_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic start,
  input  met_t init  [8],
  input  met_t gamma [8],
  output met_t prev   [8],  // metrics the current step starts from
  output met_t metric [8],  // register: metrics after the last step
  // shared use by the Viterbi decoder
  input  logic                    ext_en,
  input  logic signed [W_VPM-1:0] ext_pm0 [8],
  input  logic signed [W_MET-1:0] ext_bm0 [8],
  input  logic signed [W_VPM-1:0] ext_pm1 [8],
  input  logic signed [W_MET-1:0] ext_bm1 [8],
  output logic signed [W_VPM:0]   ext_sum [8],
  output logic [7:0]              ext_dec
);
  logic signed [W_VPM:0] nxt [8];
  met_t pa [8], pb [8], ga [8], gb [8];

  always_comb prev = start ? init : metric;

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      if (!BACKWARD) begin
        // predecessors {s[1:0], r3}, r3 = 0/1; input u = a ^ r2 ^ r3
        for (int r3 = 0; r3 < 2; r3++) begin
          logic [2:0] p;
          logic u;
          logic [1:0] y;
          p = {s[1:0], r3[0]};
          u = s[2] ^ s[0] ^ r3[0];
          y = td_par(p, u);
          if (r3 == 0) begin pa[s] = prev[p]; ga[s] = gamma[{u, y}]; end
          else         begin pb[s] = prev[p]; gb[s] = gamma[{u, y}]; end
        end
      end else begin
        pa[s] = prev[td_next(3'(s), 1'b0)];
        ga[s] = gamma[{1'b0, td_par(3'(s), 1'b0)}];
        pb[s] = prev[td_next(3'(s), 1'b1)];
        gb[s] = gamma[{1'b1, td_par(3'(s), 1'b1)}];
      end
    end
  end

  for (genvar s = 0; s < 8; s++) begin : g_acs
    acs_unit #(.W(W_VPM), .WB(W_MET)) u_acs (
      .pm0(ext_en ? ext_pm0[s] : W_VPM'(pa[s])),
      .bm0(ext_en ? ext_bm0[s] : ga[s]),
      .pm1(ext_en ? ext_pm1[s] : W_VPM'(pb[s])),
      .bm1(ext_en ? ext_bm1[s] : gb[s]),
      .pm_out(nxt[s]), .dec(ext_dec[s]));
    assign ext_sum[s] = nxt[s];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < 8; s++) metric[s] <= '0;
    end else if (en) begin
      for (int s = 0; s < 8; s++) metric[s] <= sat_met(12'(nxt[s]) - 12'(nxt[0]));
    end
  end
endmodule
