// LLR unit: a-posteriori log-likelihood ratio and extrinsic information of
// one trellis step, Max-Log-MAP form.
//
//   L(u_k)  = max_{u=1}(alpha_k(s)+gamma_k+beta_{k+1}(s')) - max_{u=0}(...)
//   Lex(u_k) = L(u_k) - (Lc*rs + Lin)        (equation (1) rearranged)
//
// alpha comes from SRAM-alpha, beta is the beta2 register before its update
// (i.e. beta_{k+1}), gamma and lsys from TMU-beta2. L is saturated to 8 bits
// (6.2), Lex to 6 bits (4.2), the a-priori format of the next half-iteration.
// Combinational.
module llr_unit
  import tdvd_pkg::*;
(
  input  met_t alpha [8],
  input  met_t beta  [8],
  input  met_t gamma [8],
  input  met_t lsys,
  output met_t llr,
  output lin_t lex,
  output logic hard
);
  logic signed [11:0] m1, m0, t, l;
  always_comb begin
    m1 = -12'sd2048;
    m0 = -12'sd2048;
    for (int s = 0; s < 8; s++) begin
      for (int u = 0; u < 2; u++) begin
        t = 12'(alpha[s]) + 12'(gamma[{u[0], td_par(3'(s), u[0])}]) + 12'(beta[td_next(3'(s), u[0])]);
        if (u == 1) begin if (t > m1) m1 = t; end
        else        begin if (t > m0) m0 = t; end
      end
    end
    l    = m1 - m0;
    llr  = sat_met(l);
    lex  = sat_lin(l - 12'(lsys));
    hard = (l > 0);
  end
endmodule
