// Transition metric unit of the Viterbi decoder (TMU-VD).
//
// For the 16 states s' = 16*grp + i handled in one ACS cycle it produces the
// branch metrics of both incoming branches. The branch into s' from
// predecessor {s'[6:0], b} carries input bit s'[7]; its encoder register is
// {s', b}, and its code bits are the parities of that register with the
// generator polynomials of the selected rate (1/2, 1/3, 1/4 or 1/6). The
// metric is the correlation sum over the used symbols, +r for a code bit 1
// and -r for a 0 (positive soft values mean 1), so larger is better.
// Combinational; 4-bit soft inputs, 7-bit metrics.
module vd_tmu
  import tdvd_pkg::*;
(
  input  vd_rate_e   rate,
  input  vsym_t      sym [VD_NMAX],
  input  logic [3:0] grp,
  output vbm_t       bm0 [VD_ACS],  // from predecessor {s'[6:0],0}
  output vbm_t       bm1 [VD_ACS]   // from predecessor {s'[6:0],1}
);
  function automatic vbm_t corr(input logic [VD_NMAX-1:0] c, input vsym_t r [VD_NMAX],
                                input int n);
    vbm_t m;
    m = '0;
    for (int k = 0; k < VD_NMAX; k++)
      if (k < n) m = c[k] ? m + W_VBM'(r[k]) : m - W_VBM'(r[k]);
    return m;
  endfunction

  always_comb begin
    for (int i = 0; i < VD_ACS; i++) begin
      logic [7:0] ns;
      ns = {grp, 4'(i)};
      bm0[i] = corr(vd_code(rate, {ns, 1'b0}), sym, vd_nsym(rate));
      bm1[i] = corr(vd_code(rate, {ns, 1'b1}), sym, vd_nsym(rate));
    end
  end
endmodule
