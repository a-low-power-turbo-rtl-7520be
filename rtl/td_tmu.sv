// Turbo transition metric unit (TMU-alpha, TMU-beta1, TMU-beta2).
//
// Turns one cached trellis step into the eight branch metrics gamma of the
// rate-1/3 constituent code, indexed {u, y0, y1}. With 0/1 labels the
// Max-Log-MAP branch metric reduces to
//   gamma(u,y0,y1) = u*(rs + Lin) + y0*r0 + y1*r1,
// which gives the same LLR differences as the usual +-1/2 form. Channel
// values (3.3) are brought to the 2-fraction-bit format of Lin and gamma by
// dropping one fraction bit. Steps marked pad (beyond the block, or the
// window after the last one) give all-zero metrics so the recursions pass
// through them unchanged. Combinational; 8-bit (6.2) outputs as in the
// design's fixed-point plan. lsys is the systematic term rs+Lin used by the
// LLR unit to form the extrinsic output.
module td_tmu
  import tdvd_pkg::*;
(
  input  cw_t  cw,
  input  logic first_half,  // first half-iteration of the first iteration: Lin = 0
  output met_t gamma [8],
  output met_t lsys
);
  logic signed [11:0] s, p0, p1;
  always_comb begin
    s  = (12'(cw.rs) >>> 1) + (first_half ? 12'sd0 : 12'(cw.lin));
    p0 = 12'(cw.yp0) >>> 1;
    p1 = 12'(cw.yp1) >>> 1;
    if (cw.pad) begin
      s = '0; p0 = '0; p1 = '0;
    end
    lsys = sat_met(s);
    for (int i = 0; i < 8; i++)
      gamma[i] = sat_met((i[2] ? s : 12'sd0) + (i[1] ? p0 : 12'sd0) + (i[0] ? p1 : 12'sd0));
  end
endmodule
