// Shared types, word lengths and trellis functions of the unified turbo/Viterbi
// decoder.
//
// Word lengths of the turbo datapath follow the fixed-point summary of the
// design: channel symbols 6 bits (3 integer, 3 fraction), a-priori / extrinsic
// values 6 bits (4.2), forward/backward state metrics and branch metrics 8 bits
// (6.2). The Viterbi path uses 4-bit soft inputs and 10-bit path metrics. The
// block length 20730 and sub-block (window) length 20 are the design's numbers.
//
// The code polynomials are not part of the architecture description; they are
// the cdma2000 (3GPP2) ones: the turbo constituent code is the 8-state
// recursive code with feedback 1+D^2+D^3 and parities 1+D+D^3 and 1+D+D^2+D^3,
// the convolutional codes are the constraint-length-9 codes given in
// VD_POLY below. Both are this design's choice of reading of the standard.
package tdvd_pkg;

  // ---------------------------------------------------------------- turbo
  localparam int W_SYM  = 6;   // channel symbol, 3.3
  localparam int W_LIN  = 6;   // a-priori / extrinsic, 4.2
  localparam int W_MET  = 8;   // alpha, beta, gamma, 6.2
  localparam int W_LLR  = 8;   // a-posteriori LLR output, 6.2
  localparam int TD_STATES = 8;
  localparam int N_BLOCK = 20730;
  localparam int L_SB    = 20;
  localparam int ADDR_W  = 15; // enough for 20730 and for the 2^(n+5) counter

  typedef logic signed [W_SYM-1:0] sym_t;
  typedef logic signed [W_LIN-1:0] lin_t;
  typedef logic signed [W_MET-1:0] met_t;

  // One trellis step as held by the input cache: the data the three TMUs
  // need, plus the (interleaved) memory address the step belongs to.
  typedef struct packed {
    logic              pad;   // step lies beyond the block: metrics forced to 0
    logic [ADDR_W-1:0] addr;  // systematic / extrinsic memory address
    sym_t              rs;    // systematic channel value
    lin_t              lin;   // a-priori information
    sym_t              yp0;   // parity 0 of the active constituent code
    sym_t              yp1;   // parity 1 of the active constituent code
  } cw_t;

  localparam int CW_W = $bits(cw_t);

  // state = {r1, r2, r3}, r1 the most recent register
  function automatic logic td_fb(input logic [2:0] s, input logic u);
    return u ^ s[1] ^ s[0];
  endfunction

  function automatic logic [2:0] td_next(input logic [2:0] s, input logic u);
    return {td_fb(s, u), s[2], s[1]};
  endfunction

  // parity bits {y0, y1} on the branch leaving s with input u
  function automatic logic [1:0] td_par(input logic [2:0] s, input logic u);
    logic a;
    a = td_fb(s, u);
    return {a ^ s[2] ^ s[0], a ^ s[2] ^ s[1] ^ s[0]};
  endfunction

  function automatic met_t sat_met(input logic signed [11:0] v);
    if (v > 12'sd127) return 8'sd127;
    if (v < -12'sd128) return -8'sd128;
    return v[7:0];
  endfunction

  function automatic lin_t sat_lin(input logic signed [11:0] v);
    if (v > 12'sd31) return 6'sd31;
    if (v < -12'sd32) return -6'sd32;
    return v[5:0];
  endfunction

  // ---------------------------------------------------------------- Viterbi
  localparam int W_VSYM = 4;   // soft input
  localparam int W_VPM  = 10;  // path metric
  localparam int W_VBM  = 7;   // branch metric, |sum of six 4-bit values| <= 48
  localparam int VD_K   = 9;
  localparam int VD_STATES = 256;
  localparam int VD_ACS = 16;  // ACS units working in parallel
  localparam int VD_NMAX = 6;  // symbols per bit at rate 1/6

  typedef logic signed [W_VSYM-1:0] vsym_t;
  typedef logic signed [W_VPM-1:0]  vpm_t;
  typedef logic signed [W_VBM-1:0]  vbm_t;

  typedef enum logic [1:0] {R1_2 = 2'd0, R1_3 = 2'd1, R1_4 = 2'd2, R1_6 = 2'd3} vd_rate_e;

  // generator polynomials, 9 taps, bit 8 = current input (cdma2000 codes)
  function automatic logic [8:0] vd_poly(input vd_rate_e r, input int i);
    case (r)
      R1_2: case (i) 0: return 9'o753; 1: return 9'o561; default: return '0; endcase
      R1_3: case (i) 0: return 9'o557; 1: return 9'o663; 2: return 9'o711; default: return '0; endcase
      R1_4: case (i) 0: return 9'o765; 1: return 9'o671; 2: return 9'o513; 3: return 9'o473;
                     default: return '0; endcase
      default: case (i) 0: return 9'o457; 1: return 9'o435; 2: return 9'o657;
                        3: return 9'o561; 4: return 9'o647; 5: return 9'o753; default: return '0; endcase
    endcase
  endfunction

  function automatic int vd_nsym(input vd_rate_e r);
    case (r)
      R1_2: return 2;
      R1_3: return 3;
      R1_4: return 4;
      default: return 6;
    endcase
  endfunction

  // code bits on the branch into state ns = {u, s[7:1]} from s; reg = {u, s}
  function automatic logic [VD_NMAX-1:0] vd_code(input vd_rate_e r, input logic [8:0] reg9);
    logic [VD_NMAX-1:0] c;
    for (int i = 0; i < VD_NMAX; i++) c[i] = ^(reg9 & vd_poly(r, i));
    return c;
  endfunction

endpackage
