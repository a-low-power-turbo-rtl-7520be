// Reference models shared by the testbenches: the turbo constituent encoder,
// the 3GPP2 interleaver formula, the convolutional encoders and a simple
// noisy channel. Written independently of the RTL.
package tdvd_tb_pkg;

  int unsigned rng_state = 32'h1234_5678;

  function automatic int unsigned rnd();
    rng_state ^= rng_state << 13;
    rng_state ^= rng_state >> 17;
    rng_state ^= rng_state << 5;
    return rng_state;
  endfunction

  // approximately Gaussian noise, standard deviation sigma (sum of 4 uniforms)
  function automatic int noise(int sigma);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'(rnd() % 2001) - 1000;
    return (s * sigma * 1732) / (1000 * 2000);
  endfunction

  function automatic int clip(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // turbo constituent encoder: feedback 1+D^2+D^3, parity 1+D+D^3, 1+D+D^2+D^3
  function automatic void rsc_step(inout int st, input int u, output int y0, output int y1);
    int r1, r2, r3, a;
    r1 = (st >> 2) & 1; r2 = (st >> 1) & 1; r3 = st & 1;
    a  = u ^ r2 ^ r3;
    y0 = a ^ r1 ^ r3;
    y1 = a ^ r1 ^ r2 ^ r3;
    st = (a << 2) | (r1 << 1) | r2;
  endfunction

  // cdma2000 turbo interleaver, table of n = 10 (lower bits used for smaller n)
  function automatic void interleaver(int n_blk, int nb, ref int pi []);
    int tab [32] = '{1, 349, 303, 721, 973, 703, 761, 327, 453, 95, 241, 187, 497, 909, 769, 349,
                     71, 557, 197, 499, 409, 259, 335, 253, 677, 717, 313, 757, 189, 15, 75, 163};
    int k;
    pi = new[n_blk];
    k = 0;
    for (int c = 0; c < (1 << (nb + 5)); c++) begin
      int lo, hi, r, t;
      lo = c & 31; hi = c >> 5; r = 0;
      for (int i = 0; i < 5; i++) if ((lo & (1 << i)) != 0) r |= 1 << (4 - i);
      t = (r << nb) | ((((hi + 1) % (1 << nb)) * (tab[lo] % (1 << nb))) % (1 << nb));
      if (t < n_blk) begin pi[k] = t; k++; end
    end
  endfunction

  // 6-bit (3.3) channel value of a code bit: +-2.0 plus noise (LSB = 1/8)
  function automatic int chan6(int b, int sigma);
    return clip(((b != 0) ? 16 : -16) + noise(sigma), -32, 31);
  endfunction

  // 4-bit soft value for the Viterbi decoder: +-4 plus noise
  function automatic int chan4(int b, int sigma);
    return clip(((b != 0) ? 4 : -4) + noise(sigma), -8, 7);
  endfunction

  function automatic int vd_n(int rate);
    case (rate) 0: return 2; 1: return 3; 2: return 4; default: return 6; endcase
  endfunction

  // cdma2000 generator polynomials (octal), bit 8 = current input
  function automatic int vd_g(int rate, int i);
    int g2 [2] = '{'o753, 'o561};
    int g3 [3] = '{'o557, 'o663, 'o711};
    int g4 [4] = '{'o765, 'o671, 'o513, 'o473};
    int g6 [6] = '{'o457, 'o435, 'o657, 'o561, 'o647, 'o753};
    case (rate) 0: return g2[i]; 1: return g3[i]; 2: return g4[i]; default: return g6[i]; endcase
  endfunction

  // shift register sr holds the last 8 inputs, newest in bit 7
  function automatic int vd_bit(int rate, int i, int u, int sr);
    int r, p;
    r = (u << 8) | sr;
    p = 0;
    for (int b = 0; b < 9; b++) p ^= (r >> b) & (vd_g(rate, i) >> b) & 1;
    return p;
  endfunction
endpackage
