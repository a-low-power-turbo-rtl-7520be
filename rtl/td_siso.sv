// Single SISO decoder of the turbo decoder: windowed Max-Log-MAP with three
// concurrent recursions.
//
// The block of N trellis steps is cut into NSB windows (sub-blocks) of LSB
// steps. In time slot t (LSB datapath cycles) four things happen at once:
//   - window t is written into the input cache (one step per cycle),
//   - ACS-beta1 runs a dummy backward recursion over window t-1, starting
//     from equal metrics, to find the starting metrics at its left edge,
//   - ACS-alpha runs the forward recursion over window t-2 and stores every
//     alpha in SRAM-alpha,
//   - ACS-beta2 runs the true backward recursion over window t-3, starting
//     from the beta1 result of the previous slot, and together with the
//     stored alphas the LLR unit produces L(u) and Lex(u) for every step.
// A half-iteration therefore takes NSB+3 slots. Windows beyond the block and
// steps past N are "pad" steps whose branch metrics are zero, which leaves the
// final window's beta starting from equal metrics (unterminated trellis end).
//
// Cache placement: window s lives in bank s mod 3 and is stored reversed when
// floor(s/3) is odd. With that rule the incoming window is written exactly
// into the location beta2 reads in the same cycle. SRAM-alpha (LSB words)
// uses the same trick with an orientation that flips every window, so
// ACS-alpha writes into the word beta2 has just read.
//
// Timing: the datapath runs at half the memory clock. mphase=1 marks the first
// memory cycle of a datapath cycle. Schedule and addresses advance on the
// edges with mphase=0; the ACS groups update on the edges with mphase=1,
// three memory cycles after the addresses were set. The caller supplies the
// word of the write stream (fill_k while fill_en) by the next mphase=0 edge.
// Results (out_*) appear as one-cycle pulses, reversed within each window;
// start is sampled on an mphase=0 edge.
//
// In the Viterbi mode the sixteen ACS units of ACS-alpha and ACS-beta1 serve
// the Viterbi decoder through the vd_* ports (combinational), while ACS-beta2,
// the cache and the LLR unit stay idle.
module td_siso
  import tdvd_pkg::*;
#(
  parameter int N   = N_BLOCK,
  parameter int LSB = L_SB,
  parameter int NSB = (N + LSB - 1) / LSB
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mphase,
  input  logic              start,       // begin a half-iteration (pulse)
  input  logic              first_half,  // no a-priori information yet
  // write stream into the cache
  output logic              fill_en,     // this datapath cycle stores a step
  output logic              fill_pad,    // ... which lies beyond the block
  input  cw_t               fill_word,
  // results
  output logic              out_valid,   // one per beta2 step, pad steps included
  output logic              out_pad,     // ... step beyond the block: no result
  output logic [ADDR_W-1:0] out_addr,
  output lin_t              out_lex,
  output met_t              out_llr,
  output logic              out_hard,
  output logic              busy,
  output logic              done,        // pulse after the last step
  // Viterbi mode: ACS-alpha (units 0..7) and ACS-beta1 (units 8..15) lent out
  input  logic              vd_en,
  input  vpm_t              vd_pm0 [16],
  input  vbm_t              vd_bm0 [16],
  input  vpm_t              vd_pm1 [16],
  input  vbm_t              vd_bm1 [16],
  output logic signed [W_VPM:0] vd_sum [16],
  output logic [15:0]       vd_dec
);
  localparam int CAW = $clog2(3*LSB);
  localparam int JW  = $clog2(LSB);
  localparam int AAW = (LSB > 1) ? $clog2(LSB) : 1;
  localparam int TW  = $clog2(NSB + 4) + 1;
  localparam int TLAST = NSB + 2;

  typedef struct packed {
    logic          valid;
    logic [TW-1:0] t;
    logic [JW-1:0] j;
    logic [1:0]    bank_w;
    logic          dir_w;
  } sched_t;

  sched_t sc, scd;   // address stage, compute stage

  // ------------------------------------------------ schedule (mphase = 0)
  always_ff @(posedge clk) begin
    if (rst) begin
      sc <= '0;
    end else if (!mphase) begin
      if (start) begin
        sc <= '{valid: 1'b1, t: '0, j: '0, bank_w: 2'd0, dir_w: 1'b0};
      end else if (sc.valid) begin
        if (sc.j == JW'(LSB-1)) begin
          sc.j <= '0;
          if (sc.t == TW'(TLAST)) sc.valid <= 1'b0;
          sc.t <= sc.t + 1'b1;
          if (sc.bank_w == 2'd2) begin
            sc.bank_w <= 2'd0;
            sc.dir_w  <= !sc.dir_w;
          end else begin
            sc.bank_w <= sc.bank_w + 1'b1;
          end
        end else begin
          sc.j <= sc.j + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) scd <= '0;
    else if (!mphase) scd <= sc;
  end

  assign busy = sc.valid || scd.valid;

  // ------------------------------------------------ cache addressing
  function automatic logic [CAW-1:0] caddr(input logic [1:0] bank, input logic dir,
                                           input logic [JW-1:0] kin);
    return CAW'(bank) * CAW'(LSB) + CAW'(dir ? JW'(LSB-1) - kin : kin);
  endfunction

  logic [1:0] bank_b1, bank_a;
  logic       dir_b1, dir_a;
  logic [JW-1:0] jrev;
  logic [CAW-1:0] addr_a, addr_b1, addr_b2;

  always_comb begin
    jrev    = JW'(LSB-1) - sc.j;
    bank_b1 = (sc.bank_w == 2'd0) ? 2'd2 : sc.bank_w - 1'b1;
    dir_b1  = (sc.bank_w == 2'd0) ? !sc.dir_w : sc.dir_w;
    bank_a  = (sc.bank_w == 2'd2) ? 2'd0 : sc.bank_w + 1'b1;
    dir_a   = (sc.bank_w < 2'd2) ? !sc.dir_w : sc.dir_w;
    addr_b2 = caddr(sc.bank_w, sc.dir_w, sc.j);     // = beta2's (window t-3, reversed)
    addr_b1 = caddr(bank_b1, dir_b1, jrev);
    addr_a  = caddr(bank_a, dir_a, sc.j);
    fill_en  = sc.valid && (32'(sc.t) < NSB);
    fill_pad = (32'(sc.t) * LSB + 32'(sc.j)) >= N;
  end

  cw_t q_a, q_b1, q_b2;
  input_cache #(.LSB(LSB), .W(CW_W)) u_cache (
    .clk, .mphase,
    .addr_a, .addr_b1, .addr_b2,
    .we(fill_en), .din(fill_word),
    .q_a, .q_b1, .q_b2);

  // ------------------------------------------------ compute stage (mphase = 1)
  // window index handled by each recursion in the compute stage
  localparam logic signed [TW+1:0] NSB_S = (TW+2)'(NSB);
  logic signed [TW+1:0] w_b1, w_a, w_b2;
  logic act_b1, act_a, act_b2;
  cw_t  c_a, c_b1, c_b2;

  always_comb begin
    w_b1 = $signed({2'b0, scd.t}) - 1;
    w_a  = $signed({2'b0, scd.t}) - 2;
    w_b2 = $signed({2'b0, scd.t}) - 3;
    act_b1 = scd.valid && (w_b1 >= 0);
    act_a  = scd.valid && (w_a  >= 0) && (w_a < NSB_S);
    act_b2 = scd.valid && (w_b2 >= 0) && (w_b2 < NSB_S);
    c_a  = q_a;  c_a.pad  = q_a.pad  || !act_a;
    c_b1 = q_b1; c_b1.pad = q_b1.pad || (w_b1 >= NSB_S);
    c_b2 = q_b2; c_b2.pad = q_b2.pad || !act_b2;
  end

  met_t g_a [8], g_b1 [8], g_b2 [8];
  met_t ls_a, ls_b1, ls_b2;
  td_tmu u_tmu_a  (.cw(c_a),  .first_half, .gamma(g_a),  .lsys(ls_a));
  td_tmu u_tmu_b1 (.cw(c_b1), .first_half, .gamma(g_b1), .lsys(ls_b1));
  td_tmu u_tmu_b2 (.cw(c_b2), .first_half, .gamma(g_b2), .lsys(ls_b2));

  met_t zero8 [8], alpha0 [8];
  always_comb begin
    for (int s = 0; s < 8; s++) begin
      zero8[s]  = '0;
      alpha0[s] = (s == 0) ? 8'sd0 : -8'sd128;   // encoder starts in state 0
    end
  end

  met_t a_prev [8], a_reg [8], b1_prev [8], b1_reg [8], b2_prev [8], b2_reg [8];
  logic st_a, st_b, en_c;
  assign en_c = mphase && scd.valid;
  assign st_a = (w_a == 0) && (scd.j == '0);
  assign st_b = (scd.j == '0);

  // operands of the lent units: 0..7 to ACS-alpha, 8..15 to ACS-beta1
  vpm_t vp0a [8], vp1a [8], vp0b [8], vp1b [8], zpm [8];
  met_t vb0a [8], vb1a [8], vb0b [8], vb1b [8], zbm [8];
  logic signed [W_VPM:0] vsa [8], vsb [8], zsum [8];
  logic [7:0] vda, vdb, zdec;
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      vp0a[i] = vd_pm0[i];     vp1a[i] = vd_pm1[i];
      vb0a[i] = W_MET'(vd_bm0[i]); vb1a[i] = W_MET'(vd_bm1[i]);
      vp0b[i] = vd_pm0[i + 8]; vp1b[i] = vd_pm1[i + 8];
      vb0b[i] = W_MET'(vd_bm0[i + 8]); vb1b[i] = W_MET'(vd_bm1[i + 8]);
      vd_sum[i] = vsa[i]; vd_sum[i + 8] = vsb[i];
      zpm[i] = '0; zbm[i] = '0;
    end
    vd_dec = {vdb, vda};
  end

  td_acs_group #(.BACKWARD(1'b0)) u_acs_a (
    .clk, .rst, .en(en_c && act_a), .start(st_a), .init(alpha0), .gamma(g_a),
    .prev(a_prev), .metric(a_reg),
    .ext_en(vd_en), .ext_pm0(vp0a), .ext_bm0(vb0a), .ext_pm1(vp1a), .ext_bm1(vb1a),
    .ext_sum(vsa), .ext_dec(vda));
  td_acs_group #(.BACKWARD(1'b1)) u_acs_b1 (
    .clk, .rst, .en(en_c && act_b1), .start(st_b), .init(zero8), .gamma(g_b1),
    .prev(b1_prev), .metric(b1_reg),
    .ext_en(vd_en), .ext_pm0(vp0b), .ext_bm0(vb0b), .ext_pm1(vp1b), .ext_bm1(vb1b),
    .ext_sum(vsb), .ext_dec(vdb));
  td_acs_group #(.BACKWARD(1'b1)) u_acs_b2 (
    .clk, .rst, .en(en_c && act_b2), .start(st_b), .init(b1_reg), .gamma(g_b2),
    .prev(b2_prev), .metric(b2_reg),
    .ext_en(1'b0), .ext_pm0(zpm), .ext_bm0(zbm), .ext_pm1(zpm), .ext_bm1(zbm),
    .ext_sum(zsum), .ext_dec(zdec));

  // ------------------------------------------------ SRAM-alpha
  // read for beta2 on mphase=0 edges (schedule sc), write alpha on mphase=1
  // edges (schedule scd): both use the address of the same step.
  function automatic logic [AAW-1:0] aaddr(input logic [TW-1:0] t, input logic [JW-1:0] j);
    logic [TW-1:0] w;
    w = t - TW'(2);
    return AAW'(w[0] ? JW'(LSB-1) - j : j);
  endfunction

  logic [8*W_MET-1:0] sa_d, sa_q;
  logic [AAW-1:0] sa_addr;
  always_comb begin
    for (int s = 0; s < 8; s++) sa_d[s*W_MET +: W_MET] = a_prev[s];
    sa_addr = mphase ? aaddr(scd.t, scd.j) : aaddr(sc.t, sc.j);
  end

  sram_sp #(.DEPTH(LSB), .W(8*W_MET), .AW(AAW)) u_sram_alpha (
    .clk, .en(1'b1), .we(mphase && scd.valid && act_a), .addr(sa_addr),
    .d(sa_d), .q(sa_q));

  met_t a_k [8];
  always_comb for (int s = 0; s < 8; s++) a_k[s] = sa_q[s*W_MET +: W_MET];

  // ------------------------------------------------ LLR unit
  met_t llr;
  lin_t lex;
  logic hard;
  llr_unit u_llr (.alpha(a_k), .beta(b2_prev), .gamma(g_b2), .lsys(ls_b2),
                  .llr, .lex, .hard);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_valid <= en_c && act_b2;
      done      <= en_c && (scd.t == TW'(TLAST)) && (scd.j == JW'(LSB-1));
      if (en_c) begin
        out_pad  <= c_b2.pad;
        out_addr <= q_b2.addr;
        out_lex  <= lex;
        out_llr  <= llr;
        out_hard <= hard;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) (start && !mphase) |-> !busy)
    else $error("td_siso started while busy");
endmodule
