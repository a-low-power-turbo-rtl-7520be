// Turbo decoder: one SISO decoder used alternately as constituent decoder 1
// and 2, an embedded interleaver, and the systematic and extrinsic memories.
//
// A block of N bits is decoded in ITER iterations of two half-iterations.
// Half 0 (decoder 1) visits the steps in natural order, half 1 (decoder 2) in
// interleaved order: the address a of step k is k or pi(k). For every step
// the unit fetches the systematic value at a (from the external codeword
// memory in the very first half, when it is also stored in the systematic
// SRAM), the a-priori value Lin at a from the extrinsic SRAM, and the two
// parities of the active encoder at k from the external codeword memory, and
// streams the word into the SISO's input cache. The SISO writes Lex back to
// the extrinsic SRAM at the address carried with the step. Because both
// halves read and write at the same address a, the extrinsic memory is never
// reordered: a single memory serves as interleaver and de-interleaver, with one
// read and one write per datapath cycle on a single port at the double clock.
// pi(k) comes from two 3GPP2 address generators working side by side.
//
// In the last half-iteration the hard decisions and LLRs leave through the TD
// LIFO, which restores ascending step order within each window; each result
// carries its bit index pi(k), i.e. the output is de-interleaved by index.
//
// Clocking: clk is the memory clock; the datapath advances every second
// cycle (mphase, generated here). External codeword memory: cw_data must
// answer cw_addr/cw_sel within two clock cycles (combinational is fine);
// cw_sel 0 selects {rs, y0, y1} of encoder 1, 1 selects {-, y0', y1'}.
// The two memories are ports so that a top level can share them.
// vd_*: the SISO's ACS-alpha and ACS-beta1 units lent to a Viterbi decoder
// (see td_siso); used while the turbo decoder is idle.
module turbo_decoder
  import tdvd_pkg::*;
#(
  parameter int N    = N_BLOCK,
  parameter int LSB  = L_SB,
  parameter int ITER = 6,
  parameter int NB   = 10,
  parameter int MW   = 8,            // width of the shared memories
  parameter int MAW  = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // external codeword memory
  output logic [ADDR_W-1:0] cw_addr,
  output logic              cw_sel,
  input  sym_t              cw_data [3],
  // systematic SRAM
  output logic              sys_we,
  output logic [MAW-1:0]    sys_addr,
  output logic [MW-1:0]     sys_d,
  input  logic [MW-1:0]     sys_q,
  // extrinsic SRAM
  output logic              ext_we,
  output logic [MAW-1:0]    ext_addr,
  output logic [MW-1:0]     ext_d,
  input  logic [MW-1:0]     ext_q,
  // decoded output, ascending within each window
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_idx,
  output logic              out_bit,
  output met_t              out_llr,
  output logic              ag_skip,    // pulse: second AG's address used
  // shared ACS units
  input  logic              vd_en,
  input  vpm_t              vd_pm0 [16],
  input  vbm_t              vd_bm0 [16],
  input  vpm_t              vd_pm1 [16],
  input  vbm_t              vd_bm1 [16],
  output logic signed [W_VPM:0] vd_sum [16],
  output logic [15:0]       vd_dec
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_FLUSH} st_e;
  st_e st;
  logic mphase;
  logic half, first_half, last_half;
  logic [$clog2(ITER+1)-1:0] it;
  logic [$clog2(LSB+1)-1:0] fl_cnt;

  logic siso_start, siso_done, siso_busy;
  logic fill_en, fill_pad;
  cw_t  fill_word;
  logic so_valid, so_pad, so_hard;
  logic [ADDR_W-1:0] so_addr;
  lin_t so_lex;
  met_t so_llr;

  assign first_half = (it == '0) && !half;
  assign last_half  = (32'(it) == ITER-1) && half;
  assign siso_start = (st == S_START) && !mphase;
  assign busy       = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      mphase <= 1'b0;
      st     <= S_IDLE;
      it     <= '0;
      half   <= 1'b0;
      done   <= 1'b0;
      fl_cnt <= '0;
    end else begin
      mphase <= !mphase;
      done   <= 1'b0;
      case (st)
        S_IDLE:  if (start) begin st <= S_START; it <= '0; half <= 1'b0; end
        S_START: if (!mphase) st <= S_RUN;
        S_RUN:   if (siso_done) begin
                   if (last_half) begin
                     st <= S_FLUSH; fl_cnt <= '0;
                   end else begin
                     st   <= S_START;
                     half <= !half;
                     if (half) it <= it + 1'b1;
                   end
                 end
        S_FLUSH: if (!mphase) begin
                   if (32'(fl_cnt) == LSB-1) begin st <= S_IDLE; done <= 1'b1; end
                   fl_cnt <= fl_cnt + 1'b1;
                 end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------ address generation
  logic [ADDR_W-1:0] a_addr, k_cnt;
  logic              a_skip;
  il_dual_ag #(.N(N), .NB(NB)) u_ag (
    .clk, .rst(rst || siso_start), .en(!mphase && fill_en && !fill_pad),
    .permute(half), .addr(a_addr), .skipped(a_skip));

  always_ff @(posedge clk) begin
    if (rst || siso_start) k_cnt <= '0;
    else if (!mphase && fill_en && !fill_pad) k_cnt <= k_cnt + 1'b1;
  end

  assign ag_skip = !mphase && fill_en && !fill_pad && half && a_skip;
  assign cw_addr = k_cnt;
  assign cw_sel  = half;

  // ------------------------------------------------ memory ports
  // systematic: first half writes (mphase=0 edge), otherwise reads (mphase=1)
  // extrinsic:  reads Lin on mphase=1 edges, writes Lex on mphase=0 edges
  always_comb begin
    sys_we   = first_half && !mphase && fill_en && !fill_pad;
    sys_addr = MAW'(a_addr);
    sys_d    = MW'(cw_data[0]);
    ext_we   = !mphase && so_valid && !so_pad;
    ext_addr = mphase ? MAW'(a_addr) : MAW'(so_addr);
    ext_d    = MW'(so_lex);
  end

  always_comb begin
    fill_word.pad  = fill_pad;
    fill_word.addr = a_addr;
    fill_word.rs   = first_half ? cw_data[0] : sym_t'(sys_q[W_SYM-1:0]);
    fill_word.lin  = lin_t'(ext_q[W_LIN-1:0]);
    fill_word.yp0  = cw_data[1];
    fill_word.yp1  = cw_data[2];
  end

  td_siso #(.N(N), .LSB(LSB)) u_siso (
    .clk, .rst, .mphase, .start(siso_start), .first_half,
    .fill_en, .fill_pad, .fill_word,
    .out_valid(so_valid), .out_pad(so_pad), .out_addr(so_addr), .out_lex(so_lex),
    .out_llr(so_llr), .out_hard(so_hard), .busy(siso_busy), .done(siso_done),
    .vd_en, .vd_pm0, .vd_bm0, .vd_pm1, .vd_bm1, .vd_sum, .vd_dec);

  // ------------------------------------------------ TD LIFO
  localparam int LW = 1 + ADDR_W + W_MET + 1;
  logic          lf_push, lf_ov;
  logic [LW-1:0] lf_din, lf_dout;
  always_comb begin
    lf_push = (last_half && st == S_RUN && so_valid) || (st == S_FLUSH && !mphase);
    lf_din  = (st == S_FLUSH) ? '0 : {!so_pad, so_addr, so_llr, so_hard};
  end

  lifo_rev #(.DEPTH(LSB), .W(LW)) u_td_lifo (
    .clk, .rst, .push(lf_push), .din(lf_din), .out_valid(lf_ov), .dout(lf_dout));

  always_comb begin
    out_valid = lf_ov && lf_dout[LW-1];
    out_idx   = lf_dout[LW-2 -: ADDR_W];
    out_llr   = met_t'(lf_dout[W_MET:1]);
    out_bit   = lf_dout[0];
  end
endmodule
