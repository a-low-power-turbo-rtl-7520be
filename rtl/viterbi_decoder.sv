// 256-state Viterbi decoder for the cdma2000 convolutional codes of rate
// 1/2, 1/3, 1/4 and 1/6 (constraint length 9).
//
// One trellis step takes 19 cycles: 16 ACS cycles, in each of
// which 16 ACS units update 16 path metrics and write 16 decisions to the
// survivor memory, two traceback reads and one decode read that yields one
// decoded bit. At 100 MHz this is 100/19 = 5.26 Mb/s. The decoded bits come
// out of the survivor memory unit in reverse order, one bank (T/2 bits) at a
// time; the VD LIFO turns them back into input order.
//
// Interface: a new symbol set (rate-dependent number of 4-bit soft values,
// positive = 1) is taken when in_valid and in_ready are both high; in_ready
// is high while the decoder waits for the next step. init (while idle)
// starts a new frame in state 0. Decoded bits appear as out_valid pulses with
// a latency of a few banks; a frame is flushed by feeding further steps
// (e.g. the encoder's zero tail followed by zero inputs). The survivor
// memory port is external so that it can be mapped onto the turbo SRAMs.
//
// The decoder has no ACS units of its own. In each ACS cycle it presents 16
// operand pairs on acs_pm0/acs_bm0/acs_pm1/acs_bm1 and expects, in the same
// cycle, the 16 selected sums on acs_sum and the decisions on acs_dec; in the
// combined decoder these come from the turbo SISO's ACS-alpha and ACS-beta1
// units. acs_en marks the cycles in which the units are needed.
module viterbi_decoder
  import tdvd_pkg::*;
#(
  parameter int T     = 64,
  parameter int NBANK = 8,
  parameter int MAW   = $clog2(NBANK * T / 2) + 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           init,
  input  vd_rate_e       rate,
  input  logic           in_valid,
  output logic           in_ready,
  input  vsym_t          in_sym [VD_NMAX],
  // survivor memory
  output logic           mem_we,
  output logic [MAW-1:0] mem_addr,
  output logic [15:0]    mem_d,
  input  logic [15:0]    mem_q,
  // borrowed ACS units
  output logic           acs_en,
  output vpm_t           acs_pm0 [VD_ACS],
  output vbm_t           acs_bm0 [VD_ACS],
  output vpm_t           acs_pm1 [VD_ACS],
  output vbm_t           acs_bm1 [VD_ACS],
  input  logic signed [W_VPM:0] acs_sum [VD_ACS],
  input  logic [VD_ACS-1:0] acs_dec,
  // decoded bits in order
  output logic           out_valid,
  output logic           out_bit
);
  logic       active, post;
  logic [4:0] cyc;
  vsym_t      sym [VD_NMAX];
  logic [VD_ACS-1:0] dec;

  assign in_ready = !active || cyc == 5'd18;

  always_ff @(posedge clk) begin
    if (rst || init) begin
      active <= 1'b0;
      cyc    <= '0;
      post   <= 1'b0;
      for (int i = 0; i < VD_NMAX; i++) sym[i] <= '0;
    end else begin
      post <= active && cyc == 5'd18;
      if (in_valid && in_ready) begin
        sym    <= in_sym;
        active <= 1'b1;
        cyc    <= '0;
      end else if (active) begin
        if (cyc == 5'd18) active <= 1'b0;
        else              cyc <= cyc + 1'b1;
      end
    end
  end

  assign acs_en = active && cyc < 5'd16;
  assign dec    = acs_dec;

  vd_tmu u_tmu (.rate, .sym, .grp(cyc[3:0]), .bm0(acs_bm0), .bm1(acs_bm1));

  vd_pmu u_pmu (
    .clk, .rst, .init, .en(acs_en), .grp(cyc[3:0]),
    .pm0(acs_pm0), .pm1(acs_pm1), .sum(acs_sum));

  logic b_valid, b_ok, b_bit;
  vd_smu #(.T(T), .NBANK(NBANK), .MAW(MAW)) u_smu (
    .clk, .rst, .init, .active, .cyc, .dec, .post,
    .mem_we, .mem_addr, .mem_d, .mem_q,
    .bit_valid(b_valid), .bit_ok(b_ok), .bit_out(b_bit));

  logic       lf_v;
  logic [1:0] lf_q;
  lifo_rev #(.DEPTH(T / 2), .W(2)) u_vd_lifo (
    .clk, .rst(rst || init), .push(b_valid), .din({b_ok, b_bit}),
    .out_valid(lf_v), .dout(lf_q));

  assign out_valid = lf_v && lf_q[1];
  assign out_bit   = lf_q[0];
endmodule
