// Unified turbo / Viterbi channel decoder for 3GPP2 (cdma2000).
//
// Two decoders share the two large single-port SRAMs of the chip. In turbo
// mode (mode = 0) memory 0 holds the systematic symbols and memory 1 the
// extrinsic information (which also serves as interleaver/de-interleaver);
// in Viterbi mode (mode = 1) the two memories together form the survivor
// memory, each holding 8 of the 16 decisions written per ACS cycle. The mode
// must only change while both decoders are idle.
//
// Turbo mode: rate 1/5 turbo code, block length N, ITER iterations with a
// single windowed Max-Log-MAP SISO decoder (see turbo_decoder). The received
// block sits in an external codeword memory read through cw_*; results come
// out with their bit index on td_out_*.
// Viterbi mode: 256-state decoder for rates 1/2..1/6 (see viterbi_decoder),
// symbols in on vd_in_*, bits out on vd_out_*.
// clk is the memory clock (the turbo datapath runs at half of it, the
// Viterbi decoder at full rate).
module tdvd_top
  import tdvd_pkg::*;
#(
  parameter int N     = N_BLOCK,
  parameter int LSB   = L_SB,
  parameter int ITER  = 6,
  parameter int NB    = 10,
  parameter int DEPTH = N_BLOCK,   // words of each shared SRAM
  parameter int T     = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              mode,        // 0: turbo, 1: Viterbi
  // turbo decoder
  input  logic              td_start,
  output logic              td_busy,
  output logic              td_done,
  output logic [ADDR_W-1:0] cw_addr,
  output logic              cw_sel,
  input  sym_t              cw_data [3],
  output logic              td_out_valid,
  output logic [ADDR_W-1:0] td_out_idx,
  output logic              td_out_bit,
  output met_t              td_out_llr,
  output logic              td_ag_skip,
  // Viterbi decoder
  input  logic              vd_init,
  input  vd_rate_e          vd_rate,
  input  logic              vd_in_valid,
  output logic              vd_in_ready,
  input  vsym_t             vd_in_sym [VD_NMAX],
  output logic              vd_out_valid,
  output logic              vd_out_bit
);
  localparam int MAW  = $clog2(DEPTH);
  localparam int VMAW = $clog2(8 * T / 2) + 4;

  // turbo side memory ports
  logic            sys_we, ext_we;
  logic [MAW-1:0]  sys_addr, ext_addr;
  logic [7:0]      sys_d, ext_d, q0, q1;
  // Viterbi side memory port
  logic             vm_we;
  logic [VMAW-1:0]  vm_addr;
  logic [15:0]      vm_d;
  // ACS units of the turbo SISO lent to the Viterbi decoder
  logic             acs_en;
  vpm_t             acs_pm0 [VD_ACS], acs_pm1 [VD_ACS];
  vbm_t             acs_bm0 [VD_ACS], acs_bm1 [VD_ACS];
  logic signed [W_VPM:0] acs_sum [VD_ACS];
  logic [VD_ACS-1:0] acs_dec;

  turbo_decoder #(.N(N), .LSB(LSB), .ITER(ITER), .NB(NB), .MW(8), .MAW(MAW)) u_td (
    .clk, .rst(rst || mode), .start(td_start && !mode), .busy(td_busy), .done(td_done),
    .cw_addr, .cw_sel, .cw_data,
    .sys_we, .sys_addr, .sys_d, .sys_q(q0),
    .ext_we, .ext_addr, .ext_d, .ext_q(q1),
    .out_valid(td_out_valid), .out_idx(td_out_idx), .out_bit(td_out_bit),
    .out_llr(td_out_llr), .ag_skip(td_ag_skip),
    .vd_en(mode && acs_en), .vd_pm0(acs_pm0), .vd_bm0(acs_bm0),
    .vd_pm1(acs_pm1), .vd_bm1(acs_bm1), .vd_sum(acs_sum), .vd_dec(acs_dec));

  viterbi_decoder #(.T(T), .NBANK(8), .MAW(VMAW)) u_vd (
    .clk, .rst(rst || !mode), .init(vd_init), .rate(vd_rate),
    .in_valid(vd_in_valid && mode), .in_ready(vd_in_ready), .in_sym(vd_in_sym),
    .mem_we(vm_we), .mem_addr(vm_addr), .mem_d(vm_d), .mem_q({q1, q0}),
    .acs_en, .acs_pm0, .acs_bm0, .acs_pm1, .acs_bm1, .acs_sum, .acs_dec,
    .out_valid(vd_out_valid), .out_bit(vd_out_bit));

  // SRAM 0: TD systematic symbols / VD survivor memory (decisions 7..0)
  sram_sp #(.DEPTH(DEPTH), .W(8), .AW(MAW)) u_sram_sys (
    .clk, .en(1'b1),
    .we(mode ? vm_we : sys_we),
    .addr(mode ? MAW'(vm_addr) : sys_addr),
    .d(mode ? vm_d[7:0] : sys_d),
    .q(q0));

  // SRAM 1: TD extrinsic symbols / VD survivor memory (decisions 15..8)
  sram_sp #(.DEPTH(DEPTH), .W(8), .AW(MAW)) u_sram_ext (
    .clk, .en(1'b1),
    .we(mode ? vm_we : ext_we),
    .addr(mode ? MAW'(vm_addr) : ext_addr),
    .d(mode ? vm_d[15:8] : ext_d),
    .q(q1));

  initial assert (DEPTH >= N && DEPTH >= 8 * T / 2 * 16)
    else $error("shared SRAM too small");
endmodule
