// Survivor memory unit of the Viterbi decoder: decision storage and
// traceback in the style of the k-pointer even algorithm with k = 3
// (two traceback reads and one decode read per decoded bit).
//
// Every trellis step stores 256 decisions as 16 words of 16 bits (word grp
// holds the decisions of states 16*grp..16*grp+15). The memory is a ring of
// NBANK banks of B = T/2 steps. Whenever a bank has been filled, a traceback
// job starts from state 0 at the newest step and reads back 2B = T steps,
// two per trellis step, so it ends when the next bank is full. Its final
// state then seeds the decode pointer, which reads back one further bank,
// one step per trellis step, and emits one decoded bit per read (in
// descending step order; the VD LIFO restores the order).
// A traceback read of step y in state s reads word (y, s[7:4]), takes bit
// s[3:0] as decision d and moves to state {s[6:0], d}; the decoded bit of
// step y is s[7].
//
// Timing (one trellis step = 19 cycles, driven by the decoder's cycle
// counter cyc): cyc 0..15 write the decisions of group cyc, cyc 16 and 17 are
// the two traceback reads, cyc 18 the decode read; the memory reads
// synchronously, so each read result is used in the following cycle. The
// memory port is brought out so the decoder can share the turbo SRAMs.
module vd_smu
  import tdvd_pkg::*;
#(
  parameter int T     = 64,
  parameter int NBANK = 8,                   // power of two, >= 5
  parameter int B     = T / 2,
  parameter int SW    = $clog2(NBANK * B),   // step-slot bits
  parameter int MAW   = SW + 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             init,        // start of a frame
  input  logic             active,      // a trellis step is in progress
  input  logic [4:0]       cyc,         // 0..18 within the step
  input  logic [VD_ACS-1:0] dec,        // decisions of group cyc (cyc < 16)
  input  logic             post,        // cycle following cyc 18
  // survivor memory port
  output logic             mem_we,
  output logic [MAW-1:0]   mem_addr,
  output logic [15:0]      mem_d,
  input  logic [15:0]      mem_q,
  // decoded bits, descending order within a bank
  output logic             bit_valid,
  output logic             bit_ok,      // belongs to a real step (not before the frame)
  output logic             bit_out
);
  localparam int PW = 24;
  typedef logic signed [PW-1:0] ptr_t;

  ptr_t wstep;                 // step being written
  ptr_t tb_ptr, dc_ptr;
  logic [7:0] tb_st, dc_st;
  logic tb_act, tb_done, dc_act;
  logic [$clog2(T+1)-1:0] tb_cnt;
  logic [$clog2(B+1)-1:0] dc_cnt;
  logic dc_rd;                 // a decode read was issued in cyc 18
  logic tb_rd;                 // a traceback read was issued in the previous cycle
  logic [7:0] tb_nx;

  function automatic logic [MAW-1:0] waddr(input ptr_t p, input logic [3:0] g);
    return {p[SW-1:0], g};
  endfunction

  logic tb_new;   // this step closes a bank: a traceback job starts
  assign tb_new = (wstep[$clog2(B)-1:0] == '1);
  assign tb_nx  = {tb_st[6:0], mem_q[tb_st[3:0]]};

  always_comb begin
    mem_we   = 1'b0;
    mem_addr = '0;
    mem_d    = dec;
    if (active && cyc < 5'd16) begin
      mem_we   = 1'b1;
      mem_addr = waddr(wstep, cyc[3:0]);
    end else if (active && cyc == 5'd16) begin
      mem_addr = tb_new ? waddr(wstep, 4'd0) : waddr(tb_ptr, tb_st[7:4]);
    end else if (active && cyc == 5'd17) begin
      mem_addr = tb_rd ? waddr(tb_ptr - 1, tb_nx[7:4]) : waddr(tb_ptr, tb_st[7:4]);
    end else if (active && cyc == 5'd18) begin
      mem_addr = waddr(dc_ptr, dc_st[7:4]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      wstep <= '0; tb_act <= 1'b0; tb_done <= 1'b0; dc_act <= 1'b0;
      tb_ptr <= '0; dc_ptr <= '0; tb_st <= '0; dc_st <= '0;
      tb_cnt <= '0; dc_cnt <= '0; dc_rd <= 1'b0; tb_rd <= 1'b0;
      bit_valid <= 1'b0; bit_ok <= 1'b0; bit_out <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      tb_rd     <= 1'b0;
      if (active) begin
        // a new traceback job at the end of every bank
        if (cyc == 5'd16) begin
          if (tb_new) begin
            tb_act <= 1'b1;
            tb_ptr <= wstep;
            tb_st  <= '0;
            tb_cnt <= ($clog2(T+1))'(T);
            tb_rd  <= 1'b1;
          end else begin
            tb_rd  <= tb_act;
          end
        end
        if (cyc == 5'd17 || cyc == 5'd18) begin
          if (tb_rd) begin
            tb_st  <= tb_nx;
            tb_ptr <= tb_ptr - 1;
            tb_cnt <= tb_cnt - 1'b1;
            if (tb_cnt == 1) begin tb_act <= 1'b0; tb_done <= 1'b1; end
          end
          tb_rd <= (cyc == 5'd17) && tb_rd && (tb_cnt != 1);
        end
        if (cyc == 5'd18) begin
          dc_rd <= dc_act;
          wstep <= wstep + 1;
        end
      end
      if (post) begin
        if (dc_rd) begin
          bit_valid <= 1'b1;
          bit_ok    <= (dc_ptr >= 0);
          bit_out   <= dc_st[7];
          dc_st     <= {dc_st[6:0], mem_q[dc_st[3:0]]};
          dc_ptr    <= dc_ptr - 1;
          dc_cnt    <= dc_cnt - 1'b1;
          if (dc_cnt == 1) dc_act <= 1'b0;
          dc_rd     <= 1'b0;
        end
        if (tb_done) begin
          tb_done <= 1'b0;
          dc_act  <= 1'b1;
          dc_ptr  <= tb_ptr;
          dc_st   <= tb_st;
          dc_cnt  <= ($clog2(B+1))'(B);
        end
      end
    end
  end
endmodule
