// One 3GPP2 turbo interleaver address generator (AG).
//
// For an (n+5)-bit counter value c the tentative interleaved address is
//   { bitrev(c[4:0]), ((c[n+4:5] + 1) * T[c[4:0]]) mod 2^n }
// where T is the 32-entry multiplier table of the cdma2000 turbo interleaver
// for the given n. The address is valid when it is below the block length N;
// invalid addresses are dropped by the caller. Combinational. The table is
// the standard's (reproduced here for n = 10, the block length 20730; for
// other n a table of the same form must be supplied).
module il_agen
  import tdvd_pkg::*;
#(
  parameter int N  = N_BLOCK,
  parameter int NB = 10    // n: smallest with N <= 2^(n+5)
) (
  input  logic [NB+4:0]     cnt,
  output logic [ADDR_W-1:0] addr,
  output logic              valid
);
  function automatic logic [9:0] lut10(input logic [4:0] i);
    case (i)
      5'd0: return 10'd1;    5'd1: return 10'd349;  5'd2: return 10'd303;  5'd3: return 10'd721;
      5'd4: return 10'd973;  5'd5: return 10'd703;  5'd6: return 10'd761;  5'd7: return 10'd327;
      5'd8: return 10'd453;  5'd9: return 10'd95;   5'd10: return 10'd241; 5'd11: return 10'd187;
      5'd12: return 10'd497; 5'd13: return 10'd909; 5'd14: return 10'd769; 5'd15: return 10'd349;
      5'd16: return 10'd71;  5'd17: return 10'd557; 5'd18: return 10'd197; 5'd19: return 10'd499;
      5'd20: return 10'd409; 5'd21: return 10'd259; 5'd22: return 10'd335; 5'd23: return 10'd253;
      5'd24: return 10'd677; 5'd25: return 10'd717; 5'd26: return 10'd313; 5'd27: return 10'd757;
      5'd28: return 10'd189; 5'd29: return 10'd15;  5'd30: return 10'd75;  default: return 10'd163;
    endcase
  endfunction

  logic [NB-1:0] msb, mult;
  logic [4:0]    lsb, rev;
  logic [2*NB-1:0] prod;
  logic [NB+4:0] tent;

  always_comb begin
    lsb  = cnt[4:0];
    msb  = cnt[NB+4:5] + 1'b1;
    mult = NB'(lut10(lsb));
    prod = msb * mult;
    for (int i = 0; i < 5; i++) rev[i] = lsb[4-i];
    tent  = {rev, prod[NB-1:0]};
    addr  = ADDR_W'(tent);
    valid = (32'(tent) < N);
  end
endmodule
