// Interleaver address generation with two AGs.
//
// The 3GPP2 interleaver generates tentative addresses from a counter and
// drops those not below N, which would stall a decoder that needs one address
// per cycle. Two AGs evaluate counter values c and c+1 in parallel: if c gives
// a valid address it is used and the counter advances by one; if it is
// invalid, the address of the other AG is taken and the counter advances by
// two. For the 3GPP2 block sizes (2^(n+4) < N) every even counter value is
// valid, so two invalid values never follow each other and one address is
// delivered every enabled cycle. The assertion checks that property.
// When 'inverse' is 0 the unit outputs the identity sequence 0,1,2,... (the
// order of the first constituent decoder).
module il_dual_ag
  import tdvd_pkg::*;
#(
  parameter int N  = N_BLOCK,
  parameter int NB = 10
) (
  input  logic              clk,
  input  logic              rst,     // restart the sequence
  input  logic              en,      // advance to the next address
  input  logic              permute, // 1: interleaved order, 0: natural order
  output logic [ADDR_W-1:0] addr,    // current address (held until en)
  output logic              skipped  // the current address came from the second AG
);
  logic [NB+4:0] cnt;
  logic [ADDR_W-1:0] nat;
  logic [ADDR_W-1:0] a0, a1;
  logic v0, v1;

  il_agen #(.N(N), .NB(NB)) u_ag1 (.cnt(cnt),        .addr(a0), .valid(v0));
  il_agen #(.N(N), .NB(NB)) u_ag2 (.cnt(cnt + 1'b1), .addr(a1), .valid(v1));

  always_comb begin
    if (!permute)  begin addr = nat; skipped = 1'b0; end
    else if (v0)   begin addr = a0;  skipped = 1'b0; end
    else           begin addr = a1;  skipped = 1'b1; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      nat <= '0;
    end else if (en) begin
      nat <= nat + 1'b1;
      cnt <= cnt + ((permute && !v0) ? (NB+5)'(2) : (NB+5)'(1));
    end
  end

  assert property (@(posedge clk) disable iff (rst) (en && permute && !v0) |-> v1)
    else $error("two consecutive invalid interleaver addresses");
endmodule
