// Window order reverser (TD LIFO and VD LIFO).
//
// Data produced in reverse order in windows of DEPTH items (beta2 / LLR
// outputs of the turbo SISO, traceback outputs of the Viterbi decoder) are put
// back in forward order. One memory of DEPTH words works as a LIFO per window:
// each push reads the word stored at the current address before overwriting
// it, and the address runs up through one window and down through the next,
// so the item popped is always the one pushed DEPTH pushes earlier at the
// mirrored position. Output is valid one push after the read (registered).
module lifo_rev #(
  parameter int DEPTH = 20,
  parameter int W     = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         out_valid,  // one cycle pulse per popped item
  output logic [W-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          up;
  logic          primed;  // first window has been filled

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0; up <= 1'b1; primed <= 1'b0; out_valid <= 1'b0;
    end else begin
      out_valid <= push && primed;
      if (push) begin
        dout     <= mem[ptr];
        mem[ptr] <= din;
        if (up ? (ptr == AW'(DEPTH-1)) : (ptr == '0)) begin
          up     <= !up;
          primed <= 1'b1;
        end else begin
          ptr <= up ? ptr + 1'b1 : ptr - 1'b1;
        end
      end
    end
  end
endmodule
