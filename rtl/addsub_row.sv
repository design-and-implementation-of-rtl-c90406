// One row of N+2 add/subtract cells.
//
// acc_out = acc_in + digit * multiplicand, all in (N+2)-bit two's complement.
// Cell j takes multiplicand bits y[j] and y[j-1]; below bit 0 the 2x input is
// 0, and the two cells above the multiplicand's top bit take its sign bit
// y[N-1] on both inputs, so the row covers negative multiplicands without any
// separate sign-extension cells. The carry ripples right to left, starting
// with the digit's neg line as carry-in (the +1 of the two's-complement
// negation). The carry out of the top cell is dropped: with |digit| <= 2 and
// acc_in limited as the tree uses it, the result always fits in N+2 bits.
// The N+2-cell row and the sign-bit feed follow the multiplier's row layout;
// the carry-in use is this design's. Combinational; N+2 cell delays from the
// right end to the left end.
module addsub_row
  import tree_mult_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N  // multiplicand width
) (
  input  logic [N-1:0] multiplicand,
  input  r4_digit_t    digit,
  input  logic [N+1:0] acc_in,
  output logic [N+1:0] acc_out
);

  // y_ext[k+1] = y[k]: index 0 holds the 0 below bit 0, and the top two
  // entries repeat the sign bit.
  logic [N+2:0] y_ext;
  logic [N+2:0] carry;

  assign y_ext    = {{2{multiplicand[N-1]}}, multiplicand, 1'b0};
  assign carry[0] = digit.neg;

  for (genvar j = 0; j < N+2; j++) begin : g_cell
    addsub_cell u_cell (
      .y1    (y_ext[j+1]),
      .y2    (y_ext[j]),
      .digit (digit),
      .s_in  (acc_in[j]),
      .c_in  (carry[j]),
      .s_out (acc_out[j]),
      .c_out (carry[j+1])
    );
  end

  // carry[N+2] is the dropped top carry.
  logic unused_top_carry;
  assign unused_top_carry = carry[N+2];

endmodule
