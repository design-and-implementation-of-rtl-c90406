// Add/subtract cell (cell "A") of a partial-product row.
//
// The cell sees two multiplicand bits: y1 = y[j] and y2 = y[j-1]. The row's
// digit selects y1 for magnitude 1 or y2 for magnitude 2 (the multiplicand
// shifted left by one), or nothing for 0; for a negative digit the selected
// bit is inverted, and the row's carry-in adds the missing +1. A full adder
// then adds that bit to the partial-sum bit arriving from the row above and
// the carry from the cell to the right.
// That each cell takes a pair of multiplicand bits follows the multiplier's
// cell arrangement; the select/invert/add gate structure is this design's.
// Combinational; one cell delay from c_in to c_out.
module addsub_cell
  import tree_mult_pkg::*;
(
  input  logic      y1,     // y[j],   used for magnitude 1
  input  logic      y2,     // y[j-1], used for magnitude 2
  input  r4_digit_t digit,  // the row's digit
  input  logic      s_in,   // partial-sum bit from above
  input  logic      c_in,   // carry from the right
  output logic      s_out,
  output logic      c_out
);

  logic sel;
  logic b;

  always_comb begin
    sel = (digit.one & y1) | (digit.two & y2);
    b   = sel ^ digit.neg;
  end

  full_adder u_fa (
    .a  (s_in),
    .b  (b),
    .ci (c_in),
    .s  (s_out),
    .co (c_out)
  );

endmodule
