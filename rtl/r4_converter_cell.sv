// Radix-4 converter cell (the recoder cell "C"): turns three adjacent
// multiplier bits into one signed radix-4 digit.
//
// Input bits = {x[2i+1], x[2i], x[2i-1]}; the digit is
// -2*x[2i+1] + x[2i] + x[2i-1]:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// The recoding rule is the standard radix-4 (modified Booth) rule used by the
// tree-like multiplier. The sign/one-hot output encoding and holding `neg`
// low for a zero digit are this design's choices. Purely combinational.
module r4_converter_cell
  import tree_mult_pkg::*;
(
  input  logic [2:0] bits,   // {x[2i+1], x[2i], x[2i-1]}
  output r4_digit_t  digit
);

  always_comb begin
    digit.one = bits[1] ^ bits[0];
    digit.two = (bits[2] & ~bits[1] & ~bits[0]) | (~bits[2] & bits[1] & bits[0]);
    digit.neg = bits[2] & ~(bits[1] & bits[0]);
  end

  // Encoding rules: at most one magnitude line, and no negative zero.
  always_comb begin
    assert (!(digit.one && digit.two))
      else $error("r4_converter_cell: one and two both high");
    assert (digit.neg -> (digit.one || digit.two))
      else $error("r4_converter_cell: negative zero digit");
  end

endmodule
