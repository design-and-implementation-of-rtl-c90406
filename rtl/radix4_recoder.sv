// Radix-4 recoder of the multiplier.
//
// One converter cell per bit pair recodes the N-bit two's-complement
// multiplier into N/2 signed digits, all in parallel: cell i looks at
// x[2i+1], x[2i] and the upper bit of the pair below, x[2i-1] (0 for i = 0),
// so every digit is ready after one cell delay with no carry chain. Digit i
// has weight 4^i, and sum(digit_i * 4^i) equals the signed multiplier.
// The parallel arrangement of N/2 cells follows the multiplier's recoder;
// the tie of x[-1] to 0 is the usual radix-4 convention. Combinational.
module radix4_recoder
  import tree_mult_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N  // multiplier width, even
) (
  input  logic [N-1:0] multiplier,
  output r4_digit_t    digits [N/2]
);

  // Multiplier with the implicit 0 appended below bit 0.
  logic [N:0] x_ext;
  assign x_ext = {multiplier, 1'b0};

  for (genvar i = 0; i < N/2; i++) begin : g_cell
    r4_converter_cell u_cell (
      .bits  (x_ext[2*i+2 -: 3]),
      .digit (digits[i])
    );
  end

endmodule
