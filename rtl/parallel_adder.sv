// W-bit parallel adder of the tree: a ripple-carry chain of one-bit full
// adder cells, sum = a + b + cin (mod 2^W), cout the carry out of the top
// cell. The full adder cell and the unit delay per cell follow the
// multiplier's cost model; the ripple carry is this design's reading of it.
// Combinational; W cell delays from cin to cout.
module parallel_adder #(
  parameter int unsigned W = 20  // n+4: first tree level of the 16-bit multiplier
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .ci (carry[i]),
      .s  (sum[i]),
      .co (carry[i+1])
    );
  end

  assign cout = carry[W];

endmodule
