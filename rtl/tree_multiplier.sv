// Tree-like radix-4 multiplier: product = multiplicand * multiplier, both
// N-bit two's complement, product 2N bits. Purely combinational.
//
// Structure (N = 16 shown in brackets):
//   * radix4_recoder turns the multiplier into N/2 [8] signed digits in
//     {-2..+2}, all at once.
//   * The N/2 rows of N+2 [18] add/subtract cells are grouped in N/4 [4]
//     row pairs. Each pair forms (d_lo + 4*d_hi) * multiplicand as an
//     N+4 [20]-bit number. Unlike an array multiplier, the rows are not
//     stacked into one tall column: each pair stands alone, so its inputs
//     are ready at once and no pair waits for another.
//   * A binary tree of parallel adders merges the pair sums, log2(N/4) [2]
//     levels deep. A node whose two inputs each cover m rows passes the low
//     2m bits of its lower input straight to its output and adds the rest,
//     sign-extended, to its upper input with an (N+2m)-bit ripple adder; its
//     output covers 2m rows and is N+4m bits wide. [Level 1: two 20-bit
//     adders; level 2: one 24-bit adder; output 8 + 24 = 32 bits.]
// Every width is the smallest that holds its value range: m rows of digits
// weigh at most 2*(4^m - 1)/3 times 2^(N-1), under 2^(N+2m-1), so no node
// overflows and no separate sign-extension cells are needed.
//
// The recoder, the paired rows and the tree of parallel adders follow the
// multiplier as published; the cell insides, the bit alignment between
// levels and the ripple-carry adders are this design's. The longest path
// runs through one recoder cell, the two rows of a pair and the tree's
// adders. N must be a power of two, at least 4.
module tree_multiplier
  import tree_mult_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product
);

  localparam int unsigned PAIRS  = N / 4;
  localparam int unsigned LEVELS = $clog2(PAIRS);

  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("tree_multiplier: N must be a power of two, at least 4");
  end

  r4_digit_t digits [N/2];

  radix4_recoder #(.N(N)) u_recoder (
    .multiplier (multiplier),
    .digits     (digits)
  );

  // Each tree level keeps its node outputs in its own array:
  // g_pair[p].pair_sum at the leaves (N+4 bits), g_level[l].sums[k] above
  // (N+4M bits, exactly the input width of the next level).
  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    logic [N+3:0] pair_sum;

    row_pair #(.N(N)) u_pair (
      .multiplicand (multiplicand),
      .digit_lo     (digits[2*p]),
      .digit_hi     (digits[2*p+1]),
      .pair_sum     (pair_sum)
    );
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned M  = 1 << l;   // rows under each input
    localparam int unsigned WC = N + 2*M;  // input width, also adder width
    localparam int unsigned SH = 2*M;      // bits passed through

    logic [WC+SH-1:0] sums [PAIRS >> l];

    for (genvar k = 0; k < (PAIRS >> l); k++) begin : g_node
      logic [WC-1:0]    lo, hi, a, sum;
      logic             cout;  // unused: the sum never overflows WC bits

      if (l == 1) begin : g_from_pairs
        assign lo = g_pair[2*k].pair_sum;
        assign hi = g_pair[2*k+1].pair_sum;
      end else begin : g_from_level
        assign lo = g_level[l-1].sums[2*k];
        assign hi = g_level[l-1].sums[2*k+1];
      end

      assign a = {{SH{lo[WC-1]}}, lo[WC-1:SH]};

      parallel_adder #(.W(WC)) u_add (
        .a    (a),
        .b    (hi),
        .cin  (1'b0),
        .sum  (sum),
        .cout (cout)
      );

      assign sums[k] = {sum, lo[SH-1:0]};
    end
  end

  // The adders' carry outs are left open: no node overflows its width.
  if (LEVELS == 0) begin : g_out_pair
    assign product = g_pair[0].pair_sum;
  end else begin : g_out_tree
    assign product = g_level[LEVELS].sums[0];
  end

endmodule
