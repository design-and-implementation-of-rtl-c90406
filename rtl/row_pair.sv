// A pair of add/subtract rows: the leaves of the tree.
//
// pair_sum = (digit_lo + 4 * digit_hi) * multiplicand, N+4 bits, two's
// complement. The upper row adds digit_lo * y to zero, forming the first
// partial product. Its two low bits are final and go straight to
// pair_sum[1:0]; its upper N bits, sign-extended by wiring to N+2 bits,
// enter the lower row, which adds digit_hi * y to them. The lower row's
// N+2 bits form pair_sum[N+3:2]. Pairing two rows and passing their sum to
// the parallel adders follows the multiplier's structure; the exact bit
// alignment is worked out here from the value ranges: |pair_sum| <= 10 * 2^(N-1)
// fits in N+4 bits. Combinational; about 2*(N+2) cell delays.
module row_pair
  import tree_mult_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic [N-1:0] multiplicand,
  input  r4_digit_t    digit_lo,
  input  r4_digit_t    digit_hi,
  output logic [N+3:0] pair_sum
);

  logic [N+1:0] pp_lo;     // digit_lo * y
  logic [N+1:0] acc_hi;    // pp_lo >>> 2, sign-extended
  logic [N+1:0] sum_hi;    // (pp_lo >>> 2) + digit_hi * y

  addsub_row #(.N(N)) u_row_lo (
    .multiplicand (multiplicand),
    .digit        (digit_lo),
    .acc_in       ('0),
    .acc_out      (pp_lo)
  );

  assign acc_hi = {{2{pp_lo[N+1]}}, pp_lo[N+1:2]};

  addsub_row #(.N(N)) u_row_hi (
    .multiplicand (multiplicand),
    .digit        (digit_hi),
    .acc_in       (acc_hi),
    .acc_out      (sum_hi)
  );

  assign pair_sum = {sum_hi, pp_lo[1:0]};

endmodule
