# Tree-like radix-4 multiplier

A combinational multiplier for two 16-bit two's-complement numbers that gives
a 32-bit product. It follows the tree-like multiplier of Song, Lee, Lee and
Song (Chungbuk National University).

The design starts from the classic array multiplier. That is one tall column
of add/subtract rows, one row per multiplier bit, with extra cells on the
left to sign-extend negative partial products. It makes two changes:

1. **Radix-4 recoding.** Each pair of multiplier bits becomes one signed digit
   in {-2, -1, 0, +1, +2}. This halves the number of rows to n/2.
2. **Pairs of rows merged by a tree.** The rows are not stacked in one
   column. They are grouped in pairs. Each pair works independently and forms
   the sum of its two partial products. A binary tree of parallel adders then
   adds the pair sums. Every row is only n+2 bits wide. Negative values are
   handled by feeding the multiplicand's sign bit into the top cells, so no
   separate sign-extension cells are needed.

At n = 16 the design has 8 recoder cells, 8 rows of 18 add/subtract cells in
4 pairs, and 3 parallel adders on two levels.

```
 multiplier --> radix4_recoder --> d0 d1 | d2 d3 | d4 d5 | d6 d7
                                    |        |       |       |
 multiplicand --------------> row_pair  row_pair  row_pair  row_pair   (20 bits each)
                                  \       /           \       /
                               parallel_adder       parallel_adder     (20-bit adders)
                                        \               /
                                         parallel_adder                (24-bit adder)
                                               |
                                         product[31:0]
```

## Radix-4 digits

Digit i covers multiplier bits x[2i+1], x[2i] and the bit below them,
x[2i-1]. x[-1] is 0. Its value is `-2*x[2i+1] + x[2i] + x[2i-1]`, with
weight 4^i:

| x[2i+1] x[2i] x[2i-1] | digit |
|---|---|
| 000 | 0 |
| 001, 010 | +1 |
| 011 | +2 |
| 100 | -2 |
| 101, 110 | -1 |
| 111 | 0 |

All digits are formed at once, one converter cell per bit pair, with no carry
chain (`radix4_recoder`, `r4_converter_cell`). A digit travels as three lines
(`tree_mult_pkg::r4_digit_t`):

- `one` selects the multiplicand.
- `two` selects the multiplicand shifted left by one bit.
- `neg` makes the row subtract.

`neg` is held low for a zero digit. Digit 0 can never be +2, because x[-1]
is 0.

## Add/subtract rows and negative operands

A row (`addsub_row`) computes `acc_out = acc_in + d * y` in N+2 bits. Cell j
(`addsub_cell`) works as follows:

- It receives two multiplicand bits: y[j] for |d| = 1 and y[j-1] for |d| = 2.
- It selects one of them, or neither for d = 0.
- It inverts the selected bit when d is negative.
- It adds that bit to the incoming partial-sum bit and the carry from its
  right-hand neighbour.

The row's carry-in is `neg`, which supplies the +1 of the two's-complement
negation. The cell below bit 0 sees 0 as its y[-1]. The two cells above bit
N-1 see y[N-1] on both inputs. This is sign extension done by wiring, inside
the row's own n+2 cells. The value d*y never exceeds 2^N in magnitude, so
N+2 bits always hold it, and the top carry out is dropped.

## Row pairs and the adder tree: alignment and widths

This part takes the most care. Every level shifts its inputs relative to each
other, and every width is chosen as the smallest that cannot overflow.

**Row pair** (`row_pair`). The upper row adds d_lo*y to zero. Its two low
bits are already final. They go straight to the pair output. Its upper N bits
are sign-extended to N+2 bits and enter the lower row, which adds d_hi*y.
That row has weight 4, so it is two bit positions to the left. The pair sum
`{lower row, upper row[1:0]}` is N+4 bits and equals (d_lo + 4*d_hi)*y.

**Tree node** (`tree_multiplier`, `parallel_adder`). Suppose each of a node's
two inputs covers m rows. Then the upper input has weight 4^m = 2^(2m)
relative to the lower one. The node works in three steps:

- It passes the low 2m bits of the lower input straight through.
- It sign-extends the rest of the lower input.
- It adds that to the upper input with an (N+2m)-bit ripple-carry adder.

The output covers 2m rows and is N+4m bits wide. This is enough because m
rows of digits sum to at most 2*(4^m - 1)/3 times 2^(N-1) in magnitude. That
is below 2^(N+2m-1), so an input covering m rows always fits in N+2m bits.

| N = 16 | inputs cover | adder width | bits passed through | output width |
|---|---|---|---|---|
| row pair | 1 row each | 18-cell rows | 2 | 20 |
| level 1 (2 adders) | 2 rows each | 20 | 4 | 24 |
| level 2 (1 adder) | 4 rows each | 24 | 8 | 32 = product |

The same rules hold for any N that is a power of two and at least 4. At
N = 4 there is a single pair and no adder. Each level doubles m until one
node covers all N/2 rows and is 2N bits wide. The adders' carry outs are left
unconnected because no sum can overflow its width. They are the only lint
warnings in the RTL.

## Cost and delay

The published analysis counts cells. Every cell has unit delay. An
add/subtract cell has unit cost, and a full adder costs k < 1. For the
tree-like multiplier it gives:

- n^2/2 + n add/subtract cells
- k(n^2/4 + (n/2)log2 n - 7n/4 + 1) adder cells
- a propagation delay of 2n

It compares these with a radix-2 Booth array (3n^2/2 - n/2 + kn cells,
delay 3n - 1) and a radix-4 "modified" array (3n^2/4 + kn/2 cells, delay
5n/2 - 1). Neither array is part of this RTL.

This implementation at n = 16:

| | published count | this RTL |
|---|---|---|
| add/subtract cells | 144 | 144 (8 rows x 18) |
| adder cells | 69 | 64 (2 x 20 + 24) |
| recoder cells | not counted | 8 |
| unit-delay critical path | 32 | 36 |

The adder widths here are derived from the value ranges above. The published
widths are not stated, and its cell count implies slightly wider adders. The
critical path is 4 cells longer than the published 2n, for two reasons:

- The adders are ripple-carry.
- A pair's lower row must wait for the upper row's sign bit at its top cells.

A faster carry scheme in `parallel_adder` would change only the delay
figures.

## Modules

| file | role |
|---|---|
| `rtl/tree_mult_pkg.sv` | digit type `r4_digit_t`, default width, `digit_value()` |
| `rtl/r4_converter_cell.sv` | one radix-4 recoder cell; asserts the digit encoding rules |
| `rtl/radix4_recoder.sv` | N/2 converter cells in parallel |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/addsub_cell.sv` | select, invert and add: the A cell |
| `rtl/addsub_row.sv` | N+2 A cells with a ripple carry |
| `rtl/row_pair.sv` | two rows: the leaves of the tree |
| `rtl/parallel_adder.sv` | W-bit ripple-carry adder of full adders |
| `rtl/tree_multiplier.sv` | top: recoder, N/4 pairs, log2(N/4)-level adder tree |

Top-level interface, `tree_multiplier #(parameter int unsigned N = 16)`:

| port | width | |
|---|---|---|
| `multiplicand` | N | two's-complement y |
| `multiplier` | N | two's-complement x (the recoded operand) |
| `product` | 2N | x*y, two's complement |

There is no clock, no reset and no handshake. The product follows the inputs
after the combinational delay. To use the multiplier in a clocked design,
register its inputs or outputs as the timing budget needs.

## Simulation

Each testbench checks its results and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/tree_mult_pkg.sv tb/tb_tree_multiplier.sv --top-module tb_tree_multiplier
./obj_dir/Vtb_tree_multiplier
```

| testbench | what it checks |
|---|---|
| `tb_r4_converter_cell` | all 8 bit patterns against -2*b2 + b1 + b0 and the encoding rules |
| `tb_radix4_recoder` | each digit, and that the weighted digits add up to the signed multiplier |
| `tb_addsub_cell` | every input combination for all five digits |
| `tb_addsub_row` | acc_in + d*y mod 2^(N+2) for all digits, with corner and random operands |
| `tb_row_pair` | (d_lo + 4*d_hi)*y for all 25 digit pairs |
| `tb_parallel_adder` | sum and carry out, with corner and random operands |
| `tb_tree_multiplier` | 100 corner pairs and 100,000 random pairs at N = 16 (defaults) |
| `tb_tree_multiplier_sizes` | N = 4 and N = 8 exhaustively, N = 32 with 20,000 pairs |

`tb_tree_multiplier` also recodes every multiplier itself. It counts how often
each row saw each digit value and fails if any possible row/digit combination
never occurred. It also counts negative multiplicands, negative multipliers,
both negative, and the extreme case (-2^15)*(-2^15), and fails if any of these
never occurred. Every testbench has a watchdog that ends the run with a
failure if it hangs.

## Design choices beyond the published description

The published description gives the structure: radix-4 recoder cells beside
the rows, rows in pairs, a tree of parallel adders, n+2-cell rows fed with
the multiplicand's sign bit, and the cost model. The following details are
this design's own:

- The digit encoding (sign plus one-hot magnitude) and the gates inside the
  converter and add/subtract cells.
- The radix-4 rule is the standard one, with 011 -> +2 and 100 -> -2. Each
  cell's second multiplicand input, y[j-1], exists to form the doubled
  multiple.
- The carry-in of `neg` into each row.
- The bit alignment between a pair's rows and between tree levels, and the
  adder widths derived from it.
- Ripple-carry parallel adders.
- A purely combinational top with no registers. The original was evaluated
  as a combinational multiplier mapped onto an FPGA (a Xilinx Spartan XCS40).
