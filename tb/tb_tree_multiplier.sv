// End-to-end testbench of the 16 x 16-bit tree-like multiplier, with every
// parameter at its default. It applies corner operands (zero, +-1, the most
// negative and most positive values, alternating patterns) and random pairs,
// and compares the product with the signed product worked out by the
// simulator. It also recodes each multiplier itself and counts, for every
// row, how often each digit value -2..+2 occurred, so that every row is seen
// to subtract, add, skip and use the doubled multiplicand; a row/digit
// combination that never occurred counts as a failure, as does a missing
// case of negative multiplicand, negative multiplier, both negative, or the
// extreme product (-2^(N-1))^2. (Row 0 can never hold +2: the bit below
// x[0] is 0.)
// The multiplier is combinational: each vector is given one time step, and
// the product must be valid at the end of it (zero clock cycles of latency).
module tb_tree_multiplier;

  localparam int unsigned N = 16;
  localparam int unsigned NRAND = 100000;

  logic [N-1:0]   multiplicand, multiplier;
  logic [2*N-1:0] product;
  int checks = 0;
  int failures = 0;

  int digit_seen [N/2][5];
  int neg_y = 0, neg_x = 0, neg_both = 0, extreme = 0;

  tree_multiplier dut (.*);

  initial begin : watchdog
    #(NRAND * 2 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [N-1:0] y, logic [N-1:0] x);
    longint expected;
    logic [N:0] xe;
    int d;
    multiplicand = y;
    multiplier = x;
    #1;
    expected = longint'($signed(y)) * longint'($signed(x));
    checks++;
    if (longint'($signed(product)) != expected) begin
      failures++;
      if (failures < 20)
        $display("%0d * %0d = %0d expected %0d", $signed(y), $signed(x), $signed(product), expected);
    end
    xe = {x, 1'b0};
    for (int i = 0; i < N/2; i++) begin
      d = -2 * int'(xe[2*i+2]) + int'(xe[2*i+1]) + int'(xe[2*i]);
      digit_seen[i][d+2]++;
    end
    if (y[N-1]) neg_y++;
    if (x[N-1]) neg_x++;
    if (x[N-1] && y[N-1]) neg_both++;
    if (y == {1'b1, {(N-1){1'b0}}} && x == y) extreme++;
  endtask

  initial begin
    logic [N-1:0] corners [10];
    corners[0] = '0;
    corners[1] = N'(1);
    corners[2] = '1;
    corners[3] = {1'b1, {(N-1){1'b0}}};
    corners[4] = {1'b0, {(N-1){1'b1}}};
    corners[5] = {(N/2){2'b01}};
    corners[6] = {(N/2){2'b10}};
    corners[7] = {(N/4){4'b0011}};
    corners[8] = {(N/4){4'b1100}};
    corners[9] = {1'b1, {(N-2){1'b0}}, 1'b1};
    foreach (digit_seen[i, j]) digit_seen[i][j] = 0;

    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        check_one(corners[i], corners[j]);
    for (int i = 0; i < NRAND; i++)
      check_one(N'($urandom), N'($urandom));

    for (int i = 0; i < N/2; i++) begin
      for (int j = 0; j < 5; j++) begin
        // Row 0 sees x[-1] = 0, so its digit can never be +2.
        if (i == 0 && j == 4) continue;
        checks++;
        if (digit_seen[i][j] == 0) begin
          failures++;
          $display("row %0d never saw digit %0d", i, j - 2);
        end
      end
      $display("row %0d digits -2..+2 seen: %0d %0d %0d %0d %0d", i,
               digit_seen[i][0], digit_seen[i][1], digit_seen[i][2],
               digit_seen[i][3], digit_seen[i][4]);
    end
    $display("negative multiplicand %0d, negative multiplier %0d, both %0d, extreme %0d",
             neg_y, neg_x, neg_both, extreme);
    checks += 4;
    if (neg_y == 0) failures++;
    if (neg_x == 0) failures++;
    if (neg_both == 0) failures++;
    if (extreme == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
