// Self-checking testbench for row_pair (N = 16): pair_sum must equal
// (d_lo + 4*d_hi) * multiplicand as an (N+4)-bit two's-complement number,
// for all 25 digit combinations with corner and random multiplicands.
module tb_row_pair;
  import tree_mult_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0] multiplicand;
  r4_digit_t    digit_lo, digit_hi;
  logic [N+3:0] pair_sum;
  int checks = 0;
  int failures = 0;

  row_pair #(.N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic r4_digit_t make_digit(int d);
    r4_digit_t r;
    r.neg = d < 0;
    r.one = d == 1 || d == -1;
    r.two = d == 2 || d == -2;
    return r;
  endfunction

  task automatic check_one(logic [N-1:0] y, int dl, int dh);
    longint expected;
    multiplicand = y;
    digit_lo = make_digit(dl);
    digit_hi = make_digit(dh);
    #1;
    expected = longint'(dl) * longint'($signed(y)) + 4 * longint'(dh) * longint'($signed(y));
    checks++;
    if (longint'($signed(pair_sum)) != expected) begin
      failures++;
      $display("y=%h dl=%0d dh=%0d -> %0d expected %0d", y, dl, dh, $signed(pair_sum), expected);
    end
  endtask

  initial begin
    for (int dl = -2; dl <= 2; dl++) begin
      for (int dh = -2; dh <= 2; dh++) begin
        check_one('0, dl, dh);
        check_one({1'b1, {(N-1){1'b0}}}, dl, dh);
        check_one({1'b0, {(N-1){1'b1}}}, dl, dh);
        check_one('1, dl, dh);
        for (int i = 0; i < 200; i++) check_one(N'($urandom), dl, dh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
