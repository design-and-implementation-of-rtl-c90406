// Self-checking testbench for radix4_recoder (N = 16): for corner values and
// random multipliers, each digit must equal -2*x[2i+1] + x[2i] + x[2i-1]
// and the digits, weighted by 4^i, must add up to the signed multiplier.
module tb_radix4_recoder;
  import tree_mult_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0] multiplier;
  r4_digit_t    digits [N/2];
  int checks = 0;
  int failures = 0;

  radix4_recoder #(.N(N)) dut (.multiplier(multiplier), .digits(digits));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [N-1:0] x);
    longint total;
    int expected;
    logic [N:0] xe;
    multiplier = x;
    #1;
    xe = {x, 1'b0};
    total = 0;
    for (int i = 0; i < N/2; i++) begin
      expected = -2 * int'(xe[2*i+2]) + int'(xe[2*i+1]) + int'(xe[2*i]);
      checks++;
      if (digit_value(digits[i]) != expected) begin
        failures++;
        $display("x=%h digit %0d = %0d expected %0d", x, i, digit_value(digits[i]), expected);
      end
      total += longint'(digit_value(digits[i])) * (longint'(1) << (2*i));
    end
    checks++;
    if (total != longint'($signed(x))) begin
      failures++;
      $display("x=%h digits sum to %0d", x, total);
    end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    check_one({1'b1, {(N-1){1'b0}}});
    check_one({1'b0, {(N-1){1'b1}}});
    check_one(16'h5555);
    check_one(16'hAAAA);
    check_one(16'h3333);
    check_one(16'hCCCC);
    for (int i = 0; i < 2000; i++) check_one(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
