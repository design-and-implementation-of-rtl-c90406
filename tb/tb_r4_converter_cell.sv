// Self-checking testbench for r4_converter_cell: applies all eight input
// patterns and checks the digit's value against -2*b2 + b1 + b0, plus the
// encoding rules (one and two never both high, neg low for a zero digit).
module tb_r4_converter_cell;
  import tree_mult_pkg::*;

  logic [2:0] bits;
  r4_digit_t  digit;
  int checks = 0;
  int failures = 0;

  r4_converter_cell dut (.bits(bits), .digit(digit));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    for (int v = 0; v < 8; v++) begin
      bits = 3'(v);
      #1;
      expected = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      checks++;
      if (digit_value(digit) != expected) begin
        failures++;
        $display("bits=%b digit=%p value=%0d expected=%0d", bits, digit, digit_value(digit), expected);
      end
      checks++;
      if ((digit.one && digit.two) || (expected == 0 && digit != '0)) begin
        failures++;
        $display("bits=%b bad encoding %p", bits, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
