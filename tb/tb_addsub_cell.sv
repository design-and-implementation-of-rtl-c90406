// Self-checking testbench for addsub_cell: every combination of the two
// multiplicand bits, the five legal digits, the sum input and the carry
// input. The expected result is computed from the digit's integer value:
// the cell adds the selected bit (complemented for negative digits) to
// s_in and c_in.
module tb_addsub_cell;
  import tree_mult_pkg::*;

  logic      y1, y2, s_in, c_in, s_out, c_out;
  r4_digit_t digit;
  int checks = 0;
  int failures = 0;

  addsub_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r4_digit_t table_d [5];
    int d, bitv, total;
    table_d[0] = '{neg: 1'b1, two: 1'b1, one: 1'b0};  // -2
    table_d[1] = '{neg: 1'b1, two: 1'b0, one: 1'b1};  // -1
    table_d[2] = '{neg: 1'b0, two: 1'b0, one: 1'b0};  //  0
    table_d[3] = '{neg: 1'b0, two: 1'b0, one: 1'b1};  // +1
    table_d[4] = '{neg: 1'b0, two: 1'b1, one: 1'b0};  // +2
    for (int di = 0; di < 5; di++) begin
      for (int v = 0; v < 16; v++) begin
        digit = table_d[di];
        {y1, y2, s_in, c_in} = 4'(v);
        #1;
        d = di - 2;
        bitv = (d == 1 || d == -1) ? int'(y1) : (d == 2 || d == -2) ? int'(y2) : 0;
        if (d < 0) bitv = 1 - bitv;
        total = bitv + int'(s_in) + int'(c_in);
        checks++;
        if ({c_out, s_out} != 2'(total)) begin
          failures++;
          $display("d=%0d y1=%b y2=%b s_in=%b c_in=%b -> %b%b expected %0d",
                   d, y1, y2, s_in, c_in, c_out, s_out, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
