// Self-checking testbench for addsub_row (N = 16): acc_out must equal
// acc_in + digit * multiplicand modulo 2^(N+2), for all five digits, corner
// multiplicands and random multiplicands and partial sums.
module tb_addsub_row;
  import tree_mult_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0] multiplicand;
  r4_digit_t    digit;
  logic [N+1:0] acc_in, acc_out;
  int checks = 0;
  int failures = 0;

  addsub_row #(.N(N)) dut (.*);

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

  task automatic check_one(logic [N-1:0] y, int d, logic [N+1:0] acc);
    longint expected;
    multiplicand = y;
    digit = make_digit(d);
    acc_in = acc;
    #1;
    expected = longint'($signed(acc)) + longint'(d) * longint'($signed(y));
    checks++;
    if (acc_out != (N+2)'(expected)) begin
      failures++;
      $display("y=%h d=%0d acc=%h -> %h expected %h", y, d, acc, acc_out, (N+2)'(expected));
    end
  endtask

  initial begin
    for (int d = -2; d <= 2; d++) begin
      check_one('0, d, '0);
      check_one({1'b1, {(N-1){1'b0}}}, d, '0);
      check_one({1'b0, {(N-1){1'b1}}}, d, '0);
      check_one('1, d, '0);
      for (int i = 0; i < 1000; i++) begin
        // acc_in limited to what a row receives in the tree: |acc| < 2^(N-2)
        logic [N+1:0] acc;
        acc = (N+2)'($signed((N-1)'($urandom)));
        check_one(N'($urandom), d, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
