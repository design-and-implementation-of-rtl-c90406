// Self-checking testbench for parallel_adder at its default width: sum and
// carry out must equal a + b + cin, for corner and random operands.
module tb_parallel_adder;

  localparam int unsigned W = 20;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0;
  int failures = 0;

  parallel_adder dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [W-1:0] ta, logic [W-1:0] tb, logic tc);
    logic [W:0] expected;
    a = ta;
    b = tb;
    cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + (W+1)'(tc);
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("%h + %h + %b = %b%h expected %h", ta, tb, tc, cout, sum, expected);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one('1, W'(1), 1'b0);
    for (int i = 0; i < 5000; i++) check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
