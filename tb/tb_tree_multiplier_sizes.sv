// Checks the tree-like multiplier at other operand widths, since the
// structure is defined for any power-of-two width: N = 4 (a single row pair,
// no adder tree) and N = 8 (one parallel adder) exhaustively, and N = 32
// (three tree levels) with random and corner operands. Each product is
// compared with the signed product worked out by the simulator.
module tb_tree_multiplier_sizes;

  logic [3:0]  y4, x4;
  logic [7:0]  p4;
  logic [7:0]  y8, x8;
  logic [15:0] p8;
  logic [31:0] y32, x32;
  logic [63:0] p32;
  int checks = 0;
  int failures = 0;

  tree_multiplier #(.N(4))  dut4  (.multiplicand(y4),  .multiplier(x4),  .product(p4));
  tree_multiplier #(.N(8))  dut8  (.multiplicand(y8),  .multiplier(x8),  .product(p8));
  tree_multiplier #(.N(32)) dut32 (.multiplicand(y32), .multiplier(x32), .product(p32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c32 [6];
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        y4 = 4'(i);
        x4 = 4'(j);
        #1;
        checks++;
        if (int'($signed(p4)) != int'($signed(y4)) * int'($signed(x4))) begin
          failures++;
          $display("N=4: %0d * %0d = %0d", $signed(y4), $signed(x4), $signed(p4));
        end
      end
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        y8 = 8'(i);
        x8 = 8'(j);
        #1;
        checks++;
        if (int'($signed(p8)) != int'($signed(y8)) * int'($signed(x8))) begin
          failures++;
          if (failures < 20)
            $display("N=8: %0d * %0d = %0d", $signed(y8), $signed(x8), $signed(p8));
        end
      end
    end
    c32[0] = 32'h8000_0000;
    c32[1] = 32'h7fff_ffff;
    c32[2] = 32'hffff_ffff;
    c32[3] = 32'h0000_0001;
    c32[4] = 32'h5555_5555;
    c32[5] = 32'haaaa_aaaa;
    for (int k = 0; k < 20036; k++) begin
      if (k < 36) begin
        y32 = c32[k / 6];
        x32 = c32[k % 6];
      end else begin
        y32 = $urandom;
        x32 = $urandom;
      end
      #1;
      checks++;
      if ($signed(p32) != longint'($signed(y32)) * longint'($signed(x32))) begin
        failures++;
        if (failures < 20)
          $display("N=32: %0d * %0d = %0d", $signed(y32), $signed(x32), $signed(p32));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
