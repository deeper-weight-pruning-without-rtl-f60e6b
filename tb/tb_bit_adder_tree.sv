// tb_bit_adder_tree: checks the per-column accumulation.
//
// Sets of 1..16 rows of random operands and carries are accumulated, the first
// row with clear. After each row the register must equal a reference sum kept
// by the testbench; idle cycles (en low) must leave it unchanged.
module tb_bit_adder_tree;
  localparam int LANES = 16, OP_W = 17, ACC_W = 25;

  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic signed [OP_W-1:0]  operand [LANES];
  logic        [LANES-1:0] carry = '0;
  logic signed [ACC_W-1:0] sum;
  int checks = 0, failures = 0;
  longint ref_sum;

  bit_adder_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (longint'(sum) != ref_sum) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, sum, ref_sum);
    end
  endtask

  initial begin
    foreach (operand[l]) operand[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int rows = 1 + $urandom_range(15);
      for (int r = 0; r < rows; r++) begin
        @(negedge clk);
        en = 1;
        clear = (r == 0);
        if (r == 0) ref_sum = 0;
        for (int l = 0; l < LANES; l++) begin
          // extremes now and then so the width is exercised
          operand[l] = ($urandom_range(9) == 0) ? 17'sh10000 : OP_W'($urandom);
          carry[l]   = 1'($urandom);
          ref_sum += longint'(operand[l]) + longint'(carry[l]);
        end
        @(negedge clk);
        en = 0;
        check("row");
      end
      // idle cycle with changing inputs: no change
      operand[0] = operand[0] + 1;
      @(negedge clk);
      check("idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
