// tb_csd_controller: checks row sequencing and timing.
//
// For random k' in 1..16 a start pulse is given; the testbench then expects
// exactly k' cycles with step high and row = 0, 1, ..., k'-1, first only on
// row 0, then one cycle of done, busy over all of them, and a return to idle.
// A start pulse while busy must be ignored.
module tb_csd_controller;
  localparam int ROWS = 16, ROW_AW = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic [ROW_AW:0]   num_rows = '0;
  logic busy, step, first, done;
  logic [ROW_AW-1:0] row;
  int checks = 0, failures = 0;

  csd_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic got, logic exp_v, string what, int t, int c);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("set %0d cycle %0d: %s got %0b exp %0b", t, c, what, got, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic int n = 1 + $urandom_range(ROWS - 1);
      if (t == 0) n = 1;
      if (t == 1) n = ROWS;
      @(negedge clk);
      expect_bit(busy, 0, "idle busy", t, -1);
      start = 1; num_rows = (ROW_AW+1)'(n);
      @(negedge clk);
      start = 0;
      for (int c = 0; c < n; c++) begin
        // a second start while running is ignored
        start = (c == 0);
        num_rows = 5'd3;
        #1;
        expect_bit(step, 1, "step", t, c);
        expect_bit(first, c == 0, "first", t, c);
        expect_bit(done, 0, "done", t, c);
        expect_bit(busy, 1, "busy", t, c);
        checks++;
        if (int'(row) != c) begin failures++; $display("row %0d exp %0d", row, c); end
        @(negedge clk);
        start = 0;
      end
      expect_bit(step, 0, "step after", t, n);
      expect_bit(done, 1, "done", t, n);
      @(negedge clk);
      expect_bit(done, 0, "done after", t, n + 1);
      expect_bit(busy, 0, "busy after", t, n + 1);
      repeat ($urandom_range(2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
