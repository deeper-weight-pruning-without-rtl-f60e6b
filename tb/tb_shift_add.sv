// tb_shift_add: checks the shift-and-add tree in both weight widths.
//
// Random signed partial sums S_0..S_15 are applied. Reference, 16-bit mode:
//   S_0 + S_1 + sum_{c=2..15} S_c * 2^(c-1)
// int8 mode (two groups of eight columns with the same layout):
//   sum_{g=0,1} ( S_8g + S_8g+1 + sum_{c=2..7} S_8g+c * 2^(c-1) )
module tb_shift_add;
  localparam int ACC_W = 25, OUT_W = 42, NCOL = 16;

  logic int8;
  logic signed [ACC_W-1:0] s [NCOL];
  logic signed [OUT_W-1:0] result;
  int checks = 0, failures = 0;

  shift_add dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint col_weight(int c, bit m8);
    int p = m8 ? c % 8 : c;
    return (p < 2) ? 64'd1 : (64'd1 << (p - 1));
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      automatic longint exp_v = 0;
      int8 = t[0];
      for (int c = 0; c < NCOL; c++) begin
        case ($urandom_range(5))
          0: s[c] = {1'b1, {(ACC_W-1){1'b0}}};   // most negative
          1: s[c] = {1'b0, {(ACC_W-1){1'b1}}};   // most positive
          default: s[c] = ACC_W'($urandom);
        endcase
        exp_v += longint'(s[c]) * col_weight(c, int8);
      end
      #1;
      checks++;
      if (longint'(result) != exp_v) begin
        failures++;
        if (failures < 10) $display("t %0d int8 %0b: got %0d exp %0d", t, int8, result, exp_v);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
