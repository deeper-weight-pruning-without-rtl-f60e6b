// tb_splitter: checks activation selection, negation and carry per column.
//
// Random activations (including the extremes), indexes and decoded digits are
// applied; for every column operand + carry must equal digit * A[idx], where
// the digit is +1 for (f,w) = (1,1), -1 for (1,0) and (0,1), 0 for (0,0).
module tb_splitter;
  localparam int K = 16, A_W = 16, NCOL = 16, IDX_W = 4;

  logic signed [A_W-1:0]   act     [K];
  logic        [IDX_W-1:0] idx     [NCOL];
  logic        [NCOL-1:0]  w_dec, f_dec;
  logic signed [A_W:0]     operand [NCOL];
  logic        [NCOL-1:0]  carry;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;

  splitter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < K; i++) begin
        case ($urandom_range(7))
          0: act[i] = 16'sh8000;
          1: act[i] = 16'sh7fff;
          default: act[i] = A_W'($urandom);
        endcase
      end
      for (int b = 0; b < NCOL; b++) idx[b] = IDX_W'($urandom_range(K - 1));
      w_dec = NCOL'($urandom);
      f_dec = NCOL'($urandom);
      #1;
      for (int b = 0; b < NCOL; b++) begin
        automatic int digit = (f_dec[b] && w_dec[b]) ? 1 : ((f_dec[b] || w_dec[b]) ? -1 : 0);
        automatic int exp_v = digit * int'(act[idx[b]]);
        automatic int got = int'(operand[b]) + int'(carry[b]);
        if (digit == 1) n_pos++; else if (digit == -1) n_neg++; else n_zero++;
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10) $display("t %0d col %0d: got %0d exp %0d", t, b, got, exp_v);
        end
      end
      #9;
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
