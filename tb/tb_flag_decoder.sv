// tb_flag_decoder: checks the decoding of single-bit ternary columns.
//
// Random columns of 1..16 digits are put in ternary order, encoded with the
// reference encoder, and streamed row by row through the decoder (first row
// with init). Each row's decoded value, (f,w): (1,1) = +1, (1,0)/(0,1) = -1,
// (0,0) = 0, must equal the original digit. A few all-zero padding rows follow
// every column. Covers both flag settings and the flag reset on a 1->0
// transition.
module tb_flag_decoder;
  import csd_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en = 0, init = 0, f_init = 0, w_mem = 0;
  logic w_out, f_out;
  int checks = 0, failures = 0;
  int n_flag0 = 0, n_flag1 = 0, n_reset = 0;

  flag_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int decoded(logic f, logic w);
    if (f && w) return 1;
    if (f || w) return -1;
    return 0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Worked example: four columns of a 4-row set.
    //   flag 1, bits 0,0,1,0 -> -1,-1,+1,0    flag 0, bits 1,0,0,0 -> -1,0,0,0
    //   flag 1, bits 1,1,0,0 -> +1,+1,0,0     flag 0, bits 0,0,0,0 -> 0,0,0,0
    begin
      automatic bit ex_f[4] = '{1, 0, 1, 0};
      automatic bit ex_b[4][4] = '{'{0,0,1,0}, '{1,0,0,0}, '{1,1,0,0}, '{0,0,0,0}};
      automatic int ex_v[4][4] = '{'{-1,-1,1,0}, '{-1,0,0,0}, '{1,1,0,0}, '{0,0,0,0}};
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          @(negedge clk);
          en = 1; init = (r == 0); f_init = ex_f[c]; w_mem = ex_b[c][r];
          #1;
          checks++;
          if (decoded(f_out, w_out) != ex_v[c][r]) begin
            failures++;
            $display("example col %0d row %0d: got %0d exp %0d", c, r, decoded(f_out, w_out), ex_v[c][r]);
          end
        end
    end
    for (int t = 0; t < 400; t++) begin
      automatic digit_q_t d, ord;
      automatic bit flag;
      automatic bit bits[$];
      automatic int n = 1 + $urandom_range(15);
      for (int i = 0; i < n; i++) d.push_back(int'($urandom_range(2)) - 1);
      ord = ternary_order(d);
      encode_column(ord, flag, bits);
      if (flag) n_flag1++; else n_flag0++;
      // padding rows keep the column going past its end
      for (int p = 0; p < 3; p++) begin ord.push_back(0); bits.push_back(0); end
      for (int r = 0; r < ord.size(); r++) begin
        @(negedge clk);
        en     = 1;
        init   = (r == 0);
        f_init = flag;
        w_mem  = bits[r];
        #1;
        checks++;
        if (decoded(f_out, w_out) != ord[r]) begin
          failures++;
          if (failures < 10)
            $display("col %0d row %0d: got %0d exp %0d", t, r, decoded(f_out, w_out), ord[r]);
        end
        if (flag && r > 0 && bits[r-1] && !bits[r]) n_reset++;
      end
      @(negedge clk);
      en = 0;
      // random idle gap
      repeat ($urandom_range(2)) @(negedge clk);
    end
    checks++;
    if (n_flag0 == 0 || n_flag1 == 0 || n_reset == 0) begin
      failures++;
      $display("coverage: flag0=%0d flag1=%0d reset=%0d", n_flag0, n_flag1, n_reset);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
