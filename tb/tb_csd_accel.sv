// tb_csd_accel: end-to-end test of the accelerator at its default size.
//
// Each operation draws, for each of the 16 lanes, 16 activations and 16
// weights given directly as signed digits (0, +1, -1) on positions 0..14
// (16-bit mode) or 0..6 (int8 mode). The testbench condenses them itself:
//   - bit-0 digits alternate between columns 0 and 1, bit b >= 1 goes to
//     column b+1 (16-bit); in int8 mode the same for 8 columns, after which
//     each column list is split, first half in column c, rest in column c+8;
//   - each column list is put in ternary order (-1, +1, 0), padded to k'
//     rows (padding carries random indexes) and encoded to one bit per digit
//     plus a flag;
// loads the buffers, starts the set and expects, num_rows + 1 cycles after
// the start edge, the exact dot product sum_lanes sum_i A_i * W_i, computed
// from the original digits.
// Operation 2 is a worked example: the 8-bit weights -55, +12 and -32 in
// their sign-free CSD forms. Digit densities vary per operation so that k'
// ranges from 1 to 16. The
// mechanisms are counted and each must occur: flag-0 columns, flag-1
// columns, flag reset on a 1->0 transition, subtraction, bit 0 split over
// two columns, padded columns, 16-bit and int8 sets, k' = 1 and k' = 16.
module tb_csd_accel;
  import csd_tb_pkg::*;
  localparam int LANES = 16, K = 16, NCOL = 16, A_W = 16, ROWS = 16;
  localparam int IDX_W = 4, ROW_AW = 4, LANE_W = 4, OUT_W = 42;
  localparam int NOPS = 200;

  logic clk = 0, rst_n = 0;
  logic act_we = 0, row_we = 0, flag_we = 0, start = 0, int8 = 0;
  logic [LANE_W-1:0]     act_lane = '0, row_lane = '0, flag_lane = '0;
  logic [IDX_W-1:0]      act_addr = '0;
  logic signed [A_W-1:0] act_data = '0;
  logic [ROW_AW-1:0]     row_addr = '0;
  logic [NCOL-1:0]       row_w = '0, flag_data = '0;
  logic [IDX_W-1:0]      row_idx [NCOL];
  logic [ROW_AW:0]       num_rows = '0;
  logic busy, out_valid;
  logic signed [OUT_W-1:0] out_data;

  csd_accel dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_flag0 = 0, n_flag1 = 0, n_reset = 0, n_sub = 0, n_split = 0, n_pad = 0;
  int n_op16 = 0, n_op8 = 0, n_k1 = 0, n_kmax = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per operation data
  int       A     [LANES][K];
  int       D     [LANES][K][NCOL];   // digit of weight i at bit position b
  digit_q_t col_d [LANES][NCOL];      // condensed digits per column
  digit_q_t col_i [LANES][NCOL];      // their activation indexes
  bit       enc_b [LANES][NCOL][ROWS];
  int       enc_x [LANES][NCOL][ROWS];
  bit       enc_f [LANES][NCOL];

  // ternary order of (digit, index) pairs
  task automatic order_column(int l, int c);
    digit_q_t d = col_d[l][c], x = col_i[l][c];
    digit_q_t od, ox;
    foreach (d[i]) if (d[i] == -1) begin od.push_back(d[i]); ox.push_back(x[i]); end
    foreach (d[i]) if (d[i] ==  1) begin od.push_back(d[i]); ox.push_back(x[i]); end
    col_d[l][c] = od;
    col_i[l][c] = ox;
  endtask

  task automatic run_op(int op, bit m8, int density);
    int nbits = m8 ? 7 : 15;
    int kp = 1;
    longint exp_v = 0;
    int cycles = 0;

    // random activations and digits
    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < K; i++) begin
        A[l][i] = m8 ? int'($urandom_range(255)) - 128 : int'($urandom_range(65535)) - 32768;
        for (int b = 0; b < NCOL; b++)
          D[l][i][b] = (b < nbits && int'($urandom_range(99)) < density)
                       ? (($urandom_range(1) != 0) ? 1 : -1) : 0;
      end
    if (op == 1) begin                       // densest case: full column in every lane
      for (int l = 0; l < LANES; l++) for (int i = 0; i < K; i++) D[l][i][3] = 1;
    end
    if (op == 2) begin
      // worked example, 8-bit weights in lane 0, all other weights zero:
      //   -55 = -2^6 + 2^3 + 2^0,  +12 = 2^4 - 2^2,  -32 = -2^5
      for (int l = 0; l < LANES; l++)
        for (int i = 0; i < K; i++)
          for (int b = 0; b < NCOL; b++) D[l][i][b] = 0;
      D[0][0][6] = -1; D[0][0][3] = 1; D[0][0][0] = 1;
      D[0][1][4] =  1; D[0][1][2] = -1;
      D[0][2][5] = -1;
    end

    // reference dot product from the digits
    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < K; i++) begin
        longint w = 0;
        for (int b = 0; b < nbits; b++) w += longint'(D[l][i][b]) <<< b;
        exp_v += longint'(A[l][i]) * w;
      end

    // condense into physical columns
    for (int l = 0; l < LANES; l++) begin
      int tog = 0;
      for (int c = 0; c < NCOL; c++) begin col_d[l][c].delete(); col_i[l][c].delete(); end
      for (int b = 0; b < nbits; b++)
        for (int i = 0; i < K; i++)
          if (D[l][i][b] != 0) begin
            int c;
            if (b == 0) begin c = tog; tog ^= 1; end
            else c = b + 1;
            col_d[l][c].push_back(D[l][i][b]);
            col_i[l][c].push_back(i);
          end
      for (int c = 0; c < NCOL; c++) order_column(l, c);
      if (m8)
        for (int c = 0; c < 8; c++) begin
          int n = col_d[l][c].size();
          int h = (n + 1) / 2;
          for (int j = h; j < n; j++) begin
            col_d[l][c+8].push_back(col_d[l][c][j]);
            col_i[l][c+8].push_back(col_i[l][c][j]);
          end
          for (int j = n - 1; j >= h; j--) begin
            col_d[l][c].delete(j);
            col_i[l][c].delete(j);
          end
        end
      if (col_d[l][0].size() > 0 && col_d[l][1].size() > 0) n_split++;
      for (int c = 0; c < NCOL; c++) if (col_d[l][c].size() > kp) kp = col_d[l][c].size();
    end

    // pad, encode and count mechanisms
    for (int l = 0; l < LANES; l++)
      for (int c = 0; c < NCOL; c++) begin
        bit fl;
        bit bits[$];
        digit_q_t d = col_d[l][c];
        if (d.size() < kp) n_pad++;
        while (d.size() < kp) begin d.push_back(0); col_i[l][c].push_back($urandom_range(K - 1)); end
        encode_column(d, fl, bits);
        enc_f[l][c] = fl;
        for (int r = 0; r < kp; r++) begin
          enc_b[l][c][r] = bits[r];
          enc_x[l][c][r] = col_i[l][c][r];
          if (d[r] == -1) n_sub++;
          if (fl && r > 0 && bits[r-1] && !bits[r]) n_reset++;
        end
        if (fl) n_flag1++;
        else if (d[0] == -1) n_flag0++;
      end
    if (kp == 1) n_k1++;
    if (kp == ROWS) n_kmax++;
    if (m8) n_op8++; else n_op16++;

    // load the buffers: activation i and row i together, lane by lane
    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        act_we = 1; act_lane = LANE_W'(l); act_addr = IDX_W'(i); act_data = A_W'(A[l][i]);
        row_we = (i < kp); row_lane = LANE_W'(l); row_addr = ROW_AW'(i);
        for (int c = 0; c < NCOL; c++) begin
          row_w[c]   = (i < kp) ? enc_b[l][c][i] : 1'b0;
          row_idx[c] = (i < kp) ? IDX_W'(enc_x[l][c][i]) : '0;
        end
        flag_we = (i == 0); flag_lane = LANE_W'(l);
        for (int c = 0; c < NCOL; c++) flag_data[c] = enc_f[l][c];
      end
    @(negedge clk);
    act_we = 0; row_we = 0; flag_we = 0;

    // run
    start = 1; num_rows = (ROW_AW+1)'(kp); int8 = m8;
    @(posedge clk);
    #1 start = 0;
    while (!out_valid) begin
      @(posedge clk);
      cycles++;
      #1;
      if (cycles > 40) break;
    end
    checks++;
    if (cycles != kp + 1) begin
      failures++;
      $display("op %0d: latency %0d, expected %0d", op, cycles, kp + 1);
    end
    checks++;
    if (longint'(out_data) != exp_v) begin
      failures++;
      if (failures < 10) $display("op %0d int8 %0b k'=%0d: got %0d exp %0d", op, m8, kp, out_data, exp_v);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid || busy) begin failures++; $display("op %0d: valid/busy not cleared", op); end
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    foreach (row_idx[c]) row_idx[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < NOPS; op++) begin
      automatic int density = (op == 0) ? 1 : 3 + int'($urandom_range(40));
      run_op(op, (op % 3) == 2, density);   // op 2 (int8) is the worked example
    end
    $display("mechanisms:");
    need(n_flag0, "flag-0 columns with -1");
    need(n_flag1, "flag-1 columns");
    need(n_reset, "flag reset on 1->0");
    need(n_sub,   "subtractions (-A)");
    need(n_split, "bit 0 over two columns");
    need(n_pad,   "padded columns");
    need(n_op16,  "16-bit sets");
    need(n_op8,   "int8 sets");
    need(n_k1,    "sets with k'=1");
    need(n_kmax,  "sets with k'=16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
