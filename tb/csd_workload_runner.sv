// csd_workload_runner: drives one accelerator instance with weight sets
// converted to CSD from integer weights.
//
// For each set, every lane gets k integer weights of B bits drawn from a
// bell-shaped distribution (sum of four uniforms, standard deviation about
// 2^(B-1)/16, clipped to +-(2^(B-1)-1)) and k non-negative activations.
// Each weight is converted to signed digits without a sign position:
// the non-adjacent (minimal-digit) form of its magnitude, or the plain
// binary magnitude when the non-adjacent form would need digit B-1; for a
// negative weight every digit is negated. The digits are condensed into
// columns (bit 0 alternating over columns 0 and 1, bit b >= 1 in column b+1;
// for B = 8 the two 8-column groups each take half of every column list),
// put in ternary order, encoded with one bit per digit plus a flag and
// loaded. The result must equal sum A * W of the integer weights, and the
// set must finish in k' + 1 cycles with k' no larger than k (B = 16) or
// ceil(k/2) (B = 8).
//
// Cycle counts are accumulated for the report: k' of this design, and for
// comparison the CSD rows before the int8 split, the rows needed when the same weights are condensed bit by bit
// in two's complement (largest column popcount over the lanes) and without
// any condensation (k).
module csd_workload_runner #(
  parameter int K    = 16,   // activations per lane of the instance
  parameter int ROWS = 16    // row depth of the instance
) (
  input  logic clk,
  input  logic go,           // run nsets sets with b_bits / stride
  input  int   b_bits,       // 8 or 16
  input  int   stride,       // pruning stride k <= K
  input  int   nsets,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cyc_ours,     // sum of k' over the sets
  output int   cyc_tc,       // sum of two's complement condensed rows
  output int   cyc_none,     // sum of k
  output int   cyc_pre       // sum of CSD rows before the int8 split
);
  import csd_tb_pkg::*;
  localparam int LANES = 16, NCOL = 16, A_W = 16;
  localparam int IDX_W = $clog2(K), ROW_AW = $clog2(ROWS), LANE_W = 4;
  localparam int ACC_W = csd_pkg::acc_width(A_W, LANES, ROWS);
  localparam int OUT_W = csd_pkg::out_width(ACC_W);

  logic rst_n = 0;
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

  csd_accel #(.K(K), .ROWS(ROWS)) dut (.*);

  int       Wt    [LANES][K];
  int       A     [LANES][K];
  int       D     [LANES][K][NCOL];
  digit_q_t col_d [LANES][NCOL];
  digit_q_t col_i [LANES][NCOL];

  // Signed digits of w on positions 0..B-2, no sign digit.
  task automatic to_csd(int w, int bb, output int d[NCOL]);
    int m = (w < 0) ? -w : w;
    int x = m;
    for (int b = 0; b < NCOL; b++) d[b] = 0;
    // non-adjacent form of the magnitude
    for (int b = 0; b < NCOL && x != 0; b++) begin
      if (x % 2 != 0) begin
        d[b] = 2 - (x % 4);       // +1 if x = 1 mod 4, -1 if x = 3 mod 4
        x = x - d[b];
      end
      x = x / 2;
    end
    if (x != 0 || d[bb-1] != 0) begin
      // would need the sign position: keep the binary magnitude
      for (int b = 0; b < NCOL; b++) d[b] = (b < bb - 1) ? ((m >> b) & 1) : 0;
    end
    if (w < 0) for (int b = 0; b < NCOL; b++) d[b] = -d[b];
  endtask

  function automatic int bell(int bb);
    int s = 0;
    int lim = (1 << (bb - 1)) - 1;
    int v;
    for (int j = 0; j < 4; j++) s += int'($urandom_range(1023)) - 512;
    // sum of four uniforms on [-512, 511] has std ~ 591; scale to 2^(B-1)/16
    v = (s * (1 << (bb - 1))) / (591 * 16);
    if (v > lim) v = lim;
    if (v < -lim) v = -lim;
    return v;
  endfunction

  task automatic order_column(int l, int c);
    digit_q_t d = col_d[l][c], x = col_i[l][c];
    digit_q_t od, ox;
    foreach (d[i]) if (d[i] == -1) begin od.push_back(d[i]); ox.push_back(x[i]); end
    foreach (d[i]) if (d[i] ==  1) begin od.push_back(d[i]); ox.push_back(x[i]); end
    col_d[l][c] = od;
    col_i[l][c] = ox;
  endtask

  task automatic run_set(int bb, int k);
    bit m8 = (bb == 8);
    int kp = 1, tc = 0, cycles = 0, pre = 1;
    longint exp_v = 0;
    int lim = m8 ? (k + 1) / 2 : k;

    for (int l = 0; l < LANES; l++)
      for (int i = 0; i < K; i++) begin
        int dd[NCOL];
        Wt[l][i] = (i < k) ? bell(bb) : 0;
        A[l][i]  = (i < k) ? int'($urandom_range((1 << (bb - 1)) - 1)) : 0;
        to_csd(Wt[l][i], bb, dd);
        for (int b = 0; b < NCOL; b++) D[l][i][b] = dd[b];
        exp_v += longint'(A[l][i]) * longint'(Wt[l][i]);
      end

    // two's complement bit-column condensation, for the report only
    for (int l = 0; l < LANES; l++)
      for (int b = 0; b < bb; b++) begin
        int n = 0;
        for (int i = 0; i < k; i++) n += (Wt[l][i] >> b) & 1;
        if (n > tc) tc = n;
      end

    for (int l = 0; l < LANES; l++) begin
      int tog = 0;
      for (int c = 0; c < NCOL; c++) begin col_d[l][c].delete(); col_i[l][c].delete(); end
      for (int b = 0; b < bb - 1; b++)
        for (int i = 0; i < k; i++)
          if (D[l][i][b] != 0) begin
            int c;
            if (b == 0) begin c = tog; tog ^= 1; end
            else c = b + 1;
            col_d[l][c].push_back(D[l][i][b]);
            col_i[l][c].push_back(i);
          end
      for (int c = 0; c < NCOL; c++) order_column(l, c);
      for (int c = 0; c < NCOL; c++) if (col_d[l][c].size() > pre) pre = col_d[l][c].size();
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
      for (int c = 0; c < NCOL; c++) if (col_d[l][c].size() > kp) kp = col_d[l][c].size();
    end

    // load: encode column by column, one lane at a time
    for (int l = 0; l < LANES; l++) begin
      bit fl [NCOL];
      bit bits [NCOL][$];
      for (int c = 0; c < NCOL; c++) begin
        digit_q_t d = col_d[l][c];
        while (d.size() < kp) begin d.push_back(0); col_i[l][c].push_back(0); end
        encode_column(d, fl[c], bits[c]);
      end
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        act_we = 1; act_lane = LANE_W'(l); act_addr = IDX_W'(i); act_data = A_W'(A[l][i]);
        row_we = (i < kp); row_lane = LANE_W'(l); row_addr = ROW_AW'(i);
        for (int c = 0; c < NCOL; c++) begin
          row_w[c]   = (i < kp) ? bits[c][i] : 1'b0;
          row_idx[c] = (i < kp) ? IDX_W'(col_i[l][c][i]) : '0;
        end
        flag_we = (i == 0); flag_lane = LANE_W'(l);
        for (int c = 0; c < NCOL; c++) flag_data[c] = fl[c];
      end
    end
    @(negedge clk);
    act_we = 0; row_we = 0; flag_we = 0;

    start = 1; num_rows = (ROW_AW+1)'(kp); int8 = m8;
    @(posedge clk);
    #1 start = 0;
    while (!out_valid && cycles <= ROWS + 4) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    checks++;
    if (longint'(out_data) != exp_v) begin
      failures++;
      $display("B=%0d k=%0d: got %0d exp %0d", bb, k, out_data, exp_v);
    end
    checks++;
    if (cycles != kp + 1 || kp > lim) begin
      failures++;
      $display("B=%0d k=%0d: k'=%0d latency %0d", bb, k, kp, cycles);
    end
    cyc_ours += kp;
    cyc_tc   += tc;
    cyc_none += k;
    cyc_pre  += pre;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; cyc_ours = 0; cyc_tc = 0; cyc_none = 0; cyc_pre = 0;
    foreach (row_idx[c]) row_idx[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      if (go && !finished) begin
        cyc_ours = 0; cyc_tc = 0; cyc_none = 0; cyc_pre = 0;
        for (int s = 0; s < nsets; s++) run_set(b_bits, stride);
        finished = 1;
      end else if (!go) finished = 0;
    end
  end
endmodule
