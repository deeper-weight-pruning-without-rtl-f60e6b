// tb_lane_buffer: checks buffer writes and reads.
//
// Fills all activations, rows and flags with random data through the three
// write ports (some writes issued in the same cycle), keeps a shadow copy and
// compares the parallel activation/flag outputs and every row read back.
module tb_lane_buffer;
  localparam int K = 16, A_W = 16, ROWS = 16, NCOL = 16, IDX_W = 4, ROW_AW = 4;

  logic clk = 0, rst_n = 0;
  logic act_we = 0, row_we = 0, flag_we = 0;
  logic [IDX_W-1:0]      act_addr = '0;
  logic signed [A_W-1:0] act_data = '0;
  logic [ROW_AW-1:0]     row_addr = '0, rd_row = '0;
  logic [NCOL-1:0]       row_w_data = '0, flag_data = '0;
  logic [IDX_W-1:0]      row_idx_data [NCOL];
  logic signed [A_W-1:0] act [K];
  logic [NCOL-1:0]       row_w;
  logic [IDX_W-1:0]      row_idx [NCOL];
  logic [NCOL-1:0]       flags;

  logic signed [A_W-1:0] sh_act [K];
  logic [NCOL-1:0]       sh_w   [ROWS];
  logic [IDX_W-1:0]      sh_idx [ROWS][NCOL];
  logic [NCOL-1:0]       sh_flags;
  int checks = 0, failures = 0;

  lane_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < K; i++) begin
      checks++;
      if (act[i] !== sh_act[i]) begin failures++; $display("act %0d", i); end
    end
    checks++;
    if (flags !== sh_flags) begin failures++; $display("flags"); end
    for (int r = 0; r < ROWS; r++) begin
      rd_row = ROW_AW'(r);
      #1;
      checks++;
      if (row_w !== sh_w[r] || row_idx !== sh_idx[r]) begin
        failures++;
        if (failures < 10) $display("row %0d", r);
      end
    end
  endtask

  initial begin
    foreach (row_idx_data[b]) row_idx_data[b] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 20; pass++) begin
      for (int i = 0; i < ROWS; i++) begin
        @(negedge clk);
        act_we = 1; act_addr = IDX_W'(i); act_data = A_W'($urandom);
        sh_act[i] = act_data;
        row_we = 1; row_addr = ROW_AW'(i); row_w_data = NCOL'($urandom);
        sh_w[i] = row_w_data;
        for (int b = 0; b < NCOL; b++) begin
          row_idx_data[b] = IDX_W'($urandom);
          sh_idx[i][b] = row_idx_data[b];
        end
        flag_we = (i == pass % ROWS); flag_data = NCOL'($urandom);
        if (flag_we) sh_flags = flag_data;
      end
      @(negedge clk);
      act_we = 0; row_we = 0; flag_we = 0;
      // data presented with write enables low must not be stored
      act_data = ~act_data; row_w_data = ~row_w_data; flag_data = ~flag_data;
      @(negedge clk);
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
