// csd_accel: bit-level pruning accelerator for CSD-encoded condensed weights.
//
// A dot product sum_i A_i * W_i is split by weight digit position b:
// sum_b 2^b * sum_i A_i * w_i^b. Weights are given as canonical signed digits
// (0, +1, -1) with no sign digit; per group of k weights (one lane) the
// nonzero digits of each bit-column are pushed up into k' < k condensed rows,
// each digit carrying the index of the activation it belongs to. Every cycle
// each of the LANES lanes presents one condensed row: 16 flag decoders turn
// the single stored bit per digit plus the column flag into +A / -A / 0, the
// splitter picks the indexed activation per column, and the 16 per-column
// adder trees add the contributions of all lanes into their partial sums
// S_0..S_15. After k' cycles the shift-and-add tree combines the columns into
// the result. Column 0 and column 1 both carry bit-0 digits; column c >= 2
// carries bit c-1 (bit 15, the sign position, is never used). In int8 mode
// columns 0..7 and 8..15 hold two 8-bit weight groups with the same layout
// and their results are added, doubling throughput for 8-bit weights.
//
// Loading: the per-lane buffers are written through the act_*, row_* and
// flag_* ports (the on-chip memory is outside this module); they should be
// written only while busy is low. All lanes run the same number of rows; a
// lane with fewer rows is padded with all-zero rows.
//
// Timing: start is sampled when idle; rows are processed on the next num_rows
// cycles; out_valid is high for one cycle, num_rows + 1 cycles after the
// start edge, with out_data holding the result until the next one.
//
// Lane/column organization, the digit encoding, the split of bit 0 over two
// columns and the int8 mode follow the paper; the load interface, the
// sequencing and all widths are this design's choices.
module csd_accel #(
  parameter int unsigned LANES  = csd_pkg::LANES_DEF,
  parameter int unsigned K      = csd_pkg::K_DEF,
  parameter int unsigned A_W    = csd_pkg::A_W_DEF,
  parameter int unsigned ROWS   = csd_pkg::K_DEF,
  parameter int unsigned IDX_W  = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned LANE_W = (LANES > 1) ? $clog2(LANES) : 1,
  parameter int unsigned ACC_W  = csd_pkg::acc_width(A_W, LANES, ROWS),
  parameter int unsigned OUT_W  = csd_pkg::out_width(ACC_W)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // buffer loading
  input  logic                    act_we,
  input  logic [LANE_W-1:0]       act_lane,
  input  logic [IDX_W-1:0]        act_addr,
  input  logic signed [A_W-1:0]   act_data,
  input  logic                    row_we,
  input  logic [LANE_W-1:0]       row_lane,
  input  logic [ROW_AW-1:0]       row_addr,
  input  logic [csd_pkg::NCOL-1:0] row_w,
  input  logic [IDX_W-1:0]        row_idx [csd_pkg::NCOL],
  input  logic                    flag_we,
  input  logic [LANE_W-1:0]       flag_lane,
  input  logic [csd_pkg::NCOL-1:0] flag_data,
  // operation
  input  logic                    start,
  input  logic [ROW_AW:0]         num_rows,   // k'
  input  logic                    int8,       // two 8-bit weight groups
  output logic                    busy,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  import csd_pkg::NCOL;

  // sequencing
  logic              step, first, done;
  logic [ROW_AW-1:0] rd_row;

  csd_controller #(.ROWS(ROWS)) u_ctrl (
    .clk, .rst_n, .start, .num_rows, .busy,
    .row(rd_row), .step, .first, .done
  );

  // per-lane signals
  logic signed [A_W-1:0] lane_act     [LANES][K];
  logic [NCOL-1:0]       lane_w       [LANES];
  logic [IDX_W-1:0]      lane_idx     [LANES][NCOL];
  logic [NCOL-1:0]       lane_flags   [LANES];
  logic [NCOL-1:0]       dec_w        [LANES];
  logic [NCOL-1:0]       dec_f        [LANES];
  logic signed [A_W:0]   lane_operand [LANES][NCOL];
  logic [NCOL-1:0]       lane_carry   [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    lane_buffer #(.K(K), .A_W(A_W), .ROWS(ROWS)) u_buf (
      .clk, .rst_n,
      .act_we    (act_we && act_lane == LANE_W'(l)),
      .act_addr,
      .act_data,
      .row_we    (row_we && row_lane == LANE_W'(l)),
      .row_addr,
      .row_w_data   (row_w),
      .row_idx_data (row_idx),
      .flag_we   (flag_we && flag_lane == LANE_W'(l)),
      .flag_data,
      .rd_row,
      .act     (lane_act[l]),
      .row_w   (lane_w[l]),
      .row_idx (lane_idx[l]),
      .flags   (lane_flags[l])
    );

    for (genvar b = 0; b < NCOL; b++) begin : g_dec
      flag_decoder u_dec (
        .clk, .rst_n,
        .en     (step),
        .init   (first),
        .f_init (lane_flags[l][b]),
        .w_mem  (lane_w[l][b]),
        .w_out  (dec_w[l][b]),
        .f_out  (dec_f[l][b])
      );
    end

    splitter #(.K(K), .A_W(A_W)) u_split (
      .act     (lane_act[l]),
      .idx     (lane_idx[l]),
      .w_dec   (dec_w[l]),
      .f_dec   (dec_f[l]),
      .operand (lane_operand[l]),
      .carry   (lane_carry[l])
    );
  end

  // per-column accumulation
  logic signed [ACC_W-1:0] col_sum [NCOL];

  for (genvar b = 0; b < NCOL; b++) begin : g_col
    logic signed [A_W:0] col_operand [LANES];
    logic [LANES-1:0]    col_carry;
    always_comb begin
      for (int l = 0; l < LANES; l++) begin
        col_operand[l] = lane_operand[l][b];
        col_carry[l]   = lane_carry[l][b];
      end
    end
    bit_adder_tree #(.LANES(LANES), .OP_W(A_W + 1), .ACC_W(ACC_W)) u_tree (
      .clk, .rst_n,
      .en      (step),
      .clear   (first),
      .operand (col_operand),
      .carry   (col_carry),
      .sum     (col_sum[b])
    );
  end

  // shift-and-add and output register
  logic signed [OUT_W-1:0] result;

  shift_add #(.ACC_W(ACC_W), .OUT_W(OUT_W)) u_shift (
    .int8, .s(col_sum), .result
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= done;
      if (done) out_data <= result;
    end
  end

  // The buffers must not change under a running set.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(act_we || row_we || flag_we));

endmodule
