// lane_buffer: internal buffer of one lane.
//
// Holds what one lane needs for one weight set: its K activations, its
// condensed weight rows (per bit-column one memory bit and one activation
// index) and the NCOL column flags. It is filled from on-chip memory through
// three independent write ports and read one row per time step; all
// activations and flags are read in parallel.
//
// The paper gives the buffer's contents; its depth, write interface and
// read timing are this design's choices: registers, one write per field per
// cycle, combinational row read.
//
// Timing: writes take effect on the clock edge; reads are combinational.
module lane_buffer #(
  parameter int unsigned K      = csd_pkg::K_DEF,
  parameter int unsigned A_W    = csd_pkg::A_W_DEF,
  parameter int unsigned ROWS   = csd_pkg::K_DEF,
  parameter int unsigned NCOL   = csd_pkg::NCOL,
  parameter int unsigned IDX_W  = (K > 1) ? $clog2(K) : 1,
  parameter int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // activation write
  input  logic                  act_we,
  input  logic [IDX_W-1:0]      act_addr,
  input  logic signed [A_W-1:0] act_data,
  // condensed weight row write
  input  logic                  row_we,
  input  logic [ROW_AW-1:0]     row_addr,
  input  logic [NCOL-1:0]       row_w_data,
  input  logic [IDX_W-1:0]      row_idx_data [NCOL],
  // flag write
  input  logic                  flag_we,
  input  logic [NCOL-1:0]       flag_data,
  // reads
  input  logic [ROW_AW-1:0]     rd_row,
  output logic signed [A_W-1:0] act   [K],
  output logic [NCOL-1:0]       row_w,
  output logic [IDX_W-1:0]      row_idx [NCOL],
  output logic [NCOL-1:0]       flags
);

  logic [NCOL-1:0]  w_mem   [ROWS];
  logic [IDX_W-1:0] idx_mem [ROWS][NCOL];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) act[i] <= '0;
      for (int r = 0; r < ROWS; r++) begin
        w_mem[r] <= '0;
        for (int b = 0; b < NCOL; b++) idx_mem[r][b] <= '0;
      end
      flags <= '0;
    end else begin
      if (act_we) act[act_addr] <= act_data;
      if (row_we) begin
        w_mem[row_addr]   <= row_w_data;
        idx_mem[row_addr] <= row_idx_data;
      end
      if (flag_we) flags <= flag_data;
    end
  end

  assign row_w   = w_mem[rd_row];
  assign row_idx = idx_mem[rd_row];

endmodule
