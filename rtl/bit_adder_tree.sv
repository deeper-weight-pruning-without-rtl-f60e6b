// bit_adder_tree: accumulating adder tree of one bit-column.
//
// Every cycle each lane's splitter sends this column one operand (A, ~A or 0)
// and one carry bit. The tree adds all lane operands and the number of carries,
// which gives the bit-level product sum X^b of Eq. (2) for this row, and adds
// it to the column's partial sum S. On the first row of a weight set (clear)
// the previous S is replaced by zero, so after k' rows S holds the column's
// result for the whole set.
//
// The tree is written as a single sum that synthesis balances; the paper
// gives the tree's function, not its shape. The accumulator width is this
// design's choice (see csd_pkg::acc_width).
//
// Timing: sum is the register S, updated on each clock with en high.
module bit_adder_tree #(
  parameter int unsigned LANES = csd_pkg::LANES_DEF,
  parameter int unsigned OP_W  = csd_pkg::A_W_DEF + 1,
  parameter int unsigned ACC_W = csd_pkg::acc_width(csd_pkg::A_W_DEF, csd_pkg::LANES_DEF,
                                                    csd_pkg::K_DEF)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,               // accumulate this cycle
  input  logic                    clear,            // start a new set
  input  logic signed [OP_W-1:0]  operand [LANES],  // one per lane
  input  logic        [LANES-1:0] carry,            // one per lane
  output logic signed [ACC_W-1:0] sum               // partial sum S
);

  logic signed [ACC_W-1:0] row_sum;

  always_comb begin
    row_sum = ACC_W'($countones(carry));
    for (int l = 0; l < LANES; l++) row_sum += ACC_W'(operand[l]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  sum <= '0;
    else if (en) sum <= (clear ? ACC_W'(0) : sum) + row_sum;
  end

endmodule
