// shift_add: final shift-and-add tree over the 16 bit-column partial sums.
//
// Column mapping: bit 0 of the weights is split over S_0 and S_1 (the column
// freed by dropping the sign position takes half of the bit-0 digits), and
// bit i >= 1 is in S_(i+1). To give S_0 and S_1 equal weight every partial sum
// is doubled inside the tree and the final sum is shifted right by one.
//
// Each group of eight columns is reduced in three levels:
//   pair  = S_(2j)  + (S_(2j+1) << 1)      (S_0 and, in int8 mode, S_8 also << 1)
//   quad  = pair_0  + (pair_1 << 2)
//   group = quad_0  + (quad_1 << 4)
// In 16-bit mode the upper group is shifted left by 8 and S_8 is not doubled,
// so S_8..S_15 carry bits 7..14. In int8 mode the two groups are two
// independent 8-bit weight groups with the same layout; they are added
// unshifted. The result is exact (always even before the final shift).
//
// The tree structure, the int8 selection and the final >>1 follow the
// paper; the widths are this design's choice.
// Timing: purely combinational.
module shift_add #(
  parameter int unsigned ACC_W = csd_pkg::acc_width(csd_pkg::A_W_DEF, csd_pkg::LANES_DEF,
                                                    csd_pkg::K_DEF),
  parameter int unsigned OUT_W = csd_pkg::out_width(ACC_W)
) (
  input  logic                    int8,                 // two 8-bit groups
  input  logic signed [ACC_W-1:0] s [csd_pkg::NCOL],    // S_0..S_15
  output logic signed [OUT_W-1:0] result
);

  localparam int unsigned W = OUT_W + 1;  // internal width before the final >>1

  logic signed [W-1:0] pair  [8];
  logic signed [W-1:0] quad  [4];
  logic signed [W-1:0] group [2];
  logic signed [W-1:0] total;

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      logic signed [W-1:0] lo;
      lo = W'(s[2*j]);
      // S_0 always doubled; S_8 doubled only when it is bit 0 of the second group.
      if (j == 0 || (j == 4 && int8)) lo = lo <<< 1;
      pair[j] = lo + (W'(s[2*j+1]) <<< 1);
    end
    for (int j = 0; j < 4; j++) quad[j]  = quad_sum(pair[2*j], pair[2*j+1]);
    for (int g = 0; g < 2; g++) group[g] = quad[2*g] + (quad[2*g+1] <<< 4);
    total  = group[0] + (int8 ? group[1] : (group[1] <<< 8));
    result = OUT_W'(total >>> 1);
  end

  function automatic logic signed [W-1:0] quad_sum(logic signed [W-1:0] p0,
                                                    logic signed [W-1:0] p1);
    return p0 + (p1 <<< 2);
  endfunction

endmodule
