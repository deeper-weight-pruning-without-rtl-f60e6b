// splitter: routes one lane's activations to the 16 bit-column adder trees.
//
// For one condensed weight row of a lane, every bit-column b carries a decoded
// digit (memory bit w_dec[b] and effective flag f_dec[b]) and an index idx[b]
// naming which of the lane's K activations that digit multiplies. The splitter
// selects that activation, sign-extends it by one bit and passes to adder tree
// b either the activation (+1), its one's complement (-1) or zero (0). For -1
// it also raises carry[b], which the adder tree adds so that ~A + 1 = -A.
//
//   (f,w) = (0,0) -> 0      (0,1) -> -A      (1,0) -> -A      (1,1) -> +A
//   carry = f XOR w
//
// The selection, negation and carry scheme follow the paper; treating the
// activations as signed two's complement is this design's choice.
// Timing: purely combinational.
module splitter #(
  parameter int unsigned K     = csd_pkg::K_DEF,
  parameter int unsigned A_W   = csd_pkg::A_W_DEF,
  parameter int unsigned NCOL  = csd_pkg::NCOL,
  parameter int unsigned IDX_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic signed [A_W-1:0]   act     [K],     // the lane's activations
  input  logic        [IDX_W-1:0] idx     [NCOL],  // activation index per column
  input  logic        [NCOL-1:0]  w_dec,           // decoded memory bits
  input  logic        [NCOL-1:0]  f_dec,           // decoded effective flags
  output logic signed [A_W:0]     operand [NCOL],  // A, ~A or 0 per column
  output logic        [NCOL-1:0]  carry            // +1 completing -A
);

  always_comb begin
    for (int b = 0; b < NCOL; b++) begin
      logic signed [A_W:0] a_sel;
      a_sel    = (A_W+1)'(act[idx[b]]);   // sign-extended selected activation
      carry[b] = f_dec[b] ^ w_dec[b];
      if (!f_dec[b] && !w_dec[b]) operand[b] = '0;
      else if (carry[b])          operand[b] = ~a_sel;
      else                        operand[b] = a_sel;
    end
  end

endmodule
