// csd_pkg: constants and types shared by the CSD bit-level pruning accelerator.
//
// The accelerator computes dot products whose weights are stored as condensed
// canonical-signed-digit (CSD) bit columns. The number of bit-columns, and so
// of per-column adder trees, is fixed at 16 by the architecture: weights have
// up to 16 digit positions, the sign position is never used, and its column
// is given to the second half of the bit-0 digits. Lane count, activations
// per lane and activation width follow the same main configuration (16 each).
// The accumulator width is this design's own choice: wide enough that a full
// weight set of every lane cannot overflow.
package csd_pkg;

  // Bit-columns of a condensed weight row (B = 16), fixed by the shift-and-add tree.
  localparam int unsigned NCOL = 16;

  // Defaults of the main configuration.
  localparam int unsigned LANES_DEF = 16;  // parallel lanes (weight sets)
  localparam int unsigned K_DEF     = 16;  // activations per lane (pruning stride k)
  localparam int unsigned A_W_DEF   = 16;  // activation width

  // Accumulator width for one bit-column: operand (A_W+1 bits, so that -A of the
  // most negative activation is exact) grown by the number of terms summed.
  function automatic int unsigned acc_width(int unsigned a_w, int unsigned lanes,
                                            int unsigned rows);
    return a_w + 1 + $clog2(lanes * rows);
  endfunction

  // Width of the shift-and-add result: the largest column weight is 2^(NCOL-1)
  // after the internal doubling, plus one bit for the int8 group sum.
  function automatic int unsigned out_width(int unsigned acc_w);
    return acc_w + NCOL + 1;
  endfunction

  // Sequencer states.
  typedef enum logic [1:0] {
    CTRL_IDLE = 2'd0,  // waiting for start
    CTRL_RUN  = 2'd1,  // one condensed row per cycle
    CTRL_FIN  = 2'd2   // last row accumulated, result taken
  } ctrl_state_e;

endpackage
