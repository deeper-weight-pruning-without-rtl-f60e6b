// flag_decoder: decodes one bit-column of single-bit-encoded ternary digits.
//
// Each bit-column of a condensed weight set is stored as one memory bit per
// row plus one flag per column. The digits of a column are sorted -1 first,
// then +1, then 0, and encoded so that:
//   flag 0: memory bit 1 means -1, memory bit 0 means 0 (column holds no +1);
//   flag 1: memory bit 0 means -1, memory bit 1 means +1, and the flag drops
//           to 0 at the first 1->0 transition of the memory bits, after which
//           the remaining zeros mean 0.
// The decoder keeps the running flag and the previous memory bit in two
// registers. On the first row of a set (init) the stored flag f_init is used
// and the previous bit is taken as 0. The outputs are the memory bit and the
// effective flag of the current row; the splitter turns them into +A
// (1,1), -A (1,0 or 0,1) or nothing (0,0).
//
// The encoding and the reset-on-transition rule follow the paper; the
// register reset values are this design's choice.
//
// Timing: w_out/f_out are combinational from w_mem, f_init and the registers;
// the registers advance on every clock with en high.
module flag_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // a row is processed this cycle
  input  logic init,    // first row of a weight set
  input  logic f_init,  // stored flag of the column
  input  logic w_mem,   // stored memory bit of the current row
  output logic w_out,   // memory bit to the splitter
  output logic f_out    // effective flag to the splitter
);

  logic f_q;     // running flag
  logic w_prev;  // memory bit of the previous row

  // A 1->0 transition of the memory bits clears the flag for this row on.
  always_comb begin
    if (init) f_out = f_init;
    else      f_out = f_q & ~(w_prev & ~w_mem);
    w_out = w_mem;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_q    <= 1'b0;
      w_prev <= 1'b0;
    end else if (en) begin
      f_q    <= f_out;
      w_prev <= w_mem;
    end
  end

endmodule
