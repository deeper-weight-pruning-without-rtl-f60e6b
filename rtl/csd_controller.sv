// csd_controller: time-step sequencer for one weight set.
//
// A weight set of k' condensed rows is processed one row per clock cycle. On
// start (accepted only when idle) the controller steps the row address from 0
// to num_rows-1, with step high on each of those cycles and first high on row
// 0 (flag decoders load their stored flags, adder trees clear their partial
// sums). The cycle after the last row, done is high for one cycle: the
// partial sums then hold the set's result.
//
// One row per cycle follows the paper; the FSM itself is this design's.
// Timing: start sampled at a clock edge; rows on the next num_rows cycles;
// done on the cycle after; busy from the edge after start until done.
module csd_controller #(
  parameter int unsigned ROWS   = csd_pkg::K_DEF,
  parameter int unsigned ROW_AW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ROW_AW:0]   num_rows,  // k', 1..ROWS
  output logic              busy,
  output logic [ROW_AW-1:0] row,
  output logic              step,
  output logic              first,
  output logic              done
);
  import csd_pkg::*;

  ctrl_state_e       state;
  logic [ROW_AW:0]   last;   // num_rows - 1, held for the run
  logic [ROW_AW-1:0] row_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= CTRL_IDLE;
      row_q <= '0;
      last  <= '0;
    end else begin
      unique case (state)
        CTRL_IDLE: if (start) begin
          state <= CTRL_RUN;
          row_q <= '0;
          last  <= num_rows - 1'b1;
        end
        CTRL_RUN: begin
          if ({1'b0, row_q} == last) state <= CTRL_FIN;
          else                       row_q <= row_q + 1'b1;
        end
        CTRL_FIN: state <= CTRL_IDLE;
        default:  state <= CTRL_IDLE;
      endcase
    end
  end

  assign row   = row_q;
  assign step  = (state == CTRL_RUN);
  assign first = step && (row_q == '0);
  assign done  = (state == CTRL_FIN);
  assign busy  = (state != CTRL_IDLE);

  // A set has between 1 and ROWS rows.
  a_num_rows: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == CTRL_IDLE) |-> (num_rows != 0 && 32'(num_rows) <= ROWS));

endmodule
