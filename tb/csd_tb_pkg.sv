// csd_tb_pkg: reference helpers shared by the testbenches.
//
// encode_column() applies the single-bit ternary encoding to one bit-column
// of condensed digits: the digits are first sorted -1, +1, 0 (the ternary
// ordering), then
//   - no +1 in the column: flag 0, memory bit 1 for every -1, 0 otherwise;
//   - some +1:             flag 1, memory bit 1 for every +1, 0 otherwise.
// It is written from the encoding rules only, independently of the RTL.
package csd_tb_pkg;

  typedef int digit_q_t[$];

  // Sort digits in ternary order: all -1, then all +1, then all 0.
  function automatic digit_q_t ternary_order(digit_q_t d);
    digit_q_t o;
    foreach (d[i]) if (d[i] == -1) o.push_back(-1);
    foreach (d[i]) if (d[i] ==  1) o.push_back(1);
    foreach (d[i]) if (d[i] ==  0) o.push_back(0);
    return o;
  endfunction

  // Memory bits and flag of an already ordered column.
  function automatic void encode_column(digit_q_t d, output bit flag, output bit bits[$]);
    bit has_pos = 0;
    bits.delete();
    foreach (d[i]) if (d[i] == 1) has_pos = 1;
    flag = has_pos;
    foreach (d[i]) bits.push_back(has_pos ? (d[i] == 1) : (d[i] == -1));
  endfunction

endpackage
