// div_cell_red: left boundary ("red") cell of one divider row.
//
// It does two things. First it selects the row's quotient digit from the
// leading bits of the shifted partial remainder: the old sign bit `s_in`
// and the two bits below it (`y_in`, the bit in this cell's column, and
// `y_nxt`, the bit of the column to its right). If the three agree the
// digit is 0 and the row only shifts (the no-operation of the algorithm);
// otherwise the digit is +1 (subtract the divisor) when the remainder is
// non-negative and -1 (add it) when it is negative. Second it forms the
// sum bit of the sign column from `y_in`, the divisor's sign bit `b_in`
// gated by the digit, and the carry from the column to its right; the
// carry out of this column is dropped, as the row's result always fits.
//
// Purely combinational. The source's lookup table is an XOR of two leading
// bits; this cell looks at three (two XORs) because a zero digit is only
// safe when the remainder is below the divisor's leading power of two.
module div_cell_red
  import div_pkg::*;
(
  input  logic    s_in,   // sign of the previous partial remainder
  input  logic    y_in,   // partial remainder bit in this column
  input  logic    y_nxt,  // partial remainder bit one column lower
  input  logic    b_in,   // divisor bit of this column (its sign bit)
  input  logic    c_in,   // carry from the column to the right
  output qdigit_t q_out,  // quotient digit broadcast along the row
  output logic    r_out   // new partial remainder bit (sign of the result)
);

  qdigit_t q;

  always_comb begin
    q     = select_digit(s_in, y_in, y_nxt);
    r_out = y_in ^ (q.op & (b_in ^ q.sub)) ^ c_in;
  end

  assign q_out = q;

endmodule
