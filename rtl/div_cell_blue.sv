// div_cell_blue: multiply/accumulate ("blue") cell of one divider row.
//
// The cell multiplies its divisor bit by the row's quotient digit and adds
// the product to its partial-remainder bit with a full adder. Subtraction
// (digit +1) is done in two's complement: the divisor bit is inverted here
// and the row's lowest cell receives a carry-in of 1. For digit 0 the
// divisor bit is masked, so the cell just passes the bit and the carry.
//
// Purely combinational; the carry ripples from column 0 towards the red
// cell, so one row settles within a clock period as the schedule s = [1 0]
// requires (all cells of a row fire in the same time step).
module div_cell_blue
  import div_pkg::*;
(
  input  qdigit_t q_in,   // quotient digit from the red cell of the row
  input  logic    y_in,   // partial remainder bit
  input  logic    b_in,   // divisor bit
  input  logic    c_in,   // carry in from the column to the right
  output logic    r_out,  // new partial remainder bit
  output logic    c_out   // carry to the column to the left
);

  logic bq;  // divisor bit times digit, in two's-complement form

  always_comb begin
    bq    = q_in.op & (b_in ^ q_in.sub);
    r_out = y_in ^ bq ^ c_in;
    c_out = (y_in & bq) | (y_in & c_in) | (bq & c_in);
  end

endmodule
