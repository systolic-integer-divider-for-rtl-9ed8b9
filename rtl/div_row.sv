// div_row: one iteration (one row of the dependence graph) of the
// bit-wise integer modulo-division.
//
// The previous partial remainder R (BW bits, two's complement) is shifted
// left and the next dividend bit a_in enters at the right, giving
// P = 2R + a_in (BW+1 bits). The red cell in column BW-1 picks a digit
// q in {-1, 0, +1} from the three leading bits of P; the BW-1 blue cells in
// columns 0..BW-2 and the red cell then form R' = P - q*B in a ripple-carry
// row. The top bit of P is only used to pick the digit: with a divisor
// whose leading one is at bit BW-2 the result always lies in [-B, B) and
// fits BW bits.
//
// Purely combinational. Requirements on the inputs (checked by the
// dividers that use this row): b[BW-1:BW-2] = 2'b01 and -B <= R < B.
module div_row
  import div_pkg::*;
#(
  parameter int unsigned BW = 4  // divisor width including its sign bit
) (
  input  logic [BW-1:0] r_prev,  // previous partial remainder R
  input  logic          a_in,    // next dividend bit, shifted in at the right
  input  logic [BW-1:0] b,       // divisor
  output qdigit_t       q,       // this row's quotient digit
  output logic [BW-1:0] r_next   // new partial remainder R'
);

  logic [BW:0]   p;      // shifted partial remainder 2R + a
  logic [BW-1:0] carry;  // carry into each column

  assign p = {r_prev, a_in};

  div_cell_red u_red (
    .s_in  (p[BW]),
    .y_in  (p[BW-1]),
    .y_nxt (p[BW-2]),
    .b_in  (b[BW-1]),
    .c_in  (carry[BW-1]),
    .q_out (q),
    .r_out (r_next[BW-1])
  );

  // Two's-complement subtraction enters as a carry into column 0.
  assign carry[0] = q.op & q.sub;

  for (genvar j = 0; j < BW - 1; j++) begin : g_blue
    div_cell_blue u_blue (
      .q_in  (q),
      .y_in  (p[j]),
      .b_in  (b[j]),
      .c_in  (carry[j]),
      .r_out (r_next[j]),
      .c_out (carry[j+1])
    );
  end

endmodule
