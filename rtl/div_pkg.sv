// div_pkg: types and helpers shared by the systolic modulo-divider.
//
// A row of the divider produces one quotient digit from {-1, 0, +1}.
// The digit is carried as two bits: `op` says whether the row adds or
// subtracts the divisor at all (op = 0 is the shift-only "no-operation"
// iteration), `sub` says which of the two it does (1 = subtract the
// divisor, digit +1; 0 = add it back, digit -1). This two-bit form is the
// design's own encoding; the algorithm's digit set and the no-operation
// case follow the source algorithm.
package div_pkg;

  typedef struct packed {
    logic op;   // 1: the row adds or subtracts the divisor; 0: shift only
    logic sub;  // with op = 1: 1 = subtract (digit +1), 0 = add (digit -1)
  } qdigit_t;

  // Digit selection from the three leading bits of the shifted partial
  // remainder P = 2R + a (sign bit s, then y1, y0). When all three agree,
  // |P| < 2^(BW-2) <= divisor, so the row only shifts.
  function automatic qdigit_t select_digit(input logic s, input logic y1, input logic y0);
    qdigit_t d;
    d.op  = (s ^ y1) | (s ^ y0);
    d.sub = ~s;
    return d;
  endfunction

  // Number of rows of the dependence graph for a DW-bit dividend and a
  // BW-bit divisor, both widths including the sign bit.
  function automatic int unsigned num_rows(input int unsigned dw, input int unsigned bw);
    return dw - bw + 1;
  endfunction

endpackage
