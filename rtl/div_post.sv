// div_post: Phase 2 of the division, the post-processing step.
//
// The rows leave the quotient as signed digits, kept as two bit vectors
// (qp has a 1 where the digit was +1, qn where it was -1, most significant
// digit first), and a remainder R in [-B, B). This block converts the
// quotient to binary, Q = qp - qn, and, if R is negative, adds the divisor
// back once and decrements Q, so that 0 <= R < B. Because the rows keep
// R below B, the second correction of the algorithm (subtract B when
// R >= B) can never be needed and is not built.
//
// Purely combinational. `corr` reports that the negative-remainder
// correction was applied.
module div_post #(
  parameter int unsigned ROWS = 12,  // number of quotient digits
  parameter int unsigned BW   = 4    // divisor width including sign bit
) (
  input  logic [ROWS-1:0] qp,     // digits equal to +1
  input  logic [ROWS-1:0] qn,     // digits equal to -1
  input  logic [BW-1:0]   r_in,   // final partial remainder, two's complement
  input  logic [BW-1:0]   b,      // divisor
  output logic [ROWS-1:0] q_out,  // quotient
  output logic [BW-2:0]   r_out,  // remainder, 0 <= r_out < b
  output logic            corr    // negative remainder was corrected
);

  logic [ROWS:0] q_raw;
  logic [BW-1:0] r_fix;

  always_comb begin
    q_raw = {1'b0, qp} - {1'b0, qn};
    corr  = r_in[BW-1];
    if (corr) begin
      q_raw = q_raw - 1'b1;
      r_fix = r_in + b;
    end else begin
      r_fix = r_in;
    end
  end

  assign q_out = q_raw[ROWS-1:0];
  assign r_out = r_fix[BW-2:0];

  // After the correction the sign bit is always 0.
  logic unused_sign;
  assign unused_sign = r_fix[BW-1];

endmodule
