// perm_fold: folds a residue of 2^(i-1) mod p into the range [1, m].
//
// In the Sunar-Koç permutation the residue R = 2^(i-1) mod p, p = 2m+1,
// lies in [1, 2m]. If R <= m it is already the new index; otherwise the
// new index is p - R, since mu^R + mu^-R = mu^(p-R) + mu^-(p-R). The
// comparison is a two's-complement subtractor, m + ~R + 1, whose carry out
// is 1 exactly when R <= m; a second subtractor forms p - R, and the carry
// selects between R and p - R.
//
// Purely combinational. The subtractor is written as m - R (carry = 1
// keeps R) so that the kept range is [1, m] as the permutation requires.
module perm_fold #(
  parameter int unsigned M  = 5,                // field degree m
  localparam int unsigned P  = 2 * M + 1,       // p = 2m + 1
  localparam int unsigned PW = $clog2(P + 1)    // bits of p
) (
  input  logic [PW-1:0] r,          // residue, 1 <= r <= 2m
  output logic [PW-1:0] new_index,  // folded index, 1 <= new_index <= m
  output logic          kept        // r was already in [1, m]
);

  logic [PW:0] diff;  // {carry, m - r}

  always_comb begin
    diff = {1'b0, PW'(M)} + {1'b0, ~r} + (PW+1)'(1);
    kept = diff[PW];
    new_index = kept ? r : PW'(P) - r;
  end

endmodule
