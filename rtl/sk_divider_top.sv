// sk_divider_top: the systolic integer modulo-divider in its two uses.
//
// Two independent units stand side by side, each with its own ports:
//  * perm_*: the Sunar-Koç ONB type II basis permutation for GF(2^M)
//    (sk_permutation), which maps an element from the normal basis to the
//    shifted canonical basis (or back, with perm_inverse) with the bit-wise systolic divider computing
//    2^(i-1) mod (2M+1) for every index i.
//  * div_*: a general-purpose divider, the word-based array (div_word)
//    that executes DIV_W rows of the dependence graph per clock. Its
//    default size, a 32-bit dividend and an 18-bit divisor (widths with
//    sign bit), takes the numerical example 338579150 / 127773; DIV_W = 3
//    is the word size of the word-based design.
// The operand rules of the divider apply on div_*: a_div[DIV_DW-1] = 0 and
// b_div[DIV_BW-1:DIV_BW-2] = 2'b01. Timing is that of the two units:
// perm_done follows perm_start after M*(ROWS+3) clocks (ROWS = the
// permutation divider's row count), div_done follows
// div_start after ceil((DIV_DW-DIV_BW+1)/DIV_W)+1 clocks. The multiplier
// that would consume the permuted operands is not part of this design.
module sk_divider_top #(
  parameter int unsigned M      = 5,   // field degree of GF(2^M)
  parameter int unsigned DIV_DW = 32,  // general divider: dividend width
  parameter int unsigned DIV_BW = 18,  // general divider: divisor width
  parameter int unsigned DIV_W  = 3,   // general divider: rows per clock
  localparam int unsigned IW    = $clog2(M + 1),
  localparam int unsigned QW    = DIV_DW - DIV_BW + 1,
  localparam int unsigned STEPS = (QW + DIV_W - 1) / DIV_W,
  localparam int unsigned NW    = $clog2(STEPS * DIV_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // basis permutation
  input  logic              perm_start,
  input  logic              perm_inverse,
  input  logic [M-1:0]      perm_in,
  output logic              perm_ready,
  output logic              perm_done,
  output logic [M-1:0]      perm_out,
  output logic              perm_idx_valid,
  output logic [IW-1:0]     perm_idx_i,
  output logic [IW-1:0]     perm_idx_j,
  output logic              perm_idx_kept,
  // general-purpose division
  input  logic              div_start,
  input  logic [DIV_DW-1:0] div_a,
  input  logic [DIV_BW-1:0] div_b,
  output logic              div_ready,
  output logic              div_done,
  output logic [QW-1:0]     div_q,
  output logic [DIV_BW-2:0] div_r,
  output logic [NW-1:0]     div_nop_count,
  output logic              div_corr
);

  sk_permutation #(.M(M)) u_perm (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (perm_start),
    .inverse   (perm_inverse),
    .elem_in   (perm_in),
    .ready     (perm_ready),
    .done      (perm_done),
    .elem_out  (perm_out),
    .idx_valid (perm_idx_valid),
    .idx_i     (perm_idx_i),
    .idx_j     (perm_idx_j),
    .idx_kept  (perm_idx_kept)
  );

  div_word #(.DW(DIV_DW), .BW(DIV_BW), .W(DIV_W)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (div_start),
    .a         (div_a),
    .b         (div_b),
    .ready     (div_ready),
    .done      (div_done),
    .q         (div_q),
    .r         (div_r),
    .nop_count (div_nop_count),
    .corr      (div_corr)
  );

endmodule
