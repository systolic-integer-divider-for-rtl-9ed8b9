// sk_permutation: Sunar-Koç basis permutation built on the modulo-divider.
//
// An element of GF(2^m) given in the type II optimal normal basis
// M = {beta^(2^0), ..., beta^(2^(m-1))} (bit i-1 = coefficient a'_i) is
// rewritten in the shifted canonical basis N = {beta_1, ..., beta_m}
// (bit j-1 = coefficient a_j). Coefficient a'_i moves to position
//   j = k if k <= m, else p - k,   with k = 2^(i-1) mod p, p = 2m + 1.
// With `inverse` set the same index pairs are used the other way round,
// taking an element from basis N back to basis M (the conversion of the
// product after multiplication).
// For each i in turn a left shift register supplies 2^(i-1), the bit-wise
// systolic divider (div_bitwise) divides it by p, and perm_fold maps the
// remainder to j. The chain shift register -> divider -> subtractor and
// select follows the source; moving the coefficient, the inverse
// direction and the one-index-at-a-time loop are this design's own.
//
// Interface and timing: when `ready` is high, a one-cycle `start` latches
// `elem_in` and `inverse`. Each index takes ROWS+3 clocks: one to issue
// the division, the divider's ROWS+1, and one to take the remainder;
// `idx_valid` pulses once per index with (idx_i, idx_j, idx_kept). After
// index m (M*(ROWS+3) clocks after the start edge) `done` pulses and
// `elem_out` holds the converted element until the next start. The divider widths follow from M: the divisor p is
// BW = bits(p)+1 wide, so it is normalised as the divider requires, and
// the dividend 2^(m-1) needs m+1 bits. Synchronous active-low reset.
module sk_permutation #(
  parameter int unsigned M = 5,                            // field degree m
  localparam int unsigned P    = 2 * M + 1,                // p = 2m + 1
  localparam int unsigned PW   = $clog2(P + 1),            // bits of p
  localparam int unsigned BW   = PW + 1,                   // divisor width
  localparam int unsigned DW   = (M + 1 > BW) ? M + 1 : BW, // dividend width
  localparam int unsigned ROWS = DW - BW + 1,
  localparam int unsigned IW   = $clog2(M + 1),            // index width
  localparam int unsigned XW   = (M > 1) ? $clog2(M) : 1   // bit position width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          inverse,    // 0: basis M -> N, 1: basis N -> M
  input  logic [M-1:0]  elem_in,    // element to convert
  output logic          ready,
  output logic          done,
  output logic [M-1:0]  elem_out,   // converted element
  output logic          idx_valid,  // one index mapped this cycle
  output logic [IW-1:0] idx_i,      // source position i (1..m)
  output logic [IW-1:0] idx_j,      // destination position j (1..m)
  output logic          idx_kept    // residue was already in [1, m]
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t           state;
  logic [M-1:0]     elem_q;
  logic             inv_q;
  logic [XW-1:0]    pos_i, pos_j;    // bit positions i-1 and j-1
  logic [IW-1:0]    i_cnt;
  logic             lsr_load, lsr_shift;
  logic [DW-1:0]    pow2;

  logic             div_start, div_ready, div_done, div_corr;
  logic [ROWS-1:0]  div_q;
  logic [PW-1:0]    div_r;
  logic [$clog2(ROWS+1)-1:0] div_nops;

  logic [PW-1:0]    j_new;
  logic             j_kept;

  perm_lsr #(.WIDTH(DW)) u_lsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (lsr_load),
    .shift (lsr_shift),
    .q     (pow2)
  );

  div_bitwise #(.DW(DW), .BW(BW)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (div_start),
    .a         (pow2),
    .b         (BW'(P)),
    .ready     (div_ready),
    .done      (div_done),
    .q         (div_q),
    .r         (div_r),
    .nop_count (div_nops),
    .corr      (div_corr)
  );

  perm_fold #(.M(M)) u_fold (
    .r         (div_r),
    .new_index (j_new),
    .kept      (j_kept)
  );

  assign pos_i     = XW'(i_cnt - 1'b1);
  assign pos_j     = XW'(j_new - 1'b1);
  assign ready     = (state == S_IDLE);
  assign lsr_load  = (state == S_IDLE) && start;
  assign lsr_shift = (state == S_WAIT) && div_done && (i_cnt != IW'(M));
  assign div_start = (state == S_ISSUE) && div_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      elem_q    <= '0;
      inv_q     <= 1'b0;
      elem_out  <= '0;
      i_cnt     <= '0;
      done      <= 1'b0;
      idx_valid <= 1'b0;
      idx_i     <= '0;
      idx_j     <= '0;
      idx_kept  <= 1'b0;
    end else begin
      done      <= 1'b0;
      idx_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          elem_q   <= elem_in;
          inv_q    <= inverse;
          elem_out <= '0;
          i_cnt <= IW'(1);
          state <= S_ISSUE;
        end
        S_ISSUE: if (div_ready) state <= S_WAIT;
        S_WAIT: if (div_done) begin
          if (inv_q) elem_out[pos_i] <= elem_q[pos_j];
          else       elem_out[pos_j] <= elem_q[pos_i];
          idx_valid <= 1'b1;
          idx_i     <= i_cnt;
          idx_j     <= IW'(j_new);
          idx_kept  <= j_kept;
          if (i_cnt == IW'(M)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            i_cnt <= i_cnt + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The quotient, the Phase 2 flag and the shift count of the divider are
  // not needed by the permutation; only the remainder is.
  logic unused_div;
  assign unused_div = ^{div_q, div_nops, div_corr};

  a_new_index_range : assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WAIT && div_done) |-> (j_new >= 1 && j_new <= PW'(M)));

endmodule
