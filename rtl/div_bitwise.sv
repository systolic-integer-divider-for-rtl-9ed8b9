// div_bitwise: bit-wise systolic integer modulo-divider (the main design).
//
// Computes Q = A div B and R = A mod B for a non-negative DW-bit dividend A
// and a BW-bit divisor B (both widths include a sign bit,
// which must be 0). The two-dimensional dependence graph has ROWS = DW-BW+1
// rows of BW cells. It is scheduled with s = [1 0] (every cell of a row in
// the same time step) and projected along d = [1 0]^t, so the hardware is
// one linear array of BW processing elements, PE_{BW-1} (red, digit
// selection) and PE_{BW-2}..PE_0 (blue, add/subtract), that executes one
// row per clock. The partial remainder and the divisor sit in D
// flip-flops between time steps; the dividend bits that have not yet
// entered are kept in a shift register and fed in at the right of the
// array, one per row. A row whose digit is 0 only shifts the remainder
// (the no-operation case); `nop_count` reports how many rows did so.
//
// The divisor must be normalised: B[BW-1:BW-2] = 2'b01, i.e. its leading
// one sits just below the sign bit. A[DW-1] must be 0.
//
// Interface and timing: when `ready` is high, a one-cycle `start` loads A
// and B (edge 0). Rows are computed on edges 1..ROWS, Phase 2 on edge
// ROWS+1, after which `done` is high for one cycle and q, r, nop_count and
// corr hold their values until the next start. Latency from the start edge
// to done: ROWS+1 clocks. Synchronous active-low reset.
module div_bitwise
  import div_pkg::*;
#(
  parameter int unsigned DW   = 15,             // dividend width incl. sign
  parameter int unsigned BW   = 4,              // divisor width incl. sign
  localparam int unsigned ROWS = DW - BW + 1,   // rows = quotient bits
  localparam int unsigned CW   = $clog2(ROWS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DW-1:0]   a,          // dividend
  input  logic [BW-1:0]   b,          // divisor, normalised
  output logic            ready,
  output logic            done,
  output logic [ROWS-1:0] q,          // quotient
  output logic [BW-2:0]   r,          // remainder
  output logic [CW-1:0]   nop_count,  // rows that only shifted
  output logic            corr        // Phase 2 added the divisor back
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_POST} state_t;

  state_t          state;
  logic [BW-1:0]   b_q;      // divisor flip-flops
  logic [BW-1:0]   rem_q;    // partial remainder flip-flops
  logic [ROWS-1:0] a_sh;     // dividend bits still to enter, MSB next
  logic [ROWS-1:0] qp_q, qn_q;
  logic [CW-1:0]   row_cnt, nop_q;

  qdigit_t         dig;
  logic            dig_pos, dig_neg;  // digit is +1 / -1
  logic [BW-1:0]   rem_nxt;
  logic [ROWS-1:0] q_fin;
  logic [BW-2:0]   r_fin;
  logic            corr_fin;

  div_row #(.BW(BW)) u_row (
    .r_prev (rem_q),
    .a_in   (a_sh[ROWS-1]),
    .b      (b_q),
    .q      (dig),
    .r_next (rem_nxt)
  );

  div_post #(.ROWS(ROWS), .BW(BW)) u_post (
    .qp    (qp_q),
    .qn    (qn_q),
    .r_in  (rem_q),
    .b     (b_q),
    .q_out (q_fin),
    .r_out (r_fin),
    .corr  (corr_fin)
  );

  assign dig_pos = dig.op &  dig.sub;
  assign dig_neg = dig.op & ~dig.sub;
  assign ready   = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      b_q       <= '0;
      rem_q     <= '0;
      a_sh      <= '0;
      qp_q      <= '0;
      qn_q      <= '0;
      row_cnt   <= '0;
      nop_q     <= '0;
      q         <= '0;
      r         <= '0;
      nop_count <= '0;
      corr      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          b_q     <= b;
          // Leading BW-1 dividend bits form the initial remainder.
          rem_q   <= BW'(a >> ROWS);
          a_sh    <= a[ROWS-1:0];
          qp_q    <= '0;
          qn_q    <= '0;
          row_cnt <= '0;
          nop_q   <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          rem_q   <= rem_nxt;
          a_sh    <= a_sh << 1;
          qp_q    <= (qp_q << 1) | ROWS'(dig_pos);
          qn_q    <= (qn_q << 1) | ROWS'(dig_neg);
          nop_q   <= nop_q + CW'(!dig.op);
          row_cnt <= row_cnt + 1'b1;
          if (row_cnt == CW'(ROWS - 1)) state <= S_POST;
        end
        S_POST: begin
          q         <= q_fin;
          r         <= r_fin;
          corr      <= corr_fin;
          nop_count <= nop_q;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Operand rules of the array: non-negative dividend, normalised divisor.
  a_start_operands : assert property (@(posedge clk) disable iff (!rst_n)
    (start && ready) |-> (a[DW-1] == 1'b0 && b[BW-1:BW-2] == 2'b01));

endmodule
