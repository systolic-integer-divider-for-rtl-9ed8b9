// div_word: word-based integer modulo-divider.
//
// Same arithmetic as div_bitwise, but W rows of the dependence graph are
// chained combinationally and executed in one clock (schedule
// t(p) = floor(i/W)), so a division takes ceil(ROWS/W) row steps instead
// of ROWS. Each PE position (i mod W, j) of the W x BW array is a red cell
// (column BW-1) or a blue cell; the divisor is held in D flip-flops above
// the array and the partial remainder in D flip-flops below it, which feed
// the next time step. When ROWS is not a multiple of W the dividend is
// extended with PAD leading zeros: the array gets PAD more rows, the
// dividend's value and so the quotient and remainder are unchanged.
//
// Interface and timing: when `ready` is high a one-cycle `start` loads A
// and B; the row groups run on the next STEPS edges and Phase 2 on one
// more, after which `done` is high for one cycle and the outputs hold
// until the next start. Latency: STEPS+1 clocks, STEPS = ceil(ROWS/W).
// Same operand rules as div_bitwise: A[DW-1] = 0, B[BW-1:BW-2] = 2'b01.
// Synchronous active-low reset. The padding side (leading zeros rather
// than trailing zeros) is this design's choice, made so that the result
// does not need rescaling.
module div_word
  import div_pkg::*;
#(
  parameter int unsigned DW = 15,  // dividend width incl. sign
  parameter int unsigned BW = 4,   // divisor width incl. sign
  parameter int unsigned W  = 3,   // rows per clock (word size)
  localparam int unsigned ROWS  = DW - BW + 1,
  localparam int unsigned STEPS = (ROWS + W - 1) / W,
  localparam int unsigned ROWSP = STEPS * W,       // rows after padding
  localparam int unsigned PAD   = ROWSP - ROWS,
  localparam int unsigned CW    = $clog2(ROWSP + 1),
  localparam int unsigned SW    = $clog2(STEPS + 1)
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
  output logic [CW-1:0]   nop_count,  // rows (padding included) that only shifted
  output logic            corr        // Phase 2 added the divisor back
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_POST} state_t;

  state_t           state;
  logic [BW-1:0]    b_q;
  logic [BW-1:0]    rem_q;
  logic [ROWSP-1:0] a_sh;        // padded dividend bits still to enter
  logic [ROWSP-1:0] qp_q, qn_q;
  logic [SW-1:0]    step_cnt;
  logic [CW-1:0]    nop_q;

  logic [BW-1:0]    rem_c [W+1];  // remainder between the W rows
  qdigit_t          dig   [W];
  logic [W-1:0]     dp, dn, dz;   // this step's digits, first row at MSB
  logic [ROWSP-1:0] q_fin;
  logic [BW-2:0]    r_fin;
  logic             corr_fin;

  logic [DW+PAD-1:0] a_ext;      // dividend with PAD leading zeros

  assign a_ext    = (DW+PAD)'(a);
  assign rem_c[0] = rem_q;

  for (genvar k = 0; k < W; k++) begin : g_rows
    div_row #(.BW(BW)) u_row (
      .r_prev (rem_c[k]),
      .a_in   (a_sh[ROWSP-1-k]),
      .b      (b_q),
      .q      (dig[k]),
      .r_next (rem_c[k+1])
    );
    assign dp[W-1-k] = dig[k].op &  dig[k].sub;
    assign dn[W-1-k] = dig[k].op & ~dig[k].sub;
    assign dz[W-1-k] = ~dig[k].op;
  end

  div_post #(.ROWS(ROWSP), .BW(BW)) u_post (
    .qp    (qp_q),
    .qn    (qn_q),
    .r_in  (rem_q),
    .b     (b_q),
    .q_out (q_fin),
    .r_out (r_fin),
    .corr  (corr_fin)
  );

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      b_q       <= '0;
      rem_q     <= '0;
      a_sh      <= '0;
      qp_q      <= '0;
      qn_q      <= '0;
      step_cnt  <= '0;
      nop_q     <= '0;
      q         <= '0;
      r         <= '0;
      nop_count <= '0;
      corr      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          b_q      <= b;
          // The padded dividend has PAD more leading zeros: its leading
          // BW-1 bits form the initial remainder, the rest enter row by row.
          rem_q    <= BW'(a_ext >> ROWSP);
          a_sh     <= a_ext[ROWSP-1:0];
          qp_q     <= '0;
          qn_q     <= '0;
          step_cnt <= '0;
          nop_q    <= '0;
          state    <= S_RUN;
        end
        S_RUN: begin
          rem_q    <= rem_c[W];
          a_sh     <= a_sh << W;
          qp_q     <= (qp_q << W) | ROWSP'(dp);
          qn_q     <= (qn_q << W) | ROWSP'(dn);
          nop_q    <= nop_q + CW'($countones(dz));
          step_cnt <= step_cnt + 1'b1;
          if (step_cnt == SW'(STEPS - 1)) state <= S_POST;
        end
        S_POST: begin
          q         <= q_fin[ROWS-1:0];
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

  a_start_operands : assert property (@(posedge clk) disable iff (!rst_n)
    (start && ready) |-> (a[DW-1] == 1'b0 && b[BW-1:BW-2] == 2'b01));

endmodule
