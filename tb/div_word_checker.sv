// div_word_checker: drives one div_word instance with NTEST divisions
// (a first example with its expected result, then random normalised operands) and compares
// quotient and remainder with the / and % operators and the start-to-done
// latency with ceil(ROWS/W)+1 clocks. Reports its counts on its ports
// when `finished` rises. Used by tb_div_word.
module div_word_checker #(
  parameter int DW = 15,
  parameter int BW = 4,
  parameter int W  = 3,
  parameter int NTEST = 300,
  parameter longint EX_A = 100,
  parameter longint EX_B = 5,
  parameter longint EX_Q = 20,   // expected quotient of the example
  parameter longint EX_R = 0     // expected remainder of the example
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_corr,
  output int   n_nocorr,
  output int   n_nops,
  output logic finished
);
  localparam int ROWS  = DW - BW + 1;
  localparam int STEPS = (ROWS + W - 1) / W;
  localparam int NW    = $clog2(STEPS * W + 1);

  logic            st, rdy, dn, corr;
  logic [DW-1:0]   a;
  logic [BW-1:0]   b;
  logic [ROWS-1:0] q;
  logic [BW-2:0]   r;
  logic [NW-1:0]   nop;

  div_word #(.DW(DW), .BW(BW), .W(W)) dut (
    .clk, .rst_n, .start(st), .a, .b, .ready(rdy), .done(dn),
    .q, .r, .nop_count(nop), .corr);

  task automatic run(input longint av, input longint bv);
    int cyc;
    @(negedge clk);
    a = DW'(av); b = BW'(bv); st = 1'b1;
    @(negedge clk);
    st = 1'b0;
    cyc = 0;
    while (!dn) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(q) != av / bv || longint'(r) != av % bv) begin
      failures++;
      $display("%0d/%0d/W%0d: %0d / %0d got q=%0d r=%0d", DW, BW, W, av, bv, q, r);
    end
    checks++;
    if (cyc != STEPS + 1) begin
      failures++;
      $display("%0d/%0d/W%0d: latency %0d, expected %0d", DW, BW, W, cyc, STEPS + 1);
    end
    if (corr) n_corr++; else n_nocorr++;
    n_nops += int'(nop);
  endtask

  initial begin
    longint amax, bmin;
    checks = 0; failures = 0; n_corr = 0; n_nocorr = 0; n_nops = 0;
    finished = 1'b0; st = 1'b0; a = '0; b = '0;
    amax = (longint'(1) << (DW - 1)) - 1;
    bmin = longint'(1) << (BW - 2);
    @(posedge rst_n);
    run(EX_A, EX_B);
    checks++;
    if (longint'(q) != EX_Q || longint'(r) != EX_R) begin
      failures++;
      $display("example %0d / %0d: got q=%0d r=%0d", EX_A, EX_B, q, r);
    end
    run(amax, bmin);
    run(0, 2 * bmin - 1);
    for (int t = 0; t < NTEST; t++)
      run(longint'({$urandom, $urandom}) & amax,
          bmin + (longint'($urandom) % bmin));
    finished = 1'b1;
  end
endmodule
