// tb_div_bitwise: end-to-end check of the bit-wise systolic divider.
// Two instances: the 15-bit / 4-bit array of the dependence graph
// (12 rows) and a 32-bit / 18-bit one that takes the numerical example
// 338579150 / 127773 (quotient 2649, remainder 108473, 15 rows). Each
// division is compared with the SystemVerilog / and % operators and with
// a software model of the digit recurrence for the number of shift-only
// rows; the start-to-done latency must be ROWS+1 clocks. Random operands
// cover both the Phase 2 correction and its absence.
module tb_div_bitwise;

  localparam int DW1 = 15, BW1 = 4, R1 = DW1 - BW1 + 1;
  localparam int DW2 = 32, BW2 = 18, R2 = DW2 - BW2 + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            st1, rdy1, dn1, corr1;
  logic [DW1-1:0]  a1;
  logic [BW1-1:0]  b1;
  logic [R1-1:0]   q1;
  logic [BW1-2:0]  r1;
  logic [$clog2(R1+1)-1:0] nop1;

  logic            st2, rdy2, dn2, corr2;
  logic [DW2-1:0]  a2;
  logic [BW2-1:0]  b2;
  logic [R2-1:0]   q2;
  logic [BW2-2:0]  r2;
  logic [$clog2(R2+1)-1:0] nop2;

  div_bitwise #(.DW(DW1), .BW(BW1)) dut1 (
    .clk, .rst_n, .start(st1), .a(a1), .b(b1), .ready(rdy1), .done(dn1),
    .q(q1), .r(r1), .nop_count(nop1), .corr(corr1));
  div_bitwise #(.DW(DW2), .BW(BW2)) dut2 (
    .clk, .rst_n, .start(st2), .a(a2), .b(b2), .ready(rdy2), .done(dn2),
    .q(q2), .r(r2), .nop_count(nop2), .corr(corr2));

  int checks = 0, failures = 0;
  int n_corr = 0, n_nocorr = 0, n_nops = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Software model of the recurrence: count of rows with digit 0.
  function automatic int model_nops(longint a, longint b, int dw, int bw);
    int rows = dw - bw + 1;
    longint rr = a >>> rows;
    int n = 0;
    for (int k = 0; k < rows; k++) begin
      longint p = 2 * rr + ((a >>> (rows - 1 - k)) & 1);
      longint lim = longint'(1) << (bw - 2);
      if (p >= lim) rr = p - b;
      else if (p < -lim) rr = p + b;
      else begin rr = p; n++; end
    end
    return n;
  endfunction

  task automatic run1(input longint av, input longint bv);
    int cyc = 0;
    @(negedge clk);
    a1 = DW1'(av); b1 = BW1'(bv); st1 = 1'b1;
    @(negedge clk);
    st1 = 1'b0;
    cyc = 0;
    while (!dn1) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(q1) != av / bv || longint'(r1) != av % bv) begin
      failures++;
      $display("15/4: %0d / %0d got q=%0d r=%0d", av, bv, q1, r1);
    end
    checks++;
    if (cyc != R1 + 1) begin
      failures++;
      $display("15/4: latency %0d, expected %0d", cyc, R1 + 1);
    end
    checks++;
    if (int'(nop1) != model_nops(av, bv, DW1, BW1)) begin
      failures++;
      $display("15/4: %0d / %0d shift-only rows %0d, model %0d", av, bv, nop1,
               model_nops(av, bv, DW1, BW1));
    end
    if (corr1) n_corr++; else n_nocorr++;
    n_nops += int'(nop1);
  endtask

  task automatic run2(input longint av, input longint bv);
    int cyc = 0;
    @(negedge clk);
    a2 = DW2'(av); b2 = BW2'(bv); st2 = 1'b1;
    @(negedge clk);
    st2 = 1'b0;
    cyc = 0;
    while (!dn2) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(q2) != av / bv || longint'(r2) != av % bv) begin
      failures++;
      $display("32/18: %0d / %0d got q=%0d r=%0d", av, bv, q2, r2);
    end
    checks++;
    if (cyc != R2 + 1) begin
      failures++;
      $display("32/18: latency %0d, expected %0d", cyc, R2 + 1);
    end
    checks++;
    if (int'(nop2) != model_nops(av, bv, DW2, BW2)) begin
      failures++;
      $display("32/18: shift-only rows %0d, model %0d", nop2, model_nops(av, bv, DW2, BW2));
    end
    if (corr2) n_corr++; else n_nocorr++;
    n_nops += int'(nop2);
  endtask

  initial begin
    st1 = 1'b0; st2 = 1'b0; a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // The worked example: 338579150 = 2649 * 127773 + 108473.
    run2(338579150, 127773);
    checks++;
    if (q2 != 2649 || r2 != 108473) begin
      failures++;
      $display("example: got q=%0d r=%0d", q2, r2);
    end
    // Exhaustive over the divisor range of the 4-bit array, random dividends.
    for (int bv = 4; bv < 8; bv++) begin
      run1(0, longint'(bv));
      run1((1 << (DW1 - 1)) - 1, longint'(bv));
      for (int t = 0; t < 200; t++) run1(longint'($urandom_range((1 << (DW1 - 1)) - 1)), longint'(bv));
    end
    for (int t = 0; t < 300; t++)
      run2(longint'($urandom_range(32'h7fff_ffff)),
           longint'((1 << (BW2 - 2)) + int'($urandom_range((1 << (BW2 - 2)) - 1))));
    checks++;
    if (n_corr == 0 || n_nocorr == 0 || n_nops == 0) begin
      failures++;
      $display("coverage: corr=%0d nocorr=%0d nops=%0d", n_corr, n_nocorr, n_nops);
    end
    $display("corrections=%0d none=%0d shift-only rows=%0d", n_corr, n_nocorr, n_nops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
