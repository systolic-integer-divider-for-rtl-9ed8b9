// tb_div_word: checks the word-based divider at three sizes: the 15-bit /
// 4-bit array with W = 3 (12 rows, no padding), a 16-bit / 4-bit one
// (13 rows, padded to 15) and the 32-bit / 18-bit size of the numerical
// example 338579150 / 127773. Results, latency (ceil(ROWS/W)+1 clocks),
// Phase 2 corrections and shift-only rows are checked or counted.
module tb_div_word;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int c[3], f[3], nc[3], nn[3], nz[3];
  logic fin[3];

  div_word_checker #(.DW(15), .BW(4), .W(3), .EX_A(16383), .EX_B(5), .EX_Q(3276), .EX_R(3)) u0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_corr(nc[0]),
    .n_nocorr(nn[0]), .n_nops(nz[0]), .finished(fin[0]));
  div_word_checker #(.DW(16), .BW(4), .W(3), .EX_A(32767), .EX_B(7), .EX_Q(4681), .EX_R(0)) u1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_corr(nc[1]),
    .n_nocorr(nn[1]), .n_nops(nz[1]), .finished(fin[1]));
  div_word_checker #(.DW(32), .BW(18), .W(3), .EX_A(338579150), .EX_B(127773),
                   .EX_Q(2649), .EX_R(108473)) u2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_corr(nc[2]),
    .n_nocorr(nn[2]), .n_nops(nz[2]), .finished(fin[2]));

  int checks, failures;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (nc[k] == 0 || nn[k] == 0 || nz[k] == 0) begin
        failures++;
        $display("instance %0d coverage: corr=%0d nocorr=%0d nops=%0d", k, nc[k], nn[k], nz[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
