// tb_sk_permutation: checks the basis permutation for GF(2^5) (p = 11,
// 2 primitive mod 11), GF(2^3) (p = 7) and GF(2^11) (p = 23, 2 of order
// 11 mod 23). For m = 5 the index map must be the one of the worked
// example: basis exponents 1, 2, 4, 8, 16 go to positions 1, 2, 4, 3, 5.
// Both the kept and the folded residue case must occur for each size.
module tb_sk_permutation;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int c[3], f[3], nk[3], nf[3];
  logic fin[3];

  perm_checker #(.M(5))  u5  (.clk, .rst_n, .checks(c[0]), .failures(f[0]),
                              .n_kept(nk[0]), .n_folded(nf[0]), .finished(fin[0]));
  perm_checker #(.M(3))  u3  (.clk, .rst_n, .checks(c[1]), .failures(f[1]),
                              .n_kept(nk[1]), .n_folded(nf[1]), .finished(fin[1]));
  perm_checker #(.M(11)) u11 (.clk, .rst_n, .checks(c[2]), .failures(f[2]),
                              .n_kept(nk[2]), .n_folded(nf[2]), .finished(fin[2]));

  int checks, failures;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    int ex [6];
    ex = '{0, 1, 2, 4, 3, 5};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    for (int i = 1; i <= 5; i++) begin
      checks++;
      if (u5.jmap[i] != ex[i]) begin
        failures++;
        $display("m=5 model map i=%0d -> %0d, example says %0d", i, u5.jmap[i], ex[i]);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (nk[k] == 0 || nf[k] == 0) begin
        failures++;
        $display("size %0d: kept=%0d folded=%0d", k, nk[k], nf[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
