// tb_perm_fold: for m = 5 (p = 11) and m = 11 (p = 23) every residue
// 1..2m is folded; the result must be r for r <= m and p - r otherwise,
// with `kept` telling which. Both cases occur for each size.
module tb_perm_fold;

  logic [3:0] r5, j5;
  logic       k5;
  logic [4:0] r11, j11;
  logic       k11;
  int checks = 0, failures = 0;

  perm_fold #(.M(5))  dut5  (.r(r5),  .new_index(j5),  .kept(k5));
  perm_fold #(.M(11)) dut11 (.r(r11), .new_index(j11), .kept(k11));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 1; v <= 10; v++) begin
      r5 = 4'(v); #1;
      e = (v <= 5) ? v : 11 - v;
      checks++;
      if (int'(j5) != e || k5 != (v <= 5)) begin
        failures++;
        $display("m=5 r=%0d got %0d kept=%0b, expected %0d", v, j5, k5, e);
      end
    end
    for (int v = 1; v <= 22; v++) begin
      r11 = 5'(v); #1;
      e = (v <= 11) ? v : 23 - v;
      checks++;
      if (int'(j11) != e || k11 != (v <= 11)) begin
        failures++;
        $display("m=11 r=%0d got %0d kept=%0b, expected %0d", v, j11, k11, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
