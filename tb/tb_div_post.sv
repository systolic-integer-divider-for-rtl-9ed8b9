// tb_div_post: checks the Phase 2 post-processing.
// A true quotient Qt and remainder Rt (0 <= Rt < B) are drawn at random;
// the input is built as either (Qt, Rt) or (Qt+1, Rt-B), and the signed
// quotient is split at random into qp - qn. The block must return Qt and
// Rt, and flag the correction exactly for the second form. Both forms
// must occur.
module tb_div_post;

  localparam int ROWS = 6;
  localparam int BW   = 5;

  logic [ROWS-1:0] qp, qn, q_out;
  logic [BW-1:0]   r_in, b;
  logic [BW-2:0]   r_out;
  logic            corr;
  int              checks = 0, failures = 0;
  int              n_corr = 0, n_plain = 0;

  div_post #(.ROWS(ROWS), .BW(BW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bv, qt, rt, qraw, rv, qnv, use_neg;
    for (int t = 0; t < 2000; t++) begin
      bv = 8 + int'($urandom_range(7));
      qt = int'($urandom_range((1 << ROWS) - 2));
      rt = int'($urandom_range(bv - 1));
      use_neg = int'($urandom_range(1));
      qraw = use_neg ? qt + 1 : qt;
      rv   = use_neg ? rt - bv : rt;
      qnv  = int'($urandom_range((1 << ROWS) - 1 - qraw));
      qn   = ROWS'(qnv);
      qp   = ROWS'(qraw + qnv);
      r_in = BW'(rv);
      b    = BW'(bv);
      #1;
      if (use_neg != 0) n_corr++; else n_plain++;
      checks++;
      if (int'(q_out) != qt || int'(r_out) != rt || corr != (use_neg != 0)) begin
        failures++;
        $display("b=%0d qp=%0d qn=%0d r_in=%0d: got q=%0d r=%0d corr=%0b exp q=%0d r=%0d",
                 bv, qp, qn, rv, q_out, r_out, corr, qt, rt);
      end
    end
    checks++;
    if (n_corr == 0 || n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
