// tb_div_row: exhaustive check of one divider row at BW = 5.
// For every normalised divisor (8..15), every remainder -B <= R < B and
// both dividend bits, the row must produce the digit of the radix-2
// selection rule on P = 2R + a (0 when -8 <= P < 8, +1 when P >= 8,
// -1 below), the remainder P - digit*B, and keep it within [-B, B).
// Each of the three digits must occur.
module tb_div_row;
  import div_pkg::*;

  localparam int BW = 5;

  logic [BW-1:0] r_prev, b, r_next;
  logic          a_in;
  qdigit_t       q;
  int            checks = 0, failures = 0;
  int            seen [3];

  div_row #(.BW(BW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, dig, got, rn;
    seen = '{0, 0, 0};
    for (int bv = 8; bv < 16; bv++) begin
      for (int rv = -bv; rv < bv; rv++) begin
        for (int av = 0; av < 2; av++) begin
          b      = BW'(bv);
          r_prev = BW'(rv);
          a_in   = av[0];
          #1;
          p   = 2 * rv + av;
          dig = (p >= 8) ? 1 : (p < -8 ? -1 : 0);
          got = !q.op ? 0 : (q.sub ? 1 : -1);
          rn  = int'($signed(r_next));
          seen[dig+1]++;
          checks++;
          if (got != dig) begin
            failures++;
            $display("digit: b=%0d r=%0d a=%0d got %0d exp %0d", bv, rv, av, got, dig);
          end
          checks++;
          if (rn != p - dig * bv) begin
            failures++;
            $display("rem: b=%0d r=%0d a=%0d got %0d exp %0d", bv, rv, av, rn, p - dig * bv);
          end
          checks++;
          if (rn < -bv || rn >= bv) begin
            failures++;
            $display("range: b=%0d r=%0d a=%0d -> %0d", bv, rv, av, rn);
          end
        end
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("digit %0d never selected", k - 1);
      end
    end
    $display("digits seen: -1:%0d 0:%0d +1:%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
