// tb_div_cell_blue: exhaustive check of the blue (add/subtract) cell.
// For every digit (-1, 0, +1) and every y, b, carry the expected
// {c_out, r_out} is the arithmetic sum y + x + c_in, where x is b for
// digit -1 (add the divisor), 1-b for digit +1 (two's-complement
// subtraction) and 0 for the shift-only digit.
module tb_div_cell_blue;
  import div_pkg::*;

  qdigit_t q_in;
  logic    y_in, b_in, c_in, r_out, c_out;
  int      checks = 0, failures = 0;

  div_cell_blue dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, sum;
    for (int d = -1; d <= 1; d++) begin
      for (int n = 0; n < 8; n++) begin
        q_in.op  = (d != 0);
        q_in.sub = (d == 1);
        {y_in, b_in, c_in} = 3'(n);
        #1;
        x   = (d == 0) ? 0 : (d == 1 ? 1 - int'(b_in) : int'(b_in));
        sum = int'(y_in) + x + int'(c_in);
        checks++;
        if ({c_out, r_out} != sum[1:0]) begin
          failures++;
          $display("mismatch d=%0d y=%0b b=%0b c=%0b got %0b%0b exp %0d",
                   d, y_in, b_in, c_in, c_out, r_out, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
