// tb_div_cell_red: exhaustive check of the red (digit-selection) cell.
// For all 32 input combinations the expected digit comes from the value
// of the three leading bits read as a signed number v = -4s + 2y1 + y0:
// digit 0 when v is 0 or -1 (the three bits agree), +1 when
// v >= 1, -1 when v <= -2. The sum bit is the low bit of y + (digit-scaled
// divisor bit) + carry computed arithmetically.
module tb_div_cell_red;
  import div_pkg::*;

  logic    s_in, y_in, y_nxt, b_in, c_in, r_out;
  qdigit_t q_out;
  int      checks = 0, failures = 0;

  div_cell_red dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, exp_digit, got_digit, bq, sum;
    for (int n = 0; n < 32; n++) begin
      {s_in, y_in, y_nxt, b_in, c_in} = 5'(n);
      #1;
      v = -4 * int'(s_in) + 2 * int'(y_in) + int'(y_nxt);
      if (v == 0 || v == -1) exp_digit = 0;
      else if (v > 0)        exp_digit = 1;
      else                   exp_digit = -1;
      got_digit = !q_out.op ? 0 : (q_out.sub ? 1 : -1);
      // digit +1 subtracts: the cell adds the inverted divisor bit
      bq  = (exp_digit == 0) ? 0 : (exp_digit == 1 ? 1 - int'(b_in) : int'(b_in));
      sum = int'(y_in) + bq + int'(c_in);
      checks++;
      if (got_digit != exp_digit) begin
        failures++;
        $display("digit mismatch in=%05b got %0d exp %0d", n[4:0], got_digit, exp_digit);
      end
      checks++;
      if (r_out != sum[0]) begin
        failures++;
        $display("sum mismatch in=%05b got %0b exp %0b", n[4:0], r_out, sum[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
