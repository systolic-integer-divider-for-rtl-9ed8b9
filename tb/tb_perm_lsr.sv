// tb_perm_lsr: loads the shift register, shifts it step by step and
// compares with 2^k; also checks that load wins over shift, that the
// value holds when neither is asserted, and that the one falls out of the
// top after WIDTH shifts.
module tb_perm_lsr;
  localparam int WIDTH = 6;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [WIDTH-1:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  perm_lsr #(.WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input longint v, input string what);
    checks++;
    if (longint'(q) != v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, q, v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_q(0, "reset");
    load = 1'b1; @(negedge clk); load = 1'b0;
    expect_q(1, "load");
    for (int k = 1; k < WIDTH; k++) begin
      shift = 1'b1; @(negedge clk); shift = 1'b0;
      expect_q(longint'(1) << k, "shift");
      @(negedge clk);
      expect_q(longint'(1) << k, "hold");
    end
    shift = 1'b1; @(negedge clk); shift = 1'b0;
    expect_q(0, "shift out");
    shift = 1'b1; load = 1'b1; @(negedge clk); shift = 1'b0; load = 1'b0;
    expect_q(1, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
