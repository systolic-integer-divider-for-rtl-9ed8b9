// perm_lsr: left shift register that turns a bit index into a power of two.
//
// The permutation visits the indices i = 1, 2, ..., m in order, and needs
// 2^(i-1) for each. Instead of a multiplier, a register is loaded with 1
// (2^0, for i = 1) and shifted left by one place for every further index,
// so after k shifts it holds 2^k.
//
// Interface and timing: `load` (priority) sets the value to 1 on the next
// clock edge, `shift` doubles it. The value `q` is registered.
// Synchronous active-low reset clears it.
module perm_lsr #(
  parameter int unsigned WIDTH = 6  // register width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (load)   q <= WIDTH'(1);
    else if (shift)  q <= q << 1;
  end

endmodule
