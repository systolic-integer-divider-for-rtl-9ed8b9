// perm_checker: drives one sk_permutation of degree M with every element
// of GF(2^M) when M <= 6, else NTEST random ones, converts each from
// basis M to basis N and the result back again, and compares both results
// and every reported (i, j) pair with the index map worked out here:
// j = k if k <= M else 2M+1-k, k = 2^(i-1) mod (2M+1). Also checks that
// done follows start after M*(ROWS+3) clocks. Used by tb_sk_permutation.
module perm_checker #(
  parameter int M = 5,
  parameter int NTEST = 64
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_kept,
  output int   n_folded,
  output logic finished
);
  localparam int P    = 2 * M + 1;
  localparam int PW   = $clog2(P + 1);
  localparam int BW   = PW + 1;
  localparam int DW   = (M + 1 > BW) ? M + 1 : BW;
  localparam int ROWS = DW - BW + 1;
  localparam int IW   = $clog2(M + 1);

  logic          start, ready, done, idx_valid, idx_kept, inverse;
  logic [M-1:0]  elem_in, elem_out;
  logic [IW-1:0] idx_i, idx_j;
  int            jmap [M+1];

  sk_permutation #(.M(M)) dut (.*);

  // Reported index pairs are checked as they appear.
  always @(posedge clk) begin
    if (rst_n && idx_valid) begin
      checks++;
      if (int'(idx_j) != jmap[int'(idx_i)] || idx_kept != (jmap[int'(idx_i)] == ((1 << (int'(idx_i) - 1)) % P))) begin
        failures++;
        $display("M=%0d i=%0d: j=%0d kept=%0b, expected j=%0d", M, idx_i, idx_j, idx_kept, jmap[int'(idx_i)]);
      end
      if (idx_kept) n_kept++; else n_folded++;
    end
  end

  task automatic run(input logic [M-1:0] v, input logic inv);
    logic [M-1:0] e;
    int cyc;
    e = '0;
    for (int i = 1; i <= M; i++)
      if (inv) e[i - 1] = v[jmap[i] - 1];
      else     e[jmap[i] - 1] = v[i - 1];
    @(negedge clk);
    elem_in = v; inverse = inv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (elem_out != e) begin
      failures++;
      $display("M=%0d inverse=%0b in=%b: got %b expected %b", M, inv, v, elem_out, e);
    end
    checks++;
    if (cyc != M * (ROWS + 3)) begin
      failures++;
      $display("M=%0d latency %0d expected %0d", M, cyc, M * (ROWS + 3));
    end
  endtask

  initial begin
    int k;
    checks = 0; failures = 0; n_kept = 0; n_folded = 0;
    finished = 1'b0; start = 1'b0; elem_in = '0; inverse = 1'b0;
    jmap[0] = 0;
    k = 1;
    for (int i = 1; i <= M; i++) begin
      jmap[i] = (k <= M) ? k : P - k;
      k = (2 * k) % P;
    end
    @(posedge rst_n);
    if (M <= 6) begin
      for (int v = 0; v < (1 << M); v++) begin
        run(M'(v), 1'b0);
        run(elem_out, 1'b1);
        checks++;
        if (elem_out != M'(v)) failures++;
      end
    end else begin
      for (int t = 0; t < NTEST; t++) begin
        logic [M-1:0] v;
        v = M'({$urandom, $urandom});
        run(v, 1'b0);
        run(elem_out, 1'b1);
        checks++;
        if (elem_out != v) failures++;
      end
    end
    finished = 1'b1;
  end
endmodule
