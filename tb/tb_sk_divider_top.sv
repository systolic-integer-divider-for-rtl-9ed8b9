// tb_sk_divider_top: end-to-end test of the whole design at a reduced
// size chosen so that every mechanism occurs: the permutation for
// GF(2^11) (p = 23) and a 17-bit / 5-bit word divider with W = 3, whose
// 13 rows are padded to 15. Both units run at the same time. Checked:
// permuted elements (and their conversion back) against the index map j = k or p - k,
// k = 2^(i-1) mod p; quotients and remainders against / and %; the
// latencies of both units. Counted, each of which must happen: shift-only
// rows, Phase 2 corrections and divisions without one (in both dividers),
// kept and folded residues, divisions through padded rows.
module tb_sk_divider_top;

  localparam int M      = 11;
  localparam int DIV_DW = 17;
  localparam int DIV_BW = 5;
  localparam int DIV_W  = 3;
  localparam int NPERM  = 60;
  localparam int NDIV   = 800;

  localparam int P     = 2 * M + 1;
  localparam int PBW   = $clog2(P + 1) + 1;
  localparam int PDW   = (M + 1 > PBW) ? M + 1 : PBW;
  localparam int PROWS = PDW - PBW + 1;
  localparam int IW    = $clog2(M + 1);
  localparam int QW    = DIV_DW - DIV_BW + 1;
  localparam int STEPS = (QW + DIV_W - 1) / DIV_W;
  localparam int NW    = $clog2(STEPS * DIV_W + 1);
  localparam int PAD   = STEPS * DIV_W - QW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              perm_start, perm_ready, perm_done, perm_idx_valid, perm_idx_kept, perm_inverse;
  logic [M-1:0]      perm_in, perm_out;
  logic [IW-1:0]     perm_idx_i, perm_idx_j;
  logic              div_start, div_ready, div_done, div_corr;
  logic [DIV_DW-1:0] div_a;
  logic [DIV_BW-1:0] div_b;
  logic [QW-1:0]     div_q;
  logic [DIV_BW-2:0] div_r;
  logic [NW-1:0]     div_nop_count;

  sk_divider_top #(.M(M), .DIV_DW(DIV_DW), .DIV_BW(DIV_BW), .DIV_W(DIV_W)) dut (.*);

  int checks = 0, failures = 0;
  int n_inverse = 0, n_kept = 0, n_folded = 0, n_perm_nop = 0, n_perm_corr = 0, n_perm_nocorr = 0;
  int n_div_nop = 0, n_div_corr = 0, n_div_nocorr = 0, n_padded = 0;
  logic perm_fin = 1'b0, div_fin = 1'b0;
  int jmap [M+1];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Events inside the permutation's own divider.
  always @(posedge clk) begin
    if (rst_n && dut.u_perm.u_div.done) begin
      if (dut.u_perm.u_div.nop_count != 0) n_perm_nop++;
      if (dut.u_perm.u_div.corr) n_perm_corr++; else n_perm_nocorr++;
    end
    if (rst_n && perm_idx_valid) begin
      checks++;
      if (int'(perm_idx_j) != jmap[int'(perm_idx_i)]) begin
        failures++;
        $display("i=%0d: j=%0d expected %0d", perm_idx_i, perm_idx_j, jmap[int'(perm_idx_i)]);
      end
      if (perm_idx_kept) n_kept++; else n_folded++;
    end
  end

  initial begin : perm_side
    logic [M-1:0] v, e;
    int k, cyc;
    perm_start = 1'b0; perm_in = '0; perm_inverse = 1'b0;
    k = 1;
    jmap[0] = 0;
    for (int i = 1; i <= M; i++) begin
      jmap[i] = (k <= M) ? k : P - k;
      k = (2 * k) % P;
    end
    @(posedge rst_n);
    for (int t = 0; t < NPERM; t++) begin
      v = (t == 0) ? M'(1) : M'({$urandom, $urandom});
      e = '0;
      for (int i = 1; i <= M; i++) e[jmap[i] - 1] = v[i - 1];
      @(negedge clk);
      perm_in = v; perm_inverse = 1'b0; perm_start = 1'b1;
      @(negedge clk);
      perm_start = 1'b0;
      cyc = 0;
      while (!perm_done) begin @(negedge clk); cyc++; end
      checks++;
      if (perm_out != e) begin
        failures++;
        $display("perm in=%b: got %b expected %b", v, perm_out, e);
      end
      // and back from basis N to basis M
      @(negedge clk);
      perm_in = perm_out; perm_inverse = 1'b1; perm_start = 1'b1;
      @(negedge clk);
      perm_start = 1'b0;
      while (!perm_done) @(negedge clk);
      checks++;
      if (perm_out != v) begin
        failures++;
        $display("inverse perm: got %b expected %b", perm_out, v);
      end
      n_inverse++;
      checks++;
      if (cyc != M * (PROWS + 3)) begin
        failures++;
        $display("perm latency %0d expected %0d", cyc, M * (PROWS + 3));
      end
    end
    perm_fin = 1'b1;
  end

  initial begin : div_side
    longint av, bv, amax, bmin;
    int cyc;
    div_start = 1'b0; div_a = '0; div_b = '0;
    amax = (longint'(1) << (DIV_DW - 1)) - 1;
    bmin = longint'(1) << (DIV_BW - 2);
    @(posedge rst_n);
    for (int t = 0; t < NDIV; t++) begin
      av = longint'({$urandom, $urandom}) & amax;
      bv = bmin + (longint'($urandom) % bmin);
      @(negedge clk);
      div_a = DIV_DW'(av); div_b = DIV_BW'(bv); div_start = 1'b1;
      @(negedge clk);
      div_start = 1'b0;
      cyc = 0;
      while (!div_done) begin @(negedge clk); cyc++; end
      checks++;
      if (longint'(div_q) != av / bv || longint'(div_r) != av % bv) begin
        failures++;
        $display("div %0d / %0d: got q=%0d r=%0d", av, bv, div_q, div_r);
      end
      checks++;
      if (cyc != STEPS + 1) begin
        failures++;
        $display("div latency %0d expected %0d", cyc, STEPS + 1);
      end
      if (div_nop_count != 0) n_div_nop++;
      if (div_corr) n_div_corr++; else n_div_nocorr++;
      if (PAD > 0) n_padded++;
    end
    div_fin = 1'b1;
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (perm_fin && div_fin);
    repeat (2) @(negedge clk);
    need(n_inverse, "inverse permutation (basis N to M)");
    need(n_kept, "residue kept (already in [1,m])");
    need(n_folded, "residue folded to p - R");
    need(n_perm_nop, "shift-only row in the permutation divider");
    need(n_perm_corr, "Phase 2 correction in the permutation divider");
    need(n_perm_nocorr, "no Phase 2 correction in the permutation divider");
    need(n_div_nop, "shift-only row in the word divider");
    need(n_div_corr, "Phase 2 correction in the word divider");
    need(n_div_nocorr, "no Phase 2 correction in the word divider");
    need(n_padded, "division through padded rows");
    $display("kept=%0d folded=%0d perm: nop=%0d corr=%0d nocorr=%0d div: nop=%0d corr=%0d nocorr=%0d padded=%0d",
             n_kept, n_folded, n_perm_nop, n_perm_corr, n_perm_nocorr,
             n_div_nop, n_div_corr, n_div_nocorr, n_padded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
