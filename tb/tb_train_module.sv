// tb_train_module: checks both training modules (Target, TC = 1, and
// Negative Target, TC = 0) against a reference model of Algorithms 2 and 4.
// Per round: 9 patches with random features and random clause outputs are
// streamed with fresh uniform random numbers; the reference keeps a patch per
// clause with probability 1/N. Then a random class sum arrives and the 40
// clauses are updated one per clock with random TA actions and random
// numbers; inc/dec/enable of every clause are compared with the reference:
// u from Eq. (12)/(13), g = rnd < 29/39, h = rnd < 10/39, Type I for
// clauses whose polarity matches TC (Ia/Ib), Type II for the others. Each
// feedback type and a skipped update must occur.
`timescale 1ns/1ps
module tb_train_module;
  import ctm_pkg::*;
  localparam int M = NCLAUSE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 1, patch_valid = 0, patch_first = 0, sum_valid = 0, upd_active = 0;
  feat_t feat = '0;
  logic [M-1:0] clause = '0;
  sum_t sum = '0;
  lit_t include_i [M];
  rnd_t rnd [M];
  logic [$clog2(M)-1:0] upd_clause = '0;
  logic en1, en0;
  lit_t inc1, dec1, inc0, dec0;
  logic [M-1:0] c1, c0;

  train_module #(.TC(1'b1)) dut_t (.clk, .rst_n, .en, .patch_valid, .patch_first, .feat, .clause,
    .sum_valid, .sum, .include_i, .rnd, .upd_active, .upd_clause,
    .upd_en_o(en1), .upd_inc_o(inc1), .upd_dec_o(dec1), .c_o(c1));
  train_module #(.TC(1'b0)) dut_n (.clk, .rst_n, .en, .patch_valid, .patch_first, .feat, .clause,
    .sum_valid, .sum, .include_i, .rnd, .upd_active, .upd_clause,
    .upd_en_o(en0), .upd_inc_o(inc0), .upd_dec_o(dec0), .c_o(c0));

  int checks = 0, failures = 0;
  task automatic check(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    rn  [M];
  feat_t rp  [M];
  int n_ia = 0, n_ib = 0, n_ii = 0, n_skip = 0;

  function automatic real frac(rnd_t r);
    return real'(r) / real'(1 << RND_W);
  endfunction

  task automatic ref_update(bit tc, int j, int v, output bit ren, output lit_t rinc, output lit_t rdec);
    int  vc;
    real pu;
    bit  c, f;
    lit_t l;
    vc = (v > T_HYP) ? T_HYP : (v < -T_HYP) ? -T_HYP : v;
    pu = tc ? (T_HYP - vc) / (2.0 * T_HYP) : (T_HYP + vc) / (2.0 * T_HYP);
    ren  = frac(rnd[0]) < pu;
    c    = rn[j] != 0;
    f    = j % 2;
    for (int k = 0; k < NF; k++) begin l[2*k] = rp[j][k]; l[2*k+1] = ~rp[j][k]; end
    rinc = '0; rdec = '0;
    for (int k = 0; k < NLIT; k++) begin
      bit g, h, a;
      g = frac(rnd[k+1]) < 29.0 / 39.0;
      h = frac(rnd[k+1]) < 10.0 / 39.0;
      a = include_i[j][k];
      if (f == tc) begin
        if (c && g && l[k]) rinc[k] = 1;
        else if (c && h && !a && !l[k]) rdec[k] = 1;
        else if (!c && h) rdec[k] = 1;
      end else begin
        if (c && !a && !l[k]) rinc[k] = 1;
      end
    end
  endtask

  initial begin
    for (int j = 0; j < M; j++) begin include_i[j] = '0; rnd[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 150; round++) begin
      int v;
      // patch phase with reservoir reference
      for (int j = 0; j < M; j++) begin rn[j] = 0; rp[j] = '0; end
      for (int p = 0; p < NPATCH; p++) begin
        patch_valid = 1; patch_first = (p == 0);
        feat = feat_t'($urandom);
        for (int j = 0; j < M; j++) begin
          clause[j] = ($urandom_range(0, 99) < (round % 4) * 25);
          rnd[j] = 24'($urandom);
          if (clause[j]) begin
            rn[j]++;
            if (longint'(rnd[j]) * rn[j] < (longint'(1) << RND_W)) rp[j] = feat;
          end
        end
        @(negedge clk);
      end
      patch_valid = 0;
      for (int j = 0; j < M; j++)
        check(c1[j] == (rn[j] != 0) && c0[j] == (rn[j] != 0), "clause output from count");
      // class sum
      v = $urandom_range(0, 100) - 50;
      if (round % 5 == 0) v = 0;
      sum = sum_t'(v); sum_valid = 1;
      @(negedge clk);
      sum_valid = 0;
      // clause updates
      for (int j = 0; j < M; j++) begin
        bit ren1, ren0;
        lit_t ri1, rd1, ri0, rd0;
        upd_active = 1; upd_clause = 6'(j);
        for (int q = 0; q < M; q++) begin include_i[q] = lit_t'($urandom); rnd[q] = 24'($urandom); end
        #1;
        ref_update(1'b1, j, v, ren1, ri1, rd1);
        ref_update(1'b0, j, v, ren0, ri0, rd0);
        check(en1 == ren1 && en0 == ren0, $sformatf("round %0d clause %0d update enable", round, j));
        check(inc1 == ri1 && dec1 == rd1, $sformatf("round %0d clause %0d target feedback", round, j));
        check(inc0 == ri0 && dec0 == rd0, $sformatf("round %0d clause %0d negative feedback", round, j));
        if (!ren1) n_skip++;
        if (ren1 && (j % 2 == 1) && rn[j] != 0 && ri1 != '0) n_ia++;
        if (ren1 && (j % 2 == 1) && rn[j] == 0 && rd1 != '0) n_ib++;
        if (ren1 && (j % 2 == 0) && ri1 != '0) n_ii++;
        @(negedge clk);
      end
      upd_active = 0;
      @(negedge clk);
      check(!en1 && !en0, "no update outside the update phase");
    end
    $display("feedback seen: Ia=%0d Ib=%0d II=%0d skipped=%0d", n_ia, n_ib, n_ii, n_skip);
    check(n_ia > 0 && n_ib > 0 && n_ii > 0 && n_skip > 0, "every feedback type occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
