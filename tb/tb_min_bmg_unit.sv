// tb_min_bmg_unit: random branch metrics in all three modes.  minBMG[g] must
// be the minimum over the active code words with index g modulo 4, evenBM
// and oddBM the minimum over the active even and odd code words.
module tb_min_bmg_unit;
  import viterbi_pkg::*;

  mode_e mode;
  bm_t   bm [NUM_BM];
  bm_t   min_bmg [4];
  bm_t   even_bm, odd_bm;
  int    checks = 0, failures = 0;

  min_bmg_unit dut (.mode(mode), .bm(bm), .min_bmg(min_bmg), .even_bm(even_bm), .odd_bm(odd_bm));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s mode=%0d got %0d exp %0d", what, mode, got, exp_v);
    end
  endtask

  initial begin
    mode_e modes [3] = '{MODE_R34, MODE_R23, MODE_R12};
    int nwords [3] = '{16, 8, 4};
    for (int iter = 0; iter < 3000; iter++) begin
      int m, e_even, e_odd;
      int e_grp [4];
      m = iter % 3;
      mode = modes[m];
      for (int i = 0; i < NUM_BM; i++) bm[i] = bm_t'($urandom_range(0, 7));
      #1;
      e_even = 99; e_odd = 99;
      for (int g = 0; g < 4; g++) e_grp[g] = 99;
      for (int i = 0; i < nwords[m]; i++) begin
        if (int'(bm[i]) < e_grp[i % 4]) e_grp[i % 4] = int'(bm[i]);
        if (i % 2 == 0 && int'(bm[i]) < e_even) e_even = int'(bm[i]);
        if (i % 2 == 1 && int'(bm[i]) < e_odd)  e_odd  = int'(bm[i]);
      end
      for (int g = 0; g < 4; g++) check("minBMG", int'(min_bmg[g]), e_grp[g]);
      check("evenBM", int'(even_bm), e_even);
      check("oddBM", int'(odd_bm), e_odd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
