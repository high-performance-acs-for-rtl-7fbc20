// tb_acs_unit: random predecessor metrics (some invalid, some equal to force
// ties) and branch metrics in all three modes.  The output must be the
// smallest valid PM + BM over the 8, 4 or 2 enabled branches, the decision
// the lowest branch index reaching it, and the output invalid when no
// enabled input is valid.  Metrics near the wrap-around point exercise the
// modular comparison.
module tb_acs_unit;
  import viterbi_pkg::*;

  mode_e      mode;
  pm_t        pm_in [NUM_PRED];
  bm_t        bm_in [NUM_PRED];
  pm_t        pm_out;
  logic [2:0] decision;
  int         checks = 0, failures = 0;

  acs_unit dut (.mode(mode), .pm_in(pm_in), .bm_in(bm_in), .pm_out(pm_out), .decision(decision));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_e modes [3] = '{MODE_R34, MODE_R23, MODE_R12};
    int npred [3] = '{8, 4, 2};
    for (int iter = 0; iter < 6000; iter++) begin
      int m, base, best, bestj;
      m    = iter % 3;
      mode = modes[m];
      base = $urandom_range(0, (1 << PM_W) - 1);
      for (int j = 0; j < NUM_PRED; j++) begin
        pm_in[j].valid = ($urandom_range(0, 5) != 0);
        pm_in[j].val   = PM_W'(base + $urandom_range(0, 6));
        bm_in[j]       = bm_t'($urandom_range(0, 4));
      end
      #1;
      // reference on unbounded integers relative to base
      best = -1; bestj = 0;
      for (int j = 0; j < npred[m]; j++) begin
        int off, c;
        if (!pm_in[j].valid) continue;
        off = (int'(pm_in[j].val) - base + (1 << PM_W)) % (1 << PM_W);
        c = off + int'(bm_in[j]);
        if (best < 0 || c < best) begin
          best = c; bestj = j;
        end
      end
      checks++;
      if (best < 0) begin
        if (pm_out.valid) begin
          failures++;
          $display("FAIL expected invalid output, mode=%0d", m);
        end
      end else if (!pm_out.valid || pm_out.val != PM_W'(base + best) || int'(decision) != bestj) begin
        failures++;
        $display("FAIL mode=%0d got v=%0d %0d j=%0d exp %0d j=%0d", m, pm_out.valid,
                 pm_out.val, decision, PM_W'(base + best), bestj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
