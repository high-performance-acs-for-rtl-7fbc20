// tb_acsu: the 64-state ACS unit against a forward trellis model.  For each
// mode, after reset, random branch metrics and a threshold derived from the
// model's own metrics drive 150 steps.  Every step checks, for all 64
// states, the purge decision, the decision index and, after the edge, the
// stored metric.  The model enumerates (state, input) pairs forwards with
// next_state/codeword, independently of the predecessor wiring in the RTL.
module tb_acsu;
  import viterbi_pkg::*;

  logic                  clk = 0, rst_n = 0, en = 0;
  mode_e                 mode;
  bm_t                   bm [NUM_BM];
  pm_t                   thr;
  pm_t                   pm_q [NUM_STATES];
  logic [2:0]            decision [NUM_STATES];
  logic [NUM_STATES-1:0] purged;
  int                    checks = 0, failures = 0;
  int                    n_purged = 0;

  acsu dut (.clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .bm(bm), .thr(thr),
            .pm_q(pm_q), .decision(decision), .purged(purged));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_pm [NUM_STATES];   // -1 = invalid, else unbounded metric

  initial begin
    mode_e modes [3] = '{MODE_R34, MODE_R23, MODE_R12};
    for (int m = 0; m < 3; m++) begin
      int k;
      mode  = modes[m];
      k     = 3 - m;
      rst_n = 0;
      en    = 0;
      thr   = PM_INVALID;
      for (int i = 0; i < NUM_BM; i++) bm[i] = '0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      for (int s = 0; s < NUM_STATES; s++) ref_pm[s] = (s == 0) ? 0 : -1;
      for (int step = 0; step < 150; step++) begin
        int best, nxt_pm [NUM_STATES], nxt_dec [NUM_STATES];
        logic surv [NUM_STATES];
        @(negedge clk);
        en = 1;
        for (int i = 0; i < NUM_BM; i++) bm[i] = bm_t'($urandom_range(0, 4));
        best = -1;
        for (int s = 0; s < NUM_STATES; s++)
          if (ref_pm[s] >= 0 && (best < 0 || ref_pm[s] < best)) best = ref_pm[s];
        thr.valid = (step % 5 != 0);
        thr.val   = PM_W'(best + $urandom_range(0, 6));
        for (int s = 0; s < NUM_STATES; s++)
          surv[s] = ref_pm[s] >= 0 && !(thr.valid && ref_pm[s] > best + int'(thr.val - PM_W'(best)));
        for (int s = 0; s < NUM_STATES; s++) begin
          nxt_pm[s] = -1; nxt_dec[s] = 0;
        end
        for (int s = 0; s < NUM_STATES; s++) begin
          if (!surv[s]) continue;
          for (int u = 0; u < (1 << k); u++) begin
            int ns, c;
            ns = int'(next_state(state_t'(s), sym_t'(u), mode));
            c  = ref_pm[s] + int'(bm[codeword(state_t'(s), sym_t'(u), mode)]);
            if (nxt_pm[ns] < 0 || c < nxt_pm[ns]) begin
              nxt_pm[ns]  = c;
              nxt_dec[ns] = s >> (6 - k);
            end
          end
        end
        #1;
        for (int s = 0; s < NUM_STATES; s++) begin
          checks++;
          if (purged[s] != (ref_pm[s] >= 0 && !surv[s])) begin
            failures++;
            $display("FAIL mode %0d step %0d state %0d purge %0d", m, step, s, purged[s]);
          end
          if (purged[s]) n_purged++;
          if (nxt_pm[s] >= 0) begin
            checks++;
            if (int'(decision[s]) != nxt_dec[s]) begin
              failures++;
              $display("FAIL mode %0d step %0d state %0d dec %0d exp %0d", m, step, s,
                       decision[s], nxt_dec[s]);
            end
          end
        end
        @(posedge clk);
        #1;
        for (int s = 0; s < NUM_STATES; s++) begin
          ref_pm[s] = nxt_pm[s];
          checks++;
          if (pm_q[s].valid != (nxt_pm[s] >= 0) ||
              (nxt_pm[s] >= 0 && pm_q[s].val != PM_W'(nxt_pm[s]))) begin
            failures++;
            $display("FAIL mode %0d step %0d state %0d pm %0d/%0d exp %0d", m, step, s,
                     pm_q[s].valid, pm_q[s].val, nxt_pm[s]);
          end
        end
      end
    end
    checks++;
    if (n_purged == 0) begin
      failures++;
      $display("FAIL no state was ever purged");
    end
    $display("purged states seen: %0d", n_purged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
