// tb_purge_unit: random metrics around a random threshold.  A valid state is
// purged exactly when its metric exceeds the threshold; with an invalid
// threshold nothing is purged; purged states come out invalid, others
// unchanged.
module tb_purge_unit;
  import viterbi_pkg::*;

  pm_t                   pm_in  [NUM_STATES];
  pm_t                   thr;
  pm_t                   pm_out [NUM_STATES];
  logic [NUM_STATES-1:0] purged;
  int                    checks = 0, failures = 0;

  purge_unit dut (.pm_in(pm_in), .thr(thr), .pm_out(pm_out), .purged(purged));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_purged = 0;
    for (int iter = 0; iter < 500; iter++) begin
      int base;
      base = $urandom_range(0, (1 << PM_W) - 1);
      thr.valid = (iter % 7 != 0);
      thr.val   = PM_W'(base + 8);
      for (int s = 0; s < NUM_STATES; s++) begin
        pm_in[s].valid = ($urandom_range(0, 7) != 0);
        pm_in[s].val   = PM_W'(base + $urandom_range(0, 16));
      end
      #1;
      for (int s = 0; s < NUM_STATES; s++) begin
        int off;
        logic exp_p;
        off   = (int'(pm_in[s].val) - base + (1 << PM_W)) % (1 << PM_W);
        exp_p = pm_in[s].valid && thr.valid && (off > 8);
        if (exp_p) n_purged++;
        checks++;
        if (purged[s] != exp_p || pm_out[s].valid != (pm_in[s].valid && !exp_p) ||
            pm_out[s].val != pm_in[s].val) begin
          failures++;
          $display("FAIL state %0d off=%0d purged=%0d exp %0d", s, off, purged[s], exp_p);
        end
      end
    end
    checks++;
    if (n_purged == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
