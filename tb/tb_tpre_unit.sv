// tb_tpre_unit: drives random path metric vectors and even/odd minima, one
// set per trellis step, with random idle cycles in between.  In step n the
// outputs must equal
//     pm_opt = min_c  cmin_c(P[n-2]) + E[n-2][c[1]] + E[n-1][c[0]]
//     thr    = pm_opt + T
// i.e. they must lag the metric input by exactly two steps (three pipeline
// stages), be invalid for the first two steps after reset, and hold during
// idle cycles.
module tb_tpre_unit;
  import viterbi_pkg::*;

  localparam int MAXN = 400;

  logic            clk = 0, rst_n = 0, en = 0;
  pm_t             pm_in [NUM_STATES];
  bm_t             even_bm, odd_bm;
  logic [TH_W-1:0] threshold;
  pm_t             pm_opt, thr;
  int              checks = 0, failures = 0;

  tpre_unit dut (.clk(clk), .rst_n(rst_n), .en(en), .pm_in(pm_in), .even_bm(even_bm),
                 .odd_bm(odd_bm), .threshold(threshold), .pm_opt(pm_opt), .thr(thr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cmin [MAXN][4];   // cluster minima of P[n], -1 when empty
  int ev   [MAXN][2];

  function automatic int cl_of(int s);
    return 2 * ((s >> 5 ^ s >> 4 ^ s >> 3) & 1) + ((s >> 2 ^ s >> 1 ^ s) & 1);
  endfunction

  initial begin
    int base = 0;
    int n = 0;
    threshold = TH_W'($urandom_range(0, 40));
    for (int s = 0; s < NUM_STATES; s++) pm_in[s] = PM_INVALID;
    even_bm = '0; odd_bm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n < MAXN) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      if (en) begin
        int exp_v;
        base += $urandom_range(0, 3);
        for (int c = 0; c < 4; c++) cmin[n][c] = -1;
        for (int s = 0; s < NUM_STATES; s++) begin
          int v;
          v = base + $urandom_range(0, 30);
          pm_in[s].valid = ($urandom_range(0, (n % 10 == 0) ? 0 : 4) != 0);
          pm_in[s].val   = PM_W'(v);
          if (pm_in[s].valid && (cmin[n][cl_of(s)] < 0 || v < cmin[n][cl_of(s)]))
            cmin[n][cl_of(s)] = v;
        end
        ev[n][0] = $urandom_range(0, 4);
        ev[n][1] = $urandom_range(0, 4);
        even_bm = bm_t'(ev[n][0]);
        odd_bm  = bm_t'(ev[n][1]);
        #1;
        exp_v = -1;
        if (n >= 2)
          for (int c = 0; c < 4; c++)
            if (cmin[n-2][c] >= 0) begin
              int t;
              t = cmin[n-2][c] + ev[n-2][c / 2] + ev[n-1][c % 2];
              if (exp_v < 0 || t < exp_v) exp_v = t;
            end
        checks++;
        if (exp_v < 0) begin
          if (pm_opt.valid || thr.valid) begin
            failures++;
            $display("FAIL step %0d expected invalid", n);
          end
        end else if (!pm_opt.valid || pm_opt.val != PM_W'(exp_v) || !thr.valid ||
                     thr.val != PM_W'(exp_v + int'(threshold))) begin
          failures++;
          $display("FAIL step %0d got %0d/%0d exp %0d", n, pm_opt.valid, pm_opt.val, PM_W'(exp_v));
        end
        n++;
      end else begin
        // idle cycle: outputs must not move across the edge
        pm_t hold;
        #1;
        hold = pm_opt;
        @(posedge clk);
        #1;
        checks++;
        if (pm_opt != hold) begin
          failures++;
          $display("FAIL output changed during idle cycle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
