// tpre_unit: three-stage pipelined two-step precomputation of the best path
// metric and the T-algorithm threshold.
//
// The threshold that purges the metrics PM(t-1), read from the path metric
// register while step t is computed, is built from PM(t-3) and the even/odd
// minimum branch metrics of steps t-2 and t-1:
//     PMopt(t-1) = min over clusters c of
//                  minPM_c(t-3) + grp_{c[1]}(t-2) + grp_{c[0]}(t-1)
// where grp_0 is evenBM and grp_1 is oddBM.  The work is split by registers
// into three stages, one trellis step apart:
//   stage 1 (step t-2): cluster minima of the path metric register, PM(t-3)
//                       (two levels of 4-input minimum, in cluster_min)
//   stage 2 (step t-1): add the first-step group minimum (one adder)
//   stage 3 (step t):   add the second-step group minimum, take the minimum
//                       over the four clusters, add T -> threshold
// Only the four cluster minima and four partial sums are stored, not a
// delayed copy of all 64 path metrics.  The even/odd minima arrive with each
// step's branch metrics and are registered once (eo_q), so stage 2 sees those
// of step t-2 and stage 3 those of step t-1.
//
// PMopt is a lower bound on the best metric that the purged trellis actually
// reaches (it ignores purging inside the two-step window); it is exact when
// no purged state lies on the best two-step path.  The stage split follows
// the design's retimed pipeline; putting the threshold addition in stage 3 is
// this design's choice.
//
// Interface: en is high in every cycle in which a trellis step is computed;
// all registers advance only then.  pm_opt and thr are combinational outputs
// valid in the cycle of step t.  They are invalid (no purging) until the
// pipeline has seen three steps after reset.
module tpre_unit
  import viterbi_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  pm_t             pm_in [NUM_STATES],
  input  bm_t             even_bm,
  input  bm_t             odd_bm,
  input  logic [TH_W-1:0] threshold,
  output pm_t             pm_opt,
  output pm_t             thr
);

  pm_t cm_q [NUM_CLUSTERS];
  pm_t s2_q [NUM_CLUSTERS];
  bm_t eo_q [2];  // [0] evenBM, [1] oddBM of the previous step

  // stage 1
  cluster_min u_cluster_min (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .pm_in (pm_in),
    .cm_q  (cm_q)
  );

  // stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CLUSTERS; c++) s2_q[c] <= PM_INVALID;
      eo_q[0] <= '0;
      eo_q[1] <= '0;
    end else if (en) begin
      for (int c = 0; c < NUM_CLUSTERS; c++)
        s2_q[c] <= pm_add(cm_q[c], PM_W'(eo_q[c / 2]));
      eo_q[0] <= even_bm;
      eo_q[1] <= odd_bm;
    end
  end

  // stage 3
  pm_t s3 [NUM_CLUSTERS];
  always_comb begin
    for (int c = 0; c < NUM_CLUSTERS; c++)
      s3[c] = pm_add(s2_q[c], PM_W'(eo_q[c % 2]));
    pm_opt = pm_min2(pm_min2(s3[0], s3[1]), pm_min2(s3[2], s3[3]));
    thr    = pm_add(pm_opt, PM_W'(threshold));
  end

endmodule
