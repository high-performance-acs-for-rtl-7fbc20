// cluster_min: minimum path metric of each of the four state clusters
// (stage 1 of the precomputation pipeline).
//
// The 64 states form four clusters of 16 (cluster(s) = {^s[5:3], ^s[2:0]},
// see viterbi_pkg).  Each cluster minimum is two levels of 4-input minimum
// finders (16 -> 4 -> 1), taken directly from the path metric register, and
// the four results are registered.  Keeping only these four minima for a
// cycle replaces a full second copy of the 64 path metrics: the minimum
// finder sits in front of the delay instead of behind it.
//
// Timing: when en is high, cm_q takes the cluster minima of pm_in; it holds
// otherwise.  Reset clears cm_q to invalid.  A cluster with no valid state
// gives an invalid minimum.
module cluster_min
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pm_t  pm_in [NUM_STATES],
  output pm_t  cm_q  [NUM_CLUSTERS]
);

  function automatic pm_t min4(pm_t a, pm_t b, pm_t c, pm_t d);
    return pm_min2(pm_min2(a, b), pm_min2(c, d));
  endfunction

  pm_t cm_d [NUM_CLUSTERS];

  always_comb begin
    for (int c = 0; c < NUM_CLUSTERS; c++) begin
      pm_t l1 [4];
      for (int q = 0; q < 4; q++) begin
        l1[q] = min4(pm_in[cluster_member(2'(c), 4'(4*q))],
                     pm_in[cluster_member(2'(c), 4'(4*q+1))],
                     pm_in[cluster_member(2'(c), 4'(4*q+2))],
                     pm_in[cluster_member(2'(c), 4'(4*q+3))]);
      end
      cm_d[c] = min4(l1[0], l1[1], l1[2], l1[3]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CLUSTERS; c++) cm_q[c] <= PM_INVALID;
    end else if (en) begin
      cm_q <= cm_d;
    end
  end

endmodule
