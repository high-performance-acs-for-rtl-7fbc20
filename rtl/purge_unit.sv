// purge_unit: T-algorithm purge of the path metric memory.
//
// A state survives when its metric is valid and does not exceed the
// threshold PMopt + T, where PMopt is the precomputed best path metric of the
// same trellis step.  Everything else is discarded and takes no part in the
// next add-compare-select.  While the precomputation pipeline has not yet
// produced a threshold (thr.valid = 0) every valid state survives.  One
// 2-input modular comparator per state; purely combinational.
//
// The comparison against optimum plus threshold is the T-algorithm rule;
// the valid-bit representation of a discarded state is this design's own.
module purge_unit
  import viterbi_pkg::*;
(
  input  pm_t                   pm_in  [NUM_STATES],
  input  pm_t                   thr,
  output pm_t                   pm_out [NUM_STATES],
  output logic [NUM_STATES-1:0] purged
);

  always_comb begin
    for (int s = 0; s < NUM_STATES; s++) begin
      purged[s] = pm_in[s].valid && thr.valid && val_lt(thr.val, pm_in[s].val);
      pm_out[s] = pm_in[s];
      if (purged[s]) pm_out[s].valid = 1'b0;
    end
  end

endmodule
