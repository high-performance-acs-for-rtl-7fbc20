// acsu: add-compare-select unit with its path metric memory.
//
// Holds the 64 path metrics in a register and, in every trellis step,
// (1) purges the stored metrics against the threshold from tpre_unit
// (purge_unit), (2) routes to each of 64 acs_unit cells the metrics of its
// predecessors and the branch metrics of the connecting code words, as the
// trellis of the selected mode dictates (viterbi_pkg: pred_state, codeword),
// and (3) writes the 64 new metrics back.  Each cell's decision, the index j
// of the winning predecessor, goes to the survivor memory.
//
// Timing: when en is high the register takes the new metrics at the clock
// edge; pm_q, decision and purged describe the step being computed.  After
// reset state 0 holds metric 0 and every other state is invalid (the
// encoder starts in state 0); this start condition is this design's choice.
// mode must stay constant between resets.
module acsu
  import viterbi_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  mode_e                 mode,
  input  bm_t                   bm       [NUM_BM],
  input  pm_t                   thr,
  output pm_t                   pm_q     [NUM_STATES],
  output logic [2:0]            decision [NUM_STATES],
  output logic [NUM_STATES-1:0] purged
);

  pm_t pm_surv [NUM_STATES];
  pm_t pm_new  [NUM_STATES];
  pm_t acs_pm  [NUM_STATES][NUM_PRED];
  bm_t acs_bm  [NUM_STATES][NUM_PRED];

  purge_unit u_purge (
    .pm_in  (pm_q),
    .thr    (thr),
    .pm_out (pm_surv),
    .purged (purged)
  );

  // trellis interconnect
  always_comb begin
    for (int ns = 0; ns < NUM_STATES; ns++) begin
      for (int j = 0; j < NUM_PRED; j++) begin
        state_t p;
        p = pred_state(state_t'(ns), 3'(j), mode);
        acs_pm[ns][j] = pm_surv[p];
        acs_bm[ns][j] = bm[codeword(p, sym_of(state_t'(ns), mode), mode)];
      end
    end
  end

  for (genvar ns = 0; ns < NUM_STATES; ns++) begin : g_acs
    acs_unit u_acs (
      .mode     (mode),
      .pm_in    (acs_pm[ns]),
      .bm_in    (acs_bm[ns]),
      .pm_out   (pm_new[ns]),
      .decision (decision[ns])
    );
  end

  // path metric memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_STATES; s++) pm_q[s] <= PM_INVALID;
      pm_q[0] <= '{valid: 1'b1, val: '0};
    end else if (en) begin
      pm_q <= pm_new;
    end
  end

endmodule
