// smu: register-exchange survivor memory with best-state output.
//
// Every state owns a path register of DEPTH information symbols (3 bits
// each, of which the mode uses 1 to 3).  In each trellis step the register
// of state ns is replaced by the register of the predecessor chosen by its
// ACS decision, shifted by one symbol, with the symbol that enters ns
// appended.  The decoded symbol is the oldest entry of the register of the
// state with the best current path metric (a minimum search over the 64
// metrics; ties go to the lower state).
//
// Timing: with en high in the cycle of step t, pm_in and the path registers
// describe step t-1; out_valid pulses in the same clock edge with the symbol
// of step t-DEPTH, so symbols leave in input order, DEPTH steps late (plus
// the decoder's input register).  The first DEPTH steps produce nothing.
// Register exchange (rather than trace-back), best-state selection and
// DEPTH = 32 are this design's choices.
module smu
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  mode_e      mode,
  input  logic [2:0] decision [NUM_STATES],
  input  pm_t        pm_in    [NUM_STATES],
  output logic       out_valid,
  output sym_t       out_sym
);

  // entry d (bits 3d+2:3d) is the symbol of d steps ago; entry 0 the newest
  typedef logic [DEPTH*MAX_K-1:0] path_t;

  path_t path_q [NUM_STATES];

  // Each state chooses among its 8 possible predecessors (fixed wiring per
  // mode), then among those by its decision.
  for (genvar ns = 0; ns < NUM_STATES; ns++) begin : g_state
    path_t cand [NUM_PRED];
    path_t nxt;

    always_comb begin
      for (int j = 0; j < NUM_PRED; j++)
        cand[j] = path_q[pred_state(state_t'(ns), 3'(j), mode)];
    end

    assign nxt = {cand[decision[ns]][(DEPTH-1)*MAX_K-1:0], sym_of(state_t'(ns), mode)};

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  path_q[ns] <= '0;
      else if (en) path_q[ns] <= nxt;
    end
  end

  // best-state search
  state_t best;
  always_comb begin
    pm_t bm_v;
    bm_v = pm_in[0];
    best = '0;
    for (int s = 1; s < NUM_STATES; s++) begin
      if (pm_better(bm_v, pm_in[s])) begin
        bm_v = pm_in[s];
        best = state_t'(s);
      end
    end
  end

  logic [$clog2(DEPTH+1)-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (en) begin
        if (fill != DEPTH[$bits(fill)-1:0]) fill <= fill + 1'b1;
        out_valid <= (fill == DEPTH[$bits(fill)-1:0]);
        out_sym   <= path_q[best][DEPTH*MAX_K-1 -: MAX_K];
      end
    end
  end

endmodule
