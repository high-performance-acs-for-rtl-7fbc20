// viterbi_decoder: reconfigurable K = 7 Viterbi decoder (rates 3/4, 2/3 and
// 1/2) whose add-compare-select unit uses the T-algorithm with a three-stage
// pipelined two-step precomputation of the best path metric.
//
// Datapath, one trellis step per clock:
//   in_word -> bmu -> bm register -> acsu (purge + 64 ACS + path metrics)
//                          |            |  \-> smu -> out_sym
//                          v            v
//                     min_bmg_unit -> tpre_unit (cluster minima, 2 adders,
//                                      4-way minimum, + T) -> threshold
// The T-algorithm discards every state whose metric exceeds the best metric
// of its step by more than `threshold`.  The best metric is not searched
// for among the 64 new metrics (that would put a 64-input minimum in the
// ACS loop); it is precomputed from the metrics two steps earlier, the
// cluster minima and the even/odd minimum branch metrics, in three pipeline
// stages, so the loop holds only the ACS and one comparator.
//
// Interface: mode (00 rate 3/4, 01 rate 2/3, 10 rate 1/2) and threshold are
// static; change mode only during reset.  in_word carries the hard-decision
// code bits of one step (4, 3 or 2 low bits) when in_valid is high; gaps in
// in_valid stall the whole pipeline.  Decoded symbols (3, 2 or 1 low bits of
// out_sym) come out in order with out_valid; without stalls a symbol leaves
// DEPTH + 2 cycles after its code word was presented (input register, DEPTH
// trellis steps, output register).  pm_opt, purged_count and step_valid expose the
// T-algorithm activity of the step being computed.
//
// The ACSU structure, reconfiguration and precomputation pipeline follow the
// design; the code generator, hard-decision metrics, register-exchange
// survivor memory, metric widths and the stall handshake are this design's
// own choices.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       mode,
  input  logic [TH_W-1:0]  threshold,
  input  logic             in_valid,
  input  logic [MAX_N-1:0] in_word,
  output logic             out_valid,
  output logic [MAX_K-1:0] out_sym,
  output logic             step_valid,
  output logic             opt_valid,
  output logic [PM_W-1:0]  pm_opt,
  output logic [6:0]       purged_count
);

  mode_e mode_e_w;
  assign mode_e_w = mode_e'(mode);

  bm_t  bm_c [NUM_BM];
  bm_t  bm_q [NUM_BM];
  logic bm_v;

  bmu u_bmu (
    .mode    (mode_e_w),
    .rx_word (in_word),
    .bm      (bm_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bm_v <= 1'b0;
      for (int i = 0; i < NUM_BM; i++) bm_q[i] <= '0;
    end else begin
      bm_v <= in_valid;
      if (in_valid) bm_q <= bm_c;
    end
  end

  bm_t even_bm, odd_bm;

  min_bmg_unit u_min_bmg (
    .mode    (mode_e_w),
    .bm      (bm_q),
    .min_bmg (),
    .even_bm (even_bm),
    .odd_bm  (odd_bm)
  );

  pm_t                   pm_q     [NUM_STATES];
  pm_t                   pm_opt_s;
  pm_t                   thr;
  logic [2:0]            decision [NUM_STATES];
  logic [NUM_STATES-1:0] purged;

  tpre_unit u_tpre (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (bm_v),
    .pm_in     (pm_q),
    .even_bm   (even_bm),
    .odd_bm    (odd_bm),
    .threshold (threshold),
    .pm_opt    (pm_opt_s),
    .thr       (thr)
  );

  acsu u_acsu (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (bm_v),
    .mode     (mode_e_w),
    .bm       (bm_q),
    .thr      (thr),
    .pm_q     (pm_q),
    .decision (decision),
    .purged   (purged)
  );

  smu #(.DEPTH(DEPTH)) u_smu (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (bm_v),
    .mode      (mode_e_w),
    .decision  (decision),
    .pm_in     (pm_q),
    .out_valid (out_valid),
    .out_sym   (out_sym)
  );

  assign step_valid   = bm_v;
  assign opt_valid    = pm_opt_s.valid;
  assign pm_opt       = pm_opt_s.val;
  assign purged_count = 7'($countones(purged));

endmodule
