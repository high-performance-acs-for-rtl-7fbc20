// acs_unit: one reconfigurable add-compare-select cell.
//
// Eight adders form the candidate metrics path[j] = PM(pred_j) + BM(branch j).
// A select module enables them by mode: all eight at rate 3/4 (mode 00), the
// top four at rate 2/3 (mode 01) and the top two at rate 1/2 (mode 10); the
// top two are always in use and go straight to the 8-input minimum.  A
// disabled adder offers an invalid candidate.  The minimum is a tree of
// 2-input comparators (two 4-input minima and a final 2-input one); on a tie
// the lower branch index wins.  Invalid inputs (states never reached or
// purged by the T-algorithm) never win; if all are invalid the output is
// invalid.
//
// Adder count, enabling by mode and the mode codes follow the design's
// reconfigurable ACS cell; modular metrics with a valid bit and the tie rule
// are this design's own.  Purely combinational; the path metric register is
// in acsu.
module acs_unit
  import viterbi_pkg::*;
(
  input  mode_e      mode,
  input  pm_t        pm_in  [NUM_PRED],
  input  bm_t        bm_in  [NUM_PRED],
  output pm_t        pm_out,
  output logic [2:0] decision
);

  logic [NUM_PRED-1:0] enable;
  pm_t                 cand [NUM_PRED];

  // select module
  always_comb begin
    case (mode)
      MODE_R23: enable = 8'b0000_1111;
      MODE_R12: enable = 8'b0000_0011;
      default:  enable = 8'b1111_1111;
    endcase
  end

  // adders
  always_comb begin
    for (int j = 0; j < NUM_PRED; j++) begin
      cand[j] = pm_add(pm_in[j], PM_W'(bm_in[j]));
      if (!enable[j]) cand[j] = PM_INVALID;
    end
  end

  // compare-select tree, carrying the winning branch index
  pm_t        l1 [4];
  logic [2:0] i1 [4];
  pm_t        l2 [2];
  logic [2:0] i2 [2];

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      if (pm_better(cand[2*p], cand[2*p+1])) begin
        l1[p] = cand[2*p+1];
        i1[p] = 3'(2*p+1);
      end else begin
        l1[p] = cand[2*p];
        i1[p] = 3'(2*p);
      end
    end
    for (int p = 0; p < 2; p++) begin
      if (pm_better(l1[2*p], l1[2*p+1])) begin
        l2[p] = l1[2*p+1];
        i2[p] = i1[2*p+1];
      end else begin
        l2[p] = l1[2*p];
        i2[p] = i1[2*p];
      end
    end
    if (pm_better(l2[0], l2[1])) begin
      pm_out   = l2[1];
      decision = i2[1];
    end else begin
      pm_out   = l2[0];
      decision = i2[0];
    end
  end

endmodule
