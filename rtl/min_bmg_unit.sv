// min_bmg_unit: minimum branch metric of each branch-metric group and of the
// even and odd code-word groups, for all three code rates.
//
// Branch-metric group g (g = 0..3) holds the code words whose index is g
// modulo 4: four words at rate 3/4, two at rate 2/3 and one at rate 1/2.
// Rate 3/4 needs two levels of 2-input comparators to reduce a group, rate
// 2/3 one level and rate 1/2 none.  A first input-select stage, between the
// two comparator levels, feeds the second level either the first-level
// results (rate 3/4) or the raw rate-2/3 metrics; a second input-select stage
// passes the raw metric straight on at rate 1/2.  evenBM and oddBM are then
// one more comparator each: min(minBMG0, minBMG2) and min(minBMG1, minBMG3).
// Even code words end in parity 0, so evenBM is the smallest metric of any
// branch leaving an even-parity state (see viterbi_pkg).
//
// Comparator arrangement and the two input-select stages follow the design's
// reconfigurable minimum-finder; the grouping by index modulo 4 is this
// design's own.  Purely combinational.
module min_bmg_unit
  import viterbi_pkg::*;
(
  input  mode_e mode,
  input  bm_t   bm      [NUM_BM],
  output bm_t   min_bmg [4],
  output bm_t   even_bm,
  output bm_t   odd_bm
);

  function automatic bm_t bmin(bm_t a, bm_t b);
    return (b < a) ? b : a;
  endfunction

  bm_t lvl1_a [4];  // rate 3/4 first level: words g, g+8
  bm_t lvl1_b [4];  // rate 3/4 first level: words g+4, g+12
  bm_t sel_a  [4];
  bm_t sel_b  [4];
  bm_t lvl2   [4];
  bm_t grp    [4];

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      lvl1_a[g] = bmin(bm[g],     bm[g + 8]);
      lvl1_b[g] = bmin(bm[g + 4], bm[g + 12]);
      // input select 1: rate 3/4 takes the first level, rate 2/3 the raw words
      if (mode == MODE_R34) begin
        sel_a[g] = lvl1_a[g];
        sel_b[g] = lvl1_b[g];
      end else begin
        sel_a[g] = bm[g];
        sel_b[g] = bm[g + 4];
      end
      lvl2[g] = bmin(sel_a[g], sel_b[g]);
      // input select 2: rate 1/2 has one word per group
      grp[g]  = (mode == MODE_R12) ? bm[g] : lvl2[g];
    end
  end

  assign min_bmg = grp;
  assign even_bm = bmin(grp[0], grp[2]);
  assign odd_bm  = bmin(grp[1], grp[3]);

endmodule
