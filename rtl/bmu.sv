// bmu: branch metric unit.
//
// For every one of the 16 code words of the rate-3/4 code it produces the
// Hamming distance to the received hard-decision word of 4 bits.  In the
// rate-2/3 and rate-1/2 modes only the low 3 or 2 received bits take part and
// only the first 8 or 4 metrics are meaningful; the others still hold the
// distance over the active bits and are ignored downstream.  Hard decisions
// and the Hamming distance are this design's choice; the decoder only
// requires a metric per code word.
//
// Purely combinational: bm[i] follows rx_word in the same cycle.
module bmu
  import viterbi_pkg::*;
(
  input  mode_e            mode,
  input  logic [MAX_N-1:0] rx_word,
  output bm_t              bm [NUM_BM]
);

  logic [MAX_N-1:0] mask;

  always_comb begin
    case (mode)
      MODE_R23: mask = 4'b0111;
      MODE_R12: mask = 4'b0011;
      default:  mask = 4'b1111;
    endcase
  end

  always_comb begin
    for (int i = 0; i < NUM_BM; i++) begin
      logic [MAX_N-1:0] d;
      d = (rx_word ^ MAX_N'(i)) & mask;
      bm[i] = BM_W'(d[0]) + BM_W'(d[1]) + BM_W'(d[2]) + BM_W'(d[3]);
    end
  end

endmodule
