// tb_bmu: exhaustive check of the branch metric unit.  For every mode and
// every 4-bit received word, each of the 16 metrics must equal the number of
// differing bits among the 4, 3 or 2 bits the mode uses.
module tb_bmu;
  import viterbi_pkg::*;

  mode_e            mode;
  logic [MAX_N-1:0] rx_word;
  bm_t              bm [NUM_BM];
  int               checks = 0, failures = 0;

  bmu dut (.mode(mode), .rx_word(rx_word), .bm(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_e modes [3] = '{MODE_R34, MODE_R23, MODE_R12};
    int nbits [3] = '{4, 3, 2};
    for (int m = 0; m < 3; m++) begin
      mode = modes[m];
      for (int w = 0; w < 16; w++) begin
        rx_word = 4'(w);
        #1;
        for (int i = 0; i < NUM_BM; i++) begin
          int exp_d;
          exp_d = 0;
          for (int b = 0; b < nbits[m]; b++)
            if (((w >> b) & 1) != ((i >> b) & 1)) exp_d++;
          checks++;
          if (int'(bm[i]) != exp_d) begin
            failures++;
            $display("FAIL mode=%0d word=%0d i=%0d got %0d exp %0d", m, w, i, bm[i], exp_d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
