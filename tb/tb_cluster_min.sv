// tb_cluster_min: random path metrics with random valid bits and random
// enable.  After each enabled clock edge cm_q[c] must be the minimum valid
// metric among the 16 states s with {^s[5:3], ^s[2:0]} = c (invalid if
// none); with enable low it must hold.  Also checks reset to invalid.
module tb_cluster_min;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  pm_t  pm_in [NUM_STATES];
  pm_t  cm_q  [NUM_CLUSTERS];
  int   checks = 0, failures = 0;

  cluster_min dut (.clk(clk), .rst_n(rst_n), .en(en), .pm_in(pm_in), .cm_q(cm_q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pm_t exp_cm [NUM_CLUSTERS];
    for (int s = 0; s < NUM_STATES; s++) pm_in[s] = PM_INVALID;
    repeat (2) @(posedge clk);
    for (int c = 0; c < NUM_CLUSTERS; c++) begin
      checks++;
      if (cm_q[c].valid) failures++;
    end
    rst_n = 1;
    for (int c = 0; c < NUM_CLUSTERS; c++) exp_cm[c] = PM_INVALID;
    for (int iter = 0; iter < 2000; iter++) begin
      int base;
      @(negedge clk);
      base = $urandom_range(0, (1 << PM_W) - 1);
      en = ($urandom_range(0, 3) != 0);
      for (int s = 0; s < NUM_STATES; s++) begin
        pm_in[s].valid = ($urandom_range(0, 2 + iter % 20) != 0);
        pm_in[s].val   = PM_W'(base + $urandom_range(0, 40));
      end
      if (en) begin
        for (int c = 0; c < NUM_CLUSTERS; c++) begin
          int best;
          best = -1;
          for (int s = 0; s < NUM_STATES; s++) begin
            int off, cl;
            cl = 2 * ((s >> 5 ^ s >> 4 ^ s >> 3) & 1) + ((s >> 2 ^ s >> 1 ^ s) & 1);
            off = (int'(pm_in[s].val) - base + (1 << PM_W)) % (1 << PM_W);
            if (cl == c && pm_in[s].valid && (best < 0 || off < best)) best = off;
          end
          exp_cm[c].valid = (best >= 0);
          exp_cm[c].val   = (best >= 0) ? PM_W'(base + best) : '0;
        end
      end
      @(posedge clk);
      #1;
      for (int c = 0; c < NUM_CLUSTERS; c++) begin
        checks++;
        if (cm_q[c].valid != exp_cm[c].valid || (exp_cm[c].valid && cm_q[c].val != exp_cm[c].val)) begin
          failures++;
          $display("FAIL iter %0d cluster %0d got %0d/%0d exp %0d/%0d", iter, c,
                   cm_q[c].valid, cm_q[c].val, exp_cm[c].valid, exp_cm[c].val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
