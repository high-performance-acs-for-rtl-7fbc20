// tb_smu: the survivor memory is fed a known "true" path.  Each step the
// true successor state gets the decision pointing back to the true present
// state and every other state a random decision; the true state has the
// best metric, the others are worse or invalid.  The decoded symbols must be
// the true input symbols in order, the first one after DEPTH + 1 steps, and
// nothing may come out during idle cycles.  Runs all three modes with a
// reduced DEPTH of 12.
module tb_smu;
  import viterbi_pkg::*;

  localparam int unsigned D = 12;
  localparam int NSTEP = 200;

  logic       clk = 0, rst_n = 0, en = 0;
  mode_e      mode;
  logic [2:0] decision [NUM_STATES];
  pm_t        pm_in    [NUM_STATES];
  logic       out_valid;
  sym_t       out_sym;
  int         checks = 0, failures = 0;

  smu #(.DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .decision(decision),
                        .pm_in(pm_in), .out_valid(out_valid), .out_sym(out_sym));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int syms [NSTEP];
  int n_out, steps_done, first_out_step;

  always @(posedge clk) begin
    if (!rst_n) steps_done = 0;
    if (rst_n && out_valid) begin
      checks++;
      if (n_out == 0) first_out_step = steps_done;
      if (n_out < NSTEP && int'(out_sym) != syms[n_out]) begin
        failures++;
        $display("FAIL mode %0d output %0d got %0d exp %0d", mode, n_out, out_sym, syms[n_out]);
      end
      n_out++;
    end
    if (rst_n && en) steps_done++;
  end

  initial begin
    static mode_e modes [3] = '{MODE_R34, MODE_R23, MODE_R12};
    for (int m = 0; m < 3; m++) begin
      int k;
      state_t cur;
      mode = modes[m];
      k = 3 - m;
      rst_n = 0; en = 0;
      for (int s = 0; s < NUM_STATES; s++) begin
        decision[s] = '0; pm_in[s] = PM_INVALID;
      end
      repeat (2) @(posedge clk);
      rst_n = 1;
      n_out = 0; first_out_step = -1;
      cur = '0;
      for (int t = 0; t < NSTEP; t++) syms[t] = $urandom_range(0, (1 << k) - 1);
      for (int t = 0; t < NSTEP; ) begin
        @(negedge clk);
        en = ($urandom_range(0, 3) != 0);
        if (!en) continue;
        begin
          state_t nxt;
          nxt = next_state(cur, sym_t'(syms[t]), mode);
          for (int s = 0; s < NUM_STATES; s++) begin
            decision[s] = 3'($urandom_range(0, (1 << k) - 1));
            pm_in[s].valid = ($urandom_range(0, 3) != 0);
            pm_in[s].val   = PM_W'(100 + $urandom_range(1, 20));
          end
          decision[nxt] = 3'(int'(cur) >> (6 - k));
          pm_in[cur] = '{valid: 1'b1, val: PM_W'(100)};
          cur = nxt;
          t++;
          @(posedge clk);
        end
      end
      @(negedge clk);
      en = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (first_out_step != int'(D) + 1) begin
        failures++;
        $display("FAIL mode %0d first output after %0d steps, expected %0d", m, first_out_step, D + 1);
      end
      checks++;
      if (n_out != NSTEP - int'(D)) begin
        failures++;
        $display("FAIL mode %0d %0d outputs, expected %0d", m, n_out, NSTEP - int'(D));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
