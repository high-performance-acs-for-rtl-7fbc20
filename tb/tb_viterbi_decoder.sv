// tb_viterbi_decoder: end-to-end test of the decoder at its default size
// (64 states, DEPTH 32).  For each of the three code rates a random message
// is encoded by conv_encoder_model and decoded twice:
//   phase A: error-free channel, no input gaps, threshold 4.  The decoded
//            symbols must equal the message, each one DEPTH + 2 cycles after
//            its code word, and the precomputed best metric must be 0 (the
//            correct path never accumulates distance).
//   phase B: one flipped code bit every 40 steps, random gaps in in_valid,
//            threshold 6.  Every isolated error must be corrected.
// It counts how often each mechanism acted (states purged by the
// T-algorithm, stalled cycles, precomputed optimum available, bit errors
// corrected, modes run) and fails if any of them never happened.
module tb_viterbi_decoder;
  import viterbi_pkg::*;

  localparam int NMSG  = 300;
  localparam int DEPTH = 32;   // the decoder's default survivor depth
  localparam int NTAIL = DEPTH + 4;

  logic             clk = 0, rst_n = 0;
  logic [1:0]       mode;
  logic [TH_W-1:0]  threshold;
  logic             in_valid;
  logic [MAX_N-1:0] in_word;
  logic             out_valid;
  logic [MAX_K-1:0] out_sym;
  logic             step_valid, opt_valid;
  logic [PM_W-1:0]  pm_opt;
  logic [6:0]       purged_count;

  logic             enc_en;
  logic [2:0]       enc_u;
  logic [3:0]       enc_code;

  int checks = 0, failures = 0;
  int n_purged = 0, n_stall = 0, n_opt = 0, n_errors = 0, n_modes = 0;

  viterbi_decoder dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .threshold(threshold), .in_valid(in_valid),
    .in_word(in_word), .out_valid(out_valid), .out_sym(out_sym), .step_valid(step_valid),
    .opt_valid(opt_valid), .pm_opt(pm_opt), .purged_count(purged_count));

  conv_encoder_model enc (
    .clk(clk), .rst_n(rst_n), .mode(mode), .en(enc_en), .u(enc_u), .code(enc_code));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  msg     [NMSG + NTAIL];
  int  in_cyc  [NMSG + NTAIL];
  int  n_out, cyc;
  logic phase_a;

  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(posedge clk) begin
    if (rst_n) begin
      if (step_valid && opt_valid) begin
        n_opt++;
        if (phase_a) begin
          checks++;
          if (pm_opt != '0) begin
            failures++;
            $display("FAIL precomputed optimum %0d on an error-free channel", pm_opt);
          end
        end
      end
      if (step_valid) n_purged += int'(purged_count);
      if (out_valid && n_out < NMSG) begin
        checks++;
        if (int'(out_sym) != msg[n_out]) begin
          failures++;
          $display("FAIL mode %0d phase %s symbol %0d got %0d exp %0d", mode,
                   phase_a ? "A" : "B", n_out, out_sym, msg[n_out]);
        end
        if (phase_a) begin
          checks++;
          if (cyc - in_cyc[n_out] != DEPTH + 2) begin
            failures++;
            $display("FAIL latency %0d cycles, expected %0d", cyc - in_cyc[n_out], DEPTH + 2);
          end
        end
      end
      if (out_valid) n_out++;
    end
  end

  task automatic run(input logic [1:0] m, input logic a);
    int k, nsent, err_bits;
    k = (m == 2'b00) ? 3 : (m == 2'b01) ? 2 : 1;
    err_bits = k + 1;
    mode = m;
    phase_a = a;
    threshold = a ? 8'd4 : 8'd6;
    in_valid = 0; enc_en = 0; enc_u = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n_out = 0;
    for (int i = 0; i < NMSG + NTAIL; i++) msg[i] = (i < NMSG) ? $urandom_range(0, (1 << k) - 1) : 0;
    nsent = 0;
    while (nsent < NMSG + NTAIL) begin
      @(negedge clk);
      if (!a && $urandom_range(0, 4) == 0) begin
        in_valid = 0; enc_en = 0;
        n_stall++;
        continue;
      end
      enc_u = 3'(msg[nsent]);
      enc_en = 1;
      #1;
      in_word = enc_code;
      if (!a && nsent % 40 == 20 && nsent < NMSG) begin
        in_word[$urandom_range(0, err_bits - 1)] ^= 1'b1;
        n_errors++;
      end
      in_valid = 1;
      in_cyc[nsent] = cyc;
      nsent++;
    end
    @(negedge clk);
    in_valid = 0; enc_en = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out < NMSG) begin
      failures++;
      $display("FAIL mode %0d: only %0d symbols decoded", m, n_out);
    end
    n_modes++;
  endtask

  initial begin
    cyc = 0;
    phase_a = 1;
    mode = 2'b00; threshold = '0; in_valid = 0; in_word = '0; enc_en = 0; enc_u = '0;
    run(2'b00, 1'b1);
    run(2'b00, 1'b0);
    run(2'b01, 1'b1);
    run(2'b01, 1'b0);
    run(2'b10, 1'b1);
    run(2'b10, 1'b0);
    $display("mechanisms: purged=%0d stalls=%0d opt_valid=%0d errors_corrected=%0d modes=%0d",
             n_purged, n_stall, n_opt, n_errors, n_modes);
    checks += 5;
    if (n_purged == 0) failures++;
    if (n_stall == 0)  failures++;
    if (n_opt == 0)    failures++;
    if (n_errors == 0) failures++;
    if (n_modes != 6)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
