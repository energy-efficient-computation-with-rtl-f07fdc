// tb_race_logic_top_full: end-to-end test of the complete aligner at its default
// size (two 50-symbol strings, 51 x 51 node array), clock period = 1 delay
// unit = 1 ns. The top is used with all
// its parameters at their defaults. Each comparison is checked against the dynamic-programming
// reference: score, hit flag and go-to-result latency.
// Mechanisms exercised and counted (each must occur):
//   hit       - the race arrives within the similarity threshold
//   abort     - the threshold passes first and the race is abandoned
//   clear     - the array is returned to zero and the next pair is accepted
//   reprogram - the three resistors are changed (all delays x3) and the
//               scores scale accordingly
//   match/mismatch extremes - a perfect match (score N) and a complete
//               mismatch.
`timescale 1ns / 1ps
module tb_race_logic_top_full;
  import race_pkg::*;
  import race_ref_pkg::*;

  localparam int N     = N_DEFAULT;
  localparam int CNT_W = 12;

  logic             clk = 1'b0, rst_n;
  logic             go, ready;
  nt_e              p_in [N], q_in [N];
  logic [CNT_W-1:0] threshold;
  logic [RES_W-1:0] r_indel, r_match, r_mismatch;
  logic             result_valid, result_hit;
  logic [CNT_W-1:0] result_score;

  int checks = 0, failures = 0;
  int n_hit = 0, n_abort = 0, n_clear = 0, n_reprog = 0, n_perfect = 0, n_mismatch = 0;

  race_logic_top dut (
    .clk, .rst_n, .go, .ready, .p_in, .q_in, .threshold,
    .r_indel_kohm(r_indel), .r_match_kohm(r_match), .r_mismatch_kohm(r_mismatch),
    .result_valid, .result_score, .result_hit);

  always #0.5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One comparison; scale = delay multiplier set by the resistors
  task automatic compare(int thr, int scale, output int score);
    seq_t ps, qs;
    int   exp_s, cyc;
    bit   exp_hit;
    foreach (p_in[k]) begin
      ps[k] = int'(p_in[k]);
      qs[k] = int'(q_in[k]);
    end
    exp_s   = scale * edit_score(ps, qs, N, SCORE_MATCH, SCORE_MISMATCH, SCORE_INDEL);
    exp_hit = (exp_s <= thr);
    threshold = CNT_W'(thr);
    wait (ready);
    @(negedge clk);
    go = 1'b1;
    @(posedge clk);
    #0.1;
    go = 1'b0;
    cyc = 0;
    while (!result_valid) begin
      @(posedge clk);
      #0.1;
      cyc++;
    end
    check("hit", int'(result_hit), int'(exp_hit));
    check("score", int'(result_score), exp_hit ? exp_s : thr);
    check("latency", cyc, exp_hit ? exp_s + 4 : thr + 5);
    if (result_hit) n_hit++;
    else            n_abort++;
    score = int'(result_score);
    wait (ready);
    n_clear++;
  endtask

  task automatic load_random();
    foreach (p_in[k]) begin
      p_in[k] = nt_e'($urandom_range(3));
      q_in[k] = nt_e'($urandom_range(3));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    rst_n      = 1'b0;
    go         = 1'b0;
    threshold  = '0;
    r_indel    = R_INDEL_KOHM;
    r_match    = R_MATCH_KOHM;
    r_mismatch = R_MISMATCH_KOHM;
    load_random();
    repeat (20) @(posedge clk);
    rst_n = 1'b1;

    // Perfect match: the all-diagonal path of N match delays
    foreach (p_in[k]) q_in[k] = p_in[k];
    compare(1000, 1, s);
    check("perfect match score", s, N);
    if (s == N) n_perfect++;

    // Complete mismatch
    foreach (p_in[k]) begin
      p_in[k] = NT_A;
      q_in[k] = NT_G;
    end
    compare(1000, 1, s);
    check("complete mismatch score", s, N * SCORE_MISMATCH);
    if (s == N * SCORE_MISMATCH) n_mismatch++;

    // Random pairs, generous threshold: all hits
    for (int r = 0; r < 6; r++) begin
      load_random();
      compare(1000, 1, s);
    end

    // Random pairs against a tight threshold (2N): most races abandoned
    for (int r = 0; r < 3; r++) begin
      load_random();
      compare(2 * N, 1, s);
    end
    // Below the smallest possible score (N): always abandoned
    load_random();
    compare(N - 1, 1, s);

    // Reprogram the score matrix: all three resistors x3
    r_indel    = 3 * R_INDEL_KOHM;
    r_match    = 3 * R_MATCH_KOHM;
    r_mismatch = 3 * R_MISMATCH_KOHM;
    repeat (20) @(posedge clk);
    for (int r = 0; r < 2; r++) begin
      load_random();
      compare(2000, 3, s);
      n_reprog++;
    end
    foreach (p_in[k]) q_in[k] = p_in[k];
    compare(2000, 3, s);
    check("perfect match score, delays x3", s, 3 * N);
    n_reprog++;

    $display("mechanisms: hit=%0d abort=%0d clear=%0d reprogram=%0d perfect=%0d mismatch=%0d",
             n_hit, n_abort, n_clear, n_reprog, n_perfect, n_mismatch);
    checks++;
    if (n_hit == 0 || n_abort == 0 || n_clear == 0 || n_reprog == 0 ||
        n_perfect == 0 || n_mismatch == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
