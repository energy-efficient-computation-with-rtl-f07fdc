// tb_race_screening: shotgun-read screening on the complete aligner.
// A random reference section of L nucleotides is cut into reads of N = 16
// symbols at random positions until the section is covered COVERAGE times.
// One read is then compared with every read (itself included) through
// race_logic_top with a similarity threshold of 2N: overlapping reads come
// back as hits with their score, unrelated ones are abandoned at the
// threshold. Every result is checked against the dynamic-programming
// reference (score, hit flag, latency); the self-comparison must score N;
// hits and abandoned races must both occur; and a histogram of the exact
// scores is printed.
`timescale 1ns / 1ps
module tb_race_screening;
  import race_pkg::*;
  import race_ref_pkg::*;

  localparam int N        = 16;
  localparam int L        = 64;
  localparam int COVERAGE = 20;
  localparam int READS    = COVERAGE * L / N;  // 80 reads
  localparam int CNT_W    = 12;
  localparam int THR      = 2 * N;

  logic             clk = 1'b0, rst_n;
  logic             go, ready;
  nt_e              p_in [N], q_in [N];
  logic [CNT_W-1:0] threshold;
  logic             result_valid, result_hit;
  logic [CNT_W-1:0] result_score;

  int checks = 0, failures = 0, n_hit = 0, n_abort = 0;
  int ref_seq [L];
  int start_pos [READS];
  int hist [5*N+1];

  race_logic_top #(.N(N)) dut (
    .clk, .rst_n, .go, .ready, .p_in, .q_in, .threshold,
    .r_indel_kohm(R_INDEL_KOHM), .r_match_kohm(R_MATCH_KOHM),
    .r_mismatch_kohm(R_MISMATCH_KOHM),
    .result_valid, .result_score, .result_hit);

  always #0.5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq_t ps, qs;
    int   exp_s, cyc;
    rst_n     = 1'b0;
    go        = 1'b0;
    threshold = CNT_W'(THR);
    foreach (ref_seq[k]) ref_seq[k] = $urandom_range(3);
    foreach (start_pos[r]) start_pos[r] = $urandom_range(L - N);
    foreach (hist[k]) hist[k] = 0;
    // The query read: read 0
    foreach (q_in[k]) begin
      q_in[k] = nt_e'(ref_seq[start_pos[0] + k]);
      qs[k]   = ref_seq[start_pos[0] + k];
    end
    repeat (20) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < READS; r++) begin
      foreach (p_in[k]) begin
        p_in[k] = nt_e'(ref_seq[start_pos[r] + k]);
        ps[k]   = ref_seq[start_pos[r] + k];
      end
      exp_s = edit_score(ps, qs, N, SCORE_MATCH, SCORE_MISMATCH, SCORE_INDEL);
      hist[exp_s]++;
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
      check("hit", int'(result_hit), int'(exp_s <= THR));
      check("score", int'(result_score), (exp_s <= THR) ? exp_s : THR);
      check("latency", cyc, (exp_s <= THR) ? exp_s + 4 : THR + 5);
      if (r == 0) check("self-comparison score", int'(result_score), N);
      if (result_hit) n_hit++;
      else            n_abort++;
    end
    $display("reads %0d, hits %0d, abandoned %0d (threshold %0d)", READS, n_hit, n_abort, THR);
    foreach (hist[k]) if (hist[k] != 0) $display("  score %3d : %0d", k, hist[k]);
    checks++;
    if (n_hit == 0 || n_abort == 0) begin
      failures++;
      $display("FAIL screening produced no hits or no abandoned races");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
